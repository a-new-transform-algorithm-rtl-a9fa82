// tb_vt_sequencer: offers received words with random gaps and checks the
// issue pattern: after a word is taken, 2N clocks follow in which the even
// clocks issue destination codes 0..N-1 with that word and the odd clocks
// issue source codes 0..N-1, with a tag that toggles per step and the frame
// flag of the word; rx_ready is high when idle or in the last clock of a
// step, so back-to-back words are taken exactly 2N clocks apart.
module tb_vt_sequencer;
  localparam int unsigned M = 2, NOUT = 3, N = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  logic rx_valid = 1'b0, rx_sof = 1'b0, rx_ready;
  logic [M*NOUT-1:0] rx_word = '0;
  logic dst_valid, dst_tag, src_valid, src_tag, src_first, busy;
  logic [M-1:0] dst_code, src_code;
  logic [M*NOUT-1:0] dst_r;
  int checks = 0, failures = 0, n_b2b = 0;

  vt_sequencer #(.M(M), .NOUT(NOUT)) dut (
    .clk, .rst_n, .rx_valid, .rx_sof, .rx_word, .rx_ready,
    .dst_valid, .dst_code, .dst_tag, .dst_r, .src_valid, .src_code, .src_tag, .src_first, .busy);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // model
  int ph = -1;          // -1: idle
  bit tag_m = 0, first_m = 0;
  logic [M*NOUT-1:0] r_m;
  int unsigned last_take = 0, cycle = 0;

  always @(negedge clk) if (rst_n) begin
    // compare outputs of the current clock with the model
    check(rx_ready == (ph < 0 || ph == 2 * N - 1), "rx_ready");
    check(busy == (ph >= 0), "busy");
    if (ph >= 0) begin
      check(dst_valid == (ph % 2 == 0) && src_valid == (ph % 2 == 1), "slot");
      if (ph % 2 == 0) check(int'(dst_code) == ph / 2 && dst_tag == tag_m && dst_r == r_m, "dst issue");
      else             check(int'(src_code) == ph / 2 && src_tag == tag_m && src_first == first_m, "src issue");
    end else check(!dst_valid && !src_valid, "idle");
  end

  always @(posedge clk) if (rst_n) begin
    cycle <= cycle + 1;
    if (rx_valid && rx_ready) begin
      if (ph == 2 * N - 1) begin
        n_b2b++;
        check(cycle - last_take == 2 * N, "back-to-back spacing");
      end
      last_take <= cycle;
      ph <= 0; tag_m <= !tag_m; first_m <= rx_sof; r_m <= rx_word;
    end else if (ph >= 0) ph <= (ph == 2 * N - 1) ? -1 : ph + 1;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 300; k++) begin
      rx_valid = ($urandom_range(0, 3) != 0);
      rx_sof = 1'($urandom);
      rx_word = (M*NOUT)'($urandom);
      @(negedge clk);
    end
    check(n_b2b > 5, "back-to-back words seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
