// tb_sc_control: checks the controller of the single-chip processor
// (16 states). A stream of received words is offered, sometimes on the
// last update clock of the previous step (back to back) and sometimes
// after idle clocks. After each accepted word the controller must run,
// clock by clock: for each destination j = 0..15, 16 source clocks with
// c_i = 0..15 and c_j = j, then one commit clock; one restart clock; 16
// update clocks. rx_ready must be high only when idle and in the last
// update clock; the word and its frame-start flag must be held through the
// step. The update counter is modelled as the path block counts it.
module tb_sc_control;
  localparam int unsigned M = 4, NOUT = 2, N = 16;
  localparam int unsigned STEP = N * (N + 1) + 1 + N;
  logic clk = 1'b0, rst_n = 1'b0;
  logic rx_valid = 1'b0, rx_sof = 1'b0, rx_ready;
  logic [M*NOUT-1:0] rx_word = '0, r_t;
  logic [M-1:0] y = '0, c_i, c_j;
  logic first, run, run_first, commit, commit_first, restart, update;
  int checks = 0, failures = 0;

  sc_control #(.M(M), .NOUT(NOUT)) dut (
    .clk, .rst_n, .rx_valid, .rx_sof, .rx_word, .rx_ready, .y, .c_i, .c_j, .r_t, .first,
    .run, .run_first, .commit, .commit_first, .restart, .update);
  always #5 clk = ~clk;
  // update counter as the path recording block keeps it
  always_ff @(posedge clk) y <= update ? y + 1'b1 : '0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  // expected controls at clock k of a step (k = 0 is the first clock after
  // the accepting edge)
  task automatic check_clock(int k, logic [M*NOUT-1:0] w, bit sof);
    bit e_run, e_commit, e_restart, e_update;
    int e_i, e_j;
    e_run = 0; e_commit = 0; e_restart = 0; e_update = 0; e_i = -1; e_j = -1;
    if (k < N * (N + 1)) begin
      e_j = k / (N + 1);
      if (k % (N + 1) < N) begin e_run = 1; e_i = k % (N + 1); end
      else e_commit = 1;
    end else if (k == N * (N + 1)) e_restart = 1;
    else e_update = 1;
    check(run == e_run && commit == e_commit && restart == e_restart && update == e_update,
          $sformatf("phase at clock %0d: run %0b commit %0b restart %0b update %0b", k, run, commit, restart, update));
    if (e_run) check(int'(c_i) == e_i && int'(c_j) == e_j && run_first == (e_i == 0),
                     $sformatf("counters at clock %0d: i %0d j %0d", k, c_i, c_j));
    if (e_commit) check(int'(c_j) == e_j && commit_first == (e_j == 0), "commit counter");
    check(r_t == w && first == sof, "word and frame flag held");
    check(rx_ready == (k == STEP - 1), $sformatf("rx_ready at clock %0d", k));
  endtask

  initial begin
    int n_b2b = 0, n_gap = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(rx_ready && !run && !update, "idle after reset");
    for (int s = 0; s < 8; s++) begin
      logic [M*NOUT-1:0] w;
      bit sof;
      w   = (M * NOUT)'($urandom);
      sof = (s % 3 == 0);
      rx_valid = 1'b1;
      rx_word  = w;
      rx_sof   = sof;
      while (!rx_ready) @(negedge clk);
      @(negedge clk);
      rx_valid = 1'b0;
      rx_word  = '0;
      rx_sof   = 1'b0;
      for (int k = 0; k < STEP; k++) begin
        check_clock(k, w, sof);
        if (k < STEP - 1) @(negedge clk);
      end
      // back to back on even steps: the next word is offered in the last
      // update clock; otherwise the controller goes idle
      if (s % 2 == 1) begin
        @(negedge clk);
        check(rx_ready && !run && !update && !restart && !commit, "idle");
        repeat ($urandom_range(1, 4)) @(negedge clk);
        n_gap++;
      end else n_b2b++;
    end
    check(n_b2b > 0 && n_gap > 0, "both ways of starting a step seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
