// tb_sc_path_record: checks the path recording block of the single-chip
// processor (16 states, 24-bit paths) by playing the control sequence of
// whole decoding steps: for each destination j, 16 source clocks with a
// random latch pattern (always on the first), then a commit; then a
// restart with a random best state in BUF2; then 16 update clocks. A model
// keeps the path RAM and the temporary bank: at commit the new path of j is
// the path of the last latched source shifted up one group with j in the
// low group (an empty path at frame start), at restart BUF3 takes the new
// path of BUF2, and the update pass copies the bank into the RAM. Checked:
// BUF3 and out_valid after each restart, and the update counter.
module tb_sc_path_record;
  localparam int unsigned MW = 4, PW = 24, N = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  logic latch = 1'b0, commit = 1'b0, first = 1'b0, restart = 1'b0, update = 1'b0;
  logic [MW-1:0] c_i = '0, c_j = '0, buf2 = '0, y;
  logic [PW-1:0] buf3;
  logic out_valid;
  int checks = 0, failures = 0;

  sc_path_record #(.MW(MW), .PW(PW)) dut (
    .clk, .rst_n, .latch, .c_i, .c_j, .commit, .first, .restart, .buf2, .update, .y, .buf3, .out_valid);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    logic [PW-1:0] ram [N];
    logic [PW-1:0] tmp [N];
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int step = 0; step < 14; step++) begin
      int b;
      first = (step == 0 || step == 7);
      for (int j = 0; j < N; j++) begin
        int src;
        c_j = MW'(j);
        for (int i = 0; i < N; i++) begin
          c_i   = MW'(i);
          latch = (i == 0) || ($urandom_range(0, 3) == 0);
          if (latch) src = i;
          @(negedge clk);
        end
        latch  = 1'b0;
        commit = 1'b1;
        tmp[j] = {(first ? PW'(0) : ram[src]) << MW} | PW'(j);
        @(negedge clk);
        commit = 1'b0;
      end
      b = $urandom_range(0, N - 1);
      buf2    = MW'(b);
      restart = 1'b1;
      @(negedge clk);
      restart = 1'b0;
      check(out_valid, "out_valid after restart");
      check(buf3 == tmp[b], $sformatf("step %0d buf3 %h exp %h", step, buf3, tmp[b]));
      for (int k = 0; k < N; k++) begin
        update = 1'b1;
        #1;
        check(int'(y) == k, $sformatf("update counter %0d exp %0d", y, k));
        @(negedge clk);
        ram[k] = tmp[k];
        check(!out_valid, "out_valid low in update");
      end
      update = 1'b0;
      first  = 1'b0;
      @(negedge clk);
      check(y == '0, "update counter cleared");
      check(buf3 == tmp[b], "buf3 held");
    end
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
