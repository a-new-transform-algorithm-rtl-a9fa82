// tb_sc_acs: checks the adder, first minimum comparator and SM TEMP of the
// single-chip processor. Random runs of 16 candidates (Sm(i), bm) are fed,
// the first of each run flagged, with random idle clocks in between; after
// each clock sm_temp must hold the smallest Sm(i)+bm so far (the first
// one met on ties), and latch must be high exactly when a new minimum is
// taken.
module tb_sc_acs;
  localparam int unsigned SMW = 6, BW = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_first = 1'b0;
  logic signed [SMW-1:0] sm_in = '0, sm_temp;
  logic [BW-1:0] bm = '0;
  logic latch;
  int checks = 0, failures = 0;

  sc_acs #(.SMW(SMW), .BW(BW)) dut (.clk, .rst_n, .in_valid, .in_first, .sm_in, .bm, .latch, .sm_temp);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    int best;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int run = 0; run < 40; run++) begin
      for (int i = 0; i < 16; i++) begin
        int pm;
        bit exp_latch;
        in_valid = 1'b1;
        in_first = (i == 0);
        sm_in    = SMW'($urandom_range(0, 9));
        bm       = BW'($urandom_range(0, 8));
        pm       = int'(sm_in) + int'(bm);
        exp_latch = (i == 0) || pm < best;
        #1;
        check(latch == exp_latch, $sformatf("latch %0b exp %0b", latch, exp_latch));
        if (exp_latch) best = pm;
        @(negedge clk);
        check(int'(sm_temp) == best, $sformatf("sm_temp %0d exp %0d", sm_temp, best));
        if ($urandom_range(0, 5) == 0) begin
          in_valid = 1'b0;
          #1;
          check(!latch, "no latch when idle");
          @(negedge clk);
          check(int'(sm_temp) == best, "sm_temp held");
        end
      end
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
