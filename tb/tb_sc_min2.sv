// tb_sc_min2: checks the second minimum comparator and BUF2 of the
// single-chip processor. Runs of 16 (state, metric) pairs arrive, the
// first flagged, with random idle clocks; after each run buf2 must hold the
// state of the smallest metric (the first one met on ties) and min_sm that
// metric. Metrics are drawn from a small range so that ties are common.
module tb_sc_min2;
  localparam int unsigned MW = 4, SMW = 6;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_first = 1'b0;
  logic [MW-1:0] in_code = '0, buf2;
  logic signed [SMW-1:0] in_sm = '0, min_sm;
  int checks = 0, failures = 0;

  sc_min2 #(.MW(MW), .SMW(SMW)) dut (.clk, .rst_n, .in_valid, .in_first, .in_code, .in_sm, .buf2, .min_sm);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int run = 0; run < 60; run++) begin
      int best_sm, best_code;
      for (int j = 0; j < 16; j++) begin
        int v;
        v = $urandom_range(0, 6) - 2;
        in_valid = 1'b1;
        in_first = (j == 0);
        in_code  = MW'(j);
        in_sm    = SMW'(v);
        if (j == 0 || v < best_sm) begin best_sm = v; best_code = j; end
        @(negedge clk);
        if ($urandom_range(0, 4) == 0) begin
          in_valid = 1'b0;
          in_sm    = SMW'(-8);
          repeat ($urandom_range(1, 3)) @(negedge clk);
        end
      end
      in_valid = 1'b0;
      check(int'(buf2) == best_code, $sformatf("buf2 %0d exp %0d", buf2, best_code));
      check(int'(min_sm) == best_sm, $sformatf("min_sm %0d exp %0d", min_sm, best_sm));
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
