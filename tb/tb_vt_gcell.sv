// tb_vt_gcell: random test of one G cell: q must be d xor (e and g) one
// clock after the inputs, and zero after reset.
module tb_vt_gcell;
  localparam int unsigned NOUT = 2;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [NOUT-1:0] g, d, q;
  logic e;
  int checks = 0, failures = 0;

  vt_gcell #(.NOUT(NOUT)) dut (.clk, .rst_n, .g, .e, .d, .q);
  always #5 clk = ~clk;

  initial begin
    logic [NOUT-1:0] exp_q;
    g = '0; d = '0; e = 1'b0;
    repeat (2) @(negedge clk);
    checks++; if (q !== '0) failures++;
    rst_n = 1'b1;
    for (int k = 0; k < 200; k++) begin
      g = NOUT'($urandom); d = NOUT'($urandom); e = 1'($urandom);
      exp_q = e ? (d ^ g) : d;
      @(negedge clk);
      checks++;
      if (q !== exp_q) begin failures++; $display("FAIL q=%b exp %b", q, exp_q); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
