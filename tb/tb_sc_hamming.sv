// tb_sc_hamming: checks the xor gates and bit counter of the single-chip
// processor: bm = number of ones in A xor T xor R, for random 8-bit words
// and the all-zero and all-one corners, against a bit-by-bit count.
module tb_sc_hamming;
  localparam int unsigned AW = 8, BW = 4;
  logic [AW-1:0] a_vec = '0, t_vec = '0, r_vec = '0;
  logic [BW-1:0] bm;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  sc_hamming #(.AW(AW)) dut (.a_vec, .t_vec, .r_vec, .bm);

  initial begin
    for (int k = 0; k < 600; k++) begin
      int exp_bm;
      a_vec = (k == 0) ? '0 : (k == 1) ? '1 : AW'($urandom);
      t_vec = (k < 2) ? '0 : AW'($urandom);
      r_vec = (k < 2) ? '0 : AW'($urandom);
      #1;
      exp_bm = 0;
      for (int b = 0; b < AW; b++) exp_bm += int'(a_vec[b] != (t_vec[b] != r_vec[b]));
      checks++;
      if (int'(bm) != exp_bm) begin
        failures++;
        if (failures < 20) $display("FAIL bm %0d exp %0d", bm, exp_bm);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
