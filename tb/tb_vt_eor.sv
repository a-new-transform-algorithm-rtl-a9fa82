// tb_vt_eor: random test of the EOR stage, B = T xor R.
module tb_vt_eor;
  localparam int unsigned AW = 8;
  logic [AW-1:0] t_vec, r_vec, b_vec;
  int checks = 0, failures = 0;
  vt_eor #(.AW(AW)) dut (.t_vec, .r_vec, .b_vec);
  initial begin
    for (int k = 0; k < 300; k++) begin
      t_vec = AW'($urandom); r_vec = AW'($urandom);
      #1;
      checks++;
      if (b_vec !== (t_vec ^ r_vec)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
