// tb_vt_pe2: random packets on both streams of one PE2. Checks that both
// streams pass in one clock, that a B packet takes the A packet's metric
// popcount(A xor B) + Sm(i), source code and path exactly when the tags
// match, both are valid and the path metric is strictly smaller, and that
// it is left alone otherwise.
module tb_vt_pe2;
  localparam int unsigned AW = 8, SMW = 6, MW = 4, PW = 12;
  logic clk = 1'b0, rst_n = 1'b0;
  logic av, at, bv, bt;
  logic [AW-1:0] ax, bx;
  logic signed [SMW-1:0] as, bs;
  logic [MW-1:0] ac, bc, bq;
  logic [PW-1:0] ap, bp;
  logic oav, oat, obv, obt;
  logic [AW-1:0] oax, obx;
  logic signed [SMW-1:0] oas, obs;
  logic [MW-1:0] oac, obc, obq;
  logic [PW-1:0] oap, obp;
  int checks = 0, failures = 0, n_take = 0, n_keep = 0;

  vt_pe2 #(.AW(AW), .SMW(SMW), .MW(MW), .PW(PW)) dut (
    .clk, .rst_n,
    .a_in_valid (av), .a_in_tag (at), .a_in_vec (ax), .a_in_sm (as), .a_in_code (ac), .a_in_path (ap),
    .a_out_valid (oav), .a_out_tag (oat), .a_out_vec (oax), .a_out_sm (oas), .a_out_code (oac), .a_out_path (oap),
    .b_in_valid (bv), .b_in_tag (bt), .b_in_vec (bx), .b_in_sm (bs), .b_in_code (bc), .b_in_src (bq), .b_in_path (bp),
    .b_out_valid (obv), .b_out_tag (obt), .b_out_vec (obx), .b_out_sm (obs), .b_out_code (obc), .b_out_src (obq), .b_out_path (obp));
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    int pm;
    bit take;
    av = 0; bv = 0; at = 0; bt = 0; ax = 0; bx = 0; as = 0; bs = 0;
    ac = 0; bc = 0; bq = 0; ap = 0; bp = 0;
    repeat (2) @(negedge clk);
    check(!oav && !obv, "reset clears valid");
    rst_n = 1'b1;
    for (int k = 0; k < 400; k++) begin
      av = ($urandom_range(0, 7) != 0); bv = ($urandom_range(0, 7) != 0);
      at = 1'($urandom); bt = ($urandom_range(0, 3) == 0) ? !at : at;
      ax = AW'($urandom); bx = AW'($urandom);
      as = SMW'($urandom_range(0, 16)) - SMW'(8);
      bs = SMW'($urandom_range(0, 24)) - SMW'(4);
      ac = MW'($urandom); bc = MW'($urandom); bq = MW'($urandom);
      ap = PW'($urandom); bp = PW'($urandom);
      pm = int'(as) + $countones(ax ^ bx);
      take = av && bv && (at == bt) && (pm < int'(bs));
      if (take) n_take++; else n_keep++;
      @(negedge clk);
      check(oav == av && obv == bv, "valid passes");
      check(oat == at && oax == ax && oas == as && oac == ac && oap == ap, "A passes unchanged");
      check(obt == bt && obx == bx && obc == bc, "B identity passes");
      if (take) check(int'(obs) == pm && obq == ac && obp == ap, $sformatf("B takes pm %0d got %0d", pm, obs));
      else      check(obs == bs && obq == bq && obp == bp, "B keeps its survivor");
    end
    check(n_take > 20 && n_keep > 20, "both outcomes seen");
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
