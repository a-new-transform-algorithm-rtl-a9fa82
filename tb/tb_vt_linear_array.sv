// tb_vt_linear_array: three decoding steps of a 4-state code pushed through
// a linear array of 8 PE2 elements back to back (one step every 8 clocks,
// so consecutive steps overlap in the array and are kept apart only by
// their tags). B packets of destination j enter on the left at clock 2j,
// A packets of source i on the right at clock 2i+1, with random vectors and
// metrics. Each B packet must leave on the right L clocks after entering,
// carrying the minimum over all sources of Sm(i) + popcount(A(i) xor B(j))
// (first source wins a tie) with that source's code and path.
module tb_vt_linear_array;
  localparam int unsigned MW = 2, N = 4, L = 8, AW = 6, SMW = 6, PW = 8;
  localparam int unsigned STEPS = 3;
  localparam logic signed [SMW-1:0] INF = 31;
  logic clk = 1'b0, rst_n = 1'b0;
  logic av = 0, at = 0, bv = 0, bt = 0;
  logic [AW-1:0] ax = '0, bx = '0;
  logic signed [SMW-1:0] as = '0;
  logic [MW-1:0] ac = '0, bc = '0;
  logic [PW-1:0] ap = '0;
  logic xv, xt;
  logic signed [SMW-1:0] xs;
  logic [MW-1:0] xc, xq;
  logic [PW-1:0] xp;
  int checks = 0, failures = 0;
  int unsigned cycle = 0;

  vt_linear_array #(.L(L), .AW(AW), .SMW(SMW), .MW(MW), .PW(PW)) dut (
    .clk, .rst_n,
    .a_valid (av), .a_tag (at), .a_vec (ax), .a_sm (as), .a_code (ac), .a_path (ap),
    .b_valid (bv), .b_tag (bt), .b_vec (bx), .b_sm (INF), .b_code (bc), .b_src ('0), .b_path ('0),
    .x_valid (xv), .x_tag (xt), .x_sm (xs), .x_code (xc), .x_src (xq), .x_path (xp));
  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  typedef struct { int sm; int src; logic [PW-1:0] path; int code; bit tag; int unsigned t_in; } exp_t;
  exp_t expq[$];
  int unsigned b_in_cycle[$];

  logic [AW-1:0] avec [STEPS][N];
  logic [AW-1:0] bvec [STEPS][N];
  int            asm_ [STEPS][N];
  logic [PW-1:0] apath[STEPS][N];

  always @(posedge clk) if (rst_n && bv) b_in_cycle.push_back(cycle);

  always @(posedge clk) begin
    if (rst_n && xv) begin
      exp_t e;
      int unsigned tin;
      e = expq.pop_front();
      tin = b_in_cycle.pop_front();
      checks++;
      if (int'(xs) != e.sm || int'(xq) != e.src || xp != e.path || int'(xc) != e.code || xt != e.tag) begin
        failures++;
        $display("FAIL j=%0d sm %0d/%0d src %0d/%0d", xc, xs, e.sm, xq, e.src);
      end
      checks++;
      if (cycle - tin != L) begin failures++; $display("FAIL transit %0d", cycle - tin); end
    end
  end

  initial begin : stim
    for (int s = 0; s < STEPS; s++) begin
      for (int k = 0; k < N; k++) begin
        avec[s][k] = AW'($urandom); bvec[s][k] = AW'($urandom);
        asm_[s][k] = $urandom_range(0, 8) - 4; apath[s][k] = PW'($urandom);
      end
      for (int j = 0; j < N; j++) begin
        exp_t e;
        e.sm = 1000; e.src = 0; e.path = '0; e.code = j; e.tag = s[0];
        for (int i = 0; i < N; i++) begin
          int pm;
          pm = asm_[s][i] + $countones(avec[s][i] ^ bvec[s][j]);
          if (pm < e.sm) begin e.sm = pm; e.src = i; e.path = apath[s][i]; end
        end
        expq.push_back(e);
      end
    end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < STEPS; s++)
      for (int ph = 0; ph < 2 * N; ph++) begin
        int k;
        k = ph / 2;
        bv = (ph % 2 == 0); bt = s[0]; bx = bvec[s][k]; bc = MW'(k);
        av = (ph % 2 == 1); at = s[0]; ax = avec[s][k]; as = SMW'(asm_[s][k]);
        ac = MW'(k); ap = apath[s][k];
        @(negedge clk);
      end
    bv = 0; av = 0;
    repeat (3 * L) @(negedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("FAIL missing outputs"); end
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
