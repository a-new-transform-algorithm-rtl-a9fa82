// tb_vt_gm_lower_array: streams one random state code per clock (with
// random bubbles) through the array and checks every result, M clocks
// later, against A(i) = C(i) * Gm_L, block b = xor over k <= b of C[k]*G_(M+k-b),
// together with the valid flag and the sideband.
// The generator changes between two runs of the stream.
module tb_vt_gm_lower_array;
  localparam int unsigned M = 4, NOUT = 2, UW = 5, GW = (M + 1) * NOUT;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [M:0][NOUT-1:0] gen;
  logic in_valid = 1'b0;
  logic [M-1:0] in_code = '0;
  logic [UW-1:0] in_user = '0;
  logic out_valid;
  logic [M-1:0][NOUT-1:0] out_vec;
  logic [UW-1:0] out_user;
  int checks = 0, failures = 0;

  vt_gm_lower_array #(.M(M), .NOUT(NOUT), .UW(UW)) dut (
    .clk, .rst_n, .gen, .in_valid, .in_code, .in_user, .out_valid, .out_vec, .out_user);
  always #5 clk = ~clk;

  logic [M:0][NOUT-1:0] gen_v;
  function automatic logic [M-1:0][NOUT-1:0] expect_vec(logic [M-1:0] c);
    logic [M-1:0][NOUT-1:0] r;
    for (int b = 0; b < M; b++) begin
      int unsigned blk = 0;
      for (int l = 0; l < M; l++) if (l <= b) blk ^= c[l] ? 32'(gen_v[M+l-b]) : 0;
      r[b] = NOUT'(blk);
    end
    return r;
  endfunction

  typedef struct { logic v; logic [M-1:0][NOUT-1:0] vec; logic [UW-1:0] user; } exp_t;
  exp_t pipe[$];

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int run = 0; run < 2; run++) begin
      gen = (run == 0) ? {2'b11, 2'b01, 2'b01, 2'b10, 2'b11} : GW'($urandom);
      gen_v = gen;
      pipe.delete();
      in_valid = 1'b0;
      repeat (M + 1) @(negedge clk);
      for (int k = 0; k < 200; k++) begin
        exp_t e;
        in_valid = ($urandom_range(0, 3) != 0);
        in_code  = M'($urandom);
        in_user  = UW'($urandom);
        e.v = in_valid; e.vec = expect_vec(in_code); e.user = in_user;
        pipe.push_back(e);
        @(negedge clk);
        if (pipe.size() >= M) begin
          exp_t x;
          x = pipe.pop_front();
          checks++;
          if (out_valid !== x.v || (x.v && (out_vec !== x.vec || out_user !== x.user))) begin
            failures++;
            $display("FAIL valid %b vec %h exp %b %h", out_valid, out_vec, x.v, x.vec);
          end
        end
      end
    end
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
