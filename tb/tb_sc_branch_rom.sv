// tb_sc_branch_rom: checks the two branch-code ROMs of the single-chip
// processor at the default (2,1,4) code. For every pair of states (i, j)
// the word A(i) from the lower-part ROM xor T(j) from the upper-part ROM
// must equal the m code words an encoder emits when it starts in state i
// and is fed the m inputs of state j (vt_ref_pkg's wcode). With i = 0 or
// j = 0 this also checks each ROM on its own.
module tb_sc_branch_rom;
  import vt_ref_pkg::*;
  localparam int unsigned M = vt_pkg::M_DEFAULT, NOUT = vt_pkg::NOUT_DEFAULT, N = 2 ** M;
  logic [M-1:0] ai = '0, aj = '0;
  logic [M*NOUT-1:0] a_vec, t_vec;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  sc_branch_rom #(.UPPER(1'b0)) u_rom1 (.addr(ai), .data(a_vec));
  sc_branch_rom #(.UPPER(1'b1)) u_rom2 (.addr(aj), .data(t_vec));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    vt_ref rf;
    int unsigned g[] = new[M + 1];
    g = '{3, 2, 2, 1, 3};
    rf = new(M, NOUT, g);
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        ai = M'(i);
        aj = M'(j);
        #1;
        check((a_vec ^ t_vec) == (M * NOUT)'(rf.wcode(i, j)),
              $sformatf("W(%0d,%0d) = %h exp %h", i, j, a_vec ^ t_vec, rf.wcode(i, j)));
        if (i == 0) check(a_vec == '0, "A(0) is zero");
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
