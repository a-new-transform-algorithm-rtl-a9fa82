// sc_branch_rom: ROM1 / ROM2 of the single-chip VT processor.
//
// A read-only table indexed by a state code. With UPPER = 0 it is ROM1 and
// holds A(i) = C(i) * Gm_L; with UPPER = 1 it is ROM2 and holds
// T(j) = C(j) * Gm_u (the two halves of the m-stage branch code, see
// vt_gm_upper_array / vt_gm_lower_array for the matrix entries). The table
// is computed at elaboration from the generator rows GEN, so the code is
// fixed when the chip is built. Combinational read.
// The original architecture names the two ROMs and what they feed; computing their contents
// from a generator parameter is this design's choice.
module sc_branch_rom #(
  parameter int unsigned M     = vt_pkg::M_DEFAULT,
  parameter int unsigned NOUT  = vt_pkg::NOUT_DEFAULT,
  // default: (2,1,4) code with generators 23 and 35 (octal), G_4 first
  parameter logic [M:0][NOUT-1:0] GEN = {2'd3, 2'd1, 2'd2, 2'd2, 2'd3},
  parameter bit          UPPER = 1'b0
) (
  input  logic [M-1:0]      addr,   // state code (i for ROM1, j for ROM2)
  output logic [M*NOUT-1:0] data    // block b in bits b*NOUT +: NOUT
);
  localparam int unsigned N  = 2 ** M;
  localparam int unsigned AW = M * NOUT;

  typedef logic [N-1:0][AW-1:0] table_t;

  function automatic table_t build();
    table_t t;
    for (int c = 0; c < N; c++) begin
      logic [AW-1:0] v;
      v = '0;
      for (int b = 0; b < M; b++)
        for (int l = 0; l < M; l++) begin
          // UPPER: entry G_(l-b) for l >= b; lower: G_(M+l-b) for l <= b
          if (UPPER && l >= b && c[l]) v[b*NOUT +: NOUT] ^= GEN[l-b];
          if (!UPPER && l <= b && c[l]) v[b*NOUT +: NOUT] ^= GEN[M+l-b];
        end
      t[c] = v;
    end
    return t;
  endfunction

  localparam table_t TABLE = build();

  assign data = TABLE[addr];
endmodule
