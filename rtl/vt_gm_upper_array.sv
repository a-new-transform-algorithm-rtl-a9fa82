// vt_gm_upper_array: Block 2 of the systolic VT processor, the lower-left
// triangle of G cells that multiplies a destination state code by the upper
// half of the extended generator matrix, T(j) = C(j) * Gm_u over GF(2).
//
// Gm_u has M rows (one per state-code bit) and M column blocks of NOUT bits;
// its entry at row l, block b is G_(l-b) for l >= b and empty otherwise, so
// block b of T(j) is the xor over l = b..M-1 of C(j)[l] * G_(l-b). The array
// has M pipeline stages; stage s holds one G cell for every block b <= s and
// multiplies by code bit s. Partial codes run from stage to stage (the
// diagonals of the triangle); blocks without a cell in a stage pass through a
// register, so all M blocks leave together. Code bit s is delayed s clocks
// before it enters stage s (the skewed input). The generator rows and the
// sideband bits (in_user) travel alongside, so a new code can enter every
// clock and its result appears M clocks later with its sideband.
//
// The arrangement of cells follows the triangle of the original (2,1,4)
// processor; registering every cell and carrying a sideband are this
// design's choices.
module vt_gm_upper_array #(
  parameter int unsigned M    = vt_pkg::M_DEFAULT,
  parameter int unsigned NOUT = vt_pkg::NOUT_DEFAULT,
  parameter int unsigned UW   = 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [M:0][NOUT-1:0]     gen,       // G_0 .. G_M
  input  logic                     in_valid,
  input  logic [M-1:0]             in_code,   // C(j), bit 0 = left-most
  input  logic [UW-1:0]            in_user,
  output logic                     out_valid,
  output logic [M-1:0][NOUT-1:0]   out_vec,   // T(j), block 0 first
  output logic [UW-1:0]            out_user
);
  logic [M-1:0]           code_q  [M];   // code_q[s]: code delayed s clocks
  logic [M-1:0][NOUT-1:0] part    [M+1]; // part[s]: partial T entering stage s
  logic [M:1]             valid_q;
  logic [UW-1:0]          user_q  [M+1];

  assign code_q[0]  = in_code;
  assign part[0]    = '0;
  assign user_q[0]  = in_user;

  for (genvar s = 1; s < M; s++) begin : g_skew
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) code_q[s] <= '0;
      else        code_q[s] <= code_q[s-1];
    end
  end

  for (genvar s = 0; s < M; s++) begin : g_stage
    for (genvar b = 0; b < M; b++) begin : g_blk
      if (b <= s) begin : g_cell
        vt_gcell #(.NOUT(NOUT)) u_cell (
          .clk, .rst_n,
          .g (gen[s-b]),
          .e (code_q[s][s]),
          .d (part[s][b]),
          .q (part[s+1][b])
        );
      end else begin : g_pass
        always_ff @(posedge clk or negedge rst_n) begin
          if (!rst_n) part[s+1][b] <= '0;
          else        part[s+1][b] <= part[s][b];
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) valid_q <= '0;
    else        valid_q <= {valid_q[M-1:1], in_valid};
  end

  for (genvar s = 1; s <= M; s++) begin : g_user
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) user_q[s] <= '0;
      else        user_q[s] <= user_q[s-1];
    end
  end

  assign out_valid = valid_q[M];
  assign out_vec   = part[M];
  assign out_user  = user_q[M];
endmodule
