// vt_gm_lower_array: Block 1 of the systolic VT processor, the upper-right
// triangle of G cells that multiplies a source state code by the lower half
// of the extended generator matrix, A(i) = C(i) * Gm_L over GF(2).
//
// Gm_L has M rows (one per state-code bit) and M column blocks of NOUT bits;
// its entry at row k, block b is G_(M+k-b) for k <= b and empty otherwise, so
// block b of A(i) is the xor over k = 0..b of C(i)[k] * G_(M+k-b). The array
// has M pipeline stages; stage s holds one G cell for every block b >= s and
// multiplies by code bit s. In the original layout each column of this
// triangle takes one code bit from above and the diagonals carry the partial
// codes; here the columns are the pipeline stages. Blocks without a cell in
// a stage pass through a register, so all M blocks leave together. Code bit
// s is delayed s clocks before it enters stage s. The sideband (in_user)
// travels alongside, so a new code can enter every clock and its result
// appears M clocks later, aligned with Block 2's result for a code issued
// at the same time.
//
// The cell contents follow the original Gm_L triangle; registering every
// cell and carrying a sideband are this design's choices.
module vt_gm_lower_array #(
  parameter int unsigned M    = vt_pkg::M_DEFAULT,
  parameter int unsigned NOUT = vt_pkg::NOUT_DEFAULT,
  parameter int unsigned UW   = 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [M:0][NOUT-1:0]     gen,       // G_0 .. G_M
  input  logic                     in_valid,
  input  logic [M-1:0]             in_code,   // C(i), bit 0 = left-most
  input  logic [UW-1:0]            in_user,
  output logic                     out_valid,
  output logic [M-1:0][NOUT-1:0]   out_vec,   // A(i), block 0 first
  output logic [UW-1:0]            out_user
);
  logic [M-1:0]           code_q  [M];   // code_q[s]: code delayed s clocks
  logic [M-1:0][NOUT-1:0] part    [M+1]; // part[s]: partial A entering stage s
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
      if (b >= s) begin : g_cell
        vt_gcell #(.NOUT(NOUT)) u_cell (
          .clk, .rst_n,
          .g (gen[M+s-b]),
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
