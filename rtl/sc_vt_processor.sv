// sc_vt_processor: the single-chip VT processor, a serial implementation of
// the Viterbi transform for small codes (m up to 4), by default the (2,1,4)
// code with generators 23 and 35 (octal).
//
// It computes the same m-stage decoding step as the systolic processor, one
// path metric per clock: for every destination S_j (counter CUN2) and every
// source S_i (counter CUN1), ROM1 gives A(i) = C(i)*Gm_L, ROM2 gives
// T(j) = C(j)*Gm_u, the exclusive-or gates and the PLA count the ones of
// A(i) xor T(j) xor R(t) (the m-stage branch metric), the adder adds
// Sm(i,t-m) from RAM1, and MIN BLOCK 1 keeps the smallest sum in SM TEMP and
// signals the path-recording block to latch C(i). When S_j is finished its
// metric goes to MIN BLOCK 2 and to the new-metric bank, and its path is
// recorded. After all destinations the path of the best state (BUF2) is
// read out through BUF3, and the update phase moves the new metrics
// (normalised by the subtractor) and paths into place.
//
// Interface: rx_word is R(t) for m stages, r(t) (the newest word) in the
// low NOUT bits, bit k of a word = output Y_(k+1); rx_valid/rx_ready
// handshake, rx_sof starts a frame in state 0. The result of a step
// (dec_valid for one clock): best state, its metric relative to the
// previous step's minimum, its survivor path (HIST groups, newest group low,
// each group a state code) and the oldest m decided bits in transmission
// order (dec_bits[0] first). A step takes N*(N+1) + N + 1 clocks (289 for
// the (2,1,4) code); the result appears N*(N+1) + 2 clocks after the clock
// edge that takes the word.
//
// The blocks and their connections follow the original function-block
// diagram of the single-chip processor; the phase sequence, the second
// metric bank, the path length and the frame start are this design's.
module sc_vt_processor #(
  parameter int unsigned M    = vt_pkg::M_DEFAULT,
  parameter int unsigned NOUT = vt_pkg::NOUT_DEFAULT,
  parameter int unsigned HIST = vt_pkg::HIST_DEFAULT,
  parameter logic [M:0][NOUT-1:0] GEN = {2'd3, 2'd1, 2'd2, 2'd2, 2'd3}
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          rx_valid,
  input  logic                          rx_sof,
  input  logic [M*NOUT-1:0]             rx_word,
  output logic                          rx_ready,
  output logic                          dec_valid,
  output logic [M-1:0]                  dec_state,
  output logic signed [vt_pkg::metric_width(M, NOUT)-1:0] dec_sm,
  output logic [HIST*M-1:0]             dec_path,
  output logic [M-1:0]                  dec_bits
);
  localparam int unsigned AW  = M * NOUT;
  localparam int unsigned BW  = $clog2(AW + 1);
  localparam int unsigned SMW = vt_pkg::metric_width(M, NOUT);
  localparam int unsigned PW  = HIST * M;

  logic [M-1:0]  c_i, c_j, y, buf2;
  logic [AW-1:0] r_t, a_vec, t_vec;
  logic          first, run, run_first, commit, commit_first, restart, update;
  logic [BW-1:0] bm;
  logic signed [SMW-1:0] sm_i, sm_temp, min_sm;
  logic          latch;

  sc_control #(.M(M), .NOUT(NOUT)) u_ctrl (
    .clk, .rst_n, .rx_valid, .rx_sof, .rx_word, .rx_ready, .y,
    .c_i, .c_j, .r_t, .first, .run, .run_first, .commit, .commit_first,
    .restart, .update
  );

  sc_branch_rom #(.M(M), .NOUT(NOUT), .GEN(GEN), .UPPER(1'b0)) u_rom1 (
    .addr (c_i), .data (a_vec)
  );

  sc_branch_rom #(.M(M), .NOUT(NOUT), .GEN(GEN), .UPPER(1'b1)) u_rom2 (
    .addr (c_j), .data (t_vec)
  );

  sc_hamming #(.AW(AW), .BW(BW)) u_pla (
    .a_vec, .t_vec, .r_vec (r_t), .bm
  );

  sc_sm_ram #(.MW(M), .SMW(SMW), .AW(AW)) u_ram1 (
    .clk,
    .rd_code (c_i), .rd_first (first), .rd_sm (sm_i),
    .wr_valid (commit), .wr_code (c_j), .wr_sm (sm_temp),
    .upd_valid (update), .upd_addr (y), .min_sm
  );

  sc_acs #(.SMW(SMW), .BW(BW)) u_acs (
    .clk, .rst_n, .in_valid (run), .in_first (run_first),
    .sm_in (sm_i), .bm, .latch, .sm_temp
  );

  sc_min2 #(.MW(M), .SMW(SMW)) u_min2 (
    .clk, .rst_n, .in_valid (commit), .in_first (commit_first),
    .in_code (c_j), .in_sm (sm_temp), .buf2, .min_sm
  );

  sc_path_record #(.MW(M), .PW(PW)) u_path (
    .clk, .rst_n, .latch, .c_i, .c_j, .commit, .first, .restart, .buf2,
    .update, .y, .buf3 (dec_path), .out_valid (dec_valid)
  );

  assign dec_state = buf2;
  assign dec_sm    = min_sm;
  always_comb
    for (int k = 0; k < M; k++) dec_bits[k] = dec_path[PW-1-k];
endmodule
