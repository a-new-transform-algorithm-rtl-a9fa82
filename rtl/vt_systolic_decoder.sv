// vt_systolic_decoder: the systolic Viterbi-transform (VT) processor for an
// (NOUT,1,M) convolutional code, by default the (2,1,4) code.
//
// The VT decodes M trellis stages at once. Over M stages every state S_i
// reaches every state S_j by exactly one path, whose M-stage branch code is
// W(i,j) = [C(j) | C(i)] * Gm (Gm: the generator rows G_0..G_M stacked into
// a 2M x M*NOUT band matrix). Splitting Gm into halves gives
// W(i,j) = C(i)*Gm_L xor C(j)*Gm_u, so the path metric of the merged branch
// is Pm(i,j,t) = popcount(A(i) xor B(j)) + Sm(i,t-M) with A(i) = C(i)*Gm_L
// and B(j) = C(j)*Gm_u xor R(t), and the new survivor metric is the minimum
// over all N = 2^M sources.
//
// Data flow: the sequencer counts state codes; Block 2 (vt_gm_upper_array)
// and the EOR turn C(j) into B(j), Block 1 (vt_gm_lower_array) turns C(i)
// into A(i). B packets enter the linear array of 2N PE2 elements from the
// left with an "infinite" metric; A packets enter from the right with
// Sm(i,t-M) and the survivor path of S_i read from the survivor store. Each
// PE2 updates the B packet with the smaller path metric. Survivors leaving
// on the right are written back to the store (normalised) for the next step
// and compared by COM, which reports the best state and its path, from
// which M decoded bits per step are read without trace-back.
//
// Interface: gen holds G_0..G_M (bit k of G_r is generator g_(k+1) tap r);
// it must stay stable while decoding. rx_word is R(t) for M stages,
// r(t) (the newest received n-bit word) in the low NOUT bits, bit k of a
// word = code output Y_(k+1); rx_valid/rx_ready is a handshake, rx_sof starts
// a frame in state 0. Timing: one step every 2N clocks when words
// come back to back; a step's result (dec_valid) appears M + 4N clocks
// after the clock edge that takes its word.
//
// The block structure (Blocks 1-3, EOR, PE2, COM, recirculation) follows the
// original (2,1,4) processor; the handshake, the step tags, the metric
// normalisation and the path length HIST are this design's choices.
module vt_systolic_decoder #(
  parameter int unsigned M    = vt_pkg::M_DEFAULT,
  parameter int unsigned NOUT = vt_pkg::NOUT_DEFAULT,
  parameter int unsigned HIST = vt_pkg::HIST_DEFAULT
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [M:0][NOUT-1:0]          gen,
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
  localparam int unsigned N   = 2 ** M;
  localparam int unsigned L   = 2 * N;
  localparam int unsigned AW  = M * NOUT;
  localparam int unsigned SMW = vt_pkg::metric_width(M, NOUT);
  localparam int unsigned PW  = HIST * M;
  localparam logic signed [SMW-1:0] SM_INF = {1'b0, {(SMW-1){1'b1}}};

  // sequencer
  logic          dst_valid, dst_tag, src_valid, src_tag, src_first, busy;
  logic [M-1:0]  dst_code, src_code;
  logic [AW-1:0] dst_r;

  vt_sequencer #(.M(M), .NOUT(NOUT)) u_seq (
    .clk, .rst_n, .rx_valid, .rx_sof, .rx_word, .rx_ready,
    .dst_valid, .dst_code, .dst_tag, .dst_r,
    .src_valid, .src_code, .src_tag, .src_first, .busy
  );

  // Block 2: T(j) = C(j) * Gm_u; sideband {tag, j, R}
  logic                   t_valid;
  logic [M-1:0][NOUT-1:0] t_vec;
  logic [AW+M:0]          t_user;

  vt_gm_upper_array #(.M(M), .NOUT(NOUT), .UW(AW+M+1)) u_blk2 (
    .clk, .rst_n, .gen,
    .in_valid (dst_valid), .in_code (dst_code),
    .in_user  ({dst_tag, dst_code, dst_r}),
    .out_valid (t_valid), .out_vec (t_vec), .out_user (t_user)
  );

  // Block 1: A(i) = C(i) * Gm_L; sideband {tag, first, i}
  logic                   a_valid;
  logic [M-1:0][NOUT-1:0] a_vec;
  logic [M+1:0]           a_user;

  vt_gm_lower_array #(.M(M), .NOUT(NOUT), .UW(M+2)) u_blk1 (
    .clk, .rst_n, .gen,
    .in_valid (src_valid), .in_code (src_code),
    .in_user  ({src_tag, src_first, src_code}),
    .out_valid (a_valid), .out_vec (a_vec), .out_user (a_user)
  );

  // EOR: B(j) = T(j) xor R(t)
  logic [AW-1:0] b_vec;

  vt_eor #(.AW(AW)) u_eor (
    .t_vec (t_vec), .r_vec (t_user[AW-1:0]), .b_vec
  );

  // survivor store: recirculated Sm(i) and U(i) for the A packets
  logic                  x_valid, x_tag;
  logic signed [SMW-1:0] x_sm, a_sm;
  logic [M-1:0]          x_code, x_src;
  logic [PW-1:0]         x_path, a_path;

  vt_sm_store #(.MW(M), .SMW(SMW), .PW(PW), .AW(AW)) u_store (
    .clk, .rst_n,
    .wr_valid (x_valid), .wr_code (x_code), .wr_sm (x_sm), .wr_path (x_path),
    .rd_code (a_user[M-1:0]), .rd_first (a_user[M]),
    .rd_sm (a_sm), .rd_path (a_path)
  );

  // Block 3: linear array of 2N PE2 elements
  vt_linear_array #(.L(L), .AW(AW), .SMW(SMW), .MW(M), .PW(PW)) u_blk3 (
    .clk, .rst_n,
    .a_valid (a_valid), .a_tag (a_user[M+1]), .a_vec (a_vec),
    .a_sm (a_sm), .a_code (a_user[M-1:0]), .a_path (a_path),
    .b_valid (t_valid), .b_tag (t_user[AW+M]), .b_vec (b_vec),
    .b_sm (SM_INF), .b_code (t_user[AW+M-1:AW]), .b_src ('0), .b_path ('0),
    .x_valid, .x_tag, .x_sm, .x_code, .x_src, .x_path
  );

  // COM: best state of each step and its decoded bits
  vt_com #(.MW(M), .SMW(SMW), .PW(PW)) u_com (
    .clk, .rst_n,
    .x_valid, .x_code, .x_sm, .x_path,
    .dec_valid, .dec_state, .dec_sm, .dec_path, .dec_bits
  );
endmodule
