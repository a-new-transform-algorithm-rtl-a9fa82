// vt_top: both Viterbi-transform decoders side by side, each with its own
// ports: the systolic processor (sys_*) with its generator rows as an input,
// and the single-chip processor (sc_*) with its code fixed at build time
// by GEN. They implement the same m-stage decoding step for the same
// (NOUT,1,M) code size and share nothing but the clock and reset; with
// sys_gen equal to GEN and the same received words they report the same
// best states and survivor paths (their metrics are normalised
// differently, see each module). See vt_systolic_decoder and
// sc_vt_processor for interfaces and timing.
module vt_top #(
  parameter int unsigned M    = vt_pkg::M_DEFAULT,
  parameter int unsigned NOUT = vt_pkg::NOUT_DEFAULT,
  parameter int unsigned HIST = vt_pkg::HIST_DEFAULT,
  parameter logic [M:0][NOUT-1:0] GEN = {2'd3, 2'd1, 2'd2, 2'd2, 2'd3},
  localparam int unsigned SMW = vt_pkg::metric_width(M, NOUT)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // systolic processor
  input  logic [M:0][NOUT-1:0]  sys_gen,
  input  logic                  sys_rx_valid,
  input  logic                  sys_rx_sof,
  input  logic [M*NOUT-1:0]     sys_rx_word,
  output logic                  sys_rx_ready,
  output logic                  sys_dec_valid,
  output logic [M-1:0]          sys_dec_state,
  output logic signed [SMW-1:0] sys_dec_sm,
  output logic [HIST*M-1:0]     sys_dec_path,
  output logic [M-1:0]          sys_dec_bits,
  // single-chip processor
  input  logic                  sc_rx_valid,
  input  logic                  sc_rx_sof,
  input  logic [M*NOUT-1:0]     sc_rx_word,
  output logic                  sc_rx_ready,
  output logic                  sc_dec_valid,
  output logic [M-1:0]          sc_dec_state,
  output logic signed [SMW-1:0] sc_dec_sm,
  output logic [HIST*M-1:0]     sc_dec_path,
  output logic [M-1:0]          sc_dec_bits
);
  vt_systolic_decoder #(.M(M), .NOUT(NOUT), .HIST(HIST)) u_systolic (
    .clk, .rst_n, .gen (sys_gen),
    .rx_valid (sys_rx_valid), .rx_sof (sys_rx_sof), .rx_word (sys_rx_word),
    .rx_ready (sys_rx_ready), .dec_valid (sys_dec_valid), .dec_state (sys_dec_state),
    .dec_sm (sys_dec_sm), .dec_path (sys_dec_path), .dec_bits (sys_dec_bits)
  );

  sc_vt_processor #(.M(M), .NOUT(NOUT), .HIST(HIST), .GEN(GEN)) u_single_chip (
    .clk, .rst_n,
    .rx_valid (sc_rx_valid), .rx_sof (sc_rx_sof), .rx_word (sc_rx_word),
    .rx_ready (sc_rx_ready), .dec_valid (sc_dec_valid), .dec_state (sc_dec_state),
    .dec_sm (sc_dec_sm), .dec_path (sc_dec_path), .dec_bits (sc_dec_bits)
  );
endmodule
