// vt_sequencer: state-code counters and step control of the systolic VT
// processor.
//
// One decoding step takes the received word R(t) of m code stages and runs
// for 2N clocks (N = 2^m states). In the even clocks 2j it issues the
// destination code C(j) to Block 2 together with R(t) and the step tag; in
// the odd clocks 2i+1 it issues the source code C(i) to Block 1 together
// with the tag and a "first" flag. Interleaving the two streams this way
// puts every B packet one clock ahead of the A packet of the same index,
// which the counter-flowing linear array needs so that every pair meets.
//
// Interface: rx_valid/rx_ready handshake for R(t); a word is taken when both
// are high. rx_sof marks the first word of a frame: the step it starts uses
// the store's start values: the frame begins in state 0. The first word
// after reset always starts a frame, so the store is written before it is
// read. A new
// word can be taken in the last clock of a step, so back-to-back words give
// one step every 2N clocks. The tag toggles each step. The original architecture gives the
// counters; the handshake, frame start and tag are this design's choices.
module vt_sequencer #(
  parameter int unsigned M    = vt_pkg::M_DEFAULT,
  parameter int unsigned NOUT = vt_pkg::NOUT_DEFAULT
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   rx_valid,
  input  logic                   rx_sof,
  input  logic [M*NOUT-1:0]      rx_word,
  output logic                   rx_ready,
  // to Block 2 (destination codes)
  output logic                   dst_valid,
  output logic [M-1:0]           dst_code,
  output logic                   dst_tag,
  output logic [M*NOUT-1:0]      dst_r,
  // to Block 1 (source codes)
  output logic                   src_valid,
  output logic [M-1:0]           src_code,
  output logic                   src_tag,
  output logic                   src_first,
  // status
  output logic                   busy
);
  localparam int unsigned PH = 2 * (2 ** M);

  logic [$clog2(PH)-1:0] ph;
  logic                  tag_q;
  logic                  first_q;
  logic                  started;   // a word has been taken since reset
  logic [M*NOUT-1:0]     r_q;
  logic                  last;
  logic                  take;

  assign last     = (ph == $clog2(PH)'(PH - 1));
  assign rx_ready = !busy || last;
  assign take     = rx_valid && rx_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      ph      <= '0;
      tag_q   <= 1'b0;
      first_q <= 1'b0;
      started <= 1'b0;
      r_q     <= '0;
    end else if (take) begin
      started <= 1'b1;
      busy    <= 1'b1;
      ph      <= '0;
      tag_q   <= ~tag_q;
      first_q <= rx_sof || !started;
      r_q     <= rx_word;
    end else if (busy) begin
      if (last) busy <= 1'b0;
      ph <= ph + 1'b1;
    end
  end

  assign dst_valid = busy && !ph[0];
  assign dst_code  = M'(ph >> 1);
  assign dst_tag   = tag_q;
  assign dst_r     = r_q;
  assign src_valid = busy && ph[0];
  assign src_code  = M'(ph >> 1);
  assign src_tag   = tag_q;
  assign src_first = first_q;
endmodule
