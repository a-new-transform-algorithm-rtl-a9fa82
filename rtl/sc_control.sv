// sc_control: Control Logic Block and the counters CUN1 / CUN2 of the
// single-chip VT processor.
//
// A step starts when a received word R(t) of m stages is taken (rx_valid
// and rx_ready). CUN2 then counts the destination codes j = 0..N-1; for
// each j, CUN1 counts the source codes i = 0..N-1, one per clock (run),
// followed by one commit clock in which S_j's results are stored. After the
// last destination comes one restart clock (the best path is read out) and
// N update clocks (new metrics and paths replace the old). A step thus
// takes N*(N+1) + 1 + N clocks. rx_ready is high when idle and in the last
// update clock, so back-to-back words keep the processor busy. rx_sof marks
// the first word of a frame (start from state 0); the first word after
// reset always starts one, so RAM1 and the path RAM are written before
// they are read. The original architecture gives the
// blocks and counters; the phase sequence is this design's choice.
module sc_control #(
  parameter int unsigned M    = vt_pkg::M_DEFAULT,
  parameter int unsigned NOUT = vt_pkg::NOUT_DEFAULT
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              rx_valid,
  input  logic              rx_sof,
  input  logic [M*NOUT-1:0] rx_word,
  output logic              rx_ready,
  input  logic [M-1:0]      y,          // update counter of the path block
  output logic [M-1:0]      c_i,        // CUN1
  output logic [M-1:0]      c_j,        // CUN2
  output logic [M*NOUT-1:0] r_t,        // received word of the step
  output logic              first,      // first step of a frame
  output logic              run,        // a source is presented
  output logic              run_first,  // ... and it is i = 0
  output logic              commit,     // destination c_j finished
  output logic              commit_first,
  output logic              restart,
  output logic              update
);
  typedef enum logic [2:0] {S_IDLE, S_RUN, S_COMMIT, S_RESTART, S_UPDATE} state_t;
  localparam logic [M-1:0] LAST = '1;

  state_t st;
  logic   take;
  logic   started;   // a word has been taken since reset

  assign rx_ready = (st == S_IDLE) || (st == S_UPDATE && y == LAST);
  assign take     = rx_valid && rx_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st    <= S_IDLE;
      c_i   <= '0;
      c_j   <= '0;
      r_t   <= '0;
      first <= 1'b0;
      started <= 1'b0;
    end else begin
      if (take) started <= 1'b1;
      unique case (st)
        S_IDLE, S_UPDATE: begin
          if (take) begin
            st    <= S_RUN;
            c_i   <= '0;
            c_j   <= '0;
            r_t   <= rx_word;
            first <= rx_sof || !started;
          end else if (st == S_UPDATE && y == LAST) begin
            st <= S_IDLE;
          end
        end
        S_RUN: begin
          c_i <= c_i + 1'b1;
          if (c_i == LAST) st <= S_COMMIT;
        end
        S_COMMIT: begin
          c_j <= c_j + 1'b1;
          st  <= (c_j == LAST) ? S_RESTART : S_RUN;
        end
        S_RESTART: st <= S_UPDATE;
        default:   st <= S_IDLE;
      endcase
    end
  end

  assign run          = (st == S_RUN);
  assign run_first    = (st == S_RUN) && (c_i == '0);
  assign commit       = (st == S_COMMIT);
  assign commit_first = (st == S_COMMIT) && (c_j == '0);
  assign restart      = (st == S_RESTART);
  assign update       = (st == S_UPDATE);
endmodule
