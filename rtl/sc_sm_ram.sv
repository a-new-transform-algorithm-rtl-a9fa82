// sc_sm_ram: RAM1 (survivor-metric storage) and the normalising SUBTRACTOR
// of the single-chip VT processor.
//
// RAM1 holds Sm(i,t-m) of every state and is read, combinationally, at the
// source code i while a step runs. The new metrics Sm(j,t) cannot overwrite
// RAM1 until every destination has been evaluated, so they are written to a
// second bank as each destination is finished. In the update phase that
// follows, the update counter Y walks over all states and copies the new
// bank into RAM1 through the subtractor, which removes the step's minimum
// survivor metric (from MIN BLOCK 2), so the stored metrics stay in
// [0, m*n]. On a frame's first step (rd_first) the read returns 0 for state
// 0 and m*n+1 for the others, so the frame starts from state 0.
// The original architecture shows RAM1 and the subtractor; the second bank, the update-phase
// copy and the start values are this design's choices.
module sc_sm_ram #(
  parameter int unsigned MW  = 4,
  parameter int unsigned SMW = 6,
  parameter int unsigned AW  = 8     // m*n
) (
  input  logic                  clk,
  // read for the running step
  input  logic [MW-1:0]         rd_code,
  input  logic                  rd_first,
  output logic signed [SMW-1:0] rd_sm,
  // new survivor metric of a finished destination
  input  logic                  wr_valid,
  input  logic [MW-1:0]         wr_code,
  input  logic signed [SMW-1:0] wr_sm,
  // update phase
  input  logic                  upd_valid,
  input  logic [MW-1:0]         upd_addr,
  input  logic signed [SMW-1:0] min_sm
);
  localparam int unsigned N = 2 ** MW;
  localparam logic signed [SMW-1:0] START_PENALTY = SMW'(AW + 1);

  logic signed [SMW-1:0] ram1   [N];
  logic signed [SMW-1:0] newbank[N];

  always_ff @(posedge clk) begin
    if (wr_valid)  newbank[wr_code] <= wr_sm;
    if (upd_valid) ram1[upd_addr]   <= newbank[upd_addr] - min_sm;
  end

  assign rd_sm = !rd_first       ? ram1[rd_code] :
                 (rd_code == '0) ? '0 : START_PENALTY;
endmodule
