// vt_sm_store: local survivor-metric and survivor-path memory of the systolic
// VT processor, with the normalising subtractor on its write side.
//
// When a B packet leaves the right end of the linear array it carries the
// final Sm(j,t) of its state, the best source code and that source's path.
// The store appends the m decoded bits of this step, the state code j
// itself, to the path (U(j,t) = U(q,t-m) followed by C(j)), and writes the
// metric and the new path at address j. These are read back, one clock
// later at the earliest, as Sm(i,t) and U(i,t) of the A packet of source i
// in the next step; this is the recirculation of the survivor metrics.
//
// Normalisation: the metric of state 0 is the first of each step to leave
// the array; it is remembered and subtracted from every metric of the step
// before the write, so state 0 is stored as 0. Because every state can be
// reached from every other in m stages, the metrics of one step differ by
// at most m*n, so the stored values stay within +-m*n and a few bits do.
// On a frame's first step (rd_first) the read returns an empty path, metric
// 0 for state 0 and a penalty of m*n+1 for every other state, larger than
// any m-stage branch metric, so that the frame starts from state 0 as the
// encoder does. The read is combinational; the write takes one clock.
// The original architecture keeps survivor metrics and paths in local memory and, in its
// single-chip processor, subtracts for normalisation; subtracting state 0's
// metric and the start penalty are this design's choices (the published
// worked example starts from state 0 alone).
module vt_sm_store #(
  parameter int unsigned MW  = 4,
  parameter int unsigned SMW = 6,
  parameter int unsigned PW  = 24,
  parameter int unsigned AW  = 8    // m*n, bits of one m-stage code word
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // survivors leaving the linear array
  input  logic                  wr_valid,
  input  logic [MW-1:0]         wr_code,
  input  logic signed [SMW-1:0] wr_sm,
  input  logic [PW-1:0]         wr_path,
  // read for the A packet of source i
  input  logic [MW-1:0]         rd_code,
  input  logic                  rd_first,
  output logic signed [SMW-1:0] rd_sm,
  output logic [PW-1:0]         rd_path
);
  localparam int unsigned N = 2 ** MW;

  logic signed [SMW-1:0] sm_mem   [N];
  logic [PW-1:0]         path_mem [N];
  logic signed [SMW-1:0] norm_q;
  logic signed [SMW-1:0] norm;

  assign norm = (wr_code == '0) ? wr_sm : norm_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                          norm_q <= '0;
    else if (wr_valid && wr_code == '0)  norm_q <= wr_sm;
  end

  always_ff @(posedge clk) begin
    if (wr_valid) begin
      sm_mem[wr_code]   <= wr_sm - norm;
      path_mem[wr_code] <= {wr_path[PW-MW-1:0], wr_code};
    end
  end

  localparam logic signed [SMW-1:0] START_PENALTY = SMW'(AW + 1);

  assign rd_sm   = !rd_first      ? sm_mem[rd_code] :
                   (rd_code == '0) ? '0 : START_PENALTY;
  assign rd_path = rd_first ? '0 : path_mem[rd_code];
endmodule
