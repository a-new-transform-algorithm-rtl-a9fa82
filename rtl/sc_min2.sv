// sc_min2: MIN BLOCK 2 and BUF2 of the single-chip VT processor.
//
// As each destination state S_j is finished (in_valid with its code and
// Sm(j,t), in ascending j, in_first on j = 0) it keeps the smallest
// survivor metric of the step and latches the code of its state in BUF2
// (ties keep the smaller j). The minimum feeds the normalising subtractor
// and BUF2 addresses the path-recording block when the best path is read
// out. Registered, one clock.
module sc_min2 #(
  parameter int unsigned MW  = 4,
  parameter int unsigned SMW = 6
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic                  in_first,
  input  logic [MW-1:0]         in_code,
  input  logic signed [SMW-1:0] in_sm,
  output logic [MW-1:0]         buf2,     // best state code
  output logic signed [SMW-1:0] min_sm    // its metric
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      buf2   <= '0;
      min_sm <= '0;
    end else if (in_valid && (in_first || in_sm < min_sm)) begin
      buf2   <= in_code;
      min_sm <= in_sm;
    end
  end
endmodule
