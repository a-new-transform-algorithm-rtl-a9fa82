// sc_acs: ADDER, MIN BLOCK 1 and SM TEMP of the single-chip VT processor.
//
// For one destination state S_j the sources i = 0..N-1 are presented one
// per clock (in_valid, with in_first on i = 0). The adder forms the path
// metric Pm(i,j) = Sm(i) + bm; MIN BLOCK 1 compares it with the running
// survivor metric held in SM TEMP and, when it is smaller (or i = 0),
// loads SM TEMP and raises the latch signal for that clock, which tells the
// path-recording block to keep C(i). After the last source SM TEMP holds
// Sm(j,t). Ties keep the earlier source. Registered, one clock.
module sc_acs #(
  parameter int unsigned SMW = 6,
  parameter int unsigned BW  = 4
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic                  in_first,
  input  logic signed [SMW-1:0] sm_in,    // Sm(i) from RAM1
  input  logic [BW-1:0]         bm,       // branch metric from the PLA
  output logic                  latch,    // new minimum this clock
  output logic signed [SMW-1:0] sm_temp   // running / final Sm(j)
);
  logic signed [SMW-1:0] pm;

  always_comb begin
    pm    = sm_in + SMW'(bm);
    latch = in_valid && (in_first || pm < sm_temp);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     sm_temp <= '0;
    else if (latch) sm_temp <= pm;
  end
endmodule
