// vt_gcell: one G cell of the triangular branch-code arrays (Blocks 1 and 2).
//
// The cell stores one generator row G_r (NOUT bits, one per code output). It
// receives one state-code bit E and the partial branch code D travelling
// along its diagonal, and registers D xor (E * G_r), the GF(2) product of the
// bit with the stored row added to the partial sum. The E bit itself is
// routed by the array, not by the cell. One clock of latency; the register
// is cleared by the active-low reset.
module vt_gcell #(
  parameter int unsigned NOUT = vt_pkg::NOUT_DEFAULT
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [NOUT-1:0] g,   // stored generator row G_r
  input  logic            e,   // state-code bit
  input  logic [NOUT-1:0] d,   // incoming partial branch code
  output logic [NOUT-1:0] q    // d ^ (e ? g : 0), registered
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= '0;
    else        q <= d ^ ({NOUT{e}} & g);
  end
endmodule
