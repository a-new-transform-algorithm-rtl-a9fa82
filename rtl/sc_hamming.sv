// sc_hamming: the exclusive-or gates and the PLA of the single-chip VT
// processor, which together evaluate the m-stage branch metric.
//
// bm = number of ones in A(i) xor T(j) xor R(t): the xor of the two ROM
// words is the m-stage branch code W(i,j), and its Hamming distance to the
// received word R(t) is the branch metric of the merged branch from S_i to
// S_j. Combinational. The original architecture names the gates and the PLA ("for Hamming
// distance evaluation"); a population count stands for the PLA here.
module sc_hamming #(
  parameter int unsigned AW = 8,
  parameter int unsigned BW = $clog2(AW + 1)
) (
  input  logic [AW-1:0] a_vec,   // ROM1 word A(i)
  input  logic [AW-1:0] t_vec,   // ROM2 word T(j)
  input  logic [AW-1:0] r_vec,   // received word R(t)
  output logic [BW-1:0] bm       // branch metric
);
  assign bm = BW'($countones(a_vec ^ t_vec ^ r_vec));
endmodule
