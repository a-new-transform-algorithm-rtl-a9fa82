// vt_eor: the EOR stage between Block 2 and the linear array.
//
// Forms B(j) = T(j) xor R(t), where T(j) = C(j)*Gm_u comes from Block 2 and
// R(t) = [r(t) | r(t-1) | ... | r(t-m+1)] is the received word of the m
// stages being decoded, newest word first so that it lines up with the
// m-stage branch code W(i,j) = [w(last stage) | ... | w(first stage)].
// With A(i) = C(i)*Gm_L, A(i) xor B(j) = W(i,j) xor R(t), whose number of
// ones is the m-stage branch metric. Combinational.
module vt_eor #(
  parameter int unsigned AW = 8
) (
  input  logic [AW-1:0] t_vec,  // T(j)
  input  logic [AW-1:0] r_vec,  // R(t)
  output logic [AW-1:0] b_vec   // B(j)
);
  assign b_vec = t_vec ^ r_vec;
endmodule
