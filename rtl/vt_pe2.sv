// vt_pe2: PE2, one processing element of the linear array (Block 3).
//
// Two streams cross the array in opposite directions. The A stream moves
// right-to-left and carries, for a source state S_i, the vector
// A(i) = C(i)*Gm_L, the survivor metric Sm(i,t-m) of the previous decoding
// step, the code i and the survivor path of S_i. The B stream moves
// left-to-right and carries, for a destination state S_j, the vector
// B(j) = C(j)*Gm_u xor R(t), the running survivor metric Sm(j,t), the code
// j, and the source code and path of the best candidate found so far.
//
// When an A packet and a B packet of the same decoding step (same tag) meet
// in this element it forms the path metric
//     Pm(i,j,t) = popcount(A(i) xor B(j)) + Sm(i,t-m)
// (the Hamming distance between the received m-stage word and the m-stage
// branch code W(i,j), plus the old survivor metric) and keeps the smaller of
// Pm and the running Sm(j,t), together with the winner's source code i (the
// H operator) and path. A tie keeps the earlier candidate; as B meets the
// A packets in ascending i, the smallest source index wins ties.
//
// Both output packets are registered: one clock per element in each
// direction. The step tag, which lets two decoding steps overlap in the
// array, and the path-metric width are this design's choices; the three
// operations (xor, weighted sum, minimum) follow the original architecture.
module vt_pe2 #(
  parameter int unsigned AW  = 8,   // m*n bits of A(i) and B(j)
  parameter int unsigned SMW = 6,   // signed metric width
  parameter int unsigned MW  = 4,   // state-code width m
  parameter int unsigned PW  = 24   // survivor-path width
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // A stream, from the right neighbour
  input  logic                  a_in_valid,
  input  logic                  a_in_tag,
  input  logic [AW-1:0]         a_in_vec,
  input  logic signed [SMW-1:0] a_in_sm,
  input  logic [MW-1:0]         a_in_code,
  input  logic [PW-1:0]         a_in_path,
  // A stream, to the left neighbour
  output logic                  a_out_valid,
  output logic                  a_out_tag,
  output logic [AW-1:0]         a_out_vec,
  output logic signed [SMW-1:0] a_out_sm,
  output logic [MW-1:0]         a_out_code,
  output logic [PW-1:0]         a_out_path,
  // B stream, from the left neighbour
  input  logic                  b_in_valid,
  input  logic                  b_in_tag,
  input  logic [AW-1:0]         b_in_vec,
  input  logic signed [SMW-1:0] b_in_sm,
  input  logic [MW-1:0]         b_in_code,
  input  logic [MW-1:0]         b_in_src,
  input  logic [PW-1:0]         b_in_path,
  // B stream, to the right neighbour
  output logic                  b_out_valid,
  output logic                  b_out_tag,
  output logic [AW-1:0]         b_out_vec,
  output logic signed [SMW-1:0] b_out_sm,
  output logic [MW-1:0]         b_out_code,
  output logic [MW-1:0]         b_out_src,
  output logic [PW-1:0]         b_out_path
);
  logic                  meet;
  logic [AW-1:0]         diff;
  logic signed [SMW-1:0] bm;
  logic signed [SMW-1:0] pm;
  logic                  take;

  always_comb begin
    meet = a_in_valid && b_in_valid && (a_in_tag == b_in_tag);
    diff = a_in_vec ^ b_in_vec;
    bm   = SMW'($countones(diff));
    pm   = a_in_sm + bm;
    take = meet && (pm < b_in_sm);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_out_valid <= 1'b0;
      b_out_valid <= 1'b0;
    end else begin
      a_out_valid <= a_in_valid;
      b_out_valid <= b_in_valid;
    end
  end

  always_ff @(posedge clk) begin
    a_out_tag  <= a_in_tag;
    a_out_vec  <= a_in_vec;
    a_out_sm   <= a_in_sm;
    a_out_code <= a_in_code;
    a_out_path <= a_in_path;
    b_out_tag  <= b_in_tag;
    b_out_vec  <= b_in_vec;
    b_out_code <= b_in_code;
    b_out_sm   <= take ? pm        : b_in_sm;
    b_out_src  <= take ? a_in_code : b_in_src;
    b_out_path <= take ? a_in_path : b_in_path;
  end
endmodule
