// vt_linear_array: Block 3 of the systolic VT processor, a chain of L PE2
// elements (L = 2^(m+1), two per state) through which the A stream flows
// right-to-left and the B stream left-to-right.
//
// B packets enter at element 0 (the left end) and A packets at element L-1
// (the right end), each stream at most one packet every second clock. With
// the A packet of source i entering one clock after the B packet of
// destination i, every B packet of a decoding step meets every A packet of
// the same step exactly once, in element N + i - j (N = 2^m), so a B packet
// leaves the right end carrying the final Sm(j,t), the chosen source code
// and that source's survivor path. A packet crosses the array in L clocks.
// A packets leaving the left end are spent and dropped.
module vt_linear_array #(
  parameter int unsigned L   = 32,
  parameter int unsigned AW  = 8,
  parameter int unsigned SMW = 6,
  parameter int unsigned MW  = 4,
  parameter int unsigned PW  = 24
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // A stream, entering at the right end
  input  logic                  a_valid,
  input  logic                  a_tag,
  input  logic [AW-1:0]         a_vec,
  input  logic signed [SMW-1:0] a_sm,
  input  logic [MW-1:0]         a_code,
  input  logic [PW-1:0]         a_path,
  // B stream, entering at the left end
  input  logic                  b_valid,
  input  logic                  b_tag,
  input  logic [AW-1:0]         b_vec,
  input  logic signed [SMW-1:0] b_sm,
  input  logic [MW-1:0]         b_code,
  input  logic [MW-1:0]         b_src,
  input  logic [PW-1:0]         b_path,
  // B stream, leaving at the right end
  output logic                  x_valid,
  output logic                  x_tag,
  output logic signed [SMW-1:0] x_sm,
  output logic [MW-1:0]         x_code,
  output logic [MW-1:0]         x_src,
  output logic [PW-1:0]         x_path
);
  // index k: signals entering element k (A from the right, B from the left);
  // A index L is the array input, B index L is the array output.
  logic                  av [L+1];
  logic                  at [L+1];
  logic [AW-1:0]         ax [L+1];
  logic signed [SMW-1:0] as [L+1];
  logic [MW-1:0]         ac [L+1];
  logic [PW-1:0]         ap [L+1];
  logic                  bv [L+1];
  logic                  bt [L+1];
  logic [AW-1:0]         bx [L+1];
  logic signed [SMW-1:0] bs [L+1];
  logic [MW-1:0]         bc [L+1];
  logic [MW-1:0]         bq [L+1];
  logic [PW-1:0]         bp [L+1];

  assign av[L] = a_valid; assign at[L] = a_tag; assign ax[L] = a_vec;
  assign as[L] = a_sm;    assign ac[L] = a_code; assign ap[L] = a_path;
  assign bv[0] = b_valid; assign bt[0] = b_tag; assign bx[0] = b_vec;
  assign bs[0] = b_sm;    assign bc[0] = b_code; assign bq[0] = b_src;
  assign bp[0] = b_path;

  // a_in of element k comes from index k+1 (its right neighbour's output);
  // its a_out becomes index k. b_in of element k is index k; b_out is k+1.
  for (genvar k = 0; k < L; k++) begin : g_pe
      vt_pe2 #(.AW(AW), .SMW(SMW), .MW(MW), .PW(PW)) u_pe (
        .clk, .rst_n,
        .a_in_valid (av[k+1]), .a_in_tag (at[k+1]), .a_in_vec (ax[k+1]),
        .a_in_sm (as[k+1]), .a_in_code (ac[k+1]), .a_in_path (ap[k+1]),
        .a_out_valid (av[k]), .a_out_tag (at[k]), .a_out_vec (ax[k]),
        .a_out_sm (as[k]), .a_out_code (ac[k]), .a_out_path (ap[k]),
        .b_in_valid (bv[k]), .b_in_tag (bt[k]), .b_in_vec (bx[k]),
        .b_in_sm (bs[k]), .b_in_code (bc[k]), .b_in_src (bq[k]), .b_in_path (bp[k]),
        .b_out_valid (bv[k+1]), .b_out_tag (bt[k+1]), .b_out_vec (bx[k+1]),
        .b_out_sm (bs[k+1]), .b_out_code (bc[k+1]), .b_out_src (bq[k+1]), .b_out_path (bp[k+1])
      );
  end

  assign x_valid = bv[L];
  assign x_tag   = bt[L];
  assign x_sm    = bs[L];
  assign x_code  = bc[L];
  assign x_src   = bq[L];
  assign x_path  = bp[L];
endmodule
