// vt_pkg: shared defaults and helpers for the Viterbi-transform (VT) decoders.
//
// The VT decodes an (n,1,m) convolutional code m stages at a time. A state
// S_j is named by its m-bit state code C(j), the bit-reversed binary of j:
// code position 0 (the left-most bit) is bit 0 of j and holds the newest
// input bit. The default code is the (2,1,4) code for which the systolic
// processor is laid out (n = 2 outputs, m = 4 memory stages, 16 states).
package vt_pkg;

  localparam int unsigned M_DEFAULT    = 4;  // encoder memory m
  localparam int unsigned NOUT_DEFAULT = 2;  // code outputs n
  localparam int unsigned HIST_DEFAULT = 6;  // survivor-path length in m-bit groups (own choice)

  // Signed width that holds every normalised metric of an (NOUT,1,M) code:
  // stored survivor metrics lie in [-M*NOUT, M*NOUT], path metrics in
  // [-M*NOUT, 2*M*NOUT+1], and the largest positive value marks "no candidate yet".
  function automatic int unsigned metric_width(int unsigned m, int unsigned nout);
    return $clog2(2 * m * nout + 3) + 1;
  endfunction

endpackage
