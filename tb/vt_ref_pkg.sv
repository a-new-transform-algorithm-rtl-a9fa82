// vt_ref_pkg: behavioural reference for the testbenches of the VT decoders.
//
// It holds an (n,1,m) convolutional encoder and a plain model of one
// m-stage Viterbi-transform step written straight from the definitions:
// W(i,j) from the concatenated state codes [C(j)|C(i)] and the generator
// rows, the Hamming distance to R(t), and the minimum over all sources with
// ties going to the smallest source index. A frame starts in state 0. Metrics are kept absolute (no
// normalisation), paths as groups of m bits, newest group in the low bits.
// A word of one step packs r(t) (the newest stage) in the low n bits.
package vt_ref_pkg;

  class vt_ref;
    int unsigned m, n, nst;
    int unsigned gen[];       // gen[r] = G_r, bit k = output k+1
    int          sm[];        // absolute survivor metrics
    logic [127:0] path[];     // survivor paths
    int unsigned enc_state;   // encoder register, bit 0 = newest input

    function new(int unsigned m_, int unsigned n_, int unsigned g[]);
      m = m_; n = n_; nst = 1 << m_;
      gen = new[m_ + 1];
      foreach (gen[r]) gen[r] = g[r];
      sm = new[nst];
      path = new[nst];
      restart();
      enc_state = 0;
    endfunction

    function void restart();
      foreach (sm[k]) begin sm[k] = (k == 0) ? 0 : 1000; path[k] = '0; end
    endfunction

    // one encoder stage: returns the n-bit code word for input bit u
    function int unsigned encode_bit(bit u);
      int unsigned w = 0;
      int unsigned v = (enc_state << 1) | u;   // v bit 0 = u, bit r = register r
      for (int r = 0; r <= m; r++) if (v[r]) w ^= gen[r];
      enc_state = v & ((1 << m) - 1);
      return w;
    endfunction

    // m-stage branch code, block b in bits b*n +: n
    function int unsigned wcode(int unsigned i, int unsigned j);
      int unsigned inv = j | (i << m);   // IN bit k: C(j)[k] for k<m, C(i)[k-m] after
      int unsigned w = 0;
      for (int b = 0; b < m; b++) begin
        int unsigned blk = 0;
        for (int r = 0; r <= m; r++) if (inv[b + r]) blk ^= gen[r];
        w |= blk << (b * n);
      end
      return w;
    endfunction

    // one decoding step on received word rw
    function void step(int unsigned rw);
      int nsm[] = new[nst];
      logic [127:0] np[] = new[nst];
      for (int j = 0; j < nst; j++) begin
        int best = 32'h7fffffff; int q = 0;
        for (int i = 0; i < nst; i++) begin
          int pm = sm[i] + $countones(wcode(i, j) ^ rw);
          if (pm < best) begin best = pm; q = i; end
        end
        nsm[j] = best;
        np[j] = (path[q] << m) | 128'(j);
      end
      sm = nsm; path = np;
    endfunction

    function int best_state();
      int b = 0;
      for (int j = 1; j < nst; j++) if (sm[j] < sm[b]) b = j;
      return b;
    endfunction
  endclass

endpackage
