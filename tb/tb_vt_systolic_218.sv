// tb_vt_systolic_218: end-to-end test of the systolic VT processor built
// for the (2,1,8) code (256 states, 512 PE2 elements, 16-bit branch
// vectors), the largest code size the design is meant to be extended to.
//
// The code is the (2,1,8) code with generators 561 and 753 (octal); the
// survivor paths are kept for 3 steps (24 symbols). Three frames are sent:
// one back to back with random bit errors, a short one with idle gaps
// between words, and an error-free one. Every step's result (best state,
// its normalised metric, its survivor path and the decoded bits) is
// compared with vt_ref_pkg's model, the error-free frame is also checked
// against the information bits sent, and the step rate (2^(m+1) clocks)
// and result latency are measured. Mechanisms counted: two steps
// overlapping in the array, idle gaps, frame restarts, and bit errors.
module tb_vt_systolic_218;
  import vt_ref_pkg::*;

  localparam int unsigned M    = 8;
  localparam int unsigned NOUT = vt_pkg::NOUT_DEFAULT;
  localparam int unsigned HIST = 3;
  localparam int unsigned N    = 2 ** M;
  localparam int unsigned SMW  = vt_pkg::metric_width(M, NOUT);
  localparam int unsigned LATENCY = M + 4 * N;   // accept edge to dec_valid

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [M:0][NOUT-1:0] gen;
  logic rx_valid = 1'b0, rx_sof = 1'b0, rx_ready;
  logic [M*NOUT-1:0] rx_word = '0;
  logic dec_valid;
  logic [M-1:0] dec_state, dec_bits;
  logic signed [SMW-1:0] dec_sm;
  logic [HIST*M-1:0] dec_path;

  vt_systolic_decoder #(.M(M), .NOUT(NOUT), .HIST(HIST)) dut (
    .clk, .rst_n, .gen, .rx_valid, .rx_sof, .rx_word, .rx_ready,
    .dec_valid, .dec_state, .dec_sm, .dec_path, .dec_bits
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int unsigned cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // expected results, queued by the driver
  typedef struct {
    int unsigned state;
    int          sm;
    logic [127:0] path;
    bit          check_info;
    bit          rate_check;
    int unsigned info_group;
  } exp_t;
  exp_t expq[$];

  int n_overlap = 0, n_gap = 0, n_restart = 0, n_corrected = 0;
  int unsigned last_accept = 0;
  bit have_accept = 1'b0;
  int n_rate_ok = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at cycle %0d", what, cycle);
    end
  endtask

  vt_ref rf;

  // send one frame of nsteps steps
  task automatic send_frame(int nsteps, int err_per_1000, bit gaps, bit check_info);
    int unsigned info_hist[$];
    int prev0 = 0;
    int nerr_frame = 0;
    rf.restart();
    rf.enc_state = 0;
    for (int s = 0; s < nsteps; s++) begin
      int unsigned grp = 0;     // state code of the m inputs: bit 0 = newest
      int unsigned word = 0;
      int unsigned ideal = 0;
      exp_t e;
      int b;
      int nerr = 0;
      for (int k = 0; k < M; k++) begin
        bit u = 1'($urandom_range(0, 1));
        int unsigned w = rf.encode_bit(u);
        int unsigned wr = w;
        for (int q = 0; q < NOUT; q++)
          if ($urandom_range(0, 999) < err_per_1000) begin wr ^= (1 << q); nerr++; end
        // stage k of the step is block m-1-k
        word  |= wr << ((M - 1 - k) * NOUT);
        ideal |= w << ((M - 1 - k) * NOUT);
        grp   |= int'(u) << (M - 1 - k);
      end
      nerr_frame += nerr;
      info_hist.push_back(grp);
      rf.step(word);
      b = rf.best_state();
      e.state = b;
      e.sm    = rf.sm[b] - prev0;
      e.path  = rf.path[b];
      prev0   = rf.sm[0];
      e.check_info = check_info && (s >= HIST - 1);
      e.info_group = (s >= HIST - 1) ? info_hist[s - (HIST - 1)] : 0;
      if (gaps && s > 0 && $urandom_range(0, 2) == 0) begin
        rx_valid = 1'b0;
        repeat ($urandom_range(1, 3 * N)) @(negedge clk);
        n_gap++;
      end
      // the loop runs at falling edges; a word is taken at the rising edge
      // that follows a falling edge with rx_ready high
      rx_valid = 1'b1;
      rx_sof   = (s == 0);
      rx_word  = word;
      while (!rx_ready) @(negedge clk);
      e.rate_check = !gaps && s > 0;
      expq.push_back(e);
      @(negedge clk);
    end
    rx_valid = 1'b0;
    rx_sof   = 1'b0;
    if (nerr_frame > 0) n_corrected += nerr_frame;
  endtask

  // accepted words: cycle of acceptance, step rate, overlap
  int unsigned acc_q[$];
  always @(posedge clk) begin
    if (rst_n && rx_valid && rx_ready) begin
      acc_q.push_back(cycle);
      if (dut.u_seq.busy) n_overlap++;
      if (rx_sof) n_restart++;
      if (have_accept && expq.size() > 0 && expq[$].rate_check) begin
        check(cycle - last_accept == 2 * N, $sformatf("step rate %0d", cycle - last_accept));
        n_rate_ok++;
      end
      last_accept = cycle;
      have_accept = 1'b1;
    end
  end

  // monitor
  always @(posedge clk) begin
    if (rst_n && dec_valid) begin
      if (expq.size() == 0) begin
        check(1'b0, "unexpected result");
      end else begin
        exp_t e;
        logic [HIST*M-1:0] ep;
        logic [M-1:0] ebits;
        int unsigned ac;
        e  = expq.pop_front();
        ep = e.path[HIST*M-1:0];
        ac = (acc_q.size() > 0) ? acc_q.pop_front() : 0;
        for (int k = 0; k < M; k++) ebits[k] = ep[HIST*M-1-k];
        check(dec_state == M'(e.state), $sformatf("best state %0d exp %0d", dec_state, e.state));
        check(int'(dec_sm) == e.sm, $sformatf("metric %0d exp %0d", dec_sm, e.sm));
        check(dec_path == ep, "survivor path");
        check(dec_bits == ebits, "decoded bits");
        check(cycle - ac == LATENCY, $sformatf("latency %0d exp %0d", cycle - ac, LATENCY));
        if (e.check_info) begin
          logic [M-1:0] ib;
          for (int k = 0; k < M; k++) ib[k] = e.info_group[M-1-k];
          check(dec_bits == ib, "decoded bits against information bits");
        end
      end
    end
  end

  initial begin
    int unsigned g[] = new[M + 1];
    // (2,1,8) code, generators 561 and 753 octal: taps G_0..G_8
    g = '{3, 2, 3, 3, 1, 2, 0, 2, 3};
    for (int r = 0; r <= M; r++) gen[r] = NOUT'(g[r]);
    rf = new(M, NOUT, g);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);
    @(negedge clk);
    send_frame(12, 30, 1'b0, 1'b0);
    send_frame(6, 20, 1'b1, 1'b0);
    send_frame(8, 0, 1'b0, 1'b1);
    repeat (LATENCY + 10) @(posedge clk);
    check(expq.size() == 0, "all results seen");
    $display("mechanisms: overlapped steps=%0d idle gaps=%0d frame restarts=%0d bit errors=%0d rate checks=%0d",
             n_overlap, n_gap, n_restart, n_corrected, n_rate_ok);
    check(n_overlap > 0, "overlap happened");
    check(n_gap > 0, "gap happened");
    check(n_restart > 1, "restart happened");
    check(n_corrected > 0, "errors injected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
