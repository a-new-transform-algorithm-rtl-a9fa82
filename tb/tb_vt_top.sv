// tb_vt_top: end-to-end test of vt_top at its default size, the (2,1,4)
// code (16 states), with both decoders fed the same received words.
//
// The code is the (2,1,4) code with generators 23 and 35 (octal); the
// systolic processor gets it on sys_gen, the single-chip processor has it
// as its default GEN. A list of steps is prepared first: a long frame with
// random bit errors, a short frame with idle gaps between words, and an
// error-free frame. Two drivers then send the list to the two decoders,
// each at its own pace, and two monitors compare every result (best state,
// normalised metric, survivor path, decoded bits, latency) with
// vt_ref_pkg's model; the error-free frame is also checked against the
// information bits sent (the first word after reset is sent without its
// frame-start flag, which the decoders must supply), the step rates are measured, and the two decoders'
// states and paths are compared with each other. Mechanisms counted: steps
// overlapping in the systolic array, words taken during the single-chip
// update phase, idle gaps, frame restarts, and bit errors corrected.
module tb_vt_top;
  import vt_ref_pkg::*;

  localparam int unsigned M    = vt_pkg::M_DEFAULT;
  localparam int unsigned NOUT = vt_pkg::NOUT_DEFAULT;
  localparam int unsigned HIST = vt_pkg::HIST_DEFAULT;
  localparam int unsigned N    = 2 ** M;
  localparam int unsigned SMW  = vt_pkg::metric_width(M, NOUT);
  // index 0: systolic processor, index 1: single-chip processor
  localparam int unsigned LATENCY [2] = '{M + 4 * N, N * (N + 1) + 2};
  localparam int unsigned PERIOD  [2] = '{2 * N, N * (N + 1) + N + 1};

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [M:0][NOUT-1:0] gen;
  logic rx_valid [2] = '{1'b0, 1'b0};
  logic rx_sof   [2] = '{1'b0, 1'b0};
  logic [M*NOUT-1:0] rx_word [2] = '{'0, '0};
  logic rx_ready [2];
  logic dec_valid [2];
  logic [M-1:0] dec_state [2], dec_bits [2];
  logic signed [SMW-1:0] dec_sm [2];
  logic [HIST*M-1:0] dec_path [2];

  vt_top dut (
    .clk, .rst_n,
    .sys_gen (gen),
    .sys_rx_valid (rx_valid[0]), .sys_rx_sof (rx_sof[0]), .sys_rx_word (rx_word[0]),
    .sys_rx_ready (rx_ready[0]), .sys_dec_valid (dec_valid[0]), .sys_dec_state (dec_state[0]),
    .sys_dec_sm (dec_sm[0]), .sys_dec_path (dec_path[0]), .sys_dec_bits (dec_bits[0]),
    .sc_rx_valid (rx_valid[1]), .sc_rx_sof (rx_sof[1]), .sc_rx_word (rx_word[1]),
    .sc_rx_ready (rx_ready[1]), .sc_dec_valid (dec_valid[1]), .sc_dec_state (dec_state[1]),
    .sc_dec_sm (dec_sm[1]), .sc_dec_path (dec_path[1]), .sc_dec_bits (dec_bits[1])
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int unsigned cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // one step of the prepared stimulus with its expected results
  typedef struct {
    int unsigned word;
    bit          sof;
    int unsigned gap;          // idle clocks before the word is offered
    int unsigned state;
    int          sm [2];       // metric as each decoder normalises it
    logic [127:0] path;
    bit          check_info;
    bit          rate_check;
    int unsigned info_group;
  } step_t;
  step_t steps[$];

  int n_overlap = 0, n_upd_take = 0, n_gap = 0, n_restart = 0, n_corrected = 0;
  int n_rate [2] = '{0, 0};
  int n_seen [2] = '{0, 0};
  bit driver_done [2] = '{1'b0, 1'b0};

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at cycle %0d", what, cycle);
    end
  endtask

  vt_ref rf;

  // prepare one frame of nsteps steps
  task automatic make_frame(int nsteps, int err_per_1000, bit gaps, bit check_info);
    int unsigned info_hist[$];
    int prev_best = 0;
    int prev_zero = 0;
    rf.restart();
    rf.enc_state = 0;
    if (nsteps > 0) n_restart++;
    for (int s = 0; s < nsteps; s++) begin
      int unsigned grp = 0;     // state code of the m inputs: bit 0 = newest
      int unsigned word = 0;
      step_t e;
      int b;
      for (int k = 0; k < M; k++) begin
        bit u = 1'($urandom_range(0, 1));
        int unsigned w = rf.encode_bit(u);
        for (int q = 0; q < NOUT; q++)
          if ($urandom_range(0, 999) < err_per_1000) begin w ^= (1 << q); n_corrected++; end
        // stage k of the step is block m-1-k
        word |= w << ((M - 1 - k) * NOUT);
        grp  |= int'(u) << (M - 1 - k);
      end
      info_hist.push_back(grp);
      rf.step(word);
      b = rf.best_state();
      e.word  = word;
      // the very first word is sent without rx_sof: the first word after
      // reset must start a frame on its own
      e.sof   = (s == 0) && (steps.size() > 0);
      e.gap   = (gaps && s > 0 && $urandom_range(0, 2) == 0) ? $urandom_range(1, 3 * N) : 0;
      if (e.gap > 0) n_gap++;
      e.state = b;
      e.sm[0] = rf.sm[b] - prev_zero;   // relative to state 0 of the step before
      prev_zero = rf.sm[0];
      e.sm[1] = rf.sm[b] - prev_best;   // relative to the best of the step before
      prev_best = rf.sm[b];
      e.path  = rf.path[b];
      e.check_info = check_info && (s >= HIST - 1);
      e.info_group = (s >= HIST - 1) ? info_hist[s - (HIST - 1)] : 0;
      e.rate_check = !gaps && s > 0;
      steps.push_back(e);
    end
  endtask

  for (genvar d = 0; d < 2; d++) begin : g_lane
    step_t expq[$];
    int unsigned acc_q[$];
    int unsigned last_accept = 0;

    // driver: runs at falling edges; a word is taken at the rising edge
    // that follows a falling edge with rx_ready high
    task automatic drive();
      step_t e;
      for (int s = 0; s < steps.size(); s++) begin
        e = steps[s];
        if (e.gap > 0) begin
          rx_valid[d] = 1'b0;
          repeat (e.gap) @(negedge clk);
        end
        rx_valid[d] = 1'b1;
        rx_sof[d]   = e.sof;
        rx_word[d]  = (M * NOUT)'(e.word);
        while (!rx_ready[d]) @(negedge clk);
        expq.push_back(e);
        @(negedge clk);
      end
      rx_valid[d] = 1'b0;
      rx_sof[d]   = 1'b0;
      driver_done[d] = 1'b1;
    endtask

    // accepted words: cycle of acceptance, step rate, overlap
    always @(posedge clk) begin
      if (rst_n && rx_valid[d] && rx_ready[d]) begin
        acc_q.push_back(cycle);
        if (d == 0 && dut.u_systolic.u_seq.busy) n_overlap++;
        if (d == 1 && dut.u_single_chip.u_ctrl.update) n_upd_take++;
        if (expq.size() > 0 && expq[$].rate_check) begin
          check(cycle - last_accept == PERIOD[d],
                $sformatf("decoder %0d step rate %0d", d, cycle - last_accept));
          n_rate[d]++;
        end
        last_accept = cycle;
      end
    end

    // monitor
    always @(posedge clk) begin
      if (rst_n && dec_valid[d]) begin
        if (expq.size() == 0) begin
          check(1'b0, $sformatf("decoder %0d unexpected result", d));
        end else begin
          step_t e;
          logic [HIST*M-1:0] ep;
          logic [M-1:0] ebits;
          int unsigned ac;
          e  = expq.pop_front();
          ep = e.path[HIST*M-1:0];
          ac = (acc_q.size() > 0) ? acc_q.pop_front() : 0;
          n_seen[d]++;
          for (int k = 0; k < M; k++) ebits[k] = ep[HIST*M-1-k];
          check(dec_state[d] == M'(e.state),
                $sformatf("decoder %0d best state %0d exp %0d", d, dec_state[d], e.state));
          check(int'(dec_sm[d]) == e.sm[d],
                $sformatf("decoder %0d metric %0d exp %0d", d, dec_sm[d], e.sm[d]));
          check(dec_path[d] == ep, $sformatf("decoder %0d survivor path", d));
          check(dec_bits[d] == ebits, $sformatf("decoder %0d decoded bits", d));
          check(cycle - ac == LATENCY[d],
                $sformatf("decoder %0d latency %0d exp %0d", d, cycle - ac, LATENCY[d]));
          if (e.check_info) begin
            logic [M-1:0] ib;
            for (int k = 0; k < M; k++) ib[k] = e.info_group[M-1-k];
            check(dec_bits[d] == ib, $sformatf("decoder %0d bits against information bits", d));
          end
        end
      end
    end
  end

  // the two decoders must agree step by step
  logic [HIST*M-1:0] sys_paths[$], sc_paths[$];
  logic [M-1:0] sys_states[$], sc_states[$];
  int n_agree = 0;
  always @(posedge clk) begin
    if (rst_n && dec_valid[0]) begin sys_paths.push_back(dec_path[0]); sys_states.push_back(dec_state[0]); end
    if (rst_n && dec_valid[1]) begin sc_paths.push_back(dec_path[1]); sc_states.push_back(dec_state[1]); end
    if (sys_paths.size() > 0 && sc_paths.size() > 0) begin
      check(sys_paths.pop_front() == sc_paths.pop_front() && sys_states.pop_front() == sc_states.pop_front(),
            "decoders agree");
      n_agree++;
    end
  end

  initial begin
    int unsigned g[] = new[M + 1];
    // (2,1,4) code, generators 23 and 35 octal: taps G_0..G_4
    g = '{3, 2, 2, 1, 3};
    for (int r = 0; r <= M; r++) gen[r] = NOUT'(g[r]);
    rf = new(M, NOUT, g);
    make_frame(16, 30, 1'b0, 1'b0);
    make_frame(8, 20, 1'b1, 1'b0);
    make_frame(10, 0, 1'b0, 1'b1);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);
    @(negedge clk);
    fork
      g_lane[0].drive();
      g_lane[1].drive();
    join
    repeat (LATENCY[1] + 10) @(posedge clk);
    check(n_seen[0] == steps.size(), "all systolic results seen");
    check(n_seen[1] == steps.size(), "all single-chip results seen");
    check(n_agree == steps.size(), "all results compared across decoders");
    $display("mechanisms: systolic overlapped steps=%0d single-chip words taken in update=%0d idle gaps=%0d frame restarts=%0d bit errors=%0d rate checks=%0d/%0d",
             n_overlap, n_upd_take, n_gap, n_restart, n_corrected, n_rate[0], n_rate[1]);
    check(n_overlap > 0, "systolic overlap happened");
    check(n_upd_take > 0, "single-chip back-to-back word happened");
    check(n_gap > 0, "gap happened");
    check(n_restart > 1, "restart happened");
    check(n_corrected > 0, "errors injected");
    check(n_rate[0] > 0 && n_rate[1] > 0, "rates measured");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
