// tb_vt_worked_example: the systolic VT processor on the worked example of
// the VT, a (3,1,2) code with G_0 = 110, G_1 = 011, G_2 = 101, decoding the
// received sequence 011 110 001 100 110 000 101 001 011 101 two stages per
// step (five steps, one frame starting in state 0).
//
// Checked against published values: after the first step the best
// survivor is state 1 with metric 2 (Pm(0,1,2) = 2) and every other state
// has metric 4; the best survivor path after the second step is 0100 and
// after the fourth 01001000; at the end the best metric equals the Hamming
// distance, 9, between the received sequence and the encoding of the
// published decoded sequence 0100100100. (That sequence ties with the one
// this decoder keeps, 0111010100, also at distance 9; which of two equal
// paths survives depends on the tie rule.) Every step is also compared
// with vt_ref_pkg's model, including the result latency.
module tb_vt_worked_example;
  import vt_ref_pkg::*;

  localparam int unsigned M    = 2;
  localparam int unsigned NOUT = 3;
  localparam int unsigned HIST = 5;
  localparam int unsigned N    = 2 ** M;
  localparam int unsigned SMW  = vt_pkg::metric_width(M, NOUT);
  localparam int unsigned LATENCY = M + 4 * N;

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

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // "011" -> Y1 = 0, Y2 = 1, Y3 = 1 -> bit k holds Y(k+1)
  function automatic int unsigned word_of(string w);
    int unsigned v = 0;
    for (int k = 0; k < NOUT; k++) if (w[k] == "1") v |= 1 << k;
    return v;
  endfunction

  // survivor path as a string of bits in transmission order
  function automatic string path_str(logic [HIST*M-1:0] p, int groups);
    string s = "";
    for (int g = groups - 1; g >= 0; g--)
      for (int b = M - 1; b >= 0; b--) s = {s, p[g*M + b] ? "1" : "0"};
    return s;
  endfunction

  string rx_seq[10] = '{"011","110","001","100","110","000","101","001","011","101"};
  string paper_dec = "0100100100";
  int    abs_best[5];
  int    step_seen = 0;
  int    prev0 = 0;
  int    abs_sm0[5];
  int unsigned acc_cycle[5];
  int    acc_n = 0;
  vt_ref rf;
  int rf_best[5];
  int rf_bsm[5];
  logic [127:0] rf_path[5];

  always @(posedge clk) if (rst_n && rx_valid && rx_ready) begin
    acc_cycle[acc_n] <= cycle;
    acc_n <= acc_n + 1;
  end

  always @(posedge clk) begin
    if (rst_n && dec_valid) begin
      int s;
      int ab;
      s  = step_seen;
      ab = int'(dec_sm) + ((s > 0) ? abs_sm0[s-1] : 0);
      abs_best[s] = ab;
      check(int'(dec_state) == rf_best[s], $sformatf("step %0d best state %0d", s, dec_state));
      check(ab == rf_bsm[s], $sformatf("step %0d metric %0d exp %0d", s, ab, rf_bsm[s]));
      check(dec_path == rf_path[s][HIST*M-1:0], $sformatf("step %0d path %s", s, path_str(dec_path, s + 1)));
      check(cycle - acc_cycle[s] == LATENCY, $sformatf("latency %0d", cycle - acc_cycle[s]));
      if (s == 0) begin
        check(dec_state == 1 && ab == 2, "first step: state 1 with metric 2");
      end
      if (s == 1) check(path_str(dec_path, 2) == "0100", "U after step 2 is 0100");
      if (s == 3) check(path_str(dec_path, 4) == "01001000", "U after step 4 is 01001000");
      step_seen <= step_seen + 1;
    end
  end

  initial begin
    int unsigned g[] = new[M + 1];
    int unsigned words[5];
    int pub_dist;
    g = '{word_of("110"), word_of("011"), word_of("101")};
    for (int r = 0; r <= M; r++) gen[r] = NOUT'(g[r]);
    rf = new(M, NOUT, g);
    for (int s = 0; s < 5; s++) begin
      // r(t) (second word of the pair) is the newest, in the low bits
      words[s] = word_of(rx_seq[2*s+1]) | (word_of(rx_seq[2*s]) << NOUT);
      rf.step(words[s]);
      rf_best[s] = rf.best_state();
      rf_bsm[s]  = rf.sm[rf_best[s]];
      rf_path[s] = rf.path[rf_best[s]];
      abs_sm0[s] = rf.sm[0];
      if (s == 0)
        for (int j = 1; j < N; j++) check(rf.sm[j] == ((j == 1) ? 2 : 4), "model step 1 metrics 4 2 4 4");
    end
    // distance of the published decoded sequence
    rf.enc_state = 0;
    pub_dist = 0;
    for (int k = 0; k < 10; k++)
      pub_dist += $countones(rf.encode_bit(paper_dec[k] == "1") ^ word_of(rx_seq[k]));
    check(pub_dist == 9, $sformatf("published sequence distance %0d", pub_dist));

    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int s = 0; s < 5; s++) begin
      rx_valid = 1'b1;
      rx_sof   = (s == 0);
      rx_word  = (M*NOUT)'(words[s]);
      while (!rx_ready) @(negedge clk);
      @(negedge clk);
    end
    rx_valid = 1'b0;
    rx_sof   = 1'b0;
    repeat (LATENCY + 5) @(negedge clk);
    check(step_seen == 5, "five results");
    check(abs_best[4] == pub_dist, "final best metric equals published sequence distance");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
