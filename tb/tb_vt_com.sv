// tb_vt_com: feeds COM the survivors of several steps (states 0..N-1 in
// order, with random metrics, ties included, and random gaps) and checks
// that one clock after the last state it reports the state with the
// smallest metric (the smaller index on a tie), its metric, its path with
// the state code appended, and the oldest group of that path in
// transmission order.
module tb_vt_com;
  localparam int unsigned MW = 2, SMW = 6, PW = 8, N = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  logic x_valid = 1'b0;
  logic [MW-1:0] x_code = '0;
  logic signed [SMW-1:0] x_sm = '0;
  logic [PW-1:0] x_path = '0;
  logic dec_valid;
  logic [MW-1:0] dec_state, dec_bits;
  logic signed [SMW-1:0] dec_sm;
  logic [PW-1:0] dec_path;
  int checks = 0, failures = 0, n_ties = 0;

  vt_com #(.MW(MW), .SMW(SMW), .PW(PW)) dut (
    .clk, .rst_n, .x_valid, .x_code, .x_sm, .x_path, .dec_valid, .dec_state, .dec_sm, .dec_path, .dec_bits);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    int sm_v [N];
    logic [PW-1:0] p_v [N];
    int b;
    logic [PW-1:0] ep;
    logic [MW-1:0] eb;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < 50; s++) begin
      b = 0;
      for (int j = 0; j < N; j++) begin
        sm_v[j] = $urandom_range(0, 6) - 3;
        p_v[j] = PW'($urandom);
        if (sm_v[j] < sm_v[b]) b = j;
        else if (j > 0 && sm_v[j] == sm_v[b]) n_ties++;
        while ($urandom_range(0, 3) == 0) begin
          x_valid = 1'b0; @(negedge clk);
          check(!dec_valid, "no result while waiting");
        end
        x_valid = 1'b1; x_code = MW'(j); x_sm = SMW'(sm_v[j]); x_path = p_v[j];
        @(negedge clk);
      end
      x_valid = 1'b0;
      ep = {p_v[b][PW-MW-1:0], MW'(b)};
      for (int k = 0; k < MW; k++) eb[k] = ep[PW-1-k];
      check(dec_valid, "result valid");
      check(int'(dec_state) == b && int'(dec_sm) == sm_v[b], $sformatf("best %0d/%0d", dec_state, b));
      check(dec_path == ep && dec_bits == eb, "path and bits");
      @(negedge clk);
      check(!dec_valid, "result one clock");
    end
    check(n_ties > 0, "ties seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
