// tb_vt_sm_store: writes the survivors of several steps of a 16-state code
// (state 0 first in each step, as they leave the array) and reads them back
// in the next step. Checks the normalisation (stored metric = metric minus
// that of state 0 of the same step, so state 0 reads 0), the path append
// (old path shifted up by one group, the state code in the low group), and
// the frame-start values (metric 0 for state 0, m*n+1 for the others, empty
// path).
module tb_vt_sm_store;
  localparam int unsigned MW = 4, SMW = 6, PW = 16, AW = 8, N = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  logic wr_valid = 1'b0;
  logic [MW-1:0] wr_code = '0, rd_code = '0;
  logic signed [SMW-1:0] wr_sm = '0, rd_sm;
  logic [PW-1:0] wr_path = '0, rd_path;
  logic rd_first = 1'b0;
  int checks = 0, failures = 0;

  vt_sm_store #(.MW(MW), .SMW(SMW), .PW(PW), .AW(AW)) dut (
    .clk, .rst_n, .wr_valid, .wr_code, .wr_sm, .wr_path, .rd_code, .rd_first, .rd_sm, .rd_path);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    int sm_v [N];
    logic [PW-1:0] p_v [N];
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    rd_first = 1'b1;
    for (int i = 0; i < N; i++) begin
      rd_code = MW'(i); #1;
      check(int'(rd_sm) == ((i == 0) ? 0 : AW + 1) && rd_path == '0, "frame start values");
    end
    rd_first = 1'b0;
    @(negedge clk);
    for (int s = 0; s < 4; s++) begin
      for (int j = 0; j < N; j++) begin
        sm_v[j] = (j == 0) ? $urandom_range(0, 8) - 4 : 0;
        if (j > 0) sm_v[j] = sm_v[0] + $urandom_range(0, 16) - 8;
        p_v[j] = PW'($urandom);
        wr_valid = 1'b1; wr_code = MW'(j); wr_sm = SMW'(sm_v[j]); wr_path = p_v[j];
        @(negedge clk);
      end
      wr_valid = 1'b0;
      for (int i = 0; i < N; i++) begin
        rd_code = MW'(i); #1;
        check(int'(rd_sm) == sm_v[i] - sm_v[0], $sformatf("normalised metric %0d exp %0d", rd_sm, sm_v[i] - sm_v[0]));
        check(rd_path == {p_v[i][PW-MW-1:0], MW'(i)}, $sformatf("path append s%0d i%0d %h %h", s, i, rd_path, p_v[i]));
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
