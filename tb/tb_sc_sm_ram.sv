// tb_sc_sm_ram: checks RAM1, the new-metric bank and the normalising
// subtractor of the single-chip processor (16 states). Each round writes a
// new metric for every state in random order, then runs the update pass
// with a given step minimum; afterwards every read must return the new
// metric minus that minimum, and a read flagged as frame start must return
// 0 for state 0 and m*n+1 for the others. Writes of the next round must not
// disturb the values read until the next update pass.
module tb_sc_sm_ram;
  localparam int unsigned MW = 4, SMW = 6, AW = 8, N = 16;
  logic clk = 1'b0;
  logic [MW-1:0] rd_code = '0, wr_code = '0, upd_addr = '0;
  logic rd_first = 1'b0, wr_valid = 1'b0, upd_valid = 1'b0;
  logic signed [SMW-1:0] rd_sm, wr_sm = '0, min_sm = '0;
  int checks = 0, failures = 0;

  sc_sm_ram #(.MW(MW), .SMW(SMW), .AW(AW)) dut (
    .clk, .rd_code, .rd_first, .rd_sm, .wr_valid, .wr_code, .wr_sm, .upd_valid, .upd_addr, .min_sm);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    int nb [N];
    int ram [N];
    int order [N];
    repeat (2) @(negedge clk);
    for (int round = 0; round < 12; round++) begin
      int mn;
      // new metrics, written in a random order
      for (int k = 0; k < N; k++) order[k] = k;
      order.shuffle();
      mn = 99;
      for (int k = 0; k < N; k++) begin
        wr_valid = 1'b1;
        wr_code  = MW'(order[k]);
        nb[order[k]] = $urandom_range(0, 12);
        wr_sm    = SMW'(nb[order[k]]);
        if (nb[order[k]] < mn) mn = nb[order[k]];
        // reads during the writes still see the old values
        rd_code = MW'($urandom_range(0, N - 1));
        #1;
        if (round > 0) check(int'(rd_sm) == ram[rd_code], "old value during writes");
        @(negedge clk);
      end
      wr_valid = 1'b0;
      // update pass
      min_sm = SMW'(mn);
      for (int y = 0; y < N; y++) begin
        upd_valid = 1'b1;
        upd_addr  = MW'(y);
        @(negedge clk);
        ram[y] = nb[y] - mn;
      end
      upd_valid = 1'b0;
      for (int k = 0; k < N; k++) begin
        rd_code  = MW'(k);
        rd_first = 1'b0;
        #1;
        check(int'(rd_sm) == ram[k], $sformatf("state %0d sm %0d exp %0d", k, rd_sm, ram[k]));
        rd_first = 1'b1;
        #1;
        check(int'(rd_sm) == ((k == 0) ? 0 : AW + 1), "frame-start value");
        rd_first = 1'b0;
      end
      check(ram[0] >= 0, "sanity");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
