// vt_com: the COM processor of the systolic VT processor.
//
// It watches the survivors leaving the linear array, which arrive one state
// at a time in ascending j, and keeps the state with the smallest survivor
// metric (ties go to the smaller j). After state N-1 of a step it reports
// that state, its metric and its survivor path U(j,t) (the path carried out
// of the array with this step's m bits, the state code j, appended). Because
// the path with the best metric needs no trace-back, the m decoded symbols
// of the step are read straight from it: dec_bits gives the oldest m-bit
// group held in the path, in transmission order (dec_bits[0] first), i.e.
// the symbols decided HIST-1 steps earlier. dec_path holds the whole path,
// newest group in the low bits, each group a state code (bit 0 = the newest
// input bit of that group). All outputs are registered and valid for one
// clock with dec_valid, one clock after the last survivor of the step.
// The original architecture names the COM block and its job; choosing a fixed path length
// and reading the oldest group is this design's choice.
module vt_com #(
  parameter int unsigned MW  = 4,
  parameter int unsigned SMW = 6,
  parameter int unsigned PW  = 24
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  x_valid,
  input  logic [MW-1:0]         x_code,
  input  logic signed [SMW-1:0] x_sm,
  input  logic [PW-1:0]         x_path,
  output logic                  dec_valid,
  output logic [MW-1:0]         dec_state,
  output logic signed [SMW-1:0] dec_sm,
  output logic [PW-1:0]         dec_path,
  output logic [MW-1:0]         dec_bits
);
  localparam logic [MW-1:0] LAST = '1;

  logic signed [SMW-1:0] best_sm;
  logic [MW-1:0]         best_code;
  logic [PW-1:0]         best_path;
  logic [PW-1:0]         x_upath;
  logic                  better;

  always_comb begin
    x_upath = {x_path[PW-MW-1:0], x_code};
    better  = (x_code == '0) || (x_sm < best_sm);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      best_sm   <= '0;
      best_code <= '0;
      best_path <= '0;
      dec_valid <= 1'b0;
      dec_state <= '0;
      dec_sm    <= '0;
      dec_path  <= '0;
      dec_bits  <= '0;
    end else begin
      dec_valid <= 1'b0;
      if (x_valid) begin
        if (better) begin
          best_sm   <= x_sm;
          best_code <= x_code;
          best_path <= x_upath;
        end
        if (x_code == LAST) begin
          dec_valid <= 1'b1;
          dec_state <= better ? x_code  : best_code;
          dec_sm    <= better ? x_sm    : best_sm;
          dec_path  <= better ? x_upath : best_path;
          for (int k = 0; k < MW; k++)
            dec_bits[k] <= better ? x_upath[PW-1-k] : best_path[PW-1-k];
        end
      end
    end
  end
endmodule
