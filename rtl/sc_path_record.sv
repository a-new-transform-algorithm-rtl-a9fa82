// sc_path_record: the path-recording block of the single-chip VT processor.
//
// It keeps the survivor path ("path head") of every state as HIST groups of
// m decided bits, newest group in the low bits. While the sources of a
// destination S_j are scanned, BUF1 latches C(i) whenever MIN BLOCK 1
// signals a new minimum. When S_j is finished (commit), the path of the
// source in BUF1 is read from PATH HEAD RAM, shifted up one group, given
// C(j) as its newest group, and written to PATH HEAD TEMP at C(j). After the
// step, restart reads PATH HEAD TEMP at the best state held in BUF2 into
// BUF3, the output. Then, during update, the update counter Y walks all
// states and copies PATH HEAD TEMP into PATH HEAD RAM.
//
// The address multiplexers follow the select table printed with the block:
// PATH HEAD TEMP is addressed by C(j) when restart = 0 and update = 0, by
// BUF2 when restart = 1 and update = 0, and by Y when update = 1; PATH HEAD
// RAM is addressed by BUF1, or by Y during update. On a frame's first step
// (first) the paths read from PATH HEAD RAM are empty. The update counter
// starts from 0 at each update phase; y is its value (it also addresses
// RAM1). All writes and BUF1/BUF3 take one clock.
module sc_path_record #(
  parameter int unsigned MW = 4,
  parameter int unsigned PW = 24
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          latch,     // from MIN BLOCK 1
  input  logic [MW-1:0] c_i,
  input  logic [MW-1:0] c_j,
  input  logic          commit,    // destination c_j finished
  input  logic          first,     // first step of a frame
  input  logic          restart,
  input  logic [MW-1:0] buf2,
  input  logic          update,
  output logic [MW-1:0] y,         // update counter
  output logic [PW-1:0] buf3,      // best survivor path
  output logic          out_valid  // buf3 loaded in the previous clock
);
  localparam int unsigned N = 2 ** MW;

  logic [PW-1:0] head_ram  [N];
  logic [PW-1:0] head_temp [N];
  logic [MW-1:0] buf1;
  logic [MW-1:0] ram_addr, temp_addr;
  logic [PW-1:0] ram_q, temp_q;

  // address multiplexers
  always_comb begin
    ram_addr = update ? y : buf1;
    if (update)       temp_addr = y;
    else if (restart) temp_addr = buf2;
    else              temp_addr = c_j;
    ram_q  = first ? '0 : head_ram[ram_addr];
    temp_q = head_temp[temp_addr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      buf1      <= '0;
      y         <= '0;
      buf3      <= '0;
      out_valid <= 1'b0;
    end else begin
      if (latch) buf1 <= c_i;
      y         <= update ? y + 1'b1 : '0;
      out_valid <= restart;
      if (restart) buf3 <= temp_q;
    end
  end

  always_ff @(posedge clk) begin
    if (commit && !update) head_temp[temp_addr] <= {ram_q[PW-MW-1:0], c_j};
    if (update)            head_ram[ram_addr]   <= temp_q;
  end
endmodule
