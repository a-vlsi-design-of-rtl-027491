// lqd_imem: instruction memory of the LQ decomposition processor. DEPTH words
// of one instruction each ({C, B, A, OP}, 41 bits with the default sizes).
// One write port for the host and one synchronous read port for the
// controller: the instruction appears the cycle after the address when
// r_en is set, and is held otherwise. The depth is this implementation's
// choice; the description gives only the instruction format.
module lqd_imem
  import lqd_pkg::*;
#(
  parameter int DEPTH = IDEPTH,
  localparam int AW = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          w_en,
  input  logic [AW-1:0] w_addr,
  input  instr_t        w_data,
  input  logic          r_en,
  input  logic [AW-1:0] r_addr,
  output instr_t        r_data
);
  instr_t mem [DEPTH];
  always_ff @(posedge clk) begin
    if (w_en) mem[w_addr] <= w_data;
    if (r_en) r_data <= mem[r_addr];
  end
endmodule
