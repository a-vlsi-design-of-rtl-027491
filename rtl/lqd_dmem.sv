// lqd_dmem: data memory of the LQ decomposition processor. N words, each one
// complex single-precision value (64 bits). Two synchronous read ports (the
// A and B operands of an instruction) and one write port (results, or data
// from the host). Read data appears the cycle after the address; a read of a
// word written in the same cycle returns the old contents.
// The memory and its size N follow the processor description; the port
// arrangement is this implementation's choice.
module lqd_dmem
  import lqd_pkg::*;
#(
  parameter int DEPTH = N,
  localparam int AW = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          ra_en,
  input  logic [AW-1:0] ra_addr,
  output cword_t        ra_data,
  input  logic          rb_en,
  input  logic [AW-1:0] rb_addr,
  output cword_t        rb_data,
  input  logic          w_en,
  input  logic [AW-1:0] w_addr,
  input  cword_t        w_data
);
  cword_t mem [DEPTH];
  always_ff @(posedge clk) begin
    if (ra_en) ra_data <= mem[ra_addr];
    if (rb_en) rb_data <= mem[rb_addr];
    if (w_en)  mem[w_addr] <= w_data;
  end
endmodule
