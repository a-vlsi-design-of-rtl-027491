// lqd_asip: LQ decomposition unit, an application-specific instruction-set
// processor made of a controller, a data memory, an instruction memory and
// the floating-point processing unit.
//
// The host loads the channel matrix and the constants a program needs into
// the data memory and the program into the instruction memory, pulses start,
// and waits for done; results are then read back through the same host port
// (h_re / h_rdata). Instructions are {C, B, A, OP}: OP is applied to the
// words at addresses A and B and the result is written to address C. See
// lqd_pkg for the operation codes, lqd_ctrl for the sequencing and lqd_pu for
// the datapath.
// Timing: one instruction per cycle when independent, a wait of up to four
// cycles when an operand is the result of an instruction still in flight;
// `cycles` reports the length of the last run.
module lqd_asip
  import lqd_pkg::*;
#(
  parameter int DEPTH = N,
  parameter int IDEP  = IDEPTH,
  localparam int IAW = $clog2(IDEP)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [IAW:0]   prog_len,
  output logic           busy,
  output logic           done,
  output logic [31:0]    cycles,
  output logic           illegal,
  input  logic           h_we,
  input  logic           h_re,
  input  logic [DAW-1:0] h_addr,
  input  cword_t         h_wdata,
  output cword_t         h_rdata,
  input  logic           i_we,
  input  logic [IAW-1:0] i_addr,
  input  instr_t         i_wdata
);
  logic           im_we, im_re;
  logic [IAW-1:0] im_waddr, im_raddr;
  instr_t         im_wdata, im_rdata;
  logic           dm_ra_en, dm_rb_en, dm_we;
  logic [DAW-1:0] dm_ra_addr, dm_rb_addr, dm_waddr;
  cword_t         dm_ra_data, dm_rb_data, dm_wdata;
  logic           pu_valid, pu_out_valid;
  logic [OPW-1:0] pu_op;
  cword_t         pu_a, pu_b, pu_y;
  logic [DAW-1:0] pu_tag, pu_tag_out;

  lqd_ctrl #(.IDEP(IDEP)) u_ctrl (.*);

  lqd_imem #(.DEPTH(IDEP)) u_imem (
    .clk, .w_en(im_we), .w_addr(im_waddr), .w_data(im_wdata),
    .r_en(im_re), .r_addr(im_raddr), .r_data(im_rdata));

  lqd_dmem #(.DEPTH(DEPTH)) u_dmem (
    .clk, .ra_en(dm_ra_en), .ra_addr(dm_ra_addr[$clog2(DEPTH)-1:0]), .ra_data(dm_ra_data),
    .rb_en(dm_rb_en), .rb_addr(dm_rb_addr[$clog2(DEPTH)-1:0]), .rb_data(dm_rb_data),
    .w_en(dm_we), .w_addr(dm_waddr[$clog2(DEPTH)-1:0]), .w_data(dm_wdata));

  lqd_pu u_pu (
    .clk, .rst_n, .in_valid(pu_valid), .op(pu_op), .a(pu_a), .b(pu_b), .tag_in(pu_tag),
    .out_valid(pu_out_valid), .y(pu_y), .tag_out(pu_tag_out), .illegal);
endmodule
