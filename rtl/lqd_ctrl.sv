// lqd_ctrl: controller of the LQ decomposition processor.
//
// Runs a program from the instruction memory in order and gives the host
// access to both memories while the processor is idle.
//   fetch : the program counter addresses the instruction memory (1 cycle).
//   issue : the fetched instruction's A and B addresses go to the data memory
//           (1 cycle); the operands then enter the processing unit together
//           with the operation code and the C address as tag.
//   write : 3 cycles later the processing unit returns the result and the
//           controller writes it to address C.
// An instruction whose A or B address equals the C address of an
// instruction still in flight (entering the unit, in its three stages, or
// being written) waits at issue until that result is in memory; every other
// instruction issues in the cycle after the previous one, so a program
// without such dependences runs at one instruction per cycle. Accumulator
// dependences need no wait (the unit forwards them).
//
// Host side: with start, execution begins at address 0 and covers prog_len
// instructions; busy is high until the last result is written, then done
// pulses and cycles holds the number of clock cycles the run took. While
// idle, h_we writes data word h_addr, h_re reads it (h_rdata valid the next
// cycle), and i_we writes an instruction word.
// The fetch/issue/write organisation follows the processor description (the
// controller fetches and issues in order to a pipelined unit); the hazard
// rule, the host protocol and the cycle counter are this implementation's.
module lqd_ctrl
  import lqd_pkg::*;
#(
  parameter int IDEP = IDEPTH,
  localparam int IAW = $clog2(IDEP)
) (
  input  logic           clk,
  input  logic           rst_n,
  // host
  input  logic           start,
  input  logic [IAW:0]   prog_len,
  output logic           busy,
  output logic           done,
  output logic [31:0]    cycles,
  input  logic           h_we,
  input  logic           h_re,
  input  logic [DAW-1:0] h_addr,
  input  cword_t         h_wdata,
  output cword_t         h_rdata,
  input  logic           i_we,
  input  logic [IAW-1:0] i_addr,
  input  instr_t         i_wdata,
  // instruction memory
  output logic           im_we,
  output logic [IAW-1:0] im_waddr,
  output instr_t         im_wdata,
  output logic           im_re,
  output logic [IAW-1:0] im_raddr,
  input  instr_t         im_rdata,
  // data memory
  output logic           dm_ra_en,
  output logic [DAW-1:0] dm_ra_addr,
  input  cword_t         dm_ra_data,
  output logic           dm_rb_en,
  output logic [DAW-1:0] dm_rb_addr,
  input  cword_t         dm_rb_data,
  output logic           dm_we,
  output logic [DAW-1:0] dm_waddr,
  output cword_t         dm_wdata,
  // processing unit
  output logic           pu_valid,
  output logic [OPW-1:0] pu_op,
  output cword_t         pu_a,
  output cword_t         pu_b,
  output logic [DAW-1:0] pu_tag,
  input  logic           pu_out_valid,
  input  cword_t         pu_y,
  input  logic [DAW-1:0] pu_tag_out
);
  logic [IAW:0]   pc;
  logic           fetched;      // im_rdata holds an instruction not yet issued
  instr_t         ir;
  logic           stall, issue, fetch;
  logic           e0_valid;     // operands being read, enter the unit next
  logic [OPW-1:0] e0_op;
  logic [DAW-1:0] e0_c;
  // destinations in flight past the unit's first stage: [0] stage 2,
  // [1] stage 3, [2] output (written at the end of that cycle)
  logic [2:0]     fl_v;
  logic [DAW-1:0] fl_c [3];

  assign ir = im_rdata;

  // hazard: A or B of the waiting instruction is written by one in flight
  always_comb begin
    stall = 1'b0;
    for (int k = 0; k < 3; k++)
      if (fl_v[k] && (fl_c[k] == ir.a || fl_c[k] == ir.b)) stall = 1'b1;
    if (e0_valid && (e0_c == ir.a || e0_c == ir.b)) stall = 1'b1;
  end

  assign issue = busy && fetched && !stall;
  assign fetch = busy && (pc < prog_len) && (!fetched || issue);

  // memories
  assign im_we    = i_we && !busy;
  assign im_waddr = i_addr;
  assign im_wdata = i_wdata;
  assign im_re    = fetch;
  assign im_raddr = pc[IAW-1:0];

  assign dm_ra_en   = issue || (h_re && !busy);
  assign dm_ra_addr = busy ? ir.a : h_addr;
  assign dm_rb_en   = issue;
  assign dm_rb_addr = ir.b;
  assign dm_we      = busy ? pu_out_valid : h_we;
  assign dm_waddr   = busy ? pu_tag_out   : h_addr;
  assign dm_wdata   = busy ? pu_y         : h_wdata;
  assign h_rdata    = dm_ra_data;

  assign pu_valid = e0_valid;
  assign pu_op    = e0_op;
  assign pu_a     = dm_ra_data;
  assign pu_b     = dm_rb_data;
  assign pu_tag   = e0_c;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy <= 1'b0; done <= 1'b0; pc <= '0; fetched <= 1'b0;
      e0_valid <= 1'b0; fl_v <= '0; cycles <= '0;
    end else begin
      done   <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy <= 1'b1; pc <= '0; fetched <= 1'b0; cycles <= '0;
        end
      end else begin
        cycles <= cycles + 32'd1;
        if (fetch) pc <= pc + 1'b1;
        if (fetch)      fetched <= 1'b1;
        else if (issue) fetched <= 1'b0;
        e0_valid <= issue;
        e0_op    <= ir.op;
        e0_c     <= ir.c;
        fl_v     <= {fl_v[1:0], e0_valid};
        fl_c[0]  <= e0_c;
        for (int k = 1; k < 3; k++) fl_c[k] <= fl_c[k-1];
        // finished: everything fetched, issued and written back
        if (pc >= prog_len && !fetched && !e0_valid && fl_v == 3'b000) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  // the host may not use the memories while a program runs
  always_ff @(posedge clk) begin
    if (rst_n && busy) assert (!h_we && !i_we)
      else $error("host memory write while the processor is busy");
  end
endmodule
