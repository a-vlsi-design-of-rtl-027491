// thp_coef_loader: copies one subcarrier's precoding coefficients from the
// LQ decomposition processor into the two coefficient memories.
//
// When the processor finishes a program (start pulse here), the loader reads
// the six fixed-point cancellation ratios at L_BASE.. and the sixteen Q^H
// entries at W_BASE.. of the processor's data memory, one word per cycle
// through the processor's host read port, saturates each 32-bit integer part
// to W bits and writes it as element e of subcarrier `sc` in the L memory
// (e = 0..5) or the Q^H memory (e = 0..15).
// The description shows results flowing from the decomposition unit into
// these memories but not how; the addresses, the word-by-word copy and the
// saturation are this implementation's choices. It takes 23 cycles; busy is
// high meanwhile and the host must leave the processor's host port alone.
module thp_coef_loader
  import thp_pkg::*;
  import lqd_pkg::*;
#(
  parameter int W      = DATA_W,
  parameter int DEPTH  = NSC,
  parameter int L_BASE = 128,
  parameter int W_BASE = 144,
  localparam int SAW   = $clog2(DEPTH)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [SAW-1:0] sc,
  output logic           busy,
  // processor host read port
  output logic           rd_en,
  output logic [DAW-1:0] rd_addr,
  input  cword_t         rd_data,
  // L memory write port
  output logic           l_we,
  output logic [SAW-1:0] l_waddr,
  output logic [2:0]     l_wel,
  // Q^H memory write port
  output logic           q_we,
  output logic [SAW-1:0] q_waddr,
  output logic [3:0]     q_wel,
  // shared write data
  output logic signed [W-1:0] wdata_re,
  output logic signed [W-1:0] wdata_im
);
  localparam int NWORDS = NL + NQ;

  logic [4:0]     idx;       // word being read
  logic           pend;      // a read issued last cycle
  logic [4:0]     pidx;      // its index
  logic [SAW-1:0] sc_q;

  function automatic logic signed [W-1:0] sat(input logic [31:0] v);
    if ($signed(v) > $signed(32'((1 << (W-1)) - 1))) return W'((1 << (W-1)) - 1);
    if ($signed(v) < -$signed(32'(1 << (W-1))))      return W'(-(1 << (W-1)));
    return v[W-1:0];
  endfunction

  assign rd_en   = busy && (int'(idx) < NWORDS);
  assign rd_addr = (int'(idx) < NL) ? DAW'(L_BASE + int'(idx)) : DAW'(W_BASE + int'(idx) - NL);

  assign l_we     = pend && (int'(pidx) < NL);
  assign q_we     = pend && (int'(pidx) >= NL);
  assign l_waddr  = sc_q;
  assign q_waddr  = sc_q;
  assign l_wel    = 3'(pidx);
  assign q_wel    = 4'(int'(pidx) - NL);
  assign wdata_re = sat(rd_data.re);
  assign wdata_im = sat(rd_data.im);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy <= 1'b0; idx <= '0; pend <= 1'b0; pidx <= '0; sc_q <= '0;
    end else begin
      pend <= rd_en;
      pidx <= idx;
      if (!busy) begin
        if (start) begin
          busy <= 1'b1; idx <= '0; sc_q <= sc;
        end
      end else if (rd_en) begin
        idx <= idx + 5'd1;
      end else if (!pend) begin
        busy <= 1'b0;
      end
    end
  end
endmodule
