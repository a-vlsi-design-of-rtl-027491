// thp_coef_mem: per-subcarrier coefficient memory between the LQ
// decomposition unit and one of the fixed-point units.
//
// One entry per subcarrier (DEPTH entries) holds NE complex coefficients: the
// six cancellation ratios L_ij for the IC unit (NE = 6) or the sixteen
// entries of Q^H for the WCM unit (NE = 16). The writer (the coefficient
// loader) stores one complex element per cycle, addressed by subcarrier and
// element index; the reader fetches the whole set of one subcarrier per
// cycle, so a new matrix can be applied to every symbol vector. The memory is
// built as NE banks, one per element, each a plain array with one write and
// one synchronous read port. The two ports have their own clocks: the writer
// runs with the decomposition processor, the reader with the precoding
// datapath, which may be clocked at a different rate.
//
// The memory itself appears in the design description as a block between the
// decomposition and the precoding datapath; its organisation, the element
// write port and the one-cycle read latency are this implementation's
// choices. With both ports on one clock, a read of the word being written
// returns the old data. With two clocks the memory is the only crossing
// between them: the user must not read a subcarrier's entry while it is
// being rewritten (its elements change one by one).
module thp_coef_mem #(
  parameter int W     = thp_pkg::DATA_W,
  parameter int NE    = thp_pkg::NL,
  parameter int DEPTH = thp_pkg::NSC,
  localparam int AW   = $clog2(DEPTH),
  localparam int EW   = (NE > 1) ? $clog2(NE) : 1
) (
  // write side (from the loader), clocked by wclk
  input  logic                wclk,
  input  logic                we,
  input  logic [AW-1:0]       waddr,   // subcarrier
  input  logic [EW-1:0]       wel,     // element
  input  logic signed [W-1:0] wdata_re,
  input  logic signed [W-1:0] wdata_im,
  // read side (to IC or WCM), clocked by rclk, data valid one cycle after re
  input  logic                rclk,
  input  logic                re,
  input  logic [AW-1:0]       raddr,
  output logic signed [W-1:0] rdata_re [NE],
  output logic signed [W-1:0] rdata_im [NE]
);
  for (genvar e = 0; e < NE; e++) begin : g_bank
    logic [2*W-1:0] bank [DEPTH];
    always_ff @(posedge wclk) begin
      if (we && wel == EW'(e)) bank[waddr] <= {wdata_re, wdata_im};
    end
    always_ff @(posedge rclk) begin
      if (re) {rdata_re[e], rdata_im[e]} <= bank[raddr];
    end
  end

  // write address must name an existing subcarrier and element
  always_ff @(posedge wclk) begin
    if (we) assert (int'(waddr) < DEPTH && int'(wel) < NE)
      else $error("coefficient write out of range: sc %0d el %0d", waddr, wel);
  end
endmodule
