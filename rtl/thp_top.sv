// thp_top: Tomlinson-Harashima precoder for a 4x4 multi-user MIMO downlink.
//
// Three parts, as in the precoder's block diagram:
//   LQD   - the floating-point processor (lqd_asip) decomposes each
//           subcarrier's channel H = L Q and precomputes L_ij = l_ij / l_jj;
//           a loader (thp_coef_loader) copies the fixed-point L ratios and
//           Q^H entries into two coefficient memories (thp_coef_mem), one
//           entry per subcarrier.
//   IC    - the arrayed interference cancellation unit (thp_ic) turns a
//           symbol vector x into x~ with the successive modulo cancellation.
//   WCM   - the arrayed weight multiplication unit (thp_wcm) computes
//           x^ = Q^H x~, the four antenna samples.
//
// Control side (slow, once per CSI update): the host writes the channel of a
// subcarrier and the program into the processor through h_*/i_*, sets csi_sc
// to that subcarrier and pulses lqd_start. When the program ends the loader
// starts by itself; coef_busy is high until the coefficients are in the
// memories. The host must not use h_* while lqd_busy or coef_busy is high.
// Two clocks: clk_lqd runs the processor, the loader and the memories' write
// ports; clk runs the memories' read ports, IC and WCM (the reference design
// uses 400 MHz and 160 MHz). The coefficient memories are the only path
// between the domains; all control ports belong to clk_lqd, all data ports
// to clk. A subcarrier must not be precoded while its coefficients are being
// rewritten. rst_n is synchronous in both domains and must be held for a
// few cycles of the slower clock.
// Data side (one vector per clock): x_valid, x_sc (subcarrier), x (four
// complex 15-bit samples, 10 fraction bits) and the modulo window m / inv2m.
// The coefficient memories are read in the cycle x arrives; x is registered
// meanwhile, so IC and WCM start one cycle later. x~1 = x1 goes straight to
// the WCM, x~2..x~4 come from the IC in its staircase, and x^ leaves with
// y_valid five cycles after x_valid (one memory cycle, three staircase
// cycles, one output register).
// The division into units, the arrayed IC/WCM structure, the 15-bit word
// and the separate clock rates follow the design description; memory organisation, loader, interfaces and
// fixed-point formats are this implementation's choices.
module thp_top
  import thp_pkg::*;
  import lqd_pkg::*;
#(
  parameter int W     = DATA_W,
  parameter int DEPTH = NSC,
  localparam int SAW  = $clog2(DEPTH),
  localparam int IAW  = $clog2(IDEPTH)
) (
  input  logic           clk_lqd,   // decomposition side (processor, loader)
  input  logic           clk,       // precoding datapath
  input  logic           rst_n,
  // decomposition processor, host side (clk_lqd)
  input  logic           lqd_start,
  input  logic [IAW:0]   prog_len,
  input  logic [SAW-1:0] csi_sc,
  output logic           lqd_busy,
  output logic           lqd_done,
  output logic [31:0]    lqd_cycles,
  output logic           lqd_illegal,
  output logic           coef_busy,
  input  logic           h_we,
  input  logic           h_re,
  input  logic [DAW-1:0] h_addr,
  input  cword_t         h_wdata,
  output cword_t         h_rdata,
  input  logic           i_we,
  input  logic [IAW-1:0] i_addr,
  input  instr_t         i_wdata,
  // precoding datapath (clk)
  input  logic                x_valid,
  input  logic [SAW-1:0]      x_sc,
  input  logic signed [W-1:0] x_re [NT],
  input  logic signed [W-1:0] x_im [NT],
  input  logic        [W-1:0] m,
  input  logic        [W-1:0] inv2m,
  output logic signed [W-1:0] xt_re [NT],     // x~ (staircase timing, see thp_ic)
  output logic signed [W-1:0] xt_im [NT],
  output logic                xt_valid [NT],
  output logic signed [W-1:0] y_re [NT],      // x^
  output logic signed [W-1:0] y_im [NT],
  output logic                y_valid
);
  // ---------------- LQD and coefficient memories ----------------
  logic           ld_rd_en;
  logic [DAW-1:0] ld_rd_addr;
  logic           l_we, q_we;
  logic [SAW-1:0] l_waddr, q_waddr;
  logic [2:0]     l_wel;
  logic [3:0]     q_wel;
  logic signed [W-1:0] c_wre, c_wim;

  lqd_asip u_lqd (
    .clk(clk_lqd), .rst_n, .start(lqd_start), .prog_len, .busy(lqd_busy), .done(lqd_done),
    .cycles(lqd_cycles), .illegal(lqd_illegal),
    .h_we(h_we && !coef_busy), .h_re(coef_busy ? ld_rd_en : h_re),
    .h_addr(coef_busy ? ld_rd_addr : h_addr), .h_wdata, .h_rdata,
    .i_we, .i_addr, .i_wdata);

  thp_coef_loader #(.W(W), .DEPTH(DEPTH)) u_loader (
    .clk(clk_lqd), .rst_n, .start(lqd_done), .sc(csi_sc), .busy(coef_busy),
    .rd_en(ld_rd_en), .rd_addr(ld_rd_addr), .rd_data(h_rdata),
    .l_we, .l_waddr, .l_wel, .q_we, .q_waddr, .q_wel,
    .wdata_re(c_wre), .wdata_im(c_wim));

  logic signed [W-1:0] lc_re [NL], lc_im [NL], wc_re [NQ], wc_im [NQ];

  thp_coef_mem #(.W(W), .NE(NL), .DEPTH(DEPTH)) u_lmem (
    .wclk(clk_lqd), .rclk(clk), .we(l_we), .waddr(l_waddr), .wel(l_wel), .wdata_re(c_wre), .wdata_im(c_wim),
    .re(x_valid), .raddr(x_sc), .rdata_re(lc_re), .rdata_im(lc_im));

  thp_coef_mem #(.W(W), .NE(NQ), .DEPTH(DEPTH)) u_qmem (
    .wclk(clk_lqd), .rclk(clk), .we(q_we), .waddr(q_waddr), .wel(q_wel), .wdata_re(c_wre), .wdata_im(c_wim),
    .re(x_valid), .raddr(x_sc), .rdata_re(wc_re), .rdata_im(wc_im));

  // ---------------- IC and WCM ----------------
  logic                v0;
  logic signed [W-1:0] x0_re [NT], x0_im [NT];
  logic signed [W-1:0] wx_re [NT], wx_im [NT];

  always_ff @(posedge clk) begin
    x0_re <= x_re;
    x0_im <= x_im;
  end
  always_ff @(posedge clk) begin
    if (!rst_n) v0 <= 1'b0;
    else        v0 <= x_valid;
  end

  thp_ic #(.W(W)) u_ic (
    .clk, .rst_n, .in_valid(v0), .x_re(x0_re), .x_im(x0_im), .l_re(lc_re), .l_im(lc_im),
    .m, .inv2m, .xt_re, .xt_im, .xt_valid);

  // WCM lanes: x~1 = x1 enters with the vector, x~2..x~4 from the IC staircase
  always_comb begin
    wx_re[0] = x0_re[0];
    wx_im[0] = x0_im[0];
    for (int k = 1; k < NT; k++) begin
      wx_re[k] = xt_re[k];
      wx_im[k] = xt_im[k];
    end
  end

  thp_wcm #(.W(W)) u_wcm (
    .clk, .rst_n, .in_valid(v0), .xt_re(wx_re), .xt_im(wx_im), .w_re(wc_re), .w_im(wc_im),
    .y_re, .y_im, .out_valid(y_valid));
endmodule
