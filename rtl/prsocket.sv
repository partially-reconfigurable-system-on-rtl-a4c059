// PRSocket: the control point the MicroBlaze has over one PRR (or IOM) and
// its SCORES switch. It holds the 32-bit device control register (DCR),
// written through GPIO (dcr_we/dcr_wdata, clk_sys domain) and read back on
// dcr_q, and derives from it:
//   * the local clock of the module: clk_src gated by DCR bit CLK_EN and
//     divided by 2**DIV (DCR bits 31:30); it also runs while the module
//     reset is held, so that the whole region is reset;
//   * the module reset: system reset OR DCR bit PRR_RST, released on
//     clk_src (used to hold a PRR while it is reconfigured or scrubbed);
//   * the module-interface enable (DCR bit MI_EN, clk_sys domain);
//   * the routing field of the module's SCORES switch (DCR bits from
//     SW_LSB upwards, clk_sys domain).
// It also gives the plain system reset released on clk_src, for the clock
// crossing FIFOs, whose two sides must be reset together.
// The document gives the socket's role and that it uses a DCR set through
// GPIO and that the PRR clock frequency is set through it; the register
// layout and reset value (all zero: clock off, undivided, PRR out of
// reset, interface off, no routes) are this design's choice.
// A DCR write takes effect on the next clk_sys edge; the clock gate then
// follows within three clk_src cycles.
module prsocket
  import aft_pkg::*;
#(
  parameter int unsigned SW_CFG_W = 15
) (
  input  logic                clk_sys,
  input  logic                rst_sys,      // async, active high
  input  logic                dcr_we,
  input  logic [31:0]         dcr_wdata,
  output logic [31:0]         dcr_q,
  input  logic                clk_src,      // source of the local clock
  output logic                clk_lcd,      // gated local clock
  output logic                clk_on,       // gate open (clk_src domain)
  output logic                lcd_rst_sys,  // system reset, clk_src domain
  output logic                prm_rst,      // module reset, clk_src domain
  output logic                mi_en,
  output logic [SW_CFG_W-1:0] sw_cfg
);

  always_ff @(posedge clk_sys or posedge rst_sys) begin
    if (rst_sys)     dcr_q <= '0;
    else if (dcr_we) dcr_q <= dcr_wdata;
  end

  assign mi_en  = dcr_q[DCR_MI_EN];
  assign sw_cfg = dcr_q[DCR_SW_LSB +: SW_CFG_W];

  lcd_clock_gate u_gate (
    .clk_in (clk_src),
    .rst    (lcd_rst_sys),
    .en     (dcr_q[DCR_CLK_EN]),
    .hold   (prm_rst),
    .div    (dcr_q[DCR_DIV_LSB +: 2]),
    .en_sync(clk_on),
    .clk_out(clk_lcd)
  );

  rst_sync u_rst_sys (.clk(clk_src), .rst_in(rst_sys), .rst_out(lcd_rst_sys));

  logic prm_rst_req;
  assign prm_rst_req = rst_sys || dcr_q[DCR_PRR_RST];
  rst_sync u_rst_prm (.clk(clk_src), .rst_in(prm_rst_req), .rst_out(prm_rst));

  initial begin
    assert (DCR_SW_LSB + SW_CFG_W <= DCR_DIV_LSB)
      else $error("prsocket: switch field does not fit in the DCR");
  end

endmodule
