// PRR slot: everything the static region provides around one partially
// reconfigurable region (PRR):
//   * its PRSocket (DCR, gated local clock, PRR reset, switch routing);
//   * the consumer FSL (MicroBlaze -> PRR) and producer FSL
//     (PRR -> MicroBlaze), clock-crossing FIFOs between clk_sys and the
//     PRR's local clock;
//   * the dataflow controller that sits in the PRR wrapper, one level above
//     the PRM, and moves the FSL streams in and out of it;
//   * the module interfaces towards the PRR's SCORES switch, one for each
//     of the NMCH channels between the module and its switch.
// The PRM itself is what partial reconfiguration loads into the region, so
// its ports (Table-I signals, its clock and reset, its SCORES streams) are
// brought out. The MicroBlaze side of the FSLs follows the FSL convention:
// write/full on the consumer link, read/exists with first-word fall-through
// on the producer link.
module prr_slot
  import aft_pkg::*;
#(
  parameter int unsigned DW        = 32,
  parameter int unsigned NCH       = 2,
  parameter int unsigned FSL_DEPTH = 16,
  parameter int unsigned MI_DEPTH  = 16,
  parameter int unsigned NMCH      = 1,
  parameter int unsigned SW_CFG_W  = sw_cfg_w(NCH, NMCH)
) (
  input  logic                clk_sys,
  input  logic                rst_sys,
  input  logic                clk_src,
  // GPIO -> DCR
  input  logic                dcr_we,
  input  logic [31:0]         dcr_wdata,
  output logic [31:0]         dcr_q,
  // MicroBlaze side of the FSLs (clk_sys)
  input  logic                mb_cons_write,
  input  logic [DW-1:0]       mb_cons_data,
  output logic                mb_cons_full,
  input  logic                mb_prod_read,
  output logic [DW-1:0]       mb_prod_data,
  output logic                mb_prod_exists,
  // PRM (local clock domain)
  output logic                prm_clk,
  output logic                prm_rst,
  output logic                prm_start,
  output logic                prm_ce,
  output logic [DW-1:0]       prm_input_data,
  input  logic                prm_rfd,
  input  logic                prm_done,
  input  logic                prm_dv,
  input  logic [DW-1:0]       prm_output_data,
  input  logic [NMCH-1:0]          prm_sc_tx_write,
  input  logic [NMCH-1:0][DW-1:0]  prm_sc_tx_data,
  output logic [NMCH-1:0]          prm_sc_tx_full,
  input  logic [NMCH-1:0]          prm_sc_rx_read,
  output logic [NMCH-1:0][DW-1:0]  prm_sc_rx_data,
  output logic [NMCH-1:0]          prm_sc_rx_exists,
  // SCORES switch side (clk_sys)
  output logic [SW_CFG_W-1:0] sw_cfg,
  output chan_t [NMCH-1:0]    to_sw,
  input  chan_t [NMCH-1:0]    from_sw,
  output logic [NMCH-1:0]     mi_overflow,
  // status
  output logic                clk_on,
  output df_state_e           df_state
);

  logic lcd_clk, lcd_rst_sys, dcr_prm_rst, mi_en;

  prsocket #(.SW_CFG_W(SW_CFG_W)) u_socket (
    .clk_sys(clk_sys), .rst_sys(rst_sys), .dcr_we(dcr_we), .dcr_wdata(dcr_wdata),
    .dcr_q(dcr_q), .clk_src(clk_src), .clk_lcd(lcd_clk), .clk_on(clk_on),
    .lcd_rst_sys(lcd_rst_sys), .prm_rst(dcr_prm_rst), .mi_en(mi_en), .sw_cfg(sw_cfg)
  );

  assign prm_clk = lcd_clk;
  assign prm_rst = dcr_prm_rst;

  // consumer FSL: MicroBlaze writes, dataflow controller reads
  logic          c_rdy, c_en;
  logic [DW-1:0] c_data;
  fsl_async_fifo #(.DW(DW), .DEPTH(FSL_DEPTH)) u_cons_fsl (
    .wclk(clk_sys), .wrst(rst_sys), .wen(mb_cons_write), .wdata(mb_cons_data), .full(mb_cons_full),
    .rclk(lcd_clk), .rrst(lcd_rst_sys), .ren(c_en), .rdata(c_data), .exists(c_rdy)
  );

  // producer FSL: dataflow controller writes, MicroBlaze reads
  logic          p_full, p_en;
  logic [DW-1:0] p_data;
  fsl_async_fifo #(.DW(DW), .DEPTH(FSL_DEPTH)) u_prod_fsl (
    .wclk(lcd_clk), .wrst(lcd_rst_sys), .wen(p_en), .wdata(p_data), .full(p_full),
    .rclk(clk_sys), .rrst(rst_sys), .ren(mb_prod_read), .rdata(mb_prod_data), .exists(mb_prod_exists)
  );

  dataflow_ctrl #(.DW(DW)) u_dfc (
    .clk(lcd_clk), .rst(dcr_prm_rst),
    .p_consumerfsl_rdy(c_rdy), .p_consumerfsl_data(c_data), .p_consumerfsl_en(c_en),
    .p_producerfsl_rdy(!p_full), .p_producerfsl_en(p_en), .p_producerfsl_data(p_data),
    .rfd(prm_rfd), .done(prm_done), .dv(prm_dv), .output_data(prm_output_data),
    .input_data(prm_input_data), .ce(prm_ce), .start(prm_start), .state(df_state)
  );

  // one module interface per channel between the module and its switch
  for (genvar k = 0; k < NMCH; k++) begin : g_mi
    module_interface #(.DW(DW), .DEPTH(MI_DEPTH)) u_mi (
      .clk_sys(clk_sys), .rst_sys(rst_sys), .mi_en(mi_en),
      .clk_mod(lcd_clk), .rst_mod(lcd_rst_sys),
      .tx_write(prm_sc_tx_write[k]), .tx_data(prm_sc_tx_data[k]), .tx_full(prm_sc_tx_full[k]),
      .rx_read(prm_sc_rx_read[k]), .rx_data(prm_sc_rx_data[k]), .rx_exists(prm_sc_rx_exists[k]),
      .to_sw(to_sw[k]), .from_sw(from_sw[k]), .rx_overflow(mi_overflow[k])
    );
  end

endmodule
