// Data processing region of the adaptive fault-tolerant PR SoC: one
// reconfigurable streaming block (RSB) with N_PRR partially reconfigurable
// regions (PRRs), N_IOM I/O modules (IOMs) and a linear array of
// N_PRR + N_IOM SCORES switches, one per module, in the order
//   IOM 0 | PRR 0 | PRR 1 | ... | PRR N_PRR-1 | IOM 1 | ... | IOM N_IOM-1
// (switch 0 at the west end). Neighbouring switches are joined by NCH
// one-way channels in each direction; the ends are left open. Each module
// has NMCH channels to and NMCH from its switch (an IOM uses the first).
//
// The controlling region (MicroBlaze, PLB bus, GPIO, ICAP, memories) is
// outside: its connections are ports of this module -
//   * per PRR and per IOM a GPIO write port into that module's PRSocket
//     DCR (dcr_we/dcr_wdata) and the DCR read-back;
//   * per PRR the MicroBlaze side of the consumer and producer FSLs;
//   * per PRR the PRM port (the module partial reconfiguration loads): the
//     Table-I handshake, its gated clock and reset, and its SCORES stream;
//   * per IOM its external pins.
// Fault tolerance is set by how the MicroBlaze software uses the PRRs: it
// loads one, two or three copies of a PRM (low, medium, high reliability),
// votes on their outputs, switches off unused PRR clocks through the DCRs
// and scrubs a PRR holding it in reset through its DCR. This module
// provides the hardware for that; none of the policy is in it.
//
// Clocks: clk_sys runs the controlling-region side, the switches and the
// FSL write/read ports of the MicroBlaze; clk_src[i] is the source of PRR
// i's local clock domain (any frequency, any phase), which PRR i's socket
// gates and divides by 1, 2, 4 or 8; IOMs run on clk_sys.
// Reset: rst_n, asynchronous assertion, released per domain.
module aft_pr_soc
  import aft_pkg::*;
#(
  parameter int unsigned N_PRR     = 4,
  parameter int unsigned N_IOM     = 2,
  parameter int unsigned DW        = 32,
  parameter int unsigned NCH       = 2,
  parameter int unsigned FSL_DEPTH = 16,
  parameter int unsigned MI_DEPTH  = 16,
  parameter int unsigned NMCH      = 1
) (
  input  logic                           clk_sys,
  input  logic                           rst_n,
  input  logic [N_PRR-1:0]               clk_src,
  // PRSocket DCRs
  input  logic [N_PRR-1:0]               prr_dcr_we,
  input  logic [N_PRR-1:0][31:0]         prr_dcr_wdata,
  output logic [N_PRR-1:0][31:0]         prr_dcr_q,
  input  logic [N_IOM-1:0]               iom_dcr_we,
  input  logic [N_IOM-1:0][31:0]         iom_dcr_wdata,
  output logic [N_IOM-1:0][31:0]         iom_dcr_q,
  // MicroBlaze side of the FSLs
  input  logic [N_PRR-1:0]               mb_cons_write,
  input  logic [N_PRR-1:0][DW-1:0]       mb_cons_data,
  output logic [N_PRR-1:0]               mb_cons_full,
  input  logic [N_PRR-1:0]               mb_prod_read,
  output logic [N_PRR-1:0][DW-1:0]       mb_prod_data,
  output logic [N_PRR-1:0]               mb_prod_exists,
  // PRM ports
  output logic [N_PRR-1:0]               prm_clk,
  output logic [N_PRR-1:0]               prm_rst,
  output logic [N_PRR-1:0]               prm_start,
  output logic [N_PRR-1:0]               prm_ce,
  output logic [N_PRR-1:0][DW-1:0]       prm_input_data,
  input  logic [N_PRR-1:0]               prm_rfd,
  input  logic [N_PRR-1:0]               prm_done,
  input  logic [N_PRR-1:0]               prm_dv,
  input  logic [N_PRR-1:0][DW-1:0]       prm_output_data,
  input  logic [N_PRR-1:0][NMCH-1:0]           prm_sc_tx_write,
  input  logic [N_PRR-1:0][NMCH-1:0][DW-1:0]   prm_sc_tx_data,
  output logic [N_PRR-1:0][NMCH-1:0]           prm_sc_tx_full,
  input  logic [N_PRR-1:0][NMCH-1:0]           prm_sc_rx_read,
  output logic [N_PRR-1:0][NMCH-1:0][DW-1:0]   prm_sc_rx_data,
  output logic [N_PRR-1:0][NMCH-1:0]           prm_sc_rx_exists,
  // IOM pins (clk_sys domain)
  input  logic [N_IOM-1:0]               iom_pin_in_valid,
  input  logic [N_IOM-1:0][DW-1:0]       iom_pin_in_data,
  output logic [N_IOM-1:0]               iom_pin_in_overflow,
  output logic [N_IOM-1:0]               iom_pin_out_valid,
  output logic [N_IOM-1:0][DW-1:0]       iom_pin_out_data,
  // status
  output logic [N_PRR-1:0]               prr_clk_on,
  output logic [N_PRR-1:0][2:0]          prr_df_state,
  output logic [N_PRR-1:0][NMCH-1:0]     prr_mi_overflow,
  output logic [N_IOM-1:0]               iom_mi_overflow
);

  localparam int unsigned NSW      = N_PRR + N_IOM;
  localparam int unsigned SW_CFG_W = sw_cfg_w(NCH, NMCH);

  logic rst_sys_async, rst_sys;
  assign rst_sys_async = !rst_n;
  rst_sync u_rst_sys (.clk(clk_sys), .rst_in(rst_sys_async), .rst_out(rst_sys));

  // per-switch module connections
  chan_t [NMCH-1:0]     to_sw   [NSW];
  chan_t [NMCH-1:0]     from_sw [NSW];
  logic  [SW_CFG_W-1:0] cfg     [NSW];
  chan_t [NCH-1:0]      east_out [NSW];
  chan_t [NCH-1:0]      west_out [NSW];
  chan_t [NCH-1:0]      west_in  [NSW];
  chan_t [NCH-1:0]      east_in  [NSW];

  // ---------------- PRR slots: switches 1 .. N_PRR ----------------
  for (genvar i = 0; i < N_PRR; i++) begin : g_prr
    df_state_e st;
    prr_slot #(.DW(DW), .NCH(NCH), .FSL_DEPTH(FSL_DEPTH), .MI_DEPTH(MI_DEPTH),
               .NMCH(NMCH), .SW_CFG_W(SW_CFG_W)) u_slot (
      .clk_sys(clk_sys), .rst_sys(rst_sys), .clk_src(clk_src[i]),
      .dcr_we(prr_dcr_we[i]), .dcr_wdata(prr_dcr_wdata[i]), .dcr_q(prr_dcr_q[i]),
      .mb_cons_write(mb_cons_write[i]), .mb_cons_data(mb_cons_data[i]), .mb_cons_full(mb_cons_full[i]),
      .mb_prod_read(mb_prod_read[i]), .mb_prod_data(mb_prod_data[i]), .mb_prod_exists(mb_prod_exists[i]),
      .prm_clk(prm_clk[i]), .prm_rst(prm_rst[i]), .prm_start(prm_start[i]), .prm_ce(prm_ce[i]),
      .prm_input_data(prm_input_data[i]), .prm_rfd(prm_rfd[i]), .prm_done(prm_done[i]),
      .prm_dv(prm_dv[i]), .prm_output_data(prm_output_data[i]),
      .prm_sc_tx_write(prm_sc_tx_write[i]), .prm_sc_tx_data(prm_sc_tx_data[i]),
      .prm_sc_tx_full(prm_sc_tx_full[i]), .prm_sc_rx_read(prm_sc_rx_read[i]),
      .prm_sc_rx_data(prm_sc_rx_data[i]), .prm_sc_rx_exists(prm_sc_rx_exists[i]),
      .sw_cfg(cfg[i + 1]), .to_sw(to_sw[i + 1]), .from_sw(from_sw[i + 1]),
      .mi_overflow(prr_mi_overflow[i]), .clk_on(prr_clk_on[i]), .df_state(st)
    );
    assign prr_df_state[i] = st;
  end

  // ---------------- IOMs: switch 0 and switches N_PRR+1 .. ----------------
  for (genvar j = 0; j < N_IOM; j++) begin : g_iom
    localparam int unsigned S = (j == 0) ? 0 : N_PRR + j;
    logic                clk_io, io_rst_sys, io_rst, io_mi_en;
    logic [SW_CFG_W-1:0] io_cfg;

    prsocket #(.SW_CFG_W(SW_CFG_W)) u_socket (
      .clk_sys(clk_sys), .rst_sys(rst_sys), .dcr_we(iom_dcr_we[j]), .dcr_wdata(iom_dcr_wdata[j]),
      .dcr_q(iom_dcr_q[j]), .clk_src(clk_sys), .clk_lcd(clk_io), .clk_on(),
      .lcd_rst_sys(io_rst_sys), .prm_rst(io_rst), .mi_en(io_mi_en), .sw_cfg(io_cfg)
    );

    io_module #(.DW(DW), .MI_DEPTH(MI_DEPTH)) u_iom (
      .clk_sys(clk_sys), .rst_sys(rst_sys), .mi_en(io_mi_en),
      .clk_io(clk_io), .rst_io(io_rst_sys || io_rst),
      .pin_in_valid(iom_pin_in_valid[j]), .pin_in_data(iom_pin_in_data[j]),
      .pin_in_overflow(iom_pin_in_overflow[j]),
      .pin_out_valid(iom_pin_out_valid[j]), .pin_out_data(iom_pin_out_data[j]),
      .to_sw(to_sw[S][0]), .from_sw(from_sw[S][0]), .rx_overflow(iom_mi_overflow[j])
    );
    // an IOM uses the first module channel of its switch; the others idle
    for (genvar k = 1; k < NMCH; k++) begin : g_idle
      assign to_sw[S][k] = '0;
    end
    assign cfg[S] = io_cfg;
  end

  // ---------------- SCORES switch array ----------------
  for (genvar s = 0; s < NSW; s++) begin : g_sw
    if (s == 0) begin : g_wend
      assign west_in[s] = '0;
    end else begin : g_wlink
      assign west_in[s] = east_out[s - 1];
    end
    if (s == NSW - 1) begin : g_eend
      assign east_in[s] = '0;
    end else begin : g_elink
      assign east_in[s] = west_out[s + 1];
    end

    scores_switch #(.NCH(NCH), .NMCH(NMCH), .SW_CFG_W(SW_CFG_W)) u_sw (
      .clk(clk_sys), .rst(rst_sys), .sw_cfg(cfg[s]),
      .west_in(west_in[s]), .east_in(east_in[s]), .from_mod(to_sw[s]),
      .east_out(east_out[s]), .west_out(west_out[s]), .to_mod(from_sw[s])
    );
  end

endmodule
