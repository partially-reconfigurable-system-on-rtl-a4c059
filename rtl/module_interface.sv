// Module interface: joins a module (a PRR's PRM or an IOM), running on its
// own clock, to its SCORES switch, running on clk_sys. It holds two
// clock-crossing FIFOs:
//   tx: module -> switch. The module writes with tx_write while !tx_full.
//       On the switch side the oldest word is offered as a SCORES channel
//       word every clk_sys cycle (SCORES channels carry no back-pressure),
//       and taken from the FIFO in the same cycle.
//   rx: switch -> module. Every valid channel word is written; the module
//       reads with rx_read while rx_exists (first-word fall-through).
//       A word that arrives while the FIFO is full is dropped and sets the
//       sticky rx_overflow flag (cleared by reset).
// Both directions pass data only while mi_en (from the PRSocket) is set.
// The document names the module interfaces and places them between module
// and switch; the FIFO structure, the missing back-pressure and the
// overflow flag are this design's choice.
module module_interface
  import aft_pkg::*;
#(
  parameter int unsigned DW    = 32,
  parameter int unsigned DEPTH = 16
) (
  input  logic          clk_sys,
  input  logic          rst_sys,     // system reset, clk_sys domain
  input  logic          mi_en,       // clk_sys domain
  input  logic          clk_mod,
  input  logic          rst_mod,     // system reset, clk_mod domain
  // module side
  input  logic          tx_write,
  input  logic [DW-1:0] tx_data,
  output logic          tx_full,
  input  logic          rx_read,
  output logic [DW-1:0] rx_data,
  output logic          rx_exists,
  // switch side (clk_sys)
  output chan_t         to_sw,
  input  chan_t         from_sw,
  output logic          rx_overflow
);

  logic          tx_exists;
  logic [DW-1:0] tx_head;
  logic          rx_full;
  logic          rx_wen;

  fsl_async_fifo #(.DW(DW), .DEPTH(DEPTH)) u_tx (
    .wclk(clk_mod), .wrst(rst_mod), .wen(tx_write), .wdata(tx_data), .full(tx_full),
    .rclk(clk_sys), .rrst(rst_sys), .ren(mi_en), .rdata(tx_head), .exists(tx_exists)
  );

  always_comb begin
    to_sw       = '0;
    to_sw.valid = mi_en && tx_exists;
    to_sw.data  = tx_head[DW-1:0];
  end

  assign rx_wen = mi_en && from_sw.valid;

  fsl_async_fifo #(.DW(DW), .DEPTH(DEPTH)) u_rx (
    .wclk(clk_sys), .wrst(rst_sys), .wen(rx_wen), .wdata(from_sw.data[DW-1:0]), .full(rx_full),
    .rclk(clk_mod), .rrst(rst_mod), .ren(rx_read), .rdata(rx_data), .exists(rx_exists)
  );

  always_ff @(posedge clk_sys or posedge rst_sys) begin
    if (rst_sys)                rx_overflow <= 1'b0;
    else if (rx_wen && rx_full) rx_overflow <= 1'b1;
  end

endmodule
