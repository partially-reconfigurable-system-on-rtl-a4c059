// I/O module (IOM): lets external pins (a sensor, a ground-link transceiver)
// exchange 32-bit words with the PRRs over SCORES. Pins are taken to be
// synchronous to clk_io.
//   in  : a word on pin_in_data with pin_in_valid is registered and then
//         written into the module interface towards the switch; a word
//         that finds that FIFO full is dropped and sets pin_in_overflow.
//   out : words arriving from the switch leave on pin_out_data, one per
//         cycle, with pin_out_valid for one cycle each.
// The module interface and the clock of the IOM are controlled by its
// PRSocket like those of a PRR. The document gives the IOM's role; the pin
// protocol, the input register and the overflow flag are this design's
// choice.
module io_module
  import aft_pkg::*;
#(
  parameter int unsigned DW       = 32,
  parameter int unsigned MI_DEPTH = 16
) (
  input  logic          clk_sys,
  input  logic          rst_sys,
  input  logic          mi_en,
  input  logic          clk_io,
  input  logic          rst_io,
  // external pins (clk_io domain)
  input  logic          pin_in_valid,
  input  logic [DW-1:0] pin_in_data,
  output logic          pin_in_overflow,
  output logic          pin_out_valid,
  output logic [DW-1:0] pin_out_data,
  // SCORES side (clk_sys)
  output chan_t         to_sw,
  input  chan_t         from_sw,
  output logic          rx_overflow
);

  logic          in_v_q;
  logic [DW-1:0] in_d_q;
  logic          tx_full, rx_exists;
  logic [DW-1:0] rx_data;

  always_ff @(posedge clk_io or posedge rst_io) begin
    if (rst_io) begin
      in_v_q          <= 1'b0;
      in_d_q          <= '0;
      pin_in_overflow <= 1'b0;
      pin_out_valid   <= 1'b0;
      pin_out_data    <= '0;
    end else begin
      in_v_q <= pin_in_valid;
      if (pin_in_valid) in_d_q <= pin_in_data;
      if (in_v_q && tx_full) pin_in_overflow <= 1'b1;
      pin_out_valid <= rx_exists;
      if (rx_exists) pin_out_data <= rx_data;
    end
  end

  module_interface #(.DW(DW), .DEPTH(MI_DEPTH)) u_mi (
    .clk_sys(clk_sys), .rst_sys(rst_sys), .mi_en(mi_en),
    .clk_mod(clk_io), .rst_mod(rst_io),
    .tx_write(in_v_q), .tx_data(in_d_q), .tx_full(tx_full),
    .rx_read(rx_exists), .rx_data(rx_data), .rx_exists(rx_exists),
    .to_sw(to_sw), .from_sw(from_sw), .rx_overflow(rx_overflow)
  );

endmodule
