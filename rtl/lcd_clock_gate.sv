// Local clock domain (LCD) gate: lets a PRR's source clock through to the
// PRR only while the enable is set, so that a PRR that holds no module can
// be halted to save power, and optionally passes only every 2**div-th
// pulse, so that each PRR can run at its own rate. The function is the
// source design's (unused PRR clocks are switched off, and each PRR's
// clock frequency is set through its socket); the circuit is this design's
// choice. The enable and the divider select come from another clock domain
// and pass two-flop synchronisers on clk_in. A counter on clk_in then
// opens the gate for one source cycle in every 2**div, and the gate
// enable is held in a latch that is transparent while clk_in is low, so
// clk_out only ever carries whole high phases of clk_in:
//   clk_out = clk_in AND latched(enable AND counter == 0).
// With div = 0 clk_out is clk_in. The gate starts and stops on a falling
// edge of clk_in, two to three clk_in cycles after en changes. The latch is
// intended (the classic glitch-free clock gate). div should only be changed
// while en is low. While hold is high (the region's module reset is
// asserted) the gate is open regardless of en, so that every flop of the
// region is clocked while it is held in reset; hold comes from a flop on
// clk_in.
module lcd_clock_gate (
  input  logic clk_in,
  input  logic rst,       // async, active high: gate closed
  input  logic en,        // asynchronous enable request
  input  logic hold,      // keep the gate open (clk_in domain)
  input  logic [1:0] div, // divide clk_in by 2**div (quasi-static)
  output logic en_sync,   // enable as seen in the clk_in domain
  output logic clk_out
);
  logic       s1, s2, en_lat, pass;
  logic [1:0] d1, d2;
  logic [2:0] cnt;

  always_ff @(posedge clk_in or posedge rst) begin
    if (rst) begin
      s1  <= 1'b0;
      s2  <= 1'b0;
      d1  <= '0;
      d2  <= '0;
      cnt <= '0;
    end else begin
      s1  <= en;
      s2  <= s1;
      d1  <= div;
      d2  <= d1;
      cnt <= (cnt + 3'd1) & ((3'd1 << d2) - 3'd1);
    end
  end

  assign pass = hold || (s2 && (cnt == 3'd0));

  always_latch begin
    if (!clk_in) en_lat = pass;
  end

  assign en_sync = s2;
  assign clk_out = clk_in & en_lat;
endmodule
