// SCORES switch: one node of the linear switch array that carries streams
// between the modules (PRRs and IOMs) of a reconfigurable streaming block.
// Each switch has NCH one-way channels to each neighbour in each direction
// and NMCH channels to and NMCH from its own module. Every output - NCH
// eastbound, NCH westbound and NMCH towards the module - is a register
// loaded each clk_sys cycle from the input its select names:
//   0                    nothing (channel idle)
//   1..NCH               westside input k-1 (word travelling east)
//   NCH+1..2*NCH         eastside input k-NCH-1 (word travelling west)
//   2*NCH+1..2*NCH+NMCH  module output channel k-2*NCH-1
// Codes above that give an idle channel. sw_cfg holds the selects, output
// o at bits [o*SEL_W +: SEL_W], outputs ordered east_out[0..NCH-1],
// west_out[0..NCH-1], to_mod[0..NMCH-1]. A stream thus moves one switch
// per cycle. The document names the switches, their linear array, the
// one-way channels between switches, the channels between a module and
// its switch and the channel width as base-system parameters; the
// crossbar-of-registered-selects structure, the select encoding and the
// absence of flow control are this design's choice.
module scores_switch
  import aft_pkg::*;
#(
  parameter int unsigned NCH      = 2,
  parameter int unsigned NMCH     = 1,
  parameter int unsigned SW_CFG_W = sw_cfg_w(NCH, NMCH)
) (
  input  logic                clk,
  input  logic                rst,
  input  logic [SW_CFG_W-1:0] sw_cfg,
  input  chan_t [NCH-1:0]     west_in,
  input  chan_t [NCH-1:0]     east_in,
  input  chan_t [NMCH-1:0]    from_mod,
  output chan_t [NCH-1:0]     east_out,
  output chan_t [NCH-1:0]     west_out,
  output chan_t [NMCH-1:0]    to_mod
);

  localparam int unsigned SEL_W = sw_sel_w(NCH, NMCH);
  localparam int unsigned NOUT  = 2 * NCH + NMCH;
  localparam int unsigned NSRC  = 2 * NCH + NMCH + 1;

  chan_t src [NSRC];
  chan_t out_d [NOUT];
  chan_t out_q [NOUT];

  always_comb begin
    src[0] = '0;
    for (int k = 0; k < NCH; k++) begin
      src[1 + k]       = west_in[k];
      src[1 + NCH + k] = east_in[k];
    end
    for (int k = 0; k < NMCH; k++) src[1 + 2 * NCH + k] = from_mod[k];
  end

  always_comb begin
    for (int o = 0; o < NOUT; o++) begin
      logic [SEL_W-1:0] sel;
      sel = sw_cfg[o * SEL_W +: SEL_W];
      out_d[o] = (int'(sel) < NSRC) ? src[sel] : '0;
    end
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      for (int o = 0; o < NOUT; o++) out_q[o] <= '0;
    end else begin
      for (int o = 0; o < NOUT; o++) out_q[o] <= out_d[o];
    end
  end

  always_comb begin
    for (int k = 0; k < NCH; k++) begin
      east_out[k] = out_q[k];
      west_out[k] = out_q[NCH + k];
    end
    for (int k = 0; k < NMCH; k++) to_mod[k] = out_q[2 * NCH + k];
  end

  initial begin
    assert (NMCH >= 1 && NCH >= 1)
      else $error("scores_switch: needs at least one channel of each kind");
  end

endmodule
