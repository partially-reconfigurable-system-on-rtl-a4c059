// Shared types and constants of the adaptive fault-tolerant PR SoC data
// processing region.
//
// * df_state_e : the five states of the per-PRR dataflow controller.
// * chan_t     : one SCORES channel word, a valid bit and a 32-bit datum.
// * DCR_*      : bit positions of the 32-bit device control register (DCR)
//                held by every PRSocket. The document says the DCR carries
//                the control bits for the switch, the PRR/IOM and the module
//                interface; the field layout below is this design's choice.
// * SRC_*      : SCORES switch source codes (this design's encoding).
package aft_pkg;

  localparam int unsigned AFT_DW = 32;   // FSL and SCORES data width

  typedef enum logic [2:0] {
    DF_IDLE            = 3'd0,
    DF_READ_DATA       = 3'd1,
    DF_READ_WRITE_DATA = 3'd2,
    DF_STALL           = 3'd3,
    DF_WRITE_DATA      = 3'd4
  } df_state_e;

  typedef struct packed {
    logic          valid;
    logic [AFT_DW-1:0] data;
  } chan_t;

  // DCR layout
  localparam int unsigned DCR_CLK_EN = 0;  // 1: local clock of the PRR/IOM runs
  localparam int unsigned DCR_PRR_RST = 1; // 1: hold the PRR (controller and PRM) in reset
  localparam int unsigned DCR_MI_EN  = 2;  // 1: module interface passes data
  localparam int unsigned DCR_SW_LSB = 3;  // first bit of the switch routing field
  localparam int unsigned DCR_DIV_LSB = 30; // 2 bits: local clock = source / 2**DIV

  // Switch select width for NCH one-way channels in each direction
  // between switches and NMCH channels each way between a module and its
  // switch: codes 0 (none), 1..NCH (west inputs), NCH+1..2*NCH (east
  // inputs), 2*NCH+1..2*NCH+NMCH (module outputs).
  function automatic int unsigned sw_sel_w(int unsigned nch, int unsigned nmch);
    return $clog2(2 * nch + nmch + 1);
  endfunction

  // Width of the whole routing field: one select per switch output
  // (NCH eastbound, NCH westbound, NMCH towards the module).
  function automatic int unsigned sw_cfg_w(int unsigned nch, int unsigned nmch);
    return (2 * nch + nmch) * sw_sel_w(nch, nmch);
  endfunction

endpackage
