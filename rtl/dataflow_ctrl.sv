// Dataflow controller: streams 32-bit words from a PRR's consumer FSL into
// the partially reconfigurable module (PRM) and from the PRM into the
// producer FSL, reading and writing in the same cycle whenever both sides
// allow it, so that a PRM can process a continuous stream.
//
// A five-state FSM (Idle, Read_Data, Read_Write_Data, Stall, Write_Data)
// follows the document's state graph and signal set:
//   Idle            waits for the consumer FSL to hold data.
//   Read_Data       fills the PRM: one word per cycle while the FSL has data
//                   and the PRM raises rfd; on the word for which the PRM
//                   signals done (output valid next cycle) it moves on.
//   Read_Write_Data moves one word in and one word out per cycle.
//   Stall           the producer FSL is full; the PRM is frozen (ce = 0).
//   Write_Data      no more input: the PRM is stepped to drain its results,
//                   then the FSM returns to Idle.
//
// PRM protocol (Table-I signal names). One PRM step happens on a rising
// edge with ce = 1. On a step, start = 1 marks input_data as a valid sample
// to load (this design uses start as the per-sample input qualifier and
// holds it at 0 on drain steps); dv marks output_data valid in the current
// cycle, and the word is taken when the step happens. The controller only
// steps the PRM when no word can be lost: an input is loaded only when the
// FSL holds it, and a step with dv = 1 happens only when the producer FSL
// can take the word. Outputs are Mealy (combinational from state and
// inputs); the FSL read side must be first-word-fall-through. The data
// buses are plain wires, as the graph prints them: input_data is the
// consumer FSL's head word and the producer FSL is written with
// output_data.
//
// Departures from the printed graph, all made so the stream never loses or
// invents a word: the Idle->Read_Data edge takes no PRM step (the graph
// shows ce = start = 1 there; stepping could complete a frame whose first
// words arrived in an earlier burst while the FSM is not yet in a state
// that drains output); the word the PRM consumes on the
// Read_Data->Read_Write_Data edge is popped from the FSL; ce/start stay 1
// on the Read_Write_Data self-loop; the Read_Write_Data->Write_Data edge is
// taken when the consumer FSL runs empty or rfd falls (the printed guard
// names the producer FSL, which would collide with the Stall edge); the
// Read_Write_Data self-loop does not require dv, so PRMs whose output has
// gaps keep moving. Write_Data returns to Idle as soon as dv is low, as
// printed, so a PRM must present the results it has finished back to back.
module dataflow_ctrl
  import aft_pkg::*;
#(
  parameter int unsigned DW = 32
) (
  input  logic          clk,
  input  logic          rst,
  // consumer FSL (MicroBlaze -> PRR), read side
  input  logic          p_consumerfsl_rdy,
  input  logic [DW-1:0] p_consumerfsl_data,
  output logic          p_consumerfsl_en,
  // producer FSL (PRR -> MicroBlaze), write side
  input  logic          p_producerfsl_rdy,
  output logic          p_producerfsl_en,
  output logic [DW-1:0] p_producerfsl_data,
  // PRM
  input  logic          rfd,
  input  logic          done,
  input  logic          dv,
  input  logic [DW-1:0] output_data,
  output logic [DW-1:0] input_data,
  output logic          ce,
  output logic          start,
  output df_state_e     state
);

  df_state_e state_q, state_d;

  logic can_out;   // a step would not lose a PRM output word
  logic feed;      // a step can load one word from the consumer FSL

  assign can_out = !dv || p_producerfsl_rdy;
  assign feed    = p_consumerfsl_rdy && rfd && can_out;

  always_comb begin
    state_d = state_q;
    ce      = 1'b0;
    start   = 1'b0;
    unique case (state_q)
      DF_IDLE: begin
        if (p_consumerfsl_rdy) state_d = DF_READ_DATA;
      end
      DF_READ_DATA: begin
        if (feed) begin
          ce    = 1'b1;
          start = 1'b1;
          if (done) state_d = DF_READ_WRITE_DATA;
        end
      end
      DF_READ_WRITE_DATA: begin
        if (!p_producerfsl_rdy) begin
          state_d = DF_STALL;
        end else if (!p_consumerfsl_rdy || !rfd) begin
          state_d = DF_WRITE_DATA;
        end else begin
          ce    = 1'b1;
          start = 1'b1;
        end
      end
      DF_STALL: begin
        if (p_producerfsl_rdy) begin
          state_d = DF_READ_WRITE_DATA;
          ce      = feed;
          start   = feed;
        end
      end
      DF_WRITE_DATA: begin
        if (!dv) begin
          state_d = DF_IDLE;
        end else if (!p_producerfsl_rdy) begin
          state_d = DF_STALL;
        end else begin
          ce = 1'b1;      // drain step, no input loaded (start = 0)
        end
      end
      default: state_d = DF_IDLE;
    endcase
  end

  assign p_consumerfsl_en   = ce && start;
  assign p_producerfsl_en   = ce && dv;
  assign input_data         = p_consumerfsl_data;
  assign p_producerfsl_data = output_data;
  assign state              = state_q;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) state_q <= DF_IDLE;
    else     state_q <= state_d;
  end

  // Handshake rules: never pop an empty FSL, never push into a full one.
  a_no_pop_empty : assert property (@(posedge clk) disable iff (rst)
    p_consumerfsl_en |-> p_consumerfsl_rdy);
  a_no_push_full : assert property (@(posedge clk) disable iff (rst)
    p_producerfsl_en |-> p_producerfsl_rdy);
  a_no_lost_output : assert property (@(posedge clk) disable iff (rst)
    (ce && dv) |-> p_producerfsl_en);

endmodule
