// Behavioural model of a partially reconfigurable module (PRM) with the
// streaming handshake of the dataflow controller (start, ce, rfd, done,
// dv). It stands in for the frame-based signal-processing cores (FFTs)
// that are loaded into the PRRs; it is not synthesizable design content.
//
// Behaviour: frames of frame_len words (at most N, set while the model is
// idle; it plays the role of the module type loaded into the region). A rising clock edge with ce = 1 is a step.
// On a step with start = 1 and rfd = 1 the word on input_data is loaded.
// When a frame is complete, it is output in reverse order (as an FFT core
// that does not reorder its output) with KEY added to each word:
//   out[i] = in[N-1-i] + key.
// Output words appear with dv = 1 and each is consumed by one step. done is
// 1 when the next loading step completes a frame and nothing is being
// output, so dv rises on the cycle after that step. rfd is always 1 unless
// rfd_gap is set, which drops it on pseudo-random cycles. An SEU can be
// injected (seu = 1 for one cycle): it flips bit seu_bit of every later
// output word until the model is reset, like an upset in the configuration
// memory of the region until it is scrubbed.
module prm_model #(
  parameter int unsigned DW = 32,
  parameter int unsigned N  = 8
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [DW-1:0] key,
  input  int unsigned   frame_len,
  input  logic          rfd_gap,
  input  logic          seu,
  input  logic [4:0]    seu_bit,
  input  logic          start,
  input  logic          ce,
  input  logic [DW-1:0] input_data,
  output logic          rfd,
  output logic          done,
  output logic          dv,
  output logic [DW-1:0] output_data
);
  logic [DW-1:0] inbuf  [N];
  logic [DW-1:0] outbuf [N];
  int unsigned   in_cnt, out_cnt;
  logic          upset;
  logic [DW-1:0] flip;
  logic          gap;
  logic [15:0]   lfsr;

  assign rfd         = !rst && !gap;
  assign dv          = (out_cnt != 0);
  assign done        = (in_cnt == frame_len - 1) && (out_cnt == 0) && rfd;
  assign output_data = dv ? (outbuf[frame_len - out_cnt] ^ (upset ? flip : '0)) : '0;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      in_cnt  <= 0;
      out_cnt <= 0;
      upset   <= 1'b0;
      flip    <= '0;
      gap     <= 1'b0;
      lfsr    <= 16'hACE1;
    end else begin
      int unsigned oc;
      lfsr <= {lfsr[14:0], lfsr[15] ^ lfsr[13] ^ lfsr[12] ^ lfsr[10]};
      gap  <= rfd_gap && (lfsr[2:0] == 3'd0);
      if (seu) begin
        upset <= 1'b1;
        flip  <= DW'(1) << seu_bit;
      end
      if (ce) begin
        oc = out_cnt;
        if (oc != 0) oc = oc - 1;
        if (start && rfd) begin
          inbuf[in_cnt] <= input_data;
          if (in_cnt == frame_len - 1) begin
            outbuf[0] <= input_data + key;
            for (int i = 1; i < int'(frame_len); i++) outbuf[i] <= inbuf[frame_len - 1 - i] + key;
            in_cnt <= 0;
            if (oc != 0) $error("prm_model: frame completed before previous frame left");
            oc = frame_len;
          end else begin
            in_cnt <= in_cnt + 1;
          end
        end
        out_cnt <= oc;
      end
    end
  end
endmodule
