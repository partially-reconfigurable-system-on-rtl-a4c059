// Fast simplex link (FSL): a one-way asynchronous FIFO between two clock
// domains. Each PRR has one towards it (consumer FSL, MicroBlaze -> PRR)
// and one from it (producer FSL, PRR -> MicroBlaze); module interfaces use
// the same FIFO between a module and its SCORES switch.
//
// Gray-coded read and write pointers cross the domains through two-flop
// synchronisers. The read side is first-word-fall-through: rdata shows the
// oldest word whenever exists = 1, and ren removes it (the FSL "exists /
// read" convention). full and exists are conservative: a write becomes
// visible to the reader two to three read-clock edges after it, and a read
// frees space two to three write-clock edges after it.
// The document gives the FIFO nature of the link and its 32-bit width; the
// depth (DEPTH, a power of two) is this design's choice.
module fsl_async_fifo #(
  parameter int unsigned DW    = 32,
  parameter int unsigned DEPTH = 16
) (
  // write side
  input  logic          wclk,
  input  logic          wrst,     // async, active high, released on wclk
  input  logic          wen,
  input  logic [DW-1:0] wdata,
  output logic          full,
  // read side
  input  logic          rclk,
  input  logic          rrst,     // async, active high, released on rclk
  input  logic          ren,
  output logic [DW-1:0] rdata,
  output logic          exists
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [DW-1:0] mem [DEPTH];

  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] rgray_w1, rgray_w2;   // read pointer in write domain
  logic [AW:0] wgray_r1, wgray_r2;   // write pointer in read domain

  function automatic logic [AW:0] bin2gray(logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // ---------------- write domain ----------------
  logic          do_write;
  logic [AW:0]   wbin_n;
  assign do_write = wen && !full;
  assign wbin_n   = wbin + (AW+1)'(do_write);

  always_ff @(posedge wclk) begin
    if (do_write) mem[wbin[AW-1:0]] <= wdata;
  end

  always_ff @(posedge wclk or posedge wrst) begin
    if (wrst) begin
      wbin     <= '0;
      wgray    <= '0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
    end else begin
      wbin     <= wbin_n;
      wgray    <= bin2gray(wbin_n);
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
    end
  end

  // full: write pointer one lap ahead of the synchronised read pointer
  assign full = (wgray == {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});

  // ---------------- read domain ----------------
  logic          do_read;
  logic [AW:0]   rbin_n;
  assign exists  = (rgray != wgray_r2);
  assign do_read = ren && exists;
  assign rbin_n  = rbin + (AW+1)'(do_read);
  assign rdata   = mem[rbin[AW-1:0]];

  always_ff @(posedge rclk or posedge rrst) begin
    if (rrst) begin
      rbin     <= '0;
      rgray    <= '0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
    end else begin
      rbin     <= rbin_n;
      rgray    <= bin2gray(rbin_n);
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
    end
  end

  initial begin
    assert (DEPTH >= 4 && (DEPTH & (DEPTH - 1)) == 0)
      else $error("fsl_async_fifo: DEPTH must be a power of two >= 4");
  end

endmodule
