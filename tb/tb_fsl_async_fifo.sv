// Self-checking testbench of the asynchronous FSL FIFO. Writer and reader
// run on unrelated clocks (10 ns and 7 ns, then 7 ns and 23 ns) with random
// write and read requests. Every word read is compared with a reference
// queue; full must assert once DEPTH words are stored and never drop a
// word; exists must fall when the FIFO is empty; both sides reset
// together in the middle.
module tb_fsl_async_fifo;
  localparam int unsigned DW = 32;
  localparam int unsigned DEPTH = 16;

  logic wclk = 0, rclk = 0, rst = 1;
  realtime wper = 5.0, rper = 3.5;
  always #(wper) wclk = ~wclk;
  always #(rper) rclk = ~rclk;

  logic          wen = 0, ren = 0, full, exists;
  logic [DW-1:0] wdata = 0, rdata;

  fsl_async_fifo #(.DW(DW), .DEPTH(DEPTH)) dut (
    .wclk(wclk), .wrst(rst), .wen(wen), .wdata(wdata), .full(full),
    .rclk(rclk), .rrst(rst), .ren(ren), .rdata(rdata), .exists(exists)
  );

  int checks = 0, failures = 0;
  logic [DW-1:0] ref_q[$];
  int wr_pct = 50, rd_pct = 50;
  int n_written = 0, n_read = 0, full_seen = 0;
  int max_fill = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  // writer: decide on the falling edge, act on the rising edge
  always @(negedge wclk) begin
    if (!rst) begin
      wen   <= ($urandom_range(99) < wr_pct);
      wdata <= $urandom;
    end else wen <= 0;
  end
  always @(posedge wclk) begin
    if (!rst) begin
      if (full) full_seen++;
      if (wen && !full) begin
        ref_q.push_back(wdata);
        n_written++;
      end
      if (ref_q.size() > max_fill) max_fill = ref_q.size();
      check(ref_q.size() <= DEPTH, "never more than DEPTH words stored");
    end
  end
  always @(negedge rclk) ren <= !rst && ($urandom_range(99) < rd_pct);
  always @(posedge rclk) begin
    if (!rst && ren && exists) begin
      if (ref_q.size() == 0) check(0, "read from FIFO the reference says is empty");
      else begin
        logic [DW-1:0] e;
        e = ref_q.pop_front();
        check(rdata === e, $sformatf("word %0d: got %h want %h", n_read, rdata, e));
      end
      n_read++;
    end
  end

  task automatic drain();
    wr_pct = 0; rd_pct = 100;
    repeat (60) @(posedge rclk);
    check(ref_q.size() == 0 && !exists, "drained: exists low, reference empty");
  endtask

  initial begin
    repeat (4) @(posedge wclk);
    rst = 0;
    // 1: writer faster on average
    wr_pct = 80; rd_pct = 30;
    repeat (600) @(posedge wclk);
    check(full_seen > 0, "full asserted under back-pressure");
    check(max_fill == DEPTH, $sformatf("filled to DEPTH (max %0d)", max_fill));
    drain();
    // 2: fill without reading: exactly DEPTH words accepted
    begin
      int n_before;
      n_before = n_written;
      wr_pct = 100; rd_pct = 0;
      repeat (40) @(posedge wclk);
      check(n_written - n_before == DEPTH, $sformatf("accepted %0d words into an empty FIFO", n_written - n_before));
      check(full, "full after DEPTH writes");
    end
    drain();
    // 3: other clock ratio, reader slow
    wper = 3.5; rper = 11.5;
    wr_pct = 60; rd_pct = 70;
    repeat (2000) @(posedge wclk);
    drain();
    // 4: reset mid-stream
    wr_pct = 60; rd_pct = 40;
    repeat (50) @(posedge wclk);
    rst = 1;
    repeat (3) @(posedge rclk);
    ref_q.delete();
    check(!exists, "reset empties the FIFO");
    rst = 0;
    repeat (300) @(posedge wclk);
    drain();
    check(n_read > 500, $sformatf("%0d words passed", n_read));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #500us;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
