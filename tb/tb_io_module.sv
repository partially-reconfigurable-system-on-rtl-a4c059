// Self-checking testbench of the I/O module. Words presented on the input
// pins must reach the switch side in order; words from the switch must
// appear on the output pins in order, each with a one-cycle valid; a burst
// of input with the interface disabled must end in the input-overflow flag.
module tb_io_module;
  import aft_pkg::*;
  localparam int unsigned DW = 32;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic          mi_en = 0;
  logic          pin_in_valid = 0, pin_in_overflow, pin_out_valid, rx_overflow;
  logic [DW-1:0] pin_in_data = 0, pin_out_data;
  chan_t         to_sw, from_sw;

  io_module #(.DW(DW), .MI_DEPTH(16)) dut (
    .clk_sys(clk), .rst_sys(rst), .mi_en(mi_en), .clk_io(clk), .rst_io(rst),
    .pin_in_valid(pin_in_valid), .pin_in_data(pin_in_data), .pin_in_overflow(pin_in_overflow),
    .pin_out_valid(pin_out_valid), .pin_out_data(pin_out_data),
    .to_sw(to_sw), .from_sw(from_sw), .rx_overflow(rx_overflow)
  );

  int checks = 0, failures = 0;
  logic [DW-1:0] inq[$], outq[$];
  int n_in = 0, n_out = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  always @(posedge clk) begin
    if (!rst && to_sw.valid) begin
      if (inq.size() == 0) check(0, "switch got a word never sent");
      else check(to_sw.data === inq.pop_front(), "pin->switch word");
      n_in++;
    end
    if (!rst && pin_out_valid) begin
      if (outq.size() == 0) check(0, "pin got a word never sent");
      else check(pin_out_data === outq.pop_front(), "switch->pin word");
      n_out++;
    end
  end

  initial begin
    from_sw = '0;
    repeat (3) @(posedge clk);
    rst = 0;
    mi_en = 1;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      pin_in_valid = ($urandom_range(2) == 0);
      pin_in_data  = $urandom;
      if (pin_in_valid) inq.push_back(pin_in_data);
      from_sw.valid = ($urandom_range(2) == 0);
      from_sw.data  = $urandom;
      if (from_sw.valid) outq.push_back(from_sw.data);
    end
    @(negedge clk);
    pin_in_valid = 0; from_sw = '0;
    repeat (30) @(posedge clk);
    check(inq.size() == 0 && n_in > 50, $sformatf("all pin words reached the switch (%0d)", n_in));
    check(outq.size() == 0 && n_out > 50, $sformatf("all switch words reached the pins (%0d)", n_out));
    check(!pin_in_overflow, "no overflow in normal traffic");
    // disabled interface: input words pile up until overflow
    mi_en = 0;
    for (int i = 0; i < 40; i++) begin
      @(negedge clk);
      pin_in_valid = 1;
      pin_in_data  = $urandom;
    end
    @(negedge clk);
    pin_in_valid = 0;
    repeat (5) @(posedge clk);
    check(pin_in_overflow, "input overflow flagged");
    check(n_in > 0 && !to_sw.valid, "nothing leaves while disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100us;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
