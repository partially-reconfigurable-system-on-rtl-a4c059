// Self-checking testbench of the local-clock gate. Counts gated clock edges
// in windows where the enable is on or off, checks that the gate follows
// the enable within three source cycles, that every gated pulse is a full
// high phase of the source clock (no glitches or short pulses), and that
// the divider passes 64/2**div pulses in 64 source cycles, and that hold
// opens the gate.
module tb_lcd_clock_gate;
  logic clk_in = 0, rst = 1, en = 0, hold = 0, en_sync, clk_out;
  logic [1:0] div = 0;
  always #5 clk_in = ~clk_in;

  lcd_clock_gate dut (.clk_in(clk_in), .rst(rst), .en(en), .hold(hold), .div(div), .en_sync(en_sync), .clk_out(clk_out));

  int checks = 0, failures = 0;
  int edges = 0;
  realtime t_rise, width;
  int short_pulses = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  always @(posedge clk_out) begin edges++; t_rise = $realtime; end
  always @(negedge clk_out) begin
    width = $realtime - t_rise;
    if ($realtime > 30 && (width < 4.99 || width > 5.01)) begin short_pulses++; $display("pulse %0t w=%f", $realtime, width); end
  end

  initial begin
    #23 rst = 0;
    // disabled: no edges
    edges = 0;
    repeat (20) @(posedge clk_in);
    check(edges == 0, "no clock while disabled");
    // enable asynchronously, mid-phase
    #2.3 en = 1;
    repeat (3) @(posedge clk_in);
    #1;
    check(en_sync, "enable seen within three cycles");
    edges = 0;
    repeat (50) @(posedge clk_in);
    #1;
    check(edges == 50, $sformatf("50 edges expected while enabled, got %0d", edges));
    // disable at an odd time
    #3.7 en = 0;
    repeat (4) @(posedge clk_in);
    edges = 0;
    repeat (30) @(posedge clk_in);
    check(edges == 0, "clock stops after disable");
    // toggle at random times
    for (int i = 0; i < 40; i++) begin
      #($urandom_range(200) / 10.0) en = ~en;
    end
    en = 1;
    repeat (10) @(posedge clk_in);
    check(short_pulses == 0, $sformatf("%0d shortened gated pulses", short_pulses));
    // division by 2, 4, 8: one full pulse every 2**div source cycles
    for (int d = 1; d < 4; d++) begin
      en = 0;
      repeat (4) @(posedge clk_in);
      div = 2'(d);
      repeat (3) @(posedge clk_in);
      en = 1;
      repeat (6) @(posedge clk_in);
      #1;
      edges = 0;
      repeat (64) @(posedge clk_in);
      #1;
      check(edges == 64 >> d, $sformatf("divide by %0d: %0d edges in 64 cycles", 1 << d, edges));
    end
    check(short_pulses == 0, "divided pulses are full width");
    // hold opens the gate while en is low, undivided
    en = 0;
    div = 0;
    repeat (4) @(posedge clk_in);
    @(negedge clk_in) hold = 1;
    repeat (2) @(posedge clk_in);
    #1;
    edges = 0;
    repeat (20) @(posedge clk_in);
    #1;
    check(edges == 20, $sformatf("hold: %0d edges in 20 cycles", edges));
    @(negedge clk_in) hold = 0;
    repeat (2) @(posedge clk_in);
    #1;
    edges = 0;
    repeat (10) @(posedge clk_in);
    check(edges == 0, "gate closes when hold drops");
    // reset closes the gate
    rst = 1;
    #1;
    edges = 0;
    repeat (10) @(posedge clk_in);
    check(edges == 0, "reset closes the gate");
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
