// Self-checking testbench of the PRSocket. Writes DCR values through the
// GPIO port and checks the read-back, the routing field, the module-
// interface enable, that the local clock runs while CLK_EN is set (divided
// as DIV says) or while the module reset is held, and not otherwise, and
// that the module reset follows PRR_RST and the system reset.
module tb_prsocket;
  import aft_pkg::*;
  localparam int unsigned SW_CFG_W = 15;

  logic clk_sys = 0, clk_src = 0, rst_sys = 1;
  always #5 clk_sys = ~clk_sys;
  always #3.5 clk_src = ~clk_src;

  logic                dcr_we = 0;
  logic [31:0]         dcr_wdata = 0, dcr_q;
  logic                clk_lcd, clk_on, lcd_rst_sys, prm_rst, mi_en;
  logic [SW_CFG_W-1:0] sw_cfg;

  prsocket #(.SW_CFG_W(SW_CFG_W)) dut (
    .clk_sys(clk_sys), .rst_sys(rst_sys), .dcr_we(dcr_we), .dcr_wdata(dcr_wdata), .dcr_q(dcr_q),
    .clk_src(clk_src), .clk_lcd(clk_lcd), .clk_on(clk_on), .lcd_rst_sys(lcd_rst_sys),
    .prm_rst(prm_rst), .mi_en(mi_en), .sw_cfg(sw_cfg)
  );

  int checks = 0, failures = 0, edges = 0;
  always @(posedge clk_lcd) edges++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  task automatic dcr_write(input logic [31:0] v);
    @(negedge clk_sys);
    dcr_we = 1; dcr_wdata = v;
    @(negedge clk_sys);
    dcr_we = 0; dcr_wdata = $urandom;   // ignored while dcr_we = 0
  endtask

  initial begin
    repeat (3) @(posedge clk_sys);
    #1;
    check(lcd_rst_sys && prm_rst, "resets asserted during system reset");
    rst_sys = 0;
    repeat (4) @(posedge clk_src);
    #1;
    check(!lcd_rst_sys && !prm_rst, "resets released after system reset");
    check(dcr_q == 0 && !mi_en && sw_cfg == 0, "DCR resets to zero");
    edges = 0;
    repeat (10) @(posedge clk_src);
    check(edges == 0, "clock off after reset");

    for (int i = 0; i < 20; i++) begin
      logic [31:0] v;
      v = $urandom;
      v[DCR_PRR_RST] = 1'b0;
      if (i < 4) v[DCR_DIV_LSB +: 2] = 2'(i);   // every divider setting at least once
      dcr_write(v);
      check(dcr_q == v, "DCR read-back");
      check(mi_en == v[DCR_MI_EN], "MI_EN field");
      check(sw_cfg == v[DCR_SW_LSB +: SW_CFG_W], "switch field");
      repeat (4) @(posedge clk_src);
      edges = 0;
      repeat (10) @(posedge clk_src);
      #1;
      if (v[DCR_CLK_EN]) begin
        int ex;
        ex = 10 >> v[DCR_DIV_LSB +: 2];
        check(edges >= ex - 1 && edges <= ex + 2 && clk_on,
              $sformatf("clock runs with CLK_EN, divided by %0d (%0d edges)", 1 << v[DCR_DIV_LSB +: 2], edges));
      end
      else               check(edges == 0 && !clk_on, "clock stopped without CLK_EN");
    end

    // PRR reset through the DCR
    dcr_write(32'h1 << DCR_PRR_RST | 32'h1);
    repeat (3) @(posedge clk_src);
    #1;
    check(prm_rst && !lcd_rst_sys, "PRR_RST holds only the module reset");
    dcr_write(32'h1);
    repeat (3) @(posedge clk_src);
    #1;
    check(!prm_rst, "PRR_RST released");
    // with CLK_EN off, PRR_RST alone runs the clock so the region is reset
    dcr_write(32'h1 << DCR_PRR_RST);
    repeat (4) @(posedge clk_src);
    edges = 0;
    repeat (10) @(posedge clk_src);
    #1;
    check(prm_rst && edges >= 9 && !clk_on, $sformatf("clock runs while PRR_RST holds the region (%0d edges)", edges));
    dcr_write(32'h0);
    repeat (5) @(posedge clk_src);
    edges = 0;
    repeat (10) @(posedge clk_src);
    check(!prm_rst && edges == 0, "clock stops when PRR_RST is released with CLK_EN off");
    // system reset clears the DCR
    rst_sys = 1;
    #1;
    check(dcr_q == 0 && lcd_rst_sys && prm_rst, "system reset clears DCR and resets module");
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
