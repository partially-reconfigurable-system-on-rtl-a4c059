// Self-checking testbench of the SCORES switch. Random routing selects and
// random channel words; each output is compared one cycle later with the
// source its select named, computed here from the select encoding. Also
// checks reset and that unused codes idle a channel. Runs with two module
// channels, so that every select code is used.
module tb_scores_switch;
  import aft_pkg::*;
  localparam int unsigned NCH = 2;
  localparam int unsigned NMCH = 2;
  localparam int unsigned NOUT = 2 * NCH + NMCH;
  localparam int unsigned SEL_W = 3;            // codes 0..2*NCH+NMCH = 0..6
  localparam int unsigned SW_CFG_W = NOUT * SEL_W;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [SW_CFG_W-1:0] cfg = '0;
  chan_t [NCH-1:0] west_in, east_in, east_out, west_out;
  chan_t [NMCH-1:0] from_mod, to_mod;

  scores_switch #(.NCH(NCH), .NMCH(NMCH)) dut (
    .clk(clk), .rst(rst), .sw_cfg(cfg), .west_in(west_in), .east_in(east_in),
    .from_mod(from_mod), .east_out(east_out), .west_out(west_out), .to_mod(to_mod)
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  function automatic chan_t pick(input int sel, input chan_t [NCH-1:0] w, input chan_t [NCH-1:0] e,
                                 input chan_t [NMCH-1:0] m);
    if (sel == 0) return '0;
    if (sel <= NCH) return w[sel - 1];
    if (sel <= 2 * NCH) return e[sel - NCH - 1];
    if (sel <= 2 * NCH + NMCH) return m[sel - 2 * NCH - 1];
    return '0;
  endfunction

  function automatic chan_t rnd();
    chan_t c;
    c.valid = 1'($urandom);
    c.data  = $urandom;
    return c;
  endfunction

  initial begin
    chan_t [NCH-1:0] w, e;
    chan_t [NMCH-1:0] m;
    west_in = '0; east_in = '0; from_mod = '0;
    repeat (2) @(posedge clk);
    #1;
    check(east_out == '0 && west_out == '0 && to_mod == '0, "outputs idle in reset");
    rst = 0;
    for (int it = 0; it < 500; it++) begin
      int sel [NOUT];
      @(negedge clk);
      for (int o = 0; o < NOUT; o++) begin
        sel[o] = $urandom_range(7);   // 7: unused code
        cfg[o * SEL_W +: SEL_W] = SEL_W'(sel[o]);
      end
      for (int k = 0; k < NCH; k++) begin w[k] = rnd(); e[k] = rnd(); end
      for (int k = 0; k < NMCH; k++) m[k] = rnd();
      west_in = w; east_in = e; from_mod = m;
      @(posedge clk);
      #1;
      for (int k = 0; k < NCH; k++) begin
        check(east_out[k] == pick(sel[k], w, e, m), $sformatf("east_out[%0d] sel %0d", k, sel[k]));
        check(west_out[k] == pick(sel[NCH + k], w, e, m), $sformatf("west_out[%0d] sel %0d", k, sel[NCH + k]));
      end
      for (int k = 0; k < NMCH; k++)
        check(to_mod[k] == pick(sel[2 * NCH + k], w, e, m), $sformatf("to_mod[%0d] sel %0d", k, sel[2 * NCH + k]));
    end
    // unused select codes give an idle channel
    @(negedge clk);
    cfg = '1;
    @(posedge clk);
    #1;
    check(east_out == '0 && west_out == '0 && to_mod == '0, "code 7 is idle");
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
