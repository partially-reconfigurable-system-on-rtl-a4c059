// Testbench of the data processing region with two channels between each
// module and its switch (NMCH = 2), two PRRs and two IOMs. It sets up two
// SCORES streams at once through the PRSocket DCRs:
//   A: IOM0 pins -> SW0 -> SW1 -> PRR0 module channel 1 -> echo (word XOR
//      mask) on PRR0 module channel 1 -> SW1 -> SW2 -> SW3 -> IOM1 pins;
//   B: IOM1 pins -> SW3 -> SW2 -> PRR1 module channel 0, read there.
// Switch selects (NCH = 2, NMCH = 2, 3 bits each, from DCR bit 3): outputs
// east_out[0], east_out[1], west_out[0], west_out[1], to_mod[0], to_mod[1];
// codes 0 idle, 1-2 west inputs, 3-4 east inputs, 5-6 module channels.
// Every word must arrive once and in order, and the module channels that
// carry no route must stay empty.
module tb_aft_pr_soc_mch;
  import aft_pkg::*;
  localparam int unsigned NP = 2, NI = 2, DW = 32, NMCH = 2, SEL_W = 3;
  localparam logic [DW-1:0] ECHO_MASK = 32'h0000_A5A5;

  logic clk_sys = 0, rst_n = 0;
  logic [NP-1:0] clk_src = '0;
  always #5 clk_sys = ~clk_sys;
  always #4 clk_src[0] = ~clk_src[0];
  always #6 clk_src[1] = ~clk_src[1];

  logic [NP-1:0]                    prr_dcr_we = '0;
  logic [NP-1:0][31:0]              prr_dcr_wdata = '0, prr_dcr_q;
  logic [NI-1:0]                    iom_dcr_we = '0;
  logic [NI-1:0][31:0]              iom_dcr_wdata = '0, iom_dcr_q;
  logic [NP-1:0]                    mb_cons_full, mb_prod_exists;
  logic [NP-1:0][DW-1:0]            mb_prod_data, prm_input_data;
  logic [NP-1:0]                    prm_clk, prm_rst, prm_start, prm_ce, clk_on;
  logic [NP-1:0][2:0]               df_state;
  logic [NP-1:0][NMCH-1:0]          sc_tx_write, sc_tx_full, sc_rx_read, sc_rx_exists;
  logic [NP-1:0][NMCH-1:0][DW-1:0]  sc_tx_data, sc_rx_data;
  logic [NP-1:0][NMCH-1:0]          prr_mi_ovf;
  logic [NI-1:0]                    iom_mi_ovf, pin_in_valid, pin_in_ovf, pin_out_valid;
  logic [NI-1:0][DW-1:0]            pin_in_data, pin_out_data;

  aft_pr_soc #(.N_PRR(NP), .N_IOM(NI), .NMCH(NMCH)) dut (
    .clk_sys(clk_sys), .rst_n(rst_n), .clk_src(clk_src),
    .prr_dcr_we(prr_dcr_we), .prr_dcr_wdata(prr_dcr_wdata), .prr_dcr_q(prr_dcr_q),
    .iom_dcr_we(iom_dcr_we), .iom_dcr_wdata(iom_dcr_wdata), .iom_dcr_q(iom_dcr_q),
    .mb_cons_write('0), .mb_cons_data('0), .mb_cons_full(mb_cons_full),
    .mb_prod_read('0), .mb_prod_data(mb_prod_data), .mb_prod_exists(mb_prod_exists),
    .prm_clk(prm_clk), .prm_rst(prm_rst), .prm_start(prm_start), .prm_ce(prm_ce),
    .prm_input_data(prm_input_data), .prm_rfd('0), .prm_done('0), .prm_dv('0),
    .prm_output_data('0),
    .prm_sc_tx_write(sc_tx_write), .prm_sc_tx_data(sc_tx_data), .prm_sc_tx_full(sc_tx_full),
    .prm_sc_rx_read(sc_rx_read), .prm_sc_rx_data(sc_rx_data), .prm_sc_rx_exists(sc_rx_exists),
    .iom_pin_in_valid(pin_in_valid), .iom_pin_in_data(pin_in_data), .iom_pin_in_overflow(pin_in_ovf),
    .iom_pin_out_valid(pin_out_valid), .iom_pin_out_data(pin_out_data),
    .prr_clk_on(clk_on), .prr_df_state(df_state),
    .prr_mi_overflow(prr_mi_ovf), .iom_mi_overflow(iom_mi_ovf)
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  // PRR0: echo on module channel 1. PRR1: drain module channel 0 (stream B).
  logic [DW-1:0] sent_a [$], sent_b [$];
  int n_a = 0, n_b = 0, n_stray = 0;
  always_comb begin
    sc_rx_read  = '0;
    sc_tx_write = '0;
    sc_tx_data  = '0;
    sc_rx_read[0][1]  = sc_rx_exists[0][1] && !sc_tx_full[0][1];
    sc_tx_write[0][1] = sc_rx_exists[0][1] && !sc_tx_full[0][1];
    sc_tx_data[0][1]  = sc_rx_data[0][1] ^ ECHO_MASK;
    sc_rx_read[1][0]  = sc_rx_exists[1][0];
  end
  always @(posedge prm_clk[1]) if (rst_n && !prm_rst[1] && sc_rx_read[1][0]) begin
    if (sent_b.size() == 0) check(0, "stream B word never sent");
    else check(sc_rx_data[1][0] == sent_b.pop_front(), "stream B word");
    n_b++;
  end
  always @(posedge clk_sys) begin
    if (rst_n && (sc_rx_exists[0][0] || sc_rx_exists[1][1])) n_stray++;
    if (rst_n && pin_out_valid[1]) begin
      if (sent_a.size() == 0) check(0, "stream A word never sent");
      else check(pin_out_data[1] == (sent_a.pop_front() ^ ECHO_MASK), "stream A word");
      n_a++;
    end
  end

  function automatic logic [31:0] route(input int out0, input int out1, input int out2,
                                        input int out3, input int out4, input int out5);
    int o [6];
    logic [31:0] v;
    o = '{out0, out1, out2, out3, out4, out5};
    v = 32'b101;                         // clock on, module interface on
    for (int k = 0; k < 6; k++) v[DCR_SW_LSB + k * SEL_W +: SEL_W] = SEL_W'(o[k]);
    return v;
  endfunction

  task automatic prr_dcr(input int i, input logic [31:0] v);
    @(negedge clk_sys);
    prr_dcr_we[i] = 1; prr_dcr_wdata[i] = v;
    @(negedge clk_sys);
    prr_dcr_we[i] = 0;
    check(prr_dcr_q[i] == v, $sformatf("PRR%0d DCR read-back", i));
  endtask

  task automatic iom_dcr(input int j, input logic [31:0] v);
    @(negedge clk_sys);
    iom_dcr_we[j] = 1; iom_dcr_wdata[j] = v;
    @(negedge clk_sys);
    iom_dcr_we[j] = 0;
    check(iom_dcr_q[j] == v, $sformatf("IOM%0d DCR read-back", j));
  endtask

  initial begin
    pin_in_valid = '0; pin_in_data = '0;
    repeat (4) @(posedge clk_sys);
    rst_n = 1;
    repeat (4) @(posedge clk_sys);
    //             east0 east1 west0 west1 mod0 mod1
    iom_dcr(0, route(5,    0,    0,    0,    0,   0));   // IOM0 -> east 0
    prr_dcr(0, route(0,    6,    0,    0,    0,   1));   // west 0 -> module ch 1; module ch 1 -> east 1
    prr_dcr(1, route(0,    2,    3,    0,    3,   0));   // east 1 passes; east in 0 -> module ch 0 and west 0
    iom_dcr(1, route(0,    0,    5,    0,    2,   0));   // IOM1 -> west 0; west in 1 -> IOM1
    repeat (10) @(posedge clk_sys);
    check(clk_on == '1, "both PRR clocks on");
    for (int k = 0; k < 200; k++) begin
      @(negedge clk_sys);
      pin_in_valid[0] = ($urandom_range(2) != 0);
      pin_in_data[0]  = $urandom;
      pin_in_valid[1] = ($urandom_range(1) == 0);
      pin_in_data[1]  = $urandom;
      if (pin_in_valid[0]) sent_a.push_back(pin_in_data[0]);
      if (pin_in_valid[1]) sent_b.push_back(pin_in_data[1]);
    end
    @(negedge clk_sys);
    pin_in_valid = '0;
    repeat (60) @(posedge clk_sys);
    check(sent_a.size() == 0 && n_a > 50, $sformatf("stream A delivered %0d words, %0d missing", n_a, sent_a.size()));
    check(sent_b.size() == 0 && n_b > 50, $sformatf("stream B delivered %0d words, %0d missing", n_b, sent_b.size()));
    check(n_stray == 0, "unrouted module channels stay empty");
    check(prr_mi_ovf == '0 && iom_mi_ovf == '0 && pin_in_ovf == '0, "no overflow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200us;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
