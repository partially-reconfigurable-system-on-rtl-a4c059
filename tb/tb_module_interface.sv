// Self-checking testbench of the module interface. The module side runs on
// a 7 ns clock, the switch side on 10 ns. Checks that words written by the
// module leave towards the switch in order, one valid word per clk_sys
// cycle at most; that words from the switch reach the module in order;
// that nothing passes while mi_en is low; and that a word arriving at a
// full receive FIFO sets the overflow flag.
module tb_module_interface;
  import aft_pkg::*;
  localparam int unsigned DW = 32, DEPTH = 16;

  logic clk_sys = 0, clk_mod = 0, rst = 1;
  always #5 clk_sys = ~clk_sys;
  always #3.5 clk_mod = ~clk_mod;

  logic          mi_en = 0;
  logic          tx_write = 0, tx_full, rx_read = 0, rx_exists, rx_overflow;
  logic [DW-1:0] tx_data = 0, rx_data;
  chan_t         to_sw, from_sw;

  module_interface #(.DW(DW), .DEPTH(DEPTH)) dut (
    .clk_sys(clk_sys), .rst_sys(rst), .mi_en(mi_en), .clk_mod(clk_mod), .rst_mod(rst),
    .tx_write(tx_write), .tx_data(tx_data), .tx_full(tx_full),
    .rx_read(rx_read), .rx_data(rx_data), .rx_exists(rx_exists),
    .to_sw(to_sw), .from_sw(from_sw), .rx_overflow(rx_overflow)
  );

  int checks = 0, failures = 0;
  logic [DW-1:0] txq[$], rxq[$];
  int n_tx = 0, n_rx = 0, n_send_rx = 0;
  bit tx_on = 0, rx_on = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  // module writes (tx) and reads (rx)
  always @(negedge clk_mod) begin
    tx_write <= tx_on && ($urandom_range(1) == 1);
    tx_data  <= $urandom;
    rx_read  <= rx_on && ($urandom_range(2) != 0);
  end
  always @(posedge clk_mod) begin
    if (tx_write && !tx_full) txq.push_back(tx_data);
    if (rx_read && rx_exists) begin
      if (rxq.size() == 0) check(0, "module read a word never sent");
      else begin
        logic [DW-1:0] e;
        e = rxq.pop_front();
        check(rx_data === e, "switch->module word order and value");
      end
      n_rx++;
    end
  end
  // switch side: observe to_sw, drive from_sw
  always @(posedge clk_sys) begin
    if (to_sw.valid) begin
      check(mi_en, "no word leaves while mi_en is low");
      if (txq.size() == 0) check(0, "switch got a word never written");
      else begin
        logic [DW-1:0] e;
        e = txq.pop_front();
        check(to_sw.data === e, "module->switch word order and value");
      end
      n_tx++;
    end
  end
  always @(negedge clk_sys) begin
    from_sw.valid <= 1'b0;
    from_sw.data  <= $urandom;
    if (n_send_rx > 0 && $urandom_range(3) == 0) begin
      from_sw.valid <= 1'b1;
    end
  end
  always @(posedge clk_sys) begin
    if (from_sw.valid) begin
      n_send_rx--;
      if (mi_en) rxq.push_back(from_sw.data);
    end
  end

  initial begin
    from_sw = '0;
    repeat (3) @(posedge clk_sys);
    rst = 0;
    // interface disabled: module writes stay in the FIFO
    tx_on = 1;
    repeat (30) @(posedge clk_sys);
    check(n_tx == 0, "nothing leaves while disabled");
    mi_en = 1;
    rx_on = 1;
    n_send_rx = 300;
    repeat (1500) @(posedge clk_sys);
    tx_on = 0;
    repeat (100) @(posedge clk_sys);
    check(txq.size() == 0 && n_tx > 200, $sformatf("all module words reached the switch (%0d)", n_tx));
    check(rxq.size() == 0 && n_rx > 200, $sformatf("all switch words reached the module (%0d)", n_rx));
    check(!rx_overflow, "no overflow while the module reads");
    // overflow: module stops reading, switch keeps sending
    rx_on = 0;
    n_send_rx = DEPTH + 8;
    repeat (400) @(posedge clk_sys);
    check(rx_overflow, "overflow flagged when the receive FIFO is full");
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
