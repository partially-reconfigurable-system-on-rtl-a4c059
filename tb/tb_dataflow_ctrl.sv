// Self-checking testbench of the dataflow controller. The controller drives
// a behavioural frame-reversing PRM (prm_model); the consumer and producer
// FSLs are modelled by queues with randomly withheld data and randomly full
// space. The results are compared with a reference computed here from the
// words sent. Phases:
//   1. free-running stream: checks one word per cycle in Read_Write_Data;
//   2. random gaps on both FSLs and on rfd: exercises Stall, Write_Data and
//      the return to Idle;
//   3. reset in the middle of a stream, then a clean stream.
// Also counts visits of every state and checks that each occurred.
module tb_dataflow_ctrl;
  import aft_pkg::*;
  localparam int unsigned DW = 32;
  localparam int unsigned N  = 8;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic          c_rdy, c_en, p_rdy, p_en;
  logic [DW-1:0] c_data, p_data, in_d, out_d;
  logic          rfd, done, dv, ce, start;
  df_state_e     st;
  logic          rfd_gap = 0;
  logic [DW-1:0] key = 32'h0000_1000;

  dataflow_ctrl #(.DW(DW)) dut (
    .clk(clk), .rst(rst),
    .p_consumerfsl_rdy(c_rdy), .p_consumerfsl_data(c_data), .p_consumerfsl_en(c_en),
    .p_producerfsl_rdy(p_rdy), .p_producerfsl_en(p_en), .p_producerfsl_data(p_data),
    .rfd(rfd), .done(done), .dv(dv), .output_data(out_d),
    .input_data(in_d), .ce(ce), .start(start), .state(st)
  );

  prm_model #(.DW(DW), .N(N)) prm (
    .clk(clk), .rst(rst), .key(key), .frame_len(N), .rfd_gap(rfd_gap), .seu(1'b0), .seu_bit(5'd0),
    .start(start), .ce(ce), .input_data(in_d),
    .rfd(rfd), .done(done), .dv(dv), .output_data(out_d)
  );

  int checks = 0, failures = 0;
  logic [DW-1:0] cq[$];     // consumer FSL contents
  logic [DW-1:0] exp_q[$];  // expected producer words
  int            got = 0;
  int            c_hold = 0, p_hold = 0;   // percent of cycles withheld
  logic          c_gate = 1, p_gate = 1;
  int            visits [5];
  int            cyc = 0;

  assign c_rdy  = c_gate && (cq.size() != 0);
  assign c_data = (cq.size() != 0) ? cq[0] : '0;
  assign p_rdy  = p_gate;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  // Handshakes are sampled on the rising edge and applied to the queues on
  // the falling edge, so the design never sees a queue change at its edge.
  logic          pop_q = 0, push_q = 0;
  logic [DW-1:0] push_w;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst) visits[int'(st)] <= visits[int'(st)] + 1;
    pop_q  <= !rst && c_en;
    push_q <= !rst && p_en;
    push_w <= p_data;
    c_gate <= ($urandom_range(99) >= c_hold);
    p_gate <= ($urandom_range(99) >= p_hold);
  end

  always @(negedge clk) begin
    if (pop_q && cq.size() != 0) void'(cq.pop_front());
    if (push_q) begin
      if (exp_q.size() == 0) check(0, "unexpected output word");
      else begin
        logic [DW-1:0] e;
        e = exp_q.pop_front();
        check(push_w === e, $sformatf("output word %0d: got %h want %h", got, push_w, e));
      end
      got = got + 1;
    end
  end

  // send F frames; reference: reversed frame plus key
  task automatic send_frames(input int f);
    for (int k = 0; k < f; k++) begin
      logic [DW-1:0] fr [N];
      for (int i = 0; i < N; i++) begin
        fr[i] = $urandom;
        cq.push_back(fr[i]);
      end
      for (int i = 0; i < N; i++) exp_q.push_back(fr[N - 1 - i] + key);
    end
  endtask

  task automatic wait_drained(input int limit);
    int t = 0;
    while ((exp_q.size() != 0 || st != DF_IDLE) && t < limit) begin
      @(posedge clk);
      t++;
    end
    check(exp_q.size() == 0, "all expected words arrived");
  endtask

  initial begin
    int t0, t1, n0;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int s = 0; s < 5; s++) visits[s] = 0;

    // ---- phase 1: continuous stream, all ready ----
    @(negedge clk); #1;
    send_frames(16);
    t0 = cyc; n0 = got;
    wait_drained(2000);
    t1 = cyc;
    // 16 frames of 8 words: 128 words in, 128 out. Loading takes 128
    // cycles, the last frame drains in 8 more, plus a few for Idle and the
    // state changes.
    check((got - n0) == 16 * N, "phase 1 word count");
    check((t1 - t0) <= 16 * N + N + 4, $sformatf("phase 1 took %0d cycles, one word per cycle expected", t1 - t0));

    // ---- phase 2: random gaps ----
    c_hold = 30; p_hold = 40; rfd_gap = 1;
    for (int r = 0; r < 20; r++) begin
      @(negedge clk); #1;
      send_frames(1 + $urandom_range(3));
      repeat ($urandom_range(20)) @(posedge clk);
    end
    wait_drained(20000);
    c_hold = 0; p_hold = 0; rfd_gap = 0;

    // ---- phase 3: reset in mid-stream ----
    @(negedge clk); #1;
    send_frames(4);
    repeat (13) @(posedge clk);
    @(negedge clk);
    rst = 1;
    @(negedge clk); #1;
    cq.delete(); exp_q.delete();
    check(st == DF_IDLE && !ce && !c_en && !p_en, "reset returns to Idle, PRM halted");
    rst = 0;
    @(negedge clk); #1;
    send_frames(3);
    wait_drained(2000);

    // every state of the graph was visited
    check(visits[DF_IDLE] > 0, "Idle visited");
    check(visits[DF_READ_DATA] > 0, "Read_Data visited");
    check(visits[DF_READ_WRITE_DATA] > 0, "Read_Write_Data visited");
    check(visits[DF_STALL] > 0, "Stall visited");
    check(visits[DF_WRITE_DATA] > 0, "Write_Data visited");
    $display("visits: idle=%0d read=%0d rw=%0d stall=%0d write=%0d",
             visits[0], visits[1], visits[2], visits[3], visits[4]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
