// End-to-end testbench of the data processing region, with every parameter
// of the design at its default (four PRRs, two IOMs, 32-bit channels).
//
// The testbench plays the controlling region: a MicroBlaze model that runs
// the adaptive fault-tolerance (AFT) algorithm over a sequence of SEU
// rates, talking to the hardware only through its ports (GPIO writes to
// the PRSocket DCRs, FSL reads and writes). Partial reconfiguration is
// modelled by holding a PRR in reset through its DCR while the behavioural
// PRM in it is switched to another module type (frame length and
// transform: frame-reversing stand-ins for 1024/512/256/128-point FFTs).
//
// Algorithm, per SEU-rate sample (rates in tenths of an SEU per day):
//   rate <  PS  (0.5)        power saving: all PRR clocks off, software
//   rate <  2.0              low reliability: one copy per module
//   2.0 <= rate <= 8.0       medium reliability: two copies
//   rate >  8.0              high reliability: three copies
//   ABFT modules present     hybrid: ABFT modules get one copy, the others
//                            follow the three bands above
// Each data round sends one frame to every copy, reads the results, votes
// (majority of three, compare of two) and checks the voted words against a
// reference computed here. Injected SEUs must be caught by the voter and
// repaired by refreshing (resetting and reloading) the PRR; every TIME_P
// rounds all PRRs are refreshed. The hardware state is checked too: PRR
// clocks on exactly for the used PRRs, the normalised PRR resource
// utilisation of each mode, a local clock divided by two (PRR2), and a
// SCORES route IOM0 -> PRR0 -> IOM1.
// Every mechanism is counted and each must have happened at least once.
module tb_aft_pr_soc;
  import aft_pkg::*;
  localparam int unsigned NP = 4, NI = 2, DW = 32, NCH = 2, SEL_W = 3;
  localparam int unsigned NMAX = 1024;
  localparam int unsigned TIME_P = 6;

  // clocks: 100 MHz system clock, PRR local clocks of different periods
  logic clk_sys = 0, rst_n = 0;
  logic [NP-1:0] clk_src = '0;
  always #5 clk_sys = ~clk_sys;
  always #4 clk_src[0] = ~clk_src[0];
  always #5 clk_src[1] = ~clk_src[1];
  always #6 clk_src[2] = ~clk_src[2];
  always #3.5 clk_src[3] = ~clk_src[3];

  logic [NP-1:0]          prr_dcr_we;
  logic [NP-1:0][31:0]    prr_dcr_wdata, prr_dcr_q;
  logic [NI-1:0]          iom_dcr_we;
  logic [NI-1:0][31:0]    iom_dcr_wdata, iom_dcr_q;
  logic [NP-1:0]          mb_cons_write, mb_cons_full, mb_prod_read, mb_prod_exists;
  logic [NP-1:0][DW-1:0]  mb_cons_data, mb_prod_data;
  logic [NP-1:0]          prm_clk, prm_rst, prm_start, prm_ce, prm_rfd, prm_done, prm_dv;
  logic [NP-1:0][DW-1:0]  prm_input_data, prm_output_data;
  logic [NP-1:0]          sc_tx_write, sc_tx_full, sc_rx_read, sc_rx_exists;
  logic [NP-1:0][DW-1:0]  sc_tx_data, sc_rx_data;
  logic [NI-1:0]          pin_in_valid, pin_in_ovf, pin_out_valid;
  logic [NI-1:0][DW-1:0]  pin_in_data, pin_out_data;
  logic [NP-1:0]          clk_on;
  logic [NP-1:0][2:0]     df_state;
  logic [NP-1:0]          prr_mi_ovf;
  logic [NI-1:0]          iom_mi_ovf;

  aft_pr_soc dut (
    .clk_sys(clk_sys), .rst_n(rst_n), .clk_src(clk_src),
    .prr_dcr_we(prr_dcr_we), .prr_dcr_wdata(prr_dcr_wdata), .prr_dcr_q(prr_dcr_q),
    .iom_dcr_we(iom_dcr_we), .iom_dcr_wdata(iom_dcr_wdata), .iom_dcr_q(iom_dcr_q),
    .mb_cons_write(mb_cons_write), .mb_cons_data(mb_cons_data), .mb_cons_full(mb_cons_full),
    .mb_prod_read(mb_prod_read), .mb_prod_data(mb_prod_data), .mb_prod_exists(mb_prod_exists),
    .prm_clk(prm_clk), .prm_rst(prm_rst), .prm_start(prm_start), .prm_ce(prm_ce),
    .prm_input_data(prm_input_data), .prm_rfd(prm_rfd), .prm_done(prm_done), .prm_dv(prm_dv),
    .prm_output_data(prm_output_data),
    .prm_sc_tx_write(sc_tx_write), .prm_sc_tx_data(sc_tx_data), .prm_sc_tx_full(sc_tx_full),
    .prm_sc_rx_read(sc_rx_read), .prm_sc_rx_data(sc_rx_data), .prm_sc_rx_exists(sc_rx_exists),
    .iom_pin_in_valid(pin_in_valid), .iom_pin_in_data(pin_in_data), .iom_pin_in_overflow(pin_in_ovf),
    .iom_pin_out_valid(pin_out_valid), .iom_pin_out_data(pin_out_data),
    .prr_clk_on(clk_on), .prr_df_state(df_state), .prr_mi_overflow(prr_mi_ovf), .iom_mi_overflow(iom_mi_ovf)
  );

  // ---------------- module types (stand-ins for the four FFT sizes) ----------------
  int unsigned   FLEN [4] = '{1024, 512, 256, 128};
  function automatic logic [DW-1:0] fkey(int f);
    return 32'h0001_0000 * (f + 1) + 32'(f);
  endfunction

  // per-PRR PRM model state (what partial reconfiguration loaded)
  int unsigned   loaded [NP];      // module type, -1 for none
  logic [DW-1:0] key_q  [NP];
  int unsigned   len_q  [NP];
  logic          seu    [NP];
  logic [4:0]    seu_bit[NP];

  for (genvar i = 0; i < NP; i++) begin : g_prm
    prm_model #(.DW(DW), .N(NMAX)) u_prm (
      .clk(prm_clk[i]), .rst(prm_rst[i]), .key(key_q[i]), .frame_len(len_q[i]),
      .rfd_gap(1'b0), .seu(seu[i]), .seu_bit(seu_bit[i]),
      .start(prm_start[i]), .ce(prm_ce[i]), .input_data(prm_input_data[i]),
      .rfd(prm_rfd[i]), .done(prm_done[i]), .dv(prm_dv[i]), .output_data(prm_output_data[i])
    );
  end

  // PRR0 also holds a streaming echo on its SCORES port (word XOR mask);
  // the other PRRs leave their SCORES ports idle.
  localparam logic [DW-1:0] ECHO_MASK = 32'h5A5A_0000;
  always_comb begin
    sc_rx_read  = '0;
    sc_tx_write = '0;
    sc_tx_data  = '0;
    sc_rx_read[0]  = sc_rx_exists[0] && !sc_tx_full[0];
    sc_tx_write[0] = sc_rx_exists[0] && !sc_tx_full[0];
    sc_tx_data[0]  = sc_rx_data[0] ^ ECHO_MASK;
  end

  // ---------------- bookkeeping ----------------
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  int n_mode [6];                 // 1 low, 2 medium, 3 high, 4 hybrid, 5 power saving
  int n_state [5];                // dataflow-controller state visits, all PRRs
  int n_seu_detect = 0, n_refresh = 0, n_refresh_all = 0, n_gated_off = 0;
  int n_rounds = 0, n_scores_words = 0, n_reconfig = 0, n_voted_fix = 0, n_divided = 0;

  for (genvar i = 0; i < NP; i++) begin : g_mon
    always @(posedge prm_clk[i]) if (!prm_rst[i]) n_state[df_state[i]]++;
  end

  // ---------------- GPIO / DCR access ----------------
  logic [31:0] prr_dcr_sh [NP];   // shadow of what was written
  logic [31:0] iom_dcr_sh [NI];

  task automatic prr_dcr(input int i, input logic [31:0] v);
    @(negedge clk_sys);
    prr_dcr_we[i] = 1; prr_dcr_wdata[i] = v;
    @(negedge clk_sys);
    prr_dcr_we[i] = 0;
    prr_dcr_sh[i] = v;
    check(prr_dcr_q[i] == v, "PRR DCR read-back");
  endtask

  task automatic iom_dcr(input int j, input logic [31:0] v);
    @(negedge clk_sys);
    iom_dcr_we[j] = 1; iom_dcr_wdata[j] = v;
    @(negedge clk_sys);
    iom_dcr_we[j] = 0;
    iom_dcr_sh[j] = v;
  endtask

  function automatic logic [31:0] ctrl(input logic [31:0] old, input bit clk_en, input bit prr_rst, input bit mi);
    logic [31:0] v;
    v = old;
    v[DCR_CLK_EN] = clk_en;
    v[DCR_PRR_RST] = prr_rst;
    v[DCR_MI_EN] = mi;
    return v;
  endfunction

  // load module type f into PRR i (f < 0: leave it empty, clock off)
  task automatic load_prr(input int i, input int f);
    prr_dcr(i, ctrl(prr_dcr_sh[i], 1, 1, prr_dcr_sh[i][DCR_MI_EN]));
    if (f >= 0) begin
      key_q[i] = fkey(f);
      len_q[i] = FLEN[f];
      loaded[i] = f;
    end else loaded[i] = '1;
    repeat (6) @(posedge clk_sys);
    if (f >= 0) prr_dcr(i, ctrl(prr_dcr_sh[i], 1, 0, prr_dcr_sh[i][DCR_MI_EN]));
    else        prr_dcr(i, ctrl(prr_dcr_sh[i], 0, 0, prr_dcr_sh[i][DCR_MI_EN]));
    n_reconfig++;
  endtask

  // ---------------- MicroBlaze FSL access ----------------
  logic [DW-1:0] cons_q [NP][$];
  logic [DW-1:0] prod_q [NP][$];
  int            prod_want [NP];
  int            slow_read = 0;        // percent of cycles the reader pauses

  for (genvar i = 0; i < NP; i++) begin : g_fsl
    always @(negedge clk_sys) begin
      mb_cons_write[i] <= 1'b0;
      mb_prod_read[i]  <= 1'b0;
      if (rst_n) begin
        if (cons_q[i].size() != 0 && !mb_cons_full[i]) begin
          mb_cons_write[i] <= 1'b1;
          mb_cons_data[i]  <= cons_q[i].pop_front();
        end
        if (prod_want[i] > 0 && mb_prod_exists[i] && $urandom_range(99) >= slow_read) begin
          mb_prod_read[i] <= 1'b1;
          prod_q[i].push_back(mb_prod_data[i]);
          prod_want[i]--;
        end
      end
    end
  end

  // ---------------- the AFT algorithm ----------------
  localparam int TH_PS = 5, TH_LM = 20, TH_MH = 80;   // tenths of SEU/day

  function automatic int copies_for(input int rate);
    if (rate < TH_LM) return 1;
    if (rate <= TH_MH) return 2;
    return 3;
  endfunction

  function automatic int call_mode(input int rate, input bit abft);
    if (rate < TH_PS) return 5;
    if (abft) return 4;
    return copies_for(rate);
  endfunction

  // allocation: alloc[i] = module type in PRR i or -1
  int alloc [NP];
  int req_func, abft_func;

  // P_nru of the document's resource-utilisation metric, in hundredths
  function automatic int p_nru_x100(input int p_av, input int p_req, input int p_used);
    int p_free, p_usable;
    p_free = p_av - p_used;
    if (p_free % p_req == 0 && p_free / p_req >= 1) p_usable = p_free;
    else if (p_free % p_req == 1 && p_free / p_req >= 1) p_usable = p_req;
    else p_usable = 0;
    return (100 * (p_usable + p_req)) / p_av;
  endfunction

  task automatic set_mode(input int mode, input int rate, input bit abft);
    int n, k;
    n_mode[mode]++;
    for (int i = 0; i < NP; i++) alloc[i] = -1;
    if (mode == 5) begin
      n = 0;
    end else begin
      n = (mode == 4) ? copies_for(rate) : mode;
      for (k = 0; k < n; k++) alloc[k] = req_func;
      if (abft) alloc[k] = abft_func;
    end
    for (int i = 0; i < NP; i++) load_prr(i, alloc[i]);
    // unused PRRs are clock-gated
    repeat (8) @(posedge clk_sys);
    for (int i = 0; i < NP; i++) begin
      check(clk_on[i] == (alloc[i] >= 0), $sformatf("PRR%0d clock %s", i, alloc[i] >= 0 ? "on" : "off"));
      if (alloc[i] < 0) n_gated_off++;
    end
    if (mode == 5) begin
      int e;
      e = 0;
      fork begin
        @(posedge prm_clk[0] or posedge prm_clk[1] or posedge prm_clk[2] or posedge prm_clk[3]);
        e = 1;
      end join_none
      repeat (20) @(posedge clk_sys);
      disable fork;
      check(e == 0, "power saving: no PRR clock edges");
    end
    if (alloc[2] >= 0) begin
      // PRR2 runs at half its 12 ns source clock: 50 edges in 1200 ns
      int e2;
      e2 = 0;
      fork forever begin @(posedge prm_clk[2]); e2++; end join_none
      repeat (120) @(posedge clk_sys);
      disable fork;
      check(e2 >= 49 && e2 <= 51, $sformatf("PRR2 local clock divided by 2 (%0d edges)", e2));
      n_divided++;
    end
    if (mode >= 1 && mode <= 3) begin
      int used;
      used = 0;
      for (int i = 0; i < NP; i++) used += (clk_on[i] && alloc[i] >= 0);
      // the document's values: P_nru = 1, 1, 0.75 for one, two, three copies
      check(p_nru_x100(NP, mode, used) == (mode == 3 ? 75 : 100),
            $sformatf("P_nru of mode %0d with %0d PRRs used", mode, used));
    end
  endtask

  // one data round; returns the PRRs the voter blames
  task automatic data_round(input bit inject, output bit [NP-1:0] err);
    logic [DW-1:0] frame [2][NMAX];
    int fl [2];
    int funcs [2];
    int nf;
    err = '0;
    nf = 0;
    // one input frame per distinct module type in use
    for (int i = 0; i < NP; i++)
      if (alloc[i] >= 0 && !(nf > 0 && funcs[0] == alloc[i]) && !(nf > 1 && funcs[1] == alloc[i])) begin
        funcs[nf] = alloc[i];
        fl[nf] = FLEN[alloc[i]];
        for (int w = 0; w < fl[nf]; w++) frame[nf][w] = $urandom;
        nf++;
      end
    if (nf == 0) begin
      // power saving: the module runs in software; nothing in hardware
      n_rounds++;
      return;
    end
    if (inject) begin
      // upset one copy of the replicated module
      for (int i = 0; i < NP; i++)
        if (alloc[i] == req_func) begin
          int i2;
          i2 = i;
          seu[i2] = 1; seu_bit[i2] = 5'($urandom_range(31));
          repeat (4) @(posedge clk_sys);
          seu[i2] = 0;
          break;
        end
    end
    // Send_Data / Rec_Data: the input frame goes out twice (two frames), so
    // the first frame is pushed through by the second
    for (int i = 0; i < NP; i++) begin
      prod_q[i].delete();
      if (alloc[i] >= 0) begin
        int s;
        s = (alloc[i] == funcs[0]) ? 0 : 1;
        for (int rep = 0; rep < 2; rep++)
          for (int w = 0; w < fl[s]; w++) cons_q[i].push_back(frame[s][w]);
        prod_want[i] += 2 * fl[s];
      end
    end
    begin
      int t;
      t = 0;
      while (t < 40000) begin
        bit busy;
        busy = 0;
        for (int i = 0; i < NP; i++) if (prod_want[i] != 0) busy = 1;
        if (!busy) break;
        @(posedge clk_sys);
        t++;
      end
      check(t < 40000, "all results returned");
    end
    // Voter
    for (int s = 0; s < nf; s++) begin
      int idx [3];
      int r;
      r = 0;
      for (int i = 0; i < NP; i++) if (alloc[i] == funcs[s] && r < 3) begin idx[r] = i; r++; end
      for (int w = 0; w < 2 * fl[s]; w++) begin
        logic [DW-1:0] ref_w, v;
        ref_w = frame[s][fl[s] - 1 - (w % fl[s])] + fkey(funcs[s]);
        if (r == 1) begin
          v = prod_q[idx[0]][w];
        end else if (r == 2) begin
          v = prod_q[idx[0]][w];
          if (prod_q[idx[0]][w] != prod_q[idx[1]][w]) begin
            err[idx[0]] = 1; err[idx[1]] = 1;
          end
        end else begin
          logic [DW-1:0] a, b, c;
          a = prod_q[idx[0]][w]; b = prod_q[idx[1]][w]; c = prod_q[idx[2]][w];
          v = (a == b || a == c) ? a : b;
          if (a != v) err[idx[0]] = 1;
          if (b != v) err[idx[1]] = 1;
          if (c != v) err[idx[2]] = 1;
        end
        if (err == '0 || r == 3) check(v === ref_w, $sformatf("voted word %0d of module %0d", w, funcs[s]));
      end
      if (r == 3 && err != '0) n_voted_fix++;
    end
    n_rounds++;
  endtask

  task automatic refresh(input bit [NP-1:0] which);
    for (int i = 0; i < NP; i++) if (which[i]) begin
      load_prr(i, int'(loaded[i]));
      n_refresh++;
    end
  endtask

  // ---------------- stimulus ----------------
  // SEU-rate samples (tenths of SEU/day) and rounds with an injected upset
  int rates [] = '{10, 30, 90, 3, 55, 120, 15, 85, 2, 40, 100, 25};
  int inject_at [] = '{2, 5, 9, 14};

  initial begin
    bit [NP-1:0] err;
    int round, cur_mode, t_p;
    bit abft;
    prr_dcr_we = '0; prr_dcr_wdata = '0; iom_dcr_we = '0; iom_dcr_wdata = '0;
    mb_cons_write = '0; mb_cons_data = '0; mb_prod_read = '0;
    pin_in_valid = '0; pin_in_data = '0;
    for (int i = 0; i < NP; i++) begin
      loaded[i] = '1; key_q[i] = 0; len_q[i] = 128; seu[i] = 0; seu_bit[i] = 0;
      prr_dcr_sh[i] = 0; prod_want[i] = 0;
    end
    for (int m = 0; m < 6; m++) n_mode[m] = 0;
    for (int s = 0; s < 5; s++) n_state[s] = 0;
    repeat (5) @(posedge clk_sys);
    rst_n = 1;
    repeat (5) @(posedge clk_sys);

    // ---- SCORES route: IOM0 pins -> SW0 -> SW1 -> PRR0 echo -> SW1 -> ... -> SW5 -> IOM1 pins
    // select codes: 1,2 west inputs; 3,4 east inputs; 5 module
    // output order: east_out[0], east_out[1], west_out[0], west_out[1], to_mod
    iom_dcr(0, (32'(5) << (DCR_SW_LSB + 0 * SEL_W)) | 32'b101);          // east_out[0] <- module
    prr_dcr(0, (32'(1) << (DCR_SW_LSB + 4 * SEL_W)) |                      // to_mod <- west_in[0]
               (32'(5) << (DCR_SW_LSB + 1 * SEL_W)) | 32'b101);            // east_out[1] <- module
    for (int i = 1; i < NP; i++) prr_dcr(i, 32'(2) << (DCR_SW_LSB + 1 * SEL_W)); // east_out[1] <- west_in[1]
    prr_dcr(2, prr_dcr_sh[2] | (32'(1) << DCR_DIV_LSB));   // PRR2 local clock = source / 2
    iom_dcr(1, (32'(2) << (DCR_SW_LSB + 4 * SEL_W)) | 32'b101);          // to_mod <- west_in[1]
    begin
      logic [DW-1:0] sent [$];
      fork
        for (int k = 0; k < 64; k++) begin
          @(negedge clk_sys);
          pin_in_valid[0] = ($urandom_range(1) == 1);
          pin_in_data[0]  = $urandom;
          if (pin_in_valid[0]) sent.push_back(pin_in_data[0]);
        end
        begin
          repeat (64) @(negedge clk_sys);
          @(negedge clk_sys);
          pin_in_valid[0] = 0;
        end
        begin
          repeat (200) begin
            @(posedge clk_sys);
            if (pin_out_valid[1]) begin
              if (sent.size() == 0) check(0, "IOM1 word never sent");
              else begin logic [DW-1:0] ew; ew = sent.pop_front() ^ ECHO_MASK; check(pin_out_data[1] == ew, $sformatf("SCORES route word %h want %h", pin_out_data[1], ew)); end
              n_scores_words++;
            end
          end
        end
      join
      @(negedge clk_sys);
      pin_in_valid[0] = 0;
      check(sent.size() == 0 && n_scores_words > 10, $sformatf("SCORES route carried %0d words", n_scores_words));
      check(prr_mi_ovf == '0 && iom_mi_ovf == '0 && pin_in_ovf == '0, "no interface overflow");
    end

    // ---- the AFT loop
    req_func = 0;   // 1024-point type, no ABFT
    abft_func = 3;  // 128-point type with ABFT (used in the hybrid part)
    round = 0;
    t_p = 0;
    for (int r = 0; r < rates.size() * 2; r++) begin
      int rate;
      rate = rates[r % rates.size()];
      abft = (r >= rates.size());          // second pass: ABFT module required too
      if (r == rates.size()) req_func = 1; // and a 512-point type
      slow_read = (r % 3 == 1) ? 60 : 0;   // a slow reader makes the producer FSL fill
      cur_mode = call_mode(rate, abft);
      set_mode(cur_mode, rate, abft);
      // do { send, receive, vote } while mode unchanged and no period elapsed
      begin
        bit inj;
        inj = 0;
        foreach (inject_at[k]) if (inject_at[k] == round) inj = (cur_mode != 5 && cur_mode != 1);
        data_round(inj, err);
        round++;
        t_p++;
        if (inj) check(err != '0, "voter detects the injected upset");
        if (err != '0) n_seu_detect++;
        if (!inj) check(err == '0, "no error reported without an upset");
      end
      // refresh
      if (t_p >= TIME_P) begin
        refresh(alloc_mask());
        n_refresh_all++;
        t_p = 0;
      end else if (err != '0) begin
        refresh(err);
        // the repaired copies agree again
        data_round(0, err);
        check(err == '0, "refreshed PRR agrees with the others");
      end
    end

    // ---- every mechanism happened
    check(n_mode[1] > 0, "low reliability mode used");
    check(n_mode[2] > 0, "medium reliability mode used");
    check(n_mode[3] > 0, "high reliability mode used");
    check(n_mode[4] > 0, "hybrid reliability mode used");
    check(n_mode[5] > 0, "power saving mode used");
    check(n_state[DF_IDLE] > 0, "dataflow Idle");
    check(n_state[DF_READ_DATA] > 0, "dataflow Read_Data");
    check(n_state[DF_READ_WRITE_DATA] > 0, "dataflow Read_Write_Data");
    check(n_state[DF_STALL] > 0, "dataflow Stall");
    check(n_state[DF_WRITE_DATA] > 0, "dataflow Write_Data");
    check(n_seu_detect > 0, "voter detected upsets");
    check(n_voted_fix > 0, "majority vote masked an upset");
    check(n_refresh > 0, "PRR refresh");
    check(n_refresh_all > 0, "periodic refresh of all PRRs");
    check(n_gated_off > 0, "unused PRR clocks gated off");
    check(n_scores_words > 0, "SCORES route used");
    check(n_divided > 0, "divided local clock used");
    $display("modes: low=%0d med=%0d high=%0d hybrid=%0d ps=%0d", n_mode[1], n_mode[2], n_mode[3], n_mode[4], n_mode[5]);
    $display("states: idle=%0d read=%0d rw=%0d stall=%0d write=%0d", n_state[0], n_state[1], n_state[2], n_state[3], n_state[4]);
    $display("rounds=%0d reconfig=%0d seu_detect=%0d voted_fix=%0d refresh=%0d refresh_all=%0d gated_off=%0d scores_words=%0d",
             n_rounds, n_reconfig, n_seu_detect, n_voted_fix, n_refresh, n_refresh_all, n_gated_off, n_scores_words);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit [NP-1:0] alloc_mask();
    bit [NP-1:0] m;
    for (int i = 0; i < NP; i++) m[i] = (alloc[i] >= 0);
    return m;
  endfunction

  initial begin
    #20ms;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
