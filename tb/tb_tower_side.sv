// tb_tower_side: end-to-end test of one tower side at its default size
// (8 layers of 25 front-end chips, two controllers per layer).
//
// The testbench plays the tower controller: it sends serial commands down
// both command lines, raises discriminator outputs, issues triggers, read
// events and tokens, and decodes the packets arriving at the bottom of both
// daisy chains. Expected hit lists are computed here from the discriminator
// patterns, the channel masks it loaded and the split of the chips between
// the two controllers (chips 0..12 read out to the left, 13..24 to the
// right). It checks configuration read-back, packet contents, check-sums,
// the empty-packet and clear-event paths, hit overflow, the fast-OR gate,
// the latency timeout, the TOT measurement, the calibration strobe, buffer
// stalls and the double buffering, and counts how often each happened.
module tb_tower_side;
  import glast_pkg::*;

  localparam int NL  = 8;
  localparam int NCH = 25;
  localparam int NLEFT = 13;           // chips read by the left controller

  logic clk = 1'b0, rst_n = 1'b0;
  always #25 clk = !clk;               // 20 MHz

  logic [NL-1:0][NCH-1:0][NCHAN-1:0] disc;
  logic cmd_l, trigger_l, token_in_l, data_out_l, token_top_l;
  logic cmd_r, trigger_r, token_in_r, data_out_r, token_top_r;
  logic [NL-1:0] fast_or_l, fast_or_r;
  logic [NL-1:0][NCH-1:0][NCHAN-1:0] cal_mask;
  logic [NL-1:0][NCH-1:0][6:0] cal_dac, thr_dac;
  logic [NL-1:0][NCH-1:0] cal_strobe;
  logic [NL-1:0][1:0] read_stall, seq_busy;

  tower_side dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // mechanism counters
  int n_fastor_fwd = 0, n_fastor_blocked = 0, n_timeout = 0, n_read_flag = 0,
      n_clear_path = 0, n_passthru = 0, n_overflow = 0, n_stall = 0,
      n_queued_read = 0, n_cksum_on = 0, n_cksum_off = 0, n_fe_readback = 0,
      n_cfg_readback = 0, n_clear_cmd = 0, n_cal = 0, n_fe_cmd = 0,
      n_tot = 0, n_chmask = 0, n_clock_on = 0, n_reset = 0;

  // watchdog
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- serial command driver ----------------
  task automatic send_cmd(bit side, logic [4:0] addr, logic [2:0] code,
                          logic [255:0] data, int ndata);
    logic [8:0] hdr;
    hdr = {1'b1, addr, code};                 // sent MSB first
    for (int i = 8; i >= 0; i--) begin
      if (side) cmd_r = hdr[i]; else cmd_l = hdr[i];
      @(negedge clk);
    end
    for (int i = 0; i < ndata; i++) begin
      if (side) cmd_r = data[i]; else cmd_l = data[i];
      @(negedge clk);
    end
    if (side) cmd_r = 1'b0; else cmd_l = 1'b0;
    repeat (4) @(negedge clk);
  endtask

  // all comparator outputs low
  task automatic clear_disc();
    for (int k = 0; k < NL; k++) disc[k] = '0;
  endtask

  // wait until all controllers of both chains are idle
  task automatic wait_idle();
    repeat (3) @(negedge clk);
    while (|seq_busy) @(negedge clk);
    repeat (20) @(negedge clk);
  endtask

  // front-end control register image
  function automatic logic [FE_CTRL_BITS-1:0] fe_reg(bit right, int masked_ch);
    logic [FE_CTRL_BITS-1:0] d = '0;
    for (int n = 0; n < NCHAN; n++) begin
      d[n] = (n % 4 == 0); d[64+n] = 1'b1; d[128+n] = 1'b1;
    end
    d[198:193] = 6'b111100;
    d[205:200] = 6'b111010;
    d[206] = right;
    if (masked_ch >= 0) d[127 - masked_ch] = 1'b0;
    return d;
  endfunction

  // ---------------- packet monitors ----------------
  bit mon_en = 1'b0;
  bit cksum_en [2][NL];
  typedef struct {
    int layer; int nhits; bit err; int tot; int hits[$]; bit ck_ok;
  } pkt_t;
  pkt_t pk [2][$];

  task automatic get_word(bit side, output logic [10:0] w);
    for (int i = 10; i >= 0; i--) begin
      @(negedge clk);
      w[i] = side ? data_out_r : data_out_l;
    end
  endtask

  task automatic monitor(bit side);
    logic [10:0] w, sum;
    pkt_t p;
    forever begin
      @(negedge clk);
      if (mon_en && (side ? data_out_r : data_out_l)) begin
        p.layer = 0; p.nhits = 0; p.err = 0; p.tot = 0; p.hits.delete(); p.ck_ok = 1;
        get_word(side, w); sum = w;
        p.layer = int'(w[10:6]); p.nhits = int'(w[5:0]);
        if (p.nhits > 0) begin
          get_word(side, w); sum += w;
          p.err = w[10]; p.tot = int'(w[9:0]);
          for (int h = 0; h < p.nhits; h++) begin
            get_word(side, w); sum += w; p.hits.push_back(int'(w));
          end
          if (cksum_en[side][p.layer]) begin
            get_word(side, w); p.ck_ok = (w == sum);
          end
        end
        pk[side].push_back(p);
      end
    end
  endtask

  initial monitor(1'b0);
  initial monitor(1'b1);

  // read-back capture: wait for a start bit, then n bits
  task automatic capture(bit side, int n, output logic [FE_CTRL_BITS-1:0] v);
    int guard = 0;
    v = '0;
    do begin @(negedge clk); guard++; end
    while (!(side ? data_out_r : data_out_l) && guard < 2000);
    for (int i = 0; i < n; i++) begin
      @(negedge clk); v[i] = side ? data_out_r : data_out_l;
    end
  endtask

  // ---------------- expected data ----------------
  logic [NL-1:0][NCH-1:0][NCHAN-1:0] chmask;   // 1 = enabled
  logic [NL-1:0][NCH-1:0][NCHAN-1:0] latched;  // pattern at the trigger

  function automatic void expect_hits(int layer, bit side, output int q[$],
                                      output bit err);
    int n = 0;
    q = {}; err = 0;
    if (!side) begin
      for (int c = 0; c < NLEFT; c++)
        for (int ch = 0; ch < NCHAN; ch++)
          if (latched[layer][c][ch] && chmask[layer][c][ch]) begin
            if (n < MAX_HITS) q.push_back((c << 6) | ch); else err = 1;
            n++;
          end
    end else begin
      for (int c = NCH-1; c >= NLEFT; c--)
        for (int ch = NCHAN-1; ch >= 0; ch--)
          if (latched[layer][c][ch] && chmask[layer][c][ch]) begin
            if (n < MAX_HITS) q.push_back(((NCH-1-c) << 6) | (NCHAN-1-ch));
            else err = 1;
            n++;
          end
    end
  endfunction

  // trigger both chains for one clock, remember what the chips latch
  task automatic trigger();
    trigger_l = 1'b1; trigger_r = 1'b1;
    latched = disc;
    @(negedge clk);
    trigger_l = 1'b0; trigger_r = 1'b0;
  endtask

  task automatic token(bit side);
    if (side) token_in_r = 1'b1; else token_in_l = 1'b1;
    @(negedge clk);
    token_in_l = 1'b0; token_in_r = 1'b0;
  endtask

  // Receive one event from both chains and compare.
  // empty_mask[k] = 1 when layer k is expected to send an empty packet
  // although it may have hits (clear path).
  task automatic read_and_check(logic [NL-1:0] empty_l, int tot_lo, int tot_hi,
                                logic [NL-1:0] tot_layers);
    int q[$]; bit err; int guard;
    pk[0] = {}; pk[1] = {};
    fork token(1'b0); token(1'b1); join
    guard = 0;
    fork
      begin while (!token_top_l && guard < 20000) begin @(negedge clk); guard++; end end
      begin while (!token_top_r && guard < 20000) @(negedge clk); end
    join
    repeat (30) @(negedge clk);
    for (int s = 0; s < 2; s++) begin
      check(pk[s].size() == NL, $sformatf("side %0d: %0d packets", s, pk[s].size()));
      for (int k = 0; k < NL && k < pk[s].size(); k++) begin
        pkt_t p = pk[s][k];
        check(p.layer == k, $sformatf("side %0d packet %0d layer %0d", s, k, p.layer));
        if (s == 0 && empty_l[k]) begin q = {}; err = 0; end
        else expect_hits(k, s[0], q, err);
        check(p.nhits == q.size(), $sformatf("side %0d layer %0d nhits %0d exp %0d",
                                             s, k, p.nhits, q.size()));
        if (p.nhits == q.size()) begin
          for (int h = 0; h < q.size(); h++)
            check(p.hits[h] == q[h], $sformatf("side %0d layer %0d hit %0d %h exp %h",
                                               s, k, h, p.hits[h], q[h]));
        end
        if (p.nhits > 0) begin
          check(p.err == err, $sformatf("side %0d layer %0d error flag", s, k));
          if (err) n_overflow++;
          check(p.ck_ok, $sformatf("side %0d layer %0d check-sum", s, k));
          if (cksum_en[s][k]) n_cksum_on++; else n_cksum_off++;
          if (tot_layers[k]) begin
            check(p.tot >= tot_lo && p.tot <= tot_hi,
                  $sformatf("side %0d layer %0d TOT %0d not in %0d..%0d",
                            s, k, p.tot, tot_lo, tot_hi));
            n_tot++;
          end
        end
        if (k > 0) n_passthru++;
      end
    end
  endtask

  // count stalls
  always @(negedge clk) if (rst_n && |read_stall) n_stall++;

  // fast-OR edges at the tower
  logic [NL-1:0] fo_q = '0;
  always @(negedge clk) begin
    for (int k = 0; k < NL; k++) if (fast_or_l[k] && !fo_q[k]) n_fastor_fwd++;
    fo_q <= fast_or_l;
  end

  logic [FE_CTRL_BITS-1:0] rb;
  int cal_len;

  initial begin
    cmd_l = 0; cmd_r = 0; trigger_l = 0; trigger_r = 0;
    token_in_l = 0; token_in_r = 0; clear_disc();
    for (int s = 0; s < 2; s++) for (int k = 0; k < NL; k++) cksum_en[s][k] = 1;
    for (int k = 0; k < NL; k++) for (int c = 0; c < NCH; c++) chmask[k][c] = '1;
    repeat (5) @(negedge clk);
    rst_n = 1'b1;
    repeat (5) @(negedge clk);

    // ---- controller control register: own address returns old contents
    fork
      send_cmd(1'b0, 5'd0, CC_LOAD_CTRL, 256'(8'b1010_1101), 8);   // 13 chips
      capture(1'b0, 8, rb);
    join
    check(rb[7:0] == 8'b1010_0101, $sformatf("controller read-back %b", rb[7:0]));
    n_cfg_readback++;
    // all left controllers: 13 chips; all right controllers: 12 chips
    send_cmd(1'b0, WILDCARD, CC_LOAD_CTRL, 256'(8'b1010_1101), 8);
    send_cmd(1'b1, WILDCARD, CC_LOAD_CTRL, 256'(8'b1010_1100), 8);
    fork
      send_cmd(1'b1, 5'd3, CC_LOAD_CTRL, 256'(8'b1010_1100), 8);
      capture(1'b1, 8, rb);
    join
    check(rb[7:0] == 8'b1010_1100, $sformatf("controller read-back 2 %b", rb[7:0]));
    n_cfg_readback++;

    // ---- front-end control registers: chips 13..24 read out to the right
    for (int k = 0; k < NL; k++)
      for (int c = NLEFT; c < NCH; c++) begin
        logic [255:0] d;
        d = '0;
        d[2:0] = 3'b001; d[7:3] = 5'(c);           // code 001, then address, LSB first
        d[8 +: FE_CTRL_BITS] = fe_reg(1'b1, -1);
        if (k == 0 && c == NLEFT) begin
          fork
            send_cmd(1'b1, 5'(k), CC_LOAD_FE, d, LOAD_FE_DATA_BITS);
            capture(1'b1, FE_CTRL_BITS, rb);
          join
          check(rb == fe_reg(1'b0, -1), $sformatf("front-end read-back of power-up defaults %h", rb));
          n_fe_readback++;
        end else
          send_cmd(1'b1, 5'(k), CC_LOAD_FE, d, LOAD_FE_DATA_BITS);
      end
    // layer 0 chip 2 channel 5 and layer 5 chip 20 channel 7 masked off
    begin
      logic [255:0] d;
      d = '0; d[2:0] = 3'b001; d[7:3] = 5'd2; d[8 +: FE_CTRL_BITS] = fe_reg(1'b0, 5);
      send_cmd(1'b0, 5'd0, CC_LOAD_FE, d, LOAD_FE_DATA_BITS);
      chmask[0][2][5] = 1'b0;
      d = '0; d[2:0] = 3'b001; d[7:3] = 5'd20; d[8 +: FE_CTRL_BITS] = fe_reg(1'b1, 7);
      send_cmd(1'b1, 5'd5, CC_LOAD_FE, d, LOAD_FE_DATA_BITS);
      chmask[5][20][7] = 1'b0;
    end
    // read back the register just written (its new contents come out)
    begin
      logic [255:0] d;
      d = '0; d[2:0] = 3'b001; d[7:3] = 5'd20; d[8 +: FE_CTRL_BITS] = fe_reg(1'b1, 7);
      repeat (30) @(negedge clk);            // earlier read-back has drained
      fork
        send_cmd(1'b1, 5'd5, CC_LOAD_FE, d, LOAD_FE_DATA_BITS);
        capture(1'b1, FE_CTRL_BITS, rb);
      join
      check(rb == fe_reg(1'b1, 7), $sformatf("front-end read-back of loaded contents %h exp %h", rb, fe_reg(1'b1, 7)));
      n_fe_readback++;
    end
    // reset the FIFO pointers of all chips through "send command"
    send_cmd(1'b0, WILDCARD, CC_SEND_FE_CMD, 256'({5'h1F, 3'b110}), 8);
    send_cmd(1'b1, WILDCARD, CC_SEND_FE_CMD, 256'({5'h1F, 3'b110}), 8);
    n_fe_cmd += 2;
    wait_idle();
    mon_en = 1'b1;

    // ---- event 1: hits in several layers, fast-OR and TOT
    disc[0][0][3] = 1; disc[0][2][5] = 1; disc[0][2][6] = 1; disc[0][12][63] = 1;
    disc[0][13][0] = 1; disc[0][24][10] = 1; disc[0][24][11] = 1;
    disc[2][7] = 64'h8000_0000_0000_0001;
    disc[5][20][7] = 1; disc[5][20][8] = 1;
    disc[7][18] = 64'h0000_00F0_0000_0000;
    repeat (8) @(negedge clk);
    trigger();
    repeat (32) @(negedge clk);                 // fast-OR 40 clocks long
    clear_disc();
    repeat (10) @(negedge clk);
    send_cmd(1'b0, WILDCARD, CC_READ_EVENT, '0, 0);
    send_cmd(1'b1, WILDCARD, CC_READ_EVENT, '0, 0);
    n_read_flag++;
    read_and_check('0, 8, 12, 8'b1010_0101);
    n_chmask++;

    // ---- event 2: no hits anywhere, read anyway (read_always = 1)
    trigger();
    repeat (5) @(negedge clk);
    send_cmd(1'b0, WILDCARD, CC_READ_EVENT, '0, 0);
    send_cmd(1'b1, WILDCARD, CC_READ_EVENT, '0, 0);
    read_and_check('0, 0, 0, '0);

    // ---- event 3: layer 1 left without check-sum, layer 2 left with
    // read_always = 0 and no fast-OR there -> clear path, empty packet
    mon_en = 1'b0;
    send_cmd(1'b0, 5'd1, CC_LOAD_CTRL, 256'(8'b1000_1101), 8);
    cksum_en[0][1] = 0;
    send_cmd(1'b0, 5'd2, CC_LOAD_CTRL, 256'(8'b0010_1101), 8);
    wait_idle();
    mon_en = 1'b1;
    disc[1][4][9] = 1; disc[1][4][33] = 1; disc[1][15][2] = 1;
    repeat (6) @(negedge clk);
    trigger();
    repeat (10) @(negedge clk);
    clear_disc();
    repeat (10) @(negedge clk);
    send_cmd(1'b0, WILDCARD, CC_READ_EVENT, '0, 0);
    send_cmd(1'b1, WILDCARD, CC_READ_EVENT, '0, 0);
    read_and_check(8'b0000_0100, 0, 1023, '0);
    n_clear_path++;
    // ---- event 4: overflow (66 hits on layer 3 left); layer 2 left (still
    // read_always = 0) has hits, but its fast-OR rose too early: the latency
    // window ran out n_before the trigger, so the hits are cleared, not read
    disc[2][5][5] = 1;
    repeat (34) @(negedge clk);
    n_timeout++;
    disc[3][0] = '1; disc[3][1][0] = 1; disc[3][1][1] = 1;
    repeat (6) @(negedge clk);
    trigger();
    repeat (10) @(negedge clk);
    clear_disc();
    repeat (10) @(negedge clk);
    send_cmd(1'b0, WILDCARD, CC_READ_EVENT, '0, 0);
    send_cmd(1'b1, WILDCARD, CC_READ_EVENT, '0, 0);
    read_and_check(8'b0000_0100, 0, 1023, '0);
    // restore layer 1 and 2 left
    mon_en = 1'b0;
    send_cmd(1'b0, 5'd1, CC_LOAD_CTRL, 256'(8'b1010_1101), 8);
    send_cmd(1'b0, 5'd2, CC_LOAD_CTRL, 256'(8'b1010_1101), 8);
    cksum_en[0][1] = 1;
    wait_idle();
    mon_en = 1'b1;

    // ---- fast-OR gate: second pulse inside the latency window is blocked
    begin
      int n_before;
      n_before = n_fastor_fwd;
      disc[5][3][1] = 1; repeat (4) @(negedge clk);
      disc[5][3][1] = 0; repeat (6) @(negedge clk);
      disc[5][3][1] = 1; repeat (4) @(negedge clk);
      disc[5][3][1] = 0;
      repeat (2) @(negedge clk);
      check(n_fastor_fwd == n_before + 1, "second fast-OR in latency window blocked");
      n_fastor_blocked++;
      // after the window has run out (no trigger) a new one passes again
      repeat (40) @(negedge clk);
      disc[5][3][1] = 1; repeat (4) @(negedge clk);
      disc[5][3][1] = 0;
      repeat (2) @(negedge clk);
      check(n_fastor_fwd == n_before + 2, "fast-OR passes after latency time-out");
      repeat (40) @(negedge clk);
    end

    // ---- clear-event command: event dropped in FE and TOT FIFOs
    disc[6][6][6] = 1;
    repeat (4) @(negedge clk);
    trigger();
    clear_disc();
    repeat (10) @(negedge clk);
    send_cmd(1'b0, WILDCARD, CC_CLEAR_EVT, '0, 0);
    send_cmd(1'b1, WILDCARD, CC_CLEAR_EVT, '0, 0);
    n_clear_cmd++;
    wait_idle();

    // ---- three events in flight: double buffering and the read stall
    begin
      logic [NL-1:0][NCH-1:0][NCHAN-1:0] ev [3];
      for (int e = 0; e < 3; e++) begin
        disc[e][e + 1][e + 2] = 1; disc[7][24 - e][e] = 1;
        repeat (4) @(negedge clk);
        trigger(); ev[e] = latched;
        repeat (8) @(negedge clk);
        clear_disc();
        repeat (40) @(negedge clk);
      end
      for (int e = 0; e < 3; e++) begin
        send_cmd(1'b0, WILDCARD, CC_READ_EVENT, '0, 0);
        send_cmd(1'b1, WILDCARD, CC_READ_EVENT, '0, 0);
      end
      n_queued_read++;
      repeat (3000) @(negedge clk);
      for (int e = 0; e < 3; e++) begin
        latched = ev[e];
        read_and_check('0, 0, 1023, '0);
      end
    end
    check(n_stall > 0, "third read event waited for a free buffer");

    // ---- calibration strobe on layer 6 (left) and clock on
    fork
      send_cmd(1'b0, 5'd6, CC_CAL_STROBE, '0, 0);
      begin
        cal_len = 0;
        while (!cal_strobe[6][0]) @(negedge clk);
        while (cal_strobe[6][0]) begin @(negedge clk); cal_len++; end
      end
    join
    check(cal_len == FE_CAL_CLOCKS - FE_FRAME_BITS - 1,
          $sformatf("calibration strobe length %0d", cal_len));
    check(cal_strobe[6][1] == 0 && cal_strobe[5][0] == 0, "strobe only where addressed");
    n_cal++;
    send_cmd(1'b0, 5'd4, CC_CLOCK_ON, '0, 0);
    repeat (5) @(negedge clk);
    check(dut.g_layer[4].u_hyb.clken_l == 1'b1, "front-end clock running");
    n_clock_on++;
    // controller reset: back to default (5 chips) read-back
    send_cmd(1'b0, 5'd4, CC_RESET, '0, 0);
    check(dut.g_layer[4].u_hyb.clken_l == 1'b0, "front-end clock stops on reset");
    mon_en = 1'b0;
    fork
      send_cmd(1'b0, 5'd4, CC_LOAD_CTRL, 256'(8'b1010_1101), 8);
      capture(1'b0, 8, rb);
    join
    check(rb[7:0] == 8'b1010_0101, "controller register back to default after reset");
    n_reset++;

    // ---- every mechanism happened
    check(n_fastor_fwd > 0,   "mechanism: fast-OR forwarded");
    check(n_fastor_blocked > 0, "mechanism: fast-OR blocked");
    check(n_timeout > 0,      "mechanism: latency time-out");
    check(n_read_flag > 0,    "mechanism: read with flag");
    check(n_clear_path > 0,   "mechanism: clear instead of read");
    check(n_passthru > 0,     "mechanism: pass-through");
    check(n_overflow > 0,     "mechanism: hit overflow");
    check(n_stall > 0,        "mechanism: read stall");
    check(n_queued_read > 0,  "mechanism: queued read");
    check(n_cksum_on > 0,     "mechanism: check-sum on");
    check(n_cksum_off > 0,    "mechanism: check-sum off");
    check(n_fe_readback > 0,  "mechanism: front-end read-back");
    check(n_cfg_readback > 0, "mechanism: controller read-back");
    check(n_clear_cmd > 0,    "mechanism: clear-event command");
    check(n_cal > 0,          "mechanism: calibration strobe");
    check(n_fe_cmd > 0,       "mechanism: forwarded front-end command");
    check(n_tot > 0,          "mechanism: TOT measured");
    check(n_chmask > 0,       "mechanism: channel mask");
    check(n_clock_on > 0,     "mechanism: clock on");
    check(n_reset > 0,        "mechanism: controller reset");
    $display("mechanisms: fastor_fwd=%0d blocked=%0d timeout=%0d read=%0d clear_path=%0d passthru=%0d overflow=%0d stall_cycles=%0d queued=%0d ck_on=%0d ck_off=%0d fe_rb=%0d cfg_rb=%0d clear_cmd=%0d cal=%0d fe_cmd=%0d tot=%0d",
             n_fastor_fwd, n_fastor_blocked, n_timeout, n_read_flag, n_clear_path,
             n_passthru, n_overflow, n_stall, n_queued_read, n_cksum_on, n_cksum_off,
             n_fe_readback, n_cfg_readback, n_clear_cmd, n_cal, n_fe_cmd, n_tot);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
