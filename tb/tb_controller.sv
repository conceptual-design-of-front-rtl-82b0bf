// tb_controller: one controller chip driving a short string of five
// front-end chips (its default chip count), all reading out toward it.
// The testbench raises random discriminator patterns, triggers inside and
// outside the latency window, sends read-event commands and tokens, decodes
// the packet on data_out and compares it with the hits expected from the
// patterns. It also checks the gated fast-OR output, the check-sum on and
// off, hit overflow beyond 63 hits, the TOT value, the token handover and
// the one-clock pass-through of data from the next layer.
module tb_controller;
  import glast_pkg::*;
  localparam int NC = 5;
  logic clk = 0, rst_n = 0;
  always #25 clk = !clk;
  logic [4:0] layer_addr = 5'd9;
  logic cmd_in = 0, trigger_in = 0, token_in = 0, data_in = 0;
  logic fast_or_out, fe_clk_en, fe_cmd, fe_trig, token_out, data_out, read_stall, seq_busy;
  logic [NC-1:0][NCHAN-1:0] disc = '0;
  logic [NC:0] d_left, d_right, fo_left, fo_right;
  logic [NC-1:0] rb_out, rb_oe;
  logic [NC-1:0][NCHAN-1:0] cal_mask;
  logic [NC-1:0][6:0] cal_dac, thr_dac;
  logic [NC-1:0] cal_strobe;
  assign d_left[NC] = 1'b0; assign fo_left[NC] = 1'b0;
  assign d_right[0] = 1'b0; assign fo_right[0] = 1'b0;

  for (genvar i = 0; i < NC; i++) begin : g_chip
    fe_chip u_fe (
      .clk, .rst_n, .chip_addr(5'(i)), .disc(disc[i]),
      .clk_en_l(fe_clk_en), .cmd_l(fe_cmd), .trig_l(fe_trig),
      .clk_en_r(1'b0), .cmd_r(1'b0), .trig_r(1'b0),
      .fast_or_from_l(fo_right[i]), .fast_or_from_r(fo_left[i+1]),
      .fast_or_to_l(fo_left[i]),    .fast_or_to_r(fo_right[i+1]),
      .data_in_l(d_right[i]),       .data_in_r(d_left[i+1]),
      .data_out_l(d_left[i]),       .data_out_r(d_right[i+1]),
      .ctrl_out(rb_out[i]), .ctrl_oe(rb_oe[i]),
      .cal_mask(cal_mask[i]), .cal_dac(cal_dac[i]), .thr_dac(thr_dac[i]),
      .cal_strobe(cal_strobe[i]));
  end
  controller dut (
    .clk, .rst_n, .layer_addr, .cmd_in, .trigger_in, .fast_or_out,
    .fast_or_in(fo_left[0]), .fe_clk_en, .fe_cmd, .fe_trig,
    .fe_data_in(d_left[0]), .fe_ctrl_rd(|(rb_out & rb_oe)),
    .token_in, .token_out, .data_in, .data_out, .read_stall, .seq_busy);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (300000) @(posedge clk); failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic send(logic [4:0] addr, logic [2:0] code, logic [7:0] d, int n);
    logic [8:0] h; h = {1'b1, addr, code};
    for (int i = 8; i >= 0; i--) begin cmd_in = h[i]; @(negedge clk); end
    for (int i = 0; i < n; i++) begin cmd_in = d[i]; @(negedge clk); end
    cmd_in = 0;
  endtask

  // packet receiver
  task automatic get_word(output logic [10:0] w);
    for (int i = 10; i >= 0; i--) begin @(negedge clk); w[i] = data_out; end
  endtask
  int p_nhits, p_tot, p_layer, p_hits[$]; bit p_err, p_ck_ok, cksum = 1, read_always = 1;
  int ntok;
  task automatic receive();
    logic [10:0] w, sum; int guard = 0;
    p_hits = {}; p_err = 0; p_tot = -1; p_ck_ok = 1;
    while (!data_out && guard < 5000) begin @(negedge clk); guard++; end
    get_word(w); sum = w; p_layer = int'(w[10:6]); p_nhits = int'(w[5:0]);
    if (p_nhits > 0) begin
      get_word(w); sum += w; p_err = w[10]; p_tot = int'(w[9:0]);
      for (int h = 0; h < p_nhits; h++) begin get_word(w); sum += w; p_hits.push_back(int'(w)); end
      if (cksum) begin get_word(w); p_ck_ok = (w == sum); end
    end
  endtask
  always @(negedge clk) if (rst_n && token_out) ntok++;

  // one event: disc pattern held for hold cycles, trigger after tdelay cycles
  int n_ovf = 0, n_empty = 0, n_hits_ev = 0;
  task automatic event_run(logic [NC-1:0][NCHAN-1:0] pat, int tdelay, int hold);
    logic [NC-1:0][NCHAN-1:0] lat; int q[$]; bit err, expect_read; int nh;
    bit fo_seen = 0;
    disc = pat;
    for (int t = 0; t < hold || t <= tdelay; t++) begin
      if (t == hold) disc = '0;
      if (t == tdelay) begin lat = disc; trigger_in = 1; end
      @(negedge clk); trigger_in = 0;
      if (fast_or_out) fo_seen = 1;
    end
    disc = '0;
    check(fo_seen == (|pat), "fast-OR output follows the chips");
    // the chips are read inside the latency window, or always if so set
    expect_read = read_always || (tdelay < LATENCY_CYCLES);
    q = {}; err = 0; nh = 0;
    if (expect_read)
      for (int c = 0; c < NC; c++) for (int ch = 0; ch < NCHAN; ch++)
        if (lat[c][ch]) begin
          if (nh < MAX_HITS) q.push_back((c << 6) | ch); else err = 1;
          nh++;
        end
    repeat (20) @(negedge clk);
    send(WILDCARD, CC_READ_EVENT, '0, 0);
    repeat (3) @(negedge clk);
    while (seq_busy) @(negedge clk);
    ntok = 0;
    token_in = 1; @(negedge clk); token_in = 0;
    receive();
    repeat (5) @(negedge clk);
    check(p_layer == 9 && p_nhits == q.size(), $sformatf("nhits %0d exp %0d", p_nhits, q.size()));
    if (p_nhits == q.size()) foreach (q[h]) check(p_hits[h] == q[h], $sformatf("hit %0d %h exp %h", h, p_hits[h], q[h]));
    if (q.size() > 0) begin
      check(p_err == err && p_ck_ok, "error flag and check-sum");
      if (tdelay < LATENCY_CYCLES)
        check(p_tot >= (hold - 2) / TOT_PRESCALE - 1 && p_tot <= hold / TOT_PRESCALE + 1,
              $sformatf("TOT %0d for %0d clocks", p_tot, hold));
    end
    check(ntok == 1, "token passed on once");
    if (err) n_ovf++;
    if (q.size() == 0) n_empty++; else n_hits_ev++;
  endtask

  initial begin
    repeat (3) @(negedge clk); rst_n = 1; repeat (3) @(negedge clk);
    send(WILDCARD, CC_CLOCK_ON, '0, 0);
    repeat (10) @(negedge clk);

    // pass-through while idle: one clock of delay
    begin
      logic [31:0] pat; int bad;
      bad = 0;
      pat = $urandom;
      for (int i = 0; i < 33; i++) begin
        if (i < 32) data_in = pat[i];
        @(negedge clk);
        if (i < 32 && data_out !== pat[i]) bad++;
      end
      data_in = 0;
      check(bad == 0, "data from the next layer passes with one clock of delay");
    end

    for (int e = 0; e < 24; e++) begin
      logic [NC-1:0][NCHAN-1:0] pat; int dens;
      dens = (e % 6 == 5) ? 2 : 40;           // some events overflow
      for (int c = 0; c < NC; c++) for (int ch = 0; ch < NCHAN; ch++)
        pat[c][ch] = ($urandom % dens) == 0;
      if (e % 8 == 3) pat = '0;
      if (e == 12) begin
        cksum = 0; read_always = 0;              // 5 chips, no check-sum
        send(5'd9, CC_LOAD_CTRL, 8'b0000_0101, 8);
        repeat (30) @(negedge clk);
      end
      event_run(pat, (e % 7 == 6) ? 40 : 3 + $urandom % 10, 20 + $urandom % 60);
    end
    check(n_ovf > 0 && n_empty > 0 && n_hits_ev > 0, "overflow, empty and normal events seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
