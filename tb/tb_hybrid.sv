// tb_hybrid: one hybrid at its default size, 25 front-end chips between two
// controllers. The testbench splits the string (chips 0..8 read to the left,
// 9..24 to the right) by loading the front-end control registers through the
// right-hand controller, sets the controllers' chip counts to match, then
// runs random events and compares both packets with the expected hit lists.
// It also checks the DAC and mask settings seen by the analog part, the
// calibration strobe reaching only the chips that listen to the controller
// which sent it, and the fast-OR
// outputs of both controllers.
module tb_hybrid;
  import glast_pkg::*;
  localparam int NCH = 25, NLEFT = 9;
  logic clk = 0, rst_n = 0;
  always #25 clk = !clk;
  logic [4:0] layer_addr = 5'd2;
  logic [NCH-1:0][NCHAN-1:0] disc = '0;
  logic cmd_l = 0, trigger_l = 0, token_in_l = 0, data_in_l = 0;
  logic cmd_r = 0, trigger_r = 0, token_in_r = 0, data_in_r = 0;
  logic fast_or_out_l, token_out_l, data_out_l, fast_or_out_r, token_out_r, data_out_r;
  logic [NCH-1:0][NCHAN-1:0] cal_mask;
  logic [NCH-1:0][6:0] cal_dac, thr_dac;
  logic [NCH-1:0] cal_strobe;
  logic [1:0] read_stall, seq_busy;
  hybrid #(.NCH(NCH)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (300000) @(posedge clk); failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic send(bit side, logic [4:0] addr, logic [2:0] code, logic [255:0] d, int n);
    logic [8:0] h; h = {1'b1, addr, code};
    for (int i = 8; i >= 0; i--) begin
      if (side) cmd_r = h[i]; else cmd_l = h[i]; @(negedge clk);
    end
    for (int i = 0; i < n; i++) begin
      if (side) cmd_r = d[i]; else cmd_l = d[i]; @(negedge clk);
    end
    cmd_l = 0; cmd_r = 0;
    repeat (4) @(negedge clk);
  endtask
  task automatic wait_idle();
    repeat (3) @(negedge clk);
    while (|seq_busy) @(negedge clk);
    repeat (20) @(negedge clk);
  endtask

  // packet receivers
  int p_nhits [2]; int p_hits [2][$]; bit p_ck_ok [2]; int p_layer [2];
  task automatic receive(bit side);
    logic [10:0] w, sum; int guard;
    guard = 0; p_hits[side] = {}; p_ck_ok[side] = 1;
    while (!(side ? data_out_r : data_out_l) && guard < 20000) begin @(negedge clk); guard++; end
    for (int i = 10; i >= 0; i--) begin @(negedge clk); w[i] = side ? data_out_r : data_out_l; end
    sum = w; p_layer[side] = int'(w[10:6]); p_nhits[side] = int'(w[5:0]);
    if (p_nhits[side] > 0) begin
      for (int k = 0; k < p_nhits[side] + 2; k++) begin
        for (int i = 10; i >= 0; i--) begin @(negedge clk); w[i] = side ? data_out_r : data_out_l; end
        if (k == p_nhits[side] + 1) p_ck_ok[side] = (w == sum);
        else begin sum += w; if (k > 0) p_hits[side].push_back(int'(w)); end
      end
    end
  endtask

  function automatic logic [FE_CTRL_BITS-1:0] fe_reg(bit right, logic [63:0] calm, logic [5:0] cdac, logic [5:0] tdac);
    logic [FE_CTRL_BITS-1:0] d = '0;
    for (int n = 0; n < NCHAN; n++) begin
      d[n] = calm[n]; d[64+n] = 1'b1; d[128+n] = 1'b1;
    end
    d[192] = 1'b1;
    for (int i = 0; i < 6; i++) begin d[198 - i] = cdac[i]; d[205 - i] = tdac[i]; end
    d[199] = 1'b0;
    d[206] = right;
    return d;
  endfunction

  int n_fo_l = 0, n_fo_r = 0, n_cal [NCH];
  always @(negedge clk) if (rst_n) begin
    if (fast_or_out_l) n_fo_l++;
    if (fast_or_out_r) n_fo_r++;
    for (int c = 0; c < NCH; c++) if (cal_strobe[c]) n_cal[c]++;
  end

  initial begin
    for (int c = 0; c < NCH; c++) n_cal[c] = 0;
    repeat (3) @(negedge clk); rst_n = 1; repeat (3) @(negedge clk);
    // chip counts: left 9, right 16; check-sums on, read_always off
    send(1'b0, WILDCARD, CC_LOAD_CTRL, 256'(8'b0010_1001), 8);
    send(1'b1, WILDCARD, CC_LOAD_CTRL, 256'(8'b0011_0000), 8);
    // front-end registers: chip c gets calibration DAC c, threshold DAC 63-c;
    // only chip 4 and chip 20 have their calibration mask set
    for (int c = 0; c < NCH; c++) begin
      logic [255:0] d;
      d = '0; d[2:0] = 3'b001; d[7:3] = 5'(c);
      d[8 +: FE_CTRL_BITS] = fe_reg(c >= NLEFT, (c == 4 || c == 20) ? 64'h1 : 64'h0,
                                    6'(c), 6'(63 - c));
      send(1'b1, 5'd2, CC_LOAD_FE, d, LOAD_FE_DATA_BITS);
    end
    wait_idle();
    begin
      int bad;
      bad = 0;
      for (int c = 0; c < NCH; c++)
        if (cal_dac[c] != {1'b1, 6'(c)} || thr_dac[c] != {1'b0, 6'(63 - c)}) bad++;
      check(bad == 0, "DAC settings reach the analog part");
    end
    send(1'b0, WILDCARD, CC_CAL_STROBE, '0, 0);
    wait_idle();
    begin
      int bad;
      bad = 0;
      for (int c = 0; c < NCH; c++) if ((n_cal[c] > 0) != (c < NLEFT)) bad++;
      check(bad == 0, "calibration strobe only in chips listening to the left");
      check(cal_mask[4] == 64'h1 && cal_mask[20] == 64'h1 && cal_mask[0] == 64'h0,
            "calibration masks reach the analog part");
    end

    for (int e = 0; e < 10; e++) begin
      logic [NCH-1:0][NCHAN-1:0] pat; int q [2][$];
      int fo_l0, fo_r0;
      for (int c = 0; c < NCH; c++) for (int ch = 0; ch < NCHAN; ch++)
        pat[c][ch] = ($urandom % 60) == 0;
      if (e == 3) pat[NCH-1:NLEFT] = '0;               // right side empty
      fo_l0 = n_fo_l; fo_r0 = n_fo_r;
      disc = pat;
      repeat (5) @(negedge clk);
      trigger_l = 1; trigger_r = 1; @(negedge clk); trigger_l = 0; trigger_r = 0;
      repeat (30) @(negedge clk);
      disc = '0;
      check((n_fo_l > fo_l0) == (|pat[NLEFT-1:0]) && (n_fo_r > fo_r0) == (|pat[NCH-1:NLEFT]),
            "fast-OR outputs of both controllers");
      q[0] = {}; q[1] = {};
      for (int c = 0; c < NLEFT; c++) for (int ch = 0; ch < NCHAN; ch++)
        if (pat[c][ch] && q[0].size() < MAX_HITS) q[0].push_back((c << 6) | ch);
      for (int c = NCH - 1; c >= NLEFT; c--) for (int ch = NCHAN - 1; ch >= 0; ch--)
        if (pat[c][ch] && q[1].size() < MAX_HITS) q[1].push_back(((NCH - 1 - c) << 6) | (NCHAN - 1 - ch));
      send(1'b0, WILDCARD, CC_READ_EVENT, '0, 0);
      send(1'b1, WILDCARD, CC_READ_EVENT, '0, 0);
      wait_idle();
      token_in_l = 1; token_in_r = 1; @(negedge clk); token_in_l = 0; token_in_r = 0;
      fork receive(1'b0); receive(1'b1); join
      for (int s = 0; s < 2; s++) begin
        check(p_layer[s] == 2 && p_nhits[s] == q[s].size() && p_ck_ok[s],
              $sformatf("event %0d side %0d: %0d hits, expected %0d", e, s, p_nhits[s], q[s].size()));
        if (p_nhits[s] == q[s].size())
          foreach (q[s][h]) check(p_hits[s][h] == q[s][h],
                                  $sformatf("side %0d hit %0d: %h expected %h", s, h, p_hits[s][h], q[s][h]));
      end
      repeat (10) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
