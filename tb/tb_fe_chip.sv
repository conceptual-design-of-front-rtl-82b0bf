// tb_fe_chip: one front-end chip driven as a controller would drive it.
// Checks the power-up settings, register loading and read-back through
// either command input, the fast-OR network with the trigger mask, the event
// FIFO with the channel mask, read-event/end-read-event data shifting in both
// directions with the bypass of a chip without hits, clear-event, FIFO reset,
// chip reset, the calibration strobe, and that commands from the side not
// selected are ignored.
module tb_fe_chip;
  import glast_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [4:0] chip_addr = 5'd4;
  logic [NCHAN-1:0] disc = '0;
  logic clk_en_l = 0, cmd_l = 0, trig_l = 0, clk_en_r = 0, cmd_r = 0, trig_r = 0;
  logic fast_or_from_l = 0, fast_or_from_r = 0, fast_or_to_l, fast_or_to_r;
  logic data_in_l = 0, data_in_r = 0, data_out_l, data_out_r, ctrl_out, ctrl_oe;
  logic [NCHAN-1:0] cal_mask;
  logic [6:0] cal_dac, thr_dac;
  logic cal_strobe;
  always #5 clk = !clk;
  fe_chip dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (200000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // one clock pulse on side s with command bit b; returns the data and
  // read-back outputs seen before the edge
  bit rb_q[$], rbv_q[$];
  task automatic pulse(bit s, bit b);
    if (s) begin clk_en_r = 1; cmd_r = b; end else begin clk_en_l = 1; cmd_l = b; end
    #1 rb_q.push_back(ctrl_out); rbv_q.push_back(ctrl_oe);
    @(negedge clk);
    clk_en_l = 0; clk_en_r = 0; cmd_l = 0; cmd_r = 0;
  endtask
  task automatic command(bit s, logic [4:0] a, fe_cmd_e c, int extra);
    pulse(s, 1);
    for (int i = 0; i < 3; i++) pulse(s, c[i]);
    for (int i = 0; i < 5; i++) pulse(s, a[i]);
    for (int i = 0; i < extra; i++) pulse(s, 0);
  endtask
  task automatic load(bit s, logic [4:0] a, logic [FE_CTRL_BITS-1:0] v);
    pulse(s, 1);
    for (int i = 0; i < 3; i++) pulse(s, FE_LOAD_CTRL[i]);
    for (int i = 0; i < 5; i++) pulse(s, a[i]);
    rb_q = {}; rbv_q = {};
    for (int i = 0; i < FE_CTRL_BITS; i++) pulse(s, v[i]);
    rb_q = rb_q[0:FE_CTRL_BITS-1]; rbv_q = rbv_q[0:FE_CTRL_BITS-1];
    pulse(s, 0);
  endtask
  function automatic logic [FE_CTRL_BITS-1:0] img(bit right, int chm, int trm);
    logic [FE_CTRL_BITS-1:0] d = '0;
    for (int n = 0; n < 64; n++) begin d[n] = (n % 4 == 0); d[64+n] = 1; d[128+n] = 1; end
    d[198:193] = 6'b111100; d[205:200] = 6'b111010; d[206] = right;
    if (chm >= 0) d[127 - chm] = 0;
    if (trm >= 0) d[128 + trm] = 0;
    return d;
  endfunction
  task automatic trigger(bit s);
    if (s) trig_r = 1; else trig_l = 1;
    @(negedge clk); trig_l = 0; trig_r = 0;
    @(negedge clk);
  endtask
  // read one event on side s, shifting n bits; returns the stream
  task automatic read_event(bit s, int n, output bit q[$]);
    q = {};
    command(s, WILDCARD, FE_READ_EVENT, 1);
    for (int i = 0; i < n; i++) begin
      #1 q.push_back(s ? data_out_r : data_out_l);
      pulse(s, 0);
    end
    command(s, WILDCARD, FE_END_READ, 1);
  endtask

  bit q[$];
  logic [63:0] pat;
  int cal_len;

  initial begin
    repeat (3) @(negedge clk); rst_n = 1; @(negedge clk);
    check(thr_dac == 7'b0_010111 && cal_dac == 7'b0_001111, "DAC power-up settings");
    check(cal_mask == {16{4'b0001}}, "calibration mask power-up");

    // load through the right input: channel 10 masked, trigger mask ch 20 off
    load(1'b1, 5'd4, img(1'b0, 10, 20));
    begin
      int n1;
      n1 = 0;
      foreach (rbv_q[i]) n1 += int'(rbv_q[i]);
      check(n1 == FE_CTRL_BITS, $sformatf("read-back enabled for own address (%0d)", n1));
    end
    begin
      logic [FE_CTRL_BITS-1:0] got, def;
      def = img(1'b0, -1, -1);
      for (int i = 0; i < FE_CTRL_BITS; i++) got[i] = rb_q[i];
      check(got == def, "read-back of the power-up contents");
    end
    load(1'b0, WILDCARD, img(1'b0, 10, 20));
    check(rbv_q.sum() with (int'(item)) == 0, "no read-back on wild card");

    // fast-OR
    disc = '0; disc[20] = 1; #1;
    check(!fast_or_to_l && !fast_or_to_r, "trigger-masked channel gives no fast-OR");
    disc[3] = 1; #1;
    check(fast_or_to_l && !fast_or_to_r, "fast-OR to the left only");
    disc = '0; fast_or_from_r = 1; #1;
    check(fast_or_to_l, "neighbour fast-OR passed on");
    fast_or_from_r = 0; fast_or_from_l = 1; #1;
    check(!fast_or_to_l && !fast_or_to_r, "fast-OR from the left not passed leftward");
    fast_or_from_l = 0;

    // event 1 with hits (channel 10 masked), event 2 empty
    pat = 64'h8000_0000_0004_0409;   // channels 0,3,10,18,63
    disc = pat; trigger(1'b0); disc = '0;
    trigger(1'b0);
    // read event command from the right (not selected) is ignored
    begin
      bit dummy[$];
      read_event(1'b1, 3, dummy);
    end
    data_in_r = 1;                    // the chip behind sends ones
    read_event(1'b0, 70, q);
    begin
      bit ok; ok = (q[0] == 1);
      for (int c = 0; c < 64; c++) ok &= (q[1 + c] == (pat[c] && c != 10));
      for (int k = 65; k < 70; k++) ok &= (q[k] == 1);
      check(ok, "event with hits: 1, channels 0..63, then the chip behind");
    end
    read_event(1'b0, 4, q);
    check(q[0] == 0 && q[1] == 1 && q[2] == 1 && q[3] == 1,
          "empty event: one 0, then bypass");
    data_in_r = 0;

    // clear event drops the oldest event
    disc = 64'h1; trigger(1'b0); disc = 64'h2; trigger(1'b0); disc = '0;
    command(1'b0, 5'd4, FE_CLEAR_EVT, 3);
    read_event(1'b0, 3, q);
    check(q[0] == 1 && q[1] == 0 && q[2] == 1, "clear-event dropped the first event");
    // reset FIFO empties it
    disc = 64'h1; trigger(1'b0); trigger(1'b0); disc = '0;
    command(1'b0, 5'd4, FE_RESET_FIFO, 3);
    disc = 64'h4; trigger(1'b0); disc = '0;
    read_event(1'b0, 4, q);
    check(q[0] == 1 && q[1] == 0 && q[2] == 0 && q[3] == 1, "reset-FIFO emptied the FIFO");

    // calibration strobe length in clock pulses
    command(1'b0, 5'd4, FE_CAL_STROBE, 1);
    cal_len = 0;
    while (cal_strobe) begin pulse(1'b0, 0); cal_len++; end
    check(cal_len == FE_CAL_CLOCKS - FE_FRAME_BITS - 1,
          $sformatf("calibration strobe for %0d pulses", cal_len));

    // switch to read out to the right (loaded through the left input)
    load(1'b0, 5'd4, img(1'b1, -1, -1));
    disc = '0; disc[5] = 1; #1;
    check(fast_or_to_r && !fast_or_to_l, "fast-OR to the right");
    pat = 64'h0000_0000_0000_0021;   // channels 0 and 5
    disc = pat; trigger(1'b1); disc = '0;
    read_event(1'b1, 65, q);
    begin
      bit ok; ok = (q[0] == 1);
      for (int c = 0; c < 64; c++) ok &= (q[1 + c] == pat[63 - c]);
      check(ok, "right-going register sends channel 63 first");
    end
    // chip reset restores the defaults (reads out to the left again)
    command(1'b1, 5'd4, FE_RESET, 3);
    disc = '0; disc[5] = 1; #1;
    check(fast_or_to_l && !fast_or_to_r, "reset restores the left-right bit");
    disc = '0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
