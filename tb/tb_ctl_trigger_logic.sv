// tb_ctl_trigger_logic: fast-OR pulses and triggers against the rules of the
// controller's trigger logic: a trigger inside the latency window pushes a set
// read flag and, once the fast-OR falls, the TOT (one count per 4 clocks);
// a trigger outside it pushes a clear flag; a latency time-out clears the TOT;
// a second fast-OR inside the window is not passed to the tower.
module tb_ctl_trigger_logic;
  import glast_pkg::*;
  logic clk = 0, rst_n = 0, soft_rst = 0, fast_or_in = 0, trigger_in = 0;
  logic fast_or_out, push, upd, lat_active, tot_counting;
  logic [2:0] fifo_wr_idx = 3'd5, upd_idx;
  tot_entry_t push_entry;
  logic [TOT_BITS-1:0] upd_tot;
  always #25 clk = !clk;
  ctl_trigger_logic dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (50000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // record pushes and updates
  int npush = 0, nupd = 0;
  tot_entry_t last_push; logic [9:0] last_upd; logic [2:0] last_idx;
  always @(posedge clk) begin
    if (push) begin npush++; last_push = push_entry; end
    if (upd)  begin nupd++; last_upd = upd_tot; last_idx = upd_idx; end
  end
  int nfo = 0; logic fo_q = 0;
  always @(negedge clk) begin if (fast_or_out && !fo_q) nfo++; fo_q = fast_or_out; end

  task automatic trig();
    trigger_in = 1; @(negedge clk); trigger_in = 0;
  endtask

  initial begin
    repeat (3) @(negedge clk); rst_n = 1; repeat (2) @(negedge clk);
    // 1) fast-OR 100 clocks, trigger after 10: flag set, TOT = 25 +- 1
    fast_or_in = 1; #1 check(fast_or_out == 1, "fast-OR passes at once");
    repeat (10) @(negedge clk);
    trig();
    check(npush == 1 && last_push.read_flag == 1, "trigger in window: read flag set");
    repeat (89) @(negedge clk);
    fast_or_in = 0;
    repeat (6) @(negedge clk);
    check(nupd == 1 && last_idx == 3'd5 && last_upd >= 24 && last_upd <= 26,
          $sformatf("TOT written after the fast-OR fell: %0d", last_upd));
    // 2) trigger with no fast-OR: flag clear
    repeat (40) @(negedge clk);
    trig();
    check(npush == 2 && last_push.read_flag == 0 && last_push.tot == 0,
          "trigger outside window: flag clear, TOT 0");
    // 3) short fast-OR (20 clocks), trigger after it fell but in the window
    fast_or_in = 1; repeat (20) @(negedge clk); fast_or_in = 0;
    repeat (4) @(negedge clk);
    check(lat_active, "latency window still open");
    trig();
    check(npush == 3 && last_push.read_flag == 1 && last_push.tot >= 4 &&
          last_push.tot <= 6, $sformatf("finished TOT pushed directly: %0d", last_push.tot));
    // 4) second fast-OR inside the window is blocked
    repeat (40) @(negedge clk);
    nfo = 0;
    fast_or_in = 1; repeat (3) @(negedge clk); fast_or_in = 0;
    repeat (5) @(negedge clk);
    fast_or_in = 1; repeat (3) @(negedge clk); fast_or_in = 0;
    repeat (2) @(negedge clk);
    check(nfo == 1, $sformatf("second fast-OR blocked (%0d passed)", nfo));
    // 5) latency time-out with the fast-OR still high: TOT stopped and cleared
    repeat (40) @(negedge clk);
    fast_or_in = 1;
    repeat (LATENCY_CYCLES + 10) @(negedge clk);
    check(!lat_active && !tot_counting && dut.tot == 0, "time-out stops and clears TOT");
    trig();
    check(last_push.read_flag == 0 && last_push.tot == 0, "late trigger: flag clear");
    fast_or_in = 0;
    repeat (10) @(negedge clk);
    // 6) TOT saturates at 1023
    fast_or_in = 1; repeat (5) @(negedge clk); trig();
    repeat (4200) @(negedge clk); fast_or_in = 0; repeat (6) @(negedge clk);
    check(last_upd == 10'h3FF, "TOT saturates at 1023");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
