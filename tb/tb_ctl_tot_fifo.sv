// tb_ctl_tot_fifo: random push/pop/update of the controller TOT FIFO against
// a model, with the update of a slot's TOT after its push.
module tb_ctl_tot_fifo;
  import glast_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0, push = 0, upd = 0, pop = 0, empty, full;
  tot_entry_t push_entry, head;
  logic [2:0] wr_idx, upd_idx;
  logic [TOT_BITS-1:0] upd_tot;
  always #5 clk = !clk;
  ctl_tot_fifo dut (.*);
  int checks = 0, failures = 0, nfull = 0, nupd = 0;
  tot_entry_t m [8]; int rp = 0, wp = 0, cnt = 0;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (50000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      push = ($urandom % 100) < 50; pop = ($urandom % 100) < 45;
      push_entry = tot_entry_t'($urandom);
      upd = (cnt > 0) && ($urandom % 4 == 0);
      upd_idx = 3'((rp + ($urandom % (cnt > 0 ? cnt : 1))) % 8);
      upd_tot = 10'($urandom);
      clear = (t == 3000);
      #1;
      check(empty == (cnt == 0) && full == (cnt == 8), "flags");
      check(wr_idx == 3'(wp), "write index");
      if (cnt > 0) check(head == m[rp], "head entry");
      if (full) nfull++;
      @(negedge clk);
      if (clear) begin rp = 0; wp = 0; cnt = 0; end
      else begin
        bit dp, dq;
        dp = push && cnt < 8; dq = pop && cnt > 0;
        if (upd) begin m[upd_idx].tot = upd_tot; nupd++; end
        if (dp) begin m[wp] = push_entry; wp = (wp + 1) % 8; end
        if (dq) rp = (rp + 1) % 8;
        cnt = cnt + int'(dp) - int'(dq);
      end
    end
    check(nfull > 0 && nupd > 0, "full and update seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
