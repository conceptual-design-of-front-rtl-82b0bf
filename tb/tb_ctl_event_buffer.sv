// tb_ctl_event_buffer: writes random hit lists and headers into an event
// buffer, reads them back by index and checks the ready/release handshake.
module tb_ctl_event_buffer;
  import glast_pkg::*;
  logic clk = 0, rst_n = 0, soft_rst = 0, we = 0, hdr_we = 0, hdr_err = 0, release_buf = 0;
  logic [5:0] widx, hdr_nhits, ridx, nhits;
  logic [WORD_BITS-1:0] wword, rword;
  logic [TOT_BITS-1:0] hdr_tot, tot;
  logic ready, err;
  always #5 clk = !clk;
  ctl_event_buffer dut (.*);
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (50000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic [10:0] m [63];
    repeat (3) @(negedge clk); rst_n = 1; @(negedge clk);
    check(!ready, "empty after reset");
    for (int t = 0; t < 10; t++) begin
      int n; n = $urandom % 64;
      for (int i = 0; i < n; i++) begin
        we = 1; widx = 6'(i); wword = 11'($urandom); m[i] = wword; @(negedge clk);
      end
      we = 0;
      hdr_we = 1; hdr_nhits = 6'(n); hdr_tot = 10'($urandom); hdr_err = 1'($urandom);
      @(negedge clk); hdr_we = 0;
      check(ready && nhits == 6'(n) && tot == hdr_tot && err == hdr_err, "header and ready");
      for (int i = 0; i < n; i++) begin
        ridx = 6'(i); #1 check(rword == m[i], "hit word read back");
      end
      @(negedge clk);
      release_buf = 1; @(negedge clk); release_buf = 0;
      check(!ready, $sformatf("released %0d %0d", ready, n));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
