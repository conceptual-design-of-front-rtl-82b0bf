// tb_fe_event_fifo: random pushes and pops of the 8-deep event FIFO against
// a queue model, including full, empty, the all-zero row when empty and the
// pointer reset.
module tb_fe_event_fifo;
  import glast_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0, wr_en = 0, rd_en = 0, empty, full;
  logic [NCHAN:0] wr_data, rd_data;
  always #5 clk = !clk;
  fe_event_fifo dut (.*);
  int checks = 0, failures = 0, nfull = 0;
  logic [NCHAN:0] q[$];
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (50000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      wr_en = ($urandom % 100) < (t < 1500 ? 60 : 35);
      rd_en = ($urandom % 100) < 45;
      clear = (t == 2000);
      wr_data = {1'($urandom), $urandom, $urandom};
      #1;
      check(empty == (q.size() == 0), "empty flag");
      check(full == (q.size() == FE_FIFO_DEPTH), "full flag");
      check(rd_data == (q.size() != 0 ? q[0] : '0), $sformatf("head row t=%0d size=%0d %h %h", t, q.size(), rd_data, q.size() != 0 ? q[0] : 65'd0));
      if (full) nfull++;
      begin
        bit pre_empty, pre_full;
        pre_empty = (q.size() == 0); pre_full = (q.size() == FE_FIFO_DEPTH);
        @(negedge clk);
        if (clear) q = {};
        else begin
          if (rd_en && !pre_empty) void'(q.pop_front());
          if (wr_en && !pre_full) q.push_back(wr_data);
        end
      end
    end
    check(nfull > 0, "FIFO was full at least once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
