// tb_ctl_checksum: random word sequences; the check-sum must equal their sum
// modulo 2048, and clear must restart it.
module tb_ctl_checksum;
  import glast_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0, add = 0;
  logic [WORD_BITS-1:0] word, sum;
  always #5 clk = !clk;
  ctl_checksum dut (.*);
  int checks = 0, failures = 0;
  initial begin
    repeat (50000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 50; t++) begin
      int s, n;
      s = 0;
      clear = 1; @(negedge clk); clear = 0;
      n = 1 + $urandom % 70;
      for (int i = 0; i < n; i++) begin
        add = ($urandom % 4 != 0); word = 11'($urandom);
        if (add) s = (s + int'(word)) % 2048;
        @(negedge clk);
      end
      add = 0;
      checks++;
      if (int'(sum) != s) begin failures++; $display("FAIL: sum %0d exp %0d", sum, s); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
