// tb_fe_out_shift: three output registers chained as on a hybrid, for each
// shift direction. Random events (some chips without hits) are loaded and
// shifted out; the serial stream must be, chip by chip from the exit end,
// a 1 and the 64 channel bits in exit order for a chip with hits, a single 0
// for a chip without, and zeros after the last chip.
module tb_fe_out_shift;
  import glast_pkg::*;
  logic clk = 0, rst_n = 0, load = 0, shift = 0;
  logic [2:0][NCHAN:0] row;
  logic [2:0] so_a, so_b;
  always #5 clk = !clk;

  for (genvar i = 0; i < 3; i++) begin : g
    fe_out_shift #(.CH0_FIRST(1'b1)) ua (.clk, .rst_n, .soft_rst(1'b0), .load,
      .row(row[i]), .shift, .ser_in(i == 2 ? 1'b0 : so_a[(i+1)%3]), .ser_out(so_a[i]));
    fe_out_shift #(.CH0_FIRST(1'b0)) ub (.clk, .rst_n, .soft_rst(1'b0), .load,
      .row(row[i]), .shift, .ser_in(i == 2 ? 1'b0 : so_b[(i+1)%3]), .ser_out(so_b[i]));
  end

  int checks = 0, failures = 0, nbypass = 0;
  initial begin
    repeat (20000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    bit ea[$], eb[$];
    repeat (3) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 20; t++) begin
      ea = {}; eb = {};
      for (int i = 0; i < 3; i++) begin
        logic [63:0] d;
        d = ($urandom % 3 == 0) ? 64'd0 : {$urandom, $urandom} & {$urandom, $urandom};
        row[i] = {|d, d};
        if (d == 0) begin ea.push_back(0); eb.push_back(0); nbypass++; end
        else begin
          ea.push_back(1); eb.push_back(1);
          for (int c = 0; c < 64; c++) begin ea.push_back(d[c]); eb.push_back(d[63-c]); end
        end
      end
      for (int k = 0; k < 4; k++) begin ea.push_back(0); eb.push_back(0); end
      load = 1; @(negedge clk); load = 0;
      for (int k = 0; k < ea.size(); k++) begin
        checks++;
        if (so_a[0] != ea[k] || so_b[0] != eb[k]) begin
          failures++; $display("FAIL: event %0d bit %0d", t, k);
        end
        shift = 1; @(negedge clk); shift = 0;
      end
    end
    checks++; if (nbypass == 0) begin failures++; $display("FAIL: no bypass"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
