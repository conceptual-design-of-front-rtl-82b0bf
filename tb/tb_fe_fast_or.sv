// tb_fe_fast_or: random check of the fast-OR network of one front-end chip
// against its definition: own = OR of trigger-masked channels, combined
// with the neighbour's fast-OR and driven in the selected direction only.
module tb_fe_fast_or;
  import glast_pkg::*;
  logic [NCHAN-1:0] disc, trig_mask;
  logic read_right, from_left, from_right, own, to_right, to_left;
  fe_fast_or dut (.*);
  int checks = 0, failures = 0;
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int t = 0; t < 2000; t++) begin
      logic exp_own;
      disc = '0;
      if (t % 3 != 0) disc[$urandom % 64] = 1'b1;
      trig_mask = {$urandom, $urandom};
      if (t % 5 == 0) trig_mask = '1;
      read_right = 1'($urandom); from_left = 1'($urandom); from_right = 1'($urandom);
      #1;
      exp_own = 0;
      for (int n = 0; n < 64; n++) if (disc[n] && trig_mask[n]) exp_own = 1;
      checks++;
      if (own != exp_own ||
          to_right != (read_right ? (exp_own || from_left) : 1'b0) ||
          to_left  != (!read_right ? (exp_own || from_right) : 1'b0)) begin
        failures++; $display("FAIL: vector %0d", t);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
