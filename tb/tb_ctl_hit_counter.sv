// tb_ctl_hit_counter: random front-end streams (header bit per chip, 64 data
// bits for chips with hits, random idle cycles) are fed to the hit counter;
// the hit addresses written, the hit count, the 63-hit limit with its
// overflow flag and the done pulse are compared with a model.
module tb_ctl_hit_counter;
  import glast_pkg::*;
  logic clk = 0, rst_n = 0, soft_rst = 0, start = 0, bit_valid = 0, bit_in = 0;
  logic [4:0] nchips;
  logic busy, done, hit_we, overflow;
  logic [5:0] hit_idx, nhits;
  logic [WORD_BITS-1:0] hit_word;
  always #5 clk = !clk;
  ctl_hit_counter dut (.*);
  int checks = 0, failures = 0, novf = 0;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (300000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  int got[$]; int ndone;
  always @(posedge clk) begin
    if (hit_we) got.push_back(int'({hit_idx, hit_word}));
    if (done) ndone++;
  end
  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 60; t++) begin
      bit s[$]; int exp[$]; bit eovf; int nc;
      nc = 1 + $urandom % 25; nchips = 5'(nc); eovf = 0; s = {}; exp = {};
      for (int c = 0; c < nc; c++) begin
        logic [63:0] d;
        d = ($urandom % 2 != 0) ? 64'd0 : ({$urandom, $urandom} & {$urandom, $urandom} &
             ((t % 10 == 3) ? 64'hFFFF_FFFF_FFFF_FFFF : {$urandom, $urandom}));
        if (d == 0) s.push_back(0);
        else begin
          s.push_back(1);
          for (int k = 0; k < 64; k++) begin
            s.push_back(d[k]);
            if (d[k]) begin
              if (exp.size() < 63) exp.push_back((exp.size() << 11) | (c << 6) | k);
              else eovf = 1;
            end
          end
        end
      end
      got = {}; ndone = 0;
      start = 1; @(negedge clk); start = 0;
      foreach (s[i]) begin
        repeat ($urandom % 2) @(negedge clk);
        bit_valid = 1; bit_in = s[i]; @(negedge clk); bit_valid = 0;
      end
      // bits after the last chip are ignored
      bit_valid = 1; bit_in = 1; repeat (3) @(negedge clk); bit_valid = 0;
      check(ndone == 1 && !busy, "one done pulse, not busy");
      check(got == exp, $sformatf("event %0d hit list (%0d hits)", t, exp.size()));
      check(int'(nhits) == exp.size() && overflow == eovf, "count and overflow");
      if (eovf) novf++;
    end
    check(novf > 0, "overflow case exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
