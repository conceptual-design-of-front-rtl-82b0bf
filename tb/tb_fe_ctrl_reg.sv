// tb_fe_ctrl_reg: checks the power-up defaults of the front-end control
// register, the field mapping (channel mask reversed, DAC settings with the
// highest-numbered bit as LSB), the read-back of the previous contents while
// loading (bit 0 first) and the soft reset.
module tb_fe_ctrl_reg;
  import glast_pkg::*;
  logic clk = 0, rst_n = 0, soft_rst = 0, shift_en = 0, ser_in = 0, ser_out;
  logic [NCHAN-1:0] cal_mask, chan_mask, trig_mask;
  logic cal_range, thr_range, read_right;
  logic [5:0] cal_dac, thr_dac;
  always #5 clk = !clk;
  fe_ctrl_reg dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic [FE_CTRL_BITS-1:0] img, def, got;
  task automatic check_defaults();
    for (int n = 0; n < NCHAN; n++) begin
      check(cal_mask[n] == (n % 4 == 0), $sformatf("cal mask default ch %0d", n));
      check(chan_mask[n] && trig_mask[n], $sformatf("mask defaults ch %0d", n));
    end
    check(cal_range == 0 && cal_dac == 6'b001111, "cal DAC default 001111 low range");
    check(thr_range == 0 && thr_dac == 6'b010111, "threshold DAC default 010111 low range");
    check(read_right == 0, "default readout to the left");
  endtask

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    @(negedge clk);
    check_defaults();
    // defaults as a bit image, built from the written description
    def = '0;
    for (int n = 0; n < 64; n += 4) def[n] = 1;
    def[191:64] = '1;
    def[195] = 1; def[196] = 1; def[197] = 1; def[198] = 1;             // 001111
    def[201] = 1; def[203] = 1; def[204] = 1; def[205] = 1;             // 010111
    for (int t = 0; t < 3; t++) begin
      for (int i = 0; i < FE_CTRL_BITS; i++) img[i] = 1'($urandom);
      for (int i = 0; i < FE_CTRL_BITS; i++) begin
        ser_in = img[i]; shift_en = 1;
        #1 got[i] = ser_out;
        @(negedge clk);
      end
      shift_en = 0;
      if (t == 0) check(got == def, "read-back of defaults, bit 0 first");
      else        check(got == def, "read-back of previous contents");
      for (int n = 0; n < NCHAN; n++) begin
        check(cal_mask[n] == img[n], "cal mask bit");
        check(chan_mask[n] == img[127 - n], "channel mask bit 127-n");
        check(trig_mask[n] == img[128 + n], "trigger mask bit");
      end
      check(cal_range == img[192] && thr_range == img[199], "range bits");
      check(cal_dac == {img[193], img[194], img[195], img[196], img[197], img[198]}, "cal DAC bits");
      check(thr_dac == {img[200], img[201], img[202], img[203], img[204], img[205]}, "thr DAC bits");
      check(read_right == img[206], "left-right bit");
      def = img;
    end
    soft_rst = 1; @(negedge clk); soft_rst = 0;
    check_defaults();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
