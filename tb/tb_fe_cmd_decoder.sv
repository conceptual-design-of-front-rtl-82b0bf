// tb_fe_cmd_decoder: sends serial front-end commands (start bit, 3-bit
// code and 5-bit address, LSB first, on clock pulses spaced irregularly) and
// checks that a command for this chip or the wild card acts on its 10th
// pulse with the right code, that other addresses are ignored, and that a
// load-control-register command gives exactly 207 data pulses.
module tb_fe_cmd_decoder;
  import glast_pkg::*;
  logic clk = 0, rst_n = 0, soft_rst = 0, clk_en = 0, cmd_in = 0;
  logic [4:0] chip_addr = 5'd9;
  logic exec, addressed, ld_shift, ld_unique, loading;
  fe_cmd_e code;
  always #5 clk = !clk;
  fe_cmd_decoder dut (.*);

  int checks = 0, failures = 0;
  int pulse, exec_at, nld, nuniq;
  fe_cmd_e exec_code;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // one clock pulse carrying bit b, with random idle cycles before it
  task automatic pulse_bit(bit b);
    repeat ($urandom % 3) @(negedge clk);
    cmd_in = b; clk_en = 1; pulse++;
    #1;
    if (exec) begin exec_at = pulse; exec_code = code; end
    if (ld_shift) nld++;
    if (ld_shift && ld_unique) nuniq++;
    @(negedge clk); clk_en = 0; cmd_in = 0;
  endtask

  task automatic send(logic [4:0] a, logic [2:0] c, int extra);
    pulse = 0; exec_at = -1; nld = 0; nuniq = 0;
    pulse_bit(1);
    for (int i = 0; i < 3; i++) pulse_bit(c[i]);
    for (int i = 0; i < 5; i++) pulse_bit(a[i]);
    for (int i = 0; i < extra; i++) pulse_bit(c == 3'b001 ? 1'($urandom) : 1'b0);
    pulse_bit(0);
  endtask

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    repeat (4) pulse_bit(0);               // idle pulses: nothing happens
    for (int c = 0; c < 8; c++) begin
      if (c == 1) continue;
      send(5'd9, 3'(c), 3);
      check(exec_at == 10 && exec_code == fe_cmd_e'(c),
            $sformatf("code %0d acts on pulse 10 (got %0d)", c, exec_at));
      send(WILDCARD, 3'(c), 3);
      check(exec_at == 10 && exec_code == fe_cmd_e'(c), "wild card acts");
      send(5'd8, 3'(c), 3);
      check(exec_at == -1, "other address ignored");
    end
    send(5'd9, 3'b001, FE_CTRL_BITS);
    check(nld == FE_CTRL_BITS && nuniq == FE_CTRL_BITS && exec_at == -1,
          $sformatf("load: %0d data pulses", nld));
    send(WILDCARD, 3'b001, FE_CTRL_BITS);
    check(nld == FE_CTRL_BITS && nuniq == 0, "wild-card load is not unique");
    send(5'd3, 3'b001, FE_CTRL_BITS);
    check(nld == 0, "load for another chip");
    // after a load of another chip the decoder is back in step
    send(5'd9, 3'b100, 3);
    check(exec_at == 10 && exec_code == FE_CLEAR_EVT, "in step after a foreign load");
    // soft reset in the middle of a command returns the decoder to idle
    pulse_bit(1); pulse_bit(1); soft_rst = 1; @(negedge clk); soft_rst = 0;
    send(5'd9, 3'b010, 3);
    check(exec_at == 10 && exec_code == FE_READ_EVENT, "in step after soft reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
