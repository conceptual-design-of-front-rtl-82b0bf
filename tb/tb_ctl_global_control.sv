// tb_ctl_global_control: the controller's command unit on its own. The
// testbench sends controller commands, decodes the front-end frames that
// come out (start bit, code and address LSB first, counted in clock pulses),
// and models the TOT FIFO, hit counter and event buffers around it. Checks
// the control-register load and read-back, read event with and without the
// readout flag, the clear-event and calibration sequences with their clock
// counts, forwarding of a front-end command and of a front-end register load
// with its read-back, the stall on a full buffer, address filtering, the
// clock-on command and the reset.
module tb_ctl_global_control;
  import glast_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [4:0] layer_addr = 5'd6;
  logic cmd_in = 0, soft_rst, fe_clk_en, fe_cmd, fe_ctrl_rd = 0, aux_valid, aux_bit;
  ctl_cfg_t cfg;
  logic tot_pop; tot_entry_t tot_head;
  logic hc_start, hc_bit_valid, hc_done = 0, hc_overflow = 0;
  logic [5:0] hc_nhits = '0;
  logic [1:0] buf_ready = '0, hdr_we;
  logic wr_sel, hdr_err, seq_busy, read_stall;
  logic [5:0] hdr_nhits;
  logic [TOT_BITS-1:0] hdr_tot;
  always #25 clk = !clk;
  ctl_global_control dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // ---- front-end frame decoder ----
  int np = 0;                  // clock pulses so far
  logic [2:0] f_code[$]; int f_addr[$], f_start[$];
  logic [FE_CTRL_BITS-1:0] f_data;
  int st = 0, k = 0; logic [4:0] a; logic [2:0] c;
  always @(negedge clk) if (rst_n && fe_clk_en) begin
    np++;
    case (st)
      0: if (fe_cmd) begin st = 1; k = 0; f_start.push_back(np); end
      1: begin c[k] = fe_cmd; k++; if (k == 3) begin st = 2; k = 0; end end
      2: begin a[k] = fe_cmd; k++;
           if (k == 5) begin
             f_code.push_back(c); f_addr.push_back(int'(a));
             st = (c == 3'b001) ? 3 : 4; k = 0;
           end
         end
      3: begin f_data[k] = fe_cmd; k++; if (k == FE_CTRL_BITS) st = 0; end
      4: st = 0;                   // the 10th pulse, command acts
      default: st = 0;
    endcase
  end
  function automatic void clear_frames();
    f_code = {}; f_addr = {}; f_start = {};
  endfunction

  // ---- TOT FIFO, hit counter and buffer models ----
  int npop = 0, nbits = 0, hc_len = 0, nhdr = 0;
  always @(posedge clk) if (rst_n) begin
    hc_done <= 1'b0;
    if (tot_pop) npop++;
    if (hc_start) nbits = 0;
    if (hc_bit_valid && nbits < hc_len) begin
      nbits++;
      if (nbits == hc_len) hc_done <= 1'b1;
    end
    if (|hdr_we) begin nhdr++; buf_ready <= buf_ready | hdr_we; end
  end

  // ---- aux (read-back) capture ----
  bit aux_q[$];
  always @(negedge clk) if (rst_n && aux_valid) aux_q.push_back(aux_bit);

  task automatic send(logic [4:0] addr, logic [2:0] code, logic [255:0] d, int n);
    logic [7:0] h; h = {addr, code};
    cmd_in = 1; @(negedge clk);
    for (int i = 7; i >= 0; i--) begin cmd_in = h[i]; @(negedge clk); end
    for (int i = 0; i < n; i++) begin cmd_in = d[i]; @(negedge clk); end
    cmd_in = 0;
  endtask
  task automatic idle();
    repeat (3) @(negedge clk);
    while (seq_busy) @(negedge clk);
    repeat (5) @(negedge clk);
  endtask

  initial begin
    tot_head = '{read_flag: 1'b1, tot: 10'd77};
    repeat (3) @(negedge clk); rst_n = 1; @(negedge clk);

    // control register: own address returns the old value
    aux_q = {};
    send(5'd6, CC_LOAD_CTRL, 256'(8'b0110_0100), 8);   // 4 chips, no cksum, no read_always
    repeat (3) @(negedge clk);
    begin
      logic [7:0] v; for (int i = 0; i < 8; i++) v[i] = aux_q[i + 1];
      check(aux_q.size() == 9 && aux_q[0] == 1 && v == 8'b1010_0101,
            "control register read-back: start bit and default");
    end
    check(cfg == ctl_cfg_t'(8'b0110_0100), "control register loaded");
    send(5'd7, CC_LOAD_CTRL, 256'(8'hFF), 8);
    check(cfg == ctl_cfg_t'(8'b0110_0100), "other layer address ignored");

    // read event with the flag set: read-event, data, end-read-event
    clear_frames(); np = 0; hc_len = 100; hc_nhits = 6'd9; nhdr = 0;
    send(WILDCARD, CC_READ_EVENT, '0, 0);
    idle();
    check(f_code.size() == 2 && f_code[0] == FE_READ_EVENT && f_code[1] == FE_END_READ &&
          f_addr[0] == 31, "read event frames");
    check(f_start.size() == 2 && f_start[1] - f_start[0] >= 10 + hc_len,
          $sformatf("data clocks: %0d", f_start.size() == 2 ? f_start[1] - f_start[0] : -1));
    check(np - f_start[1] + 1 >= 10, "end-read-event gets its 10 clocks");
    check(npop == 1 && nhdr == 1 && hdr_nhits == 9 && hdr_tot == 77 && buf_ready == 2'b01,
          "header written to buffer 0");

    // read event without the flag and read_always = 0: clear-event
    tot_head = '{read_flag: 1'b0, tot: 10'd0};
    clear_frames(); np = 0;
    send(WILDCARD, CC_READ_EVENT, '0, 0);
    idle();
    check(f_code.size() == 1 && f_code[0] == FE_CLEAR_EVT &&
          np - f_start[0] + 1 == FE_SHORT_CLOCKS, $sformatf("clear-event in %0d clocks", np - f_start[0] + 1));
    check(npop == 2 && nhdr == 2 && buf_ready == 2'b11 && hdr_nhits == 0, "empty event in buffer 1");

    // both buffers full: the next read waits
    tot_head = '{read_flag: 1'b1, tot: 10'd5};
    clear_frames();
    send(WILDCARD, CC_READ_EVENT, '0, 0);
    repeat (30) @(negedge clk);
    check(read_stall && f_code.size() == 0, "read waits for a free buffer");
    buf_ready[0] = 0;
    idle();
    check(f_code.size() == 2 && f_code[0] == FE_READ_EVENT && buf_ready[0], "read runs when free");
    buf_ready = '0;

    // clear-event command
    clear_frames(); np = 0;
    send(5'd6, CC_CLEAR_EVT, '0, 0);
    idle();
    check(f_code.size() == 1 && f_code[0] == FE_CLEAR_EVT && npop == 4 && nhdr == 3,
          "clear-event command pops the TOT FIFO, no packet");

    // calibration strobe: 522 clocks
    clear_frames(); np = 0;
    send(5'd6, CC_CAL_STROBE, '0, 0);
    idle();
    check(f_code.size() == 1 && f_code[0] == FE_CAL_STROBE &&
          np - f_start[0] + 1 == FE_CAL_CLOCKS, $sformatf("calibration clocks %0d", np - f_start[0] + 1));

    // forwarded front-end command (reset FIFO of chip 12)
    clear_frames(); np = 0;
    send(5'd6, CC_SEND_FE_CMD, 256'({5'd12, 3'b110}), 8);
    idle();
    check(f_code.size() == 1 && f_code[0] == FE_RESET_FIFO && f_addr[0] == 12 &&
          np - f_start[0] + 1 >= FE_SHORT_CLOCKS, "forwarded front-end command");

    // forwarded front-end register load with read-back
    begin
      logic [255:0] d; logic [FE_CTRL_BITS-1:0] v, rbv;
      for (int i = 0; i < FE_CTRL_BITS; i++) v[i] = 1'($urandom);
      d = '0; d[2:0] = 3'b001; d[7:3] = 5'd3; d[8 +: FE_CTRL_BITS] = v;
      clear_frames(); aux_q = {};
      fork
        send(5'd6, CC_LOAD_FE, d, LOAD_FE_DATA_BITS);
        // the chip shows old bit i while new bit i is on its input; the
        // model's old contents are the inverted new data
        forever @(fe_cmd) fe_ctrl_rd = !fe_cmd;
      join_any
      disable fork;
      idle();
      check(f_code.size() == 1 && f_code[0] == FE_LOAD_CTRL && f_addr[0] == 3 &&
            f_data == v, "front-end register data forwarded");
      for (int i = 0; i < FE_CTRL_BITS && i + 1 < aux_q.size(); i++) rbv[i] = aux_q[i + 1];
      check(aux_q.size() == FE_CTRL_BITS + 1 && aux_q[0] == 1 && rbv == ~v,
            $sformatf("front-end read-back returned (%0d bits)", aux_q.size()));
    end

    // clock on, then reset
    send(5'd6, CC_CLOCK_ON, '0, 0);
    repeat (5) @(negedge clk);
    check(fe_clk_en == 1, "front-end clock on");
    send(WILDCARD, CC_RESET, '0, 0);
    repeat (2) @(negedge clk);
    check(fe_clk_en == 0 && cfg == CTL_CFG_DEFAULT, "reset: clock off, register default");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
