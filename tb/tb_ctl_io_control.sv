// tb_ctl_io_control: drives the packet output unit with two event buffers
// modelled in the testbench. Checks the one-clock pass-through without the
// token, the read-back path, the packet format (start bit, layer/count word,
// error/TOT word, hit words, check-sum), the empty packet, check-sum off,
// holding the token until the buffer is ready, the buffer release and the
// token pass-on, and the alternation between the two buffers.
module tb_ctl_io_control;
  import glast_pkg::*;
  logic clk = 0, rst_n = 0, soft_rst = 0, cksum_en = 1, token_in = 0, token_out;
  logic data_in = 0, data_out, aux_valid = 0, aux_bit = 0;
  logic [4:0] layer_addr = 5'd19;
  logic [1:0] buf_ready = '0, buf_err = '0, buf_release;
  logic [1:0][5:0] buf_nhits;
  logic [1:0][TOT_BITS-1:0] buf_tot;
  logic [1:0][WORD_BITS-1:0] buf_word;
  logic [5:0] ridx;
  logic rd_sel, sending;
  logic [10:0] mem [2][63];
  always #5 clk = !clk;
  assign buf_word[0] = mem[0][ridx];
  assign buf_word[1] = mem[1][ridx];
  ctl_io_control dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (50000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  int nrel [2] = '{0, 0}; int ntok = 0;
  always @(posedge clk) begin
    if (rst_n) begin
      if (buf_release[0]) begin nrel[0]++; buf_ready[0] <= 0; end
      if (buf_release[1]) begin nrel[1]++; buf_ready[1] <= 0; end
      if (token_out) ntok++;
    end
  end

  // expected serial packet of buffer b
  function automatic void packet(int b, bit ck, output bit s[$]);
    logic [10:0] w, sum;
    s = {}; s.push_back(1);
    w = {layer_addr, buf_nhits[b]}; sum = w;
    for (int i = 10; i >= 0; i--) s.push_back(w[i]);
    if (buf_nhits[b] == 0) return;
    w = {buf_err[b], buf_tot[b]}; sum += w;
    for (int i = 10; i >= 0; i--) s.push_back(w[i]);
    for (int h = 0; h < buf_nhits[b]; h++) begin
      w = mem[b][h]; sum += w;
      for (int i = 10; i >= 0; i--) s.push_back(w[i]);
    end
    if (ck) for (int i = 10; i >= 0; i--) s.push_back(sum[i]);
  endfunction

  task automatic receive(bit exp[$], string what);
    bit ok; int guard;
    guard = 0;
    while (!data_out && guard < 500) begin @(negedge clk); guard++; end
    ok = 1;
    foreach (exp[i]) begin
      ok &= (data_out == exp[i]); @(negedge clk);
    end
    check(ok, what);
  endtask

  initial begin
    bit e[$];
    repeat (3) @(negedge clk); rst_n = 1; @(negedge clk);
    // pass-through with one clock delay, and the read-back path
    for (int i = 0; i < 50; i++) begin
      logic b; b = 1'($urandom);
      data_in = b; @(negedge clk);
      check(data_out == b, "pass-through one clock later");
    end
    data_in = 0;
    aux_valid = 1; aux_bit = 1; data_in = 0; @(negedge clk);
    check(data_out == 1, "read-back bit has priority");
    aux_valid = 0; @(negedge clk);

    // buffer 0: 5 hits, buffer 1: empty
    for (int h = 0; h < 63; h++) begin mem[0][h] = 11'($urandom); mem[1][h] = 11'($urandom); end
    buf_nhits[0] = 6'd5; buf_tot[0] = 10'd321; buf_err[0] = 1;
    buf_nhits[1] = 6'd0; buf_tot[1] = 10'd0;   buf_err[1] = 0;
    // token before the buffer is ready: held
    token_in = 1; @(negedge clk); token_in = 0;
    repeat (20) @(negedge clk);
    check(data_out == 0 && ntok == 0, "token held while buffer not ready");
    buf_ready[0] = 1;
    packet(0, 1, e);
    receive(e, "packet with hits and check-sum");
    repeat (2) @(negedge clk);
    check(nrel[0] == 1 && ntok == 1, $sformatf("buffer 0 released and token passed %0d %0d", nrel[0], ntok));
    buf_ready[1] = 1;
    token_in = 1; @(negedge clk); token_in = 0;
    packet(1, 1, e);
    receive(e, "empty packet: start bit and first word only");
    repeat (2) @(negedge clk);
    check(nrel[1] == 1 && ntok == 2, "buffer 1 released");
    // back to buffer 0, check-sum off, 63 hits
    cksum_en = 0; buf_nhits[0] = 6'd63; buf_err[0] = 0; buf_ready[0] = 1;
    token_in = 1; @(negedge clk); token_in = 0;
    packet(0, 0, e);
    receive(e, "63-hit packet without check-sum");
    repeat (2) @(negedge clk);
    check(nrel[0] == 2 && ntok == 3 && rd_sel == 1, "alternates buffers");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
