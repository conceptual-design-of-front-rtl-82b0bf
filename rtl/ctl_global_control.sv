// ctl_global_control: command decoding and global control of the hybrid
// controller: it receives the serial commands from the tower, holds the
// controller's control register and drives the command line and clock of the
// front-end chips.
//
// Command receiver. A command is s aaaaa ccc d...: start bit, 5-bit layer
// address and 3-bit code, most significant bit first, then the data bits the
// code needs. The address must equal layer_addr or be the wild card 5'h1F
// (load-front-end-register only with the layer's own address). Data bits are
// always counted, so a command for another layer is skipped cleanly.
//   000 load control register: 8 bits, bit 0 first; for the layer's own
//       address the previous contents go out on the data line behind a start
//       bit while the new ones come in
//   001 clear event, 010 read event, 101 calibration strobe, 100 clock on:
//       queued as jobs for the sequencer (4 deep)
//   011 load front-end register: 215 bits (front-end code and address, 207
//       register bits) forwarded one clock later to the front-end command line
//       behind a start bit; the front-end read-back line is returned on the
//       data line behind a start bit
//   110 send command to front-end: 8 bits (code, address) forwarded the same
//       way, followed by 3 more clocks so the front-end command executes
//   111 reset of the controller (soft_rst)
// The forwarding commands are taken only while the sequencer is idle.
//
// Sequencer. Front-end commands go out as a zero gap bit, the start bit, the
// code and the wild-card address 5'h1F, least significant bit first, with a clock pulse
// each (fe_clk_en), followed by the extra clocks the command needs:
//   read event: pop the TOT FIFO; if its readout flag or read_always is set,
//     send read-event, one clock for the load, then clock the chain while the
//     hit counter samples it until it has seen nchips chips, then send
//     end-read-event and one more clock; otherwise send clear-event (12
//     clocks) and record an empty event. Either way the header goes into the
//     write buffer, which becomes ready, and the write selection toggles. A
//     read waits while the write buffer is still full (not yet sent).
//   clear event: pop the TOT FIFO and send clear-event.
//   calibration: send the calibration strobe with 522 clocks in all.
//   clock on: keep the front-end clock running until the next job or reset.
// fe_cmd and fe_clk_en are registered; the front-end acts one clock after the
// sequencer decides, and data bits are sampled in that same clock.
module ctl_global_control
  import glast_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [4:0]           layer_addr,
  input  logic                 cmd_in,
  output logic                 soft_rst,
  output ctl_cfg_t             cfg,
  // front-end chips
  output logic                 fe_clk_en,
  output logic                 fe_cmd,
  input  logic                 fe_ctrl_rd,
  // read-back stream to the data line
  output logic                 aux_valid,
  output logic                 aux_bit,
  // TOT FIFO
  output logic                 tot_pop,
  input  tot_entry_t           tot_head,
  // hit counter
  output logic                 hc_start,
  output logic                 hc_bit_valid,
  input  logic                 hc_done,
  input  logic [5:0]           hc_nhits,
  input  logic                 hc_overflow,
  // event buffers
  input  logic [1:0]           buf_ready,
  output logic                 wr_sel,
  output logic [1:0]           hdr_we,
  output logic [5:0]           hdr_nhits,
  output logic [TOT_BITS-1:0]  hdr_tot,
  output logic                 hdr_err,
  // status
  output logic                 seq_busy,
  output logic                 read_stall
);
  typedef enum logic [1:0] {J_READ, J_CLEAR, J_CAL, J_CLKON} job_e;
  typedef enum logic [2:0] {R_IDLE, R_ADDR, R_CODE, R_DATA} rstate_e;
  typedef enum logic [1:0] {M_SKIP, M_CFG, M_FWD} rmode_e;
  typedef enum logic [3:0] {Q_IDLE, Q_FRAME, Q_EXTRA, Q_DATA, Q_TAIL} qstate_e;
  typedef enum logic [2:0] {N_NONE, N_DATA, N_ENDREAD, N_FINISH, N_FINISH0} next_e;

  // ---------------- receiver ----------------
  rstate_e    rs;
  rmode_e     rmode;
  logic [7:0] rcnt;
  logic [4:0] raddr;
  logic [1:0] rcode;
  logic       fwd_loadfe;       // forwarding a front-end register load
  logic [7:0] fe_idx;           // index of the forwarded bit now at the FE
  logic       fe_fwd_q;         // a forwarded bit is at the FE this clock

  wire [2:0] code_now = {rcode[1:0], cmd_in};
  wire       match    = (raddr == layer_addr) || (raddr == WILDCARD);
  wire       own      = (raddr == layer_addr);

  // ---------------- job queue ----------------
  job_e       jq [4];
  logic [1:0] jq_rp, jq_wp;
  logic [2:0] jq_n;
  logic       jq_push, jq_pop;
  job_e       jq_in;

  // ---------------- sequencer ----------------
  qstate_e    qs;
  next_e      nxt;
  logic [9:0] tx;               // frame bits, bit 0 goes first
  logic [3:0] txn;
  logic [9:0] extra;
  logic       clk_on;
  logic [TOT_BITS-1:0] ev_tot;
  logic       fwd_tail_req;

  // next values of the registered front-end outputs
  logic fe_clk_d, fe_cmd_d, hc_bv_d;

  assign seq_busy = (qs != Q_IDLE);

  // ---------------- receiver ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rs <= R_IDLE; rmode <= M_SKIP; rcnt <= '0; raddr <= '0; rcode <= '0;
      cfg <= CTL_CFG_DEFAULT; fwd_loadfe <= 1'b0;
    end else if (soft_rst) begin
      rs <= R_IDLE; rmode <= M_SKIP; rcnt <= '0; raddr <= '0; rcode <= '0;
      cfg <= CTL_CFG_DEFAULT; fwd_loadfe <= 1'b0;
    end else begin
      unique case (rs)
        R_IDLE: if (cmd_in) begin rs <= R_ADDR; rcnt <= '0; end
        R_ADDR: begin
          raddr <= {raddr[3:0], cmd_in};
          rcnt  <= rcnt + 1'b1;
          if (rcnt == 8'd4) begin rs <= R_CODE; rcnt <= '0; end
        end
        R_CODE: begin
          rcode <= code_now[1:0];
          rcnt  <= rcnt + 1'b1;
          if (rcnt == 8'd2) begin
            rs <= R_IDLE;
            unique case (ctl_cmd_e'(code_now))
              CC_LOAD_CTRL: begin
                rs <= R_DATA; rcnt <= 8'(CTL_CFG_BITS);
                rmode <= match ? M_CFG : M_SKIP;
              end
              CC_LOAD_FE: begin
                rs <= R_DATA; rcnt <= 8'(LOAD_FE_DATA_BITS);
                rmode <= (own && qs == Q_IDLE && jq_n == 0) ? M_FWD : M_SKIP;
                fwd_loadfe <= 1'b1;
              end
              CC_SEND_FE_CMD: begin
                rs <= R_DATA; rcnt <= 8'(SEND_FE_DATA_BITS);
                rmode <= (match && qs == Q_IDLE && jq_n == 0) ? M_FWD : M_SKIP;
                fwd_loadfe <= 1'b0;
              end
              default: ;
            endcase
          end
        end
        R_DATA: begin
          if (rmode == M_CFG) cfg <= {cmd_in, cfg[CTL_CFG_BITS-1:1]};
          rcnt <= rcnt - 1'b1;
          if (rcnt == 8'd1) rs <= R_IDLE;
        end
        default: rs <= R_IDLE;
      endcase
    end
  end

  // commands without data that take effect when the code is complete
  wire code_done = (rs == R_CODE) && (rcnt == 8'd2) && match;
  assign soft_rst = code_done && (ctl_cmd_e'(code_now) == CC_RESET);

  always_comb begin
    jq_push = 1'b0; jq_in = J_READ;
    if (code_done) begin
      unique case (ctl_cmd_e'(code_now))
        CC_READ_EVENT: begin jq_push = 1'b1; jq_in = J_READ;  end
        CC_CLEAR_EVT:  begin jq_push = 1'b1; jq_in = J_CLEAR; end
        CC_CAL_STROBE: begin jq_push = 1'b1; jq_in = J_CAL;   end
        CC_CLOCK_ON:   begin jq_push = 1'b1; jq_in = J_CLKON; end
        default: ;
      endcase
    end
  end

  // read-back: start bit then previous control-register bits
  wire cfg_start = (rs == R_CODE) && (rcnt == 8'd2) && own &&
                   (ctl_cmd_e'(code_now) == CC_LOAD_CTRL);
  wire cfg_bit   = (rs == R_DATA) && (rmode == M_CFG) && own;
  wire fe_rb     = fe_fwd_q && fwd_loadfe && (fe_idx >= 8'd7);
  assign aux_valid = cfg_start || cfg_bit || fe_rb;
  assign aux_bit   = cfg_start ? 1'b1 :
                     cfg_bit   ? cfg[0] :
                     (fe_idx == 8'd7) ? 1'b1 : fe_ctrl_rd;

  wire fwd_start = (rs == R_CODE) && (rcnt == 8'd2) &&
                   ((ctl_cmd_e'(code_now) == CC_LOAD_FE && own) ||
                    (ctl_cmd_e'(code_now) == CC_SEND_FE_CMD && match)) &&
                   qs == Q_IDLE && jq_n == 0;
  wire fwd_bit   = (rs == R_DATA) && (rmode == M_FWD);
  assign fwd_tail_req = fwd_bit && (rcnt == 8'd1);

  // ---------------- job queue ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      jq_rp <= '0; jq_wp <= '0; jq_n <= '0;
    end else if (soft_rst) begin
      jq_rp <= '0; jq_wp <= '0; jq_n <= '0;
    end else begin
      if (jq_push && jq_n != 3'd4) begin
        jq[jq_wp] <= jq_in; jq_wp <= jq_wp + 1'b1;
      end
      if (jq_pop) jq_rp <= jq_rp + 1'b1;
      jq_n <= jq_n + 3'(jq_push && jq_n != 3'd4) - 3'(jq_pop);
    end
  end

  // ---------------- sequencer ----------------
  function automatic logic [9:0] frame(fe_cmd_e c);
    return {WILDCARD, c, 1'b1, 1'b0};   // gap, start, code, address
  endfunction

  wire  job_ready = (jq_n != 0) &&
                    !(jq[jq_rp] == J_READ && buf_ready[wr_sel]);
  assign read_stall = (qs == Q_IDLE) && (jq_n != 0) &&
                      (jq[jq_rp] == J_READ) && buf_ready[wr_sel];
  assign jq_pop = (qs == Q_IDLE) && job_ready && !fwd_bit && !fwd_start;

  always_comb begin
    fe_clk_d = 1'b0; fe_cmd_d = 1'b0; hc_bv_d = 1'b0;
    unique case (qs)
      Q_IDLE:  fe_clk_d = clk_on;
      Q_FRAME: begin fe_clk_d = 1'b1; fe_cmd_d = tx[0]; end
      Q_EXTRA, Q_TAIL: fe_clk_d = 1'b1;
      Q_DATA:  begin fe_clk_d = !hc_done; hc_bv_d = !hc_done; end
      default: ;
    endcase
    if (fwd_start) begin fe_clk_d = 1'b1; fe_cmd_d = 1'b1; end
    if (fwd_bit)   begin fe_clk_d = 1'b1; fe_cmd_d = cmd_in; end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fe_clk_en <= 1'b0; fe_cmd <= 1'b0; hc_bit_valid <= 1'b0;
      fe_fwd_q <= 1'b0; fe_idx <= '0;
    end else begin
      fe_clk_en <= fe_clk_d; fe_cmd <= fe_cmd_d; hc_bit_valid <= hc_bv_d;
      fe_fwd_q  <= fwd_bit;
      fe_idx    <= fwd_bit ? 8'(LOAD_FE_DATA_BITS) - rcnt : '0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      qs <= Q_IDLE; nxt <= N_NONE; tx <= '0; txn <= '0; extra <= '0;
      clk_on <= 1'b0; ev_tot <= '0; wr_sel <= 1'b0;
    end else if (soft_rst) begin
      qs <= Q_IDLE; nxt <= N_NONE; tx <= '0; txn <= '0; extra <= '0;
      clk_on <= 1'b0; ev_tot <= '0; wr_sel <= 1'b0;
    end else begin
      unique case (qs)
        Q_IDLE: begin
          if (fwd_tail_req) begin
            clk_on <= 1'b0; qs <= Q_TAIL; extra <= 10'd3;
          end else if (jq_pop) begin
            clk_on <= 1'b0;
            txn    <= 4'd10;
            qs     <= Q_FRAME;
            unique case (jq[jq_rp])
              J_READ: begin
                ev_tot <= tot_head.tot;
                if (tot_head.read_flag || cfg.read_always) begin
                  tx <= frame(FE_READ_EVENT); extra <= 10'd1; nxt <= N_DATA;
                end else begin
                  tx <= frame(FE_CLEAR_EVT);
                  extra <= 10'(FE_SHORT_CLOCKS - FE_FRAME_BITS);
                  nxt <= N_FINISH0;
                end
              end
              J_CLEAR: begin
                tx <= frame(FE_CLEAR_EVT);
                extra <= 10'(FE_SHORT_CLOCKS - FE_FRAME_BITS); nxt <= N_NONE;
              end
              J_CAL: begin
                tx <= frame(FE_CAL_STROBE);
                extra <= 10'(FE_CAL_CLOCKS - FE_FRAME_BITS); nxt <= N_NONE;
              end
              default: begin        // clock on
                clk_on <= 1'b1; qs <= Q_IDLE;
              end
            endcase
          end
        end
        Q_FRAME: begin
          tx  <= tx >> 1;
          txn <= txn - 1'b1;
          if (txn == 4'd1) qs <= (extra != 0) ? Q_EXTRA : Q_IDLE;
        end
        Q_EXTRA: begin
          extra <= extra - 1'b1;
          if (extra == 10'd1) begin
            unique case (nxt)
              N_DATA:   qs <= Q_DATA;
              N_ENDREAD, N_FINISH, N_FINISH0: qs <= Q_IDLE;
              default:  qs <= Q_IDLE;
            endcase
          end
        end
        Q_DATA: if (hc_done) begin
          tx <= frame(FE_END_READ); txn <= 4'd10; extra <= 10'd1;
          nxt <= N_FINISH; qs <= Q_FRAME;
        end
        Q_TAIL: begin
          extra <= extra - 1'b1;
          if (extra == 10'd1) qs <= Q_IDLE;
        end
        default: qs <= Q_IDLE;
      endcase
      if (qs == Q_EXTRA && extra == 10'd1 && (nxt == N_FINISH || nxt == N_FINISH0))
        wr_sel <= !wr_sel;
    end
  end

  // TOT entry leaves the FIFO when a read or clear job starts
  assign tot_pop  = jq_pop && (jq[jq_rp] == J_READ || jq[jq_rp] == J_CLEAR);
  assign hc_start = (qs == Q_EXTRA) && (extra == 10'd1) && (nxt == N_DATA);

  // header of the finished event goes into the write buffer
  wire finish = (qs == Q_EXTRA) && (extra == 10'd1) &&
                (nxt == N_FINISH || nxt == N_FINISH0);
  assign hdr_we[0] = finish && !wr_sel;
  assign hdr_we[1] = finish &&  wr_sel;
  assign hdr_nhits = (nxt == N_FINISH) ? hc_nhits : '0;
  assign hdr_tot   = ev_tot;
  assign hdr_err   = (nxt == N_FINISH) && hc_overflow;

  a_jq_overflow: assert property (@(posedge clk) disable iff (!rst_n)
                                  jq_push |-> jq_n != 3'd4)
    else $error("ctl_global_control: command queue overflow");
endmodule
