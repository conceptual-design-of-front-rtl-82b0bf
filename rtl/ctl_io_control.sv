// ctl_io_control: token-controlled output of the hybrid controller.
//
// Without the token, the controller is a one-flip-flop stage of the data
// chain: data_out follows data_in (from the layer above) one clock later. A
// token_in pulse (from the layer below, or from the tower controller for the
// first layer) is held until the event buffer currently selected for reading
// is ready; then the packet is sent, most significant bit of each word first:
//   start bit 1
//   word 0: layer address (5 bits), number of hits (6 bits)
//   if there are hits:
//     word 1: error flag (1 bit), time-over-threshold (10 bits)
//     the hit words (5-bit chip, 6-bit channel)
//     the 11-bit check-sum of the words above, when cksum_en is set
// A packet with no hits is the start bit and word 0 alone. After the last bit
// the buffer is released, the read buffer selection toggles and token_out
// pulses for one clock toward the layer above.
// aux_valid/aux_bit let the command unit put control-register read-back bits
// on the line; that happens only outside data taking.
module ctl_io_control
  import glast_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 soft_rst,
  input  logic [4:0]           layer_addr,
  input  logic                 cksum_en,
  input  logic                 token_in,
  output logic                 token_out,
  input  logic                 data_in,
  output logic                 data_out,
  input  logic                 aux_valid,
  input  logic                 aux_bit,
  // event buffers
  input  logic [1:0]                 buf_ready,
  input  logic [1:0][5:0]            buf_nhits,
  input  logic [1:0][TOT_BITS-1:0]   buf_tot,
  input  logic [1:0]                 buf_err,
  input  logic [1:0][WORD_BITS-1:0]  buf_word,
  output logic [5:0]                 ridx,
  output logic [1:0]                 buf_release,
  output logic                       rd_sel,
  output logic                       sending
);
  typedef enum logic [2:0] {P_START, P_W0, P_W1, P_HIT, P_CK} phase_e;

  logic                 tok_pend;
  phase_e               ph;
  logic [3:0]           bitpos;
  logic [WORD_BITS-1:0] word, ck;

  ctl_checksum u_ck (
    .clk, .rst_n, .clear(soft_rst || !sending),
    .add(sending && ph != P_START && ph != P_CK && bitpos == 4'd10),
    .word, .sum(ck));

  always_comb begin
    unique case (ph)
      P_W0:    word = {layer_addr, buf_nhits[rd_sel]};
      P_W1:    word = {buf_err[rd_sel], buf_tot[rd_sel]};
      P_HIT:   word = buf_word[rd_sel];
      P_CK:    word = ck;
      default: word = '0;
    endcase
  end

  wire start_send = tok_pend && !sending && buf_ready[rd_sel];
  wire last_bit   = (bitpos == 4'd10);
  wire [5:0] nh   = buf_nhits[rd_sel];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tok_pend <= 1'b0; sending <= 1'b0; ph <= P_START; bitpos <= '0;
      ridx <= '0; rd_sel <= 1'b0; token_out <= 1'b0; data_out <= 1'b0;
      buf_release <= '0;
    end else if (soft_rst) begin
      tok_pend <= 1'b0; sending <= 1'b0; ph <= P_START; bitpos <= '0;
      ridx <= '0; rd_sel <= 1'b0; token_out <= 1'b0; data_out <= 1'b0;
      buf_release <= '0;
    end else begin
      token_out   <= 1'b0;
      buf_release <= '0;
      if (token_in) tok_pend <= 1'b1;

      if (!sending) begin
        data_out <= aux_valid ? aux_bit : data_in;
        if (start_send) begin
          sending <= 1'b1; tok_pend <= 1'b0; ph <= P_START; bitpos <= '0;
          ridx <= '0;
        end
      end else begin
        if (ph == P_START) begin
          data_out <= 1'b1;
          ph <= P_W0; bitpos <= '0;
        end else begin
          data_out <= word[4'd10 - bitpos];
          bitpos   <= last_bit ? '0 : bitpos + 1'b1;
          if (last_bit) begin
            unique case (ph)
              P_W0:  if (nh == 0) ph <= P_START; else ph <= P_W1;
              P_W1:  ph <= P_HIT;
              P_HIT: if (ridx == nh - 6'd1) ph <= cksum_en ? P_CK : P_START;
                     else ridx <= ridx + 1'b1;
              default: ph <= P_START;
            endcase
            if ((ph == P_W0 && nh == 0) || ph == P_CK ||
                (ph == P_HIT && ridx == nh - 6'd1 && !cksum_en)) begin
              sending   <= 1'b0;
              token_out <= 1'b1;
              buf_release[rd_sel] <= 1'b1;
              rd_sel    <= !rd_sel;
            end
          end
        end
      end
    end
  end

  // The token must not arrive twice before the packet went out.
  a_token: assert property (@(posedge clk) disable iff (!rst_n)
                            token_in |-> !tok_pend)
    else $error("ctl_io_control: token received while one is pending");
endmodule
