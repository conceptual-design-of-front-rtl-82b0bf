// fe_cmd_decoder: one of the two redundant serial command decoders of the
// front-end readout chip (one is driven by each controller).
//
// A command is a start bit (1), the 3-bit command code and the 5-bit chip
// address, each least-significant bit first, sampled on the clock pulses the
// controller sends (clk_en marks a pulse of that gated clock). The decoder
// waits in IDLE for a 1 on the command line. For "load control register"
// (001) the next 207 pulses carry the register bits: ld_shift is high on each
// of them when the address is this chip's or the wild card 5'h1F, and
// ld_unique says whether the address was this chip's own (only then may the
// chip drive its read-back line). Every other command acts on the pulse after
// the address (the 10th pulse of the command): exec is high for that pulse and
// code holds the command. A reset (rst_n or the soft reset) returns the
// decoder to IDLE with all counters cleared.
module fe_cmd_decoder
  import glast_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       soft_rst,
  input  logic       clk_en,     // one pulse of the controller's clock
  input  logic       cmd_in,
  input  logic [4:0] chip_addr,  // hard-wired address
  output logic       exec,       // non-load command acts now
  output fe_cmd_e    code,
  output logic       addressed,  // address matched or wild card
  output logic       ld_shift,   // load-register data bit on cmd_in now
  output logic       ld_unique,
  output logic       loading     // register data phase in progress
);
  typedef enum logic [2:0] {S_IDLE, S_ADDR, S_CODE, S_EXEC, S_LOAD} state_e;
  state_e     st;
  logic [7:0] cnt;
  logic [4:0] addr;
  logic [2:0] c;

  assign code      = fe_cmd_e'(c);
  assign addressed = (addr == chip_addr) || (addr == WILDCARD);
  assign ld_unique = (addr == chip_addr);
  assign exec      = clk_en && (st == S_EXEC) && addressed;
  assign ld_shift  = clk_en && (st == S_LOAD) && addressed;
  assign loading   = (st == S_LOAD);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; cnt <= '0; addr <= '0; c <= '0;
    end else if (soft_rst) begin
      st <= S_IDLE; cnt <= '0; addr <= '0; c <= '0;
    end else if (clk_en) begin
      unique case (st)
        S_IDLE: if (cmd_in) begin st <= S_CODE; cnt <= '0; end
        S_CODE: begin
          c   <= {cmd_in, c[2:1]};                // LSB first
          cnt <= cnt + 1'b1;
          if (cnt == 8'd2) begin st <= S_ADDR; cnt <= '0; end
        end
        S_ADDR: begin
          addr <= {cmd_in, addr[4:1]};
          cnt  <= cnt + 1'b1;
          if (cnt == 8'd4) begin
            cnt <= '0;
            st  <= (c == FE_LOAD_CTRL) ? S_LOAD : S_EXEC;
          end
        end
        S_EXEC: st <= S_IDLE;
        S_LOAD: begin
          cnt <= cnt + 1'b1;
          if (cnt == 8'(FE_CTRL_BITS - 1)) begin st <= S_IDLE; cnt <= '0; end
        end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
