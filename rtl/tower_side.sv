// tower_side: the readout of one side (x or y) of a tracker tower: NLAYERS
// hybrids joined into two redundant daisy chains, one through the left-hand
// controllers and one through the right-hand controllers.
//
// Layer 0 is nearest the tower controller. In each chain the token enters
// layer 0 (token_in_*) and is passed up layer by layer; data move down, each
// controller sending its own packet while it holds the token and otherwise
// repeating, one clock later, what the layer above sends. All data of a chain
// thus leave on one serial line at the bottom (data_out_*). The command and
// trigger lines of a chain are shared by all its layers; the layer address of
// layer k is k. The fast-OR of every controller goes to the tower controller,
// which forms the trigger. The tower controller itself, the amplifiers,
// discriminators and DACs of the front-end chips are outside: their signals
// are ports.
module tower_side
  import glast_pkg::*;
#(
  parameter int unsigned NLAYERS = 8,
  parameter int unsigned NCH     = NCHIPS
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic [NLAYERS-1:0][NCH-1:0][NCHAN-1:0] disc,
  // left chain
  input  logic                               cmd_l,
  input  logic                               trigger_l,
  input  logic                               token_in_l,
  output logic                               data_out_l,
  output logic                               token_top_l,
  output logic [NLAYERS-1:0]                 fast_or_l,
  // right chain
  input  logic                               cmd_r,
  input  logic                               trigger_r,
  input  logic                               token_in_r,
  output logic                               data_out_r,
  output logic                               token_top_r,
  output logic [NLAYERS-1:0]                 fast_or_r,
  // analog settings of every chip
  output logic [NLAYERS-1:0][NCH-1:0][NCHAN-1:0] cal_mask,
  output logic [NLAYERS-1:0][NCH-1:0][6:0]   cal_dac,
  output logic [NLAYERS-1:0][NCH-1:0][6:0]   thr_dac,
  output logic [NLAYERS-1:0][NCH-1:0]        cal_strobe,
  // status of every controller: [layer][0 = left, 1 = right]
  output logic [NLAYERS-1:0][1:0]            read_stall,
  output logic [NLAYERS-1:0][1:0]            seq_busy
);
  logic [NLAYERS:0] tok_l, tok_r;   // tok[k] enters layer k
  logic [NLAYERS:0] dat_l, dat_r;   // dat[k] leaves layer k downward

  assign tok_l[0]       = token_in_l;
  assign tok_r[0]       = token_in_r;
  assign token_top_l    = tok_l[NLAYERS];
  assign token_top_r    = tok_r[NLAYERS];
  assign dat_l[NLAYERS] = 1'b0;
  assign dat_r[NLAYERS] = 1'b0;
  assign data_out_l     = dat_l[0];
  assign data_out_r     = dat_r[0];

  for (genvar k = 0; k < NLAYERS; k++) begin : g_layer
    hybrid #(.NCH(NCH)) u_hyb (
      .clk, .rst_n, .layer_addr(5'(k)), .disc(disc[k]),
      .cmd_l, .trigger_l, .fast_or_out_l(fast_or_l[k]),
      .token_in_l(tok_l[k]), .token_out_l(tok_l[k+1]),
      .data_in_l(dat_l[k+1]), .data_out_l(dat_l[k]),
      .cmd_r, .trigger_r, .fast_or_out_r(fast_or_r[k]),
      .token_in_r(tok_r[k]), .token_out_r(tok_r[k+1]),
      .data_in_r(dat_r[k+1]), .data_out_r(dat_r[k]),
      .cal_mask(cal_mask[k]), .cal_dac(cal_dac[k]), .thr_dac(thr_dac[k]),
      .cal_strobe(cal_strobe[k]),
      .read_stall(read_stall[k]), .seq_busy(seq_busy[k]));
  end
endmodule
