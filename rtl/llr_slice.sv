// llr_slice: the demapper as the modem sees it, P_PAR cores side by side.
//
// To reach the modem's symbol rate the demapper processes P_PAR symbols per
// clock ("parallel by two" or "parallel by four"). Each lane is a full
// llr_core with its own four LUT copies; all lanes share the modulation
// select, the input valid and EOB flags and the downstream ready, so they
// stay in lock step and one valid/EOB pair describes all lanes. A LUT load
// is broadcast to every lane. The default P_PAR = 2 is the configuration
// that met the 150 MHz clock target; 4 is the other one used.
//
// Interface: symbol_data[p] and llr_data[p] are lane p, with the same
// layouts as llr_core ({Q, I} in, LLR field k in bits [k*DOUT_W +: DOUT_W]
// out). din_rdy equals dout_rdy. Timing: llr_core's, 8 advancing cycles.
// How the lanes are grouped and share control is this design's choice; the
// reference only names the parallel configurations.
module llr_slice
  import llr_pkg::*;
#(
  parameter int unsigned P_PAR   = PAR_DEF,
  parameter int unsigned DIN_W   = DIN_W_DEF,
  parameter int unsigned DOUT_W  = DOUT_W_DEF,
  parameter int unsigned MAX_BPS = MAX_BPS_DEF,
  parameter int unsigned LUT_W   = LUT_W_DEF,
  localparam int unsigned BPS_W  = bps_width(MAX_BPS),
  localparam int unsigned ADDR_W = 2*LUT_W,
  localparam int unsigned WORD_W = MAX_BPS*DOUT_W
) (
  input  logic                            clk,
  input  logic                            rst,
  input  logic [BPS_W-1:0]                bps,
  input  logic [P_PAR-1:0][2*DIN_W-1:0]   symbol_data,
  input  logic                            eob_in,
  input  logic                            din_valid,
  output logic                            din_rdy,
  output logic [P_PAR-1:0][WORD_W-1:0]    llr_data,
  output logic                            eob_out,
  output logic                            dout_valid,
  input  logic                            dout_rdy,
  input  logic [WORD_W-1:0]               lut_wr_data,
  input  logic [ADDR_W-1:0]               lut_wr_addr,
  input  logic                            lut_wr
);

  logic [P_PAR-1:0] rdy_l, valid_l, eob_l;

  for (genvar p = 0; p < P_PAR; p++) begin : g_lane
    llr_core #(.DIN_W(DIN_W), .DOUT_W(DOUT_W), .MAX_BPS(MAX_BPS), .LUT_W(LUT_W)) u_core (
      .clk, .rst, .bps,
      .symbol_data(symbol_data[p]),
      .eob_in, .din_valid,
      .din_rdy(rdy_l[p]),
      .llr_data(llr_data[p]),
      .eob_out(eob_l[p]),
      .dout_valid(valid_l[p]),
      .dout_rdy,
      .lut_wr_data, .lut_wr_addr, .lut_wr);
  end

  assign din_rdy    = rdy_l[0];
  assign dout_valid = valid_l[0];
  assign eob_out    = eob_l[0];

  // All lanes share their control, so their flags must agree.
  a_lanes_lockstep: assert property (@(posedge clk) disable iff (rst)
    (valid_l == {P_PAR{valid_l[0]}}) && (eob_l == {P_PAR{eob_l[0]}}) &&
    (rdy_l == {P_PAR{rdy_l[0]}}));

endmodule
