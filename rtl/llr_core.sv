// llr_core: LLR soft-decision demapper core (lookup table + bilinear
// interpolation).
//
// Instead of evaluating the MAX-log LLR formula per symbol, the LLRs of every
// bit position are precomputed offline on a coarse grid of the I/Q plane and
// loaded into a lookup table (LUT). A received symbol is split into the top
// LUT_W bits of I and of Q, which name the grid cell, and the low F =
// DIN_W-LUT_W bits, which give its position inside the cell. The four cell
// corners are read from four copies of the LUT in one cycle, each bit's LLR
// is bilinearly interpolated between them, and the result is divided by
// 2^(2F) with rounding to a DOUT_W-bit signed LLR.
//
// I and Q are signed two's complement. Grid index k (the top bits read as
// an unsigned number) stands for the value signed(k)*2^F, so the LUT is
// addressed {Q index, I index} in two's complement order. The upper corner
// is index+1, except in the last cell below the most positive value, where
// the upper corner is the lower one itself (the interpolation then degrades
// to the stored value along that axis).
//
// Interface (follows the reference core's entity):
//   symbol_data   {Q, I}, Q in the upper DIN_W bits
//   bps           bits per symbol of the current modulation (2..MAX_BPS);
//                 LLR fields k >= bps are output as zero (own choice)
//   din_valid, eob_in, din_rdy        input handshake
//   llr_data, dout_valid, eob_out, dout_rdy   output handshake
//   lut_wr, lut_wr_addr, lut_wr_data  table load port, written into all
//                 four copies; word layout as in llr_lut_ram
// Flow control: the whole pipeline advances on every cycle dout_rdy is high
// and freezes when it is low; din_rdy is dout_rdy. Data is computed whether
// or not it is valid; the valid and EOB flags travel in llr_flag_pipe.
// Timing: CORE_LATENCY = 8 advancing cycles from input to output, one symbol
// per cycle. Only the flag pipelines, the modulation pipeline and the
// rounding stage are reset; the data registers and the tables are not.
module llr_core
  import llr_pkg::*;
#(
  parameter int unsigned DIN_W   = DIN_W_DEF,
  parameter int unsigned DOUT_W  = DOUT_W_DEF,
  parameter int unsigned MAX_BPS = MAX_BPS_DEF,
  parameter int unsigned LUT_W   = LUT_W_DEF,
  localparam int unsigned F      = DIN_W - LUT_W,
  localparam int unsigned BPS_W  = bps_width(MAX_BPS),
  localparam int unsigned ADDR_W = 2*LUT_W,
  localparam int unsigned WORD_W = MAX_BPS*DOUT_W,
  localparam int unsigned PW     = DOUT_W + 2*F + 4
) (
  input  logic                clk,
  input  logic                rst,
  input  logic [BPS_W-1:0]    bps,
  input  logic [2*DIN_W-1:0]  symbol_data,
  input  logic                eob_in,
  input  logic                din_valid,
  output logic                din_rdy,
  output logic [WORD_W-1:0]   llr_data,
  output logic                eob_out,
  output logic                dout_valid,
  input  logic                dout_rdy,
  input  logic [WORD_W-1:0]   lut_wr_data,
  input  logic [ADDR_W-1:0]   lut_wr_addr,
  input  logic                lut_wr
);

  localparam logic [LUT_W-1:0] TOP_IDX = LUT_W'(2**(LUT_W-1) - 1);
  localparam logic [DIN_W-1:0] R_MASK  = DIN_W'(2**F - 1);

  logic en;
  assign en      = dout_rdy;
  assign din_rdy = dout_rdy;

  // ---------------------------------------------------------------------
  // Stage 1: grid coordinates and remainders
  // ---------------------------------------------------------------------
  logic [DIN_W-1:0] in_i, in_q;
  assign in_i = symbol_data[DIN_W-1:0];
  assign in_q = symbol_data[2*DIN_W-1:DIN_W];

  logic [LUT_W-1:0] i_top, q_top;
  assign i_top = LUT_W'(in_i >> F);
  assign q_top = LUT_W'(in_q >> F);

  logic [LUT_W-1:0] i_l, i_h, q_l, q_h;
  logic [F:0]       r_i, r_q;

  always_ff @(posedge clk) begin
    if (en) begin
      i_l <= i_top;
      q_l <= q_top;
      i_h <= (i_top == TOP_IDX) ? i_top : i_top + 1'b1;
      q_h <= (q_top == TOP_IDX) ? q_top : q_top + 1'b1;
      r_i <= (F+1)'(in_i & R_MASK);
      r_q <= (F+1)'(in_q & R_MASK);
    end
  end

  // ---------------------------------------------------------------------
  // Stage 2: four simultaneous LUT reads
  // ---------------------------------------------------------------------
  logic [WORD_W-1:0] w_ll, w_hl, w_lh, w_hh;   // w_<q><i>
  logic [F:0]        r_i_d, r_q_d;

  llr_lut_ram #(.ADDR_W(ADDR_W), .DATA_W(WORD_W)) u_lut_ll (
    .clk, .wr_en(lut_wr), .wr_addr(lut_wr_addr), .wr_data(lut_wr_data),
    .rd_en(en), .rd_addr({q_l, i_l}), .rd_data(w_ll));
  llr_lut_ram #(.ADDR_W(ADDR_W), .DATA_W(WORD_W)) u_lut_hl (
    .clk, .wr_en(lut_wr), .wr_addr(lut_wr_addr), .wr_data(lut_wr_data),
    .rd_en(en), .rd_addr({q_h, i_l}), .rd_data(w_hl));
  llr_lut_ram #(.ADDR_W(ADDR_W), .DATA_W(WORD_W)) u_lut_lh (
    .clk, .wr_en(lut_wr), .wr_addr(lut_wr_addr), .wr_data(lut_wr_data),
    .rd_en(en), .rd_addr({q_l, i_h}), .rd_data(w_lh));
  llr_lut_ram #(.ADDR_W(ADDR_W), .DATA_W(WORD_W)) u_lut_hh (
    .clk, .wr_en(lut_wr), .wr_addr(lut_wr_addr), .wr_data(lut_wr_data),
    .rd_en(en), .rd_addr({q_h, i_h}), .rd_data(w_hh));

  always_ff @(posedge clk) begin
    if (en) begin
      r_i_d <= r_i;
      r_q_d <= r_q;
    end
  end

  // ---------------------------------------------------------------------
  // Stages 3-6: bilinear interpolation, one unit per bit position
  // ---------------------------------------------------------------------
  logic signed [PW-1:0] llr_wide [MAX_BPS];

  for (genvar k = 0; k < MAX_BPS; k++) begin : g_bit
    llr_bilinear_interp #(.DOUT_W(DOUT_W), .F(F)) u_interp (
      .clk, .en,
      .x_ll(w_ll[k*DOUT_W +: DOUT_W]),
      .x_lh(w_lh[k*DOUT_W +: DOUT_W]),
      .x_hl(w_hl[k*DOUT_W +: DOUT_W]),
      .x_hh(w_hh[k*DOUT_W +: DOUT_W]),
      .ri(r_i_d), .rq(r_q_d),
      .llr(llr_wide[k]));
  end

  // ---------------------------------------------------------------------
  // Stages 7-8: rounding and saturation
  // ---------------------------------------------------------------------
  logic [WORD_W-1:0] llr_rounded;

  llr_round_sat #(.DIN_W(PW), .DOUT_W(DOUT_W), .SHIFT(2*F), .COUNT(MAX_BPS)) u_round (
    .clk, .rst, .en, .din(llr_wide), .dout(llr_rounded));

  // ---------------------------------------------------------------------
  // Valid / EOB pipelines and the modulation of each symbol in flight
  // ---------------------------------------------------------------------
  llr_flag_pipe #(.DEPTH(CORE_LATENCY)) u_flags (
    .clk, .rst, .en,
    .valid_in(din_valid), .eob_in(eob_in),
    .valid_out(dout_valid), .eob_out(eob_out));

  logic [BPS_W-1:0] bps_q [CORE_LATENCY];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int s = 0; s < CORE_LATENCY; s++) bps_q[s] <= '0;
    end else if (en) begin
      bps_q[0] <= bps;
      for (int s = 1; s < CORE_LATENCY; s++) bps_q[s] <= bps_q[s-1];
    end
  end

  always_comb begin
    for (int k = 0; k < MAX_BPS; k++)
      llr_data[k*DOUT_W +: DOUT_W] =
        (k < int'(bps_q[CORE_LATENCY-1])) ? llr_rounded[k*DOUT_W +: DOUT_W] : '0;
  end

  // ---------------------------------------------------------------------
  // Handshake rules
  // ---------------------------------------------------------------------
  // While the consumer is not ready, the output must hold.
  a_hold_on_stall: assert property (@(posedge clk) disable iff (rst)
    !dout_rdy |=> ($stable(llr_data) && $stable(dout_valid) && $stable(eob_out)));
  // The core accepts exactly when the consumer accepts.
  a_rdy_follows: assert property (@(posedge clk) din_rdy == dout_rdy);

endmodule
