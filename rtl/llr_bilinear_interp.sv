// llr_bilinear_interp: bilinear interpolation of one bit's LLR.
//
// The LUT holds LLRs only on a grid whose points are 2^F apart in I and in Q
// (F = input width - LUT width). For a received point inside a grid cell
// with corners (I1,Q1)..(I2,Q2) and remainders ri = I - I1, rq = Q - Q1,
// this unit computes, without dividing,
//   R1 = x_lh*ri + x_ll*(2^F - ri)      (along I at the lower Q, Eq. 7)
//   R2 = x_hh*ri + x_hl*(2^F - ri)      (along I at the upper Q, Eq. 8)
//   P  = R2*rq  + R1*(2^F - rq)         (along Q, Eq. 9)
// P is the interpolated LLR times 2^(2F); the division by 2^(2F) with
// rounding is done afterwards by llr_round_sat. Naming: x_<q><i> with l/h
// for the lower/upper grid index, e.g. x_lh is at (Q1, I2).
//
// Timing: four register stages (I products, I sums, Q products, Q sum), so
// llr is valid 4 enabled cycles after its inputs. All stages advance only
// when en is high. The remainders ri and rq are presented together with the
// corner values; rq is delayed internally to meet the I sums. This split of
// the arithmetic into stages follows the reference core; the module boundary
// is this design's own.
module llr_bilinear_interp #(
  parameter int unsigned DOUT_W = 6,            // width of a stored LLR
  parameter int unsigned F      = 3,            // remainder bits
  localparam int unsigned RW    = F + 2,        // signed weight width
  localparam int unsigned SW    = DOUT_W + F + 2,
  localparam int unsigned PW    = DOUT_W + 2*F + 4
) (
  input  logic                     clk,
  input  logic                     en,
  input  logic signed [DOUT_W-1:0] x_ll,
  input  logic signed [DOUT_W-1:0] x_lh,
  input  logic signed [DOUT_W-1:0] x_hl,
  input  logic signed [DOUT_W-1:0] x_hh,
  input  logic        [F:0]        ri,     // 0 .. 2^F
  input  logic        [F:0]        rq,     // 0 .. 2^F
  output logic signed [PW-1:0]     llr
);

  localparam logic signed [RW-1:0] ONE = RW'(2**F);

  logic signed [RW-1:0] wi, wi_m;
  assign wi   = $signed({1'b0, ri});
  assign wi_m = ONE - wi;

  // stage 1: products along I
  logic signed [SW-1:0] l_left, l_right, h_left, h_right;
  logic        [F:0]    rq_d1;
  // stage 2: sums along I
  logic signed [SW-1:0] s_l, s_h;
  logic        [F:0]    rq_d2;
  // stage 3: products along Q
  logic signed [PW-1:0] p_up, p_dn;

  logic signed [RW-1:0] wq, wq_m;
  assign wq   = $signed({1'b0, rq_d2});
  assign wq_m = ONE - wq;

  always_ff @(posedge clk) begin
    if (en) begin
      l_left  <= x_lh * wi;
      l_right <= x_ll * wi_m;
      h_left  <= x_hh * wi;
      h_right <= x_hl * wi_m;
      rq_d1   <= rq;

      s_l   <= l_left + l_right;
      s_h   <= h_left + h_right;
      rq_d2 <= rq_d1;

      p_up <= s_h * wq;
      p_dn <= s_l * wq_m;

      llr <= p_up + p_dn;
    end
  end

endmodule
