// llr_round_sat: rounding and saturation of the interpolated LLRs.
//
// Each of COUNT signed inputs is divided by 2^SHIFT and rounded to the
// nearest integer, ties away from zero (the same rule as the floating-point
// reference model's round()), then saturated to a signed DOUT_W-bit result.
// Dropping the low bits alone would floor the value (22.894 would become 22
// rather than 23); this unit exists to avoid that. The rounding rule and the
// saturation are this design's choice; the reference only says the result is
// rounded rather than floored.
//
// Interface: din is an array of COUNT signed values, dout packs the results
// with element k in bits [k*DOUT_W +: DOUT_W]. Timing: two register stages
// (round, then saturate), both held while en is low; rst clears them.
module llr_round_sat #(
  parameter int unsigned DIN_W  = 16,
  parameter int unsigned DOUT_W = 6,
  parameter int unsigned SHIFT  = 6,
  parameter int unsigned COUNT  = 5
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic                      en,
  input  logic signed [DIN_W-1:0]   din [COUNT],
  output logic [COUNT*DOUT_W-1:0]   dout
);

  localparam int unsigned QW = DIN_W - SHIFT + 1;
  localparam logic signed [DIN_W:0] HALF   = (SHIFT > 0) ? (DIN_W+1)'(2**SHIFT / 2) : '0;
  localparam logic signed [DIN_W:0] HALF_M = (SHIFT > 0) ? HALF - 1 : '0;
  localparam logic signed [QW-1:0] MAXV = QW'(2**(DOUT_W-1) - 1);
  localparam logic signed [QW-1:0] MINV = -QW'(2**(DOUT_W-1));

  logic signed [QW-1:0] q_rnd [COUNT];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < COUNT; k++) q_rnd[k] <= '0;
      dout <= '0;
    end else if (en) begin
      for (int k = 0; k < COUNT; k++) begin
        // one guard bit so that adding the rounding constant cannot overflow
        logic signed [DIN_W:0] biased;
        biased = (DIN_W+1)'(din[k]) + (din[k] < 0 ? HALF_M : HALF);
        q_rnd[k] <= QW'(biased >>> SHIFT);
      end
      for (int k = 0; k < COUNT; k++) begin
        if (q_rnd[k] > MAXV)      dout[k*DOUT_W +: DOUT_W] <= DOUT_W'(MAXV);
        else if (q_rnd[k] < MINV) dout[k*DOUT_W +: DOUT_W] <= DOUT_W'(MINV);
        else                      dout[k*DOUT_W +: DOUT_W] <= DOUT_W'(q_rnd[k]);
      end
    end
  end

endmodule
