// llr_pkg: constants and types shared by the LLR soft-decision demapper.
//
// The demapper turns one received DVB-S2 symbol (8-bit signed I and Q) into
// one soft value (log likelihood ratio) per coded bit, for QPSK, 8PSK,
// 16APSK and 32APSK. The default sizes below are the configuration the
// design is built around: 8-bit I/Q inputs, 6-bit signed LLR outputs, up to
// 5 bits per symbol and a 5-bit LUT width (a 32x32 grid of stored LLRs).
// The modulation is selected by its number of bits per symbol (BPS).
package llr_pkg;

  // Default sizes of the core.
  localparam int unsigned DIN_W_DEF   = 8;  // bits of I and of Q
  localparam int unsigned DOUT_W_DEF  = 6;  // bits of one LLR
  localparam int unsigned MAX_BPS_DEF = 5;  // 32APSK
  localparam int unsigned LUT_W_DEF   = 5;  // top bits of I/Q that index the LUT
  localparam int unsigned PAR_DEF     = 2;  // cores run side by side in the slice

  // Registers between a symbol entering and its LLRs leaving the core:
  // 1 coordinate split, 1 LUT read, 4 interpolation, 2 rounding.
  localparam int unsigned CORE_LATENCY = 8;

  // Width of the BPS select port: enough bits to hold MAX_BPS+1.
  function automatic int unsigned bps_width(int unsigned max_bps);
    return $clog2(max_bps + 2);
  endfunction

  // The four DVB-S2 modulations, encoded as their bits per symbol.
  typedef enum logic [2:0] {
    MOD_QPSK   = 3'd2,
    MOD_8PSK   = 3'd3,
    MOD_16APSK = 3'd4,
    MOD_32APSK = 3'd5
  } modulation_e;

endpackage
