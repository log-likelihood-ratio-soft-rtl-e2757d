// llr_flag_pipe: the data-valid and end-of-block pipelines of the core.
//
// The core computes on every cycle it is allowed to advance, whether or not
// the input is valid; these two shift registers carry the input valid flag
// and the end-of-block (EOB) flag alongside the data so that both leave with
// the LLRs of their symbol. The EOB flag is not used by the demapper itself,
// it is only passed on to the decoder.
//
// Interface: en advances both pipelines by one stage (it is the downstream
// ready, so a stall freezes them); rst clears them synchronously. The
// outputs are the last of DEPTH stages, so a flag leaves DEPTH advancing
// cycles after it entered.
module llr_flag_pipe #(
  parameter int unsigned DEPTH = 8
) (
  input  logic clk,
  input  logic rst,
  input  logic en,
  input  logic valid_in,
  input  logic eob_in,
  output logic valid_out,
  output logic eob_out
);

  logic [DEPTH-1:0] valid_q;
  logic [DEPTH-1:0] eob_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      valid_q <= '0;
      eob_q   <= '0;
    end else if (en) begin
      valid_q <= {valid_q[DEPTH-2:0], valid_in};
      eob_q   <= {eob_q[DEPTH-2:0], eob_in};
    end
  end

  assign valid_out = valid_q[DEPTH-1];
  assign eob_out   = eob_q[DEPTH-1];

endmodule
