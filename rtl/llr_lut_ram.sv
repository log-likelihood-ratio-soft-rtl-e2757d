// llr_lut_ram: one copy of the LLR lookup table.
//
// Each word holds the stored LLRs of all bit positions of one grid point of
// the I/Q plane: MAX_BPS fields of DOUT_W bits, field k in bits
// [k*DOUT_W +: DOUT_W]. The address is {Q grid index, I grid index}, each
// LUT_W bits wide, so there are 2^(2*LUT_W) words (1024 x 30 bits at the
// default sizes). The core keeps four copies so that the four corners of an
// interpolation cell are read in the same cycle.
//
// Interface: a write port used to load the table (wr_en, wr_addr, wr_data)
// and a read port with a one-cycle registered output (rd_en, rd_addr,
// rd_data); rd_data holds while rd_en is low. Reading the address being
// written returns the old word. The table is filled by the host, not reset.
module llr_lut_ram #(
  parameter int unsigned ADDR_W = 10,
  parameter int unsigned DATA_W = 30
) (
  input  logic              clk,
  input  logic              wr_en,
  input  logic [ADDR_W-1:0] wr_addr,
  input  logic [DATA_W-1:0] wr_data,
  input  logic              rd_en,
  input  logic [ADDR_W-1:0] rd_addr,
  output logic [DATA_W-1:0] rd_data
);

  logic [DATA_W-1:0] mem [2**ADDR_W];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    if (rd_en) rd_data <= mem[rd_addr];
  end

endmodule
