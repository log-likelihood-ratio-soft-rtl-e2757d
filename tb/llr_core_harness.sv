// llr_core_harness: drives and checks one llr_core at a given LUT width.
//
// For each modulation (BPS 2..5) the harness builds the MAX-log table with
// the table-generator model, loads it through the write port, and streams
// N_SYM symbols through the core in three flow-control patterns: T0 (input
// always valid, output always ready), T1 (input valid toggling randomly) and
// T2 (output ready toggling randomly). Every accepted symbol's expected LLRs
// come from the floating-point reference interpolation; outputs are matched
// in order, together with the EOB flag, LLR fields above the modulation's BPS
// must be zero, and each symbol must leave exactly 8 advancing cycles after
// it was accepted. Symbols include random points, grid points and the cells
// at the most positive edge where the upper corner is clamped.
// Results are reported on the output ports when done rises.
module llr_core_harness #(
  parameter int LUT_W = 5,
  parameter int N_SYM = 600
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures,
  output int   n_stall,     // cycles with the output not ready
  output int   n_bubble,    // cycles with no valid input
  output int   n_eob,       // EOB flags delivered
  output int   n_clamp,     // symbols in a clamped edge cell
  output int   n_switch     // modulation changes with table reloads
);
  import llr_tb_pkg::*;
  localparam int DIN_W = 8, DOUT_W = 6, MAX_BPS = 5;
  localparam int F = DIN_W - LUT_W;
  localparam int WORD_W = MAX_BPS * DOUT_W;

  logic rst = 1;
  logic [2:0] bps = 3'd2;
  logic [2*DIN_W-1:0] symbol_data = '0;
  logic eob_in = 0, din_valid = 0, din_rdy, eob_out, dout_valid, dout_rdy = 1;
  logic [WORD_W-1:0] llr_data, lut_wr_data = '0;
  logic [2*LUT_W-1:0] lut_wr_addr = '0;
  logic lut_wr = 0;

  llr_core #(.LUT_W(LUT_W)) dut (.*);

  typedef struct { int llr [MAX_BPS]; logic eob; int tick; } exp_t;
  exp_t exp_q [$];
  int tbl [][];
  int ticks = 0;
  int cur_bps = 2;

  initial begin
    done = 0; checks = 0; failures = 0;
    n_stall = 0; n_bubble = 0; n_eob = 0; n_clamp = 0; n_switch = 0;
  end

  // scoreboard
  always @(posedge clk) begin
    if (!rst) begin
      if (!dout_rdy) n_stall++;
      if (dout_rdy && !din_valid) n_bubble++;
      if (dout_valid && dout_rdy) begin
        if (exp_q.size() == 0) begin
          failures++;
          $display("FAIL LUT_W=%0d unexpected output", LUT_W);
        end else begin
          exp_t e;
          e = exp_q.pop_front();
          checks++;
          if (ticks - e.tick != 8) begin
            failures++;
            if (failures < 10) $display("FAIL LUT_W=%0d latency %0d", LUT_W, ticks - e.tick);
          end
          checks++;
          if (eob_out !== e.eob) failures++;
          if (eob_out) n_eob++;
          for (int k = 0; k < MAX_BPS; k++) begin
            int got;
            got = int'($signed(llr_data[k*DOUT_W +: DOUT_W]));
            checks++;
            if (got != e.llr[k]) begin
              failures++;
              if (failures < 10)
                $display("FAIL LUT_W=%0d bps=%0d bit %0d got %0d exp %0d", LUT_W, cur_bps, k, got, e.llr[k]);
            end
          end
        end
      end
      if (din_valid && din_rdy) begin
        exp_t e;
        int iv, qv;
        iv = int'(symbol_data[DIN_W-1:0]);
        qv = int'(symbol_data[2*DIN_W-1:DIN_W]);
        for (int k = 0; k < MAX_BPS; k++)
          e.llr[k] = (k < cur_bps) ? ref_llr(tbl, k, iv, qv, LUT_W, DIN_W, DOUT_W) : 0;
        e.eob = eob_in;
        e.tick = ticks;
        if ((iv >> F) == (1 << (LUT_W-1)) - 1 || (qv >> F) == (1 << (LUT_W-1)) - 1) n_clamp++;
        exp_q.push_back(e);
      end
      if (dout_rdy) ticks++;
    end
  end

  function automatic logic [2*DIN_W-1:0] pick_symbol(int n);
    int i, q;
    case (n % 4)
      0, 1: begin i = $urandom_range(0, 255); q = $urandom_range(0, 255); end
      2: begin  // top edge cells (clamped upper corner)
        i = 128 - $urandom_range(1, 1 << F);
        q = $urandom_range(0, 255);
        if ($urandom_range(0, 1)) begin q = i; i = $urandom_range(0, 255); end
      end
      default: begin  // exact grid points and extremes
        i = ($urandom_range(0, 255) >> F) << F;
        q = ($urandom_range(0, 255) >> F) << F;
        if (n % 16 == 3) begin i = 127; q = 128; end
      end
    endcase
    return {DIN_W'(q), DIN_W'(i)};
  endfunction

  initial begin
    repeat (4) @(negedge clk);
    rst = 0;
    for (int m = 2; m <= MAX_BPS; m++) begin
      // wait for the pipeline to drain, then reload the table
      din_valid = 0; dout_rdy = 1;
      repeat (12) @(negedge clk);
      build_lut(m, LUT_W, DIN_W, MAX_BPS, tbl);
      for (int a = 0; a < (1 << (2*LUT_W)); a++) begin
        lut_wr = 1;
        lut_wr_addr = (2*LUT_W)'(a);
        for (int k = 0; k < MAX_BPS; k++) lut_wr_data[k*DOUT_W +: DOUT_W] = DOUT_W'(tbl[a][k]);
        @(negedge clk);
      end
      lut_wr = 0;
      bps = 3'(m);
      if (cur_bps != m) n_switch++;
      cur_bps = m;
      for (int t = 0; t < 3; t++) begin
        int sent;
        sent = 0;
        while (sent < N_SYM) begin
          din_valid = (t == 1) ? 1'($urandom_range(0, 1)) : 1'b1;
          dout_rdy  = (t == 2) ? 1'($urandom_range(0, 1)) : 1'b1;
          symbol_data = pick_symbol(sent);
          eob_in = (sent % 97 == 96);
          @(posedge clk);
          if (din_valid && din_rdy) sent++;
          @(negedge clk);
        end
      end
      din_valid = 0; dout_rdy = 1;
      repeat (12) @(negedge clk);
    end
    if (exp_q.size() != 0) failures++;
    done = 1;
  end
endmodule
