// tb_llr_slice: end-to-end test of the demapper slice at its default sizes
// (two lanes, 8-bit I/Q, 6-bit LLRs, LUT width 5).
//
// For each DVB-S2 modulation the testbench builds the MAX-log table, loads
// it into every lane through the shared write port, and streams whole
// FECFRAMEs through both lanes: a normal frame (64800 coded bits) for QPSK,
// 8PSK, 16APSK and 32APSK, then a short frame (16200 bits) for QPSK after a
// switch back. The end-of-block flag marks the last beat of each frame.
// Within a frame the flow control cycles through T0 (always valid/ready),
// T1 (input valid toggling) and T2 (output ready toggling).
// Symbols are a mix of noiseless constellation points, uniformly random
// points and points in the clamped top-edge cells. Every output word is
// compared with the floating-point reference interpolation of the same
// table; each symbol must leave 8 advancing cycles after it entered; for
// noiseless symbols the sign of every LLR must give back the sent bit.
// Each mechanism (stall, bubble, EOB, modulation switch, clamped cell,
// rounding up, unused-field masking) must occur at least once.
module tb_llr_slice;
  import llr_tb_pkg::*;
  localparam int P = 2, DIN_W = 8, DOUT_W = 6, MAX_BPS = 5, LUT_W = 5;
  localparam int F = DIN_W - LUT_W;
  localparam int WORD_W = MAX_BPS * DOUT_W;

  logic clk = 0;
  always #5 clk = ~clk;

  logic rst = 1;
  logic [2:0] bps = 3'd2;
  logic [P-1:0][2*DIN_W-1:0] symbol_data = '0;
  logic eob_in = 0, din_valid = 0, din_rdy, eob_out, dout_valid, dout_rdy = 1;
  logic [P-1:0][WORD_W-1:0] llr_data;
  logic [WORD_W-1:0] lut_wr_data = '0;
  logic [2*LUT_W-1:0] lut_wr_addr = '0;
  logic lut_wr = 0;

  llr_slice dut (.*);

  typedef struct {
    int llr [P][MAX_BPS];
    int bits [P];        // sent label, or -1 when not a noiseless point
    logic eob;
    int tick;
  } exp_t;

  exp_t exp_q [$];
  int tbl [][];
  int ticks = 0, cur_bps = 2;
  int checks = 0, failures = 0;
  int n_stall = 0, n_bubble = 0, n_eob = 0, n_switch = 0, n_clamp = 0;
  int n_round_up = 0, n_masked = 0, n_noiseless = 0, n_frames_sent = 0;
  int cur_bits [P];

  task automatic fail(string msg);
    failures++;
    if (failures < 15) $display("FAIL %s", msg);
  endtask

  always @(posedge clk) begin
    if (!rst) begin
      if (!dout_rdy) n_stall++;
      if (dout_rdy && !din_valid && !lut_wr) n_bubble++;
      if (dout_valid && dout_rdy) begin
        if (exp_q.size() == 0) fail("output with nothing expected");
        else begin
          exp_t e;
          e = exp_q.pop_front();
          checks++;
          if (ticks - e.tick != 8) fail($sformatf("latency %0d", ticks - e.tick));
          checks++;
          if (eob_out !== e.eob) fail("eob");
          if (eob_out) n_eob++;
          for (int p = 0; p < P; p++)
            for (int k = 0; k < MAX_BPS; k++) begin
              int got;
              got = int'($signed(llr_data[p][k*DOUT_W +: DOUT_W]));
              checks++;
              if (got != e.llr[p][k])
                fail($sformatf("bps=%0d lane %0d bit %0d got %0d exp %0d", cur_bps, p, k, got, e.llr[p][k]));
              if (e.bits[p] >= 0 && k < cur_bps) begin
                checks++;
                if ((got > 0) != e.bits[p][k] || got == 0)
                  fail($sformatf("decision bps=%0d lane %0d bit %0d llr %0d sent %0d", cur_bps, p, k, got, e.bits[p]));
              end
            end
        end
      end
      if (din_valid && din_rdy) begin
        exp_t e;
        for (int p = 0; p < P; p++) begin
          int iv, qv;
          iv = int'(symbol_data[p][DIN_W-1:0]);
          qv = int'(symbol_data[p][2*DIN_W-1:DIN_W]);
          for (int k = 0; k < MAX_BPS; k++) begin
            if (k < cur_bps) begin
              real r;
              r = ref_llr_real(tbl, k, iv, qv, LUT_W, DIN_W);
              e.llr[p][k] = sat(round_away(r), -32, 31);
              if (e.llr[p][k] != int'($floor(r)) && e.llr[p][k] > 0) n_round_up++;
            end else begin
              e.llr[p][k] = 0;
              n_masked++;
            end
          end
          e.bits[p] = cur_bits[p];
          if ((iv >> F) == (1 << (LUT_W-1)) - 1 || (qv >> F) == (1 << (LUT_W-1)) - 1) n_clamp++;
        end
        e.eob = eob_in;
        e.tick = ticks;
        exp_q.push_back(e);
      end
      if (dout_rdy) ticks++;
    end
  end

  function automatic logic [2*DIN_W-1:0] pick(int lane, int n, int m);
    int i, q, idx;
    real re, im;
    cur_bits[lane] = -1;
    case ($urandom_range(0, 3))
      0, 1: begin  // noiseless constellation point
        idx = $urandom_range(0, (1 << m) - 1);
        const_point(m, idx, re, im);
        i = round_away(re); q = round_away(im);
        cur_bits[lane] = idx;
        n_noiseless++;
      end
      2: begin i = $urandom_range(0, 255); q = $urandom_range(0, 255); end
      default: begin
        i = 128 - $urandom_range(1, 1 << F);
        q = $urandom_range(0, 255);
      end
    endcase
    return {DIN_W'(q), DIN_W'(i)};
  endfunction

  task automatic load_table(int m);
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
  endtask

  // one FECFRAME of 'frame_bits' coded bits at 'm' bits per symbol
  task automatic send_frame(int m, int frame_bits);
    int beats, sent, t;
    beats = frame_bits / m / P;
    sent = 0;
    while (sent < beats) begin
      t = (sent / 500) % 3;
      din_valid = (t == 1) ? 1'($urandom_range(0, 1)) : 1'b1;
      dout_rdy  = (t == 2) ? 1'($urandom_range(0, 1)) : 1'b1;
      for (int p = 0; p < P; p++) symbol_data[p] = pick(p, sent, m);
      eob_in = (sent == beats - 1);
      @(posedge clk);
      if (din_valid && din_rdy) sent++;
      @(negedge clk);
    end
    din_valid = 0; eob_in = 0; dout_rdy = 1;
    n_frames_sent++;
  endtask

  initial begin
    for (int p = 0; p < P; p++) cur_bits[p] = -1;
    repeat (4) @(negedge clk);
    rst = 0;
    for (int m = 2; m <= MAX_BPS; m++) begin
      load_table(m);
      send_frame(m, 64800);
    end
    load_table(2);
    send_frame(2, 16200);
    repeat (12) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) fail("symbols left in flight");
    $display("stalls=%0d bubbles=%0d eob=%0d/%0d switches=%0d clamped=%0d round_up=%0d masked=%0d noiseless=%0d",
             n_stall, n_bubble, n_eob, n_frames_sent, n_switch, n_clamp, n_round_up, n_masked, n_noiseless);
    checks += 8;
    if (n_stall == 0) fail("no stall");
    if (n_bubble == 0) fail("no input bubble");
    if (n_eob != n_frames_sent) fail("EOB count");
    if (n_switch < 4) fail("modulation switches");
    if (n_clamp == 0) fail("no clamped cell");
    if (n_round_up == 0) fail("no rounding up");
    if (n_masked == 0) fail("no masked field");
    if (n_noiseless == 0) fail("no noiseless symbol");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
