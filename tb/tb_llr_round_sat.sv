// tb_llr_round_sat: self-checking test of the rounding unit.
// Uses the core's default sizes (16-bit inputs, divide by 2^6, 6-bit
// outputs, 5 lanes). The reference divides in floating point and rounds
// half away from zero, then saturates to [-32, 31]. Directed values cover
// exact ties, the example of 22.9 rounding to 23, and saturation; random
// values and random stalls cover the rest. Latency must be 2 enabled cycles.
module tb_llr_round_sat;
  import llr_tb_pkg::*;
  localparam int DIN_W = 16, DOUT_W = 6, SHIFT = 6, COUNT = 5;
  logic clk = 0;
  always #5 clk = ~clk;

  logic rst = 1, en = 0;
  logic signed [DIN_W-1:0] din [COUNT];
  logic [COUNT*DOUT_W-1:0] dout;
  int checks = 0, failures = 0, ties = 0, sats = 0;

  llr_round_sat #(.DIN_W(DIN_W), .DOUT_W(DOUT_W), .SHIFT(SHIFT), .COUNT(COUNT)) dut (.*);

  function automatic int model(int v);
    return sat(round_away(real'(v) / 64.0), -32, 31);
  endfunction

  // applies one value per lane and counts ties and saturations
  task automatic push(int v [COUNT]);
    for (int k = 0; k < COUNT; k++) begin
      din[k] = DIN_W'(v[k]);
      if ((v[k] % 32) == 0 && (v[k] % 64) != 0) ties++;
      if (model(v[k]) == 31 || model(v[k]) == -32) sats++;
    end
  endtask

  initial begin
    int v [COUNT];
    for (int k = 0; k < COUNT; k++) din[k] = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      if (n < 8) begin
        // directed: ties, 22.9, saturation
        v = '{32, -32, 96, -96, 1466};
        if (n == 1) v = '{2048, -2048, 30000, -30000, 1983};
        if (n == 2) v = '{31, -31, 33, -33, 0};
        if (n == 3) v = '{32767, -32768, 64, -64, 1465};
      end else begin
        for (int k = 0; k < COUNT; k++) v[k] = $urandom_range(0, 1) ? int'($urandom_range(0, 4000)) - 2000
                                                                     : int'($urandom_range(0, 65535)) - 32768;
      end
      en = ($urandom_range(0, 4) != 0) || n < 8;
      if (en) push(v);
    end
    for (int n = 0; n < 3; n++) begin
      @(negedge clk); en = 1;
      v = '{0, 0, 0, 0, 0};
      push(v);
    end
    @(negedge clk); en = 0;
    $display("ties=%0d saturations=%0d", ties, sats);
    if (ties == 0 || sats == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // scoreboard: the value captured on enabled edge t leaves on enabled edge
  // t+1 (two register stages), so after each enabled edge dout must hold
  // the model of the input sampled one enabled edge earlier
  logic [COUNT*DOUT_W-1:0] hist [$];
  always @(posedge clk) begin
    if (!rst && en) begin
      logic [COUNT*DOUT_W-1:0] e;
      for (int k = 0; k < COUNT; k++) e[k*DOUT_W +: DOUT_W] = DOUT_W'(model(int'(din[k])));
      hist.push_back(e);
      #1;
      if (hist.size() >= 2) begin
        e = hist[hist.size()-2];
        for (int k = 0; k < COUNT; k++) begin
          int got, exp_v;
          got   = int'($signed(dout[k*DOUT_W +: DOUT_W]));
          exp_v = int'($signed(e[k*DOUT_W +: DOUT_W]));
          checks++;
          if (got != exp_v) begin
            failures++;
            if (failures < 10) $display("FAIL lane %0d got %0d exp %0d", k, got, exp_v);
          end
        end
      end
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
