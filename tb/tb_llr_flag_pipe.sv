// tb_llr_flag_pipe: self-checking test of the valid/EOB pipelines.
// Drives random valid, EOB and enable (stall) patterns and compares both
// outputs with a reference shift register model every cycle; checks that a
// flag leaves exactly 8 enabled cycles after it entered and that reset
// clears the pipelines.
module tb_llr_flag_pipe;
  localparam int DEPTH = 8;
  logic clk = 0;
  always #5 clk = ~clk;

  logic rst = 1, en = 0, valid_in = 0, eob_in = 0, valid_out, eob_out;
  logic [DEPTH-1:0] mv, me;
  int checks = 0, failures = 0;
  int ticks = 0, latency_checks = 0;
  int t_in [$];

  llr_flag_pipe #(.DEPTH(DEPTH)) dut (.*);

  always @(posedge clk) begin
    if (!rst) begin
      checks++;
      if (valid_out !== mv[DEPTH-1] || eob_out !== me[DEPTH-1]) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0t v=%b/%b e=%b/%b", $time, valid_out, mv[DEPTH-1], eob_out, me[DEPTH-1]);
      end
      if (en) begin
        if (valid_out) begin
          checks++; latency_checks++;
          if (t_in.size() == 0 || ticks - t_in.pop_front() != DEPTH) failures++;
        end
        if (valid_in) t_in.push_back(ticks);
        ticks++;
        mv = {mv[DEPTH-2:0], valid_in};
        me = {me[DEPTH-2:0], eob_in};
      end
    end else begin
      mv = '0; me = '0;
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      en = ($urandom_range(0, 3) != 0);
      valid_in = $urandom_range(0, 1);
      eob_in = ($urandom_range(0, 5) == 0);
    end
    // reset in the middle of traffic clears everything
    @(negedge clk); rst = 1; valid_in = 1; en = 1;
    @(negedge clk); rst = 0; valid_in = 0;
    t_in.delete();
    @(posedge clk); #1;
    checks++;
    if (valid_out !== 1'b0 || eob_out !== 1'b0) failures++;
    if (latency_checks < 1000) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
