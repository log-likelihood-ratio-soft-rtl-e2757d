// tb_llr_core: self-checking test of the LLR core.
// Runs llr_core_harness at the default LUT width 5 and at widths 1, 3 and 8
// (the range the core is meant to support), all four modulations and all
// three flow-control patterns each, and requires that stalls, input bubbles,
// EOB flags, clamped edge cells and modulation switches all occurred.
module tb_llr_core;
  logic clk = 0;
  always #5 clk = ~clk;

  localparam int NH = 4;
  logic done [NH];
  int checks [NH], failures [NH], n_stall [NH], n_bubble [NH], n_eob [NH], n_clamp [NH], n_switch [NH];

  llr_core_harness #(.LUT_W(5), .N_SYM(1500)) h5 (.clk, .done(done[0]), .checks(checks[0]), .failures(failures[0]),
    .n_stall(n_stall[0]), .n_bubble(n_bubble[0]), .n_eob(n_eob[0]), .n_clamp(n_clamp[0]), .n_switch(n_switch[0]));
  llr_core_harness #(.LUT_W(1), .N_SYM(300)) h1 (.clk, .done(done[1]), .checks(checks[1]), .failures(failures[1]),
    .n_stall(n_stall[1]), .n_bubble(n_bubble[1]), .n_eob(n_eob[1]), .n_clamp(n_clamp[1]), .n_switch(n_switch[1]));
  llr_core_harness #(.LUT_W(3), .N_SYM(300)) h3 (.clk, .done(done[2]), .checks(checks[2]), .failures(failures[2]),
    .n_stall(n_stall[2]), .n_bubble(n_bubble[2]), .n_eob(n_eob[2]), .n_clamp(n_clamp[2]), .n_switch(n_switch[2]));
  llr_core_harness #(.LUT_W(8), .N_SYM(300)) h8 (.clk, .done(done[3]), .checks(checks[3]), .failures(failures[3]),
    .n_stall(n_stall[3]), .n_bubble(n_bubble[3]), .n_eob(n_eob[3]), .n_clamp(n_clamp[3]), .n_switch(n_switch[3]));

  int tc, tf;
  initial begin
    @(posedge clk);
    wait (done[0] && done[1] && done[2] && done[3]);
    tc = 0; tf = 0;
    for (int h = 0; h < NH; h++) begin
      $display("harness %0d: checks=%0d failures=%0d stalls=%0d bubbles=%0d eob=%0d clamp=%0d switch=%0d",
               h, checks[h], failures[h], n_stall[h], n_bubble[h], n_eob[h], n_clamp[h], n_switch[h]);
      tc += checks[h] + 5; tf += failures[h];
      if (n_stall[h] == 0) tf++;
      if (n_bubble[h] == 0) tf++;
      if (n_eob[h] == 0) tf++;
      if (n_clamp[h] == 0) tf++;
      if (n_switch[h] < 3) tf++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", tc, tf);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", tc, tf + 1);
    $finish;
  end
endmodule
