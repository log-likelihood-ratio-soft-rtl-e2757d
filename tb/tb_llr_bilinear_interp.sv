// tb_llr_bilinear_interp: self-checking test of the interpolation unit.
// Default core sizes (6-bit LLRs, 3 remainder bits). Random corner values
// and remainders (0..8, including the clamped-cell value 8 never produced by
// the core but legal at the port) are applied with random stalls; the result
// must equal the interpolation equations evaluated in floating point, scaled
// by 2^(2F) = 64, exactly 4 enabled cycles later.
module tb_llr_bilinear_interp;
  localparam int DOUT_W = 6, F = 3, PW = DOUT_W + 2*F + 4;
  logic clk = 0;
  always #5 clk = ~clk;

  logic en = 0;
  logic signed [DOUT_W-1:0] x_ll, x_lh, x_hl, x_hh;
  logic [F:0] ri, rq;
  logic signed [PW-1:0] llr;
  int checks = 0, failures = 0;
  longint exp_q [$];
  longint stage [$];

  llr_bilinear_interp #(.DOUT_W(DOUT_W), .F(F)) dut (.*);

  function automatic longint model(int ll, int lh, int hl, int hh, int wi, int wq);
    real a, b, r1, r2, p, s;
    s  = real'(1 << F);
    a  = real'(wi) / s;
    b  = real'(wq) / s;
    r1 = (1.0 - a) * ll + a * lh;
    r2 = (1.0 - a) * hl + a * hh;
    p  = (1.0 - b) * r1 + b * r2;
    return longint'(p * s * s);
  endfunction

  initial begin
    x_ll = '0; x_lh = '0; x_hl = '0; x_hh = '0; ri = '0; rq = '0;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      x_ll = DOUT_W'($urandom); x_lh = DOUT_W'($urandom);
      x_hl = DOUT_W'($urandom); x_hh = DOUT_W'($urandom);
      if (n < 4) begin
        x_ll = -32; x_lh = -32; x_hl = -32; x_hh = -32;
      end
      ri = (F+1)'($urandom_range(0, 1 << F));
      rq = (F+1)'($urandom_range(0, 1 << F));
      en = ($urandom_range(0, 3) != 0);
      if (en) exp_q.push_back(model(x_ll, x_lh, x_hl, x_hh, ri, rq));
    end
    @(negedge clk); en = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (en) begin
      #1;
      if (exp_q.size() > 0) stage.push_back(exp_q.pop_front());
      if (stage.size() == 4) begin
        longint e;
        e = stage.pop_front();
        checks++;
        if (longint'(llr) != e) begin
          failures++;
          if (failures < 10) $display("FAIL got %0d exp %0d", llr, e);
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
