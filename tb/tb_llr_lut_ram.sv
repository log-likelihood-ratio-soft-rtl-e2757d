// tb_llr_lut_ram: self-checking test of one LUT copy.
// Fills the whole table with random words through the write port, then reads
// random addresses and checks the word one cycle later, that rd_data holds
// while rd_en is low, and that a read of the address being written returns
// the old word. A shadow array is the reference.
module tb_llr_lut_ram;
  localparam int AW = 10, DW = 30;
  logic clk = 0;
  always #5 clk = ~clk;

  logic wr_en = 0, rd_en = 0;
  logic [AW-1:0] wr_addr = '0, rd_addr = '0;
  logic [DW-1:0] wr_data = '0, rd_data;
  logic [DW-1:0] shadow [2**AW];
  int checks = 0, failures = 0;

  llr_lut_ram #(.ADDR_W(AW), .DATA_W(DW)) dut (.*);

  task automatic check(logic [DW-1:0] got, logic [DW-1:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    // load
    for (int a = 0; a < 2**AW; a++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = AW'(a); wr_data = DW'($urandom);
      shadow[a] = wr_data;
    end
    @(negedge clk); wr_en = 0;
    // random reads, one-cycle latency
    for (int n = 0; n < 3000; n++) begin
      logic [AW-1:0] a;
      a = AW'($urandom);
      rd_en = 1; rd_addr = a;
      @(posedge clk); #1;
      check(rd_data, shadow[a], "read");
      // hold while rd_en is low
      if ($urandom_range(0, 3) == 0) begin
        @(negedge clk); rd_en = 0; rd_addr = ~a;
        @(posedge clk); #1;
        check(rd_data, shadow[a], "hold");
      end
      @(negedge clk);
    end
    // read during write of the same address returns the old word
    for (int n = 0; n < 200; n++) begin
      logic [AW-1:0] a;
      logic [DW-1:0] d;
      a = AW'($urandom); d = DW'($urandom);
      rd_en = 1; rd_addr = a; wr_en = 1; wr_addr = a; wr_data = d;
      @(posedge clk); #1;
      check(rd_data, shadow[a], "read-first");
      shadow[a] = d;
      @(negedge clk); wr_en = 0;
      @(posedge clk); #1;
      check(rd_data, d, "after write");
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
