// tb_dbuf_bank: self-checking test of a double-buffered bank.
//
// The DMA port fills its half, the halves swap, and the array port must read
// exactly that data one cycle after each address while the DMA port fills
// the other half without disturbing it. Then the roles are checked the other
// way round (array writes, swap, DMA reads).
module tb_dbuf_bank;
  localparam int NW = 16, DEPTH = 32, HALF = DEPTH / 2, AW = $clog2(HALF);
  logic clk = 0, rst_n = 0, swap = 0, sel;
  logic [AW-1:0] a_addr = '0, d_addr = '0;
  logic a_we = 0, d_we = 0;
  logic [NW-1:0] a_wdata = '0, d_wdata = '0, a_rdata, d_rdata;
  logic [NW-1:0] ref0 [HALF], ref1 [HALF];
  int checks = 0, failures = 0;

  dbuf_bank #(.NW(NW), .DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(bit cond, string s);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", s); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    chk(sel == 0, "reset half");
    for (int i = 0; i < HALF; i++) begin   // DMA fills batch 0
      @(negedge clk); d_we = 1; d_addr = AW'(i); d_wdata = NW'($urandom); ref0[i] = d_wdata;
    end
    @(negedge clk); d_we = 0; swap = 1;
    @(negedge clk); swap = 0;
    chk(sel == 1, "swapped");
    // array reads batch 0 while DMA writes batch 1
    for (int i = 0; i < HALF; i++) begin
      @(negedge clk);
      a_addr = AW'(i);
      d_we = 1; d_addr = AW'(HALF - 1 - i); d_wdata = NW'($urandom); ref1[HALF - 1 - i] = d_wdata;
      @(negedge clk);
      d_we = 0;
      chk(a_rdata == ref0[i], $sformatf("array read %0d", i));
    end
    @(negedge clk); swap = 1;
    @(negedge clk); swap = 0;
    for (int i = 0; i < HALF; i++) begin
      @(negedge clk); a_addr = AW'(i);
      @(negedge clk); chk(a_rdata == ref1[i], $sformatf("array read batch 1 word %0d", i));
    end
    // array writes, swap, DMA reads
    for (int i = 0; i < HALF; i++) begin
      @(negedge clk); a_we = 1; a_addr = AW'(i); a_wdata = NW'($urandom); ref0[i] = a_wdata;
    end
    @(negedge clk); a_we = 0; swap = 1;
    @(negedge clk); swap = 0;
    for (int i = 0; i < HALF; i++) begin
      @(negedge clk); d_addr = AW'(i);
      @(negedge clk); chk(d_rdata == ref0[i], $sformatf("DMA read %0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
