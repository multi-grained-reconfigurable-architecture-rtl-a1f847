// tb_data_buffer: self-checking test of the input/output data buffer on a
// reduced 8x2 array (4 banks per side, 8 words per half).
//
// Input side: the DMA fills every bank, reports done (ib_full must rise), the
// halves swap (ib_full must drop) and lockstep reads must return word n of
// every bank with ib_rvalid one cycle after rd_en, while the DMA already fills
// the next batch. Output side: random per-bank writes land at each bank's own
// pointer; after the swap the DMA reads them back; ob_free follows the
// swap/done handshake.
module tb_data_buffer;
  localparam int NW = 16, ROWS = 8, COLS = 2, G = 4, DEPTH = 16;
  localparam int NBANK = (ROWS / G) * COLS, BW = $clog2(NBANK), AW = $clog2(DEPTH / 2);
  localparam int HALF = DEPTH / 2;

  logic clk = 0, rst_n = 0;
  logic ib_swap = 0, ob_swap = 0, ib_full, ob_free;
  logic rd_en = 0; logic [AW-1:0] rd_addr = '0;
  logic [NBANK-1:0][NW-1:0] ib_rdata, ob_wdata = '0;
  logic ib_rvalid;
  logic [NBANK-1:0] ob_we = '0;
  logic dma_ib_we = 0, dma_ib_done = 0, dma_ob_done = 0;
  logic [BW-1:0] dma_ib_bank = '0, dma_ob_bank = '0;
  logic [AW-1:0] dma_ib_addr = '0, dma_ob_addr = '0;
  logic [NW-1:0] dma_ib_wdata = '0, dma_ob_rdata;

  data_buffer #(.NW(NW), .ROWS(ROWS), .COLS(COLS), .GROUP_ROWS(G), .DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [NW-1:0] ib_ref [2][NBANK][HALF];
  logic [NW-1:0] ob_ref [NBANK][$];

  task automatic chk(bit cond, string s);
    checks++;
    if (!cond) begin failures++; $display("FAIL t=%0t %s", $time, s); end
  endtask

  task automatic dma_fill(int batch);
    for (int b = 0; b < NBANK; b++)
      for (int a = 0; a < HALF; a++) begin
        @(negedge clk);
        dma_ib_we = 1; dma_ib_bank = BW'(b); dma_ib_addr = AW'(a);
        dma_ib_wdata = NW'($urandom); ib_ref[batch][b][a] = dma_ib_wdata;
      end
    @(negedge clk) dma_ib_we = 0; dma_ib_done = 1;
    @(negedge clk) dma_ib_done = 0;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(!ib_full && ob_free, "reset flags");
    dma_fill(0);
    chk(ib_full, "ib_full after DMA done");
    ib_swap = 1;
    @(negedge clk) ib_swap = 0;
    chk(!ib_full, "ib_full cleared by swap");
    // read batch 0 in lockstep while the DMA fills batch 1
    fork
      dma_fill(1);
      for (int a = 0; a < HALF; a++) begin
        @(negedge clk); rd_en = 1; rd_addr = AW'(a);
        @(negedge clk); rd_en = 0;
        chk(ib_rvalid, "rvalid one cycle after rd_en");
        for (int b = 0; b < NBANK; b++)
          chk(ib_rdata[b] == ib_ref[0][b][a], $sformatf("bank %0d word %0d", b, a));
        @(negedge clk);
        chk(!ib_rvalid, "rvalid only for one cycle");
      end
    join
    chk(ib_full, "second batch ready");
    // output side: random writes, each bank its own pointer and a different
    // count (never a full half, so a pointer that is not restarted shows)
    for (int t = 0; t < 30; t++) begin
      @(negedge clk);
      for (int b = 0; b < NBANK; b++) begin
        ob_we[b] = ($urandom_range(0, 1) == 1) && (ob_ref[b].size() < HALF - 1 - b);
        ob_wdata[b] = NW'($urandom);
        if (ob_we[b]) ob_ref[b].push_back(ob_wdata[b]);
      end
    end
    @(negedge clk) ob_we = '0; ob_swap = 1;
    @(negedge clk) ob_swap = 0;
    chk(!ob_free, "ob_free cleared by swap");
    for (int b = 0; b < NBANK; b++)
      foreach (ob_ref[b][a]) begin
        @(negedge clk); dma_ob_bank = BW'(b); dma_ob_addr = AW'(a);
        @(negedge clk);
        chk(dma_ob_rdata == ob_ref[b][a], $sformatf("OB bank %0d word %0d", b, a));
      end
    dma_ob_done = 1;
    @(negedge clk) dma_ob_done = 0;
    chk(ob_free, "ob_free after DMA done");
    // pointers restarted: a new write goes to word 0 of the fill half
    ob_we = 4'b0001; ob_wdata[0] = 16'h1234;
    @(negedge clk) ob_we = '0; ob_swap = 1;
    @(negedge clk) ob_swap = 0; dma_ob_bank = 0; dma_ob_addr = 0;
    @(negedge clk);
    chk(dma_ob_rdata == 16'h1234, "write pointer restarts after swap");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
