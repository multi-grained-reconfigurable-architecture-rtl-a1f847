// data_buffer: local data buffer = input buffer (IB) + output buffer (OB).
//
// Each group of GROUP_ROWS PEs in one column owns one IB bank and one OB bank
// (memory sharing of the original design), so there are
// NBANK = (ROWS/GROUP_ROWS) * COLS banks on each side; bank b = g*COLS + c
// serves group row g of column c. Every bank is a dbuf_bank (double buffer).
//
// PE-array side:
//   - all IB banks are read in lockstep at rd_addr when rd_en is high; the
//     words and their valid flag (ib_rvalid) follow one cycle later. Kernels
//     therefore receive sample n from word n of each of their input banks.
//   - each OB bank has its own write pointer: ob_we[b] writes ob_wdata[b] at
//     the pointer and advances it, so the n-th result of an output PE lands in
//     word n of its bank. Pointers restart at 0 when the OB halves swap.
// DMA side: dma_ib_* writes the IB fill half; dma_ob_* reads the OB drain
// half (data one cycle after the address).
// Double-buffer flags (this design's handshake):
//   ib_full  set by dma_ib_done (a batch is ready), cleared by ib_swap;
//   ob_free  set by dma_ob_done (the DMA has taken the last batch) and by
//            reset, cleared by ob_swap.
// The array never writes the input banks nor the DMA the output banks, so
// those ports are tied off; their read data and the half-select outputs of
// the banks are left unconnected on purpose (lint reports them as unused).
module data_buffer #(
  parameter int NW         = mugra_pkg::NW,
  parameter int ROWS       = 28,
  parameter int COLS       = 28,
  parameter int GROUP_ROWS = 4,
  parameter int DEPTH      = 2304,
  localparam int NBANK     = (ROWS / GROUP_ROWS) * COLS,
  localparam int BW        = (NBANK > 1) ? $clog2(NBANK) : 1,
  localparam int AW        = $clog2(DEPTH / 2)
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // controller
  input  logic                         ib_swap,
  input  logic                         ob_swap,
  output logic                         ib_full,
  output logic                         ob_free,
  // PE-array side
  input  logic                         rd_en,
  input  logic [AW-1:0]                rd_addr,
  output logic [NBANK-1:0][NW-1:0]     ib_rdata,
  output logic                         ib_rvalid,
  input  logic [NBANK-1:0]             ob_we,
  input  logic [NBANK-1:0][NW-1:0]     ob_wdata,
  // DMA side
  input  logic                         dma_ib_we,
  input  logic [BW-1:0]                dma_ib_bank,
  input  logic [AW-1:0]                dma_ib_addr,
  input  logic [NW-1:0]                dma_ib_wdata,
  input  logic                         dma_ib_done,
  input  logic [BW-1:0]                dma_ob_bank,
  input  logic [AW-1:0]                dma_ob_addr,
  output logic [NW-1:0]                dma_ob_rdata,
  input  logic                         dma_ob_done
);

  logic [NBANK-1:0][NW-1:0] ob_drain_data;
  logic [NBANK-1:0][AW-1:0] wp;
  logic [BW-1:0]            ob_bank_q;

  for (genvar b = 0; b < NBANK; b++) begin : g_bank
    logic [NW-1:0] ib_unused_rdata, ob_unused_rdata;
    logic          ib_sel, ob_sel;

    dbuf_bank #(.NW(NW), .DEPTH(DEPTH)) u_ib (
      .clk     (clk),
      .rst_n   (rst_n),
      .swap    (ib_swap),
      .sel     (ib_sel),
      .a_addr  (rd_addr),
      .a_we    (1'b0),
      .a_wdata ('0),
      .a_rdata (ib_rdata[b]),
      .d_addr  (dma_ib_addr),
      .d_we    (dma_ib_we && dma_ib_bank == BW'(b)),
      .d_wdata (dma_ib_wdata),
      .d_rdata (ib_unused_rdata)
    );

    dbuf_bank #(.NW(NW), .DEPTH(DEPTH)) u_ob (
      .clk     (clk),
      .rst_n   (rst_n),
      .swap    (ob_swap),
      .sel     (ob_sel),
      .a_addr  (wp[b]),
      .a_we    (ob_we[b]),
      .a_wdata (ob_wdata[b]),
      .a_rdata (ob_unused_rdata),
      .d_addr  (dma_ob_addr),
      .d_we    (1'b0),
      .d_wdata ('0),
      .d_rdata (ob_drain_data[b])
    );

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)        wp[b] <= '0;
      else if (ob_swap)  wp[b] <= '0;
      else if (ob_we[b]) wp[b] <= wp[b] + 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ib_full   <= 1'b0;
      ob_free   <= 1'b1;
      ib_rvalid <= 1'b0;
      ob_bank_q <= '0;
    end else begin
      ib_rvalid <= rd_en;
      ob_bank_q <= dma_ob_bank;
      if (ib_swap)          ib_full <= 1'b0;
      else if (dma_ib_done) ib_full <= 1'b1;
      if (ob_swap)          ob_free <= 1'b0;
      else if (dma_ob_done) ob_free <= 1'b1;
    end
  end

  assign dma_ob_rdata = ob_drain_data[ob_bank_q];

endmodule
