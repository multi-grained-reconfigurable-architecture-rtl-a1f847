// dbuf_bank: one double-buffered data-buffer bank (one block RAM).
//
// The bank holds DEPTH words of NW bits (16 x 2304 bits, one BRAM36 in the
// original FPGA design) split into two halves of DEPTH/2 words. Port A belongs
// to the PE array and reaches half 'sel'; port D belongs to the DMA and
// reaches the other half. A one-cycle 'swap' pulse exchanges the halves, so
// the DMA can fill (or empty) one half while the array streams through the
// other, hiding the external-memory transfers. Splitting the RAM into two
// equal halves is this design's reading of "double-buffered".
//
// Both ports are synchronous: a write happens at the clock edge, read data
// appears one cycle after the address (BRAM behaviour). The half select
// resets to 0.
module dbuf_bank #(
  parameter int NW    = mugra_pkg::NW,
  parameter int DEPTH = 2304,
  localparam int HALF = DEPTH / 2,
  localparam int AW   = $clog2(HALF)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          swap,
  output logic          sel,
  // port A: PE array side
  input  logic [AW-1:0] a_addr,
  input  logic          a_we,
  input  logic [NW-1:0] a_wdata,
  output logic [NW-1:0] a_rdata,
  // port D: DMA side
  input  logic [AW-1:0] d_addr,
  input  logic          d_we,
  input  logic [NW-1:0] d_wdata,
  output logic [NW-1:0] d_rdata
);

  logic [NW-1:0] mem [2*HALF];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    sel <= 1'b0;
    else if (swap) sel <= ~sel;
  end

  // word index inside the RAM: half 1 starts at word HALF
  logic [AW:0] a_full, d_full;
  assign a_full = sel ? (AW+1)'(HALF) + (AW+1)'(a_addr) : (AW+1)'(a_addr);
  assign d_full = sel ? (AW+1)'(d_addr) : (AW+1)'(HALF) + (AW+1)'(d_addr);

  always_ff @(posedge clk) begin
    if (a_we) mem[a_full] <= a_wdata;
    if (d_we) mem[d_full] <= d_wdata;
    a_rdata <= mem[a_full];
    d_rdata <= mem[d_full];
  end

endmodule
