// instr_buffer: instruction buffer (InB) of the accelerator.
//
// The host stores a program of instructions (see mugra_pkg::instr_t) through
// its write port; the controller fetches them from address 0 upwards. DEPTH
// and the 32-bit word are this design's choices.
//
// Synchronous read: rd_data is valid one cycle after rd_addr.
module instr_buffer
  import mugra_pkg::*;
#(
  parameter int DEPTH = 256,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic               clk,
  input  logic               host_we,
  input  logic [AW-1:0]      host_addr,
  input  logic [INSTR_W-1:0] host_wdata,
  input  logic [AW-1:0]      rd_addr,
  output logic [INSTR_W-1:0] rd_data
);

  logic [INSTR_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (host_we) mem[host_addr] <= host_wdata;
    rd_data <= mem[rd_addr];
  end

endmodule
