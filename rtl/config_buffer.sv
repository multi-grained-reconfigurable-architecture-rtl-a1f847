// config_buffer: configuration buffer (CB) between the host and the PE array.
//
// The host writes configuration entries {PE index, W1, W2, b, ctrl} through
// its write port (a stand-in for the memory-mapped bus); during the Run Config
// state the controller reads them back one per clock and broadcasts each to
// the array. Staging the entries here lets the host write at its own pace
// while the array is loaded at full speed. The entry format and DEPTH (room
// for one entry per PE of a 28x28 array) are this design's choices.
//
// Synchronous read: rd_data is valid one cycle after rd_addr.
module config_buffer
  import mugra_pkg::*;
#(
  parameter int DEPTH = 1024,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic            clk,
  input  logic            host_we,
  input  logic [AW-1:0]   host_addr,
  input  cb_entry_t       host_wdata,
  input  logic [AW-1:0]   rd_addr,
  output cb_entry_t       rd_data
);

  cb_entry_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (host_we) mem[host_addr] <= host_wdata;
    rd_data <= mem[rd_addr];
  end

endmodule
