// pe_array: ROWS x COLS PEs wired as one large bisection neural network.
//
// Every PE takes the outputs of two adjacent PEs of the row above it, so one
// row is one network layer and any connected patch of the array can be
// configured as a small BNN kernel (input PEs in its first row, one output PE
// in its last). Rows are offset like bricks, following the original design's
// wiring: a PE in row r, column c reads
//   row r-1 even:  left = (r-1, c),   right = (r-1, c+1)
//   row r-1 odd:   left = (r-1, c-1), right = (r-1, c)
// A neighbour outside the array reads as data 0, never valid; the weight on
// that side must then be zero. Row 0 has no previous layer and is used only
// for input PEs. PE index = row*COLS + col (this design's numbering).
//
// All PE output registers advance every clock, so each kernel is a pipeline
// accepting one sample per cycle with a latency of one cycle per layer.
// busy is high while any output register holds a valid value.
module pe_array
  import mugra_pkg::*;
#(
  parameter int ROWS = 28,
  parameter int COLS = 28
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic                             cfg_we,
  input  logic [ID_W-1:0]                  cfg_id,
  input  pe_cfg_t                          cfg_data,
  input  logic [ROWS*COLS-1:0][NW-1:0]     ib_data,
  input  logic [ROWS*COLS-1:0]             ib_valid,
  output logic [ROWS*COLS-1:0][NW-1:0]     ob_data,
  output logic [ROWS*COLS-1:0]             ob_valid,
  output logic [ROWS*COLS-1:0]             rd,
  output logic [ROWS*COLS-1:0]             wr,
  output logic                             busy
);

  logic [ROWS*COLS-1:0][NW-1:0] y;
  logic [ROWS*COLS-1:0]         yv;

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      localparam int IDX = r * COLS + c;
      // column of the left and right neighbour in the row above
      localparam int LC  = (r > 0 && ((r - 1) % 2) == 1) ? c - 1 : c;
      localparam int RC  = LC + 1;

      logic [NW-1:0] xl, xr;
      logic          vl, vr;

      if (r > 0 && LC >= 0) begin : g_left
        assign xl = y [(r-1)*COLS + LC];
        assign vl = yv[(r-1)*COLS + LC];
      end else begin : g_left_none
        assign xl = '0;
        assign vl = 1'b0;
      end

      if (r > 0 && RC < COLS) begin : g_right
        assign xr = y [(r-1)*COLS + RC];
        assign vr = yv[(r-1)*COLS + RC];
      end else begin : g_right_none
        assign xr = '0;
        assign vr = 1'b0;
      end

      pe #(.PE_ID(IDX)) u_pe (
        .clk      (clk),
        .rst_n    (rst_n),
        .cfg_we   (cfg_we),
        .cfg_id   (cfg_id),
        .cfg_data (cfg_data),
        .x_l      (xl),
        .v_l      (vl),
        .x_r      (xr),
        .v_r      (vr),
        .ib_data  (ib_data[IDX]),
        .ib_valid (ib_valid[IDX]),
        .y        (y[IDX]),
        .y_valid  (yv[IDX]),
        .ob_data  (ob_data[IDX]),
        .ob_valid (ob_valid[IDX]),
        .rd       (rd[IDX]),
        .wr       (wr[IDX])
      );
    end
  end

  assign busy = |yv;

endmodule
