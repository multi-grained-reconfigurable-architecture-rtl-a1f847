// pe: processing element of the MuGRA array (one neuron with its two synapses).
//
// Contents, as in the original design: a configuration register
// {W1, W2, b, ctrl} (56 bits), a neuron unit, the RD multiplexer that chooses
// between the neuron unit (RD = 0) and the input-buffer word (RD = 1), the WR
// demultiplexer that sends the chosen value either to the output register
// feeding the next layer (WR = 0) or to the output buffer (WR = 1), and the
// output register. A PE therefore works in one of three modes:
//   input  (RD=1, WR=0): registers the input-buffer word for the next layer;
//   hidden (RD=0, WR=0): registers LReLU(x_l*W1 + x_r*W2 + b);
//   output (RD=0, WR=1): offers the neuron result to the output bank.
// The configuration register is written only by the configuration broadcast
// (cfg_we with cfg_id equal to PE_ID) and resets to all zeros, so a PE that is
// never configured has zero weights and cannot disturb a neighbouring kernel.
//
// Timing: one neuron evaluation per clock; the result is in the output
// register one cycle after the inputs. In output mode the result is
// combinational on ob_data and the output bank writes it at the next edge.
//
// Valid bit (this design's choice; the original does not say how results are
// recognised): a valid flag travels with every output register. An input whose
// weight is non-zero is "used"; the neuron result is valid when all used
// inputs are valid. A PE with both weights zero never produces a valid result.
module pe
  import mugra_pkg::*;
#(
  parameter int PE_ID = 0
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // configuration broadcast
  input  logic                 cfg_we,
  input  logic [ID_W-1:0]      cfg_id,
  input  pe_cfg_t              cfg_data,
  // previous layer (left and right neighbour)
  input  logic signed [NW-1:0] x_l,
  input  logic                 v_l,
  input  logic signed [NW-1:0] x_r,
  input  logic                 v_r,
  // input buffer
  input  logic signed [NW-1:0] ib_data,
  input  logic                 ib_valid,
  // towards the next layer
  output logic signed [NW-1:0] y,
  output logic                 y_valid,
  // towards the output buffer
  output logic signed [NW-1:0] ob_data,
  output logic                 ob_valid,
  // mode bits
  output logic                 rd,
  output logic                 wr
);

  pe_cfg_t cfg_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                                  cfg_q <= '0;
    else if (cfg_we && cfg_id == ID_W'(PE_ID))   cfg_q <= cfg_data;
  end

  assign rd = cfg_q.ctrl.rd;
  assign wr = cfg_q.ctrl.wr;

  logic signed [NW-1:0] nu_y;

  neuron_unit #(.NW(NW)) u_nu (
    .x1 (x_l),
    .x2 (x_r),
    .w1 (cfg_q.w1[NW-1:0]),
    .w2 (cfg_q.w2[NW-1:0]),
    .b  (cfg_q.b[NW-1:0]),
    .q  (cfg_q.ctrl.q),
    .p  (cfg_q.ctrl.p),
    .y  (nu_y)
  );

  logic used_l, used_r, nu_valid;
  logic signed [NW-1:0] mux_y;
  logic                 mux_v;

  always_comb begin
    used_l   = (cfg_q.w1 != '0);
    used_r   = (cfg_q.w2 != '0);
    nu_valid = (used_l || used_r) && (!used_l || v_l) && (!used_r || v_r);
    // RD multiplexer
    mux_y    = rd ? ib_data  : nu_y;
    mux_v    = rd ? ib_valid : nu_valid;
  end

  // WR demultiplexer: output-buffer side
  assign ob_data  = mux_y;
  assign ob_valid = wr && mux_v;

  // WR demultiplexer: register side
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y       <= '0;
      y_valid <= 1'b0;
    end else if (wr) begin
      y       <= '0;
      y_valid <= 1'b0;
    end else begin
      y       <= mux_y;
      y_valid <= mux_v;
    end
  end

endmodule
