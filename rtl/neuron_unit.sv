// neuron_unit: one BNN neuron, y = LReLU(x1*w1 + x2*w2 + b).
//
// Accumulation unit: the two products are formed in parallel at 2*NW bits,
// each is shifted right (arithmetically) by the fraction width q and cut back
// to NW bits, then the two terms and the bias are added one after the other.
// Activation unit: Leaky-ReLU with slope alpha = 2^-p, so a negative sum is
// simply shifted right by p bits; a multiplexer driven by the sign bit picks
// the shifted (sign = 1) or the unshifted (sign = 0) value. No multiplier is
// needed for the activation. This structure follows the original design.
// Overflow wraps in NW-bit two's complement and shifts truncate towards minus
// infinity; both are this design's choices.
//
// Purely combinational; the enclosing PE registers the result.
module neuron_unit #(
  parameter int NW = mugra_pkg::NW
) (
  input  logic signed [NW-1:0] x1,
  input  logic signed [NW-1:0] x2,
  input  logic signed [NW-1:0] w1,
  input  logic signed [NW-1:0] w2,
  input  logic signed [NW-1:0] b,
  input  logic        [3:0]    q,
  input  logic        [1:0]    p,
  output logic signed [NW-1:0] y
);

  logic signed [2*NW-1:0] prod1, prod2, sh1, sh2;
  logic signed [NW-1:0]   t1, t2, sum12, acc, acc_shifted;

  always_comb begin
    prod1       = x1 * w1;
    prod2       = x2 * w2;
    sh1         = prod1 >>> q;
    sh2         = prod2 >>> q;
    t1          = sh1[NW-1:0];
    t2          = sh2[NW-1:0];
    sum12       = t1 + t2;
    acc         = sum12 + b;
    acc_shifted = acc >>> p;
    y           = acc[NW-1] ? acc_shifted : acc;
  end

endmodule
