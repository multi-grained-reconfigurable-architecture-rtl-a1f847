// mugra_pkg: constants and types shared by the MuGRA accelerator.
//
// The accelerator evaluates arbitrary functions approximately with many small
// bisection neural networks (BNN kernels) mapped onto one large array of
// processing elements (PEs). Every PE holds two synapse weights, a bias and an
// 8-bit control field: 3*16+8 = 56 configuration bits, as in the original
// design. The layout of the control field, the configuration-entry and
// instruction formats and the state encoding are this design's own choices.
package mugra_pkg;

  // Data, weight and bias width (16-bit signed fixed point).
  localparam int NW      = 16;
  localparam int CTRL_W  = 8;
  localparam int CFG_W   = 3 * NW + CTRL_W;   // 56 bits per PE
  localparam int ID_W    = 10;                // PE index, enough for 28x28
  localparam int INSTR_W = 32;
  localparam int CNT_W   = 12;                // entry and sample counts

  // 8-bit control field of a PE.
  //   rd : 1 = take the input-buffer word (input-layer PE), 0 = neuron unit
  //   wr : 1 = send the result to the output buffer (output-layer PE)
  //   p  : Leaky-ReLU negative slope alpha = 2^-p
  //   q  : number of fraction bits of the fixed-point format
  typedef struct packed {
    logic       rd;
    logic       wr;
    logic [1:0] p;
    logic [3:0] q;
  } pe_ctrl_t;

  // Configuration register contents of one PE, W1 in the top bits.
  typedef struct packed {
    logic signed [NW-1:0] w1;
    logic signed [NW-1:0] w2;
    logic signed [NW-1:0] b;
    pe_ctrl_t             ctrl;
  } pe_cfg_t;

  // Configuration-buffer entry: which PE, and what it gets.
  typedef struct packed {
    logic [ID_W-1:0] id;
    pe_cfg_t         cfg;
  } cb_entry_t;

  // Instruction word.
  typedef enum logic [1:0] {
    OP_END     = 2'd0,   // stop the instruction stream
    OP_CONFIG  = 2'd1,   // load cfg_count entries from the configuration buffer
    OP_COMPUTE = 2'd2    // run n_samples samples through the configured array
  } opcode_e;

  typedef struct packed {
    opcode_e          op;          // [31:30]
    logic             then_run;    // [29] CONFIG only: compute right after configuring
    logic             rsv0;        // [28]
    logic [CNT_W-1:0] cfg_count;   // [27:16]
    logic [3:0]       rsv1;        // [15:12]
    logic [CNT_W-1:0] n_samples;   // [11:0]
  } instr_t;

  // Controller states (names of the original state diagram).
  typedef enum logic [2:0] {
    S_IDLE        = 3'd0,
    S_LOAD_CONFIG = 3'd1,
    S_RUN_CONFIG  = 3'd2,
    S_LOAD_DATA   = 3'd3,
    S_EXECUTION   = 3'd4,
    S_STORE_DATA  = 3'd5
  } state_e;

endpackage
