// instr_decoder: instruction decoder of the controller.
//
// Splits a 32-bit instruction word into its fields and classifies it:
//   CONFIG  : load cfg_count entries from the configuration buffer into the
//             PEs, then either return to Idle (then_run = 0, "hold") or go on
//             to compute n_samples samples (then_run = 1);
//   COMPUTE : compute n_samples samples with the configuration in place;
//   END     : stop the instruction stream.
// Any other opcode, and a COMPUTE or chained CONFIG with zero samples, is
// flagged 'illegal' and treated like END by the controller. The format is
// this design's choice. Purely combinational.
module instr_decoder
  import mugra_pkg::*;
(
  input  logic [INSTR_W-1:0] instr,
  output logic               is_config,
  output logic               is_compute,
  output logic               is_end,
  output logic               then_run,
  output logic [CNT_W-1:0]   cfg_count,
  output logic [CNT_W-1:0]   n_samples,
  output logic               illegal
);

  instr_t i;

  always_comb begin
    i          = instr_t'(instr);
    cfg_count  = i.cfg_count;
    n_samples  = i.n_samples;
    then_run   = (i.op == OP_CONFIG) && i.then_run;
    is_config  = (i.op == OP_CONFIG);
    is_compute = (i.op == OP_COMPUTE) && (i.n_samples != '0);
    illegal    = !(i.op inside {OP_END, OP_CONFIG, OP_COMPUTE})
                 || ((i.op == OP_COMPUTE || then_run) && i.n_samples == '0);
    is_end     = (i.op == OP_END) || illegal;
    if (is_config && then_run && i.n_samples == '0) is_config = 1'b0;
  end

endmodule
