// fsm_controller: instruction-driven control unit of the accelerator.
//
// A six-state machine (the states of the original design) runs the program
// held in the instruction buffer, starting at address 0 when 'enable' rises:
//
//   Idle        fetch and decode the instruction at pc; stay while !enable.
//               CONFIG -> Load Config, COMPUTE -> Load Data, END -> raise
//               'done' and wait for enable to drop (pc then returns to 0).
//   Load Config wait until the host reports the configuration buffer loaded
//               (cb_ready), then -> Run Config.
//   Run Config  read cfg_count entries from the configuration buffer, one per
//               cycle, and broadcast each to the PE array ("waiting for
//               parameters" while entries remain). Then -> Idle (hold, pc+1)
//               or, for a chained CONFIG, -> Load Data.
//   Load Data   wait until the DMA has filled an input batch (ib_full), swap
//               the input-buffer halves, -> Execution.
//   Execution   read one sample address per cycle from all input banks
//               (n_samples cycles), then wait until the PE pipeline holds no
//               valid value ("running"), -> Store Data.
//   Store Data  wait until the DMA has taken the previous output batch
//               (ob_free), swap the output-buffer halves, pulse store_req with
//               the batch size, -> Idle (finish, pc+1).
//
// One configuration can serve any number of COMPUTE instructions. The wait
// conditions of each state, the instruction format and the END handling are
// this design's choices. The instruction and configuration buffers have a
// one-cycle read latency, which the Idle and Run Config states allow for.
// The handshake assertions at the end use rst_n in 'disable iff', which lint
// reports as a reset used both asynchronously and synchronously; the logic
// itself resets only asynchronously. The decoder's 'illegal' flag is not
// needed here because an illegal word already decodes as END.
module fsm_controller
  import mugra_pkg::*;
#(
  parameter int IB_AW = 8,               // instruction-buffer address width
  parameter int CB_AW = 10,              // configuration-buffer address width
  parameter int AW    = 11               // data-bank half address width
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               enable,
  input  logic               cb_ready,
  // instruction buffer
  output logic [IB_AW-1:0]   instr_addr,
  input  logic [INSTR_W-1:0] instr_rdata,
  // configuration buffer and broadcast
  output logic [CB_AW-1:0]   cb_addr,
  input  cb_entry_t          cb_rdata,
  output logic               cfg_we,
  output logic [ID_W-1:0]    cfg_id,
  output pe_cfg_t            cfg_data,
  // data buffer
  input  logic               ib_full,
  input  logic               ob_free,
  output logic               ib_swap,
  output logic               ob_swap,
  output logic               rd_en,
  output logic [AW-1:0]      rd_addr,
  output logic               store_req,
  output logic [CNT_W-1:0]   store_count,
  // PE array
  input  logic               array_busy,
  // status
  output state_e             state,
  output logic               done
);

  logic             is_config, is_compute, is_end, then_run_d, illegal;
  logic [CNT_W-1:0] cfg_count_d, n_samples_d;

  instr_decoder u_dec (
    .instr      (instr_rdata),
    .is_config  (is_config),
    .is_compute (is_compute),
    .is_end     (is_end),
    .then_run   (then_run_d),
    .cfg_count  (cfg_count_d),
    .n_samples  (n_samples_d),
    .illegal    (illegal)
  );

  logic [IB_AW-1:0] pc;
  logic             ir_ok;          // instr_rdata reflects pc
  logic             then_run;
  logic [CNT_W-1:0] cfg_count, n_samples, cnt;
  logic             cb_pending;     // a configuration read is in flight
  logic [1:0]       drain;

  assign instr_addr = pc;
  assign cb_addr    = CB_AW'(cnt);
  assign rd_addr    = AW'(cnt);
  assign cfg_we     = cb_pending;
  assign cfg_id     = cb_rdata.id;
  assign cfg_data   = cb_rdata.cfg;

  // The swaps are combinational so that the halves change at the very edge
  // that leaves Load Data / Store Data: the first sample read in Execution
  // already sees the new input half.
  always_comb begin
    rd_en   = (state == S_EXECUTION) && (cnt < n_samples);
    ib_swap = (state == S_LOAD_DATA) && ib_full;
    ob_swap = (state == S_STORE_DATA) && ob_free;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      pc          <= '0;
      ir_ok       <= 1'b0;
      done        <= 1'b0;
      then_run    <= 1'b0;
      cfg_count   <= '0;
      n_samples   <= '0;
      cnt         <= '0;
      cb_pending  <= 1'b0;
      drain       <= '0;
      store_req   <= 1'b0;
      store_count <= '0;
    end else begin
      store_req  <= 1'b0;
      cb_pending <= 1'b0;
      ir_ok      <= (state == S_IDLE);
      unique case (state)
        S_IDLE: begin
          if (!enable) begin
            done <= 1'b0;
            pc   <= '0;
          end else if (ir_ok && !done) begin
            if (is_end) begin
              done <= 1'b1;
            end else if (is_config) begin
              cfg_count <= cfg_count_d;
              then_run  <= then_run_d;
              n_samples <= n_samples_d;
              state     <= S_LOAD_CONFIG;
            end else if (is_compute) begin
              n_samples <= n_samples_d;
              state     <= S_LOAD_DATA;
            end
          end
        end
        S_LOAD_CONFIG: begin
          cnt <= '0;
          if (cb_ready) state <= S_RUN_CONFIG;
        end
        S_RUN_CONFIG: begin
          if (cnt < cfg_count) begin
            cb_pending <= 1'b1;
            cnt        <= cnt + 1'b1;
          end else if (!cb_pending) begin
            if (then_run) begin
              state <= S_LOAD_DATA;
            end else begin
              pc    <= pc + 1'b1;
              state <= S_IDLE;
            end
          end
        end
        S_LOAD_DATA: begin
          cnt   <= '0;
          drain <= '0;
          if (ib_full) state <= S_EXECUTION;
        end
        S_EXECUTION: begin
          if (cnt < n_samples) begin
            cnt <= cnt + 1'b1;
          end else if (drain != 2'd2) begin
            drain <= drain + 1'b1;       // read latency + input register
          end else if (!array_busy) begin
            state <= S_STORE_DATA;
          end
        end
        S_STORE_DATA: begin
          if (ob_free) begin
            store_req   <= 1'b1;
            store_count <= n_samples;
            pc          <= pc + 1'b1;
            state       <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Handshake rules: a swap lasts one cycle, and a batch is only handed to
  // the DMA together with the output swap.
  a_ib_swap_pulse: assert property (@(posedge clk) disable iff (!rst_n) ib_swap |=> !ib_swap);
  a_ob_swap_req:   assert property (@(posedge clk) disable iff (!rst_n) ob_swap |=> store_req);
  a_rd_exec:       assert property (@(posedge clk) disable iff (!rst_n) rd_en |-> state == S_EXECUTION);

endmodule
