// tb_fsm_controller: self-checking test of the control unit.
//
// The testbench plays instruction buffer, configuration buffer (both with one
// cycle read latency), DMA flags and array-busy. Program:
//   0: CONFIG 5 entries (hold)   1: COMPUTE 7   2: CONFIG 3 entries + run 4
//   3: END
// Checks: the exact state sequence of the state diagram; every broadcast
// entry in order and nothing else; Load Data waits for ib_full, Store Data
// for ob_free, Execution for array_busy; one read per cycle at addresses
// 0..n-1; Execution lasts n + 3 cycles when the array is idle (n reads, two
// drain cycles, one exit cycle); swaps are single pulses; store_count = n;
// done rises at END and clears when enable drops.
module tb_fsm_controller;
  import mugra_pkg::*;
  localparam int IB_AW = 8, CB_AW = 10, AW = 11;

  logic clk = 0, rst_n = 0, enable = 0, cb_ready = 0;
  logic [IB_AW-1:0] instr_addr;
  logic [INSTR_W-1:0] instr_rdata;
  logic [CB_AW-1:0] cb_addr;
  cb_entry_t cb_rdata;
  logic cfg_we; logic [ID_W-1:0] cfg_id; pe_cfg_t cfg_data;
  logic ib_full = 0, ob_free = 0, ib_swap, ob_swap, rd_en, store_req, array_busy = 0, done;
  logic [AW-1:0] rd_addr;
  logic [CNT_W-1:0] store_count;
  state_e state;

  fsm_controller dut (.*);
  always #5 clk = ~clk;

  logic [INSTR_W-1:0] prog [4];
  cb_entry_t cbm [1024];
  always_ff @(posedge clk) begin
    instr_rdata <= prog[instr_addr];
    cb_rdata    <= cbm[cb_addr];
  end

  int checks = 0, failures = 0, cycle = 0;
  state_e trace [$];
  cb_entry_t seen [$];
  int reads [$];
  int exec_len [$], stores [$], n_ib_swap = 0, n_ob_swap = 0, exec_start = 0;
  bit ib_waited = 0, ob_waited = 0, busy_held = 0;

  task automatic chk(bit cond, string s);
    checks++;
    if (!cond) begin failures++; $display("FAIL t=%0t %s", $time, s); end
  endtask

  function automatic logic [INSTR_W-1:0] mk(opcode_e op, bit tr, int cc, int n);
    instr_t i = '0;
    i.op = op; i.then_run = tr; i.cfg_count = CNT_W'(cc); i.n_samples = CNT_W'(n);
    return i;
  endfunction

  state_e prev = S_IDLE;
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n) begin
      if (state != prev) begin
        trace.push_back(state);
        if (state == S_EXECUTION) exec_start = cycle;
        if (prev == S_EXECUTION) exec_len.push_back(cycle - exec_start);
      end
      prev = state;
      if (cfg_we) seen.push_back({cfg_id, cfg_data});
      if (rd_en) reads.push_back(int'(rd_addr));
      if (ib_swap) n_ib_swap++;
      if (ob_swap) n_ob_swap++;
      if (store_req) stores.push_back(int'(store_count));
      if (state == S_LOAD_DATA && !ib_full) ib_waited = 1;
      if (state == S_STORE_DATA && !ob_free) ob_waited = 1;
      if (state == S_EXECUTION && array_busy && !rd_en) busy_held = 1;
    end
  end

  // DMA model: input batch becomes ready some cycles after each Load Data
  // entry; the output half becomes free some cycles after each store.
  initial begin
    forever begin
      @(posedge clk iff state == S_LOAD_DATA);
      repeat (6) @(posedge clk);
      @(negedge clk) ib_full = 1;
      @(posedge clk iff ib_swap);
      @(negedge clk) ib_full = 0;
    end
  end
  initial begin
    forever begin
      @(posedge clk iff state == S_STORE_DATA);
      repeat (4) @(posedge clk);
      @(negedge clk) ob_free = 1;
      @(posedge clk iff ob_swap);
      @(negedge clk) ob_free = 0;
    end
  end
  // the array stays busy for 5 cycles after the reads of the second batch
  initial begin
    @(posedge clk iff (state == S_EXECUTION));
    @(posedge clk iff (state != S_EXECUTION));
    @(posedge clk iff (state == S_EXECUTION && !rd_en && reads.size() > 7));
    @(negedge clk) array_busy = 1;
    repeat (5) @(negedge clk);
    array_busy = 0;
  end

  initial begin
    state_e exp [$];
    prog[0] = mk(OP_CONFIG, 0, 5, 0);
    prog[1] = mk(OP_COMPUTE, 0, 0, 7);
    prog[2] = mk(OP_CONFIG, 1, 3, 4);
    prog[3] = mk(OP_END, 0, 0, 0);
    foreach (cbm[i]) cbm[i] = {$urandom, $urandom, $urandom};
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);
    chk(state == S_IDLE && !done, "idle while not enabled");
    enable = 1;
    repeat (10) @(negedge clk);
    chk(state == S_LOAD_CONFIG, "waits for cb_ready");
    cb_ready = 1;
    fork
      begin
        @(posedge clk iff done);
      end
      begin
        repeat (500) @(posedge clk);
      end
    join_any
    @(negedge clk);
    chk(done, "done after END");
    exp = '{S_LOAD_CONFIG, S_RUN_CONFIG, S_IDLE, S_LOAD_DATA, S_EXECUTION, S_STORE_DATA,
            S_IDLE, S_LOAD_CONFIG, S_RUN_CONFIG, S_LOAD_DATA, S_EXECUTION, S_STORE_DATA, S_IDLE};
    chk(trace.size() == exp.size(), $sformatf("%0d state changes, expected %0d", trace.size(), exp.size()));
    foreach (exp[i]) if (i < trace.size()) chk(trace[i] == exp[i], $sformatf("state %0d is %s, expected %s", i, trace[i].name(), exp[i].name()));
    // configuration broadcasts: entries 0..4, then 0..2 again
    chk(seen.size() == 8, $sformatf("%0d broadcasts", seen.size()));
    foreach (seen[i]) chk(seen[i] == cbm[i < 5 ? i : i - 5], $sformatf("broadcast %0d", i));
    // sample reads
    chk(reads.size() == 11, $sformatf("%0d reads", reads.size()));
    foreach (reads[i]) chk(reads[i] == (i < 7 ? i : i - 7), $sformatf("read %0d address %0d", i, reads[i]));
    chk(exec_len.size() == 2, "two executions");
    if (exec_len.size() == 2) begin
      chk(exec_len[0] == 7 + 3, $sformatf("execution 1 lasted %0d cycles", exec_len[0]));
      chk(exec_len[1] > 4 + 3, $sformatf("execution 2 lasted %0d cycles despite busy", exec_len[1]));
    end
    chk(stores.size() == 2 && stores[0] == 7 && stores[1] == 4, "store counts");
    chk(n_ib_swap == 2 && n_ob_swap == 2, "one swap per batch");
    chk(ib_waited && ob_waited && busy_held, "all wait conditions exercised");
    @(negedge clk) enable = 0;
    @(negedge clk);
    @(negedge clk);
    chk(!done && state == S_IDLE, "done clears when enable drops");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
