// tb_mugra_top: end-to-end test of the accelerator with a host and DMA model.
//
// The accelerator runs at its default size: 28 x 28 PEs, groups of 4 rows,
// 196 input and 196 output banks of 2304 words. The host program is
//   0: CONFIG  (hold)             five kernels: 1-2-3-2-1, 2-3-2-1 (x3), 3-4-3-2-1
//   1: COMPUTE n = N0
//   2: COMPUTE n = N1             same configuration, second batch
//   3: CONFIG  + compute n = N2   every PE rewritten: 1-2-3-4-3-2-1, 2-3-4-3-2-1
//   4: END
// The DMA model fills the input banks with random samples in [0, 1] (Q8.8),
// one word per cycle, and prefetches the next batch while the array computes;
// on store_req it reads back every output bank used and compares each word
// with the reference model. The first batch is drained slowly so that the
// second Store Data has to wait for it.
// Counted mechanisms (each must happen at least once): waiting for the
// configuration buffer, configuration broadcast, hold path back to Idle,
// configuration chained into computation, Idle straight to Load Data,
// waiting for data, prefetch during Execution, waiting for store,
// Leaky-ReLU negative results, an input bank and an output bank of two
// kernels shared in one group, END. The length of each Execution state is
// checked against n + (deepest kernel) + 1 cycles (one sample per cycle,
// one cycle per layer, plus the buffer read and the final check).
module tb_mugra_top;
  import mugra_pkg::*;
  import tb_bnn_pkg::*;

  // the accelerator's default sizes
  localparam int ROWS = 28;
  localparam int COLS = 28;
  localparam int GROUP_ROWS = 4;
  localparam int BANK_DEPTH = 2304;
  localparam int CB_DEPTH = 1024;
  localparam int IB_DEPTH = 256;
  localparam int N0 = 20, N1 = 25, N2 = 15;

  localparam int NPE   = ROWS * COLS;
  localparam int NBANK = (ROWS / GROUP_ROWS) * COLS;
  localparam int BW    = (NBANK > 1) ? $clog2(NBANK) : 1;
  localparam int AW    = $clog2(BANK_DEPTH / 2);
  localparam int CB_AW = $clog2(CB_DEPTH);
  localparam int IB_AW = $clog2(IB_DEPTH);

  logic clk = 0, rst_n = 0;
  logic enable = 0, cb_ready = 0;
  state_e state;
  logic done, conflict;
  logic host_ib_we = 0; logic [IB_AW-1:0] host_ib_addr = '0; logic [INSTR_W-1:0] host_ib_wdata = '0;
  logic host_cb_we = 0; logic [CB_AW-1:0] host_cb_addr = '0; cb_entry_t host_cb_wdata = '0;
  logic dma_ib_we = 0; logic [BW-1:0] dma_ib_bank = '0; logic [AW-1:0] dma_ib_addr = '0;
  logic [NW-1:0] dma_ib_wdata = '0; logic dma_ib_done = 0; logic ib_full;
  logic store_req; logic [CNT_W-1:0] store_count;
  logic [BW-1:0] dma_ob_bank = '0; logic [AW-1:0] dma_ob_addr = '0; logic [NW-1:0] dma_ob_rdata;
  logic dma_ob_done = 0; logic ob_free;

  mugra_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic fail(string s);
    failures++;
    $display("FAIL cycle %0d: %s", cycle, s);
  endtask

  // ---------------------------------------------------------------- models
  array_model m1, m2;
  int batch_n [3];
  int batch_depth [3];
  logic signed [NW-1:0] ibd [3][NBANK][];   // input data per batch, bank, sample

  function automatic int bank_of(int idx);
    return ((idx / COLS) / GROUP_ROWS) * COLS + (idx % COLS);
  endfunction

  function automatic logic [INSTR_W-1:0] mk(opcode_e op, bit run, int cfgn, int n);
    instr_t i;
    i = '0; i.op = op; i.then_run = run; i.cfg_count = CNT_W'(cfgn); i.n_samples = CNT_W'(n);
    return INSTR_W'(i);
  endfunction

  // ------------------------------------------------------ mechanism counters
  int n_wait_cb = 0, n_run_cfg = 0, n_hold = 0, n_chain = 0, n_idle_load = 0;
  int n_wait_data = 0, n_prefetch = 0, n_wait_store = 0, n_negative = 0, n_shared = 0;
  int n_end = 0;
  state_e prev_state = S_IDLE;
  int exec_start = 0, exec_no = 0;

  always @(posedge clk) if (rst_n) begin
    if (state == S_LOAD_CONFIG && !cb_ready) n_wait_cb++;
    if (state == S_RUN_CONFIG) n_run_cfg++;
    if (state == S_LOAD_DATA && !ib_full) n_wait_data++;
    if (state == S_STORE_DATA && !ob_free) n_wait_store++;
    if (state == S_EXECUTION && dma_ib_we) n_prefetch++;
    if (conflict) fail("bank conflict flagged");
    prev_state <= state;
    if (prev_state == S_RUN_CONFIG && state == S_IDLE) n_hold++;
    if (prev_state == S_RUN_CONFIG && state == S_LOAD_DATA) n_chain++;
    if (prev_state == S_IDLE && state == S_LOAD_DATA) n_idle_load++;
    if (prev_state != S_EXECUTION && state == S_EXECUTION) exec_start = cycle;
    if (prev_state == S_EXECUTION && state != S_EXECUTION) begin
      checks++;
      if (cycle - exec_start != batch_n[exec_no] + batch_depth[exec_no] + 1)
        fail($sformatf("batch %0d: Execution lasted %0d cycles, expected %0d", exec_no,
                       cycle - exec_start, batch_n[exec_no] + batch_depth[exec_no] + 1));
      exec_no++;
    end
  end

  // ---------------------------------------------------------- host side
  task automatic write_cb(array_model m, bit all_pes, output int count);
    count = 0;
    for (int i = 0; i < NPE; i++) if (all_pes || m.used[i]) begin
      @(negedge clk);
      host_cb_we = 1; host_cb_addr = CB_AW'(count);
      host_cb_wdata.id = ID_W'(i); host_cb_wdata.cfg = m.cfg[i];
      count++;
    end
    @(negedge clk) host_cb_we = 0;
  endtask

  // count groups where one kernel's output PE and another kernel's input PE meet
  function automatic int shared_groups(array_model m);
    int n = 0;
    for (int b = 0; b < NBANK; b++) begin
      bit has_in = 0, has_out = 0;
      foreach (m.in_pes[k])  if (bank_of(m.in_pes[k]) == b)  has_in = 1;
      foreach (m.out_pes[k]) if (bank_of(m.out_pes[k]) == b) has_out = 1;
      if (has_in && has_out) n++;
    end
    return n;
  endfunction

  // ----------------------------------------------------------- DMA side
  task automatic dma_fill(int k);
    wait (!ib_full);
    for (int b = 0; b < NBANK; b++) begin
      ibd[k][b] = new[batch_n[k]];
      for (int s = 0; s < batch_n[k]; s++) begin
        @(negedge clk);
        ibd[k][b][s] = NW'($urandom_range(0, 256));
        dma_ib_we = 1; dma_ib_bank = BW'(b); dma_ib_addr = AW'(s); dma_ib_wdata = ibd[k][b][s];
      end
    end
    @(negedge clk) dma_ib_we = 0; dma_ib_done = 1;
    @(negedge clk) dma_ib_done = 0;
  endtask

  task automatic dma_store(int k, array_model m, int delay);
    logic signed [NW-1:0] inval[], val[];
    checks++;
    if (store_count != CNT_W'(batch_n[k])) fail("store_count wrong");
    repeat (delay) @(negedge clk);
    for (int s = 0; s < batch_n[k]; s++) begin
      inval = new[NPE];
      for (int i = 0; i < NPE; i++) inval[i] = ibd[k][bank_of(i)][s];
      m.eval_sample(inval, val);
      foreach (m.out_pes[j]) begin
        int idx;
        idx = m.out_pes[j];
        @(negedge clk);
        dma_ob_bank = BW'(bank_of(idx)); dma_ob_addr = AW'(s);
        @(negedge clk);
        checks++;
        if ($signed(dma_ob_rdata) < 0) n_negative++;
        if (dma_ob_rdata !== val[idx])
          fail($sformatf("batch %0d sample %0d PE %0d: got %0d exp %0d", k, s, idx,
                         $signed(dma_ob_rdata), val[idx]));
      end
    end
    @(negedge clk) dma_ob_done = 1;
    @(negedge clk) dma_ob_done = 0;
  endtask

  initial begin
    int c1, c2, tmp;
    int t1 [$], t2 [$], t3 [$], t4 [$];
    batch_n = '{N0, N1, N2};
    // configuration 1: five kernels, 1-2-3-2-1 and 2-3-2-1 share group (1,1)
    m1 = new(ROWS, COLS);
    t1 = '{1, 2, 3, 2, 1}; t2 = '{2, 3, 2, 1}; t3 = '{3, 4, 3, 2, 1};
    checks++; if (!m1.place(t1, 0, 1, 8, 3)) fail("A does not fit");
    checks++; if (!m1.place(t2, 0, 5, 8, 2)) fail("B does not fit");
    checks++; if (!m1.place(t2, 4, 4, 8, 1)) fail("C does not fit");
    checks++; if (!m1.place(t2, 5, 1, 8, 3)) fail("D does not fit");
    checks++; if (!m1.place(t3, 9, 4, 8, 2)) fail("E does not fit");
    n_shared = shared_groups(m1);
    // configuration 2: deeper kernels, written over every PE
    m2 = new(ROWS, COLS);
    t4 = '{1, 2, 3, 4, 3, 2, 1};
    checks++; if (!m2.place(t4, 0, 2, 8, 3)) fail("F does not fit");
    tmp = 0; t1 = '{2, 3, 4, 3, 2, 1};
    checks++; if (!m2.place(t1, 8, 3, 8, 2)) fail("G does not fit");
    batch_depth = '{5, 5, 7};

    repeat (3) @(posedge clk);
    rst_n = 1;
    write_cb(m1, 0, c1);
    // program
    for (int a = 0; a < 5; a++) begin
      @(negedge clk);
      host_ib_we = 1; host_ib_addr = IB_AW'(a);
      case (a)
        0: host_ib_wdata = mk(OP_CONFIG, 0, c1, 0);
        1: host_ib_wdata = mk(OP_COMPUTE, 0, 0, N0);
        2: host_ib_wdata = mk(OP_COMPUTE, 0, 0, N1);
        3: host_ib_wdata = mk(OP_CONFIG, 1, NPE, N2);
        default: host_ib_wdata = mk(OP_END, 0, 0, 0);
      endcase
    end
    @(negedge clk) host_ib_we = 0; enable = 1;
    repeat (10) @(negedge clk);      // controller waits in Load Config
    cb_ready = 1;

    fork
      begin                          // DMA: input batches
        dma_fill(0); dma_fill(1); dma_fill(2);
      end
      begin                          // DMA: output batches
        @(posedge clk iff store_req); dma_store(0, m1, NBANK * N1 + 500);
        @(posedge clk iff store_req); dma_store(1, m1, 0);
        @(posedge clk iff store_req); dma_store(2, m2, 0);
      end
      begin                          // host: second configuration
        @(posedge clk iff (state == S_IDLE && prev_state == S_RUN_CONFIG));
        cb_ready = 0;
        write_cb(m2, 1, c2);
        cb_ready = 1;
      end
    join

    wait (done);
    n_end++;
    @(negedge clk) enable = 0;
    @(negedge clk);
    checks++; if (done) fail("done did not clear");

    begin
      string names [11] = '{"wait_cb", "run_config", "hold", "chain", "idle_to_load",
                            "wait_data", "prefetch", "wait_store", "leaky_negative",
                            "shared_group", "end"};
      int cnts [11];
      cnts = '{n_wait_cb, n_run_cfg, n_hold, n_chain, n_idle_load, n_wait_data,
               n_prefetch, n_wait_store, n_negative, n_shared, n_end};
      for (int i = 0; i < 11; i++) begin
        $display("mechanism %-15s %0d", names[i], cnts[i]);
        checks++;
        if (cnts[i] == 0) fail($sformatf("mechanism %s never happened", names[i]));
      end
      checks++; if (exec_no != 3) fail($sformatf("%0d executions instead of 3", exec_no));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired in state %s", state.name());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
