// tb_pe_array: several BNN kernels side by side on a reduced 8x8 array.
//
// Kernels 1-2-3-2-1, 2-3-2-1 and 3-4-3-2-1 are placed with the allocation
// rule and configured through the broadcast bus. Random samples are then
// streamed into all input PEs, one per cycle with occasional bubbles. Every
// result of every output PE is compared with the row-by-row reference model,
// and its cycle is checked against the pipeline latency: a kernel of d layers
// delivers sample s d-1 clock edges after the edge that loads its input
// register. The test also checks that kernels touching each other stay
// isolated (the model has no cross-kernel terms) and that busy drops at the end.
module tb_pe_array;
  import mugra_pkg::*;
  import tb_bnn_pkg::*;

  localparam int ROWS = 8, COLS = 8, NPE = ROWS * COLS, NS = 60;

  logic clk = 0, rst_n = 0;
  logic cfg_we = 0;
  logic [ID_W-1:0] cfg_id = '0;
  pe_cfg_t cfg_data = '0;
  logic [NPE-1:0][NW-1:0] ib_data, ob_data;
  logic [NPE-1:0] ib_valid, ob_valid, rd, wr;
  logic busy;

  pe_array #(.ROWS(ROWS), .COLS(COLS)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  array_model m;
  logic signed [NW-1:0] samples [NS][];
  int  sample_cycle [NS];
  int  depth_of [int];
  int  got [int];
  bit  started = 0;

  task automatic fail(string s);
    failures++;
    $display("FAIL t=%0t %s", $time, s);
  endtask

  // Output monitor: in the middle of each cycle, look at ob_valid.
  always @(negedge clk) if (started) monitor();

  task automatic monitor();
    foreach (m.out_pes[k]) begin
      int idx = m.out_pes[k];
      if (ob_valid[idx]) begin
        int s = got.exists(idx) ? got[idx] : 0;
        logic signed [NW-1:0] val[];
        checks++;
        if (s >= NS) fail($sformatf("PE %0d: extra result", idx));
        else begin
          m.eval_sample(samples[s], val);
          if (ob_data[idx] !== val[idx])
            fail($sformatf("PE %0d sample %0d: got %0d exp %0d", idx, s, $signed(ob_data[idx]), val[idx]));
          checks++;
          if (cycle != sample_cycle[s] + depth_of[idx] - 1)
            fail($sformatf("PE %0d sample %0d: latency %0d, expected %0d", idx, s,
                           cycle - sample_cycle[s], depth_of[idx] - 1));
        end
        got[idx] = s + 1;
      end
    end
  endtask

  initial begin
    int topo [3][$];
    int px [3], py [3];
    m = new(ROWS, COLS);
    topo[0] = '{1, 2, 3, 2, 1};    px[0] = 0; py[0] = 1;
    topo[1] = '{2, 3, 2, 1};       px[1] = 0; py[1] = 5;
    topo[2] = '{3, 4, 3, 2, 1};    px[2] = 3; py[2] = 2;
    for (int k = 0; k < 3; k++) begin
      int n_before;
      n_before = m.out_pes.size();
      checks++;
      if (!m.place(topo[k], px[k], py[k], 8, 1 + k)) fail($sformatf("kernel %0d does not fit", k));
      for (int j = n_before; j < m.out_pes.size(); j++) depth_of[m.out_pes[j]] = topo[k].size();
    end
    ib_data = '0; ib_valid = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    started = 1;
    // configuration broadcast, one PE per cycle (unused PEs keep their reset zeros)
    for (int i = 0; i < NPE; i++) if (m.used[i]) begin
      @(negedge clk);
      cfg_we = 1; cfg_id = ID_W'(i); cfg_data = m.cfg[i];
    end
    @(negedge clk) cfg_we = 0;
    checks++;
    if (busy) fail("busy before any data");
    // stream samples
    for (int s = 0; s < NS; s++) begin
      @(negedge clk);
      if ($urandom_range(0, 5) == 0) begin
        ib_valid = '0;               // bubble
        @(negedge clk);
      end
      samples[s] = new[NPE];
      for (int i = 0; i < NPE; i++) begin
        samples[s][i] = NW'($urandom_range(0, 256));
        ib_data[i]    = samples[s][i];
        ib_valid[i]   = m.cfg[i].ctrl.rd;
      end
      sample_cycle[s] = cycle;       // loaded at the next edge
    end
    @(negedge clk) ib_valid = '0; ib_data = '0;
    repeat (12) @(negedge clk);
    foreach (m.out_pes[k]) begin
      checks++;
      if (!got.exists(m.out_pes[k]) || got[m.out_pes[k]] != NS)
        fail($sformatf("PE %0d delivered %0d of %0d results", m.out_pes[k],
                       got.exists(m.out_pes[k]) ? got[m.out_pes[k]] : 0, NS));
    end
    checks++;
    if (busy) fail("busy after drain");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
