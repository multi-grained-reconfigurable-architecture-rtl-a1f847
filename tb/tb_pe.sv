// tb_pe: self-checking test of one processing element.
//
// Checks the configuration register (taken only for its own index, zero after
// reset), the three modes (input: registers the input-buffer word; hidden:
// registers the neuron result one cycle later; output: result and valid go to
// the output-buffer port while the output register stays cleared) and the
// valid rule (a result is valid when every input with a non-zero weight is).
module tb_pe;
  import mugra_pkg::*;
  import tb_bnn_pkg::*;

  localparam int ID = 5;
  logic clk = 0, rst_n = 0;
  logic cfg_we = 0; logic [ID_W-1:0] cfg_id = '0; pe_cfg_t cfg_data = '0;
  logic signed [NW-1:0] x_l = '0, x_r = '0, ib_data = '0, y, ob_data;
  logic v_l = 0, v_r = 0, ib_valid = 0, y_valid, ob_valid, rd, wr;

  pe #(.PE_ID(ID)) dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic chk(bit cond, string s);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", s); end
  endtask

  task automatic load(int id, pe_cfg_t c);
    @(negedge clk); cfg_we = 1; cfg_id = ID_W'(id); cfg_data = c;
    @(negedge clk); cfg_we = 0;
  endtask

  initial begin
    pe_cfg_t c;
    logic signed [NW-1:0] e;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // after reset: zero weights, no valid output even with valid inputs
    x_l = 100; x_r = 50; v_l = 1; v_r = 1;
    @(negedge clk);
    chk(!y_valid && !ob_valid && !rd && !wr && y == 0, "reset state");
    // broadcast to another PE is ignored
    c = '0; c.w1 = 256; c.w2 = 256; c.ctrl.q = 8;
    load(ID + 1, c);
    @(negedge clk);
    chk(!y_valid, "entry for another PE ignored");
    // hidden mode, both inputs used
    c = '0; c.w1 = 16'sd384; c.w2 = -16'sd200; c.b = 16'sd10; c.ctrl.q = 8; c.ctrl.p = 2;
    load(ID, c);
    repeat (200) begin
      @(negedge clk);
      x_l = NW'($urandom_range(0, 600)) - 16'sd300; x_r = NW'($urandom_range(0, 600)) - 16'sd300;
      v_l = $urandom_range(0, 1); v_r = $urandom_range(0, 1);
      e = nu(x_l, x_r, c.w1, c.w2, c.b, 8, 2);
      @(negedge clk);
      chk(y == e, $sformatf("hidden y=%0d exp %0d", y, e));
      chk(y_valid == (v_l && v_r), "hidden valid needs both inputs");
      chk(!ob_valid, "hidden mode writes no output bank");
    end
    // hidden mode, only the left input used (edge PE of a shrinking layer)
    c.w2 = 0; load(ID, c);
    v_l = 1; v_r = 0; @(negedge clk); @(negedge clk);
    chk(y_valid, "single used input valid");
    v_l = 0; v_r = 1; @(negedge clk); @(negedge clk);
    chk(!y_valid, "unused input does not make valid");
    // input mode
    c = '0; c.ctrl.rd = 1; load(ID, c);
    chk(rd && !wr, "input mode bits");
    repeat (20) begin
      @(negedge clk);
      ib_data = NW'($urandom); ib_valid = $urandom_range(0, 1);
      e = ib_data;
      @(negedge clk);
      chk(y == e && y_valid == ib_valid, "input mode registers the buffer word");
      ib_valid = 0;
    end
    // output mode
    c = '0; c.w1 = 16'sd256; c.w2 = 16'sd128; c.b = -16'sd512; c.ctrl.q = 8; c.ctrl.p = 1;
    c.ctrl.wr = 1; load(ID, c);
    repeat (50) begin
      @(negedge clk);
      x_l = NW'($urandom_range(0, 512)); x_r = NW'($urandom_range(0, 512));
      v_l = 1; v_r = $urandom_range(0, 1);
      #1;
      e = nu(x_l, x_r, c.w1, c.w2, c.b, 8, 1);
      chk(ob_data == e, $sformatf("output ob_data=%0d exp %0d", ob_data, e));
      chk(ob_valid == v_r, "output valid");
      @(negedge clk);
      chk(y == 0 && !y_valid, "output mode keeps register cleared");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
