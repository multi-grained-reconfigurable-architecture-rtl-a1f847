// tb_instr_decoder: self-checking test of the instruction decoder.
//
// Random 32-bit words are decoded and compared with an independent reading of
// the instruction format: op[31:30], then_run[29], cfg_count[27:16],
// n_samples[11:0]; unknown opcodes and zero-sample computes act as END.
module tb_instr_decoder;
  import mugra_pkg::*;
  logic [INSTR_W-1:0] instr;
  logic is_config, is_compute, is_end, then_run, illegal;
  logic [CNT_W-1:0] cfg_count, n_samples;
  int checks = 0, failures = 0;

  instr_decoder dut (.*);

  task automatic chk(bit cond, string s);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s instr=%h", s, instr); end
  endtask

  initial begin
    repeat (5000) begin
      logic [1:0] op; bit tr, bad;
      instr = $urandom;
      if ($urandom_range(0, 7) == 0) instr[11:0] = '0;
      #1;
      op = instr[31:30]; tr = instr[29];
      bad = (op == 2'd3) || (op == 2'd2 && instr[11:0] == 0) || (op == 2'd1 && tr && instr[11:0] == 0);
      chk(cfg_count == instr[27:16] && n_samples == instr[11:0], "fields");
      chk(illegal == bad, "illegal");
      chk(is_end == (op == 2'd0 || bad), "end");
      chk(is_config == (op == 2'd1 && !bad), "config");
      chk(is_compute == (op == 2'd2 && !bad), "compute");
      chk(then_run == (op == 2'd1 && tr), "then_run");
      chk($onehot({is_end, is_config, is_compute}), "one kind");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
