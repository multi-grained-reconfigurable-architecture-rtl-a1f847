// tb_bank_group: self-checking test of the group interconnect.
//
// Random patterns: the input word must reach every PE and be valid only for
// PEs with RD set; the output bank must receive the result of the single PE
// offering one (the lowest-numbered when several do, with 'conflict' raised).
module tb_bank_group;
  localparam int NW = 16, G = 4;
  logic [NW-1:0] bank_rdata, bank_wdata;
  logic bank_rvalid, bank_we, conflict;
  logic [G-1:0] pe_rd, pe_ib_valid, pe_ob_valid;
  logic [G-1:0][NW-1:0] pe_ib_data, pe_ob_data;
  int checks = 0, failures = 0;

  bank_group #(.NW(NW), .GROUP_ROWS(G)) dut (.*);

  task automatic chk(bit cond, string s);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", s); end
  endtask

  initial begin
    repeat (2000) begin
      int first, n;
      bank_rdata = NW'($urandom); bank_rvalid = $urandom_range(0, 1);
      pe_rd = G'($urandom);
      for (int i = 0; i < G; i++) pe_ob_data[i] = NW'($urandom);
      // mostly one-hot or empty output valids, sometimes a conflict
      case ($urandom_range(0, 3))
        0: pe_ob_valid = '0;
        3: pe_ob_valid = G'($urandom);
        default: pe_ob_valid = G'(1) << $urandom_range(0, G - 1);
      endcase
      #1;
      for (int i = 0; i < G; i++) begin
        chk(pe_ib_data[i] == bank_rdata, "input word broadcast");
        chk(pe_ib_valid[i] == (bank_rvalid && pe_rd[i]), "input valid only for RD PEs");
      end
      first = -1; n = 0;
      for (int i = G - 1; i >= 0; i--) if (pe_ob_valid[i]) begin first = i; n++; end
      chk(bank_we == (n > 0), "write enable");
      if (n > 0) chk(bank_wdata == pe_ob_data[first], "selected output");
      chk(conflict == (n > 1), "conflict flag");
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
