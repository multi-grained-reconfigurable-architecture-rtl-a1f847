// tb_instr_buffer: self-checking test of the instruction buffer.
//
// Random words are written through the host port and read back in random
// order; each read word must appear exactly one cycle after its address.
module tb_instr_buffer;
  import mugra_pkg::*;
  localparam int DEPTH = 256, AW = $clog2(DEPTH);
  logic clk = 0, host_we = 0;
  logic [AW-1:0] host_addr = '0, rd_addr = '0;
  logic [INSTR_W-1:0] host_wdata = '0, rd_data;
  logic [INSTR_W-1:0] mem [DEPTH];
  int checks = 0, failures = 0;

  instr_buffer dut (.*);
  always #5 clk = ~clk;

  initial begin
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      host_we = 1; host_addr = AW'(i); host_wdata = $urandom; mem[i] = host_wdata;
    end
    @(negedge clk) host_we = 0;
    repeat (1000) begin
      int a;
      a = $urandom_range(0, DEPTH - 1);
      @(negedge clk) rd_addr = AW'(a);
      @(posedge clk);
      #1;
      checks++;
      if (rd_data !== mem[a]) begin failures++; $display("FAIL addr %0d", a); end
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
