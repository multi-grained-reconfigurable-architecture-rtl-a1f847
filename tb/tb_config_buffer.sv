// tb_config_buffer: self-checking test of the configuration buffer.
//
// Random entries are written through the host port, then read back in random
// order; each read word must appear exactly one cycle after its address.
module tb_config_buffer;
  import mugra_pkg::*;
  localparam int DEPTH = 1024, AW = $clog2(DEPTH);
  logic clk = 0, host_we = 0;
  logic [AW-1:0] host_addr = '0, rd_addr = '0;
  cb_entry_t host_wdata = '0, rd_data;
  cb_entry_t mem [DEPTH];
  int checks = 0, failures = 0;

  config_buffer dut (.*);
  always #5 clk = ~clk;

  initial begin
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      host_we = 1; host_addr = AW'(i);
      host_wdata = {$urandom, $urandom, $urandom};
      mem[i] = host_wdata;
    end
    @(negedge clk) host_we = 0;
    repeat (3000) begin
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
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
