// tb_neuron_unit: self-checking test of the neuron unit.
//
// Hand-worked cases first (values in Q8.8 and Q3.13), then 20000 random
// operand sets compared with a 64-bit integer model of
// LReLU(((x1*w1)>>>q) + ((x2*w2)>>>q) + b), every sum wrapped to 16 bits and
// negative values divided by 2^p (arithmetic shift).
module tb_neuron_unit;
  localparam int NW = 16;
  logic signed [NW-1:0] x1, x2, w1, w2, b, y;
  logic [3:0] q;
  logic [1:0] p;
  int checks = 0, failures = 0;

  neuron_unit #(.NW(NW)) dut (.*);

  function automatic logic signed [NW-1:0] model(longint a1, longint a2, longint c1, longint c2,
                                                 longint bb, int qq, int pp);
    longint t1, t2, s;
    logic signed [NW-1:0] s16;
    t1  = (a1 * c1) >>> qq;
    t2  = (a2 * c2) >>> qq;
    s16 = NW'(t1) + NW'(t2);
    s16 = s16 + NW'(bb);
    s   = longint'(s16);
    if (s < 0) s = s >>> pp;
    return NW'(s);
  endfunction

  task automatic check(logic signed [NW-1:0] exp, string what);
    #1;
    checks++;
    if (y !== exp) begin
      failures++;
      $display("FAIL %s: x1=%0d w1=%0d x2=%0d w2=%0d b=%0d q=%0d p=%0d y=%0d exp=%0d",
               what, x1, w1, x2, w2, b, q, p, y, exp);
    end
  endtask

  initial begin
    // 1.5*2.0 + 0*0 - 4.0 = -1.0 ; Q8.8 ; alpha = 1/8 -> -0.125 = -32
    x1 = 16'sd384; w1 = 16'sd512; x2 = 0; w2 = 0; b = -16'sd1024; q = 8; p = 3;
    check(-16'sd32, "leaky negative");
    // 1.5*2.0 + 0.5*1.0 + 0.25 = 3.75 -> 960
    x2 = 16'sd128; w2 = 16'sd256; b = 16'sd64;
    check(16'sd960, "positive sum");
    // Q3.13: 0.5*0.5 + 0.5*(-0.5) + 0 = 0
    x1 = 16'sd4096; w1 = 16'sd4096; x2 = 16'sd4096; w2 = -16'sd4096; b = 0; q = 13; p = 1;
    check(16'sd0, "cancel");
    // Q3.13: -1.0*1.0 + 0 = -1.0, alpha = 1/2 -> -0.5 = -4096
    x1 = -16'sd8192; w1 = 16'sd8192; x2 = 0; w2 = 0;
    check(-16'sd4096, "half slope");
    // p = 0: slope 1 (plain linear)
    p = 0;
    check(-16'sd8192, "linear");
    repeat (20000) begin
      x1 = $urandom; x2 = $urandom; w1 = $urandom; w2 = $urandom; b = $urandom;
      q = $urandom; p = $urandom;
      if ($urandom % 2) begin x1 = x1 >>> 4; w1 = w1 >>> 4; x2 = x2 >>> 4; w2 = w2 >>> 4; b = b >>> 4; end
      check(model(x1, x2, w1, w2, b, q, p), "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
