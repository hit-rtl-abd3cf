// tb_fp32_add: checks the FP32 adder against sums formed in double precision
// (exact while the exponents differ by less than 29) and rounded to FP32 here
// with round-to-nearest-even. Operands are random normal numbers of both
// signs, including near-cancelling pairs, plus zero, infinity and NaN. The
// adder is combinational, so each result is sampled one clock later.
module tb_fp32_add;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic [31:0] a, b, y;
  int checks = 0, failures = 0;

  fp32_add dut (.a, .b, .y);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // FP32 bits -> real (normal numbers and zero)
  function automatic real f2r(input logic [31:0] f);
    if (f[30:23] == 0) return 0.0;
    return $bitstoreal({f[31], 11'(int'(f[30:23]) - 127 + 1023), f[22:0], 29'd0});
  endfunction
  // real -> FP32 bits, round to nearest even (result assumed normal)
  function automatic logic [31:0] r2f(input real r);
    logic [63:0] d;
    logic [23:0] m;
    logic [28:0] rest;
    int e;
    if (r == 0.0) return 32'd0;
    d    = $realtobits(r);
    e    = int'(d[62:52]) - 1023 + 127;
    m    = {1'b0, d[51:29]};
    rest = d[28:0];
    if (rest > 29'h1000_0000 || (rest == 29'h1000_0000 && m[0])) m = m + 1;
    if (m[23]) begin m = '0; e++; end
    return {d[63], 8'(e), m[22:0]};
  endfunction

  function automatic logic [31:0] rnd(input int emin, input int emax);
    return {1'($urandom), 8'(emin + int'($urandom % 32'(emax - emin + 1))), 23'($urandom)};
  endfunction

  task automatic check(input logic [31:0] ea, input logic [31:0] eb, input logic [31:0] exp_y);
    a = ea; b = eb;
    @(posedge clk);
    checks++;
    if (y !== exp_y) begin
      failures++;
      if (failures < 10) $display("%h + %h = %h, expected %h", ea, eb, y, exp_y);
    end
  endtask

  initial begin
    logic [31:0] x, z;
    for (int i = 0; i < 4000; i++) begin
      x = rnd(100, 140);
      z = rnd(int'(x[30:23]) - 20 < 100 ? 100 : int'(x[30:23]) - 20, int'(x[30:23]) + 20 > 140 ? 140 : int'(x[30:23]) + 20);
      if (i % 8 == 0) z = {~x[31], x[30:23], x[22:0] ^ 23'($urandom % 16)};   // cancellation
      check(x, z, r2f(f2r(x) + f2r(z)));
    end
    check(32'h4040_0000, 32'h4080_0000, 32'h40e0_0000);   // 3 + 4 = 7
    check(32'h4040_0000, 32'hc040_0000, 32'h0000_0000);   // 3 - 3 = +0
    check(32'h0000_0000, 32'hc080_0000, 32'hc080_0000);
    check(32'h7f80_0000, 32'h4000_0000, 32'h7f80_0000);
    check(32'h7f80_0000, 32'hff80_0000, 32'h7fc0_0000);
    check(32'h7fc0_0000, 32'h3f80_0000, 32'h7fc0_0000);
    check(32'h7f7f_ffff, 32'h7f7f_ffff, 32'h7f80_0000);   // overflow to infinity
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
