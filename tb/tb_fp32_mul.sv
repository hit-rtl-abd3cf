// tb_fp32_mul: checks the FP32 multiplier against products formed in double
// precision (exact for two 24-bit significands) and rounded to FP32 here with
// round-to-nearest-even. Operands are random normal numbers whose product
// stays normal, plus zero, infinity and NaN operands. The multiplier is
// combinational, so each result is sampled one clock after the operands.
module tb_fp32_mul;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic [31:0] a, b, y;
  int checks = 0, failures = 0;

  fp32_mul dut (.a, .b, .y);

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
      if (failures < 10) $display("%h * %h = %h, expected %h", ea, eb, y, exp_y);
    end
  endtask

  initial begin
    logic [31:0] x, z;
    for (int i = 0; i < 3000; i++) begin
      x = rnd(70, 180); z = rnd(70, 180);
      check(x, z, r2f(f2r(x) * f2r(z)));
    end
    // exact small integers
    check(32'h4040_0000, 32'h4080_0000, 32'h4140_0000);   // 3 * 4 = 12
    check(32'hbf80_0000, 32'h4000_0000, 32'hc000_0000);   // -1 * 2 = -2
    // special operands
    check(32'h0000_0000, 32'h4080_0000, 32'h0000_0000);
    check(32'h8000_0000, 32'h4080_0000, 32'h8000_0000);
    check(32'h7f80_0000, 32'h4000_0000, 32'h7f80_0000);
    check(32'h7f80_0000, 32'h0000_0000, 32'h7fc0_0000);
    check(32'h7fc0_0000, 32'h3f80_0000, 32'h7fc0_0000);
    check(32'h7f00_0000, 32'h7f00_0000, 32'h7f80_0000);   // overflow to infinity
    check(32'h0080_0000, 32'h0080_0000, 32'h0000_0000);   // underflow flushed to zero
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
