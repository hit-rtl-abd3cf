// fp32_add: IEEE-754 single-precision adder, the adder of every DMAccum lane
// (32 per Group). The same adders accumulate psums into the Local Buffer in
// the sparse modes and add the incoming partial sum of the row above in the
// dense systolic mode.
//
// The design names FP32 adders without describing them; this one is purely
// combinational: the operands are ordered by magnitude, the smaller one is
// aligned with guard, round and sticky bits, the sum is normalised and
// rounded to nearest, ties to even. Subnormals are flushed to zero, overflow
// gives infinity, inf - inf and NaN inputs give the quiet NaN 0x7fc00000, and
// an exact cancellation gives +0.
module fp32_add (
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] y
);
  logic [31:0] x, z;       // |x| >= |z|
  logic [7:0]  ex, ez;
  logic [27:0] mx, mz, s;  // {carry, hidden, 23 fraction, guard, round, sticky}
  logic [7:0]  d;
  logic        st, rnd;
  logic [24:0] m_r;
  int          e, lz;

  always_comb begin
    lz = 0;
    if (a[30:0] >= b[30:0]) begin x = a; z = b; end
    else                    begin x = b; z = a; end
    ex = x[30:23]; ez = z[30:23];
    mx = (ex == 0) ? 28'd0 : {2'b01, x[22:0], 3'b000};
    mz = (ez == 0) ? 28'd0 : {2'b01, z[22:0], 3'b000};
    d  = ex - ez;
    // align the smaller operand, folding shifted-out bits into sticky
    st = 1'b0;
    for (int i = 0; i < 28; i++) begin
      if (i < int'(d) && mz[i]) st = 1'b1;
    end
    mz = (d > 8'd27) ? 28'd0 : (mz >> d);
    mz[0] = mz[0] | st;
    if (x[31] == z[31]) s = mx + mz;
    else                s = mx - mz;
    e = int'(ex);
    if (s[27]) begin
      s = {1'b0, s[27:2], s[1] | s[0]};
      e = e + 1;
    end else begin
      lz = 27;
      for (int i = 0; i <= 26; i++) begin
        if (s[i]) lz = 26 - i;
      end
      if (lz <= 26) begin
        s = s << lz;
        e = e - lz;
      end
    end
    rnd = s[2] & (s[1] | s[0] | s[3]);
    m_r = {1'b0, s[26:3]} + {24'd0, rnd};
    if (m_r[24]) begin
      m_r = m_r >> 1;
      e = e + 1;
    end
    if ((ex == 8'hff && x[22:0] != 0) || (ez == 8'hff && z[22:0] != 0) ||
        (ex == 8'hff && ez == 8'hff && x[31] != z[31])) begin
      y = 32'h7fc00000;
    end else if (ex == 8'hff) begin
      y = {x[31], 8'hff, 23'd0};
    end else if (s == 28'd0) begin
      y = (x[31] == z[31]) ? {x[31], 31'd0} : 32'd0;
    end else if (e >= 255) begin
      y = {x[31], 8'hff, 23'd0};
    end else if (e <= 0) begin
      y = {x[31], 31'd0};
    end else begin
      y = {x[31], e[7:0], m_r[22:0]};
    end
  end
endmodule
