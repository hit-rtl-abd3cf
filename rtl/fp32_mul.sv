// fp32_mul: IEEE-754 single-precision multiplier, one per multiplier lane of
// a Compute Group (32 per Group, 128 per Compute Row).
//
// The design calls for FP32 multipliers but does not describe their insides;
// this one is purely combinational: the 24x24-bit significand product is
// normalised by at most one position and rounded to nearest, ties to even.
// Subnormal inputs and results are flushed to zero, an overflow gives an
// infinity of the right sign and any NaN input (or 0 x inf) gives the
// canonical quiet NaN 0x7fc00000. The pipeline register after the multiplier
// lives in the Compute Group.
module fp32_mul (
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] y
);
  logic        sa, sb, sy;
  logic [7:0]  ea, eb;
  logic [47:0] prod;
  logic [22:0] frac;
  logic        guard, sticky, rnd;
  logic [23:0] frac_r;
  int          e;

  always_comb begin
    sa = a[31]; sb = b[31]; sy = sa ^ sb;
    ea = a[30:23]; eb = b[30:23];
    prod = {1'b1, a[22:0]} * {1'b1, b[22:0]};
    e = int'(ea) + int'(eb) - 127;
    if (prod[47]) begin
      e      = e + 1;
      frac   = prod[46:24];
      guard  = prod[23];
      sticky = |prod[22:0];
    end else begin
      frac   = prod[45:23];
      guard  = prod[22];
      sticky = |prod[21:0];
    end
    rnd    = guard & (sticky | frac[0]);
    frac_r = {1'b0, frac} + {23'd0, rnd};
    if (frac_r[23]) e = e + 1;
    y = {sy, 8'd0, 23'd0};
    if ((ea == 8'hff && a[22:0] != 0) || (eb == 8'hff && b[22:0] != 0) ||
        (ea == 8'hff && eb == 8'd0) || (eb == 8'hff && ea == 8'd0)) begin
      y = 32'h7fc00000;
    end else if (ea == 8'hff || eb == 8'hff) begin
      y = {sy, 8'hff, 23'd0};
    end else if (ea == 8'd0 || eb == 8'd0) begin
      y = {sy, 31'd0};
    end else if (e >= 255) begin
      y = {sy, 8'hff, 23'd0};
    end else if (e <= 0) begin
      y = {sy, 31'd0};
    end else begin
      y = {sy, e[7:0], frac_r[22:0]};
    end
  end
endmodule
