// fp32_mul: single-precision IEEE-754 multiplier, combinational.
//
// Multiplies the two 24-bit significands into a 48-bit product, normalises
// by at most one position, rounds to nearest-even with guard and sticky bits
// and adds the exponents. Subnormals flush to zero and overflow saturates to
// infinity; NaN handling is omitted (this design's simplification, the
// source only states that 32-bit IEEE-754 numbers are used).
// Timing: purely combinational.
module fp32_mul (
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] y
);
  logic [47:0] p;
  logic [9:0]  e;
  logic [23:0] m;
  logic        g, st, rup;
  logic [24:0] mr;
  logic        s;

  always_comb begin
    s = a[31] ^ b[31];
    p = {1'b1, a[22:0]} * {1'b1, b[22:0]};
    e = {2'b00, a[30:23]} + {2'b00, b[30:23]} - 10'd127;
    if (p[47]) begin
      m  = p[47:24];
      g  = p[23];
      st = |p[22:0];
      e  = e + 10'd1;
    end else begin
      m  = p[46:23];
      g  = p[22];
      st = |p[21:0];
    end
    rup = g & (st | m[0]);
    mr  = {1'b0, m} + {24'd0, rup};
    if (mr[24]) begin
      mr = mr >> 1;
      e  = e + 10'd1;
    end
    if (a[30:23] == 8'd0 || b[30:23] == 8'd0 || $signed(e) <= 10'sd0) y = 32'd0;
    else if ($signed(e) >= 10'sd255) y = {s, 8'hFF, 23'd0};
    else y = {s, e[7:0], mr[22:0]};
  end
endmodule
