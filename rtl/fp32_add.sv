// fp32_add: single-precision IEEE-754 adder/subtractor, combinational.
//
// Computes y = a + b (sub = 0) or y = a - b (sub = 1). The larger magnitude
// operand is kept, the smaller one is aligned right with guard, round and
// sticky bits, the mantissas are added or subtracted, the result is
// normalised with a leading-zero count and rounded to nearest-even.
// Subnormal inputs and results are flushed to zero; infinities and NaNs are
// not treated specially (the collision datapath never produces them from
// finite world coordinates). Those simplifications are this design's choice:
// the source describes only "32-bit IEEE 754 floating point" arithmetic.
// Timing: purely combinational, no clock.
module fp32_add (
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  logic        sub,
  output logic [31:0] y
);
  logic        sa, sb, sl, ss;
  logic [7:0]  ea, eb, el, es;
  logic [26:0] ml, ms, msh;
  logic [27:0] sum;
  logic [7:0]  d;
  logic [4:0]  lz;
  logic [9:0]  er;      // signed working exponent
  logic [26:0] mn;
  logic [24:0] mr;
  logic        rup;

  always_comb begin
    sa = a[31];
    sb = b[31] ^ sub;
    ea = a[30:23];
    eb = b[30:23];
    // swap so that (el,ml) holds the larger magnitude
    if ({ea, a[22:0]} >= {eb, b[22:0]}) begin
      sl = sa; el = ea; ml = (ea == 8'd0) ? 27'd0 : {1'b1, a[22:0], 3'b000};
      ss = sb; es = eb; ms = (eb == 8'd0) ? 27'd0 : {1'b1, b[22:0], 3'b000};
    end else begin
      sl = sb; el = eb; ml = (eb == 8'd0) ? 27'd0 : {1'b1, b[22:0], 3'b000};
      ss = sa; es = ea; ms = (ea == 8'd0) ? 27'd0 : {1'b1, a[22:0], 3'b000};
    end
    d = el - es;
    // align the smaller operand, folding shifted-out bits into the sticky bit
    if (d >= 8'd27) msh = {26'd0, |ms};
    else begin
      msh = ms >> d;
      if ((ms & ((27'd1 << d) - 27'd1)) != 27'd0) msh[0] = 1'b1;
    end
    if (sl == ss) sum = {1'b0, ml} + {1'b0, msh};
    else          sum = {1'b0, ml} - {1'b0, msh};

    er = {2'b00, el};
    lz = 5'd0;
    mn = 27'd0;
    if (sum[27]) begin
      mn = sum[27:1];
      mn[0] = sum[1] | sum[0];
      er = er + 10'd1;
    end else begin
      for (int i = 26; i >= 0; i--) begin
        if (sum[i] && lz == 5'd0 && mn == 27'd0) begin
          lz = 5'(26 - i);
          mn = sum[26:0] << (26 - i);
        end
      end
      er = er - {5'd0, lz};
    end
    // round to nearest, ties to even: bits [2:0] are guard, round, sticky
    rup = mn[2] & (mn[1] | mn[0] | mn[3]);
    mr  = {1'b0, mn[26:3]} + {24'd0, rup};
    if (mr[24]) begin
      mr = mr >> 1;
      er = er + 10'd1;
    end
    if (sum == 28'd0 || el == 8'd0 || $signed(er) <= 10'sd0) y = 32'd0;
    else if ($signed(er) >= 10'sd255) y = {sl, 8'hFF, 23'd0};
    else y = {sl, er[7:0], mr[22:0]};
  end
endmodule
