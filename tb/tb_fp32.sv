// tb_fp32: random test of the single-precision adder and multiplier.
//
// Draws operands of mixed signs and magnitudes, computes the reference with
// real arithmetic and requires the results to match within one part in 2^18,
// and then bit for bit against the exact result rounded to nearest-even
// (whenever the double-precision sum or product is exact). Includes exact
// cancellation, which must give zero.
module tb_fp32;
  import tb_fp_pkg::*;
  logic [31:0] a, b, ys, yd, ym;
  int checks = 0, failures = 0;

  fp32_add u_add (.a, .b, .sub(1'b0), .y(ys));
  fp32_add u_sub (.a, .b, .sub(1'b1), .y(yd));
  fp32_mul u_mul (.a, .b, .y(ym));

  // exact round-to-nearest-even of a real (exact sums and products of two
  // single-precision numbers fit in a double), results below the normal
  // range flushed to zero
  function automatic logic [31:0] rne(input real r);
    logic s; int e; real m, f, rem; longint i;
    s = r < 0.0; m = s ? -r : r;
    if (m == 0.0) return 32'd0;
    e = 0;
    while (m >= 2.0) begin m = m / 2.0; e++; end
    while (m < 1.0)  begin m = m * 2.0; e--; end
    f = (m - 1.0) * 8388608.0;
    i = longint'($floor(f));
    rem = f - real'(i);
    if (rem > 0.5 || (rem == 0.5 && i[0])) i++;
    if (i == 64'd8388608) begin i = 0; e++; end
    if (e + 127 <= 0) return 32'd0;
    if (e + 127 >= 255) return {s, 8'hFF, 23'd0};
    return {s, 8'(e + 127), 23'(i)};
  endfunction

  function automatic bit sum_exact(input real x, input real y);
    real ax = x < 0 ? -x : x, ay = y < 0 ? -y : y;
    if (ax == 0.0 || ay == 0.0) return 1'b1;
    return (ax / ay < 268435456.0) && (ay / ax < 268435456.0);
  endfunction

  initial begin
    real ra, rb;
    for (int i = 0; i < 2000; i++) begin
      ra = ($urandom_range(0, 2000000) - 1000000.0) / real'($urandom_range(1, 1000));
      rb = ($urandom_range(0, 2000000) - 1000000.0) / real'($urandom_range(1, 1000));
      if (i % 7 == 0) rb = ra;
      a = r2f(ra); b = r2f(rb);
      ra = f2r(a); rb = f2r(b);
      #1;
      checks += 3;
      if (!close(ys, ra + rb)) begin failures++; $display("FAIL add %g + %g = %g", ra, rb, f2r(ys)); end
      if (!close(yd, ra - rb)) begin failures++; $display("FAIL sub %g - %g = %g", ra, rb, f2r(yd)); end
      if (!close(ym, ra * rb)) begin failures++; $display("FAIL mul %g * %g = %g", ra, rb, f2r(ym)); end
      // bit-exact rounding
      checks++;
      if (ym != rne(ra * rb)) begin failures++; $display("FAIL mul rounding %g * %g", ra, rb); end
      if (sum_exact(ra, rb)) begin
        checks += 2;
        if (ys != rne(ra + rb)) begin failures++; $display("FAIL add rounding %g + %g", ra, rb); end
        if (yd != rne(ra - rb)) begin failures++; $display("FAIL sub rounding %g - %g", ra, rb); end
      end
      if (i % 7 == 0) begin
        checks++;
        if (yd != 32'd0) begin failures++; $display("FAIL x - x not zero"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
