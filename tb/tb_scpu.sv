// tb_scpu: self-checking testbench of the sphere collision processing unit.
//
// Drives random sphere pairs (overlapping, far apart and with coincident
// centres), computes the expected contact with real-number arithmetic in the
// testbench and compares every field within a relative tolerance of 2^-18.
// Also checks the collision type and the latency of each case.
module tb_scpu;
  import cd_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, busy, done;
  sphere_t s1, s2;
  contact_t res;
  int checks = 0, failures = 0;

  scpu dut (.clk, .rst_n, .start, .s1, .s2, .busy, .done, .res);

  function automatic real f2r(input logic [31:0] f);
    real m;
    if (f[30:23] == 0) return 0.0;
    m = 1.0 + real'(f[22:0]) / 8388608.0;
    for (int i = 127; i < int'(f[30:23]); i++) m = m * 2.0;
    for (int i = int'(f[30:23]); i < 127; i++) m = m / 2.0;
    return f[31] ? -m : m;
  endfunction
  function automatic logic [31:0] r2f(input real r);
    logic s; int e; real a; logic [31:0] out;
    s = r < 0.0; a = s ? -r : r;
    if (a == 0.0) return 32'd0;
    e = 0;
    while (a >= 2.0) begin a = a / 2.0; e++; end
    while (a < 1.0)  begin a = a * 2.0; e--; end
    out = {s, 8'(e + 127), 23'($rtoi((a - 1.0) * 8388608.0))};
    return out;
  endfunction

  task automatic near(input string what, input logic [31:0] got, input real exp);
    real g, tol;
    g = f2r(got);
    tol = (exp < 0 ? -exp : exp) * 3.9e-6 + 1e-6;
    checks++;
    if ((g - exp > tol) || (exp - g > tol)) begin
      failures++;
      $display("FAIL %s got %g expected %g", what, g, exp);
    end
  endtask

  real x1, y1, z1, r1, x2, y2, z2, r2;

  task automatic run_pair(input int kind);
    real d, dxr, dyr, dzr, k, nxr, nyr, nzr;
    int cyc;
    // kind 0: overlap, 1: far apart, 2: same centre
    x1 = $urandom_range(0, 2000) / 100.0 - 10.0;
    y1 = $urandom_range(0, 2000) / 100.0 - 10.0;
    z1 = $urandom_range(0, 2000) / 100.0 - 10.0;
    r1 = $urandom_range(10, 300) / 100.0;
    r2 = $urandom_range(10, 300) / 100.0;
    if (kind == 2) begin x2 = x1; y2 = y1; z2 = z1; end
    else begin
      x2 = x1 + ($urandom_range(0, 200) / 100.0 - 1.0) * (kind == 1 ? 8.0 : 0.9);
      y2 = y1 + ($urandom_range(0, 200) / 100.0 - 1.0) * (kind == 1 ? 8.0 : 0.9);
      z2 = z1 + ($urandom_range(1, 200) / 100.0) * (kind == 1 ? 8.0 : 0.9) + (kind == 1 ? 7.0 : 0.0);
    end
    // use the exact values the float encoding holds
    x1 = f2r(r2f(x1)); y1 = f2r(r2f(y1)); z1 = f2r(r2f(z1)); r1 = f2r(r2f(r1));
    x2 = f2r(r2f(x2)); y2 = f2r(r2f(y2)); z2 = f2r(r2f(z2)); r2 = f2r(r2f(r2));
    s1 = '{r: r2f(r1), z: r2f(z1), y: r2f(y1), x: r2f(x1)};
    s2 = '{r: r2f(r2), z: r2f(z2), y: r2f(y2), x: r2f(x2)};
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    dxr = x1 - x2; dyr = y1 - y2; dzr = z1 - z2;
    d = $sqrt(dxr*dxr + dyr*dyr + dzr*dzr);
    checks++;
    if (d > r1 + r2) begin
      if (res.ctype != COLL_FAKE || cyc != 33) begin failures++; $display("FAIL fake type %0d cyc %0d", res.ctype, cyc); end
    end else if (d <= 0.0) begin
      if (res.ctype != COLL_GRAZING || cyc != 33) begin failures++; $display("FAIL grazing type %0d cyc %0d", res.ctype, cyc); end
      near("gpx", res.px, x1); near("gnx", res.nx, 1.0); near("gny", res.ny, 0.0);
      near("gdepth", res.depth, r1 + r2);
    end else begin
      if (res.ctype != COLL_REAL || cyc != 63) begin failures++; $display("FAIL real type %0d cyc %0d", res.ctype, cyc); end
      nxr = dxr / d; nyr = dyr / d; nzr = dzr / d;
      k = 0.5 * (r2 - r1 - d);
      near("nx", res.nx, nxr); near("ny", res.ny, nyr); near("nz", res.nz, nzr);
      near("px", res.px, x1 + nxr * k); near("py", res.py, y1 + nyr * k); near("pz", res.pz, z1 + nzr * k);
      near("depth", res.depth, r1 + r2 - d);
    end
  endtask

  initial begin
    start = 0; s1 = '0; s2 = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 200; i++) run_pair(i % 5 == 3 ? 1 : (i % 5 == 4 ? 2 : 0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
