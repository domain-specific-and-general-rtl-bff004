// tb_vwirb: checks the VWIRB sphere sub-banks and collision line store.
//
// Writes random sphere lines and collision lines, then reads every sphere
// and every line back and compares with a testbench copy, including the
// one-cycle read latency.
module tb_vwirb;
  localparam int SPHERES = 64, CLINES = 8;
  logic clk = 0;
  always #5 clk = ~clk;
  logic sph_we = 0, cl_we = 0;
  logic [3:0] sph_wline = '0;
  logic [511:0] sph_wdata = '0, cl_wdata = '0, cl_rdata;
  logic [5:0] sph_raddr = '0;
  logic [127:0] sph_rdata;
  logic [2:0] cl_waddr = '0, cl_raddr = '0;
  logic [511:0] lines [SPHERES/4], cls [CLINES];
  int checks = 0, failures = 0;

  vwirb #(.SPHERES(SPHERES), .CLINES(CLINES)) dut (.*);

  function automatic logic [511:0] rnd512();
    logic [511:0] v;
    for (int k = 0; k < 16; k++) v[k*32 +: 32] = $urandom;
    return v;
  endfunction

  initial begin
    @(negedge clk);
    for (int l = 0; l < SPHERES/4; l++) begin
      lines[l] = rnd512();
      sph_we = 1; sph_wline = 4'(l); sph_wdata = lines[l];
      @(negedge clk);
    end
    sph_we = 0;
    for (int l = 0; l < CLINES; l++) begin
      cls[l] = rnd512();
      cl_we = 1; cl_waddr = 3'(l); cl_wdata = cls[l];
      @(negedge clk);
    end
    cl_we = 0;
    for (int i = 0; i < SPHERES; i++) begin
      sph_raddr = 6'(i); cl_raddr = 3'(i % CLINES);
      @(negedge clk);
      checks += 2;
      if (sph_rdata != lines[i/4][(i%4)*128 +: 128]) begin failures++; $display("FAIL sphere %0d", i); end
      if (cl_rdata != cls[i % CLINES]) begin failures++; $display("FAIL line %0d", i % CLINES); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
