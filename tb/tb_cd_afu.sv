// tb_cd_afu: end-to-end test of the sphere collision accelerator.
//
// A behavioural shared memory (random read latency, in-order responses,
// random back-pressure on requests and writes) holds a source buffer with a
// random world of spheres and a list of candidate pairs of all three kinds
// (overlapping, far apart, coincident centres), in a count that leaves the
// last collision line partly filled. The testbench runs two simulation
// steps, polls the status line like a host would, and checks every contact
// against a real-number model of the sphere test.
module tb_cd_afu;
  import cd_pkg::*;
  import tb_fp_pkg::*;

  localparam int NSPH  = 80;
  localparam int NCOLL = 37;
  localparam logic [31:0] SRC = 32'h100, DST = 32'h400;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, busy, done;
  logic [31:0] perf_mem_cycles, perf_proc_cycles;
  logic rd_req_valid, rd_req_ready, rd_resp_valid, wr_valid, wr_ready;
  logic [31:0] rd_req_addr, wr_addr;
  logic [511:0] rd_resp_data, wr_data;

  cd_afu dut (.*, .src_base(SRC), .dst_base(DST));

  int checks = 0, failures = 0;
  int n_fake = 0, n_graze = 0, n_real = 0, n_rd_stall = 0, n_wr_stall = 0;

  // ---------------- behavioural shared memory
  logic [511:0] mem [logic [31:0]];
  logic [31:0]  rq_addr [$];
  int           rq_time [$];
  int           cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  always @(negedge clk) begin
    rd_req_ready <= ($urandom_range(0, 3) != 0);
    wr_ready     <= ($urandom_range(0, 3) != 0);
  end
  always @(posedge clk) begin
    rd_resp_valid <= 1'b0;
    if (rd_req_valid && rd_req_ready) begin
      rq_addr.push_back(rd_req_addr);
      rq_time.push_back(cyc + $urandom_range(2, 8));
    end
    if (rd_req_valid && !rd_req_ready) n_rd_stall++;
    if (rq_time.size() > 0 && rq_time[0] <= cyc) begin
      rd_resp_valid <= 1'b1;
      rd_resp_data  <= mem.exists(rq_addr[0]) ? mem[rq_addr[0]] : '0;
      void'(rq_addr.pop_front());
      void'(rq_time.pop_front());
    end
    if (wr_valid && wr_ready) mem[wr_addr] = wr_data;
    if (wr_valid && !wr_ready) n_wr_stall++;
  end

  // ---------------- world
  real sx [NSPH], sy [NSPH], sz [NSPH], sr [NSPH];
  int  ca [NCOLL], cb [NCOLL];

  function automatic real q(input real r); return f2r(r2f(r)); endfunction

  task automatic build_world(input int seed_shift);
    logic [511:0] line;
    for (int i = 0; i < NSPH; i++) begin
      sx[i] = q($urandom_range(0, 4000) / 100.0 - 20.0);
      sy[i] = q($urandom_range(0, 4000) / 100.0 - 20.0);
      sz[i] = q($urandom_range(0, 4000) / 100.0 - 20.0 + seed_shift);
      sr[i] = q($urandom_range(20, 300) / 100.0);
    end
    for (int c = 0; c < NCOLL; c++) begin
      ca[c] = $urandom_range(0, NSPH / 2 - 1);
      cb[c] = NSPH / 2 + (c % (NSPH / 2));
      case (c % 4)
        0, 1: begin  // place b close to a: real collision
          sx[cb[c]] = q(sx[ca[c]] + $urandom_range(0, 100) / 100.0 - 0.5);
          sy[cb[c]] = q(sy[ca[c]] + $urandom_range(0, 100) / 100.0 - 0.5);
          sz[cb[c]] = q(sz[ca[c]] + $urandom_range(1, 100) / 100.0);
        end
        2: begin     // far apart: fake collision
          sx[cb[c]] = q(sx[ca[c]] + 30.0);
        end
        default: begin // same centre: grazing case
          sx[cb[c]] = sx[ca[c]]; sy[cb[c]] = sy[ca[c]]; sz[cb[c]] = sz[ca[c]];
        end
      endcase
    end
    mem.delete();
    mem[SRC] = {480'd0, 16'(NCOLL), 16'(NSPH)};
    for (int l = 0; l < (NSPH + 3) / 4; l++) begin
      line = '0;
      for (int k = 0; k < 4; k++)
        if (l*4 + k < NSPH)
          line[k*128 +: 128] = {r2f(sr[l*4+k]), r2f(sz[l*4+k]), r2f(sy[l*4+k]), r2f(sx[l*4+k])};
      mem[SRC + 1 + l] = line;
    end
    for (int l = 0; l < (NCOLL + 15) / 16; l++) begin
      line = '0;
      for (int p = 0; p < 16; p++)
        if (l*16 + p < NCOLL) begin
          line[p*32 +: 16]      = 16'(ca[l*16+p]);
          line[p*32 + 16 +: 16] = 16'(cb[l*16+p]);
        end
      mem[SRC + 1 + (NSPH + 3) / 4 + l] = line;
    end
  endtask

  task automatic check_results();
    contact_t r;
    real d, dx, dy, dz, k;
    int a, b;
    for (int c = 0; c < NCOLL; c++) begin
      r = mem[DST + 1 + c / 2][(c % 2)*256 +: 256];
      a = ca[c]; b = cb[c];
      dx = sx[a] - sx[b]; dy = sy[a] - sy[b]; dz = sz[a] - sz[b];
      d = $sqrt(dx*dx + dy*dy + dz*dz);
      checks++;
      if (d > sr[a] + sr[b]) begin
        n_fake++;
        if (r.ctype != COLL_FAKE) begin failures++; $display("FAIL c%0d expected fake", c); end
      end else if (d <= 0.0) begin
        n_graze++;
        if (r.ctype != COLL_GRAZING || !close(r.px, sx[a]) || !close(r.nx, 1.0) || !close(r.depth, sr[a] + sr[b])) begin
          failures++; $display("FAIL c%0d grazing", c);
        end
      end else begin
        n_real++;
        k = 0.5 * (sr[b] - sr[a] - d);
        if (r.ctype != COLL_REAL || !close(r.nx, dx/d) || !close(r.ny, dy/d) || !close(r.nz, dz/d)
            || !close(r.px, sx[a] + dx/d*k) || !close(r.py, sy[a] + dy/d*k) || !close(r.pz, sz[a] + dz/d*k)
            || !close(r.depth, sr[a] + sr[b] - d)) begin
          failures++; $display("FAIL c%0d real %g %g %g %g | %g %g %g %g d=%g", c, f2r(r.nx), dx/d, f2r(r.px), sx[a] + dx/d*k, f2r(r.depth), sr[a]+sr[b]-d, f2r(r.pz), sz[a]+dz/d*k, d);
        end
      end
    end
  endtask

  initial begin
    start = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int step = 0; step < 2; step++) begin
      build_world(step * 5);
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      // host polls the status line written last by the AFU
      while (!(mem.exists(DST) && mem[DST][31:0] == 32'd1)) @(negedge clk);
      checks++;
      if (mem[DST][47:32] != 16'(NCOLL)) begin failures++; $display("FAIL status count"); end
      checks++;
      if (!done) begin @(negedge clk); if (!done) begin failures++; $display("FAIL done flag"); end end
      check_results();
      checks++;
      if (perf_mem_cycles == 0 || perf_proc_cycles == 0) begin failures++; $display("FAIL perf counters"); end
      $display("step %0d: memory cycles %0d, processing cycles %0d", step, perf_mem_cycles, perf_proc_cycles);
      mem[DST] = '0;
    end
    // every mechanism must have happened
    checks++;
    if (n_fake == 0 || n_graze == 0 || n_real == 0 || n_rd_stall == 0 || n_wr_stall == 0) begin
      failures++; $display("FAIL mechanism not exercised");
    end
    $display("fake %0d grazing %0d real %0d read stalls %0d write stalls %0d",
             n_fake, n_graze, n_real, n_rd_stall, n_wr_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
