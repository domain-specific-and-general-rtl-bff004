// tb_platform_top: end-to-end test of the whole platform at its default size.
//
// All three accelerators run at the same time, each against its own
// behavioural memory with random latency and back-pressure:
//  - collision detection: a random world with real, fake and grazing pairs is
//    put in the source buffer, the AFU (16 SCPUs) is started, the host polls
//    the status line, and every contact is compared with a real-number model;
//  - GRN: the whole state space of the four-gene network is analysed by the
//    four PEs, every record is compared with a trajectory walk;
//  - vector-memory processor: a short program (DMA in, dependent vector ops,
//    a long op with an independent prefetch, DMA out) is compared with a
//    byte-level model of the program.
// Every mechanism is counted and a failure is counted for any that never
// happened: SCPU outcome kinds, read and write back-pressure, GRN write
// back-pressure and use of all GRN PEs, vector hazard bubbles, ordering waits
// and concurrent DMA/vector work. Full-FIFO skips of the GRN thread control
// are only reported: the 16 states of the four-gene network fit in the four
// default-depth PE FIFOs, so a skip cannot occur at the default size (the
// GRN block test exercises it with shallower FIFOs).
module tb_platform_top;
  import cd_pkg::*;
  import grn_pkg::*;
  import vm_pkg::*;
  import tb_fp_pkg::*;

  localparam int NSPH  = 64;
  localparam int NCOLL = 29;
  localparam logic [31:0] SRC = 32'h100, DST = 32'h400;
  localparam int LANES = 16;
  localparam int SPB   = 65536;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // ---------------- DUT
  logic cd_start, cd_busy, cd_done;
  logic [31:0] cd_perf_mem_cycles, cd_perf_proc_cycles;
  logic cd_rd_req_valid, cd_rd_req_ready, cd_rd_resp_valid, cd_wr_valid, cd_wr_ready;
  logic [31:0] cd_rd_req_addr, cd_wr_addr;
  logic [511:0] cd_rd_resp_data, cd_wr_data;
  logic grn_start, grn_done, grn_wr_valid, grn_wr_ready;
  gstate_t grn_first;
  logic [N_GENES:0] grn_count;
  logic [31:0] grn_res_base, grn_wr_addr;
  logic [63:0] grn_wr_data;
  logic vm_i_valid, vm_i_ready, vm_busy;
  vinstr_t vm_i_data;
  logic [31:0] vm_perf_concurrent, vm_perf_order_waits, vm_perf_hazard_stalls;
  logic vm_m_req_valid, vm_m_req_ready, vm_m_req_we, vm_m_rsp_valid;
  logic [31:0] vm_m_req_addr;
  logic [63:0] vm_m_req_wdata, vm_m_rsp_rdata;
  logic [7:0] vm_m_req_wstrb;

  platform_top dut (.*, .cd_src_base(SRC), .cd_dst_base(DST));

  // ================= collision detection
  int n_fake = 0, n_graze = 0, n_real = 0, n_rd_stall = 0, n_wr_stall = 0;
  logic [511:0] mem [logic [31:0]];
  logic [31:0]  rq_addr [$];
  int           rq_time [$];
  always @(negedge clk) begin
    cd_rd_req_ready <= ($urandom_range(0, 3) != 0);
    cd_wr_ready     <= ($urandom_range(0, 3) != 0);
  end
  always @(posedge clk) begin
    cd_rd_resp_valid <= 1'b0;
    if (cd_rd_req_valid && cd_rd_req_ready) begin
      rq_addr.push_back(cd_rd_req_addr);
      rq_time.push_back(cyc + $urandom_range(2, 8));
    end
    if (cd_rd_req_valid && !cd_rd_req_ready) n_rd_stall++;
    if (rq_time.size() > 0 && rq_time[0] <= cyc) begin
      cd_rd_resp_valid <= 1'b1;
      cd_rd_resp_data  <= mem.exists(rq_addr[0]) ? mem[rq_addr[0]] : '0;
      void'(rq_addr.pop_front());
      void'(rq_time.pop_front());
    end
    if (cd_wr_valid && cd_wr_ready) mem[cd_wr_addr] = cd_wr_data;
    if (cd_wr_valid && !cd_wr_ready) n_wr_stall++;
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

  task automatic run_cd();
    build_world(0);
    @(negedge clk); cd_start = 1; @(negedge clk); cd_start = 0;
    while (!(mem.exists(DST) && mem[DST][31:0] == 32'd1)) @(negedge clk);
    checks++;
    if (mem[DST][47:32] != 16'(NCOLL)) begin failures++; $display("FAIL status count"); end
    check_results();
    $display("collision detection: memory cycles %0d, processing cycles %0d", cd_perf_mem_cycles, cd_perf_proc_cycles);
  endtask

  // ================= GRN
  int n_skip = 0, n_gstall = 0;
  logic [63:0] gmem [logic [31:0]];
  logic [3:0] pe_used = '0;
  function automatic gstate_t gstep(input gstate_t s);
    return {s[2] ^ s[1], s[3] | s[0], s[3] & s[0], s[1]};
  endfunction
  task automatic ref_lengths(input gstate_t s0, output int mu, output int lam);
    gstate_t traj [$];
    gstate_t s = s0;
    mu = -1;
    while (mu < 0) begin
      for (int i = 0; i < traj.size(); i++) if (traj[i] == s) begin mu = i; lam = traj.size() - i; end
      if (mu < 0) begin traj.push_back(s); s = gstep(s); end
    end
  endtask
  always @(negedge clk) grn_wr_ready <= ($urandom_range(0, 7) == 0);
  always @(posedge clk) begin
    if (grn_wr_valid && grn_wr_ready) gmem[grn_wr_addr] = grn_wr_data;
    if (grn_wr_valid && !grn_wr_ready) n_gstall++;
    if (dut.u_grn.u_tc.busy && dut.u_grn.q_ready != 4'hF) n_skip++;
    for (int i = 0; i < 4; i++) if (dut.u_grn.r_ready[i]) pe_used[i] = 1'b1;
  end
  task automatic run_grn();
    int mu, lam;
    logic [63:0] r;
    @(negedge clk);
    grn_first = '0; grn_count = 5'd16; grn_res_base = 32'h8000; grn_start = 1;
    @(negedge clk);
    grn_start = 0;
    while (!grn_done) @(negedge clk);
    for (int i = 0; i < 16; i++) begin
      ref_lengths(gstate_t'(i), mu, lam);
      checks++;
      r = gmem.exists(32'h8000 + 32'(i*8)) ? gmem[32'h8000 + 32'(i*8)] : '1;
      if (r[15:0] != 16'(i) || int'(r[31:16]) != mu || int'(r[47:32]) != lam) begin
        failures++; $display("FAIL GRN state %0d", i);
      end
    end
  endtask

  // ================= vector-memory processor
  logic [7:0] mm [logic [31:0]];
  int lat = 0;
  logic pend = 0;
  logic [31:0] pend_addr;
  function automatic logic [7:0] mmrd(input logic [31:0] a);
    return mm.exists(a) ? mm[a] : 8'h00;
  endfunction
  always @(negedge clk) vm_m_req_ready <= !pend && ($urandom_range(0, 2) != 0);
  always @(posedge clk) begin
    vm_m_rsp_valid <= 1'b0;
    if (vm_m_req_valid && vm_m_req_ready) begin
      if (vm_m_req_we) begin
        for (int j = 0; j < 8; j++) if (vm_m_req_wstrb[j]) mm[vm_m_req_addr + 32'(j)] = vm_m_req_wdata[8*j +: 8];
      end else begin
        pend <= 1'b1; pend_addr <= vm_m_req_addr; lat <= $urandom_range(1, 4);
      end
    end
    if (pend) begin
      if (lat == 0) begin
        pend <= 1'b0;
        vm_m_rsp_valid <= 1'b1;
        for (int j = 0; j < 8; j++) vm_m_rsp_rdata[8*j +: 8] <= mmrd(pend_addr + 32'(j));
      end else lat <= lat - 1;
    end
  end

  // ---------------- reference model
  logic [7:0] rsp [SPB];
  logic [7:0] rmm [logic [31:0]];
  int unsigned rvl = 0;

  function automatic logic [31:0] ld(input logic [31:0] a, input int sz, input logic sgn);
    logic [31:0] v = '0;
    for (int k = 0; k < (1 << sz); k++) v[8*k +: 8] = rsp[(a + k) % SPB];
    if (sgn && sz == 0) v = 32'(signed'(v[7:0]));
    if (sgn && sz == 1) v = 32'(signed'(v[15:0]));
    return v;
  endfunction
  function automatic logic [31:0] alu(input vop_e op, input logic sgn, input logic [31:0] a, b);
    logic lt;
    lt = sgn ? ($signed(a) < $signed(b)) : (a < b);
    case (op)
      OP_ADD: return a + b;   OP_SUB: return a - b;   OP_MUL: return a * b;
      OP_AND: return a & b;   OP_OR:  return a | b;   OP_XOR: return a ^ b;
      OP_ABSDIFF: return lt ? b - a : a - b;
      OP_MIN: return lt ? a : b;  OP_MAX: return lt ? b : a;
      OP_SHL: return a << b[4:0];
      OP_SHR: return sgn ? 32'($signed(a) >>> b[4:0]) : a >> b[4:0];
      default: return a;
    endcase
  endfunction
  task automatic ref_exec(input vinstr_t x);
    logic [31:0] r [LANES];
    case (x.ctrl.op)
      OP_SET_VL: rvl = x.va;
      OP_DMA_RD: for (int k = 0; k < x.vb; k++) rsp[(x.vd + k) % SPB] = rmm.exists(x.va + k) ? rmm[x.va + k] : 8'h00;
      OP_DMA_WR: for (int k = 0; k < x.vb; k++) rmm[x.vd + k] = rsp[(x.va + k) % SPB];
      default: begin
        for (int g = 0; g < int'(rvl); g += LANES) begin
          int n = (int'(rvl) - g < LANES) ? int'(rvl) - g : LANES;
          for (int i = 0; i < n; i++) begin
            logic [31:0] a, b;
            a = ld(x.va + ((g + i) << x.ctrl.sza), x.ctrl.sza, x.ctrl.sgn);
            b = x.ctrl.bscalar ? x.vb : ld(x.vb + ((g + i) << x.ctrl.szb), x.ctrl.szb, x.ctrl.sgn);
            r[i] = alu(x.ctrl.op, x.ctrl.sgn, a, b);
          end
          for (int i = 0; i < n; i++)
            for (int k = 0; k < (1 << x.ctrl.szd); k++)
              rsp[(x.vd + ((g + i) << x.ctrl.szd) + k) % SPB] = r[i][8*k +: 8];
        end
      end
    endcase
  endtask

  // ---------------- program
  vinstr_t prog [$];
  function automatic vinstr_t mk(input vop_e op, input logic [31:0] d, a, b,
                                 input int szd = 2, sza = 2, szb = 2, input bit sgn = 0, bsc = 0);
    vinstr_t x = '0;
    x.ctrl.op = op; x.ctrl.szd = 2'(szd); x.ctrl.sza = 2'(sza); x.ctrl.szb = 2'(szb);
    x.ctrl.sgn = sgn; x.ctrl.bscalar = bsc;
    x.vd = d; x.va = a; x.vb = b;
    return x;
  endfunction

  task automatic run_vm();
    for (int k = 0; k < 2048; k++) begin
      logic [7:0] v = 8'($urandom);
      mm[32'h1_0000 + k] = v;
      rmm[32'h1_0000 + k] = v;
    end
    // the model starts from whatever the scratchpad holds after power-up
    for (int k = 0; k < SPB; k++) rsp[k] = dut.u_vm.u_sp.mem[k % (4 * LANES)][k / (4 * LANES)];
    prog.push_back(mk(OP_DMA_RD, 32'h0101, 32'h1_0003, 32'd200));
    prog.push_back(mk(OP_DMA_RD, 32'h0803, 32'h1_0200, 32'd200));
    prog.push_back(mk(OP_SET_VL, 0, 32'd50, 0));
    prog.push_back(mk(OP_ADD, 32'h1002, 32'h0101, 32'h0803));
    prog.push_back(mk(OP_MUL, 32'h1402, 32'h1002, 32'h0101));
    prog.push_back(mk(OP_ABSDIFF, 32'h1803, 32'h0101, 32'h0803, 1, 1, 1, 1));
    prog.push_back(mk(OP_SET_VL, 0, 32'd400, 0));
    prog.push_back(mk(OP_XOR, 32'h3000, 32'h0101, 32'h0803, 2, 0, 0, 0));
    prog.push_back(mk(OP_DMA_RD, 32'h6000, 32'h1_0400, 32'd256));
    prog.push_back(mk(OP_SET_VL, 0, 32'd20, 0));
    prog.push_back(mk(OP_MAX, 32'h6007, 32'h6000, 32'h6080, 0, 0, 0, 1));
    prog.push_back(mk(OP_DMA_WR, 32'h2_0000, 32'h1000, 32'h0900));
    prog.push_back(mk(OP_DMA_WR, 32'h2_1001, 32'h3000, 32'd1600));
    prog.push_back(mk(OP_DMA_WR, 32'h2_2000, 32'h6000, 32'd64));
    foreach (prog[p]) begin
      ref_exec(prog[p]);
      vm_i_valid = 1; vm_i_data = prog[p];
      @(posedge clk);
      while (!vm_i_ready) @(posedge clk);
      @(negedge clk);
      vm_i_valid = 0;
    end
    @(negedge clk);
    while (vm_busy) @(negedge clk);
    foreach (rmm[a]) if (a >= 32'h2_0000) begin
      checks++;
      if (mmrd(a) != rmm[a]) begin failures++; if (failures < 10) $display("FAIL vm mm %h", a); end
    end
    $display("vector processor: hazard bubbles %0d, ordering waits %0d, concurrent cycles %0d",
             vm_perf_hazard_stalls, vm_perf_order_waits, vm_perf_concurrent);
  endtask

  initial begin
    cd_start = 0; grn_start = 0; grn_first = '0; grn_count = '0; grn_res_base = '0;
    vm_i_valid = 0; vm_i_data = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    fork
      run_cd();
      run_grn();
      run_vm();
    join
    checks++;
    if (n_fake == 0 || n_graze == 0 || n_real == 0 || n_rd_stall == 0 || n_wr_stall == 0) begin
      failures++; $display("FAIL collision mechanism missing");
    end
    checks++;
    if (n_gstall == 0 || pe_used != 4'hF) begin
      failures++; $display("FAIL GRN mechanism missing");
    end
    checks++;
    if (vm_perf_hazard_stalls == 0 || vm_perf_order_waits == 0 || vm_perf_concurrent == 0) begin
      failures++; $display("FAIL vector mechanism missing");
    end
    $display("SCPU fake %0d grazing %0d real %0d; read stalls %0d write stalls %0d",
             n_fake, n_graze, n_real, n_rd_stall, n_wr_stall);
    $display("GRN full-FIFO skips %0d, write stalls %0d, PEs used %b", n_skip, n_gstall, pe_used);
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
