// tb_grn_accel: end-to-end test of the GRN attractor accelerator.
//
// Runs the whole state space of the four-gene network and then a partial
// range that wraps around, with random back-pressure on the result writes,
// and checks every 64-bit record in the result buffer (state, transient,
// attractor) against a trajectory walk done by the testbench. Also counts
// that the thread control unit skipped a full FIFO and that more than one PE
// produced results.
module tb_grn_accel;
  import grn_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start, done, wr_valid, wr_ready;
  gstate_t first;
  logic [N_GENES:0] count;
  logic [31:0] res_base, wr_addr;
  logic [63:0] wr_data;
  int checks = 0, failures = 0, n_skip = 0, n_wstall = 0;
  logic [63:0] mem [logic [31:0]];
  logic [3:0] pe_used;

  grn_accel #(.N_PE(4), .FIFO_DEPTH(2)) dut (.*);

  function automatic gstate_t step(input gstate_t s);
    return {s[2] ^ s[1], s[3] | s[0], s[3] & s[0], s[1]};
  endfunction
  task automatic ref_lengths(input gstate_t s0, output int mu, output int lam);
    gstate_t traj [$];
    gstate_t s = s0;
    mu = -1;
    while (mu < 0) begin
      for (int i = 0; i < traj.size(); i++) if (traj[i] == s) begin mu = i; lam = traj.size() - i; end
      if (mu < 0) begin traj.push_back(s); s = step(s); end
    end
  endtask

  always @(negedge clk) wr_ready <= ($urandom_range(0, 3) == 0);
  always @(posedge clk) begin
    if (wr_valid && wr_ready) mem[wr_addr] = wr_data;
    if (wr_valid && !wr_ready) n_wstall++;
    if (dut.u_tc.busy && dut.q_ready != 4'hF) n_skip++;
    for (int i = 0; i < 4; i++) if (dut.r_ready[i]) pe_used[i] = 1'b1;
  end

  task automatic run(input int f, input int n, input logic [31:0] base);
    int mu, lam;
    logic [63:0] r;
    mem.delete();
    @(negedge clk);
    first = gstate_t'(f); count = (N_GENES+1)'(n); res_base = base; start = 1;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    for (int i = 0; i < n; i++) begin
      ref_lengths(gstate_t'(f + i), mu, lam);
      checks++;
      if (!mem.exists(base + 32'(i*8))) begin failures++; $display("FAIL missing record %0d", i); continue; end
      r = mem[base + 32'(i*8)];
      if (r[15:0] != 16'(gstate_t'(f + i)) || int'(r[31:16]) != mu || int'(r[47:32]) != lam) begin
        failures++;
        $display("FAIL state %0d: got T=%0d L=%0d expected T=%0d L=%0d", f + i, r[31:16], r[47:32], mu, lam);
      end
    end
    checks++;
    if (mem.size() != n) begin failures++; $display("FAIL %0d records written, %0d expected", mem.size(), n); end
  endtask

  initial begin
    start = 0; first = '0; count = '0; res_base = '0; pe_used = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(0, 16, 32'h1000);
    run(11, 9, 32'h2000);
    checks++;
    if (n_skip == 0 || n_wstall == 0 || pe_used != 4'hF) begin
      failures++; $display("FAIL mechanism missing: skips %0d stalls %0d pes %b", n_skip, n_wstall, pe_used);
    end
    $display("full-FIFO skips %0d, write stalls %0d, PEs used %b", n_skip, n_wstall, pe_used);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
