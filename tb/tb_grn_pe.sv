// tb_grn_pe: checks the GRN processing element on every initial state.
//
// For each of the 16 states of the four-gene network the testbench walks the
// trajectory itself (with its own copy of the gene equations), records the
// first repeated state, and derives the transient and attractor lengths;
// the PE's result must match, and the cycle count must equal
// 2 + meeting steps + attractor + transient. Random output back-pressure is
// applied. The example trajectory 0010 -> 1001 -> ... -> 0100 <-> 1000 of
// the design description is checked as well.
module tb_grn_pe;
  import grn_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, in_ready, out_valid, out_ready;
  gstate_t in_state;
  grn_result_t out_res;
  int checks = 0, failures = 0;

  grn_pe dut (.*);

  function automatic gstate_t step(input gstate_t s);
    return {s[2] ^ s[1], s[3] | s[0], s[3] & s[0], s[1]};
  endfunction

  initial begin
    gstate_t traj [$];
    gstate_t s;
    int mu, lam, meet, cyc;
    in_valid = 0; out_ready = 0; in_state = '0;
    // example trajectory from the description
    begin
      gstate_t expt [7] = '{4'b0010, 4'b1001, 4'b0110, 4'b0001, 4'b0100, 4'b1000, 4'b0100};
      for (int i = 0; i < 6; i++) begin
        checks++;
        if (step(expt[i]) != expt[i+1]) begin failures++; $display("FAIL example step %0d", i); end
      end
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int st0 = 0; st0 < 16; st0++) begin
      // reference: first repetition along the trajectory
      traj.delete();
      s = gstate_t'(st0);
      mu = -1;
      while (mu < 0) begin
        for (int i = 0; i < traj.size(); i++) if (traj[i] == s) begin mu = i; lam = traj.size() - i; end
        if (mu < 0) begin traj.push_back(s); s = step(s); end
      end
      // Floyd meeting step: smallest k >= 1 with k >= mu and k % lam == 0
      meet = lam;
      while (meet < mu) meet += lam;
      @(negedge clk);
      in_valid = 1; in_state = gstate_t'(st0);
      @(negedge clk);
      in_valid = 0;
      cyc = 1;
      while (!out_valid) begin @(negedge clk); cyc++; end
      repeat ($urandom_range(0, 3)) @(negedge clk);
      out_ready = 1;
      checks += 4;
      if (out_res.state != gstate_t'(st0)) begin failures++; $display("FAIL state"); end
      if (int'(out_res.transient) != mu) begin failures++; $display("FAIL s%0d transient %0d exp %0d", st0, out_res.transient, mu); end
      if (int'(out_res.attractor) != lam) begin failures++; $display("FAIL s%0d attractor %0d exp %0d", st0, out_res.attractor, lam); end
      if (cyc != 2 + meet + lam + mu) begin failures++; $display("FAIL s%0d cycles %0d exp %0d", st0, cyc, 2 + meet + lam + mu); end
      @(negedge clk);
      out_ready = 0;
    end
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
