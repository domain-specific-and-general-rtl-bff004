// tb_fifo: random push/pop test of the synchronous FIFO.
//
// Pushes and pops at random with a testbench queue as reference, checking
// data order, the full and empty flags and the occupancy count.
module tb_fifo;
  localparam int W = 16, DEPTH = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [W-1:0] in_data, out_data;
  logic [2:0] level;
  logic [W-1:0] q [$];
  int checks = 0, failures = 0, n_full = 0;

  fifo #(.W(W), .DEPTH(DEPTH)) dut (.*);

  initial begin
    in_valid = 0; out_ready = 0; in_data = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      in_valid  = ($urandom_range(0, 3) != 0);
      out_ready = ($urandom_range(0, 2) == 0) || (i > 1500);
      in_data   = W'($urandom);
      #1;
      checks += 4;
      if (level != 3'(q.size())) begin failures++; $display("FAIL level"); end
      if (in_ready != (q.size() < DEPTH)) begin failures++; $display("FAIL in_ready"); end
      if (out_valid != (q.size() > 0)) begin failures++; $display("FAIL out_valid"); end
      if (out_valid && out_data != q[0]) begin failures++; $display("FAIL data"); end
      if (!in_ready) n_full++;
      @(posedge clk);
      if (out_valid && out_ready) void'(q.pop_front());
      if (in_valid && in_ready) q.push_back(in_data);
      @(negedge clk);
    end
    checks++;
    if (n_full == 0) begin failures++; $display("FAIL never full"); end
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
