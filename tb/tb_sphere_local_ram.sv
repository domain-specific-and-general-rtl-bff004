// tb_sphere_local_ram: write/read test of a local sphere RAM.
//
// Fills the RAM with random records, overwrites some, and reads all of them
// back one cycle after the address, comparing with a testbench copy.
module tb_sphere_local_ram;
  localparam int DEPTH = 256;
  logic clk = 0;
  always #5 clk = ~clk;
  logic we = 0;
  logic [7:0] waddr = '0, raddr = '0;
  logic [127:0] wdata = '0, rdata;
  logic [127:0] ref_mem [DEPTH];
  int checks = 0, failures = 0;

  sphere_local_ram #(.DEPTH(DEPTH), .WIDTH(128)) dut (.*);

  initial begin
    @(negedge clk);
    for (int i = 0; i < DEPTH + 64; i++) begin
      we = 1; waddr = 8'(i % DEPTH);
      wdata = {$urandom, $urandom, $urandom, $urandom};
      ref_mem[i % DEPTH] = wdata;
      @(negedge clk);
    end
    we = 0;
    for (int i = 0; i < DEPTH; i++) begin
      raddr = 8'(i);
      @(negedge clk);
      checks++;
      if (rdata != ref_mem[i]) begin failures++; $display("FAIL addr %0d", i); end
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
