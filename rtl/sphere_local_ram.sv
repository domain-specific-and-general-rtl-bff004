// sphere_local_ram: local sphere table of one collision processing unit.
//
// Simple dual-port RAM, one 128-bit sphere record per word. Every SCPU owns
// one; the controller writes the same record into all of them in the same
// cycle (replication), and each SCPU's sequencer reads its own copy, so all
// units fetch their operands in parallel without contention. Capacity is
// this design's choice (the source does not give it).
// Timing: write on the clock edge; read data appears one cycle after raddr.
module sphere_local_ram #(
  parameter int DEPTH = 4096,
  parameter int WIDTH = 128,
  localparam int AW = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);
  logic [WIDTH-1:0] mem [DEPTH];
  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
