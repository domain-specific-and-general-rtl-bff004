// vwirb: Virtual World Info RAM Block of the collision accelerator.
//
// On-FPGA copy of one simulation step's world: the sphere table and the
// collision lines fetched from the host's source buffer. Spheres arrive four
// per 512-bit line and are written a whole line at a time into four 128-bit
// sub-banks (sphere i lives in sub-bank i%4, row i/4); they are read back one
// sphere per cycle for replication into the SCPUs' local RAMs. Collision
// lines (16 pairs of 16-bit sphere addresses) are stored and read whole.
// Capacities are this design's choice.
// Timing: writes on the clock edge, reads return one cycle after the address.
module vwirb #(
  parameter int SPHERES = 4096,
  parameter int CLINES  = 512,
  localparam int SAW = $clog2(SPHERES),
  localparam int CAW = $clog2(CLINES)
) (
  input  logic           clk,
  // sphere line write (4 spheres)
  input  logic           sph_we,
  input  logic [SAW-3:0] sph_wline,
  input  logic [511:0]   sph_wdata,
  // single sphere read
  input  logic [SAW-1:0] sph_raddr,
  output logic [127:0]   sph_rdata,
  // collision lines
  input  logic           cl_we,
  input  logic [CAW-1:0] cl_waddr,
  input  logic [511:0]   cl_wdata,
  input  logic [CAW-1:0] cl_raddr,
  output logic [511:0]   cl_rdata
);
  logic [127:0] sph [4][SPHERES/4];
  logic [511:0] cl  [CLINES];
  logic [1:0]   rsel;
  logic [127:0] rbank [4];

  always_ff @(posedge clk) begin
    for (int k = 0; k < 4; k++) begin
      if (sph_we) sph[k][sph_wline] <= sph_wdata[k*128 +: 128];
      rbank[k] <= sph[k][sph_raddr[SAW-1:2]];
    end
    rsel <= sph_raddr[1:0];
    if (cl_we) cl[cl_waddr] <= cl_wdata;
    cl_rdata <= cl[cl_raddr];
  end
  assign sph_rdata = rbank[rsel];
endmodule
