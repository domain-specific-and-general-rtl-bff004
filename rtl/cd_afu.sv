// cd_afu: sphere collision detection Accelerator Function Unit.
//
// The FPGA side of the CPU-FPGA collision pipeline: the host's broad phase
// writes the spheres and the candidate pairs of a simulation step into a
// shared-memory source buffer and starts the AFU; the AFU computes the
// contact of every pair on N_SCPU parallel Sphere Collision Processing Units
// and writes the contacts to the destination buffer. It is made of the
// Processing Units Controller (collector, replication, dispatch, result
// writer), the Virtual World Info RAM Block, one local sphere RAM per SCPU
// and the SCPUs themselves. 16 SCPUs follow the evaluated configuration.
// Interface and timing: see puc (line-wide shared-memory read and write
// ports, start pulse, done level, performance counters).
module cd_afu
  import cd_pkg::*;
#(
  parameter int N_SCPU  = 16,
  parameter int SPHERES = 4096,
  parameter int CLINES  = 512
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [31:0]  src_base,
  input  logic [31:0]  dst_base,
  output logic         busy,
  output logic         done,
  output logic [31:0]  perf_mem_cycles,
  output logic [31:0]  perf_proc_cycles,
  output logic         rd_req_valid,
  input  logic         rd_req_ready,
  output logic [31:0]  rd_req_addr,
  input  logic         rd_resp_valid,
  input  logic [511:0] rd_resp_data,
  output logic         wr_valid,
  input  logic         wr_ready,
  output logic [31:0]  wr_addr,
  output logic [511:0] wr_data
);
  localparam int SAW = $clog2(SPHERES);
  localparam int CAW = $clog2(CLINES);

  logic           sph_we, cl_we, lr_we;
  logic [SAW-3:0] sph_wline;
  logic [511:0]   sph_wdata, cl_wdata, cl_rdata;
  logic [SAW-1:0] sph_raddr, lr_waddr;
  logic [127:0]   sph_rdata, lr_wdata;
  logic [CAW-1:0] cl_waddr, cl_raddr;
  logic [SAW-1:0] lr_raddr [N_SCPU];
  logic [127:0]   lr_rdata [N_SCPU];
  logic           sc_start [N_SCPU], sc_done [N_SCPU], sc_busy [N_SCPU];
  sphere_t        sc_s1 [N_SCPU], sc_s2 [N_SCPU];
  contact_t       sc_res [N_SCPU];

  puc #(.N_SCPU(N_SCPU), .SPHERES(SPHERES), .CLINES(CLINES)) u_puc (.*);

  vwirb #(.SPHERES(SPHERES), .CLINES(CLINES)) u_vwirb (
    .clk, .sph_we, .sph_wline, .sph_wdata, .sph_raddr, .sph_rdata,
    .cl_we, .cl_waddr, .cl_wdata, .cl_raddr, .cl_rdata);

  for (genvar p = 0; p < N_SCPU; p++) begin : g_pu
    sphere_local_ram #(.DEPTH(SPHERES), .WIDTH(128)) u_lram (
      .clk, .we(lr_we), .waddr(lr_waddr), .wdata(lr_wdata),
      .raddr(lr_raddr[p]), .rdata(lr_rdata[p]));
    scpu u_scpu (
      .clk, .rst_n, .start(sc_start[p]), .s1(sc_s1[p]), .s2(sc_s2[p]),
      .busy(sc_busy[p]), .done(sc_done[p]), .res(sc_res[p]));
  end
endmodule
