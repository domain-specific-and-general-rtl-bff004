// platform_top: the three accelerators of the work, side by side.
//
// The three designs do not share a bus or a clock domain in the original
// systems, so they stand here as independent instances, each with its own
// ports brought out with a prefix:
//   cd_*  : the sphere collision detection AFU (16 SCPUs). Its 512-bit
//           shared-memory read and write ports are where the host memory
//           link (not designed here) connects.
//   grn_* : the Boolean gene regulatory network attractor accelerator
//           (4 PEs). Its 64-bit result write port goes to host memory.
//   vm_*  : the memory-based vector processor. The instruction FIFO push
//           port is driven by the scalar host core, the 64-bit memory port
//           connects to main memory; neither is designed here.
// All three run on the single clock clk with the active-low reset rst_n;
// connecting them to one clock is this design's choice for a common top.
// Every interface and its timing is described in the instantiated module.
module platform_top
  import grn_pkg::*;
  import vm_pkg::*;
#(
  parameter int CD_N_SCPU   = 16,
  parameter int CD_SPHERES  = 4096,
  parameter int CD_CLINES   = 512,
  parameter int GRN_N_PE    = 4,
  parameter int GRN_FIFO_D  = 4,
  parameter int VM_LANES    = 16,
  parameter int VM_SP_BYTES = 65536,
  parameter int VM_IFIFO_D  = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  // collision detection AFU
  input  logic             cd_start,
  input  logic [31:0]      cd_src_base,
  input  logic [31:0]      cd_dst_base,
  output logic             cd_busy,
  output logic             cd_done,
  output logic [31:0]      cd_perf_mem_cycles,
  output logic [31:0]      cd_perf_proc_cycles,
  output logic             cd_rd_req_valid,
  input  logic             cd_rd_req_ready,
  output logic [31:0]      cd_rd_req_addr,
  input  logic             cd_rd_resp_valid,
  input  logic [511:0]     cd_rd_resp_data,
  output logic             cd_wr_valid,
  input  logic             cd_wr_ready,
  output logic [31:0]      cd_wr_addr,
  output logic [511:0]     cd_wr_data,
  // GRN attractor accelerator
  input  logic             grn_start,
  input  gstate_t          grn_first,
  input  logic [N_GENES:0] grn_count,
  input  logic [31:0]      grn_res_base,
  output logic             grn_done,
  output logic             grn_wr_valid,
  input  logic             grn_wr_ready,
  output logic [31:0]      grn_wr_addr,
  output logic [63:0]      grn_wr_data,
  // vector-memory processor
  input  logic             vm_i_valid,
  output logic             vm_i_ready,
  input  vinstr_t          vm_i_data,
  output logic             vm_busy,
  output logic [31:0]      vm_perf_concurrent,
  output logic [31:0]      vm_perf_order_waits,
  output logic [31:0]      vm_perf_hazard_stalls,
  output logic             vm_m_req_valid,
  input  logic             vm_m_req_ready,
  output logic             vm_m_req_we,
  output logic [31:0]      vm_m_req_addr,
  output logic [63:0]      vm_m_req_wdata,
  output logic [7:0]       vm_m_req_wstrb,
  input  logic             vm_m_rsp_valid,
  input  logic [63:0]      vm_m_rsp_rdata
);
  cd_afu #(.N_SCPU(CD_N_SCPU), .SPHERES(CD_SPHERES), .CLINES(CD_CLINES)) u_cd (
    .clk, .rst_n,
    .start(cd_start), .src_base(cd_src_base), .dst_base(cd_dst_base),
    .busy(cd_busy), .done(cd_done),
    .perf_mem_cycles(cd_perf_mem_cycles), .perf_proc_cycles(cd_perf_proc_cycles),
    .rd_req_valid(cd_rd_req_valid), .rd_req_ready(cd_rd_req_ready), .rd_req_addr(cd_rd_req_addr),
    .rd_resp_valid(cd_rd_resp_valid), .rd_resp_data(cd_rd_resp_data),
    .wr_valid(cd_wr_valid), .wr_ready(cd_wr_ready), .wr_addr(cd_wr_addr), .wr_data(cd_wr_data)
  );

  grn_accel #(.N_PE(GRN_N_PE), .FIFO_DEPTH(GRN_FIFO_D)) u_grn (
    .clk, .rst_n,
    .start(grn_start), .first(grn_first), .count(grn_count), .res_base(grn_res_base),
    .done(grn_done),
    .wr_valid(grn_wr_valid), .wr_ready(grn_wr_ready), .wr_addr(grn_wr_addr), .wr_data(grn_wr_data)
  );

  vm_core #(.LANES(VM_LANES), .SP_BYTES(VM_SP_BYTES), .IFIFO_DEPTH(VM_IFIFO_D)) u_vm (
    .clk, .rst_n,
    .i_valid(vm_i_valid), .i_ready(vm_i_ready), .i_data(vm_i_data), .busy(vm_busy),
    .perf_concurrent(vm_perf_concurrent), .perf_order_waits(vm_perf_order_waits),
    .perf_hazard_stalls(vm_perf_hazard_stalls),
    .m_req_valid(vm_m_req_valid), .m_req_ready(vm_m_req_ready), .m_req_we(vm_m_req_we),
    .m_req_addr(vm_m_req_addr), .m_req_wdata(vm_m_req_wdata), .m_req_wstrb(vm_m_req_wstrb),
    .m_rsp_valid(vm_m_rsp_valid), .m_rsp_rdata(vm_m_rsp_rdata)
  );
endmodule
