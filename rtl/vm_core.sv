// vm_core: memory-based vector processor (vector-memory ISA).
//
// Vector instructions take scratchpad addresses, held in the host's scalar
// registers, as operands instead of vector register names; data reaches the
// scratchpad only through explicit DMA instructions. The host pushes each
// instruction (control word + three 32-bit scalar values) into the
// instruction FIFO, and can go on with scalar work; it stalls only when the
// FIFO is full and polls busy before it reads results.
// The dispatcher takes instructions in order from the FIFO:
//   SET_VL  updates the vector length register at once;
//   vector  starts on the vector engine when it is ready, unless the DMA
//           engine is working on an overlapping scratchpad range;
//   DMA     starts on the DMA engine when it is idle, unless the vector
//           engine still reads or writes an overlapping range.
// So DMA transfers overlap with vector computation whenever their data are
// independent (prefetching), and the order of dependent ones is kept. The
// range-overlap ordering rule is this design's; LANES = 16 and a 64 KiB
// scratchpad follow the evaluated configuration. perf_concurrent counts the
// cycles in which both engines were busy, perf_order_waits the cycles the
// head instruction waited for the other engine, perf_hazard_stalls the
// pipeline bubbles of the vector engine.
module vm_core
  import vm_pkg::*;
#(
  parameter int LANES       = 16,
  parameter int SP_BYTES    = 65536,
  parameter int IFIFO_DEPTH = 16,
  localparam int WB = 4 * LANES,
  localparam int AW = $clog2(SP_BYTES)
) (
  input  logic        clk,
  input  logic        rst_n,
  // instruction FIFO push (host)
  input  logic        i_valid,
  output logic        i_ready,
  input  vinstr_t     i_data,
  output logic        busy,
  output logic [31:0] perf_concurrent,
  output logic [31:0] perf_order_waits,
  output logic [31:0] perf_hazard_stalls,
  // main memory
  output logic        m_req_valid,
  input  logic        m_req_ready,
  output logic        m_req_we,
  output logic [31:0] m_req_addr,
  output logic [63:0] m_req_wdata,
  output logic [7:0]  m_req_wstrb,
  input  logic        m_rsp_valid,
  input  logic [63:0] m_rsp_rdata
);
  function automatic logic overlap(input logic [31:0] alo, ahi, blo, bhi);
    return (alo < bhi) && (blo < ahi);
  endfunction

  logic        h_valid, h_pop;
  vinstr_t     h;
  logic [$bits(vinstr_t)-1:0] h_raw;
  logic [31:0] vl;

  fifo #(.W($bits(vinstr_t)), .DEPTH(IFIFO_DEPTH)) u_ififo (
    .clk, .rst_n, .in_valid(i_valid), .in_ready(i_ready), .in_data(i_data),
    .out_valid(h_valid), .out_ready(h_pop), .out_data(h_raw), .level());
  assign h = vinstr_t'(h_raw);

  // engines
  logic ve_start, ve_ready, ve_busy, ve_conflict;
  logic dma_start, dma_busy;
  logic [31:0] dma_lo, dma_hi, probe_lo, probe_hi;
  logic [AW-1:0] ra_addr, rb_addr, rd_addr, w_addr, dw_addr;
  logic [8*WB-1:0] ra_win, rb_win, rd_win, w_win, dw_win;
  logic [WB-1:0] w_be, dw_be;

  vm_vector_engine #(.LANES(LANES), .BYTES(SP_BYTES)) u_ve (
    .clk, .rst_n, .start(ve_start), .ins(h), .vl, .ready(ve_ready), .busy(ve_busy),
    .perf_hazard_stalls, .probe_lo, .probe_hi, .probe_conflict(ve_conflict),
    .ra_addr, .ra_win, .rb_addr, .rb_win, .w_addr, .w_win, .w_be);

  vm_dma #(.LANES(LANES), .BYTES(SP_BYTES)) u_dma (
    .clk, .rst_n, .start(dma_start), .is_write(h.ctrl.op == OP_DMA_WR),
    .mm_addr(h.ctrl.op == OP_DMA_WR ? h.vd : h.va),
    .sp_addr(h.ctrl.op == OP_DMA_WR ? h.va : h.vd),
    .len(h.vb), .busy(dma_busy), .sp_lo(dma_lo), .sp_hi(dma_hi),
    .m_req_valid, .m_req_ready, .m_req_we, .m_req_addr, .m_req_wdata, .m_req_wstrb,
    .m_rsp_valid, .m_rsp_rdata, .rd_addr, .rd_win, .dw_addr, .dw_win, .dw_be);

  vm_scratchpad #(.LANES(LANES), .BYTES(SP_BYTES)) u_sp (
    .clk, .ra_addr, .ra_win, .rb_addr, .rb_win, .rd_addr, .rd_win,
    .w_addr, .w_win, .w_be, .dw_addr, .dw_win, .dw_be);

  // dispatcher
  logic is_vec, is_dma, vec_dma_clash, can_issue;
  always_comb begin
    is_vec = is_vector_op(h.ctrl.op);
    is_dma = (h.ctrl.op == OP_DMA_RD) || (h.ctrl.op == OP_DMA_WR);
    probe_lo = (h.ctrl.op == OP_DMA_WR) ? h.va : h.vd;
    probe_hi = probe_lo + h.vb;
    vec_dma_clash = dma_busy && (
        overlap(h.vd, h.vd + (vl << h.ctrl.szd), dma_lo, dma_hi) ||
        overlap(h.va, h.va + (vl << h.ctrl.sza), dma_lo, dma_hi) ||
        (!h.ctrl.bscalar && overlap(h.vb, h.vb + (vl << h.ctrl.szb), dma_lo, dma_hi)));
    can_issue = 1'b1;
    if (is_vec) can_issue = ve_ready && !vec_dma_clash;
    else if (is_dma) can_issue = !dma_busy && !ve_conflict;
    h_pop     = h_valid && can_issue;
    ve_start  = h_pop && is_vec;
    dma_start = h_pop && is_dma;
  end

  assign busy = h_valid || ve_busy || dma_busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vl <= '0;
      perf_concurrent <= '0;
      perf_order_waits <= '0;
    end else begin
      if (h_pop && h.ctrl.op == OP_SET_VL) vl <= h.va;
      if (ve_busy && dma_busy) perf_concurrent <= perf_concurrent + 32'd1;
      if (h_valid && !can_issue && ((is_vec && ve_ready) || (is_dma && !dma_busy)))
        perf_order_waits <= perf_order_waits + 32'd1;
    end
  end
endmodule
