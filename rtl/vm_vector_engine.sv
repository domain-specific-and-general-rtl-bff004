// vm_vector_engine: vector execution unit operating directly on scratchpad
// memory.
//
// A vector instruction names its operands by scratchpad byte addresses (D,
// A, B) and runs over vl elements, LANES elements per clock, through a
// three-stage pipeline:
//   R  read windows A and B at the current pointers (B is a broadcast
//      scalar in the vector-scalar form); pointers advance by LANES*size;
//   E  aligners A/B extend the elements, the ALUs compute, aligner C packs
//      the results with byte enables for the valid elements;
//   W  the window is written at the destination pointer.
// Since a read in R sees the scratchpad before the writes still in E and W,
// a read window that overlaps one of those destination windows is held back
// and a bubble enters the pipeline until the write has landed (this is the
// hazard rule of the source; its byte-range form is this design's).
// The next instruction may start as soon as the previous one has issued its
// last group, so dependent instructions rely on the same check.
// probe_lo/probe_hi ask whether a byte range overlaps anything the engine
// still reads or writes (used to order DMA against vector work).
// Interface: start with ins and vl while ready; busy until the pipeline is
// empty. Throughput: one group of LANES elements per clock without hazards.
module vm_vector_engine
  import vm_pkg::*;
#(
  parameter int LANES = 16,
  parameter int BYTES = 65536,
  localparam int WB = 4 * LANES,
  localparam int AW = $clog2(BYTES),
  localparam int NW = $clog2(LANES + 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  vinstr_t         ins,
  input  logic [31:0]     vl,
  output logic            ready,
  output logic            busy,
  output logic [31:0]     perf_hazard_stalls,
  input  logic [31:0]     probe_lo,
  input  logic [31:0]     probe_hi,
  output logic            probe_conflict,
  // scratchpad
  output logic [AW-1:0]   ra_addr,
  input  logic [8*WB-1:0] ra_win,
  output logic [AW-1:0]   rb_addr,
  input  logic [8*WB-1:0] rb_win,
  output logic [AW-1:0]   w_addr,
  output logic [8*WB-1:0] w_win,
  output logic [WB-1:0]   w_be
);
  function automatic logic overlap(input logic [31:0] alo, ahi, blo, bhi);
    return (alo < bhi) && (blo < ahi);
  endfunction

  // ---- R stage state
  logic        active;
  vctrl_t      c;
  logic [31:0] pd, pa, pb, vb, left;
  logic [31:0] ext_lo [3], ext_hi [3];   // whole-instruction D, A, B extents
  // ---- E stage
  logic        e_valid;
  vctrl_t      e_c;
  logic [31:0] e_d, e_vb;
  logic [NW-1:0] e_n;
  // ---- W stage
  logic        w_valid;
  logic [31:0] w_d;
  logic [31:0] w_len;
  logic [8*WB-1:0] w_win_q;
  logic [WB-1:0]   w_be_q;

  logic [31:0] stepa, stepb, stepd, e_len;
  logic [NW-1:0] n_now;
  logic hazard;

  always_comb begin
    stepa = 32'(LANES) << c.sza;
    stepb = 32'(LANES) << c.szb;
    stepd = 32'(LANES) << c.szd;
    n_now = (left >= 32'(LANES)) ? NW'(LANES) : NW'(left);
    e_len = 32'(e_n) << e_c.szd;
    hazard = 1'b0;
    if (active) begin
      if (e_valid && overlap(pa, pa + stepa, e_d, e_d + e_len)) hazard = 1'b1;
      if (w_valid && overlap(pa, pa + stepa, w_d, w_d + w_len)) hazard = 1'b1;
      if (!c.bscalar) begin
        if (e_valid && overlap(pb, pb + stepb, e_d, e_d + e_len)) hazard = 1'b1;
        if (w_valid && overlap(pb, pb + stepb, w_d, w_d + w_len)) hazard = 1'b1;
      end
    end
    ra_addr = AW'(pa);
    rb_addr = AW'(pb);
  end

  assign ready = !active;
  assign busy  = active || e_valid || w_valid;

  always_comb begin
    probe_conflict = 1'b0;
    if (active)
      for (int k = 0; k < 3; k++)
        if (overlap(probe_lo, probe_hi, ext_lo[k], ext_hi[k])) probe_conflict = 1'b1;
    if (e_valid && overlap(probe_lo, probe_hi, e_d, e_d + e_len)) probe_conflict = 1'b1;
    if (w_valid && overlap(probe_lo, probe_hi, w_d, w_d + w_len)) probe_conflict = 1'b1;
  end

  // ---- E stage datapath
  logic [31:0] opa [LANES], opb_v [LANES], opb [LANES], res [LANES];
  logic [8*WB-1:0] pk_win;
  logic [WB-1:0]   pk_be;

  vm_rd_aligner #(.LANES(LANES)) u_aln_a (.win(ra_win), .size(e_c.sza), .sgn(e_c.sgn), .elem(opa));
  vm_rd_aligner #(.LANES(LANES)) u_aln_b (.win(rb_win), .size(e_c.szb), .sgn(e_c.sgn), .elem(opb_v));
  always_comb for (int i = 0; i < LANES; i++) opb[i] = e_c.bscalar ? e_vb : opb_v[i];
  vm_alu #(.LANES(LANES)) u_alu (.op(e_c.op), .sgn(e_c.sgn), .a(opa), .b(opb), .y(res));
  vm_wr_aligner #(.LANES(LANES)) u_aln_c (.elem(res), .size(e_c.szd), .n(e_n), .win(pk_win), .be(pk_be));

  assign w_addr = AW'(w_d);
  assign w_win  = w_win_q;
  assign w_be   = w_valid ? w_be_q : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= 1'b0; c <= '0; pd <= '0; pa <= '0; pb <= '0; vb <= '0; left <= '0;
      for (int k = 0; k < 3; k++) begin ext_lo[k] <= '0; ext_hi[k] <= '0; end
      e_valid <= 1'b0; e_c <= '0; e_d <= '0; e_vb <= '0; e_n <= '0;
      w_valid <= 1'b0; w_d <= '0; w_len <= '0; w_win_q <= '0; w_be_q <= '0;
      perf_hazard_stalls <= '0;
    end else begin
      // W stage
      w_valid <= e_valid;
      w_d     <= e_d;
      w_len   <= e_len;
      w_win_q <= pk_win;
      w_be_q  <= pk_be;
      // R stage -> E stage
      e_valid <= 1'b0;
      if (active) begin
        if (hazard) perf_hazard_stalls <= perf_hazard_stalls + 32'd1;
        else begin
          e_valid <= 1'b1;
          e_c  <= c;
          e_d  <= pd;
          e_vb <= vb;
          e_n  <= n_now;
          pa   <= pa + stepa;
          pb   <= pb + stepb;
          pd   <= pd + stepd;
          left <= left - 32'(n_now);
          if (left <= 32'(LANES)) active <= 1'b0;
        end
      end else if (start && vl != '0) begin
        active <= 1'b1;
        c    <= ins.ctrl;
        pd   <= ins.vd;
        pa   <= ins.va;
        pb   <= ins.vb;
        vb   <= ins.vb;
        left <= vl;
        ext_lo[0] <= ins.vd; ext_hi[0] <= ins.vd + (vl << ins.ctrl.szd);
        ext_lo[1] <= ins.va; ext_hi[1] <= ins.va + (vl << ins.ctrl.sza);
        ext_lo[2] <= ins.vb;
        ext_hi[2] <= ins.ctrl.bscalar ? ins.vb : ins.vb + (vl << ins.ctrl.szb);
      end
    end
  end
endmodule
