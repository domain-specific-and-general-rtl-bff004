// grn_accel: Boolean gene regulatory network attractor accelerator.
//
// Computes, for a range of initial network states, how many steps each one
// takes to reach its attractor and how long that attractor is, the data a
// host needs to build basin histograms. The interface unit accepts the run
// and writes the results; the thread control unit spreads the initial
// states over N_PE input FIFOs; each processing element pops a state, runs
// the two-copy attractor search and pushes its result into its output FIFO.
// FIFOs decouple PEs whose run times differ from state to state.
// Interface: see grn_interface (start/first/count/res_base, done, 64-bit
// result writes with valid/ready). The number of PEs and FIFO depth are
// this design's choices.
module grn_accel
  import grn_pkg::*;
#(
  parameter int N_PE       = 4,
  parameter int FIFO_DEPTH = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  gstate_t          first,
  input  logic [N_GENES:0] count,
  input  logic [31:0]      res_base,
  output logic             done,
  output logic             wr_valid,
  input  logic             wr_ready,
  output logic [31:0]      wr_addr,
  output logic [63:0]      wr_data
);
  localparam int RW = $bits(grn_result_t);
  logic             tc_start, tc_busy;
  gstate_t          tc_first, q_state;
  logic [N_GENES:0] tc_count;
  logic [N_PE-1:0]  q_valid, q_ready, r_valid, r_ready;
  grn_result_t      r_data [N_PE];

  grn_interface #(.N_PE(N_PE)) u_if (
    .clk, .rst_n, .start, .first, .count, .res_base, .done,
    .tc_start, .tc_first, .tc_count, .r_valid, .r_ready, .r_data,
    .wr_valid, .wr_ready, .wr_addr, .wr_data);

  grn_thread_ctrl #(.N_PE(N_PE)) u_tc (
    .clk, .rst_n, .start(tc_start), .first(tc_first), .count(tc_count),
    .busy(tc_busy), .q_valid, .q_ready, .q_state);

  for (genvar i = 0; i < N_PE; i++) begin : g_pe
    logic        pe_in_valid, pe_in_ready, pe_out_valid, pe_out_ready;
    gstate_t     pe_in_state;
    grn_result_t pe_res;
    logic [RW-1:0] rdata;

    fifo #(.W(N_GENES), .DEPTH(FIFO_DEPTH)) u_qin (
      .clk, .rst_n, .in_valid(q_valid[i]), .in_ready(q_ready[i]), .in_data(q_state),
      .out_valid(pe_in_valid), .out_ready(pe_in_ready), .out_data(pe_in_state), .level());

    grn_pe u_pe (
      .clk, .rst_n, .in_valid(pe_in_valid), .in_ready(pe_in_ready), .in_state(pe_in_state),
      .out_valid(pe_out_valid), .out_ready(pe_out_ready), .out_res(pe_res));

    fifo #(.W(RW), .DEPTH(FIFO_DEPTH)) u_qout (
      .clk, .rst_n, .in_valid(pe_out_valid), .in_ready(pe_out_ready), .in_data(pe_res),
      .out_valid(r_valid[i]), .out_ready(r_ready[i]), .out_data(rdata), .level());
    assign r_data[i] = rdata;
  end
endmodule
