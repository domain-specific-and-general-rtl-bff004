// grn_thread_ctrl: thread control unit of the GRN accelerator.
//
// Generates the work of one run, the initial states first, first+1, ...,
// first+count-1, and hands each to a PE input FIFO. The FIFOs are served
// round-robin starting after the one written last; a full FIFO is skipped, so
// PEs that finish early (short transients) simply receive more states. One
// state is issued per clock while some FIFO has room.
// Interface: start (one cycle) loads first/count while busy is low; busy
// stays high until every state has been pushed. q_valid[i]/q_ready[i] is
// the write handshake of FIFO i, all FIFOs share q_state.
module grn_thread_ctrl
  import grn_pkg::*;
#(
  parameter int N_PE = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  gstate_t          first,
  input  logic [N_GENES:0] count,
  output logic             busy,
  output logic [N_PE-1:0]  q_valid,
  input  logic [N_PE-1:0]  q_ready,
  output gstate_t          q_state
);
  localparam int PW = (N_PE > 1) ? $clog2(N_PE) : 1;
  logic [N_GENES:0] left;
  gstate_t          cur;
  logic [PW-1:0]    rr, pick;
  logic             found;

  assign busy = (left != '0);
  assign q_state = cur;

  always_comb begin
    found = 1'b0;
    pick  = rr;
    for (int k = 0; k < N_PE; k++) begin
      logic [PW-1:0] idx;
      idx = PW'((int'(rr) + k) % N_PE);
      if (!found && q_ready[idx]) begin
        found = 1'b1;
        pick  = idx;
      end
    end
    q_valid = '0;
    if (busy && found) q_valid[pick] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      left <= '0; cur <= '0; rr <= '0;
    end else if (start && !busy) begin
      left <= count;
      cur  <= first;
    end else if (busy && found) begin
      left <= left - 1'b1;
      cur  <= cur + 1'b1;
      rr   <= PW'((int'(pick) + 1) % N_PE);
    end
  end
endmodule
