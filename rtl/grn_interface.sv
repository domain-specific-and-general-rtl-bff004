// grn_interface: interface unit between the host and the GRN accelerator.
//
// Takes a run request from the host (first state, number of states, address
// of the result buffer), starts the thread control unit, and drains the PE
// output FIFOs round-robin, writing one 64-bit record per initial state to
// the result buffer: bits [15:0] the state, [31:16] the transient length,
// [47:32] the attractor length, at byte address res_base + 8*(state-first).
// done rises when all records of the run are written and stays high until
// the next start. The record layout and the write port (valid/ready with a
// byte address) are this design's choices.
module grn_interface
  import grn_pkg::*;
#(
  parameter int N_PE = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  // host control
  input  logic             start,
  input  gstate_t          first,
  input  logic [N_GENES:0] count,
  input  logic [31:0]      res_base,
  output logic             done,
  // to the thread control unit
  output logic             tc_start,
  output gstate_t          tc_first,
  output logic [N_GENES:0] tc_count,
  // PE output FIFOs
  input  logic [N_PE-1:0]  r_valid,
  output logic [N_PE-1:0]  r_ready,
  input  grn_result_t      r_data [N_PE],
  // result writes to shared memory
  output logic             wr_valid,
  input  logic             wr_ready,
  output logic [31:0]      wr_addr,
  output logic [63:0]      wr_data
);
  localparam int PW = (N_PE > 1) ? $clog2(N_PE) : 1;
  logic             running;
  logic [N_GENES:0] left;
  gstate_t          base_state;
  logic [31:0]      base_addr;
  logic [PW-1:0]    rr, pick;
  logic             found;
  grn_result_t      sel;

  assign tc_start = start && !running;
  assign tc_first = first;
  assign tc_count = count;

  always_comb begin
    found = 1'b0;
    pick  = rr;
    for (int k = 0; k < N_PE; k++) begin
      logic [PW-1:0] idx;
      idx = PW'((int'(rr) + k) % N_PE);
      if (!found && r_valid[idx]) begin
        found = 1'b1;
        pick  = idx;
      end
    end
    sel      = r_data[pick];
    wr_valid = running && found;
    wr_addr  = base_addr + 32'(gstate_t'(sel.state - base_state)) * 32'd8;
    wr_data  = {16'd0, 16'(sel.attractor), 16'(sel.transient), 16'(sel.state)};
    r_ready  = '0;
    if (wr_valid && wr_ready) r_ready[pick] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running <= 1'b0; done <= 1'b0; left <= '0; base_state <= '0; base_addr <= '0; rr <= '0;
    end else begin
      if (start && !running) begin
        running    <= (count != '0);
        done       <= (count == '0);
        left       <= count;
        base_state <= first;
        base_addr  <= res_base;
      end else if (wr_valid && wr_ready) begin
        rr   <= PW'((int'(pick) + 1) % N_PE);
        left <= left - 1'b1;
        if (left == 1) begin
          running <= 1'b0;
          done    <= 1'b1;
        end
      end
    end
  end
endmodule
