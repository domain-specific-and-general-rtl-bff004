// grn_pe: processing element of the GRN attractor accelerator.
//
// Finds, for one initial state s0, the length of the transient leading into
// its attractor and the length of the attractor, in O(1) memory. It holds
// two copies of the network: copy N1 advances one time step per clock and
// copy N2 (two chained functional units) advances two, so N2 catches N1
// inside the attractor (FIND). Then N2 is held while N1 steps until it comes
// back to N2's state; the number of steps is the attractor length L (LEN).
// Finally N1 restarts at s0 while N2 steps once per clock from the meeting
// point; they meet at the attractor's first state after exactly the
// transient length (TRANS). The first two phases follow the source; the
// third, which yields the transient length, is this design's choice.
// Interface: accepts a state on in_valid/in_ready when idle; presents the
// result on out_valid until out_ready. Takes 2 + (meeting steps) + L +
// transient cycles.
module grn_pe
  import grn_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  output logic        in_ready,
  input  gstate_t     in_state,
  output logic        out_valid,
  input  logic        out_ready,
  output grn_result_t out_res
);
  typedef enum logic [2:0] {IDLE, FIND, LEN, TRANS, OUT} st_e;
  st_e st;

  gstate_t s0, n1, n2, n1_next, n2_half, n2_next2;
  logic [CW-1:0] cnt;

  grn_network fu_p1   (.s(n1),      .s_next(n1_next));   // FUp1: one step
  grn_network fu_p2_a (.s(n2),      .s_next(n2_half));   // FUp2: two steps
  grn_network fu_p2_b (.s(n2_half), .s_next(n2_next2));

  assign in_ready  = (st == IDLE);
  assign out_valid = (st == OUT);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= IDLE; s0 <= '0; n1 <= '0; n2 <= '0; cnt <= '0; out_res <= '0;
    end else begin
      unique case (st)
        IDLE: if (in_valid) begin
          s0 <= in_state;
          n1 <= in_state;
          n2 <= in_state;
          st <= FIND;
        end
        FIND: begin
          n1 <= n1_next;
          n2 <= n2_next2;
          if (n1_next == n2_next2) begin
            cnt <= '0;
            st  <= LEN;
          end
        end
        LEN: begin            // N2 held, N1 walks once around the attractor
          n1  <= n1_next;
          cnt <= cnt + 1'b1;
          if (n1_next == n2) begin
            out_res.attractor <= cnt + 1'b1;
            out_res.state     <= s0;
            n1  <= s0;
            cnt <= '0;
            st  <= TRANS;
          end
        end
        TRANS: begin
          if (n1 == n2) begin
            out_res.transient <= cnt;
            st <= OUT;
          end else begin
            n1  <= n1_next;
            n2  <= n2_half;
            cnt <= cnt + 1'b1;
          end
        end
        OUT: if (out_ready) st <= IDLE;
        default: st <= IDLE;
      endcase
    end
  end
endmodule
