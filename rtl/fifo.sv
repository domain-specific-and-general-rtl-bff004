// fifo: synchronous first-in first-out buffer with valid/ready handshakes.
//
// A circular buffer of DEPTH entries of W bits with read and write pointers
// one bit wider than the index, so full and empty are told apart. A word is
// written when in_valid and in_ready are both high, and leaves when
// out_valid and out_ready are both high; both may happen in the same cycle.
// out_data shows the oldest word whenever out_valid is high. Used for the
// GRN work and result queues and for the vector instruction queue.
module fifo #(
  parameter int W     = 32,
  parameter int DEPTH = 8,
  localparam int AW = $clog2(DEPTH)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [W-1:0] in_data,
  output logic         out_valid,
  input  logic         out_ready,
  output logic [W-1:0] out_data,
  output logic [AW:0]  level
);
  logic [W-1:0] mem [DEPTH];
  logic [AW:0]  wp, rp;

  assign level     = wp - rp;
  assign in_ready  = (level != (AW+1)'(DEPTH));
  assign out_valid = (level != '0);
  assign out_data  = mem[rp[AW-1:0]];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0;
      rp <= '0;
    end else begin
      if (in_valid && in_ready) wp <= wp + 1'b1;
      if (out_valid && out_ready) rp <= rp + 1'b1;
    end
  end
  always_ff @(posedge clk) if (in_valid && in_ready) mem[wp[AW-1:0]] <= in_data;

  // the occupancy never exceeds the capacity
  property no_overflow;
    @(posedge clk) disable iff (!rst_n) level <= (AW+1)'(DEPTH);
  endproperty
  assert property (no_overflow);
endmodule
