// vm_wr_aligner: destination data aligner (aligner C).
//
// Truncates the 32-bit lane results to the destination element size and
// packs them into a byte window (element i at bytes i*size ..), with one
// byte enable per window byte set only for the first n elements, so the
// last, partial group of a vector writes nothing past its end. The
// scratchpad then rotates the window to the destination address.
// Timing: combinational.
module vm_wr_aligner #(
  parameter int LANES = 16,
  localparam int WB = 4 * LANES,
  localparam int NW = $clog2(LANES + 1)
) (
  input  logic [31:0]     elem [LANES],
  input  logic [1:0]      size,
  input  logic [NW-1:0]   n,
  output logic [8*WB-1:0] win,
  output logic [WB-1:0]   be
);
  always_comb begin
    win = '0;
    be  = '0;
    for (int i = 0; i < LANES; i++) begin
      logic on;
      on = (i < int'(n));
      unique case (size)
        2'd0: begin
          win[8*i +: 8] = elem[i][7:0];
          be[i] = on;
        end
        2'd1: begin
          win[16*i +: 16] = elem[i][15:0];
          be[2*i +: 2] = {2{on}};
        end
        default: begin
          win[32*i +: 32] = elem[i];
          be[4*i +: 4] = {4{on}};
        end
      endcase
    end
  end
endmodule
