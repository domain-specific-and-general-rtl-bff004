// vm_rd_aligner: source data aligner (aligners A and B).
//
// Takes a scratchpad window that already starts at the operand's address and
// cuts it into LANES elements of 1, 2 or 4 bytes (element i is window bytes
// i*size .. i*size+size-1, little-endian), then zero- or sign-extends each
// to 32 bits so lane i of the ALUs always receives element i. Narrow data
// thus stays packed at its natural size in the scratchpad and is widened
// only on its way to the ALUs.
// Timing: combinational.
module vm_rd_aligner #(
  parameter int LANES = 16,
  localparam int WB = 4 * LANES
) (
  input  logic [8*WB-1:0] win,
  input  logic [1:0]      size,
  input  logic            sgn,
  output logic [31:0]     elem [LANES]
);
  always_comb begin
    for (int i = 0; i < LANES; i++) begin
      unique case (size)
        2'd0:    elem[i] = sgn ? 32'(signed'(win[8*i +: 8]))   : 32'(win[8*i +: 8]);
        2'd1:    elem[i] = sgn ? 32'(signed'(win[16*i +: 16])) : 32'(win[16*i +: 16]);
        default: elem[i] = win[32*i +: 32];
      endcase
    end
  end
endmodule
