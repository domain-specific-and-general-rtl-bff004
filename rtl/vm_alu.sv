// vm_alu: LANES parallel 32-bit vector ALUs.
//
// Every lane applies the same operation to its pair of extended operands:
// add, subtract, multiply (low 32 bits), and, or, xor, absolute difference,
// minimum, maximum, shift left, shift right and move. sgn selects signed
// comparison for min/max/absdiff and an arithmetic right shift. Shift
// amounts use the low five bits of B. Because sources are extended to 32
// bits and the destination is truncated afterwards, mixed, widening and
// narrowing element sizes need no separate opcodes.
// Timing: combinational.
module vm_alu
  import vm_pkg::*;
#(
  parameter int LANES = 16
) (
  input  vop_e        op,
  input  logic        sgn,
  input  logic [31:0] a [LANES],
  input  logic [31:0] b [LANES],
  output logic [31:0] y [LANES]
);
  always_comb begin
    for (int i = 0; i < LANES; i++) begin
      logic lt;
      lt = sgn ? ($signed(a[i]) < $signed(b[i])) : (a[i] < b[i]);
      unique case (op)
        OP_ADD:     y[i] = a[i] + b[i];
        OP_SUB:     y[i] = a[i] - b[i];
        OP_MUL:     y[i] = a[i] * b[i];
        OP_AND:     y[i] = a[i] & b[i];
        OP_OR:      y[i] = a[i] | b[i];
        OP_XOR:     y[i] = a[i] ^ b[i];
        OP_ABSDIFF: y[i] = lt ? b[i] - a[i] : a[i] - b[i];
        OP_MIN:     y[i] = lt ? a[i] : b[i];
        OP_MAX:     y[i] = lt ? b[i] : a[i];
        OP_SHL:     y[i] = a[i] << b[i][4:0];
        OP_SHR:     y[i] = sgn ? 32'($signed(a[i]) >>> b[i][4:0]) : a[i] >> b[i][4:0];
        OP_MOV:     y[i] = a[i];
        default:    y[i] = a[i];
      endcase
    end
  end
endmodule
