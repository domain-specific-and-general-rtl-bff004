// vm_pkg: instruction format of the memory-based vector processor.
//
// An instruction is what the host pushes into the instruction FIFO: one
// control word (opcode, element sizes, signedness, scalar-operand flag) and
// three 32-bit scalar values. For vector operations they are the scratchpad
// byte addresses of the destination and of sources A and B (or the scalar
// value B for the vector-scalar form); for DMA they are the two addresses
// and the length in bytes; SET_VL takes the vector length in value A.
// Element sizes are 0 = byte, 1 = halfword, 2 = word. The encoding is this
// design's own.
package vm_pkg;
  typedef enum logic [4:0] {
    OP_ADD     = 5'd0,
    OP_SUB     = 5'd1,
    OP_MUL     = 5'd2,
    OP_AND     = 5'd3,
    OP_OR      = 5'd4,
    OP_XOR     = 5'd5,
    OP_ABSDIFF = 5'd6,
    OP_MIN     = 5'd7,
    OP_MAX     = 5'd8,
    OP_SHL     = 5'd9,
    OP_SHR     = 5'd10,  // arithmetic if signed, logical otherwise
    OP_MOV     = 5'd11,  // D = A (size conversion, sliding copies)
    OP_SET_VL  = 5'd24,
    OP_DMA_RD  = 5'd25,  // main memory (value A) -> scratchpad (value D), B bytes
    OP_DMA_WR  = 5'd26   // scratchpad (value A) -> main memory (value D), B bytes
  } vop_e;

  typedef struct packed {
    logic [16:0] rsvd;
    logic        bscalar;  // B is a scalar value, not an address
    logic        sgn;      // sign-extend sources, signed compare/shift
    logic [1:0]  szb;
    logic [1:0]  sza;
    logic [1:0]  szd;
    vop_e        op;
  } vctrl_t;

  typedef struct packed {
    logic [31:0] vb;
    logic [31:0] va;
    logic [31:0] vd;
    vctrl_t      ctrl;
  } vinstr_t;

  function automatic logic is_vector_op(input vop_e op);
    return op <= OP_MOV;
  endfunction
endpackage
