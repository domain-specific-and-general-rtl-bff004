// tb_vm_alu: test of the LANES vector ALUs.
//
// Applies every operation, signed and unsigned, to random operands and to
// corner values (zero, all ones, the most negative number, shift amounts
// above 31) and compares each lane with an independent model.
module tb_vm_alu;
  import vm_pkg::*;
  localparam int LANES = 16;
  vop_e op;
  logic sgn;
  logic [31:0] a [LANES], b [LANES], y [LANES];
  int checks = 0, failures = 0;

  vm_alu #(.LANES(LANES)) dut (.*);

  function automatic logic [31:0] pick();
    case ($urandom_range(0, 5))
      0: return 32'h0;
      1: return 32'hFFFF_FFFF;
      2: return 32'h8000_0000;
      default: return $urandom;
    endcase
  endfunction
  function automatic longint sx(input logic [31:0] v, input logic s);
    return s ? longint'($signed(v)) : longint'(v);
  endfunction
  function automatic logic [31:0] model(input vop_e o, input logic s, input logic [31:0] x, z);
    longint lx = sx(x, s), lz = sx(z, s), d;
    case (o)
      OP_ADD: return 32'(lx + lz);
      OP_SUB: return 32'(lx - lz);
      OP_MUL: return 32'(lx * lz);
      OP_AND: return x & z;
      OP_OR:  return x | z;
      OP_XOR: return x ^ z;
      OP_ABSDIFF: begin d = lx - lz; return 32'(d < 0 ? -d : d); end
      OP_MIN: return lx < lz ? x : z;
      OP_MAX: return lx < lz ? z : x;
      OP_SHL: return 32'(lx * (64'd1 << z[4:0]));
      OP_SHR: return 32'(s ? (lx >>> z[4:0]) : (lx >> z[4:0]));
      default: return x;
    endcase
  endfunction

  initial begin
    for (int it = 0; it < 1200; it++) begin
      op = vop_e'(it % 12); sgn = (it / 12) % 2;
      for (int i = 0; i < LANES; i++) begin a[i] = pick(); b[i] = pick(); end
      #1;
      for (int i = 0; i < LANES; i++) begin
        checks++;
        if (y[i] != model(op, sgn, a[i], b[i])) begin
          failures++;
          if (failures < 5) $display("FAIL op %0d sgn %0d: %h %h -> %h", op, sgn, a[i], b[i], y[i]);
        end
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
