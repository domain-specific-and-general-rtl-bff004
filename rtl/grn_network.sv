// grn_network: one synchronous update of the example gene regulatory network.
//
// Every gene's next value is a Boolean function of the current states of the
// genes that regulate it, and all genes update at once, so one evaluation is
// one network time step in one clock cycle. The state is v1 v2 v3 v4 with v1
// the most significant bit. The gene functions are
//   v1' = v2 xor v3,  v2' = v1 or v4,  v3' = v1 and v4,  v4' = v3,
// chosen to reproduce the example trajectory of the design description
// (0010 -> 1001 -> 0110 -> 0001 -> 0100 -> 1000 -> 0100 ...); any other
// network is built by replacing these four equations.
// Timing: combinational; the one-bit state registers live in the PE.
module grn_network
  import grn_pkg::*;
(
  input  gstate_t s,
  output gstate_t s_next
);
  logic v1, v2, v3, v4;
  assign {v1, v2, v3, v4} = s;
  assign s_next = {v2 ^ v3, v1 | v4, v1 & v4, v3};
endmodule
