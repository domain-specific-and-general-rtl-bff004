// grn_pkg: constants and record types of the Boolean GRN accelerator.
//
// N_GENES is the number of genes of the network built into the functional
// units (the four-gene example network). A work item is one initial state;
// a result carries the state, its transient length (steps until the
// trajectory enters its attractor) and the attractor length.
package grn_pkg;
  localparam int N_GENES = 4;
  localparam int CW      = 16;   // step counter width

  typedef logic [N_GENES-1:0] gstate_t;

  typedef struct packed {
    logic [CW-1:0] attractor;
    logic [CW-1:0] transient;
    gstate_t       state;
  } grn_result_t;
endpackage
