// vm_scratchpad: banked, byte-addressable vector scratchpad.
//
// The vector data store of the memory-based vector processor. Consecutive
// 32-bit words are striped across LANES banks (word w in bank w % LANES), so
// the LANES ALUs are fed by a full-width row each cycle. Each lane bank is
// split into four byte columns with their own row address: a window of
// WB = 4*LANES bytes starting at ANY byte address then touches every byte
// column exactly once (column k uses row r or r+1 depending on whether k is
// before or after the start column). This is what lets vectors start at any
// address with no alignment rule; the data aligners only rotate.
// Ports: read windows A and B (vector operands) and D (DMA), a vector write
// window W (from aligner C) and a DMA write window; windows are given with
// byte 0 = the byte at the address. Addresses wrap modulo BYTES.
// Timing: reads return one cycle after the address; writes land on the
// clock edge, so a read in the same cycle sees the old data. Column
// splitting and the port count are this design's choices.
module vm_scratchpad #(
  parameter int LANES = 16,
  parameter int BYTES = 65536,
  localparam int WB = 4 * LANES,
  localparam int AW = $clog2(BYTES)
) (
  input  logic            clk,
  input  logic [AW-1:0]   ra_addr,
  output logic [8*WB-1:0] ra_win,
  input  logic [AW-1:0]   rb_addr,
  output logic [8*WB-1:0] rb_win,
  input  logic [AW-1:0]   rd_addr,
  output logic [8*WB-1:0] rd_win,
  input  logic [AW-1:0]   w_addr,
  input  logic [8*WB-1:0] w_win,
  input  logic [WB-1:0]   w_be,
  input  logic [AW-1:0]   dw_addr,
  input  logic [8*WB-1:0] dw_win,
  input  logic [WB-1:0]   dw_be
);
  localparam int ROWS = BYTES / WB;
  localparam int CW   = $clog2(WB);
  localparam int RW   = $clog2(ROWS);

  logic [7:0] mem [WB][ROWS];

  // row used by byte column k for a window starting at addr
  function automatic logic [RW-1:0] col_row(input logic [AW-1:0] addr, input int k);
    logic [RW-1:0] r;
    r = addr[AW-1:CW];
    return (k >= int'(addr[CW-1:0])) ? r : r + 1'b1;
  endfunction

  logic [7:0]    raw_a [WB], raw_b [WB], raw_d [WB];
  logic [CW-1:0] off_a, off_b, off_d;

  always_ff @(posedge clk) begin
    for (int k = 0; k < WB; k++) begin
      logic [CW-1:0] j;
      raw_a[k] <= mem[k][col_row(ra_addr, k)];
      raw_b[k] <= mem[k][col_row(rb_addr, k)];
      raw_d[k] <= mem[k][col_row(rd_addr, k)];
      j = CW'(k) - w_addr[CW-1:0];
      if (w_be[j]) mem[k][col_row(w_addr, k)] <= w_win[8*j +: 8];
      j = CW'(k) - dw_addr[CW-1:0];
      if (dw_be[j]) mem[k][col_row(dw_addr, k)] <= dw_win[8*j +: 8];
    end
    off_a <= ra_addr[CW-1:0];
    off_b <= rb_addr[CW-1:0];
    off_d <= rd_addr[CW-1:0];
  end

  // rotate the columns so that window byte j is column (offset + j)
  always_comb begin
    for (int j = 0; j < WB; j++) begin
      ra_win[8*j +: 8] = raw_a[CW'(off_a + CW'(j))];
      rb_win[8*j +: 8] = raw_b[CW'(off_b + CW'(j))];
      rd_win[8*j +: 8] = raw_d[CW'(off_d + CW'(j))];
    end
  end
endmodule
