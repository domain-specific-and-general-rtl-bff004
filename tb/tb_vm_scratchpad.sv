// tb_vm_scratchpad: random test of the byte-column scratchpad.
//
// Drives random unaligned write windows with random byte enables on both
// write ports (vector and DMA, never the same byte in one cycle) and random
// unaligned reads on the three read ports, and compares every read window,
// one cycle after its address, with a byte-array model. Writes and reads in
// the same cycle check read-before-write. Addresses near the top of the
// store check the wrap-around. A reduced store size keeps the run short.
module tb_vm_scratchpad;
  localparam int LANES = 16, BYTES = 4096, WB = 4 * LANES, AW = 12;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [AW-1:0] ra_addr, rb_addr, rd_addr, w_addr, dw_addr;
  logic [8*WB-1:0] ra_win, rb_win, rd_win, w_win, dw_win;
  logic [WB-1:0] w_be, dw_be;
  int checks = 0, failures = 0;
  logic [7:0] model [BYTES];
  logic [8*WB-1:0] exp_a, exp_b, exp_d;

  vm_scratchpad #(.LANES(LANES), .BYTES(BYTES)) dut (.*);

  function automatic logic [8*WB-1:0] model_win(input logic [AW-1:0] a);
    logic [8*WB-1:0] w;
    for (int k = 0; k < WB; k++) w[8*k +: 8] = model[(int'(a) + k) % BYTES];
    return w;
  endfunction

  initial begin
    w_be = '0; dw_be = '0; w_addr = '0; dw_addr = '0; w_win = '0; dw_win = '0;
    ra_addr = '0; rb_addr = '0; rd_addr = '0;
    // fill the store through the DMA port with aligned full windows
    for (int r = 0; r < BYTES / WB; r++) begin
      @(negedge clk);
      dw_addr = AW'(r * WB); dw_be = '1;
      for (int k = 0; k < WB; k++) begin
        dw_win[8*k +: 8] = 8'($urandom);
        model[r * WB + k] = dw_win[8*k +: 8];
      end
    end
    @(negedge clk); dw_be = '0;
    for (int it = 0; it < 3000; it++) begin
      @(negedge clk);
      // check the reads issued in the previous cycle
      if (it > 0) begin
        checks += 3;
        if (ra_win != exp_a) begin failures++; if (failures < 5) $display("FAIL A @%h", ra_addr); end
        if (rb_win != exp_b) begin failures++; if (failures < 5) $display("FAIL B @%h", rb_addr); end
        if (rd_win != exp_d) begin failures++; if (failures < 5) $display("FAIL D @%h", rd_addr); end
      end
      ra_addr = (it % 7 == 0) ? AW'(BYTES - $urandom_range(1, WB)) : AW'($urandom);
      rb_addr = AW'($urandom);
      rd_addr = (it % 5 == 0) ? w_addr : AW'($urandom);
      exp_a = model_win(ra_addr); exp_b = model_win(rb_addr); exp_d = model_win(rd_addr);
      // new writes land at the next edge (after the reads above sample)
      w_addr = (it % 11 == 0) ? AW'(BYTES - $urandom_range(1, WB)) : AW'($urandom);
      dw_addr = AW'(int'(w_addr) + WB + $urandom_range(0, 100));
      for (int k = 0; k < WB; k++) begin
        w_win[8*k +: 8] = 8'($urandom); dw_win[8*k +: 8] = 8'($urandom);
        w_be[k] = $urandom_range(0, 1); dw_be[k] = $urandom_range(0, 1);
      end
      for (int k = 0; k < WB; k++) begin
        if (w_be[k])  model[(int'(w_addr) + k) % BYTES] = w_win[8*k +: 8];
        if (dw_be[k]) model[(int'(dw_addr) + k) % BYTES] = dw_win[8*k +: 8];
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
