// tb_vm_aligners: test of the source and destination data aligners.
//
// For random windows, element sizes, signedness and element counts, checks
// that the source aligner returns each element zero- or sign-extended and
// that the destination aligner packs the truncated lane values with byte
// enables only for the first n elements. The two are also chained: packing
// then unpacking at the same size must give back the truncated values.
module tb_vm_aligners;
  localparam int LANES = 16, WB = 4 * LANES;
  logic [8*WB-1:0] win, pwin;
  logic [1:0] size;
  logic sgn;
  logic [31:0] elem [LANES];
  logic [31:0] lanes [LANES];
  logic [4:0] n;
  logic [WB-1:0] be;
  logic [31:0] back [LANES];
  int checks = 0, failures = 0;

  vm_rd_aligner #(.LANES(LANES)) u_rd (.win, .size, .sgn, .elem);
  vm_wr_aligner #(.LANES(LANES)) u_wr (.elem(lanes), .size, .n, .win(pwin), .be);
  vm_rd_aligner #(.LANES(LANES)) u_back (.win(pwin), .size, .sgn(1'b0), .elem(back));

  initial begin
    for (int it = 0; it < 2000; it++) begin
      int sz;
      logic [31:0] e, m;
      for (int k = 0; k < WB; k++) win[8*k +: 8] = 8'($urandom);
      for (int i = 0; i < LANES; i++) lanes[i] = $urandom;
      sz = $urandom_range(0, 2); size = 2'(sz); sgn = $urandom_range(0, 1);
      n = 5'($urandom_range(0, LANES));
      #1;
      m = (sz == 2) ? 32'hFFFF_FFFF : (32'h1 << (8 << sz)) - 1;
      for (int i = 0; i < LANES; i++) begin
        e = '0;
        for (int k = 0; k < (1 << sz); k++) e[8*k +: 8] = win[8*(i * (1 << sz) + k) +: 8];
        if (sgn && sz == 0) e = 32'(signed'(e[7:0]));
        if (sgn && sz == 1) e = 32'(signed'(e[15:0]));
        checks++;
        if (elem[i] != e) begin failures++; if (failures < 5) $display("FAIL rd size %0d lane %0d", sz, i); end
        checks++;
        if (back[i] != (lanes[i] & m)) begin failures++; if (failures < 5) $display("FAIL wr size %0d lane %0d", sz, i); end
      end
      for (int k = 0; k < WB; k++) begin
        checks++;
        if (be[k] != (k < int'(n) * (1 << sz))) begin failures++; if (failures < 5) $display("FAIL be %0d", k); end
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
