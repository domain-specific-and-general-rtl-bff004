// tb_vm_core: program-level test of the memory-based vector processor.
//
// A host model pushes a small vector-memory program into the instruction
// FIFO: unaligned DMA reads into the scratchpad, vector operations on byte,
// halfword and word elements at unaligned scratchpad addresses (mixed and
// widening sizes, vector-scalar form, a dependent instruction right behind
// its producer, an in-place sliding-window update), a DMA prefetch that
// runs while a long vector operation computes, and DMA writes of the results
// back to main memory, one of them, right behind the long vector operation
// that produces its data, reading the part that is written last. The host then polls busy. The testbench executes the
// same program on its own byte-level model (in groups of LANES elements, as
// the pipeline does) and compares the whole result area of main memory. It
// also requires that a hazard bubble, an ordering wait and DMA/vector
// concurrency each occurred, and checks one vector operation's throughput.
module tb_vm_core;
  import vm_pkg::*;
  localparam int LANES = 16;
  localparam int SPB   = 65536;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic i_valid, i_ready, busy;
  vinstr_t i_data;
  logic [31:0] perf_concurrent, perf_order_waits, perf_hazard_stalls;
  logic m_req_valid, m_req_ready, m_req_we, m_rsp_valid;
  logic [31:0] m_req_addr;
  logic [63:0] m_req_wdata, m_rsp_rdata;
  logic [7:0] m_req_wstrb;
  int checks = 0, failures = 0;

  vm_core dut (.*);

  // ---------------- main memory model (64-bit beats, random latency)
  logic [7:0] mm [logic [31:0]];
  int lat = 0;
  logic pend = 0;
  logic [31:0] pend_addr;
  function automatic logic [7:0] mmrd(input logic [31:0] a);
    return mm.exists(a) ? mm[a] : 8'h00;
  endfunction
  always @(negedge clk) m_req_ready <= !pend && ($urandom_range(0, 2) != 0);
  always @(posedge clk) begin
    m_rsp_valid <= 1'b0;
    if (m_req_valid && m_req_ready) begin
      if (m_req_we) begin
        for (int j = 0; j < 8; j++) if (m_req_wstrb[j]) mm[m_req_addr + 32'(j)] = m_req_wdata[8*j +: 8];
      end else begin
        pend <= 1'b1; pend_addr <= m_req_addr; lat <= $urandom_range(1, 4);
      end
    end
    if (pend) begin
      if (lat == 0) begin
        pend <= 1'b0;
        m_rsp_valid <= 1'b1;
        for (int j = 0; j < 8; j++) m_rsp_rdata[8*j +: 8] <= mmrd(pend_addr + 32'(j));
      end else lat <= lat - 1;
    end
  end

  // ---------------- reference model
  logic [7:0] rsp [SPB];
  logic [7:0] rmm [logic [31:0]];
  int unsigned rvl = 0;

  function automatic logic [31:0] ld(input logic [31:0] a, input int sz, input logic sgn);
    logic [31:0] v = '0;
    for (int k = 0; k < (1 << sz); k++) v[8*k +: 8] = rsp[(a + k) % SPB];
    if (sgn && sz == 0) v = 32'(signed'(v[7:0]));
    if (sgn && sz == 1) v = 32'(signed'(v[15:0]));
    return v;
  endfunction
  function automatic logic [31:0] alu(input vop_e op, input logic sgn, input logic [31:0] a, b);
    logic lt;
    lt = sgn ? ($signed(a) < $signed(b)) : (a < b);
    case (op)
      OP_ADD: return a + b;   OP_SUB: return a - b;   OP_MUL: return a * b;
      OP_AND: return a & b;   OP_OR:  return a | b;   OP_XOR: return a ^ b;
      OP_ABSDIFF: return lt ? b - a : a - b;
      OP_MIN: return lt ? a : b;  OP_MAX: return lt ? b : a;
      OP_SHL: return a << b[4:0];
      OP_SHR: return sgn ? 32'($signed(a) >>> b[4:0]) : a >> b[4:0];
      default: return a;
    endcase
  endfunction
  task automatic ref_exec(input vinstr_t x);
    logic [31:0] r [LANES];
    case (x.ctrl.op)
      OP_SET_VL: rvl = x.va;
      OP_DMA_RD: for (int k = 0; k < x.vb; k++) rsp[(x.vd + k) % SPB] = rmm.exists(x.va + k) ? rmm[x.va + k] : 8'h00;
      OP_DMA_WR: for (int k = 0; k < x.vb; k++) rmm[x.vd + k] = rsp[(x.va + k) % SPB];
      default: begin
        for (int g = 0; g < int'(rvl); g += LANES) begin
          int n = (int'(rvl) - g < LANES) ? int'(rvl) - g : LANES;
          for (int i = 0; i < n; i++) begin
            logic [31:0] a, b;
            a = ld(x.va + ((g + i) << x.ctrl.sza), x.ctrl.sza, x.ctrl.sgn);
            b = x.ctrl.bscalar ? x.vb : ld(x.vb + ((g + i) << x.ctrl.szb), x.ctrl.szb, x.ctrl.sgn);
            r[i] = alu(x.ctrl.op, x.ctrl.sgn, a, b);
          end
          for (int i = 0; i < n; i++)
            for (int k = 0; k < (1 << x.ctrl.szd); k++)
              rsp[(x.vd + ((g + i) << x.ctrl.szd) + k) % SPB] = r[i][8*k +: 8];
        end
      end
    endcase
  endtask

  // ---------------- program
  vinstr_t prog [$];
  function automatic vinstr_t mk(input vop_e op, input logic [31:0] d, a, b,
                                 input int szd = 2, sza = 2, szb = 2, input bit sgn = 0, bsc = 0);
    vinstr_t x = '0;
    x.ctrl.op = op; x.ctrl.szd = 2'(szd); x.ctrl.sza = 2'(sza); x.ctrl.szb = 2'(szb);
    x.ctrl.sgn = sgn; x.ctrl.bscalar = bsc;
    x.vd = d; x.va = a; x.vb = b;
    return x;
  endfunction

  int t_start, t_end;
  initial begin
    i_valid = 0; i_data = '0;
    for (int k = 0; k < 4096; k++) begin
      logic [7:0] v = 8'($urandom);
      mm[32'h1_0000 + k] = v;
      rmm[32'h1_0000 + k] = v;
    end
    // the model starts from whatever the scratchpad holds after power-up
    for (int k = 0; k < SPB; k++) rsp[k] = dut.u_sp.mem[k % (4 * LANES)][k / (4 * LANES)];
    prog.push_back(mk(OP_DMA_RD, 32'h0101, 32'h1_0003, 32'd300));           // A words, unaligned
    prog.push_back(mk(OP_DMA_RD, 32'h0803, 32'h1_0200, 32'd301));           // B
    prog.push_back(mk(OP_SET_VL, 0, 32'd75, 0));
    prog.push_back(mk(OP_ADD, 32'h1002, 32'h0101, 32'h0803));              // words, unaligned
    prog.push_back(mk(OP_MUL, 32'h1402, 32'h1002, 32'h0101));              // needs the ADD result
    prog.push_back(mk(OP_MIN, 32'h1801, 32'h0101, 32'h0803, 0, 0, 0, 1));  // signed bytes
    prog.push_back(mk(OP_ABSDIFF, 32'h1903, 32'h0101, 32'h0803, 1, 1, 1, 0));
    prog.push_back(mk(OP_ADD, 32'h1A00, 32'h0101, 32'h0803, 2, 0, 1, 1));  // widening mixed
    prog.push_back(mk(OP_SHR, 32'h1C05, 32'h1002, 32'd3, 1, 2, 2, 1, 1));  // narrowing, scalar
    prog.push_back(mk(OP_ADD, 32'h0105, 32'h0101, 32'h0101, 0, 0, 0, 0));  // in-place sliding
    prog.push_back(mk(OP_SET_VL, 0, 32'd600, 0));
    prog.push_back(mk(OP_XOR, 32'h3000, 32'h0101, 32'h0803, 2, 0, 0, 0));  // long op ...
    prog.push_back(mk(OP_DMA_RD, 32'h6000, 32'h1_0800, 32'd512));          // ... with prefetch
    prog.push_back(mk(OP_SET_VL, 0, 32'd33, 0));
    prog.push_back(mk(OP_MAX, 32'h6007, 32'h6000, 32'h6100, 0, 0, 0, 0)); // uses the prefetch
    prog.push_back(mk(OP_DMA_WR, 32'h2_0000, 32'h1000, 32'h0E00));         // results out
    prog.push_back(mk(OP_DMA_WR, 32'h2_1003, 32'h0100, 32'd320));
    prog.push_back(mk(OP_DMA_WR, 32'h2_2005, 32'h3000, 32'd2400));
    prog.push_back(mk(OP_DMA_WR, 32'h2_3000, 32'h6000, 32'd300));
    prog.push_back(mk(OP_SET_VL, 0, 32'd2400, 0));
    prog.push_back(mk(OP_ADD, 32'h9000, 32'h3000, 32'd7, 2, 0, 2, 0, 1));  // long op ...
    prog.push_back(mk(OP_DMA_WR, 32'h2_4000, 32'h9000 + 32'd8960, 32'd640)); // its tail, at once
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    foreach (prog[p]) begin
      ref_exec(prog[p]);
      i_valid = 1; i_data = prog[p];
      @(posedge clk);
      while (!i_ready) @(posedge clk);
      @(negedge clk);
      i_valid = 0;
    end
    @(negedge clk);
    while (busy) @(negedge clk);
    // compare the result areas of main memory
    for (int k = 0; k < 32'h0E00; k++) begin
      checks++;
      if (mmrd(32'h2_0000 + k) != rmm[32'h2_0000 + k]) begin failures++; if (failures < 10) $display("FAIL mm %h", 32'h2_0000 + k); end
    end
    for (int k = 0; k < 320; k++) begin
      checks++;
      if (mmrd(32'h2_1003 + k) != rmm[32'h2_1003 + k]) begin failures++; if (failures < 10) $display("FAIL mm %h", 32'h2_1003 + k); end
    end
    for (int k = 0; k < 2400; k++) begin
      checks++;
      if (mmrd(32'h2_2005 + k) != rmm[32'h2_2005 + k]) begin failures++; if (failures < 10) $display("FAIL mm %h", 32'h2_2005 + k); end
    end
    for (int k = 0; k < 300; k++) begin
      checks++;
      if (mmrd(32'h2_3000 + k) != rmm[32'h2_3000 + k]) begin failures++; if (failures < 10) $display("FAIL mm %h", 32'h2_3000 + k); end
    end
    for (int k = 0; k < 640; k++) begin
      checks++;
      if (mmrd(32'h2_4000 + k) != rmm[32'h2_4000 + k]) begin failures++; if (failures < 10) $display("FAIL mm %h", 32'h2_4000 + k); end
    end
    // bytes just outside the written ranges stay untouched
    checks += 2;
    if (mm.exists(32'h2_1002) || mm.exists(32'h2_1003 + 320)) begin failures++; $display("FAIL DMA wrote outside its range"); end
    if (mm.exists(32'h2_2004)) begin failures++; $display("FAIL DMA wrote before its range"); end
    // mechanisms
    checks++;
    if (perf_hazard_stalls == 0 || perf_order_waits == 0 || perf_concurrent == 0) begin
      failures++; $display("FAIL mechanism missing");
    end
    $display("hazard bubbles %0d, ordering waits %0d, concurrent DMA/vector cycles %0d",
             perf_hazard_stalls, perf_order_waits, perf_concurrent);
    // throughput: an independent 4096-element word operation, LANES per clock
    i_valid = 1; i_data = mk(OP_SET_VL, 0, 32'd4096, 0);
    @(posedge clk); while (!i_ready) @(posedge clk); @(negedge clk);
    i_data = mk(OP_SUB, 32'h8000, 32'h0000, 32'h4000);
    @(posedge clk); while (!i_ready) @(posedge clk);
    t_start = $time; @(negedge clk); i_valid = 0;
    while (busy) @(negedge clk);
    t_end = $time;
    checks++;
    // 256 groups + FIFO, pipeline fill and drain
    if ((t_end - t_start) / 10 > 256 + 6 || (t_end - t_start) / 10 < 256) begin
      failures++; $display("FAIL throughput: %0d cycles", (t_end - t_start) / 10);
    end
    $display("4096-element vector op: %0d cycles", (t_end - t_start) / 10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
