// puc: Processing Units Controller of the collision accelerator.
//
// Runs one simulation step of the host/accelerator handshake:
//  1. collector: reads the source buffer in shared memory (header line, then
//     the sphere lines, then the collision lines) into the VWIRB, keeping
//     several line reads in flight;
//  2. replication: copies every sphere from the VWIRB into all SCPU local
//     RAMs at once, one sphere per cycle;
//  3. dispatch: for each 512-bit collision line (16 address pairs) every SCPU
//     reads its two spheres from its own local RAM, all SCPUs start together
//     and the controller waits until the active ones finish;
//  4. collection: the contacts are written to the destination buffer, two
//     256-bit results per line, and finally a status line that the host polls
//     ("done"), after which done is also raised on the port.
// With fewer than 16 SCPUs a collision line carries N_SCPU pairs.
// Buffer layout (this design's choice): source line 0 is a header
// {num_collisions[31:16], num_spheres[15:0]}; spheres follow four per line,
// then the collision lines. Destination line 0 is the status line
// {num_collisions, 32'd1}; result c is half c%2 of line 1 + c/2.
// The counters perf_mem_cycles and perf_proc_cycles split the step into
// shared-memory transfer time and replication/processing time.
// Interface: line-addressed read requests (valid/ready) with in-order read
// responses, and line writes (valid/ready). start is a one-cycle pulse while
// busy is low; done stays high until the next start.
module puc
  import cd_pkg::*;
#(
  parameter int N_SCPU  = 16,
  parameter int SPHERES = 4096,
  parameter int CLINES  = 512,
  localparam int SAW = $clog2(SPHERES),
  localparam int CAW = $clog2(CLINES)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic [31:0]     src_base,
  input  logic [31:0]     dst_base,
  output logic            busy,
  output logic            done,
  output logic [31:0]     perf_mem_cycles,
  output logic [31:0]     perf_proc_cycles,
  // shared memory
  output logic            rd_req_valid,
  input  logic            rd_req_ready,
  output logic [31:0]     rd_req_addr,
  input  logic            rd_resp_valid,
  input  logic [511:0]    rd_resp_data,
  output logic            wr_valid,
  input  logic            wr_ready,
  output logic [31:0]     wr_addr,
  output logic [511:0]    wr_data,
  // VWIRB
  output logic            sph_we,
  output logic [SAW-3:0]  sph_wline,
  output logic [511:0]    sph_wdata,
  output logic [SAW-1:0]  sph_raddr,
  input  logic [127:0]    sph_rdata,
  output logic            cl_we,
  output logic [CAW-1:0]  cl_waddr,
  output logic [511:0]    cl_wdata,
  output logic [CAW-1:0]  cl_raddr,
  input  logic [511:0]    cl_rdata,
  // local RAMs
  output logic            lr_we,
  output logic [SAW-1:0]  lr_waddr,
  output logic [127:0]    lr_wdata,
  output logic [SAW-1:0]  lr_raddr [N_SCPU],
  input  logic [127:0]    lr_rdata [N_SCPU],
  // SCPUs
  output logic            sc_start [N_SCPU],
  output sphere_t         sc_s1 [N_SCPU],
  output sphere_t         sc_s2 [N_SCPU],
  input  logic            sc_done [N_SCPU],
  input  contact_t        sc_res [N_SCPU]
);
  typedef enum logic [3:0] {
    IDLE, HDR_REQ, HDR_WAIT, FETCH, REPL, DL_RD, DL_GOT, RD_A, RD_B, GOT_B, LAUNCH,
    WAIT_SC, WRITE_RES, WRITE_STAT, FIN
  } st_e;
  st_e st;

  logic [15:0] nsph;
  logic [15:0] ncoll;
  logic [31:0] sph_lines, total_lines, req_cnt, resp_cnt;
  logic [31:0] repl_i;
  logic        repl_v;
  logic [SAW-1:0] repl_a;
  logic [31:0] line_j;      // collision line index
  logic [31:0] wq;          // result line within the current collision line
  logic [N_SCPU-1:0] active, pending;
  logic [31:0] nact;
  logic [SADDR_W-1:0] pa [N_SCPU], pb [N_SCPU];

  // a collision line carries 16 address pairs, one per SCPU
  if (N_SCPU > PAIRS_PER_LINE) begin : g_bad
    $error("puc: N_SCPU may not exceed the 16 pairs of a collision line");
  end

  assign busy = (st != IDLE) && (st != FIN);
  assign done = (st == FIN);

  // read requests: header alone, then the whole body back to back
  always_comb begin
    rd_req_valid = 1'b0;
    rd_req_addr  = '0;
    if (st == HDR_REQ) begin
      rd_req_valid = 1'b1;
      rd_req_addr  = src_base;
    end else if (st == FETCH && req_cnt < total_lines) begin
      rd_req_valid = 1'b1;
      rd_req_addr  = src_base + 32'd1 + req_cnt;
    end
  end

  always_comb begin
    sph_we    = (st == FETCH) && rd_resp_valid && (resp_cnt < sph_lines);
    sph_wline = resp_cnt[SAW-3:0];
    sph_wdata = rd_resp_data;
    cl_we     = (st == FETCH) && rd_resp_valid && (resp_cnt >= sph_lines);
    cl_waddr  = CAW'(resp_cnt - sph_lines);
    cl_wdata  = rd_resp_data;
    sph_raddr = repl_i[SAW-1:0];
    cl_raddr  = line_j[CAW-1:0];
    lr_we     = repl_v;
    lr_waddr  = repl_a;
    lr_wdata  = sph_rdata;
    for (int p = 0; p < N_SCPU; p++) begin
      lr_raddr[p] = (st == RD_A) ? pa[p][SAW-1:0] : pb[p][SAW-1:0];
      sc_start[p] = (st == LAUNCH) && active[p];
    end
  end

  // result line q of the current collision line holds SCPU 2q and 2q+1
  always_comb begin
    wr_valid = 1'b0;
    wr_addr  = '0;
    wr_data  = '0;
    if (st == WRITE_RES) begin
      wr_valid = 1'b1;
      wr_addr  = dst_base + 32'd1 + line_j * (N_SCPU / 2) + wq;
      for (int p = 0; p < N_SCPU; p++)
        if (p / 2 == int'(wq) && active[p]) wr_data[(p % 2)*256 +: 256] = sc_res[p];
    end else if (st == WRITE_STAT) begin
      wr_valid = 1'b1;
      wr_addr  = dst_base;
      wr_data  = {448'd0, 16'd0, ncoll, 32'd1};
    end
  end

  // SCPUs of the batch that have not finished yet, this cycle's done pulses
  // taken into account
  logic [N_SCPU-1:0] still;
  always_comb begin
    still = pending;
    for (int p = 0; p < N_SCPU; p++) if (sc_done[p]) still[p] = 1'b0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= IDLE;
      nsph <= '0; ncoll <= '0; sph_lines <= '0; total_lines <= '0;
      req_cnt <= '0; resp_cnt <= '0; repl_i <= '0; repl_v <= 1'b0; repl_a <= '0;
      line_j <= '0; wq <= '0; active <= '0; pending <= '0; nact <= '0;
      perf_mem_cycles <= '0; perf_proc_cycles <= '0;
      for (int p = 0; p < N_SCPU; p++) begin
        pa[p] <= '0; pb[p] <= '0; sc_s1[p] <= '0; sc_s2[p] <= '0;
      end
    end else begin
      repl_v <= 1'b0;
      if (st inside {HDR_REQ, HDR_WAIT, FETCH, WRITE_RES, WRITE_STAT}) perf_mem_cycles <= perf_mem_cycles + 32'd1;
      if (st inside {REPL, DL_RD, DL_GOT, RD_A, RD_B, GOT_B, LAUNCH, WAIT_SC}) perf_proc_cycles <= perf_proc_cycles + 32'd1;
      unique case (st)
        IDLE, FIN: if (start) begin
          st <= HDR_REQ;
          perf_mem_cycles <= '0;
          perf_proc_cycles <= '0;
        end
        HDR_REQ: if (rd_req_ready) st <= HDR_WAIT;
        HDR_WAIT: if (rd_resp_valid) begin
          nsph  <= rd_resp_data[15:0];
          ncoll <= rd_resp_data[31:16];
          sph_lines   <= (32'(rd_resp_data[15:0]) + 32'd3) >> 2;

          total_lines <= ((32'(rd_resp_data[15:0]) + 32'd3) >> 2)
                       + (32'(rd_resp_data[31:16]) + 32'(N_SCPU - 1)) / 32'(N_SCPU);
          req_cnt  <= '0;
          resp_cnt <= '0;
          st <= FETCH;
        end
        FETCH: begin
          if (rd_req_valid && rd_req_ready) req_cnt <= req_cnt + 32'd1;
          if (rd_resp_valid) resp_cnt <= resp_cnt + 32'd1;
          if (resp_cnt == total_lines) begin
            repl_i <= '0;
            st <= REPL;
          end
        end
        REPL: begin
          if (repl_i < 32'(nsph)) begin
            repl_v <= 1'b1;
            repl_a <= repl_i[SAW-1:0];
            repl_i <= repl_i + 32'd1;
          end else begin
            line_j <= '0;
            st <= (ncoll == 16'd0) ? WRITE_STAT : DL_RD;
          end
        end
        DL_RD: st <= DL_GOT;
        DL_GOT: begin
          for (int p = 0; p < N_SCPU; p++) begin
            pa[p] <= cl_rdata[p*32 +: 16];
            pb[p] <= cl_rdata[p*32+16 +: 16];
            active[p] <= (line_j * 32'(N_SCPU) + 32'(p)) < 32'(ncoll);
          end
          nact <= (32'(ncoll) - line_j * 32'(N_SCPU) >= 32'(N_SCPU)) ? 32'(N_SCPU)
                                                                    : 32'(ncoll) - line_j * 32'(N_SCPU);
          st <= RD_A;
        end
        RD_A: st <= RD_B;
        RD_B: begin
          for (int p = 0; p < N_SCPU; p++) sc_s1[p] <= lr_rdata[p];
          st <= GOT_B;
        end
        GOT_B: begin
          for (int p = 0; p < N_SCPU; p++) sc_s2[p] <= lr_rdata[p];
          st <= LAUNCH;
        end
        LAUNCH: begin
          pending <= active;
          st <= WAIT_SC;
        end
        WAIT_SC: begin
          pending <= still;
          if (still == '0) begin
            wq <= '0;
            st <= WRITE_RES;
          end
        end
        WRITE_RES: if (wr_ready) begin
          if ((wq + 32'd1) * 32'd2 >= nact) begin
            if ((line_j + 32'd1) * 32'(N_SCPU) >= 32'(ncoll)) st <= WRITE_STAT;
            else begin
              line_j <= line_j + 32'd1;
              st <= DL_RD;
            end
          end else wq <= wq + 32'd1;
        end
        WRITE_STAT: if (wr_ready) st <= FIN;
        default: st <= IDLE;
      endcase
    end
  end
endmodule
