// vm_dma: DMA engine between main memory and the vector scratchpad.
//
// Moves len bytes between any main-memory byte address and any scratchpad
// byte address, in either direction, one aligned 64-bit main-memory beat at
// a time. For beat address ba (mm_addr rounded down to 8, then +8 per beat)
// the matching scratchpad window starts at sp_addr + (ba - mm_addr), taken
// modulo the scratchpad size, and only the bytes inside [mm_addr,
// mm_addr+len) are enabled. So neither address needs any alignment and the
// byte length is independent of the vector length.
//   read  (main -> scratchpad): request beat, wait for data, write window;
//   write (scratchpad -> main): read window, send beat with byte strobes.
// The engine runs beside the vector engine; ordering against vector
// instructions is the dispatcher's job. One beat is outstanding at a time,
// and the request/response port stands in for the AXI link of the platform.
// Interface: start with is_write/mm_addr/sp_addr/len while busy is low.
module vm_dma #(
  parameter int LANES = 16,
  parameter int BYTES = 65536,
  localparam int WB = 4 * LANES,
  localparam int AW = $clog2(BYTES)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic            is_write,
  input  logic [31:0]     mm_addr,
  input  logic [31:0]     sp_addr,
  input  logic [31:0]     len,
  output logic            busy,
  output logic [31:0]     sp_lo,      // scratchpad range in use
  output logic [31:0]     sp_hi,
  // main memory
  output logic            m_req_valid,
  input  logic            m_req_ready,
  output logic            m_req_we,
  output logic [31:0]     m_req_addr,
  output logic [63:0]     m_req_wdata,
  output logic [7:0]      m_req_wstrb,
  input  logic            m_rsp_valid,
  input  logic [63:0]     m_rsp_rdata,
  // scratchpad DMA ports
  output logic [AW-1:0]   rd_addr,
  input  logic [8*WB-1:0] rd_win,
  output logic [AW-1:0]   dw_addr,
  output logic [8*WB-1:0] dw_win,
  output logic [WB-1:0]   dw_be
);
  typedef enum logic [2:0] {IDLE, RREQ, RWAIT, SPRD, SPDAT, WREQ} st_e;
  st_e st;

  logic [31:0] m0, m_end, s0, ba;
  logic [7:0]  strb;
  logic [63:0] wbuf;

  always_comb begin
    for (int j = 0; j < 8; j++) strb[j] = ((ba + 32'(j)) >= m0) && ((ba + 32'(j)) < m_end);
  end

  assign busy    = (st != IDLE);
  assign sp_lo   = s0;
  assign sp_hi   = s0 + (m_end - m0);
  assign rd_addr = AW'(s0 + (ba - m0));
  assign dw_addr = AW'(s0 + (ba - m0));

  always_comb begin
    m_req_valid = (st == RREQ) || (st == WREQ);
    m_req_we    = (st == WREQ);
    m_req_addr  = ba;
    m_req_wdata = wbuf;
    m_req_wstrb = strb;
    dw_win = '0;
    dw_be  = '0;
    if (st == RWAIT && m_rsp_valid) begin
      dw_win[63:0] = m_rsp_rdata;
      dw_be[7:0]   = strb;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= IDLE; m0 <= '0; m_end <= '0; s0 <= '0; ba <= '0; wbuf <= '0;
    end else begin
      unique case (st)
        IDLE: if (start && len != '0) begin
          m0    <= mm_addr;
          m_end <= mm_addr + len;
          s0    <= sp_addr;
          ba    <= {mm_addr[31:3], 3'b000};
          st    <= is_write ? SPRD : RREQ;
        end
        RREQ:  if (m_req_ready) st <= RWAIT;
        RWAIT: if (m_rsp_valid) begin
          ba <= ba + 32'd8;
          st <= (ba + 32'd8 >= m_end) ? IDLE : RREQ;
        end
        SPRD:  st <= SPDAT;                 // window read issued
        SPDAT: begin wbuf <= rd_win[63:0]; st <= WREQ; end
        WREQ:  if (m_req_ready) begin
          ba <= ba + 32'd8;
          st <= (ba + 32'd8 >= m_end) ? IDLE : SPRD;
        end
        default: st <= IDLE;
      endcase
    end
  end
endmodule
