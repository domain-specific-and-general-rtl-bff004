// fp32_sqrt: iterative single-precision square root.
//
// The significand (shifted by one when the unbiased exponent is odd) is
// extended to a 50-bit radicand and its integer square root is found one bit
// per clock with the restoring digit-by-digit method, giving 24 result bits
// and one rounding bit (rounded half-up). The exponent is halved. Negative
// or zero inputs give zero. Used by the sphere collision unit for the
// point-distance calculation of stage 1.
// Interface: pulse start with x; done pulses one cycle with y valid, 26
// cycles after start. A start while busy is ignored.
module fp32_sqrt (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [31:0] x,
  output logic        busy,
  output logic        done,
  output logic [31:0] y
);
  logic [49:0] rad;
  logic [29:0] rem;
  logic [24:0] root;
  logic [4:0]  cnt;
  logic [7:0]  eres;
  logic        zero;

  logic [29:0] rem_sh, trial;
  always_comb begin
    rem_sh = {rem[27:0], rad[49:48]};
    trial  = {3'b000, root, 2'b01};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; done <= 1'b0;
      rad <= '0; rem <= '0; root <= '0; cnt <= '0; eres <= '0; zero <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy <= 1'b1;
        rem  <= '0;
        root <= '0;
        cnt  <= 5'd25;
        zero <= (x[30:23] == 8'd0) || x[31];
        // unbiased exponent E = e-127; odd E <=> e even
        if (x[23] == 1'b0) begin           // e even -> E odd
          rad  <= {1'b1, x[22:0], 26'd0};
          eres <= 8'(({1'b0, x[30:23]} - 9'd1) >> 1) + 8'd64; // floor(E/2)+127
        end else begin
          rad  <= {1'b0, 1'b1, x[22:0], 25'd0};
          eres <= 8'(({1'b0, x[30:23]} - 9'd1) >> 1) + 8'd64;
        end
      end else if (busy) begin
        rad <= {rad[47:0], 2'b00};
        if (rem_sh >= trial) begin
          rem  <= rem_sh - trial;
          root <= {root[23:0], 1'b1};
        end else begin
          rem  <= rem_sh;
          root <= {root[23:0], 1'b0};
        end
        cnt <= cnt - 5'd1;
        if (cnt == 5'd1) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  // rounding of the finished root (root holds 25 bits: 1.xxx plus round bit)
  logic [25:0] rr;
  always_comb rr = {1'b0, root} + 26'd1;
  assign y = zero ? 32'd0 : (rr[25] ? {1'b0, eres + 8'd1, 23'd0} : {1'b0, eres, rr[23:1]});
endmodule
