// fp32_recip: iterative single-precision reciprocal, y = 1/x.
//
// The 24-bit significand D is divided into 2^48 by restoring long division,
// one quotient bit per clock (26 cycles), which yields 1/significand with a
// rounding bit; the result is rounded half-up and the exponent is mirrored
// around the bias. A zero input returns +/-infinity. Used by stage 2 of the
// sphere collision unit (the reciprocal of the centre distance).
// Interface: pulse start with x; done pulses one cycle with y valid.
module fp32_recip (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [31:0] x,
  output logic        busy,
  output logic        done,
  output logic [31:0] y
);
  logic [24:0] rem;
  logic [23:0] dv;
  logic [25:0] q;
  logic [4:0]  cnt;
  logic [7:0]  ex;
  logic        sx;

  logic [25:0] rem_sh;
  always_comb rem_sh = {rem, 1'b0};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; done <= 1'b0;
      rem <= '0; dv <= '0; q <= '0; cnt <= '0; ex <= '0; sx <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy <= 1'b1;
        rem  <= 25'h400000;            // 2^48 >> 26
        dv   <= {1'b1, x[22:0]};
        q    <= '0;
        cnt  <= 5'd26;
        ex   <= x[30:23];
        sx   <= x[31];
      end else if (busy) begin
        if (rem_sh >= {2'b00, dv}) begin
          rem <= 25'(rem_sh - {2'b00, dv});
          q   <= {q[24:0], 1'b1};
        end else begin
          rem <= rem_sh[24:0];
          q   <= {q[24:0], 1'b0};
        end
        cnt <= cnt - 5'd1;
        if (cnt == 5'd1) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  // q = floor(2^48 / D): 2^25 exactly when the significand is 1.0,
  // otherwise in (2^24, 2^25) with bit 0 as rounding bit.
  logic [25:0] qr;
  logic [8:0]  eo;
  always_comb begin
    qr = q + 26'd1;
    eo = 9'd253 - {1'b0, ex};
    if (ex == 8'd0)              y = {sx, 8'hFF, 23'd0};
    else if (q[25])              y = (ex >= 8'd254) ? {sx, 31'd0} : {sx, 8'(9'd254 - {1'b0, ex}), 23'd0};
    else if (ex >= 8'd253)       y = {sx, 31'd0};
    else if (qr[25])             y = {sx, 8'(eo + 9'd1), 23'd0};
    else                         y = {sx, eo[7:0], qr[23:1]};
  end
endmodule
