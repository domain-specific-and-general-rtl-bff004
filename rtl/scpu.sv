// scpu: Sphere Collision Processing Unit.
//
// Computes the contact between two spheres p1/r1 and p2/r2 exactly as the
// narrow-phase sphere-sphere test of a physics engine does it, split into the
// five sequential stages of the parallel algorithm; within a stage the
// independent operations run on parallel floating-point units:
//   stage 1  d = |p1 - p2| (subtract, square, sum, square root),
//            rsum = r1 + r2, psub = p1 - p2, rsub = r2 - r1
//   stage 2  d1 = 1/d, fake test d > rsum, rsub - d, depth = rsum - d
//   stage 3  normal = psub * d1, k = 0.5 * (rsub - d)
//   stage 4  cnk = normal * k
//   stage 5  pos = p1 + cnk
// A fake collision (d > rsum) ends after stage 2 with type COLL_FAKE and zero
// fields; a grazing one (d <= 0) gives pos = p1, normal (1,0,0), depth rsum.
// Stage 1's dependent chain and the iterative square root and reciprocal
// take several clocks; that sequencing, and sharing five adders and four
// multipliers between the stages, are this design's choices.
// Interface: pulse start with s1/s2 while busy is low; done pulses for one
// cycle with res valid (res holds until the next start). Latency, counted from the start cycle to the done cycle, is 33
// cycles for a fake or grazing pair and 63 for a real collision.
module scpu
  import cd_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     start,
  input  sphere_t  s1,
  input  sphere_t  s2,
  output logic     busy,
  output logic     done,
  output contact_t res
);
  typedef enum logic [3:0] {
    IDLE, S1_SUB, S1_SQ, S1_ADD1, S1_ADD2, S1_SQRT, S2_RECIP, S2_WAIT, S3, S4, S5
  } st_e;
  st_e st;

  sphere_t a, b;
  f32_t dx, dy, dz, rsum, rsub, sqx, sqy, sqz, sxy, sd, d, d1, kin, depth;
  f32_t nx, ny, nz, k, cx, cy, cz;

  // shared operator bank
  f32_t ad_a [5], ad_b [5], ad_y [5];
  logic ad_s [5];
  f32_t mu_a [4], mu_b [4], mu_y [4];

  for (genvar i = 0; i < 5; i++) begin : g_add
    fp32_add u_add (.a(ad_a[i]), .b(ad_b[i]), .sub(ad_s[i]), .y(ad_y[i]));
  end
  for (genvar i = 0; i < 4; i++) begin : g_mul
    fp32_mul u_mul (.a(mu_a[i]), .b(mu_b[i]), .y(mu_y[i]));
  end

  logic sq_start, sq_busy, sq_done, rc_start, rc_busy, rc_done;
  f32_t sq_y, rc_y;
  fp32_sqrt  u_sqrt  (.clk, .rst_n, .start(sq_start), .x(sd), .busy(sq_busy), .done(sq_done), .y(sq_y));
  fp32_recip u_recip (.clk, .rst_n, .start(rc_start), .x(d),  .busy(rc_busy), .done(rc_done), .y(rc_y));

  localparam f32_t HALF = 32'h3F00_0000;
  localparam f32_t ONE  = 32'h3F80_0000;

  logic d_gt_rsum;
  // d and rsum are non-negative, so their IEEE bit patterns order like integers
  assign d_gt_rsum = (d[30:0] > rsum[30:0]) && !rsum[31];

  always_comb begin
    for (int i = 0; i < 5; i++) begin ad_a[i] = '0; ad_b[i] = '0; ad_s[i] = 1'b0; end
    for (int i = 0; i < 4; i++) begin mu_a[i] = '0; mu_b[i] = '0; end
    unique case (st)
      S1_SUB: begin
        ad_a[0] = a.x; ad_b[0] = b.x; ad_s[0] = 1'b1;
        ad_a[1] = a.y; ad_b[1] = b.y; ad_s[1] = 1'b1;
        ad_a[2] = a.z; ad_b[2] = b.z; ad_s[2] = 1'b1;
        ad_a[3] = a.r; ad_b[3] = b.r;                  // rsum
        ad_a[4] = b.r; ad_b[4] = a.r; ad_s[4] = 1'b1;  // rsub
      end
      S1_SQ: begin
        mu_a[0] = dx; mu_b[0] = dx;
        mu_a[1] = dy; mu_b[1] = dy;
        mu_a[2] = dz; mu_b[2] = dz;
      end
      S1_ADD1: begin ad_a[0] = sqx; ad_b[0] = sqy; end
      S1_ADD2: begin ad_a[0] = sxy; ad_b[0] = sqz; end
      S2_RECIP: begin
        ad_a[0] = rsub; ad_b[0] = d; ad_s[0] = 1'b1;   // r2 - r1 - d
        ad_a[1] = rsum; ad_b[1] = d; ad_s[1] = 1'b1;   // r1 + r2 - d
      end
      S3: begin
        mu_a[0] = dx; mu_b[0] = d1;
        mu_a[1] = dy; mu_b[1] = d1;
        mu_a[2] = dz; mu_b[2] = d1;
        mu_a[3] = HALF; mu_b[3] = kin;
      end
      S4: begin
        mu_a[0] = nx; mu_b[0] = k;
        mu_a[1] = ny; mu_b[1] = k;
        mu_a[2] = nz; mu_b[2] = k;
      end
      S5: begin
        ad_a[0] = a.x; ad_b[0] = cx;
        ad_a[1] = a.y; ad_b[1] = cy;
        ad_a[2] = a.z; ad_b[2] = cz;
      end
      default: ;
    endcase
  end

  assign sq_start = (st == S1_SQRT) && !sq_busy && !sq_done;
  assign rc_start = (st == S2_RECIP);
  assign busy     = (st != IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= IDLE; done <= 1'b0; res <= '0;
      a <= '0; b <= '0;
      {dx, dy, dz, rsum, rsub, sqx, sqy, sqz, sxy, sd, d, d1, kin, depth} <= '0;
      {nx, ny, nz, k, cx, cy, cz} <= '0;
    end else begin
      done <= 1'b0;
      unique case (st)
        IDLE: if (start) begin a <= s1; b <= s2; st <= S1_SUB; end
        S1_SUB: begin
          dx <= ad_y[0]; dy <= ad_y[1]; dz <= ad_y[2];
          rsum <= ad_y[3]; rsub <= ad_y[4];
          st <= S1_SQ;
        end
        S1_SQ:   begin sqx <= mu_y[0]; sqy <= mu_y[1]; sqz <= mu_y[2]; st <= S1_ADD1; end
        S1_ADD1: begin sxy <= ad_y[0]; st <= S1_ADD2; end
        S1_ADD2: begin sd  <= ad_y[0]; st <= S1_SQRT; end
        S1_SQRT: if (sq_done) begin d <= sq_y; st <= S2_RECIP; end
        S2_RECIP: begin
          kin   <= ad_y[0];
          depth <= ad_y[1];
          if (d_gt_rsum) begin
            res <= '0;
            res.ctype <= COLL_FAKE;
            done <= 1'b1;
            st <= IDLE;
          end else if (d[30:0] == 31'd0 || d[31]) begin
            res <= '0;
            res.ctype <= COLL_GRAZING;
            res.px <= a.x; res.py <= a.y; res.pz <= a.z;
            res.nx <= ONE;
            res.depth <= rsum;
            done <= 1'b1;
            st <= IDLE;
          end else st <= S2_WAIT;
        end
        S2_WAIT: if (rc_done) begin d1 <= rc_y; st <= S3; end
        S3: begin nx <= mu_y[0]; ny <= mu_y[1]; nz <= mu_y[2]; k <= mu_y[3]; st <= S4; end
        S4: begin cx <= mu_y[0]; cy <= mu_y[1]; cz <= mu_y[2]; st <= S5; end
        S5: begin
          res.rsvd  <= '0;
          res.ctype <= COLL_REAL;
          res.px <= ad_y[0]; res.py <= ad_y[1]; res.pz <= ad_y[2];
          res.nx <= nx; res.ny <= ny; res.nz <= nz;
          res.depth <= depth;
          done <= 1'b1;
          st <= IDLE;
        end
        default: st <= IDLE;
      endcase
    end
  end
endmodule
