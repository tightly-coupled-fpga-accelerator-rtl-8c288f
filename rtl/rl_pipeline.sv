// rl_pipeline: range-limited pair-force pipeline (Lennard-Jones plus
// short-range Coulomb), one particle pair per clock.
//
// For particles i and j it computes the force on i
//     F = [ (eps/sigma^2) * (48 (sigma/r)^14 - 24 (sigma/r)^8)
//           + kq / r^3 ] * d ,        d = r_i - r_j (minimum image),
// and zero when r^2 exceeds the cutoff. kq = q_i q_j / (4 pi eps0), the
// Coulomb constant folded in, and eps/sigma^2 and sigma^2 of the pair's atom
// types come with each pair, so the caller resolves the types.
// Only 1/r is computed, by an inverse square root: r^2 is normalised by an
// even shift to a mantissa in [0.25,1), a 64-entry table (computed at
// elaboration) gives a first estimate and two Newton steps
// y <- y (3 - m y^2) / 2 refine it to about 24 bits; 1/r^2 and 1/r^3 follow
// by multiplication, so the pipeline has no divider.
//
// Number formats (this design's choice): positions, box, force Q16.16
// signed; cutoff squared Q16.16; sigma^2 Q8.24; eps/sigma^2 Q8.24 signed; kq
// Q16.16 signed. Pairs closer than 0.125 (r^2 < 2^-6) are treated as invalid
// and give zero. Accurate while sigma/r <= 8. box = 0 turns off the periodic
// minimum-image fold. Timing: in_valid in cycle t gives out_valid in cycle
// t+9, fully pipelined, no back-pressure.
module rl_pipeline (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  logic signed [31:0] pi [3],
  input  logic signed [31:0] pj [3],
  input  logic        [31:0] box,
  input  logic        [31:0] rc2,
  input  logic        [31:0] sig2,
  input  logic signed [31:0] eps_s2,
  input  logic signed [31:0] kq,
  output logic               out_valid,
  output logic               out_within,
  output logic signed [31:0] force_o [3]
);
  // ---------------------------------------------------------------- table
  function automatic logic [63:0] isqrt64(input logic [63:0] v);
    logic [63:0] lo, hi, mid;
    lo = 0;
    hi = 64'hFFFF_FFFF;
    for (int it = 0; it < 34; it++) begin
      mid = (lo + hi + 1) >> 1;
      if (mid * mid <= v) lo = mid;
      else hi = mid - 1;
    end
    return lo;
  endfunction

  // entry i: 1/sqrt(m) at m = (2i+1)/128, Q2.30; used for i >= 16
  function automatic logic [64*32-1:0] init_lut();
    logic [64*32-1:0] t;
    t = '0;
    for (int e = 16; e < 64; e++)
      t[e*32 +: 32] = 32'(isqrt64(64'h8000_0000_0000_0000 / 64'(2 * e + 1)) << 2);
    return t;
  endfunction
  localparam logic [64*32-1:0] LUT = init_lut();

  // ---------------------------------------------------------------- stages
  typedef struct packed {
    logic               v;
    logic               inr;
    logic signed [31:0] dx, dy, dz;
    logic        [31:0] sig2;
    logic signed [31:0] eps_s2;
    logic signed [31:0] kq;
  } ctx_t;

  ctx_t s1, s2, s3, s4, s5, s6, s7, s8;

  // stage 1: displacement with minimum image
  function automatic logic signed [31:0] fold(input logic signed [31:0] a,
                                              input logic signed [31:0] b,
                                              input logic [31:0] l);
    logic signed [32:0] d, half;
    d    = 33'(a) - 33'(b);
    half = 33'(l >> 1);
    if (l != 0) begin
      if (d > half)       d = d - 33'(l);
      else if (d < -half) d = d + 33'(l);
    end
    return d[31:0];
  endfunction

  logic [31:0] rc2_1;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1 <= '0;
      rc2_1 <= '0;
    end else begin
      s1.v      <= in_valid;
      s1.inr <= 1'b1;
      s1.dx     <= fold(pi[0], pj[0], box);
      s1.dy     <= fold(pi[1], pj[1], box);
      s1.dz     <= fold(pi[2], pj[2], box);
      s1.sig2   <= sig2;
      s1.eps_s2 <= eps_s2;
      s1.kq     <= kq;
      rc2_1     <= rc2;
    end
  end

  // stage 2: r^2 (Q32.32) and cutoff; keep r^2 as Q8.24
  logic [65:0] r2_full;
  always_comb begin
    r2_full = 66'(s1.dx * s1.dx) + 66'(s1.dy * s1.dy) + 66'(s1.dz * s1.dz);
  end
  logic [31:0] r2q;   // Q8.24
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s2 <= '0;
      r2q <= '0;
    end else begin
      s2 <= s1;
      s2.inr <= (r2_full <= {18'b0, rc2_1, 16'b0}) && (r2_full >= 66'(1) << 26);
      r2q <= r2_full[39:8];
    end
  end

  // stage 3: normalise, table estimate
  logic [3:0]  k3_c;
  logic [31:0] m3_c;
  always_comb begin
    k3_c = 4'd15;
    for (int k = 15; k >= 0; k--)
      if ((r2q << (2 * k)) >= 32'h4000_0000 && ((64'(r2q) << (2 * k)) < 64'h1_0000_0000)) k3_c = 4'(k);
    m3_c = r2q << (2 * k3_c);
  end
  logic [3:0]  k3, k4, k5;
  logic [31:0] m3, m4, y3, y4, y5;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s3 <= '0; k3 <= '0; m3 <= '0; y3 <= '0;
    end else begin
      s3 <= s2;
      k3 <= k3_c;
      m3 <= m3_c;
      y3 <= LUT[m3_c[31:26]*32 +: 32];
    end
  end

  // stages 4, 5: Newton steps for 1/sqrt(m), y Q2.30, m Q0.32
  function automatic logic [31:0] newton(input logic [31:0] y, input logic [31:0] m);
    logic [63:0]  y2;
    logic [95:0]  my2;
    logic [33:0]  t;
    logic [65:0]  yn;
    y2  = 64'(y) * 64'(y);               // Q4.60
    my2 = 96'(m) * 96'(y2 >> 30);        // Q4.62
    t   = 34'(64'h3 << 30) - 34'(my2 >> 32);  // Q.30
    yn  = 66'(y) * 66'(t);               // Q.60
    return 32'(yn >> 31);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s4 <= '0; k4 <= '0; m4 <= '0; y4 <= '0;
      s5 <= '0; k5 <= '0; y5 <= '0;
    end else begin
      s4 <= s3; k4 <= k3; m4 <= m3; y4 <= newton(y3, m3);
      s5 <= s4; k5 <= k4;           y5 <= newton(y4, m4);
    end
  end

  // stage 6: 1/r (Q4.28), 1/r^2, 1/r^3, p = sigma^2/r^2 (all Q.28)
  logic [63:0] rinv6_c, rinv2_6_c;
  always_comb begin
    rinv6_c   = (k5 <= 6) ? 64'(y5 >> (6 - k5)) : 64'(y5) << (k5 - 6);
    rinv2_6_c = 64'((128'(rinv6_c) * 128'(rinv6_c)) >> 28);
  end
  logic [63:0] rinv3_6, p6;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s6 <= '0; rinv3_6 <= '0; p6 <= '0;
    end else begin
      s6      <= s5;
      rinv3_6 <= 64'((128'(rinv2_6_c) * 128'(rinv6_c)) >> 28);
      p6      <= 64'((128'(s5.sig2) * 128'(rinv2_6_c)) >> 24);
    end
  end

  // stage 7: powers of p, Coulomb scalar
  logic [63:0] p2_7c, p4_7c;
  always_comb begin
    p2_7c = 64'((128'(p6) * 128'(p6)) >> 28);
    p4_7c = 64'((128'(p2_7c) * 128'(p2_7c)) >> 28);
  end
  logic [63:0]        p4_7, p7_7;
  logic signed [63:0] c7;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s7 <= '0; p4_7 <= '0; p7_7 <= '0; c7 <= '0;
    end else begin
      s7   <= s6;
      p4_7 <= p4_7c;
      p7_7 <= 64'((128'(64'((128'(p4_7c) * 128'(p2_7c)) >> 28)) * 128'(p6)) >> 28);
      c7   <= 64'((96'(s6.kq) * 96'($signed(rinv3_6))) >>> 16);
    end
  end

  // stage 8: total scalar S (Q.28)
  logic signed [63:0] s_8;
  logic signed [95:0] lj_8c;
  always_comb begin
    lj_8c = (96'(s7.eps_s2) * 96'($signed(48 * p7_7 - 24 * p4_7))) >>> 24;
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s8 <= '0; s_8 <= '0;
    end else begin
      s8  <= s7;
      s_8 <= s7.inr ? (lj_8c[63:0] + c7) : 64'sd0;
    end
  end

  // stage 9: force vector, saturated to Q16.16
  function automatic logic signed [31:0] fmul(input logic signed [63:0] s,
                                              input logic signed [31:0] d);
    logic signed [95:0] f;
    f = (96'(s) * 96'(d)) >>> 28;
    if (f > 96'sh7FFF_FFFF)       return 32'sh7FFF_FFFF;
    else if (f < -96'sh8000_0000) return 32'sh8000_0000;
    else                          return f[31:0];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid  <= 1'b0;
      out_within <= 1'b0;
      force_o[0] <= '0;
      force_o[1] <= '0;
      force_o[2] <= '0;
    end else begin
      out_valid  <= s8.v;
      out_within <= s8.inr;
      force_o[0] <= fmul(s_8, s8.dx);
      force_o[1] <= fmul(s_8, s8.dy);
      force_o[2] <= fmul(s_8, s8.dz);
    end
  end

endmodule
