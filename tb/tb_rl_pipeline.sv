// tb_rl_pipeline: range-limited pair-force pipeline against a floating-point
// reference. Random pairs in a 40 A periodic box, separations 1.8..12 A
// (some beyond the 9 A cutoff, some across the box edge so the minimum image
// matters), sigma 2.5..3.8 A, epsilon 0.01..0.3, charges -1..1 (kq = 332
// q_i q_j). The reference uses the same quantised inputs in real arithmetic;
// a force component passes within 1e-4 relative plus 2^-13 absolute. Pairs
// stream with random gaps; each result must appear exactly 9 cycles after its
// pair went in, and beyond-cutoff pairs must give zero.
module tb_rl_pipeline;
  logic clk = 0, rst_n = 0;
  logic in_valid, out_valid, out_within;
  logic signed [31:0] pi [3], pj [3], force_o [3];
  logic [31:0] box, rc2, sig2;
  logic signed [31:0] eps_s2, kq;
  int checks = 0, failures = 0, n_cut = 0, n_in = 0, n_wrap = 0;
  int cyc = 0;

  typedef struct { int t; bit inr; real f [3]; } exp_t;
  exp_t q [$];

  rl_pipeline dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic real urand(input real lo, input real hi);
    return lo + (hi - lo) * ($urandom % 1000000) / 1000000.0;
  endfunction
  function automatic int q16(input real v); return int'($rtoi(v * 65536.0 + (v >= 0 ? 0.5 : -0.5))); endfunction
  function automatic int q24(input real v); return int'($rtoi(v * 16777216.0 + (v >= 0 ? 0.5 : -0.5))); endfunction

  // checker
  always @(negedge clk) if (rst_n) begin
    if (q.size() > 0 && q[0].t == cyc) begin
      exp_t e;
      e = q.pop_front();
      check(out_valid, "result after exactly 9 cycles");
      check(out_within == e.inr, "cutoff flag");
      for (int k = 0; k < 3; k++) begin
        real got, err;
        got = real'(force_o[k]) / 65536.0;
        err = (got > e.f[k]) ? got - e.f[k] : e.f[k] - got;
        if (!(err <= 1e-4 * ((e.f[k] > 0) ? e.f[k] : -e.f[k]) + 1.0 / 8192)) begin
          if (failures < 10) $display("force %0d got %f expected %f", k, got, e.f[k]);
          check(0, "force value");
        end else check(1, "force value");
      end
    end else check(!out_valid, "no spurious result");
  end

  initial begin
    real L, rc;
    in_valid = 0;
    for (int k = 0; k < 3; k++) begin pi[k] = 0; pj[k] = 0; end
    L = 40.0; rc = 9.0;
    box = 32'(q16(L)); rc2 = 32'(q16(rc * rc));
    sig2 = 0; eps_s2 = 0; kq = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      in_valid = ($urandom % 4 != 0);
      if (in_valid) begin
        real a [3], b [3], dir [3], len, r, s, eps, qi, qj, d [3], r2, p, sc, sig2r, epsr, kqr, Lq;
        exp_t e;
        r = urand(1.8, 12.0);
        len = 0;
        for (int k = 0; k < 3; k++) begin dir[k] = urand(-1, 1); len += dir[k] * dir[k]; end
        len = $sqrt(len);
        if (len < 0.05) begin dir[0] = 1; dir[1] = 0; dir[2] = 0; len = 1; end
        for (int k = 0; k < 3; k++) begin
          a[k] = urand(0, L);
          b[k] = a[k] - r * dir[k] / len;
          if (b[k] < 0) begin b[k] += L; n_wrap++; end
          if (b[k] >= L) begin b[k] -= L; n_wrap++; end
          pi[k] = q16(a[k]); pj[k] = q16(b[k]);
        end
        s = urand(2.5, 3.8); eps = urand(0.01, 0.3); qi = urand(-1, 1); qj = urand(-1, 1);
        sig2 = 32'(q24(s * s)); eps_s2 = q24(eps / (s * s)); kq = q16(332.0 * qi * qj);
        // reference from the quantised inputs
        sig2r = real'(sig2) / 16777216.0; epsr = real'(eps_s2) / 16777216.0; kqr = real'(kq) / 65536.0;
        Lq = real'(box) / 65536.0;
        r2 = 0;
        for (int k = 0; k < 3; k++) begin
          d[k] = real'(pi[k] - pj[k]) / 65536.0;
          if (d[k] > Lq / 2) d[k] -= Lq;
          else if (d[k] < -Lq / 2) d[k] += Lq;
          r2 += d[k] * d[k];
        end
        e.t = cyc + 9;
        e.inr = (r2 <= real'(rc2) / 65536.0);
        p = sig2r / r2;
        sc = epsr * (48 * p ** 7 - 24 * p ** 4) + kqr / (r2 * $sqrt(r2));
        for (int k = 0; k < 3; k++) e.f[k] = e.inr ? sc * d[k] : 0.0;
        if (e.inr) n_in++; else n_cut++;
        q.push_back(e);
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (12) @(negedge clk);
    check(q.size() == 0, "all results seen");
    check(n_cut > 0 && n_in > 0 && n_wrap > 0, "cutoff, in-range and periodic wrap exercised");
    $display("in range %0d, cut off %0d, wrapped coordinates %0d", n_in, n_cut, n_wrap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
