// tb_rl_kernel: RL kernel with the task-graph memory. For 20 particles with
// 0..8 random neighbours each (40 A periodic box, 9 A cutoff, some
// neighbours beyond it), the bench writes the input record, starts the
// kernel, waits for done, and reads back the three force sums. The expected
// sums are computed in real arithmetic from the same quantised inputs; each
// pair may differ by 1e-4 relative plus 2^-13 absolute. The words around
// the record must be left untouched.
module tb_rl_kernel;
  import md_pkg::*;
  logic clk = 0, rst_n = 0;
  logic start, done;
  logic [MEM_DW-1:0] arg;
  mem_req_t req [2];
  logic     gnt [2];
  mem_rsp_t rsp [2];
  int checks = 0, failures = 0, n_cut = 0;

  rl_kernel dut (.clk, .rst_n, .start, .arg, .done, .mem_req(req[0]), .mem_gnt(gnt[0]), .mem_rsp(rsp[0]));
  atomic_mem #(.NREQ(2), .DEPTH(1024)) u_mem (.clk, .rst_n, .req, .gnt, .rsp);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
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

  task automatic bus(input mem_op_e op, input int a, input int d, output int r);
    @(negedge clk);
    req[1] = '{valid: 1'b1, op: op, addr: 32'(a), wdata: 32'(d)};
    #1;
    while (!gnt[1]) begin @(negedge clk); #1; end
    @(negedge clk);
    r = int'(rsp[1].rdata);
    req[1] = '0;
  endtask

  function automatic real urand(input real lo, input real hi);
    return lo + (hi - lo) * ($urandom % 1000000) / 1000000.0;
  endfunction
  function automatic int q16(input real v); return int'($rtoi(v * 65536.0 + (v >= 0 ? 0.5 : -0.5))); endfunction
  function automatic int q24(input real v); return int'($rtoi(v * 16777216.0 + (v >= 0 ? 0.5 : -0.5))); endfunction

  initial begin
    int r;
    start = 0; arg = 0; req[1] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int t = 0; t < 20; t++) begin
      int A, n, xi [3];
      real L, fsum [3], tol;
      A = 100 + 13 * t;
      n = t % 9;
      L = 40.0;
      bus(MEM_WRITE, A - 1, 32'h5A5A, r);
      bus(MEM_WRITE, A + 0, n, r);
      bus(MEM_WRITE, A + 1, q16(L), r);
      bus(MEM_WRITE, A + 2, q16(81.0), r);
      for (int k = 0; k < 3; k++) begin
        xi[k] = q16(urand(0, L));
        bus(MEM_WRITE, A + 3 + k, xi[k], r);
        fsum[k] = 0;
      end
      bus(MEM_WRITE, A + 9 + 6 * n, 32'h1234, r);
      tol = 0;
      for (int j = 0; j < n; j++) begin
        int xj [3], s2, es, kq;
        real d [3], r2, p, sc, s;
        r2 = 0;
        for (int k = 0; k < 3; k++) begin
          real v;
          v = real'(xi[k]) / 65536.0 + urand(-6.5, 6.5);
          if (v < 0) v += L;
          if (v >= L) v -= L;
          xj[k] = q16(v);
          d[k] = real'(xi[k] - xj[k]) / 65536.0;
          if (d[k] > L / 2) d[k] -= L;
          else if (d[k] < -L / 2) d[k] += L;
          r2 += d[k] * d[k];
        end
        if (r2 < 4.0) begin   // keep pairs physical: push to 2 A
          for (int k = 0; k < 3; k++) begin
            xj[k] = xi[k] - q16(2.0 * d[k] / $sqrt(r2 + 1e-9) + (k == 0 ? 2.0 : 0.0));
          end
          r2 = 0;
          for (int k = 0; k < 3; k++) begin d[k] = real'(xi[k] - xj[k]) / 65536.0; r2 += d[k] * d[k]; end
        end
        s = urand(2.5, 3.8);
        s2 = q24(s * s); es = q24(urand(0.01, 0.3) / (s * s)); kq = q16(332.0 * urand(-1, 1) * urand(-1, 1));
        for (int k = 0; k < 3; k++) bus(MEM_WRITE, A + 6 + 6 * j + k, xj[k], r);
        bus(MEM_WRITE, A + 9 + 6 * j, s2, r);
        bus(MEM_WRITE, A + 10 + 6 * j, es, r);
        bus(MEM_WRITE, A + 11 + 6 * j, kq, r);
        if (r2 <= 81.0) begin
          p = (real'(s2) / 16777216.0) / r2;
          sc = (real'(es) / 16777216.0) * (48 * p ** 7 - 24 * p ** 4) + (real'(kq) / 65536.0) / (r2 * $sqrt(r2));
          for (int k = 0; k < 3; k++) fsum[k] += sc * d[k];
          tol += 1e-4 * ((sc > 0) ? sc : -sc) * 12 + 1.0 / 8192;
        end else n_cut++;
      end
      // run
      @(negedge clk);
      start = 1; arg = 32'(A);
      @(negedge clk);
      start = 0;
      begin
        int w;
        w = 0;
        while (!done && w < 5000) begin @(negedge clk); w++; end
        check(done, "kernel finished");
      end
      for (int k = 0; k < 3; k++) begin
        real got;
        bus(MEM_READ, A + 6 + 6 * n + k, 0, r);
        got = real'(r) / 65536.0;
        if (!((got - fsum[k]) <= tol && (fsum[k] - got) <= tol)) $display("t%0d k%0d got %f exp %f", t, k, got, fsum[k]);
        check((got - fsum[k]) <= tol && (fsum[k] - got) <= tol, "force sum");
      end
      bus(MEM_READ, A - 1, 0, r); check(r == 32'h5A5A, "word before record untouched");
      bus(MEM_READ, A + 9 + 6 * n, 0, r); check(r == 32'h1234, "word after result untouched");
    end
    check(n_cut > 0, "cutoff exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
