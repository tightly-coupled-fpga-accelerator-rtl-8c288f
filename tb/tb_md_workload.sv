// tb_md_workload: one on-chip tile of a production-size force step, run on
// the full-size design (default parameters).
//
// A solvated protein has about 0.1 atoms per cubic angstrom, so with a 9 A
// cutoff each particle has about 305 neighbours. The bench builds 17 such
// particles (the most whose input records, 9 + 6 x 305 words each, fit below
// the charge grid), with neighbours spread uniformly over the 2.8..9 A shell
// and random Lennard-Jones and charge parameters of biomolecular magnitude.
// CPU 0 writes the records, then injects the 17 independent force tasks,
// spread over the range-limited units, and waits until all report done.
// Checks: every force sum against a real-arithmetic reference, each task run
// exactly once on its destination unit, and the total number of cycles from
// the first injection to the last completion, which the shared memory bus
// bounds from below (one word per cycle, 6 words per pair); the measured
// pairs per cycle are printed.
module tb_md_workload;
  import md_pkg::*;
  localparam int NE = 73, NRL = 68, NX = NE - NRL - 1, NC = 2, CW = 4;
  localparam int NP = 17, NB = 305;
  logic clk = 0, rst_n = 0;
  logic     cpu_inj_push [NC]; flit_t cpu_inj_task [NC]; logic cpu_inj_full [NC];
  logic     cpu_ej_pop [NC];   flit_t cpu_ej_task [NC];  logic cpu_ej_valid [NC];
  mem_req_t cpu_mem_req [NC];  logic cpu_mem_gnt [NC];   mem_rsp_t cpu_mem_rsp [NC];
  logic [CW-1:0] sample_thresh;
  logic [NE-1:0] eu_below;
  logic sample_tick;
  logic kern_start [NX]; logic [BODY_W-1:0] kern_task [NX]; logic [MEM_DW-1:0] kern_arg [NX];
  logic kern_done [NX];
  logic eu_task_done [NE], eu_task_ready [NE];
  logic ev_injected [NC], ev_inj_stall [NC], ev_bounced [NC], ev_ejected [NE], ev_deflected [NE];

  md_accel_top dut (.*);

  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic bus(input int c, input mem_op_e op, input int a, input int d, output int r);
    @(negedge clk);
    cpu_mem_req[c] = '{valid: 1'b1, op: op, addr: 32'(a), wdata: 32'(d)};
    #1;
    while (!cpu_mem_gnt[c]) begin @(negedge clk); #1; end
    @(negedge clk);
    r = int'(cpu_mem_rsp[c].rdata);
    cpu_mem_req[c] = '0;
  endtask

  function automatic real urand(input real lo, input real hi);
    return lo + (hi - lo) * ($urandom % 1000000) / 1000000.0;
  endfunction
  function automatic int q16(input real v); return int'($rtoi(v * 65536.0 + (v >= 0 ? 0.5 : -0.5))); endfunction
  function automatic int q24(input real v); return int'($rtoi(v * 16777216.0 + (v >= 0 ? 0.5 : -0.5))); endfunction

  int  tptr [NP], argp [NP], dest [NP], done_on [NP];
  real fexp [NP][3], ftol [NP];
  int  n_done = 0, t_last = 0;

  always @(negedge clk) if (rst_n)
    for (int e = 0; e < NE; e++) if (eu_task_done[e]) begin
      n_done++;
      t_last = $time;
      for (int p = 0; p < NP; p++) if (dest[p] == e) done_on[p]++;
    end

  task automatic write_particle(input int i);
    int A, r, xi [3];
    real L;
    A = argp[i];
    L = 40.0;
    bus(0, MEM_WRITE, A + 0, NB, r);
    bus(0, MEM_WRITE, A + 1, q16(L), r);
    bus(0, MEM_WRITE, A + 2, q16(81.0), r);
    for (int k = 0; k < 3; k++) begin
      xi[k] = q16(urand(0, L));
      bus(0, MEM_WRITE, A + 3 + k, xi[k], r);
      fexp[i][k] = 0;
    end
    ftol[i] = 0;
    for (int j = 0; j < NB; j++) begin
      int xj [3], s2, es, kq;
      real d [3], r2, p, sc, sg, u [3], ul, rr;
      ul = 0;
      for (int k = 0; k < 3; k++) begin u[k] = urand(-1, 1); ul += u[k] * u[k]; end
      ul = $sqrt(ul);
      if (ul < 0.1) begin u[0] = 1; u[1] = 0; u[2] = 0; ul = 1; end
      // radius uniform in volume over the 2.8..9 A shell
      rr = (2.8 ** 3 + (9.0 ** 3 - 2.8 ** 3) * urand(0, 1)) ** (1.0 / 3.0);
      r2 = 0;
      for (int k = 0; k < 3; k++) begin
        real v;
        v = real'(xi[k]) / 65536.0 - rr * u[k] / ul;
        if (v < 0) v += L;
        if (v >= L) v -= L;
        xj[k] = q16(v);
        d[k] = real'(xi[k] - xj[k]) / 65536.0;
        if (d[k] > L / 2) d[k] -= L;
        else if (d[k] < -L / 2) d[k] += L;
        r2 += d[k] * d[k];
      end
      sg = urand(2.5, 3.2);
      s2 = q24(sg * sg); es = q24(urand(0.01, 0.2) / (sg * sg)); kq = q16(332.0 * urand(-0.8, 0.8) * urand(-0.8, 0.8));
      for (int k = 0; k < 3; k++) bus(0, MEM_WRITE, A + 6 + 6 * j + k, xj[k], r);
      bus(0, MEM_WRITE, A + 9 + 6 * j, s2, r);
      bus(0, MEM_WRITE, A + 10 + 6 * j, es, r);
      bus(0, MEM_WRITE, A + 11 + 6 * j, kq, r);
      if (r2 <= 81.0) begin
        p = (real'(s2) / 16777216.0) / r2;
        sc = (real'(es) / 16777216.0) * (48 * p ** 7 - 24 * p ** 4) + (real'(kq) / 65536.0) / (r2 * $sqrt(r2));
        for (int k = 0; k < 3; k++) fexp[i][k] += sc * d[k];
        ftol[i] += 1e-4 * ((sc > 0) ? sc : -sc) * 12 + 1.0 / 8192;
      end else ftol[i] += 1.0 / 8192;   // pair on the cutoff edge after rounding
    end
  endtask

  initial begin
    int a, r, t_first;
    real pairs_per_cycle;
    for (int c = 0; c < NC; c++) begin
      cpu_inj_push[c] = 0; cpu_inj_task[c] = '0; cpu_ej_pop[c] = 0; cpu_mem_req[c] = '0;
    end
    sample_thresh = CW'(2);
    for (int x = 0; x < NX; x++) kern_done[x] = 0;
    a = 0;
    for (int i = 0; i < NP; i++) begin
      tptr[i] = a; a += TR_LIST;
      done_on[i] = 0;
      dest[i] = (i * 4) % NRL;
    end
    for (int i = 0; i < NP; i++) begin argp[i] = a; a += 9 + 6 * NB; end
    check(a <= 32768, "tile fits below the charge grid");
    $display("tile: %0d particles x %0d neighbours, %0d words", NP, NB, a);
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < NP; i++) begin
      bus(0, MEM_WRITE, tptr[i] + TR_DEPCNT, 0, r);
      bus(0, MEM_WRITE, tptr[i] + TR_ARG, argp[i], r);
      bus(0, MEM_WRITE, tptr[i] + TR_NIN, 0, r);
      bus(0, MEM_WRITE, tptr[i] + TR_NOUT, 0, r);
      write_particle(i);
    end
    $display("tile written at %0t", $time);
    t_first = -1;
    for (int i = 0; i < NP; i++) begin
      while (cpu_inj_full[0]) @(negedge clk);
      @(negedge clk);
      cpu_inj_task[0] = '0;
      cpu_inj_task[0].valid = 1'b1;
      cpu_inj_task[0].dst = EU_ID_W'(dest[i]);
      cpu_inj_task[0].workload = WL_W'(3);
      cpu_inj_task[0].body = 32'(tptr[i]);
      cpu_inj_push[0] = 1;
      if (t_first < 0) t_first = $time;
      @(negedge clk);
      cpu_inj_push[0] = 0;
    end
    while (n_done < NP) @(negedge clk);
    repeat (20) @(negedge clk);
    check(n_done == NP, "every task completed once");
    for (int i = 0; i < NP; i++) check(done_on[i] == 1, $sformatf("task %0d done on its unit", i));
    for (int i = 0; i < NP; i++)
      for (int k = 0; k < 3; k++) begin
        real got;
        bus(0, MEM_READ, argp[i] + 6 + 6 * NB + k, 0, r);
        got = real'(r) / 65536.0;
        check((got - fexp[i][k]) <= ftol[i] && (fexp[i][k] - got) <= ftol[i],
              $sformatf("force %0d.%0d got %f exp %f", i, k, got, fexp[i][k]));
      end
    // the bus moves one word per cycle and each pair needs 6 words
    check((t_last - t_first) / 10 >= NP * NB * 6, "run no shorter than the bus bound");
    check((t_last - t_first) / 10 <= NP * NB * 6 * 2, "run within twice the bus bound");
    pairs_per_cycle = real'(NP * NB) / (real'(t_last - t_first) / 10.0);
    $display("%0d pairs in %0d cycles: %f pairs per cycle", NP * NB, (t_last - t_first) / 10, pairs_per_cycle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
