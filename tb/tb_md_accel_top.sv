// tb_md_accel_top: end-to-end run of the whole fabric at its default size
// (73 EUs of which 68 range-limited force units, 2 CPU stations, 1000-cycle
// sampling, 64 Ki-word task-graph memory, 32-cubed charge grid).
//
// Two CPU models play the software dependency manager. CPU 0 first writes,
// over its bus port, a three-layer task graph shaped like one MD step plus
// the input data of its force tasks: 146 range-limited force tasks (each the
// force on one particle from 1..4 neighbours, run by the real RL units) that
// write one DataCtx each; 73 second-layer tasks, each reading two of those:
// the first 8 are grid-mapping tasks run by the real grid-mapping unit (each
// spreading 1..3 charges onto the grid in memory), the other 65 reduction
// tasks run by the four remaining EUs, whose kernels are modelled here; and a final
// task reading all 73 reduction results, which the CPU owning it runs itself.
// Each CPU owns half the tasks, polls their dependency counters and injects
// the ready ones, choosing destinations round robin among the EUs of the
// right kind that the load sampler reports as lightly loaded. The first 24
// force tasks of CPU 0 all go to EU 0, so its eject queue overflows: tasks
// are deflected, come back to a CPU with the I-Tag set and are retargeted.
// Checks: every force result and every touched grid point matches a
// real-arithmetic reference; every
// modelled kernel start carries the right task and argument and runs on the
// EU the task was sent to; all 219 EU tasks retire exactly once (counted, and
// every dependency counter and pending-reader count ends at exactly zero);
// the final task runs last; and each mechanism (ejection, deflection, I-Tag
// bounce, inject stall, sampling tick, ready notice, bus contention, grid
// deposit, CPU-executed task) happened at least once.
module tb_md_accel_top;
  import md_pkg::*;
  localparam int NE = 73, NRL = 68, NX = NE - NRL - 1, NC = 2, CW = 4;
  localparam int NG = 8, GB = 5, GBASE = 32768;
  localparam int N0 = 2 * NE, N1 = NE, NT = N0 + N1 + 1;
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
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- task graph (built by the bench)
  int tptr [NT], dcptr [NT], dep0 [NT];
  int tin [NT][$];
  int cons [NT][$];   // consumers of the DataCtx written by task i
  int ptr2idx [int];
  int runs [NT], sent_to [NT], run_on [NT];
  int last_other = 0;

  // ---------------- event counters
  int n_ej = 0, n_defl = 0, n_bounce = 0, n_stall = 0, n_tick = 0, n_ready = 0, n_cont = 0, n_cpu = 0;
  always @(negedge clk) if (rst_n) begin
    for (int c = 0; c < NC; c++) begin
      if (ev_bounced[c]) n_bounce++;
      if (ev_inj_stall[c]) n_stall++;
      if (cpu_mem_req[c].valid && !cpu_mem_gnt[c]) n_cont++;
    end
    for (int e = 0; e < NE; e++) begin
      if (ev_ejected[e]) n_ej++;
      if (ev_deflected[e]) n_defl++;
      if (eu_task_ready[e]) n_ready++;
    end
    if (sample_tick) n_tick++;
  end

  // ---------------- kernel models of the non-RL EUs, retire counting
  int kcnt [NX];
  int n_gm_done = 0, n_grid = 0;
  always @(negedge clk) if (rst_n && eu_task_done[NRL]) n_gm_done++;
  int n_retired = 0;
  always @(negedge clk) begin
    if (rst_n) for (int e = 0; e < NE; e++) if (eu_task_done[e]) begin n_retired++; last_other = n_retired; end
    for (int x = 0; x < NX; x++) begin
      kern_done[x] = 0;
      if (!rst_n) kcnt[x] = 0;
      else begin
        if (kcnt[x] > 0) begin
          kcnt[x]--;
          if (kcnt[x] == 0) kern_done[x] = 1;
        end
        if (kern_start[x]) begin
          int i;
          check(kcnt[x] == 0, "kernel started while busy");
          check(ptr2idx.exists(int'(kern_task[x])), "kernel task pointer known");
          i = ptr2idx.exists(int'(kern_task[x])) ? ptr2idx[int'(kern_task[x])] : 0;
          check(i >= N0 + NG && i < N0 + N1, "only reduction tasks on the other EUs");
          check(kern_arg[x] == 32'(tptr[i] * 3 + 5), "kernel argument");
          check(sent_to[i] == NRL + 1 + x, "task runs on its destination EU");
          runs[i]++;
          kcnt[x] = 5 + $urandom % 36;
        end
      end
    end
  end

  // ---------------- CPU bus helper (request held until granted)
  task automatic bus(input int c, input mem_op_e op, input int a, input int d, output int r);
    @(negedge clk);
    cpu_mem_req[c] = '{valid: 1'b1, op: op, addr: 32'(a), wdata: 32'(d)};
    #1;
    while (!cpu_mem_gnt[c]) begin @(negedge clk); #1; end
    @(negedge clk);
    check(cpu_mem_rsp[c].valid, "CPU bus response");
    r = int'(cpu_mem_rsp[c].rdata);
    cpu_mem_req[c] = '0;
  endtask

  int rr [NC];
  function automatic int pick_eu(input int c, input int lo, input int hi, input int avoid);
    int n;
    n = hi - lo + 1;
    for (int k = 0; k < n; k++) begin
      int e;
      e = lo + (rr[c] + k) % n;
      if (eu_below[e] && e != avoid) begin
        rr[c] = (e - lo + 1) % n;
        return e;
      end
    end
    rr[c] = (rr[c] + 1) % n;
    return (lo + rr[c] == avoid) ? lo + (rr[c] + 1) % n : lo + rr[c];
  endfunction

  bit final_seen = 0;

  // ---------------- force-task input data and reference results
  int argp [N0], nnb [N0];
  real fexp [N0][3], ftol [N0];
  function automatic real urand(input real lo, input real hi);
    return lo + (hi - lo) * ($urandom % 1000000) / 1000000.0;
  endfunction
  function automatic int q16(input real v); return int'($rtoi(v * 65536.0 + (v >= 0 ? 0.5 : -0.5))); endfunction
  function automatic int q24(input real v); return int'($rtoi(v * 16777216.0 + (v >= 0 ? 0.5 : -0.5))); endfunction

  task automatic write_rl(input int i);
    int A, r, xi [3];
    real L;
    A = argp[i];
    L = 40.0;
    bus(0, MEM_WRITE, A + 0, nnb[i], r);
    bus(0, MEM_WRITE, A + 1, q16(L), r);
    bus(0, MEM_WRITE, A + 2, q16(81.0), r);
    for (int k = 0; k < 3; k++) begin
      xi[k] = q16(urand(0, L));
      bus(0, MEM_WRITE, A + 3 + k, xi[k], r);
      fexp[i][k] = 0;
    end
    ftol[i] = 0;
    for (int j = 0; j < nnb[i]; j++) begin
      int xj [3], s2, es, kq;
      real d [3], r2, p, sc, sg, u [3], ul;
      // neighbour at 2.5..8.5 A in a random direction, wrapped into the box
      ul = 0;
      for (int k = 0; k < 3; k++) begin u[k] = urand(-1, 1); ul += u[k] * u[k]; end
      ul = $sqrt(ul);
      if (ul < 0.1) begin u[0] = 1; u[1] = 0; u[2] = 0; ul = 1; end
      sg = urand(2.5, 8.5);
      r2 = 0;
      for (int k = 0; k < 3; k++) begin
        real v;
        v = real'(xi[k]) / 65536.0 - sg * u[k] / ul;
        if (v < 0) v += L;
        if (v >= L) v -= L;
        xj[k] = q16(v);
        d[k] = real'(xi[k] - xj[k]) / 65536.0;
        if (d[k] > L / 2) d[k] -= L;
        else if (d[k] < -L / 2) d[k] += L;
        r2 += d[k] * d[k];
      end
      sg = urand(2.5, 3.8);
      s2 = q24(sg * sg); es = q24(urand(0.01, 0.3) / (sg * sg)); kq = q16(332.0 * urand(-1, 1) * urand(-1, 1));
      for (int k = 0; k < 3; k++) bus(0, MEM_WRITE, A + 6 + 6 * j + k, xj[k], r);
      bus(0, MEM_WRITE, A + 9 + 6 * j, s2, r);
      bus(0, MEM_WRITE, A + 10 + 6 * j, es, r);
      bus(0, MEM_WRITE, A + 11 + 6 * j, kq, r);
      p = (real'(s2) / 16777216.0) / r2;
      sc = (real'(es) / 16777216.0) * (48 * p ** 7 - 24 * p ** 4) + (real'(kq) / 65536.0) / (r2 * $sqrt(r2));
      for (int k = 0; k < 3; k++) fexp[i][k] += sc * d[k];
      ftol[i] += 1e-4 * ((sc > 0) ? sc : -sc) * 12 + 1.0 / 8192;
    end
  endtask
  int to_eu0 = 0;

  // ---------------- grid-mapping task records and reference grid
  int gmarg [NG], gmnp [NG];
  real gexp [int], gtol [int];
  function automatic real spl(real t, int k);
    if (k == 0) return (1.0 - t) * (1.0 - t) / 2.0;
    if (k == 2) return t * t / 2.0;
    return 0.75 - (t - 0.5) * (t - 0.5);
  endfunction
  task automatic write_gm(input int j);
    int A, r;
    A = gmarg[j];
    bus(0, MEM_WRITE, A + 0, gmnp[j], r);
    bus(0, MEM_WRITE, A + 1, q16(0.8), r);          // 1.25 A spacing, 40 A box
    bus(0, MEM_WRITE, A + 2, GBASE, r);
    for (int k = 0; k < gmnp[j]; k++) begin
      int p [3], q, b [3];
      real tt [3], qq;
      for (int d = 0; d < 3; d++) begin
        real v;
        p[d] = q16(urand(0, 40.0));
        bus(0, MEM_WRITE, A + 3 + 4 * k + d, p[d], r);
        v = (real'(p[d]) / 65536.0) * (real'(q16(0.8)) / 65536.0) - 0.5;
        b[d] = $rtoi($floor(v));
        tt[d] = v - $floor(v);
      end
      q = q16(urand(-1.0, 1.0));
      qq = real'(q) / 65536.0;
      bus(0, MEM_WRITE, A + 6 + 4 * k, q, r);
      for (int a0 = 0; a0 < 3; a0++) for (int a1 = 0; a1 < 3; a1++) for (int a2 = 0; a2 < 3; a2++) begin
        int g;
        g = (((b[0] + a0) & 31) << 10) | (((b[1] + a1) & 31) << 5) | ((b[2] + a2) & 31);
        if (!gexp.exists(g)) begin gexp[g] = 0; gtol[g] = 0; bus(0, MEM_WRITE, GBASE + g, 0, r); end
        gexp[g] += qq * spl(tt[0], a0) * spl(tt[1], a1) * spl(tt[2], a2);
        gtol[g] += (qq < 0 ? -qq : qq) / 4096.0 + 1.0 / 32768.0;
      end
    end
  endtask

  // ---------------- dependency manager of CPU c
  task automatic cpu(input int c);
    int pending [$], ready [$];
    int r;
    for (int i = 0; i < NT; i++) if (i % NC == c) pending.push_back(i);
    while (pending.size() > 0 || ready.size() > 0 || n_retired + n_cpu < NT) begin
      if (cpu_ej_valid[c]) begin
        flit_t f;
        int i;
        @(negedge clk);
        f = cpu_ej_task[c];
        cpu_ej_pop[c] = 1;
        @(negedge clk);
        cpu_ej_pop[c] = 0;
        i = ptr2idx[int'(f.body)];
        if (f.dst == EU_ID_W'(NE + c)) begin
          // task addressed to this CPU: run it in software
          check(i == NT - 1, "only the final task runs on a CPU");
          check(last_other == NT - 1, "final task runs after all others");
          final_seen = 1;
          runs[i]++; n_cpu++;
          repeat (20) @(negedge clk);
          foreach (tin[i][k]) bus(c, MEM_DEC, dcptr[tin[i][k]] + DC_READERS, 0, r);
        end else begin
          check(f.itag, "bounced task carries the I-Tag");
          ready.push_front(i);
        end
      end else if (ready.size() > 0 && !cpu_inj_full[c]) begin
        int i, d;
        i = ready.pop_front();
        if (i == NT - 1) d = NE + c;
        else if (i < N0 && c == 0 && to_eu0 < 24) begin d = 0; to_eu0++; end
        else if (i < N0) d = pick_eu(c, 0, NRL - 1, sent_to[i]);
        else if (i < N0 + NG) d = NRL;
        else d = pick_eu(c, NRL + 1, NE - 1, sent_to[i]);
        sent_to[i] = d;
        @(negedge clk);
        cpu_inj_task[c] = '0;
        cpu_inj_task[c].valid = 1'b1;
        cpu_inj_task[c].dst = EU_ID_W'(d);
        cpu_inj_task[c].workload = WL_W'(i % 4);
        cpu_inj_task[c].body = 32'(tptr[i]);
        cpu_inj_push[c] = 1;
        @(negedge clk);
        cpu_inj_push[c] = 0;
      end else if (pending.size() > 0) begin
        int i;
        i = pending.pop_front();
        bus(c, MEM_READ, tptr[i] + TR_DEPCNT, 0, r);
        if (r == 0) ready.push_back(i);
        else pending.push_back(i);
      end else @(negedge clk);
    end
  endtask

  initial begin
    int a, r;
    for (int c = 0; c < NC; c++) begin
      cpu_inj_push[c] = 0; cpu_inj_task[c] = '0; cpu_ej_pop[c] = 0; cpu_mem_req[c] = '0; rr[c] = c * 37;
    end
    sample_thresh = CW'(2);
    for (int x = 0; x < NX; x++) kern_done[x] = 0;
    // layout
    a = 0;
    for (int i = 0; i < NT; i++) begin
      runs[i] = 0; sent_to[i] = -1; run_on[i] = -1;
      tin[i].delete(); cons[i].delete();
    end
    for (int j = 0; j < N1; j++) begin
      tin[N0 + j].push_back(2 * j); tin[N0 + j].push_back(2 * j + 1);
      cons[2 * j].push_back(N0 + j); cons[2 * j + 1].push_back(N0 + j);
      tin[NT - 1].push_back(N0 + j); cons[N0 + j].push_back(NT - 1);
    end
    for (int i = 0; i < NT; i++) begin
      tptr[i] = a; ptr2idx[a] = i; dep0[i] = tin[i].size();
      a += TR_LIST + tin[i].size() + ((i == NT - 1) ? 0 : 1);
      if (i != NT - 1) begin dcptr[i] = a; a += DC_LIST + cons[i].size(); end
    end
    // input records of the force tasks
    for (int i = 0; i < N0; i++) begin
      argp[i] = a;
      nnb[i] = 1 + i % 4;
      a += 9 + 6 * nnb[i];
    end
    for (int j = 0; j < NG; j++) begin
      gmarg[j] = a;
      gmnp[j] = 1 + j % 3;
      a += 3 + 4 * gmnp[j];
    end
    check(a <= GBASE, "graph and data fit below the charge grid");
    $display("task graph: %0d tasks, %0d words", NT, a);
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // CPU 0 writes the graph
    for (int i = 0; i < NT; i++) begin
      bus(0, MEM_WRITE, tptr[i] + TR_DEPCNT, dep0[i], r);
      bus(0, MEM_WRITE, tptr[i] + TR_ARG, (i < N0) ? argp[i] : (i < N0 + NG) ? gmarg[i - N0] : tptr[i] * 3 + 5, r);
      bus(0, MEM_WRITE, tptr[i] + TR_NIN, tin[i].size(), r);
      bus(0, MEM_WRITE, tptr[i] + TR_NOUT, (i == NT - 1) ? 0 : 1, r);
      foreach (tin[i][k]) bus(0, MEM_WRITE, tptr[i] + TR_LIST + k, dcptr[tin[i][k]], r);
      if (i != NT - 1) begin
        bus(0, MEM_WRITE, tptr[i] + TR_LIST + tin[i].size(), dcptr[i], r);
        bus(0, MEM_WRITE, dcptr[i] + DC_PROD, tptr[i], r);
        bus(0, MEM_WRITE, dcptr[i] + DC_ADDR, 32'h10000 + i * 64, r);
        bus(0, MEM_WRITE, dcptr[i] + DC_READERS, cons[i].size(), r);
        bus(0, MEM_WRITE, dcptr[i] + DC_NCONS, cons[i].size(), r);
        foreach (cons[i][k]) bus(0, MEM_WRITE, dcptr[i] + DC_LIST + k, tptr[cons[i][k]], r);
      end
    end
    for (int i = 0; i < N0; i++) write_rl(i);
    for (int j = 0; j < NG; j++) write_gm(j);
    $display("graph written at %0t", $time);
    fork
      cpu(0);
      cpu(1);
    join
    repeat (50) @(negedge clk);
    // final state
    check(n_gm_done == NG, $sformatf("grid-mapping EU retired %0d tasks", n_gm_done));
    foreach (gexp[g]) begin
      real got;
      bus(0, MEM_READ, GBASE + g, 0, r);
      got = real'(r) / 65536.0;
      check((got - gexp[g]) <= gtol[g] && (gexp[g] - got) <= gtol[g], $sformatf("grid point %0d got %f exp %f", g, got, gexp[g]));
      if (r != 0) n_grid++;
    end
    for (int i = N0 + NG; i < NT; i++) check(runs[i] == 1, $sformatf("task %0d ran %0d times", i, runs[i]));
    check(n_retired == N0 + N1, "every EU task retired once");
    check(final_seen, "final task ran");
    for (int i = 0; i < N0; i++)
      for (int k = 0; k < 3; k++) begin
        real got;
        bus(0, MEM_READ, argp[i] + 6 + 6 * nnb[i] + k, 0, r);
        got = real'(r) / 65536.0;
        check((got - fexp[i][k]) <= ftol[i] && (fexp[i][k] - got) <= ftol[i], "force result");
      end
    for (int i = 0; i < NT; i++) begin
      bus(0, MEM_READ, tptr[i] + TR_DEPCNT, 0, r);
      check(r == 0, "dependency counter zero");
      if (i != NT - 1) begin
        bus(1, MEM_READ, dcptr[i] + DC_READERS, 0, r);
        check(r == 0, "DataCtx released");
      end
    end
    check(n_ej > 0, "ejection");
    check(n_defl > 0, "deflection at a full eject queue");
    check(n_bounce > 0, "I-Tag bounce to a CPU");
    check(n_stall > 0, "inject stall on a busy slot");
    check(n_tick > 0, "load-sampling tick");
    check(n_ready > 0, "ready notice from an EU");
    check(n_cont > 0, "memory-bus contention");
    check(n_cpu == 1, "task executed on the CPU");
    check(n_grid > 0, "charge deposited on the grid");
    $display("ejected=%0d deflected=%0d bounced=%0d inj_stalls=%0d ticks=%0d readies=%0d bus_waits=%0d cpu_tasks=%0d grid_points=%0d",
             n_ej, n_defl, n_bounce, n_stall, n_tick, n_ready, n_cont, n_cpu, n_grid);
    $display("done at %0t", $time);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
