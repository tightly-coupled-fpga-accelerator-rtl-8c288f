// tb_bufferless_ring: ring of 2 CPU and 6 EU stations.
// 1. Latency: a task injected by CPU station 1 into an idle ring must be in
//    the eject queue of EU e exactly e+2 clock edges after the push edge
//    (one edge into the slot, one per hop).
// 2. Traffic: both CPUs inject 600 tasks with unique bodies and random
//    destinations; EU 0 drains slowly so its queue overflows and tasks are
//    deflected and bounced back to the CPUs, which retarget them to a random
//    EU and inject them again (the CPU software's role). Every task must be
//    taken off exactly once at the station it is addressed to (or at a CPU
//    with its I-Tag set), and none may be lost.
module tb_bufferless_ring;
  import md_pkg::*;
  localparam int NE = 6, NC = 2, EJD = 4, INJD = 4, NT = 600;
  logic clk = 0, rst_n = 0;
  logic  cpu_inj_push [NC]; flit_t cpu_inj_task [NC]; logic cpu_inj_full [NC];
  logic  cpu_ej_pop [NC];   flit_t cpu_ej_task [NC];  logic cpu_ej_valid [NC];
  logic  eu_pop [NE]; flit_t eu_task [NE]; logic eu_valid [NE];
  logic [$clog2(EJD+1)-1:0] eu_ej_count [NE];
  logic ev_injected [NC], ev_inj_stall [NC], ev_bounced [NC], ev_ejected [NE], ev_deflected [NE];
  int checks = 0, failures = 0;
  int delivered [int];
  int n_bounce = 0, n_defl = 0, n_stall = 0, n_done = 0, sent = 0;
  flit_t retry [NC][$];

  bufferless_ring #(.NUM_EU(NE), .NUM_CPU(NC), .EJ_DEPTH(EJD), .INJ_DEPTH(INJD)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired, delivered %0d", n_done);
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

  // event counters
  always @(posedge clk) if (rst_n) begin
    for (int c = 0; c < NC; c++) begin
      if (ev_bounced[c]) n_bounce++;
      if (ev_inj_stall[c]) n_stall++;
    end
    for (int e = 0; e < NE; e++) if (ev_deflected[e]) n_defl++;
  end

  bit traffic = 0;

  // EU consumers: check destination, record delivery
  always @(negedge clk) if (traffic) begin
    for (int e = 0; e < NE; e++) begin
      eu_pop[e] = eu_valid[e] && ((e == 0) ? ($urandom % 16 == 0) : ($urandom % 2 == 0));
      if (eu_pop[e]) begin
        check(eu_task[e].dst == EU_ID_W'(e), "EU got a task for another station");
        delivered[eu_task[e].body]++;
        n_done++;
      end
    end
    for (int c = 0; c < NC; c++) begin
      cpu_ej_pop[c] = cpu_ej_valid[c];
      if (cpu_ej_pop[c]) begin
        flit_t f;
        f = cpu_ej_task[c];
        if (f.dst == EU_ID_W'(NE + c)) begin
          delivered[f.body]++;
          n_done++;
        end else begin
          check(f.itag, "CPU ejected a foreign task without I-Tag");
          f.dst = EU_ID_W'(1 + $urandom % (NE - 1));   // retarget
          retry[c].push_back(f);
        end
      end
    end
  end

  initial begin
    for (int c = 0; c < NC; c++) begin cpu_inj_push[c] = 0; cpu_inj_task[c] = '0; cpu_ej_pop[c] = 0; end
    for (int e = 0; e < NE; e++) eu_pop[e] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // --- latency test
    for (int e = 0; e < NE; e++) begin
      int lat;
      @(negedge clk);
      cpu_inj_push[1] = 1;
      cpu_inj_task[1] = '0;
      cpu_inj_task[1].dst = EU_ID_W'(e);
      cpu_inj_task[1].body = 32'h100 + e;
      @(posedge clk);
      lat = 0;
      #1 cpu_inj_push[1] = 0;
      while (!eu_valid[e] && lat < 50) begin @(posedge clk); #1; lat++; end
      check(lat == e + 2, $sformatf("latency to EU %0d is %0d", e, lat));
      check(eu_task[e].body == 32'h100 + e && !eu_task[e].itag, "latency task content");
      @(negedge clk); eu_pop[e] = 1; @(negedge clk); eu_pop[e] = 0;
    end
    // --- traffic test
    traffic = 1;
    while (sent < NT || n_done < NT) begin
      @(negedge clk);
      #2;
      for (int c = 0; c < NC; c++) begin
        cpu_inj_push[c] = 0;
        if (!cpu_inj_full[c]) begin
          if (retry[c].size() > 0) begin
            cpu_inj_task[c] = retry[c].pop_front();
            cpu_inj_push[c] = 1;
          end else if (sent < NT && $urandom % 2 == 0) begin
            cpu_inj_task[c] = '0;
            cpu_inj_task[c].dst = ($urandom % 10 == 0) ? EU_ID_W'(NE + ($urandom % NC)) :
                                  ($urandom % 3 == 0) ? EU_ID_W'(0) : EU_ID_W'($urandom % NE);
            cpu_inj_task[c].workload = WL_W'($urandom);
            cpu_inj_task[c].body = sent;
            cpu_inj_push[c] = 1;
            sent++;
          end
        end
      end
    end
    traffic = 0;
    for (int t = 0; t < NT; t++) check(delivered.exists(t) && delivered[t] == 1, $sformatf("task %0d delivered once", t));
    check(n_bounce > 0, "bounce exercised");
    check(n_defl > 0, "deflection exercised");
    check(n_stall > 0, "inject stall exercised");
    $display("delivered=%0d bounced=%0d deflected=%0d stalls=%0d", n_done, n_bounce, n_defl, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
