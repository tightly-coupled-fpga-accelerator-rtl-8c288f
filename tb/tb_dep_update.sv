// tb_dep_update: dependency update engine on the task-graph memory.
// The bench writes a task graph through a second bus port. First the example
// graph of the scheduling scheme: task 0 writes DataCtx 0 and 1; task 1 reads
// DataCtx 0 and writes 2; task 2 reads DataCtx 0 and 1 and writes 3 and 4;
// task 3 reads 2, 3 and 4. Completing tasks 0, 1, 2 in turn must leave the
// dependency counters and pending-reader counts at the values computed here,
// raise task_ready exactly for tasks 1, 2 (after task 0) and 3 (after task 2),
// and take 2 cycles per bus access plus one (uncontended bus). Then random
// graphs: one task with random read and write lists and random consumers.
module tb_dep_update;
  import md_pkg::*;
  logic clk = 0, rst_n = 0;
  logic start, busy, done, task_ready;
  logic [BODY_W-1:0] task_ptr;
  logic [MEM_AW-1:0] ready_ptr;
  mem_req_t req [2];
  logic     gnt [2];
  mem_rsp_t rsp [2];
  int checks = 0, failures = 0;
  int readies [$];

  dep_update dut (.clk, .rst_n, .start, .task_ptr, .busy, .done, .task_ready, .ready_ptr,
                  .mem_req(req[0]), .mem_gnt(gnt[0]), .mem_rsp(rsp[0]));
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

  always @(posedge clk) if (task_ready) readies.push_back(int'(ready_ptr));

  task automatic bus(input mem_op_e op, input int a, input int d, output int q);
    @(negedge clk);
    req[1] = '{valid: 1'b1, op: op, addr: 32'(a), wdata: 32'(d)};
    do @(posedge clk); while (!gnt[1]);
    @(negedge clk);
    req[1] = '0;
    q = int'(rsp[1].rdata);
  endtask
  task automatic wr(input int a, input int d);
    int q;
    bus(MEM_WRITE, a, d, q);
  endtask
  task automatic rd(input int a, output int q);
    bus(MEM_READ, a, 0, q);
  endtask

  // task record at T: depcnt, arg, nin, nout, in..., out...
  task automatic mk_task(input int t, input int dep, input int ins [$], input int outs [$]);
    wr(t + TR_DEPCNT, dep); wr(t + TR_ARG, t * 16); wr(t + TR_NIN, ins.size()); wr(t + TR_NOUT, outs.size());
    foreach (ins[i]) wr(t + TR_LIST + i, ins[i]);
    foreach (outs[i]) wr(t + TR_LIST + ins.size() + i, outs[i]);
  endtask
  task automatic mk_dc(input int d, input int prod, input int cons [$]);
    wr(d + DC_PROD, prod); wr(d + DC_ADDR, 'hF0); wr(d + DC_READERS, cons.size()); wr(d + DC_NCONS, cons.size());
    foreach (cons[i]) wr(d + DC_LIST + i, cons[i]);
  endtask

  task automatic run(input int t, input int accesses);
    int cyc;
    @(negedge clk);
    start = 1; task_ptr = 32'(t);
    @(posedge clk); #1 start = 0;
    cyc = 0;
    while (!done && cyc < 1000) begin @(posedge clk); #1; cyc++; end
    check(cyc == 2 * accesses, $sformatf("task %0d took %0d cycles, expected %0d", t, cyc, 2 * accesses));
    @(posedge clk); #1;
    check(!busy, "idle after done");
  endtask

  localparam int T0 = 100, T1 = 120, T2 = 140, T3 = 160;
  localparam int D0 = 200, D1 = 220, D2 = 240, D3 = 260, D4 = 280;

  initial begin
    int q;
    int none [$];
    start = 0; task_ptr = 0; req[1] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    mk_task(T0, 0, none, {D0, D1});
    mk_task(T1, 1, {D0}, {D2});
    mk_task(T2, 2, {D0, D1}, {D3, D4});
    mk_task(T3, 3, {D2, D3, D4}, none);
    mk_dc(D0, T0, {T1, T2});
    mk_dc(D1, T0, {T2});
    mk_dc(D2, T1, {T3});
    mk_dc(D3, T2, {T3});
    mk_dc(D4, T2, {T3});
    // accesses: 2 + per input 2 + per output (2 + 2 per consumer)
    run(T0, 2 + 0 + (2 + 4) + (2 + 2));
    check(readies.size() == 2 && readies[0] == T1 && readies[1] == T2, "T1 and T2 ready after T0");
    rd(T1, q); check(q == 0, "T1 counter");
    rd(T2, q); check(q == 0, "T2 counter");
    readies.delete();
    run(T1, 2 + 2 + (2 + 2));
    check(readies.size() == 0, "nothing ready after T1");
    rd(T3, q); check(q == 2, "T3 counter after T1");
    rd(D0 + DC_READERS, q); check(q == 1, "D0 readers after T1");
    run(T2, 2 + 4 + (2 + 2) + (2 + 2));
    check(readies.size() == 1 && readies[0] == T3, "T3 ready after T2");
    rd(T3, q); check(q == 0, "T3 counter after T2");
    rd(D0 + DC_READERS, q); check(q == 0, "D0 released");
    rd(D1 + DC_READERS, q); check(q == 0, "D1 released");
    rd(D2 + DC_READERS, q); check(q == 1, "D2 untouched");

    // random single-task graphs
    for (int g = 0; g < 30; g++) begin
      int ins [$], outs [$], exp_cnt [int], acc, tp;
      int nin, nout;
      readies.delete(); ins.delete(); outs.delete(); exp_cnt.delete();
      tp = 300;
      nin = $urandom % 4; nout = 1 + $urandom % 3;
      for (int i = 0; i < nin; i++) ins.push_back(400 + 10 * i);
      for (int o = 0; o < nout; o++) outs.push_back(500 + 20 * o);
      mk_task(tp, 0, ins, outs);
      foreach (ins[i]) mk_dc(ins[i], 0, {tp, 700});
      acc = 2 + 2 * ins.size();
      foreach (outs[o]) begin
        int cs [$];
        int n;
        cs.delete();
        n = $urandom % 4;
        for (int k = 0; k < n; k++) begin
          int c;
          c = 800 + 10 * ($urandom % 5);
          cs.push_back(c);
          if (!exp_cnt.exists(c)) exp_cnt[c] = 0;
          exp_cnt[c]++;
        end
        mk_dc(outs[o], tp, cs);
        acc += 2 + 2 * n;
      end
      foreach (exp_cnt[c]) wr(c, exp_cnt[c] + (g % 2));
      run(tp, acc);
      foreach (exp_cnt[c]) begin
        rd(c, q);
        check(q == (g % 2), "random consumer counter");
      end
      foreach (ins[i]) begin
        rd(ins[i] + DC_READERS, q);
        check(q == 1, "random read release");
      end
      check(readies.size() == ((g % 2) ? 0 : exp_cnt.num()), "random ready count");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
