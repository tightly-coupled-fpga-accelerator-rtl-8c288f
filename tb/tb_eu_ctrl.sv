// tb_eu_ctrl: one execution-unit controller with the task-graph memory.
// Ten tasks form a chain (task i writes a DataCtx read by task i+1); all ten
// are queued at once. A kernel model checks that each start carries the task
// pointer and the argument word stored in that task's record, in queue order,
// never while a kernel is running, and answers after a random 1..20 cycles.
// After the run every consumer counter must have dropped by one, task_ready
// must have named tasks 1..10 in order, and task_done must have pulsed ten
// times. Kernel latency and one dequeue per retired task are checked too.
module tb_eu_ctrl;
  import md_pkg::*;
  localparam int N = 10;
  logic clk = 0, rst_n = 0;
  logic task_valid, task_pop, kern_start, kern_done, busy, task_done, task_ready;
  flit_t task_in;
  logic [BODY_W-1:0] kern_task;
  logic [MEM_DW-1:0] kern_arg;
  logic [MEM_AW-1:0] ready_ptr;
  mem_req_t req [2];
  logic     gnt [2];
  mem_rsp_t rsp [2];
  int checks = 0, failures = 0;
  flit_t q [$];
  int starts = 0, dones = 0, pops = 0;
  int readies [$];
  bit running = 0;

  eu_ctrl dut (.clk, .rst_n, .task_valid, .task_in, .task_pop, .kern_start, .kern_task,
               .kern_arg, .kern_done, .busy, .task_done, .task_ready, .ready_ptr,
               .mem_req(req[0]), .mem_gnt(gnt[0]), .mem_rsp(rsp[0]));
  atomic_mem #(.NREQ(2), .DEPTH(1024)) u_mem (.clk, .rst_n, .req, .gnt, .rsp);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
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

  function automatic int tptr(input int i); return 100 + 16 * i; endfunction
  function automatic int dptr(input int i); return 400 + 8 * i; endfunction

  // eject-queue model
  assign task_valid = q.size() > 0;
  assign task_in    = (q.size() > 0) ? q[0] : '0;
  always @(negedge clk) if (rst_n) begin
    bit popping;
    popping = task_pop;
    if (task_done) dones++;
    if (task_ready) readies.push_back(int'(ready_ptr));
    if (popping) begin
      check(q.size() > 0, "pop from empty queue");
      @(posedge clk);
      #1 void'(q.pop_front());
      pops++;
    end
  end

  // kernel model
  initial begin
    kern_done = 0;
    forever begin
      @(negedge clk);
      if (rst_n && kern_start) begin
        int lat;
        check(!running, "start while kernel running");
        check(kern_task == 32'(tptr(starts)), "kernel task order");
        check(kern_arg == 32'(tptr(starts) * 2 + 7), "kernel argument from task record");
        starts++;
        running = 1;
        lat = 1 + $urandom % 20;
        repeat (lat) begin @(negedge clk); check(!kern_start, "no restart"); end
        kern_done = 1;
        @(negedge clk) kern_done = 0;
        running = 0;
      end
    end
  end

  task automatic bus(input mem_op_e op, input int a, input int d, output int r);
    @(negedge clk);
    req[1] = '{valid: 1'b1, op: op, addr: 32'(a), wdata: 32'(d)};
    do @(posedge clk); while (!gnt[1]);
    @(negedge clk);
    req[1] = '0;
    r = int'(rsp[1].rdata);
  endtask

  initial begin
    int r;
    req[1] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int i = 0; i <= N; i++) begin
      int t;
      t = tptr(i);
      bus(MEM_WRITE, t + TR_DEPCNT, (i == 0) ? 0 : 1, r);
      bus(MEM_WRITE, t + TR_ARG, t * 2 + 7, r);
      bus(MEM_WRITE, t + TR_NIN, (i == 0) ? 0 : 1, r);
      bus(MEM_WRITE, t + TR_NOUT, 1, r);
      if (i == 0) bus(MEM_WRITE, t + TR_LIST, dptr(i), r);
      else begin
        bus(MEM_WRITE, t + TR_LIST, dptr(i - 1), r);
        bus(MEM_WRITE, t + TR_LIST + 1, dptr(i), r);
      end
      bus(MEM_WRITE, dptr(i) + DC_PROD, t, r);
      bus(MEM_WRITE, dptr(i) + DC_READERS, 1, r);
      bus(MEM_WRITE, dptr(i) + DC_NCONS, 1, r);
      bus(MEM_WRITE, dptr(i) + DC_LIST, tptr(i + 1), r);
    end
    @(posedge clk);
    #1;
    for (int i = 0; i < N; i++) begin
      flit_t f;
      f = '0;
      f.valid = 1; f.dst = 7'd3; f.body = 32'(tptr(i));
      q.push_back(f);
    end
    while (dones < N) @(posedge clk);
    repeat (5) @(posedge clk);
    check(starts == N && pops == N && dones == N, "ten tasks retired");
    check(readies.size() == N, "ten tasks became ready");
    for (int i = 0; i < N && i < readies.size(); i++) check(readies[i] == tptr(i + 1), "ready order");
    for (int i = 1; i <= N; i++) begin
      bus(MEM_READ, tptr(i) + TR_DEPCNT, 0, r);
      check(r == 0, "consumer counter decremented");
    end
    for (int i = 0; i < N - 1; i++) begin
      bus(MEM_READ, dptr(i) + DC_READERS, 0, r);
      check(r == 0, "read DataCtx released");
    end
    check(!busy, "idle at end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
