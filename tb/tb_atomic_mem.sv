// tb_atomic_mem: four requesters issue random reads, writes and
// fetch-and-decrements and fetch-and-adds, each holding its request until granted. The bench
// checks that at most one request is granted per cycle and that it is the
// first requester after the previous winner (round robin), keeps a reference
// copy of the memory updated in grant order, and checks each response (one
// cycle after the grant, only to the granted requester, old value). A second
// phase lets all four decrement the same counter 200 times each; the final
// value must be exact (atomicity).
module tb_atomic_mem;
  import md_pkg::*;
  localparam int NR = 4, DEPTH = 64;
  logic clk = 0, rst_n = 0;
  mem_req_t req [NR];
  logic     gnt [NR];
  mem_rsp_t rsp [NR];
  int checks = 0, failures = 0;
  logic [31:0] model [DEPTH];
  int last_win = NR - 1, prev_gnt = -1;
  logic [31:0] exp_d;

  atomic_mem #(.NREQ(NR), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
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

  function automatic mem_req_t rnd_req(input bit dec_only);
    mem_req_t r;
    r.valid = 1'b1;
    r.addr  = dec_only ? 32'd7 : 32'($urandom % DEPTH);
    r.wdata = $urandom;
    r.op    = dec_only ? MEM_DEC : mem_op_e'($urandom % 4);
    return r;
  endfunction

  // one cycle of bus activity; returns nothing, updates model
  int pend_drop = -1;
  task automatic cycle(input bit dec_only, input int rate, inout int left [NR]);
    int win, ng;
    @(negedge clk);
    for (int i = 0; i < NR; i++) begin
      check(rsp[i].valid == (i == prev_gnt), "response routing");
      if (i == prev_gnt) check(rsp[i].rdata == exp_d, "response data");
    end
    if (pend_drop >= 0) req[pend_drop].valid = 1'b0;
    for (int i = 0; i < NR; i++)
      if (!req[i].valid && left[i] > 0 && $urandom % 100 < rate) begin
        req[i] = rnd_req(dec_only);
        left[i]--;
      end
    #1;
    win = -1; ng = 0;
    for (int k = 1; k <= NR; k++) begin
      int idx;
      idx = (last_win + k) % NR;
      if (win < 0 && req[idx].valid) win = idx;
    end
    for (int i = 0; i < NR; i++) if (gnt[i]) ng++;
    check(ng == (win >= 0 ? 1 : 0), "one grant");
    if (win >= 0) check(gnt[win], "round-robin winner");
    prev_gnt = win;
    pend_drop = win;
    if (win >= 0) begin
      int a;
      a = req[win].addr % DEPTH;
      exp_d = model[a];
      if (req[win].op == MEM_WRITE) model[a] = req[win].wdata;
      if (req[win].op == MEM_DEC) model[a] = model[a] - 1;
      if (req[win].op == MEM_ADD) model[a] = model[a] + req[win].wdata;
      last_win = win;
    end
  endtask

  initial begin
    int left [NR];
    logic [31:0] start7;
    for (int i = 0; i < NR; i++) req[i] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // initialise memory through the bus, requester 0
    for (int a = 0; a < DEPTH; a++) begin
      req[0] = '{valid: 1'b1, op: MEM_WRITE, addr: 32'(a), wdata: 32'(a * 3 + 1000)};
      @(posedge clk); #1;
      check(gnt[0], "init write granted");
      model[a] = 32'(a * 3 + 1000);
      @(negedge clk);
      req[0] = '0;
    end
    last_win = 0; prev_gnt = -1;
    @(negedge clk);
    for (int i = 0; i < NR; i++) left[i] = 1000000;
    for (int c = 0; c < 4000; c++) cycle(0, (c / 1000) % 2 ? 100 : 40, left);
    // atomicity phase
    start7 = model[7];
    for (int i = 0; i < NR; i++) left[i] = 200;
    for (int c = 0; c < 1000; c++) cycle(1, 100, left);
    for (int c = 0; c < 4; c++) cycle(1, 0, left);
    check(model[7] == start7 - 800, "model counter");
    // read counter back
    @(negedge clk);
    for (int i = 0; i < NR; i++) req[i] = '0;
    req[0] = '{valid: 1'b1, op: MEM_READ, addr: 32'd7, wdata: 32'd0};
    @(posedge clk); @(negedge clk);
    req[0] = '0;
    check(rsp[0].valid && rsp[0].rdata == model[7], "counter value after concurrent decrements");
    $display("counter model=%0d dut=%0d", model[7], rsp[0].rdata);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
