// tb_gm_kernel: grid-mapping kernel with the task-graph memory. The grid is
// 8 x 8 x 8 words at address 512. For 12 tasks of 0..5 particles each
// (random positions over a 16 A box with 2 A spacing, so particles wrap
// around the grid edges, random charges) the bench writes the input record,
// starts the kernel and waits for done, while it keeps adding +1 to random
// grid words through a second bus port to test that the kernel's adds are
// atomic. After every task the whole grid is read back and compared with a
// real-arithmetic charge-spreading reference (tolerance per point: 2^-12 of
// each |Q| deposited there plus 2^-15 per contribution). The record words
// must be left unchanged, and done must come exactly once per task.
module tb_gm_kernel;
  import md_pkg::*;
  localparam int GB = 3, GN = 1 << (3 * GB), GBASE = 512;
  logic clk = 0, rst_n = 0;
  logic start, done;
  logic [MEM_DW-1:0] arg;
  mem_req_t req [2];
  logic     gnt [2];
  mem_rsp_t rsp [2];
  int checks = 0, failures = 0;

  gm_kernel #(.GRID_BITS(GB)) dut (.clk, .rst_n, .start, .arg, .done, .mem_req(req[0]), .mem_gnt(gnt[0]), .mem_rsp(rsp[0]));
  atomic_mem #(.NREQ(2), .DEPTH(1024)) u_mem (.clk, .rst_n, .req, .gnt, .rsp);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
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
  function automatic real spl(real t, int k);
    if (k == 0) return (1.0 - t) * (1.0 - t) / 2.0;
    if (k == 2) return t * t / 2.0;
    return 0.75 - (t - 0.5) * (t - 0.5);
  endfunction

  real gexp [GN], gtol [GN];
  int  n_done = 0;
  always @(posedge clk) if (rst_n && done) n_done++;

  initial begin
    int r;
    start = 0; arg = 0; req[1] = '0;
    for (int g = 0; g < GN; g++) begin gexp[g] = 0; gtol[g] = 0; end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int g = 0; g < GN; g++) bus(MEM_WRITE, GBASE + g, 0, r);
    for (int t = 0; t < 12; t++) begin
      int A, n, words [$], bumps;
      int ih;
      A = 8 + 23 * (t % 2);
      n = t % 6;
      ih = q16(0.5);
      words.delete();
      words.push_back(n); words.push_back(ih); words.push_back(GBASE);
      for (int k = 0; k < n; k++) begin
        int p [3], q;
        int b [3]; real tt [3];
        for (int d = 0; d < 3; d++) p[d] = q16(urand(-4.0, 20.0));
        q = q16(urand(-1.5, 1.5));
        if (k == 0 && t == 5) begin p[0] = 0; p[1] = q16(1.0); p[2] = q16(15.0); end
        for (int d = 0; d < 3; d++) begin
          real u, v;
          words.push_back(p[d]);
          u = (real'(p[d]) / 65536.0) * 0.5;
          v = u - 0.5;
          b[d] = $rtoi($floor(v));
          tt[d] = v - $floor(v);
        end
        words.push_back(q);
        for (int a0 = 0; a0 < 3; a0++) for (int a1 = 0; a1 < 3; a1++) for (int a2 = 0; a2 < 3; a2++) begin
          int g;
          real qq;
          qq = real'(q) / 65536.0;
          g = (((b[0] + a0) & 7) << 6) | (((b[1] + a1) & 7) << 3) | ((b[2] + a2) & 7);
          gexp[g] += qq * spl(tt[0], a0) * spl(tt[1], a1) * spl(tt[2], a2);
          gtol[g] += (qq < 0 ? -qq : qq) / 4096.0 + 1.0 / 32768.0;
        end
      end
      foreach (words[i]) bus(MEM_WRITE, A + i, words[i], r);
      @(negedge clk);
      arg = 32'(A); start = 1;
      @(negedge clk);
      start = 0;
      // competing atomic adds from the second port while the kernel runs
      bumps = 0;
      while (!done) begin
        int g;
        g = $urandom % GN;
        bus(MEM_ADD, GBASE + g, 65536, r);
        gexp[g] += 1.0;
        bumps++;
        if (bumps > 1000) break;
      end
      repeat (3) @(negedge clk);
      check(n_done == t + 1, $sformatf("done count %0d after task %0d", n_done, t));
      foreach (words[i]) begin
        bus(MEM_READ, A + i, 0, r);
        check(r == words[i], "record unchanged");
      end
      for (int g = 0; g < GN; g++) begin
        real got;
        bus(MEM_READ, GBASE + g, 0, r);
        got = real'(r) / 65536.0;
        check((got - gexp[g]) <= gtol[g] + 1e-9 && (gexp[g] - got) <= gtol[g] + 1e-9,
              $sformatf("task %0d grid %0d got %f exp %f", t, g, got, gexp[g]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
