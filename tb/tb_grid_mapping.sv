// tb_grid_mapping: self-checking test of the charge-spreading unit.
// Random particles (position, charge, grid spacing) are fed with random gaps
// and random back-pressure on the output. For every particle the bench
// rebuilds the 27 expected grid points and B-spline weights in real
// arithmetic and checks each emitted index and value (tolerance 2^-12 of
// |Q| plus 2^-15), the emission order, that the 27 values sum to Q, and that
// an unstalled stream sustains 27 cycles per particle.
module tb_grid_mapping;
  localparam int GB = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  logic signed [31:0] pos [3];
  logic signed [31:0] charge;
  logic [31:0] inv_h;
  logic [GB-1:0] out_idx [3];
  logic signed [31:0] out_val;
  int checks = 0, failures = 0;

  grid_mapping #(.GRID_BITS(GB)) dut (.*);

  initial begin #5ms; $display("WATCHDOG"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures+1); $finish; end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", msg); end
  endtask

  // expected contributions queue
  typedef struct { int ix, iy, iz; real v; real q; int k; } exp_t;
  exp_t expq [$];

  function automatic real spl(real t, int k);
    if (k == 0) return (1.0 - t) * (1.0 - t) / 2.0;
    if (k == 2) return t * t / 2.0;
    return 0.75 - (t - 0.5) * (t - 0.5);
  endfunction

  task automatic add_expect(input logic signed [31:0] p[3], input logic signed [31:0] qq, input logic [31:0] ih);
    int b [3]; real t [3];
    for (int d = 0; d < 3; d++) begin
      real u, v;
      u = (real'(p[d]) / 65536.0) * (real'(ih) / 65536.0);
      v = u - 0.5;
      b[d] = $rtoi($floor(v));
      t[d] = v - $floor(v);
    end
    for (int a0 = 0; a0 < 3; a0++) for (int a1 = 0; a1 < 3; a1++) for (int a2 = 0; a2 < 3; a2++) begin
      exp_t e;
      e.ix = (b[0] + a0) & ((1 << GB) - 1);
      e.iy = (b[1] + a1) & ((1 << GB) - 1);
      e.iz = (b[2] + a2) & ((1 << GB) - 1);
      e.q = real'(qq) / 65536.0;
      e.v = e.q * spl(t[0], a0) * spl(t[1], a1) * spl(t[2], a2);
      e.k = a0 * 9 + a1 * 3 + a2;
      expq.push_back(e);
    end
  endtask

  int npart = 400;
  bit stall_phase = 1;
  real sumv = 0;
  int got = 0;

  // output monitor
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    exp_t e;
    if (expq.size() == 0) check(0, "unexpected output");
    else begin
      real gv, tol;
      e = expq.pop_front();
      gv = real'(out_val) / 65536.0;
      tol = (e.q < 0 ? -e.q : e.q) / 4096.0 + 1.0 / 32768.0;
      check(out_idx[0] == GB'(e.ix) && out_idx[1] == GB'(e.iy) && out_idx[2] == GB'(e.iz),
            $sformatf("idx k=%0d got %0d,%0d,%0d exp %0d,%0d,%0d", e.k, out_idx[0], out_idx[1], out_idx[2], e.ix, e.iy, e.iz));
      check((gv - e.v) < tol && (e.v - gv) < tol, $sformatf("val k=%0d got %f exp %f", e.k, gv, e.v));
      sumv += gv;
      if (e.k == 26) begin
        check((sumv - e.q) < 27.0 / 32768.0 && (e.q - sumv) < 27.0 / 32768.0,
              $sformatf("charge sum %f vs %f", sumv, e.q));
        sumv = 0;
      end
      got++;
    end
  end

  always @(negedge clk) out_ready <= stall_phase ? ($urandom_range(0, 3) != 0) : 1'b1;

  initial begin
    int t0, t1;
    pos[0] = 0; pos[1] = 0; pos[2] = 0; charge = 0; inv_h = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int phase = 0; phase < 2; phase++) begin
      stall_phase = (phase == 0);
      for (int n = 0; n < npart; n++) begin
        logic signed [31:0] p[3]; logic signed [31:0] qq; logic [31:0] ih;
        for (int d = 0; d < 3; d++) p[d] = $signed(32'($urandom_range(0, 32'h7F_FFFF))) - 32'sh40_0000; // +-64 A
        qq = $signed(32'($urandom_range(0, 32'h3_FFFF))) - 32'sh2_0000;                          // +-2 e
        ih = 32'($urandom_range(32'h4000, 32'h2_0000));                                           // h = 0.5..4 A
        if (n % 50 == 0) begin p[0] = 0; p[1] = 32'sh8000; p[2] = -32'sh8000; end                 // exact node/midpoint
        @(negedge clk);
        if (phase == 0) while ($urandom_range(0, 2) == 0) @(negedge clk);
        pos = p; charge = qq; inv_h = ih; in_valid = 1;
        @(posedge clk);
        while (!in_ready) @(posedge clk);
        if (phase == 1 && n == 1) t0 = $time;
        add_expect(p, qq, ih);
        #1 in_valid = 0;
      end
      if (phase == 1) begin
        t1 = $time - 1;
        // in phase 1 consecutive accepts must be exactly 27 cycles apart
        check((t1 - t0) == (npart - 2) * 27 * 10, $sformatf("throughput %0d cycles over %0d intervals", (t1 - t0) / 10, npart - 2));
      end
      while (expq.size() != 0) @(posedge clk);
    end
    repeat (5) @(posedge clk);
    check(got == 2 * npart * 27, $sformatf("got %0d contributions", got));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
