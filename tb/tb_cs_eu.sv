// tb_cs_eu: EU cross station. Random flits for this and other stations arrive
// on ring_in; the EU pops at random. Reference model: a flit for this station
// is ejected when the queue (modelled) has room, else it must reappear on
// ring_out one cycle later (deflection), as must every flit for other
// stations. Checks ring_out, eject order, eu_valid, ej_count and the pulses.
module tb_cs_eu;
  import md_pkg::*;
  localparam int ID = 5, DEPTH = 4;
  logic clk = 0, rst_n = 0;
  flit_t ring_in, ring_out, eu_task;
  logic eu_pop, eu_valid, ejected, deflected;
  logic [$clog2(DEPTH+1)-1:0] ej_count;
  int checks = 0, failures = 0, n_defl = 0, n_ej = 0;
  flit_t q [$];
  flit_t exp_out;

  cs_eu #(.STATION_ID(ID), .EJ_DEPTH(DEPTH)) dut (.*);

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

  initial begin
    ring_in = '0; eu_pop = 0; exp_out = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      check(ring_out == exp_out, "ring_out");
      check(eu_valid == (q.size() > 0), "eu_valid");
      check(ej_count == q.size(), "ej_count");
      if (q.size() > 0) check(eu_task == q[0], "eu_task");
      ring_in = '0;
      if ($urandom % 4 != 0) begin
        ring_in.valid    = 1'b1;
        ring_in.dst      = ($urandom % 2) ? EU_ID_W'(ID) : EU_ID_W'($urandom % 8);
        ring_in.workload = WL_W'($urandom);
        ring_in.itag     = $urandom % 2;
        ring_in.body     = $urandom;
      end
      eu_pop = ((cyc / 300) % 2 == 0) ? ($urandom % 8 == 0) : ($urandom % 2 == 0);
      #1;
      begin
        bit mine, room;
        mine = ring_in.valid && ring_in.dst == EU_ID_W'(ID);
        room = q.size() < DEPTH;
        check(ejected == (mine && room), "ejected pulse");
        check(deflected == (mine && !room), "deflected pulse");
        if (mine && !room) n_defl++;
        if (mine && room) n_ej++;
        @(posedge clk);
        if (eu_pop && q.size() > 0) void'(q.pop_front());
        if (mine && room) begin q.push_back(ring_in); exp_out = '0; end
        else exp_out = ring_in;
      end
    end
    check(n_defl > 0 && n_ej > 0, "deflection and ejection both exercised");
    $display("ejected=%0d deflected=%0d", n_ej, n_defl);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
