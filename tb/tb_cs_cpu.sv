// tb_cs_cpu: CPU cross station. Random ring traffic (with and without I-Tag,
// for this and other stations), random CPU injections and eject-queue pops,
// against a reference model of the station's rules: eject when addressed to
// this station or already I-tagged (if the queue has room); otherwise pass on
// with the I-Tag set; inject the inject-queue head, I-Tag cleared, only into a
// free slot. Checks ring_out, both queues, and the event pulses; also checks
// the two-cycle latency from an injected task to the next station's input.
module tb_cs_cpu;
  import md_pkg::*;
  localparam int ID = 9, EJD = 4, INJD = 4;
  logic clk = 0, rst_n = 0;
  flit_t ring_in, ring_out, inj_task, ej_task;
  logic inj_push, inj_full, ej_pop, ej_valid, injected, inj_stalled, bounced;
  logic [$clog2(EJD+1)-1:0] ej_count;
  int checks = 0, failures = 0, n_bounce = 0, n_stall = 0, n_inj = 0;
  flit_t ejq [$], injq [$];
  flit_t exp_out;

  cs_cpu #(.STATION_ID(ID), .EJ_DEPTH(EJD), .INJ_DEPTH(INJD)) dut (.*);

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
    ring_in = '0; inj_push = 0; inj_task = '0; ej_pop = 0; exp_out = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // latency: an injected task on an idle ring is on ring_out one cycle after
    // the push is taken, i.e. at the next station's input two cycles after.
    @(negedge clk);
    inj_push = 1; inj_task = '0; inj_task.dst = 7'd3; inj_task.body = 32'hCAFE;
    inj_task.itag = 1;
    @(posedge clk); #1 inj_push = 0;
    @(posedge clk); #1;
    check(ring_out.valid && ring_out.body == 32'hCAFE && !ring_out.itag, "latency: in slot 2 edges after push");
    @(posedge clk); #1;
    check(!ring_out.valid, "slot empties after one cycle");

    for (int cyc = 0; cyc < 4000; cyc++) begin
      @(negedge clk);
      check(ring_out == exp_out, "ring_out");
      check(ej_valid == (ejq.size() > 0), "ej_valid");
      check(ej_count == ejq.size(), "ej_count");
      check(inj_full == (injq.size() == INJD), "inj_full");
      if (ejq.size() > 0) check(ej_task == ejq[0], "ej_task");
      ring_in = '0;
      if ($urandom % 8 < (((cyc / 400) % 2) ? 7 : 3)) begin
        ring_in.valid = 1'b1;
        ring_in.dst   = ($urandom % 4 == 0) ? EU_ID_W'(ID) : EU_ID_W'($urandom % 8);
        ring_in.itag  = ($urandom % 3 == 0);
        ring_in.workload = WL_W'($urandom);
        ring_in.body  = $urandom;
      end
      inj_push = $urandom % 2;
      inj_task = flit_t'({$urandom, $urandom});
      ej_pop   = ((cyc / 700) % 2) ? ($urandom % 2) : ($urandom % 8 == 0);
      #1;
      begin
        bit want, take, freeslot, doinj, inj_room;
        inj_room = injq.size() < INJD;
        want = ring_in.valid && (ring_in.dst == EU_ID_W'(ID) || ring_in.itag);
        take = want && ejq.size() < EJD;
        freeslot = !ring_in.valid || take;
        doinj = freeslot && injq.size() > 0;
        check(bounced == (take && ring_in.itag && ring_in.dst != EU_ID_W'(ID)), "bounced pulse");
        check(injected == doinj, "injected pulse");
        check(inj_stalled == (injq.size() > 0 && !freeslot), "stall pulse");
        if (bounced) n_bounce++;
        if (inj_stalled) n_stall++;
        if (doinj) n_inj++;
        @(posedge clk);
        if (doinj) begin
          exp_out = injq.pop_front();
          exp_out.valid = 1'b1;
          exp_out.itag = 1'b0;
        end else if (freeslot) exp_out = '0;
        else begin
          exp_out = ring_in;
          exp_out.itag = 1'b1;
        end
        if (ej_pop && ejq.size() > 0) void'(ejq.pop_front());
        if (take) ejq.push_back(ring_in);
        if (inj_push && inj_room) injq.push_back(inj_task);
      end
    end
    check(n_bounce > 0 && n_stall > 0 && n_inj > 0, "bounce, stall and inject exercised");
    $display("bounced=%0d stalled=%0d injected=%0d", n_bounce, n_stall, n_inj);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
