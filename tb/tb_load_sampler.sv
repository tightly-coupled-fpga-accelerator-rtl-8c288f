// tb_load_sampler: drives random eject-queue occupancies that change every
// cycle and a threshold, and checks that the bitmap changes only on the
// sample tick, exactly every PERIOD cycles, and then holds, for each EU,
// whether its occupancy in that cycle was below the threshold. Runs at the
// design's 1000-cycle period.
module tb_load_sampler;
  localparam int NE = 12, CW = 4, PERIOD = 1000;
  logic clk = 0, rst_n = 0;
  logic [CW-1:0] ej_count [NE];
  logic [CW-1:0] thresh;
  logic [NE-1:0] below;
  logic sample_tick;
  int checks = 0, failures = 0;

  load_sampler #(.NUM_EU(NE), .CW(CW), .PERIOD(PERIOD)) dut (.*);

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
    logic [NE-1:0] expb;
    int since, ticks;
    for (int i = 0; i < NE; i++) ej_count[i] = 0;
    thresh = 3;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    #1;
    check(below == '1, "reset value");
    expb = '1; since = 0; ticks = 0;
    for (int cyc = 0; cyc < 5500; cyc++) begin
      @(negedge clk);
      for (int i = 0; i < NE; i++) ej_count[i] = CW'($urandom % 9);
      if (cyc == 2500) thresh = 6;
      #1;
      since++;
      check(sample_tick == (since == PERIOD - 1), "tick period");
      if (sample_tick) begin
        for (int i = 0; i < NE; i++) expb[i] = ej_count[i] < thresh;
        since = -1;
        ticks++;
      end
      @(posedge clk); #1;
      check(below == expb, "bitmap");
    end
    check(ticks == 5, "five samples in 5500 cycles");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
