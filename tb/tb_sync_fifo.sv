// tb_sync_fifo: random push/pop traffic against a queue reference model.
// Checks head data, full, empty and occupancy every cycle, including pushes
// into a full queue and pops from an empty one, which must be ignored.
module tb_sync_fifo;
  localparam int W = 16, DEPTH = 8;
  logic clk = 0, rst_n = 0;
  logic push, pop, full, empty;
  logic [W-1:0] din, dout;
  logic [$clog2(DEPTH+1)-1:0] count;
  int checks = 0, failures = 0;
  logic [W-1:0] model [$];

  sync_fifo #(.W(W), .DEPTH(DEPTH)) dut (.*);

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
    push = 0; pop = 0; din = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      @(negedge clk);
      check(count == model.size(), "count");
      check(empty == (model.size() == 0), "empty");
      check(full == (model.size() == DEPTH), "full");
      if (model.size() > 0) check(dout == model[0], "dout");
      // phases: mostly filling, mostly draining, mixed
      case ((cyc / 500) % 3)
        0: begin push = ($urandom % 4) != 0; pop = ($urandom % 4) == 0; end
        1: begin push = ($urandom % 4) == 0; pop = ($urandom % 4) != 0; end
        default: begin push = $urandom % 2; pop = $urandom % 2; end
      endcase
      din = W'($urandom);
      @(posedge clk);
      #1;
      begin
        logic pushed, popped;
        pushed = push && (model.size() < DEPTH);
        popped = pop && (model.size() > 0);
        if (popped) void'(model.pop_front());
        if (pushed) model.push_back(din);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
