// load_sampler: periodic sampling of the EU eject queues for load balancing.
//
// Once every PERIOD cycles the occupancy of every EU eject queue is compared
// with a threshold, and the result is latched into the below bitmap (bit i set:
// EU i had fewer than thresh queued tasks). The CPU dependency manager reads
// the bitmap and prefers those EUs as destinations of later ready tasks. The
// bitmap is only a hint that is up to PERIOD cycles old, which is what lets the
// producers use it without any lock. sample_tick pulses in the cycle the
// bitmap is updated. The 1000-cycle period follows the design; the threshold
// is a run-time input because its value is not fixed. After reset every EU is
// reported as below the threshold.
module load_sampler #(
  parameter int unsigned NUM_EU = 73,
  parameter int unsigned CW     = 4,
  parameter int unsigned PERIOD = 1000
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [CW-1:0] ej_count [NUM_EU],
  input  logic [CW-1:0] thresh,
  output logic [NUM_EU-1:0] below,
  output logic          sample_tick
);
  localparam int unsigned TW = $clog2(PERIOD);

  logic [TW-1:0] timer;

  assign sample_tick = (timer == TW'(PERIOD - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      timer <= '0;
      below <= '1;
    end else begin
      timer <= sample_tick ? '0 : timer + 1'b1;
      if (sample_tick) begin
        for (int i = 0; i < NUM_EU; i++) below[i] <= (ej_count[i] < thresh);
      end
    end
  end

endmodule
