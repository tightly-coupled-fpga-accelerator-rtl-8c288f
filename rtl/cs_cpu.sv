// cs_cpu: cross station of a hard-core CPU on the bufferless ring.
//
// The CPU is both the dependency manager (it produces ready tasks) and an
// execution unit, so this station has an inject queue and an eject queue
// around its ring slot.
//   * Eject: a valid flit arriving on ring_in is taken off into the eject
//     queue if it is addressed to STATION_ID, or if its I-Tag is already set,
//     and the queue has room.
//   * I-Tag: any other valid flit passes into the slot with its I-Tag set. A
//     flit that reaches a CPU station again with the I-Tag set has been round
//     the ring without its EU accepting it; it is handed to the CPU (bounced
//     pulses), which retargets it or runs it itself.
//   * Inject: when no flit is passing (or the passing one was ejected), the
//     head of the inject queue enters the slot with its I-Tag cleared. Traffic
//     already on the ring always has priority, so a task waits in the inject
//     queue until it meets an empty slot.
// Timing: a task pushed in cycle t can be in the slot (ring_out) at t+1 and
// in the eject queue of the next station at t+2.
module cs_cpu
  import md_pkg::*;
#(
  parameter int unsigned STATION_ID = 73,
  parameter int unsigned EJ_DEPTH   = 8,
  parameter int unsigned INJ_DEPTH  = 8
) (
  input  logic  clk,
  input  logic  rst_n,
  input  flit_t ring_in,
  output flit_t ring_out,
  // CPU side: inject queue
  input  logic  inj_push,
  input  flit_t inj_task,
  output logic  inj_full,
  // CPU side: eject queue
  input  logic  ej_pop,
  output flit_t ej_task,
  output logic  ej_valid,
  output logic [$clog2(EJ_DEPTH+1)-1:0] ej_count,
  // event pulses
  output logic  injected,
  output logic  inj_stalled,
  output logic  bounced
);
  logic  want_eject, take, ej_full, ej_empty, inj_empty, slot_free, do_inj;
  flit_t slot, inj_head, passing;
  logic [$clog2(INJ_DEPTH+1)-1:0] inj_count;

  assign want_eject = ring_in.valid &&
                      ((ring_in.dst == EU_ID_W'(STATION_ID)) || ring_in.itag);
  assign take       = want_eject && !ej_full;
  assign slot_free  = !ring_in.valid || take;
  assign do_inj     = slot_free && !inj_empty;

  assign injected    = do_inj;
  assign inj_stalled = !inj_empty && !slot_free;
  assign bounced     = take && ring_in.itag && (ring_in.dst != EU_ID_W'(STATION_ID));

  always_comb begin
    passing      = ring_in;
    passing.itag = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      slot <= '0;
    end else if (do_inj) begin
      slot       <= inj_head;
      slot.valid <= 1'b1;
      slot.itag  <= 1'b0;
    end else if (slot_free) begin
      slot <= '0;
    end else begin
      slot <= passing;
    end
  end
  assign ring_out = slot;

  sync_fifo #(.W(FLIT_W), .DEPTH(INJ_DEPTH)) u_inject (
    .clk, .rst_n,
    .push (inj_push),
    .din  (inj_task),
    .pop  (do_inj),
    .dout (inj_head),
    .full (inj_full),
    .empty(inj_empty),
    .count(inj_count)
  );

  sync_fifo #(.W(FLIT_W), .DEPTH(EJ_DEPTH)) u_eject (
    .clk, .rst_n,
    .push (take),
    .din  (ring_in),
    .pop  (ej_pop),
    .dout (ej_task),
    .full (ej_full),
    .empty(ej_empty),
    .count(ej_count)
  );
  assign ej_valid = !ej_empty;

endmodule
