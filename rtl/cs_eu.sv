// cs_eu: cross station of an FPGA execution unit on the bufferless ring.
//
// The station is one ring slot (a register) plus an eject queue. Each cycle
// the flit held by the upstream slot arrives on ring_in. If it is valid, its
// destination tag equals STATION_ID and the eject queue has room, it is taken
// off the ring into the eject queue and this station's slot becomes empty;
// otherwise the flit moves into this station's slot unchanged, so it advances
// one station per cycle. A task for a full queue therefore stays on the ring
// and comes round again (deflection); this is the design's reading of a task
// the targeted EU "cannot accept".
//
// The EU sees the head of its eject queue on eu_task/eu_valid and removes it
// with eu_pop. ej_count is the eject-queue occupancy for load sampling.
// Timing: a flit on ring_in in cycle t is in the eject queue (or on ring_out)
// from cycle t+1. ejected and deflected are one-cycle event pulses.
module cs_eu
  import md_pkg::*;
#(
  parameter int unsigned STATION_ID = 0,
  parameter int unsigned EJ_DEPTH   = 8
) (
  input  logic  clk,
  input  logic  rst_n,
  input  flit_t ring_in,
  output flit_t ring_out,
  input  logic  eu_pop,
  output flit_t eu_task,
  output logic  eu_valid,
  output logic [$clog2(EJ_DEPTH+1)-1:0] ej_count,
  output logic  ejected,
  output logic  deflected
);
  logic  for_me, ej_full, ej_empty, take;
  flit_t slot;

  assign for_me    = ring_in.valid && (ring_in.dst == EU_ID_W'(STATION_ID));
  assign take      = for_me && !ej_full;
  assign ejected   = take;
  assign deflected = for_me && ej_full;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) slot <= '0;
    else        slot <= take ? '0 : ring_in;
  end
  assign ring_out = slot;

  sync_fifo #(.W(FLIT_W), .DEPTH(EJ_DEPTH)) u_eject (
    .clk, .rst_n,
    .push (take),
    .din  (ring_in),
    .pop  (eu_pop),
    .dout (eu_task),
    .full (ej_full),
    .empty(ej_empty),
    .count(ej_count)
  );
  assign eu_valid = !ej_empty;

endmodule
