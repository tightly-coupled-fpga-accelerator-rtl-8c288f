// bufferless_ring: the hardware multi-producer multi-consumer ready queue.
//
// NUM_CPU CPU cross stations and NUM_EU EU cross stations are chained into a
// single-direction ring: CPU station 0, ..., CPU station NUM_CPU-1, EU
// station 0, ..., EU station NUM_EU-1, and back to CPU station 0. Every
// station owns one ring slot and the slot contents move one station per clock,
// so the ring has no buffering beyond one flit per station. A producer (CPU)
// enqueues by pushing into its inject queue; a consumer (EU or CPU) dequeues
// by popping its own eject queue. Each eject queue has its own head and tail
// pointer, so no lock is needed between producers and consumers.
//
// Station IDs: EU i answers to ID i, CPU station c to ID NUM_EU+c. A task
// injected by CPU station c reaches the eject queue of the station k hops
// downstream k+1 cycles after it entered the slot; two cycles from inject
// queue head to the eject queue of the neighbouring station.
// The ev_* outputs are per-cycle event pulses for monitoring.
module bufferless_ring
  import md_pkg::*;
#(
  parameter int unsigned NUM_EU    = 73,
  parameter int unsigned NUM_CPU   = 2,
  parameter int unsigned EJ_DEPTH  = 8,
  parameter int unsigned INJ_DEPTH = 8,
  localparam int unsigned CW       = $clog2(EJ_DEPTH+1)
) (
  input  logic          clk,
  input  logic          rst_n,
  // CPU stations
  input  logic          cpu_inj_push [NUM_CPU],
  input  flit_t         cpu_inj_task [NUM_CPU],
  output logic          cpu_inj_full [NUM_CPU],
  input  logic          cpu_ej_pop   [NUM_CPU],
  output flit_t         cpu_ej_task  [NUM_CPU],
  output logic          cpu_ej_valid [NUM_CPU],
  // EU stations
  input  logic          eu_pop       [NUM_EU],
  output flit_t         eu_task      [NUM_EU],
  output logic          eu_valid     [NUM_EU],
  output logic [CW-1:0] eu_ej_count  [NUM_EU],
  // events
  output logic          ev_injected  [NUM_CPU],
  output logic          ev_inj_stall [NUM_CPU],
  output logic          ev_bounced   [NUM_CPU],
  output logic          ev_ejected   [NUM_EU],
  output logic          ev_deflected [NUM_EU]
);
  localparam int unsigned NST = NUM_CPU + NUM_EU;

  // slot[k] is the ring slot of station k (CPU stations first)
  flit_t slot [NST];

  for (genvar c = 0; c < NUM_CPU; c++) begin : g_cpu
    logic [CW-1:0] cnt_unused;
    cs_cpu #(
      .STATION_ID(NUM_EU + c), .EJ_DEPTH(EJ_DEPTH), .INJ_DEPTH(INJ_DEPTH)
    ) u_cs (
      .clk, .rst_n,
      .ring_in    (slot[(c + NST - 1) % NST]),
      .ring_out   (slot[c]),
      .inj_push   (cpu_inj_push[c]),
      .inj_task   (cpu_inj_task[c]),
      .inj_full   (cpu_inj_full[c]),
      .ej_pop     (cpu_ej_pop[c]),
      .ej_task    (cpu_ej_task[c]),
      .ej_valid   (cpu_ej_valid[c]),
      .ej_count   (cnt_unused),
      .injected   (ev_injected[c]),
      .inj_stalled(ev_inj_stall[c]),
      .bounced    (ev_bounced[c])
    );
  end

  for (genvar e = 0; e < NUM_EU; e++) begin : g_eu
    cs_eu #(.STATION_ID(e), .EJ_DEPTH(EJ_DEPTH)) u_cs (
      .clk, .rst_n,
      .ring_in  (slot[NUM_CPU + e - 1]),
      .ring_out (slot[NUM_CPU + e]),
      .eu_pop   (eu_pop[e]),
      .eu_task  (eu_task[e]),
      .eu_valid (eu_valid[e]),
      .ej_count (eu_ej_count[e]),
      .ejected  (ev_ejected[e]),
      .deflected(ev_deflected[e])
    );
  end

endmodule
