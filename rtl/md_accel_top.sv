// md_accel_top: programmable-logic side of the tightly coupled MD accelerator.
//
// Fine-grained MD tasks (range-limited force, grid mapping, FFT, long-range
// force) are scheduled without a central scheduler. The task graph lives in
// on-chip memory; each completing EU updates the dependency counters of the
// tasks that consume its results (eu_ctrl/dep_update), the dependency manager
// on the hard-core CPU picks up tasks whose counter reached zero and pushes
// them into the bufferless ring, which works as a lock-free multi-producer
// multi-consumer ready queue delivering each task to the eject queue of its
// destination EU. The CPU chooses destinations with the help of the load
// sampler's bitmap of lightly loaded EUs.
//
// This module holds the ring (NUM_CPU CPU cross stations, NUM_EU EU cross
// stations), one eu_ctrl per EU, the load sampler and the task-graph memory
// on the atomic-access bus (requesters 0..NUM_EU-1 are the EUs, NUM_EU+c is
// CPU c). Brought out as ports: the CPU side of each CPU cross station and its
// memory-bus port (the CPU and its AXI link are outside this design).
// EUs 0..NUM_RL-1 are range-limited force units, each an eu_ctrl with an
// rl_kernel that reads its neighbour data from and writes its force sums to
// the same memory. EU NUM_RL is the grid-mapping unit: an eu_ctrl with a
// gm_kernel that spreads particle charges onto a 2^GRID_BITS-cubed charge
// grid in the same memory with atomic adds. The kernels of the remaining EUs
// (FFT/IFFT, long-range force) are outside this design: their
// start/argument/done handshake is brought out. NUM_EU = 73 and NUM_RL = 68
// are the unit counts of the design (68 range-limited pipelines, 1 grid
// mapping, 3 FFT/IFFT, 1 long-range force); queue depths, the 64 Ki-word
// memory (32 Ki words of it taken by a 32-cubed grid), the grid size and the
// ordering of EUs on the ring are this design's choices.
module md_accel_top
  import md_pkg::*;
#(
  parameter int unsigned NUM_EU        = 73,
  parameter int unsigned NUM_RL        = 68,
  parameter int unsigned NUM_CPU       = 2,
  parameter int unsigned EJ_DEPTH      = 8,
  parameter int unsigned INJ_DEPTH     = 8,
  parameter int unsigned MEM_DEPTH     = 65536,
  parameter int unsigned GRID_BITS     = 5,
  parameter int unsigned SAMPLE_PERIOD = 1000,
  localparam int unsigned CW           = $clog2(EJ_DEPTH+1),
  localparam int unsigned NUM_EXT      = NUM_EU - NUM_RL - 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // CPU cross stations
  input  logic              cpu_inj_push [NUM_CPU],
  input  flit_t             cpu_inj_task [NUM_CPU],
  output logic              cpu_inj_full [NUM_CPU],
  input  logic              cpu_ej_pop   [NUM_CPU],
  output flit_t             cpu_ej_task  [NUM_CPU],
  output logic              cpu_ej_valid [NUM_CPU],
  // CPU ports on the atomic memory bus
  input  mem_req_t          cpu_mem_req  [NUM_CPU],
  output logic              cpu_mem_gnt  [NUM_CPU],
  output mem_rsp_t          cpu_mem_rsp  [NUM_CPU],
  // load sampling
  input  logic [CW-1:0]     sample_thresh,
  output logic [NUM_EU-1:0] eu_below,
  output logic              sample_tick,
  // compute kernels of EUs NUM_RL+1..NUM_EU-1 (index e - NUM_RL - 1)
  output logic              kern_start   [NUM_EXT],
  output logic [BODY_W-1:0] kern_task    [NUM_EXT],
  output logic [MEM_DW-1:0] kern_arg     [NUM_EXT],
  input  logic              kern_done    [NUM_EXT],
  // status and events
  output logic              eu_task_done  [NUM_EU],
  output logic              eu_task_ready [NUM_EU],
  output logic              ev_injected   [NUM_CPU],
  output logic              ev_inj_stall  [NUM_CPU],
  output logic              ev_bounced    [NUM_CPU],
  output logic              ev_ejected    [NUM_EU],
  output logic              ev_deflected  [NUM_EU]
);
  localparam int unsigned NREQ = NUM_EU + NUM_CPU;

  logic          eu_pop   [NUM_EU];
  flit_t         eu_task  [NUM_EU];
  logic          eu_valid [NUM_EU];
  logic [CW-1:0] eu_cnt   [NUM_EU];

  mem_req_t bus_req [NREQ];
  logic     bus_gnt [NREQ];
  mem_rsp_t bus_rsp [NREQ];

  bufferless_ring #(
    .NUM_EU(NUM_EU), .NUM_CPU(NUM_CPU), .EJ_DEPTH(EJ_DEPTH), .INJ_DEPTH(INJ_DEPTH)
  ) u_ring (
    .clk, .rst_n,
    .cpu_inj_push, .cpu_inj_task, .cpu_inj_full,
    .cpu_ej_pop, .cpu_ej_task, .cpu_ej_valid,
    .eu_pop, .eu_task, .eu_valid,
    .eu_ej_count (eu_cnt),
    .ev_injected, .ev_inj_stall, .ev_bounced, .ev_ejected, .ev_deflected
  );

  for (genvar e = 0; e < NUM_EU; e++) begin : g_eu
    logic              busy_unused;
    logic [MEM_AW-1:0] rdy_ptr_unused;
    logic              k_start, k_done;
    logic [BODY_W-1:0] k_task;
    logic [MEM_DW-1:0] k_arg;
    mem_req_t          c_req;
    logic              c_gnt;

    eu_ctrl u_eu (
      .clk, .rst_n,
      .task_valid (eu_valid[e]),
      .task_in    (eu_task[e]),
      .task_pop   (eu_pop[e]),
      .kern_start (k_start),
      .kern_task  (k_task),
      .kern_arg   (k_arg),
      .kern_done  (k_done),
      .busy       (busy_unused),
      .task_done  (eu_task_done[e]),
      .task_ready (eu_task_ready[e]),
      .ready_ptr  (rdy_ptr_unused),
      .mem_req    (c_req),
      .mem_gnt    (c_gnt),
      .mem_rsp    (bus_rsp[e])
    );

    if (e < NUM_RL) begin : g_rl
      // range-limited force EU: the kernel shares the EU's bus port; the
      // controller and the kernel never request at the same time
      mem_req_t k_req;
      rl_kernel u_kern (
        .clk, .rst_n,
        .start   (k_start),
        .arg     (k_arg),
        .done    (k_done),
        .mem_req (k_req),
        .mem_gnt (bus_gnt[e] && k_req.valid),
        .mem_rsp (bus_rsp[e])
      );
      assign bus_req[e] = k_req.valid ? k_req : c_req;
      assign c_gnt      = bus_gnt[e] && !k_req.valid;
    end else if (e == NUM_RL) begin : g_gm
      // grid-mapping EU, bus port shared the same way
      mem_req_t k_req;
      gm_kernel #(.GRID_BITS(GRID_BITS)) u_kern (
        .clk, .rst_n,
        .start   (k_start),
        .arg     (k_arg),
        .done    (k_done),
        .mem_req (k_req),
        .mem_gnt (bus_gnt[e] && k_req.valid),
        .mem_rsp (bus_rsp[e])
      );
      assign bus_req[e] = k_req.valid ? k_req : c_req;
      assign c_gnt      = bus_gnt[e] && !k_req.valid;
    end else begin : g_ext
      assign kern_start[e - NUM_RL - 1] = k_start;
      assign kern_task[e - NUM_RL - 1]  = k_task;
      assign kern_arg[e - NUM_RL - 1]   = k_arg;
      assign k_done                     = kern_done[e - NUM_RL - 1];
      assign bus_req[e]             = c_req;
      assign c_gnt                  = bus_gnt[e];
    end
  end

  for (genvar c = 0; c < NUM_CPU; c++) begin : g_cpu_bus
    assign bus_req[NUM_EU + c] = cpu_mem_req[c];
    assign cpu_mem_gnt[c]      = bus_gnt[NUM_EU + c];
    assign cpu_mem_rsp[c]      = bus_rsp[NUM_EU + c];
  end

  atomic_mem #(.NREQ(NREQ), .DEPTH(MEM_DEPTH)) u_mem (
    .clk, .rst_n,
    .req (bus_req),
    .gnt (bus_gnt),
    .rsp (bus_rsp)
  );

  load_sampler #(.NUM_EU(NUM_EU), .CW(CW), .PERIOD(SAMPLE_PERIOD)) u_sampler (
    .clk, .rst_n,
    .ej_count    (eu_cnt),
    .thresh      (sample_thresh),
    .below       (eu_below),
    .sample_tick (sample_tick)
  );

endmodule
