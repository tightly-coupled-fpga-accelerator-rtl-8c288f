// eu_ctrl: control of one execution unit (EU).
//
// The EU consumes tasks from the eject queue of its own cross station, one at
// a time and in order:
//   1. pop the head task (task_pop) and keep its task-record pointer;
//   2. read the kernel argument word (start address of the input data) from
//      the task record over the atomic memory bus;
//   3. pulse kern_start with kern_task/kern_arg and wait for kern_done from
//      the compute kernel attached to this EU;
//   4. run dep_update, which releases the task's read data versions and
//      decrements the dependency counters of its consumers;
//   5. return to step 1.
// The memory-bus master is shared between step 2 and dep_update. The kernel
// handshake (start pulse, done pulse) is this design's choice. task_done
// pulses when a task has been fully retired; task_ready/ready_ptr forward
// dep_update's notice of a consumer that became ready.
module eu_ctrl
  import md_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // eject queue of the cross station
  input  logic              task_valid,
  input  flit_t             task_in,
  output logic              task_pop,
  // compute kernel
  output logic              kern_start,
  output logic [BODY_W-1:0] kern_task,
  output logic [MEM_DW-1:0] kern_arg,
  input  logic              kern_done,
  // status
  output logic              busy,
  output logic              task_done,
  output logic              task_ready,
  output logic [MEM_AW-1:0] ready_ptr,
  // atomic memory bus
  output mem_req_t          mem_req,
  input  logic              mem_gnt,
  input  mem_rsp_t          mem_rsp
);
  typedef enum logic [2:0] {E_IDLE, E_RD_ARG, E_KSTART, E_KWAIT, E_DEP, E_DEPWAIT} state_e;

  state_e   state;
  logic     pend;
  logic     dep_busy, dep_done;
  mem_req_t dep_req;

  assign task_pop   = (state == E_IDLE) && task_valid;
  assign kern_start = (state == E_KSTART);
  assign busy       = (state != E_IDLE);
  assign task_done  = dep_done;

  always_comb begin
    if (state == E_RD_ARG) begin
      mem_req       = '0;
      mem_req.valid = !pend;
      mem_req.op    = MEM_READ;
      mem_req.addr  = kern_task + TR_ARG;
    end else begin
      mem_req = dep_req;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= E_IDLE;
      pend      <= 1'b0;
      kern_task <= '0;
      kern_arg  <= '0;
    end else begin
      unique case (state)
        E_IDLE: if (task_valid) begin
          kern_task <= task_in.body;
          state     <= E_RD_ARG;
        end
        E_RD_ARG: begin
          if (!pend) begin
            if (mem_gnt) pend <= 1'b1;
          end else if (mem_rsp.valid) begin
            pend     <= 1'b0;
            kern_arg <= mem_rsp.rdata;
            state    <= E_KSTART;
          end
        end
        E_KSTART: state <= E_KWAIT;
        E_KWAIT:  if (kern_done) state <= E_DEP;
        E_DEP:    state <= E_DEPWAIT;
        E_DEPWAIT: if (dep_done) state <= E_IDLE;
        default:  state <= E_IDLE;
      endcase
    end
  end

  dep_update u_dep (
    .clk, .rst_n,
    .start     (state == E_DEP),
    .task_ptr  (kern_task),
    .busy      (dep_busy),
    .done      (dep_done),
    .task_ready(task_ready),
    .ready_ptr (ready_ptr),
    .mem_req   (dep_req),
    .mem_gnt   (mem_gnt && (state != E_RD_ARG)),
    .mem_rsp   (mem_rsp)
  );

endmodule
