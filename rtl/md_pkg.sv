// md_pkg: types and constants shared by the task-scheduling fabric.
//
// A task travels on the bufferless ring as one flit. The fields follow the
// flit picture of the design: a 2-bit workload (computation-consumption) tag,
// the destination station ID (Dst-Tag), the I-Tag that marks a task which has
// already passed a CPU cross station, and the task body. The body is a word
// pointer to the task record in the task-graph memory; its width is this
// design's choice.
//
// The task-graph memory holds one record per task and one per DataCtx (a
// version of a data block). Their word layouts are this design's choice and
// keep the fields of the scheduling data structure:
//   task record at T     : T+0 dependency counter, T+1 kernel argument
//                          (start address of the input data), T+2 number of
//                          read DataCtxs, T+3 number of written DataCtxs,
//                          T+4.. read DataCtx pointers, then written ones.
//   DataCtx record at D  : D+0 producer task, D+1 data address,
//                          D+2 pending readers, D+3 number of consumers,
//                          D+4.. consumer task pointers.
// The memory bus carries read, write and atomic fetch-and-decrement and
// fetch-and-add requests;
// a request is held until granted and read data returns one cycle after the
// grant.
package md_pkg;

  localparam int unsigned EU_ID_W   = 7;   // station IDs 0..127
  localparam int unsigned BODY_W    = 32;
  localparam int unsigned WL_W      = 2;   // workload tag width
  localparam int unsigned MEM_AW    = 32;
  localparam int unsigned MEM_DW    = 32;

  typedef struct packed {
    logic               valid;
    logic [WL_W-1:0]    workload;
    logic [EU_ID_W-1:0] dst;
    logic               itag;
    logic [BODY_W-1:0]  body;
  } flit_t;

  localparam int unsigned FLIT_W = $bits(flit_t);

  typedef enum logic [1:0] {
    MEM_READ  = 2'd0,
    MEM_WRITE = 2'd1,
    MEM_DEC   = 2'd2,  // atomic fetch-and-decrement, returns the old value
    MEM_ADD   = 2'd3   // atomic fetch-and-add of wdata, returns the old value
  } mem_op_e;

  typedef struct packed {
    logic              valid;
    mem_op_e           op;
    logic [MEM_AW-1:0] addr;
    logic [MEM_DW-1:0] wdata;
  } mem_req_t;

  typedef struct packed {
    logic              valid;
    logic [MEM_DW-1:0] rdata;
  } mem_rsp_t;

  // Task-record and DataCtx-record field offsets
  localparam int unsigned TR_DEPCNT = 0;
  localparam int unsigned TR_ARG    = 1;
  localparam int unsigned TR_NIN    = 2;
  localparam int unsigned TR_NOUT   = 3;
  localparam int unsigned TR_LIST   = 4;
  localparam int unsigned DC_PROD   = 0;
  localparam int unsigned DC_ADDR   = 1;
  localparam int unsigned DC_READERS = 2;
  localparam int unsigned DC_NCONS  = 3;
  localparam int unsigned DC_LIST   = 4;

endpackage
