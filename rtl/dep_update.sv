// dep_update: dependency maintenance after a task completes.
//
// When an execution unit finishes a task it updates the task graph in memory
// itself, so the CPU only has to look for tasks whose dependency counter has
// reached zero. Given the task record pointer, this engine walks the record
// (layout in md_pkg) over the atomic memory bus:
//   1. read the number of read DataCtxs and of written DataCtxs;
//   2. for every read DataCtx: fetch-and-decrement its pending-reader count,
//      releasing this task's use of that data version;
//   3. for every written DataCtx: read its consumer list and
//      fetch-and-decrement the dependency counter of every consumer task.
// Each step is one bus access (request held until granted, data one cycle
// after grant), issued strictly one after another. done pulses for one cycle
// at the end. task_ready pulses, with ready_ptr, when a decrement takes a
// consumer's counter from 1 to 0, i.e. when this completion made that task
// ready. The walk order and the reader-count release are this design's
// reading of the scheduling scheme.
module dep_update
  import md_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [BODY_W-1:0] task_ptr,
  output logic              busy,
  output logic              done,
  output logic              task_ready,
  output logic [MEM_AW-1:0] ready_ptr,
  output mem_req_t          mem_req,
  input  logic              mem_gnt,
  input  mem_rsp_t          mem_rsp
);
  typedef enum logic [3:0] {
    S_IDLE, S_RD_NIN, S_RD_NOUT, S_IN_PTR, S_IN_REL,
    S_OUT_PTR, S_OUT_NCONS, S_CONS_PTR, S_CONS_DEC, S_DONE
  } state_e;

  state_e            state;
  logic              pend;
  logic [MEM_AW-1:0] tp, d, c;
  logic [MEM_DW-1:0] nin, nout, ncons, i, j, k;

  always_comb begin
    mem_req       = '0;
    mem_req.valid = !pend && (state != S_IDLE) && (state != S_DONE);
    mem_req.op    = MEM_READ;
    unique case (state)
      S_RD_NIN:    mem_req.addr = tp + TR_NIN;
      S_RD_NOUT:   mem_req.addr = tp + TR_NOUT;
      S_IN_PTR:    mem_req.addr = tp + TR_LIST + i;
      S_IN_REL:    begin mem_req.addr = d + DC_READERS; mem_req.op = MEM_DEC; end
      S_OUT_PTR:   mem_req.addr = tp + TR_LIST + nin + j;
      S_OUT_NCONS: mem_req.addr = d + DC_NCONS;
      S_CONS_PTR:  mem_req.addr = d + DC_LIST + k;
      S_CONS_DEC:  begin mem_req.addr = c + TR_DEPCNT; mem_req.op = MEM_DEC; end
      default:     mem_req.addr = '0;
    endcase
  end

  assign busy       = (state != S_IDLE);
  assign done       = (state == S_DONE);
  assign task_ready = (state == S_CONS_DEC) && pend && mem_rsp.valid && (mem_rsp.rdata == 1);
  assign ready_ptr  = c;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      pend  <= 1'b0;
      tp <= '0; d <= '0; c <= '0;
      nin <= '0; nout <= '0; ncons <= '0; i <= '0; j <= '0; k <= '0;
    end else if (state == S_IDLE) begin
      if (start) begin
        tp    <= task_ptr;
        state <= S_RD_NIN;
      end
    end else if (state == S_DONE) begin
      state <= S_IDLE;
    end else if (!pend) begin
      if (mem_gnt) pend <= 1'b1;
    end else if (mem_rsp.valid) begin
      pend <= 1'b0;
      unique case (state)
        S_RD_NIN:  nin <= mem_rsp.rdata;
        S_RD_NOUT: begin
          nout <= mem_rsp.rdata;
          i <= '0;
          j <= '0;
          if (nin != 0)                state <= S_IN_PTR;
          else if (mem_rsp.rdata != 0) state <= S_OUT_PTR;
          else                         state <= S_DONE;
        end
        S_IN_PTR:  d <= mem_rsp.rdata;
        S_IN_REL: begin
          i <= i + 1;
          if (i + 1 < nin)    state <= S_IN_PTR;
          else if (nout != 0) state <= S_OUT_PTR;
          else                state <= S_DONE;
        end
        S_OUT_PTR: d <= mem_rsp.rdata;
        S_OUT_NCONS: begin
          ncons <= mem_rsp.rdata;
          k <= '0;
          if (mem_rsp.rdata != 0) state <= S_CONS_PTR;
          else begin
            j <= j + 1;
            state <= (j + 1 < nout) ? S_OUT_PTR : S_DONE;
          end
        end
        S_CONS_PTR: c <= mem_rsp.rdata;
        S_CONS_DEC: begin
          k <= k + 1;
          if (k + 1 < ncons) state <= S_CONS_PTR;
          else begin
            j <= j + 1;
            state <= (j + 1 < nout) ? S_OUT_PTR : S_DONE;
          end
        end
        default: ;
      endcase
      // simple forward steps
      case (state)
        S_RD_NIN:    state <= S_RD_NOUT;
        S_IN_PTR:    state <= S_IN_REL;
        S_OUT_PTR:   state <= S_OUT_NCONS;
        S_CONS_PTR:  state <= S_CONS_DEC;
        default: ;
      endcase
    end
  end

endmodule
