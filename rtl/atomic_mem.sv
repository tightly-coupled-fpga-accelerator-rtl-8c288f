// atomic_mem: on-chip task-graph memory on the shared atomic-access bus.
//
// All execution units and CPU stations reach the task records and DataCtx
// records through this one bus, which is separate from the ring. A requester
// raises req[i].valid with an operation, a word address and write data, and
// holds them until gnt[i] is high. One request is granted per cycle by a
// round-robin arbiter, starting the search after the last winner, so no
// requester starves. Because the memory is single-ported and every operation
// completes in the cycle of its grant, fetch-and-decrement (MEM_DEC) and
// fetch-and-add (MEM_ADD) are atomic: no other access can fall between
// their read and their write. The response (old value for MEM_READ, MEM_DEC
// and MEM_ADD) appears on rsp[i] in the cycle
// after the grant. Bus protocol, operation set and depth are this design's
// choices; the word address wraps modulo DEPTH.
module atomic_mem
  import md_pkg::*;
#(
  parameter int unsigned NREQ  = 75,
  parameter int unsigned DEPTH = 4096
) (
  input  logic     clk,
  input  logic     rst_n,
  input  mem_req_t req [NREQ],
  output logic     gnt [NREQ],
  output mem_rsp_t rsp [NREQ]
);
  localparam int unsigned AW = $clog2(DEPTH);
  localparam int unsigned IW = (NREQ > 1) ? $clog2(NREQ) : 1;

  logic [MEM_DW-1:0] mem [DEPTH];

  logic [IW-1:0] last;     // last granted requester
  logic [IW-1:0] win;
  logic          any;
  mem_req_t      sel;

  // round-robin search starting after the last winner
  always_comb begin
    any = 1'b0;
    win = '0;
    for (int k = 1; k <= NREQ; k++) begin
      int unsigned idx;
      idx = (int'(last) + k) % NREQ;
      if (!any && req[idx].valid) begin
        any = 1'b1;
        win = IW'(idx);
      end
    end
    sel = req[win];
  end

  always_comb begin
    for (int i = 0; i < NREQ; i++) gnt[i] = any && (win == IW'(i));
  end

  logic [AW-1:0] a;
  assign a = sel.addr[AW-1:0];

  logic              rsp_v;
  logic [IW-1:0]     rsp_id;
  logic [MEM_DW-1:0] rsp_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      last  <= IW'(NREQ - 1);
      rsp_v <= 1'b0;
      rsp_id <= '0;
    end else begin
      rsp_v <= any;
      if (any) begin
        last   <= win;
        rsp_id <= win;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (any) begin
      rsp_d <= mem[a];
      unique case (sel.op)
        MEM_WRITE: mem[a] <= sel.wdata;
        MEM_DEC:   mem[a] <= mem[a] - 1'b1;
        MEM_ADD:   mem[a] <= mem[a] + sel.wdata;
        default:   ;
      endcase
    end
  end

  always_comb begin
    for (int i = 0; i < NREQ; i++) begin
      rsp[i].valid = rsp_v && (rsp_id == IW'(i));
      rsp[i].rdata = rsp_d;
    end
  end

endmodule
