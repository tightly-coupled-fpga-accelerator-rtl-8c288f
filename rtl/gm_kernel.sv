// gm_kernel: compute kernel of the grid-mapping execution unit.
//
// Started by the EU controller with the start address A of the task's input
// record, it spreads the charges of a list of particles onto the charge grid
// held in the shared memory:
//   A+0 number of particles N    A+1 inverse grid spacing 1/h (Q16.16)
//   A+2 grid base address G
//   A+3+4k .. A+6+4k  particle k: x, y, z, charge (Q16.16)
// Grid point (ix, iy, iz) is the word G + ix*2^(2*GRID_BITS) + iy*2^GRID_BITS
// + iz. For each particle the four words are read over the bus, handed to
// grid_mapping, and each of its 27 weighted contributions is added to its grid
// word with an atomic fetch-and-add, one per bus grant, so several units (or
// the CPU) could deposit into the same grid without locks. done pulses one
// cycle after the last add was granted. Bus protocol as in atomic_mem
// (request held until granted, read data one cycle after the grant); add
// responses are not waited for. Record layout and the word-serial flow are
// this design's choices.
module gm_kernel
  import md_pkg::*;
#(
  parameter int unsigned GRID_BITS = 5
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [MEM_DW-1:0] arg,
  output logic              done,
  output mem_req_t          mem_req,
  input  logic              mem_gnt,
  input  mem_rsp_t          mem_rsp
);
  typedef enum logic [2:0] {G_IDLE, G_HDR, G_PART, G_FEED, G_ADD, G_DONE} state_e;

  state_e             state;
  logic               pend;
  logic [MEM_AW-1:0]  base, rd_addr;
  logic [1:0]         widx;
  logic [31:0]        n, k;
  logic [31:0]        hdr [3];       // N, 1/h, grid base
  logic [31:0]        prt [4];       // x, y, z, charge
  logic [4:0]         nadd;          // contributions added for this particle

  logic                 g_in_ready, g_out_valid, g_out_ready;
  logic [GRID_BITS-1:0] g_idx [3];
  logic signed [31:0]   g_val;
  logic signed [31:0]   g_pos [3];

  assign g_pos[0] = prt[0];
  assign g_pos[1] = prt[1];
  assign g_pos[2] = prt[2];

  grid_mapping #(.GRID_BITS(GRID_BITS)) u_gm (
    .clk, .rst_n,
    .in_valid  (state == G_FEED),
    .in_ready  (g_in_ready),
    .pos       (g_pos),
    .charge    (prt[3]),
    .inv_h     (hdr[1]),
    .out_valid (g_out_valid),
    .out_ready (g_out_ready),
    .out_idx   (g_idx),
    .out_val   (g_val)
  );

  assign g_out_ready = (state == G_ADD) && mem_gnt;

  always_comb begin
    mem_req = '0;
    unique case (state)
      G_HDR:  begin mem_req.valid = !pend; mem_req.addr = base + MEM_AW'(widx); end
      G_PART: begin mem_req.valid = !pend; mem_req.addr = rd_addr + MEM_AW'(widx); end
      G_ADD:  begin
        mem_req.valid = g_out_valid;
        mem_req.op    = MEM_ADD;
        mem_req.addr  = hdr[2] + MEM_AW'({g_idx[0], g_idx[1], g_idx[2]});
        mem_req.wdata = g_val;
      end
      default: ;
    endcase
  end

  assign done = (state == G_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= G_IDLE;
      pend <= 1'b0;
      base <= '0; rd_addr <= '0; widx <= '0;
      n <= '0; k <= '0; nadd <= '0;
      for (int i = 0; i < 3; i++) hdr[i] <= '0;
      for (int i = 0; i < 4; i++) prt[i] <= '0;
    end else begin
      unique case (state)
        G_IDLE: if (start) begin
          base  <= arg;
          widx  <= '0;
          k     <= '0;
          state <= G_HDR;
        end
        G_HDR: begin
          if (!pend) begin
            if (mem_gnt) pend <= 1'b1;
          end else if (mem_rsp.valid) begin
            pend <= 1'b0;
            hdr[widx] <= mem_rsp.rdata;
            if (widx == 2'd2) begin
              widx    <= '0;
              n       <= hdr[0];
              rd_addr <= base + 3;
              state   <= (hdr[0] == 0) ? G_DONE : G_PART;
            end else widx <= widx + 1'b1;
          end
        end
        G_PART: begin
          if (!pend) begin
            if (mem_gnt) pend <= 1'b1;
          end else if (mem_rsp.valid) begin
            pend <= 1'b0;
            prt[widx] <= mem_rsp.rdata;
            if (widx == 2'd3) state <= G_FEED;
            widx <= widx + 1'b1;
          end
        end
        G_FEED: if (g_in_ready) begin
          nadd  <= '0;
          state <= G_ADD;
        end
        G_ADD: if (g_out_ready) begin
          nadd <= nadd + 1'b1;
          if (nadd == 5'd26) begin
            k       <= k + 1;
            rd_addr <= rd_addr + 4;
            state   <= (k + 1 == n) ? G_DONE : G_PART;
          end
        end
        G_DONE:  state <= G_IDLE;
        default: state <= G_IDLE;
      endcase
    end
  end

endmodule
