// rl_kernel: range-limited force kernel of an RL execution unit.
//
// Started by the EU controller with the start address A of the task's input
// data, it computes the total range-limited force on one particle from its
// neighbour list and writes it back, all over the shared memory bus:
//   A+0 number of neighbours N      A+1 box edge        A+2 cutoff squared
//   A+3..A+5 position of the particle
//   A+6+6k .. A+11+6k  neighbour k: x, y, z, sigma^2, eps/sigma^2, kq
//   A+6+6N .. A+8+6N   result: summed force x, y, z (written by the kernel)
// (formats as in rl_pipeline). Each neighbour is fetched word by word and
// then issued to the pair pipeline; results are summed as they come out, so
// fetching overlaps the pipeline. When all N results are in, the three sums
// are written and done pulses. The record layout and the word-serial fetch
// are this design's choices; the bus protocol is that of atomic_mem (request
// held until granted, read data one cycle after the grant). Sums wrap in 32
// bits.
module rl_kernel
  import md_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [MEM_DW-1:0] arg,
  output logic              done,
  output mem_req_t          mem_req,
  input  logic              mem_gnt,
  input  mem_rsp_t          mem_rsp
);
  typedef enum logic [2:0] {K_IDLE, K_HDR, K_NBR, K_ISSUE, K_DRAIN, K_WRITE, K_DONE} state_e;

  state_e             state;
  logic               pend;
  logic [MEM_AW-1:0]  base, rd_addr;
  logic [2:0]         widx;          // word index within header/neighbour/result
  logic [31:0]        n, issued, got;
  logic [31:0]        hdr [6];       // N, box, rc2, xi, yi, zi
  logic [31:0]        nbr [6];       // xj, yj, zj, sig2, eps_s2, kq
  logic signed [31:0] acc [3];

  logic               p_valid, p_out_valid, p_within;
  logic signed [31:0] p_pi [3], p_pj [3], p_force [3];

  assign p_pi[0] = hdr[3];
  assign p_pi[1] = hdr[4];
  assign p_pi[2] = hdr[5];
  assign p_pj[0] = nbr[0];
  assign p_pj[1] = nbr[1];
  assign p_pj[2] = nbr[2];
  assign p_valid = (state == K_ISSUE);

  rl_pipeline u_pipe (
    .clk, .rst_n,
    .in_valid  (p_valid),
    .pi        (p_pi),
    .pj        (p_pj),
    .box       (hdr[1]),
    .rc2       (hdr[2]),
    .sig2      (nbr[3]),
    .eps_s2    (nbr[4]),
    .kq        (nbr[5]),
    .out_valid (p_out_valid),
    .out_within(p_within),
    .force_o   (p_force)
  );

  // bus requests
  always_comb begin
    mem_req = '0;
    unique case (state)
      K_HDR:   begin mem_req.valid = !pend; mem_req.addr = base + MEM_AW'(widx); end
      K_NBR:   begin mem_req.valid = !pend; mem_req.addr = rd_addr + MEM_AW'(widx); end
      K_WRITE: begin
        mem_req.valid = !pend;
        mem_req.op    = MEM_WRITE;
        mem_req.addr  = base + 6 + 6 * n + MEM_AW'(widx);
        mem_req.wdata = acc[widx[1:0]];
      end
      default: ;
    endcase
  end

  assign done = (state == K_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= K_IDLE;
      pend <= 1'b0;
      base <= '0; rd_addr <= '0; widx <= '0;
      n <= '0; issued <= '0; got <= '0;
      for (int i = 0; i < 6; i++) begin hdr[i] <= '0; nbr[i] <= '0; end
      for (int i = 0; i < 3; i++) acc[i] <= '0;
    end else begin
      // collect pipeline results in any state
      if (p_out_valid) begin
        got <= got + 1;
        for (int i = 0; i < 3; i++) acc[i] <= acc[i] + p_force[i];
      end
      unique case (state)
        K_IDLE: if (start) begin
          base  <= arg;
          widx  <= '0;
          got   <= '0;
          issued <= '0;
          for (int i = 0; i < 3; i++) acc[i] <= '0;
          state <= K_HDR;
        end
        K_HDR: begin
          if (!pend) begin
            if (mem_gnt) pend <= 1'b1;
          end else if (mem_rsp.valid) begin
            pend <= 1'b0;
            hdr[widx] <= mem_rsp.rdata;
            if (widx == 3'd5) begin
              widx    <= '0;
              n       <= hdr[0];
              rd_addr <= base + 6;
              state   <= (hdr[0] == 0) ? K_DRAIN : K_NBR;
            end else widx <= widx + 1'b1;
          end
        end
        K_NBR: begin
          if (!pend) begin
            if (mem_gnt) pend <= 1'b1;
          end else if (mem_rsp.valid) begin
            pend <= 1'b0;
            nbr[widx] <= mem_rsp.rdata;
            if (widx == 3'd5) begin
              widx  <= '0;
              state <= K_ISSUE;
            end else widx <= widx + 1'b1;
          end
        end
        K_ISSUE: begin
          issued  <= issued + 1;
          rd_addr <= rd_addr + 6;
          state   <= (issued + 1 == n) ? K_DRAIN : K_NBR;
        end
        K_DRAIN: if (got == n && !p_out_valid) begin
          widx  <= '0;
          state <= K_WRITE;
        end
        K_WRITE: begin
          if (!pend) begin
            if (mem_gnt) pend <= 1'b1;
          end else if (mem_rsp.valid) begin
            pend <= 1'b0;
            if (widx == 3'd2) state <= K_DONE;
            else widx <= widx + 1'b1;
          end
        end
        K_DONE:  state <= K_IDLE;
        default: state <= K_IDLE;
      endcase
    end
  end

endmodule
