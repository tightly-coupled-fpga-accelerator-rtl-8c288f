// grid_mapping: charge spreading of particles onto the long-range grid.
//
// Each particle of charge Q at position (x, y, z) adds Q * phi_x * phi_y *
// phi_z to the 3 x 3 x 3 grid points around it, phi being the third-order
// (quadratic) B-spline of the distance between particle and grid point in
// units of the grid spacing. With u = x / h, v = u - 1/2, base = floor(v)
// and t = v - base, the three points base, base+1, base+2 get the weights
//     w0 = (1-t)^2 / 2,   w1 = 1 - w0 - w2 (= 3/4 - (t-1/2)^2),   w2 = t^2 / 2,
// which sum to exactly one, so the charge is conserved to the rounding of
// the product. Grid indices wrap modulo 2^GRID_BITS (periodic box).
//
// Interface: a particle is accepted when in_valid and in_ready are both high;
// the unit then emits its 27 contributions (grid index x, y, z and the Q16.16
// value) one per cycle on out_* with a valid/ready handshake, z fastest, then
// y, then x; in_ready is high when idle or while the last contribution
// leaves, so a continuous stream runs at 27 cycles per particle. Formats:
// position and charge Q16.16 signed, inv_h (1/h) Q16.16. The accumulation of
// the contributions into the grid belongs to the consumer of the stream.
// Spline order follows the design; formats, point order and handshake are
// this design's choices.
module grid_mapping #(
  parameter int unsigned GRID_BITS = 5
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic signed [31:0]   pos [3],
  input  logic signed [31:0]   charge,
  input  logic        [31:0]   inv_h,
  output logic                 out_valid,
  input  logic                 out_ready,
  output logic [GRID_BITS-1:0] out_idx [3],
  output logic signed [31:0]   out_val
);
  logic               busy;
  logic [1:0]         a [3];           // point counter per dimension
  logic [GRID_BITS-1:0] base [3];
  logic [16:0]        w [3][3];        // Q1.16 weights
  logic signed [31:0] q;

  // weights of one dimension
  function automatic void weights(input logic signed [31:0] x, input logic [31:0] ih,
                                  output logic [GRID_BITS-1:0] b, output logic [16:0] wo [3]);
    logic signed [63:0] u;
    logic signed [31:0] v;
    logic [15:0]        t;
    logic [33:0]        w0, w2;
    u  = (64'(x) * $signed({32'b0, ih})) >>> 16;    // Q16.16
    v  = u[31:0] - 32'sh8000;
    b  = v[16 +: GRID_BITS];
    t  = v[15:0];
    w0 = ((34'h1_0000 - 34'(t)) * (34'h1_0000 - 34'(t))) >> 17;
    w2 = (34'(t) * 34'(t)) >> 17;
    wo[0] = 17'(w0);
    wo[2] = 17'(w2);
    wo[1] = 17'(34'h1_0000 - w0 - w2);
  endfunction

  logic last;
  assign last     = (a[0] == 2'd2) && (a[1] == 2'd2) && (a[2] == 2'd2);
  assign in_ready = !busy || (out_ready && last);
  assign out_valid = busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      q    <= '0;
      for (int d = 0; d < 3; d++) begin
        a[d]    <= '0;
        base[d] <= '0;
        for (int k = 0; k < 3; k++) w[d][k] <= '0;
      end
    end else begin
      if (busy && out_ready) begin
        if (a[2] != 2'd2) a[2] <= a[2] + 1'b1;
        else begin
          a[2] <= '0;
          if (a[1] != 2'd2) a[1] <= a[1] + 1'b1;
          else begin
            a[1] <= '0;
            a[0] <= (a[0] != 2'd2) ? a[0] + 1'b1 : 2'd0;
          end
        end
        if (last) busy <= 1'b0;
      end
      if (in_valid && in_ready) begin
        logic [GRID_BITS-1:0] b;
        logic [16:0]          wo [3];
        busy <= 1'b1;
        q    <= charge;
        for (int d = 0; d < 3; d++) begin
          weights(pos[d], inv_h, b, wo);
          base[d] <= b;
          for (int k = 0; k < 3; k++) w[d][k] <= wo[k];
          a[d] <= '0;
        end
      end
    end
  end

  // current contribution
  logic signed [99:0] prod;
  always_comb begin
    prod = 100'(q) * $signed({83'b0, w[0][a[0]]}) * $signed({83'b0, w[1][a[1]]})
         * $signed({83'b0, w[2][a[2]]});
    out_val = 32'(prod >>> 48);
    for (int d = 0; d < 3; d++) out_idx[d] = base[d] + GRID_BITS'(a[d]);
  end

endmodule
