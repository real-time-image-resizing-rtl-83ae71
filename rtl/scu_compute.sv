// scu_compute: fixed-point bilinear interpolation of one output pixel.
//
// Given the four neighbouring source pixels A (top-left), B (top-right),
// C (bottom-left) and D (bottom-right) and the fixed-point source position of
// the output pixel, it computes
//   Y = FLOOR( A(1-x)(1-y) + B x(1-y) + C y(1-x) + D x y )
// where x and y are the fractional parts (x_diff, y_diff) of the position,
// i.e. the position minus its FLOOR. The products are kept at full precision
// (2*FRAC_BITS fractional bits), so the only rounding is the final FLOOR.
//
// Timing: two-stage pipeline. in_valid/in_tag enter in cycle t; out_valid,
// out_pix and out_tag appear in cycle t+2. One pixel per cycle, no stalls.
// The four-term formula and the final FLOOR follow the reference algorithm;
// splitting the work into a weight stage and a product/sum stage is this
// design's choice.
module scu_compute
  import resize_pkg::*;
#(
  parameter int unsigned F     = FRAC_BITS,
  parameter int unsigned PW    = PIX_W,
  parameter int unsigned TAG_W = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [PW-1:0]    a,
  input  logic [PW-1:0]    b,
  input  logic [PW-1:0]    c,
  input  logic [PW-1:0]    d,
  input  logic [F-1:0]     x_diff,   // fractional part of factor*col
  input  logic [F-1:0]     y_diff,   // fractional part of factor*row
  input  logic [TAG_W-1:0] in_tag,
  output logic             out_valid,
  output logic [PW-1:0]    out_pix,
  output logic [TAG_W-1:0] out_tag
);

  localparam int unsigned WW = 2*F + 1;       // weight width, weights <= 2^(2F)
  localparam int unsigned SW = 2*F + PW + 2;  // sum width

  logic [F:0] one_m_x, one_m_y, x_e, y_e;
  always_comb begin
    x_e     = {1'b0, x_diff};
    y_e     = {1'b0, y_diff};
    one_m_x = (F+1)'(1) << F;
    one_m_x = one_m_x - x_e;
    one_m_y = (F+1)'(1) << F;
    one_m_y = one_m_y - y_e;
  end

  // Stage 1: the four weights.
  logic [WW-1:0] wa, wb, wc, wd;
  logic [PW-1:0] a1, b1, c1, d1;
  logic          v1;
  logic [TAG_W-1:0] t1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0;
      t1 <= '0;
      wa <= '0; wb <= '0; wc <= '0; wd <= '0;
      a1 <= '0; b1 <= '0; c1 <= '0; d1 <= '0;
    end else begin
      v1 <= in_valid;
      if (in_valid) begin
        t1 <= in_tag;
        wa <= WW'(one_m_x) * WW'(one_m_y);
        wb <= WW'(x_e)     * WW'(one_m_y);
        wc <= WW'(y_e)     * WW'(one_m_x);
        wd <= WW'(x_e)     * WW'(y_e);
        a1 <= a; b1 <= b; c1 <= c; d1 <= d;
      end
    end
  end

  // Stage 2: weighted sum and FLOOR (drop the fractional bits).
  logic [SW-1:0] sum;
  always_comb begin
    sum = SW'(wa) * SW'(a1) + SW'(wb) * SW'(b1)
        + SW'(wc) * SW'(c1) + SW'(wd) * SW'(d1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_pix   <= '0;
      out_tag   <= '0;
    end else begin
      out_valid <= v1;
      if (v1) begin
        out_pix <= sum[2*F +: PW];
        out_tag <= t1;
      end
    end
  end

endmodule
