// calc_factors: computes the scale factors and scaled image sizes.
//
// Starting from the initial scale s, the k-th factor is s^(k+1): the first
// factor is s and each further one is the previous factor times s (fixed-point
// multiply, truncated to FRAC_BITS fractional bits). For every factor f the
// scaled size is w = round(W / f), h = round(H / f), found with two restoring
// dividers running side by side (one quotient bit per cycle). The iteration
// stops before the first scale whose image would be smaller than the feature
// window (w < Win_Width or h < Win_Height), or after No_of_Scales scales, or
// when all N_SCU units are used, or when the next factor would exceed the
// factor register (2^FACT_INT_BITS). Each accepted scale is reported on the res_*
// port as it is found; `done` pulses with the final count.
//
// Timing: (DIM_W + 2) cycles per scale, plus one; for 12 scales of a 320x240
// frame this is 169 cycles, less than the 320 pixel times of one input row, so
// the factors are ready while the first row of the first frame is read.
// The stop rule and the iterative computation follow the design description;
// the power series of the initial scale, round-to-nearest sizes and the
// divider structure are this design's choices.
module calc_factors
  import resize_pkg::*;
#(
  parameter int unsigned N_SCU = NUM_SCU,
  parameter int unsigned F     = FRAC_BITS,
  parameter int unsigned FW    = FACT_W,
  parameter int unsigned CW    = DIM_W
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [FW-1:0] scale,
  input  logic [7:0]    no_of_scales,
  input  logic [CW-1:0] img_w,
  input  logic [CW-1:0] img_h,
  input  logic [CW-1:0] win_w,
  input  logic [CW-1:0] win_h,
  output logic          busy,
  output logic          res_valid,
  output logic [7:0]    res_idx,
  output logic [FW-1:0] res_factor,
  output logic [CW-1:0] res_w,
  output logic [CW-1:0] res_h,
  output logic          done,
  output logic [7:0]    num_scales
);

  localparam int unsigned NW = CW + F + 1;    // dividend width
  localparam int unsigned DW = FW + CW;       // shifted divisor width
  localparam int unsigned XW = (NW > DW) ? NW : DW;  // comparison width

  typedef enum logic [1:0] {S_IDLE, S_DIV, S_CHECK, S_MUL} state_e;
  state_e state;

  logic [FW-1:0]          factor;
  logic [NW-1:0]          rem_w, rem_h;
  logic [CW-1:0]          q_w, q_h;
  logic [$clog2(CW)-1:0]  bit_i;
  logic [7:0]             k;
  logic [2*FW-1:0]        prod;

  logic [NW-1:0] dvd_w, dvd_h;
  logic [DW-1:0] dsr;
  always_comb begin
    // round(X / f) = FLOOR((X * 2^F + f/2) / f)
    dvd_w = (NW'(img_w) << F) + NW'(factor >> 1);
    dvd_h = (NW'(img_h) << F) + NW'(factor >> 1);
    dsr   = DW'(factor) << bit_i;
    prod  = (2*FW)'(factor) * (2*FW)'(scale);
  end

  logic [7:0] limit;
  assign limit = (no_of_scales < 8'(N_SCU)) ? no_of_scales : 8'(N_SCU);

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      factor     <= '0;
      rem_w      <= '0;
      rem_h      <= '0;
      q_w        <= '0;
      q_h        <= '0;
      bit_i      <= '0;
      k          <= '0;
      res_valid  <= 1'b0;
      res_idx    <= '0;
      res_factor <= '0;
      res_w      <= '0;
      res_h      <= '0;
      done       <= 1'b0;
      num_scales <= '0;
    end else begin
      res_valid <= 1'b0;
      done      <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          factor <= scale;
          k      <= '0;
          if (limit == '0 || scale < FW'(1) << F) begin
            // nothing to produce: no scales allowed or a scale below 1
            num_scales <= '0;
            done       <= 1'b1;
          end else begin
            state <= S_MUL;   // S_MUL with k == 0 only loads the dividers
          end
        end
        S_MUL: begin
          if (k != '0) factor <= FW'(prod >> F);
          state <= S_DIV;
          bit_i <= ($clog2(CW))'(CW-1);
          q_w   <= '0;
          q_h   <= '0;
        end
        S_DIV: begin
          // restoring division, quotient bit bit_i per cycle
          logic [NW-1:0] rw, rh;
          rw = (bit_i == ($clog2(CW))'(CW-1)) ? dvd_w : rem_w;
          rh = (bit_i == ($clog2(CW))'(CW-1)) ? dvd_h : rem_h;
          if (XW'(dsr) <= XW'(rw)) begin
            rw = rw - NW'(dsr);
            q_w[bit_i] <= 1'b1;
          end
          if (XW'(dsr) <= XW'(rh)) begin
            rh = rh - NW'(dsr);
            q_h[bit_i] <= 1'b1;
          end
          rem_w <= rw;
          rem_h <= rh;
          if (bit_i == '0) state <= S_CHECK;
          else bit_i <= bit_i - 1'b1;
        end
        S_CHECK: begin
          if (q_w < win_w || q_h < win_h) begin
            num_scales <= k;
            done       <= 1'b1;
            state      <= S_IDLE;
          end else begin
            res_valid  <= 1'b1;
            res_idx    <= k;
            res_factor <= factor;
            res_w      <= q_w;
            res_h      <= q_h;
            k          <= k + 1'b1;
            if (k + 1'b1 >= limit || prod[2*FW-1:FW+F] != '0) begin
              // all scales used, or the next factor would not fit in FW bits
              num_scales <= k + 1'b1;
              done       <= 1'b1;
              state      <= S_IDLE;
            end else begin
              state <= S_MUL;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
