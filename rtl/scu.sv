// scu: Scale Computation Unit, producing one bilinearly resized copy of the
// incoming video frame.
//
// How it works. A "factor value" register holds the SCU's scale factor f
// (source size / scaled size, >= 1). Output row i needs source rows
// y = FLOOR(f*i) and y+1; an accumulator (the INC loop) holds the current
// factor multiple f*i. At each row start the CMP logic compares the row
// counter with FLOOR(f*i):
//   * row == FLOOR(f*i)            the row is accepted and written into the
//                                   primary input row buffer;
//   * row == FLOOR(f*i) + 1         output row i is computed while this row
//                                   streams in: A, B come from the secondary
//                                   (already filled) buffer, C, D from the
//                                   incoming row; afterwards f*i advances by f,
//                                   and if the row is also FLOOR(f*(i+1)) it is
//                                   written into the primary buffer as well.
// At the end of every accepted row "Switch Row" swaps primary and secondary.
// Along a computed row a second accumulator holds f*j; output pixel j fires
// when the incoming column reaches FLOOR(f*j)+1, so each input pixel yields at
// most one output pixel. Neighbours past the right or bottom edge are clamped
// to the last column or row: a pixel whose left neighbour is the last column is
// produced in a flush cycle right after the row, and an output row whose upper
// row is the last source row is computed during the tail row (row number
// img_h, pixels not used) that the controller appends to every frame, from the
// stored last row alone.
//
// Interface: `stream` is the controller's broadcast pixel stream (hsync and
// vsync pulses in cycles of their own, then one pixel per valid cycle with its
// column and the row counter, rows 0..img_h-1 and then the tail row img_h). `cfg_load` loads `cfg_in` (factor, scaled
// width and height, active) into the SCU's registers. Output pixels leave
// through the output row buffer as valid/ready; `out_first` marks pixel (0,0)
// of a frame. `overflow` pulses when a pixel is lost because the output row
// buffer was full.
//
// Timing: an output pixel reaches the output row buffer 3 cycles after the
// input pixel that completes it (4 for the flush pixel). Row 0 is accepted by
// every SCU before its factor is known, so factors may be loaded during row 0.
// The comparator, INC loop, two swapped row buffers, compute unit and output
// row buffer follow the design description; the exact firing rule, the edge
// clamping and the flush cycle are this design's choices.
module scu
  import resize_pkg::*;
#(
  parameter int unsigned W_MAX = MAX_W,
  parameter int unsigned F     = FRAC_BITS,
  parameter int unsigned FW    = FACT_W,
  parameter int unsigned PW    = PIX_W,
  parameter int unsigned CW    = DIM_W
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [CW-1:0] img_w,
  input  logic [CW-1:0] img_h,
  input  logic          cfg_load,
  input  scu_cfg_t      cfg_in,
  input  pix_stream_t   stream,
  output logic          out_valid,
  input  logic          out_ready,
  output logic [PW-1:0] out_pix,
  output logic          out_first,
  output logic          overflow
);

  localparam int unsigned PosW = CW + F;   // fixed-point position width

  // ---------------------------------------------------------------- config
  logic          active;
  logic [FW-1:0] factor_val;
  logic [CW-1:0] dst_w, dst_h;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active     <= 1'b0;
      factor_val <= '0;
      dst_w      <= '0;
      dst_h      <= '0;
    end else if (cfg_load) begin
      active     <= cfg_in.active;
      factor_val <= cfg_in.factor;
      dst_w      <= cfg_in.dst_w;
      dst_h      <= cfg_in.dst_h;
    end
  end

  // ----------------------------------------------------- row side (CMP/INC)
  logic [PosW-1:0] y_acc;       // f * i
  logic [CW-1:0]   out_row;     // i
  logic            pri;         // which buffer is primary

  logic [CW-1:0]   y_int, y_int_next;
  logic [PosW-1:0] y_acc_next;
  always_comb begin
    y_acc_next = y_acc + PosW'(factor_val);
    y_int      = CW'(y_acc >> F);
    y_int_next = CW'(y_acc_next >> F);
  end

  // Per-row decisions, taken at hsync.
  logic            row_accept, row_compute, row_clamp, row_first;
  logic [F-1:0]    row_ypos;    // fractional part of f*i for this row
  logic            pending;
  assign pending = active && (out_row < dst_h);

  logic cmp_upper, cmp_lower;   // CMP outputs for the row now starting
  always_comb begin
    cmp_upper = (stream.row == y_int);
    cmp_lower = pending && (stream.row == y_int + 1'b1);
  end

  logic last_pix;
  assign last_pix = stream.valid && (stream.col == img_w - 1'b1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y_acc       <= '0;
      out_row     <= '0;
      pri         <= 1'b0;
      row_accept  <= 1'b0;
      row_compute <= 1'b0;
      row_clamp   <= 1'b0;
      row_first   <= 1'b0;
      row_ypos    <= '0;
    end else if (stream.vsync) begin
      y_acc       <= '0;
      out_row     <= '0;
      row_accept  <= 1'b0;
      row_compute <= 1'b0;
      row_clamp   <= 1'b0;
    end else if (stream.hsync) begin
      row_ypos  <= y_acc[F-1:0];
      row_first <= (out_row == '0);
      if (stream.row == img_h) begin
        // Tail row after the frame: an output row whose upper row is the
        // last source row is computed from that stored row alone.
        row_compute <= pending && (y_int == img_h - 1'b1);
        row_clamp   <= 1'b1;
        row_accept  <= 1'b0;
      end else if (cmp_lower) begin
        row_compute <= 1'b1;
        row_clamp   <= 1'b0;
        row_accept  <= (out_row + 1'b1 < dst_h) && (stream.row == y_int_next);
      end else begin
        row_compute <= 1'b0;
        row_clamp   <= 1'b0;
        row_accept  <= cmp_upper;
      end
    end else if (last_pix) begin
      if (row_compute) begin
        y_acc   <= y_acc_next;
        out_row <= out_row + 1'b1;
      end
      if (row_accept) pri <= ~pri;  // Switch Row
    end
  end

  // ------------------------------------------------------ input row buffers
  logic          we0, we1, re0, re1;
  logic [PW-1:0] rd0, rd1;
  logic          wr_en, rd_en;

  assign wr_en = stream.valid && row_accept;                 // AND gate into Switch Row
  assign rd_en = stream.valid && row_compute;
  assign we0   = wr_en && (pri == 1'b0);
  assign we1   = wr_en && (pri == 1'b1);
  assign re0   = rd_en && (pri == 1'b1);   // secondary is the other buffer
  assign re1   = rd_en && (pri == 1'b0);

  row_buffer #(.DEPTH(W_MAX), .PW(PW), .CW(CW)) u_buf0 (
    .clk, .rst_n, .n(img_w), .restart(stream.hsync),
    .we(we0), .wdata(stream.pix), .re(re0), .rdata(rd0)
  );
  row_buffer #(.DEPTH(W_MAX), .PW(PW), .CW(CW)) u_buf1 (
    .clk, .rst_n, .n(img_w), .restart(stream.hsync),
    .we(we1), .wdata(stream.pix), .re(re1), .rdata(rd1)
  );

  // ---------------------------------------------- stage 1: column side
  logic            s1_valid, s1_clamp, s1_last, s1_sel, s1_first;
  logic [PW-1:0]   s1_pix;
  logic [CW-1:0]   s1_col;
  logic [F-1:0]    s1_ypos;     // y_diff of the row being computed

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid   <= 1'b0;
      s1_clamp   <= 1'b0;
      s1_last    <= 1'b0;
      s1_sel     <= 1'b0;
      s1_first   <= 1'b0;
      s1_pix     <= '0;
      s1_col     <= '0;
      s1_ypos    <= '0;
    end else begin
      s1_valid <= stream.valid && row_compute && active;
      if (stream.valid) begin
        s1_clamp   <= row_clamp;
        s1_last    <= last_pix;
        s1_sel     <= pri;
        s1_first   <= row_first;
        s1_pix     <= stream.pix;
        s1_col     <= stream.col;
        s1_ypos    <= row_ypos;
      end
    end
  end

  logic [PW-1:0] sec_d;       // secondary buffer pixel at s1_col
  assign sec_d = s1_sel ? rd0 : rd1;

  logic [PosW-1:0] x_acc;     // f * j
  logic [CW-1:0]   out_col;   // j
  logic [PW-1:0]   sec_p, cur_p;  // pixels at s1_col - 1
  logic            flush;     // cycle after the last pixel of a computed row

  logic [CW-1:0] x_int;
  assign x_int = CW'(x_acc >> F);

  logic          fire;
  logic [PW-1:0] va, vb, vc, vd;
  always_comb begin
    fire = 1'b0;
    va = sec_p; vb = sec_d; vc = cur_p; vd = s1_clamp ? sec_d : s1_pix;
    if (flush && out_col < dst_w) begin
      fire = 1'b1;
      va = sec_p; vb = sec_p; vc = cur_p; vd = cur_p;
    end else if (s1_valid && out_col < dst_w && s1_col == x_int + 1'b1) begin
      fire = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_acc   <= '0;
      out_col <= '0;
      sec_p   <= '0;
      cur_p   <= '0;
      flush   <= 1'b0;
    end else begin
      flush <= s1_valid && s1_last;
      if (s1_valid) begin
        sec_p <= sec_d;
        cur_p <= s1_clamp ? sec_d : s1_pix;
      end
      if (flush || stream.vsync) begin
        x_acc   <= '0;
        out_col <= '0;
      end else if (fire) begin
        x_acc   <= x_acc + PosW'(factor_val);
        out_col <= out_col + 1'b1;
      end
    end
  end

  // ------------------------------------------------------------- compute
  logic          c_valid, c_first;
  logic [PW-1:0] c_pix;

  scu_compute #(.F(F), .PW(PW), .TAG_W(1)) u_compute (
    .clk, .rst_n,
    .in_valid (fire),
    .a(va), .b(vb), .c(vc), .d(vd),
    .x_diff   (x_acc[F-1:0]),
    .y_diff   (s1_ypos),
    .in_tag   (s1_first && (out_col == '0)),
    .out_valid(c_valid),
    .out_pix  (c_pix),
    .out_tag  (c_first)
  );

  // ------------------------------------------------- output row buffer
  logic [PW:0] pop_word;
  out_fifo #(.DEPTH(W_MAX), .DW(PW+1)) u_obuf (
    .clk, .rst_n,
    .flush    (cfg_load),
    .push     (c_valid),
    .push_data({c_first, c_pix}),
    .pop_valid(out_valid),
    .pop_ready(out_ready),
    .pop_data (pop_word),
    .overflow (overflow)
  );
  assign out_pix   = pop_word[PW-1:0];
  assign out_first = pop_word[PW];

endmodule
