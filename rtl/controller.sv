// controller: sequences the resizing accelerator and feeds the SCUs.
//
// Video side: the camera's vsync/hsync/valid/pixel signals are registered once;
// the row counter counts rows on hsync and a column counter counts pixels
// within a row. The input line control passes a pixel on only while the
// accelerator is enabled and the pixel lies inside the configured
// Image_Width x Image_Height frame. The result is broadcast to every SCU as a
// pix_stream_t: hsync and vsync pulses, then one pixel per valid cycle tagged
// with its column and row.
//
// Configuration side: after the host changes a register, the next frame start
// launches Calculate Factors and deactivates the SCUs. Each factor it reports
// is stored in a per-SCU table; when it finishes, the table (factor, scaled
// width and height, active bit) is loaded into all SCUs with one scu_load
// pulse. If this happens before the second row of the frame starts, that frame
// is already resized, because every SCU stores row 0 regardless of its factor.
// Otherwise `late` is set and the table is loaded at the next frame start.
//
// After the last row of a frame the controller appends a tail row (row number
// Image_Height, Image_Width valid cycles without pixel data) in which SCUs
// finish output rows whose upper source row is the last one; the camera must
// leave at least Image_Width+2 idle cycles between its last row and the next
// vsync, and camera rows beyond Image_Height are dropped.
//
// Timing: the stream to the SCUs lags the camera inputs by two cycles.
// Broadcasting factors and pixel flow to the SCUs follows the design
// description; the reconfiguration rule, the late fallback and the signal
// format are this design's choices.
module controller
  import resize_pkg::*;
#(
  parameter int unsigned N_SCU = NUM_SCU
) (
  input  logic          clk,
  input  logic          rst_n,
  input  cfg_t          cfg,
  input  logic          cfg_changed,
  input  logic          sticky_clr,
  // camera
  input  logic          vid_vsync,
  input  logic          vid_hsync,
  input  logic          vid_valid,
  input  logic [PIX_W-1:0] vid_pix,
  // Calculate Factors
  output logic          calc_start,
  input  logic          calc_busy,
  input  logic          res_valid,
  input  logic [7:0]    res_idx,
  input  logic [FACT_W-1:0] res_factor,
  input  logic [DIM_W-1:0]  res_w,
  input  logic [DIM_W-1:0]  res_h,
  input  logic          calc_done,
  input  logic [7:0]    calc_num,
  // SCUs
  output pix_stream_t   stream,
  output logic          scu_load,
  output scu_cfg_t      scu_cfg [N_SCU],
  // status
  output logic          factors_ready,
  output logic          late,
  output logic [7:0]    num_scales
);

  // ------------------------------------------------------- video input
  logic             d_vs, d_hs, d_valid;
  logic [PIX_W-1:0] d_pix;
  logic [DIM_W-1:0] row, col_ctr;
  logic             in_frame;

  row_counter #(.CW(DIM_W)) u_row_ctr (
    .clk, .rst_n, .vsync(vid_vsync), .hsync(vid_hsync), .row, .in_frame
  );

  // Tail row: after the last pixel of the last frame row the controller
  // inserts one more row (row number Image_Height, an hsync then Image_Width
  // valid cycles) so that SCUs can finish output rows that need the last
  // source row twice. Camera rows beyond Image_Height are not passed on.
  logic             in_rows, last_pix, tail_hs, tail_on;
  logic [DIM_W-1:0] tail_col;

  assign in_rows  = in_frame && (row < cfg.img_height);
  assign last_pix = d_valid && in_rows && cfg.enable
                    && (row == cfg.img_height - 1'b1) && (col_ctr == cfg.img_width - 1'b1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d_vs <= 1'b0; d_hs <= 1'b0; d_valid <= 1'b0; d_pix <= '0;
      col_ctr  <= '0;
      stream   <= '0;
      tail_hs  <= 1'b0;
      tail_on  <= 1'b0;
      tail_col <= '0;
    end else begin
      d_vs    <= vid_vsync;
      d_hs    <= vid_hsync;
      d_valid <= vid_valid;
      d_pix   <= vid_pix;
      if (d_hs)         col_ctr <= '0;
      else if (d_valid) col_ctr <= col_ctr + 1'b1;

      tail_hs <= last_pix;
      if (tail_hs) begin
        tail_on  <= 1'b1;
        tail_col <= '0;
      end else if (tail_on) begin
        tail_col <= tail_col + 1'b1;
        if (tail_col == cfg.img_width - 1'b1) tail_on <= 1'b0;
      end
      if (d_vs) tail_on <= 1'b0;

      stream.vsync <= d_vs;
      if (tail_hs || tail_on) begin
        stream.hsync <= tail_hs;
        stream.valid <= tail_on;
        stream.pix   <= '0;
        stream.col   <= tail_col;
        stream.row   <= cfg.img_height;
      end else begin
        stream.hsync <= d_hs && in_rows;
        stream.valid <= d_valid && in_rows && cfg.enable && (col_ctr < cfg.img_width);
        stream.pix   <= d_pix;
        stream.col   <= col_ctr;
        stream.row   <= row;
      end
    end
  end

  // ------------------------------------------------------- configuration
  localparam int unsigned IW = (N_SCU > 1) ? $clog2(N_SCU) : 1;
  logic pending, load_next;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pending       <= 1'b0;
      load_next     <= 1'b0;
      calc_start    <= 1'b0;
      scu_load      <= 1'b0;
      factors_ready <= 1'b0;
      late          <= 1'b0;
      num_scales    <= '0;
      for (int k = 0; k < N_SCU; k++) scu_cfg[k] <= '0;
    end else begin
      calc_start <= 1'b0;
      scu_load   <= 1'b0;
      if (sticky_clr) late <= 1'b0;
      if (cfg_changed) pending <= 1'b1;

      if (d_vs && pending && !calc_busy) begin
        // new configuration: deactivate SCUs, recompute factors
        pending       <= cfg_changed;
        load_next     <= 1'b0;
        factors_ready <= 1'b0;
        scu_load      <= 1'b1;
        for (int k = 0; k < N_SCU; k++) scu_cfg[k] <= '0;
        calc_start    <= cfg.enable;
      end else if (d_vs && load_next) begin
        load_next     <= 1'b0;
        scu_load      <= 1'b1;
        factors_ready <= 1'b1;
      end

      if (res_valid && res_idx < 8'(N_SCU)) begin
        scu_cfg[IW'(res_idx)].active <= 1'b1;
        scu_cfg[IW'(res_idx)].factor <= res_factor;
        scu_cfg[IW'(res_idx)].dst_w  <= res_w;
        scu_cfg[IW'(res_idx)].dst_h  <= res_h;
      end

      if (calc_done) begin
        num_scales <= calc_num;
        if (!in_frame || row == '0) begin
          scu_load      <= 1'b1;
          factors_ready <= 1'b1;
        end else begin
          late      <= 1'b1;
          load_next <= 1'b1;
        end
      end
    end
  end

endmodule
