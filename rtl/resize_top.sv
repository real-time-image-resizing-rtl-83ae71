// resize_top: programmable-logic side of the online image resizing accelerator.
//
// While a camera frame streams in, the accelerator produces up to N_SCU
// downscaled copies of it at once and writes each into its own region of main
// memory, so that object detectors (HOG, Haar cascades) find the image pyramid
// ready instead of resizing frames in software.
//
// Blocks: ctrl_regs (host-visible configuration), controller (video input,
// row counter, input line control, factor loading), calc_factors (scale
// factors and scaled sizes), N_SCU Scale Computation Units in parallel (one
// bilinear scale each) and mem_master (one memory-controller write port per
// SCU). The multi-port memory controller and the processor are outside.
//
// Interface: host register bus (see ctrl_regs), camera vsync/hsync/valid/pixel
// (vsync and hsync are one-cycle pulses in cycles without a pixel; hsync comes
// before every row), and per scale a write request mem_wr[k] held until
// mem_ready[k]. irq_overflow pulses when any SCU drops a pixel because its
// memory port stalled for longer than one output row. Timing: one input pixel
// per clock at most; each SCU produces at most one output pixel per input
// pixel, an output row during the input row that follows its upper source
// row.
module resize_top
  import resize_pkg::*;
#(
  parameter int unsigned N_SCU = NUM_SCU,
  parameter int unsigned W_MAX = MAX_W
) (
  input  logic              clk,
  input  logic              rst_n,
  // host register bus
  input  logic              reg_wr,
  input  logic              reg_rd,
  input  logic [5:0]        reg_addr,
  input  logic [31:0]       reg_wdata,
  output logic [31:0]       reg_rdata,
  output logic              reg_rvalid,
  // camera
  input  logic              vid_vsync,
  input  logic              vid_hsync,
  input  logic              vid_valid,
  input  logic [PIX_W-1:0]  vid_pix,
  // multi-port memory controller write ports
  output mem_wr_t           mem_wr    [N_SCU],
  input  logic              mem_ready [N_SCU],
  output logic              irq_overflow
);

  cfg_t              cfg;
  logic [ADDR_W-1:0] base_addr [N_SCU];
  logic              cfg_changed, sticky_clr;
  logic [31:0]       status;

  logic              calc_start, calc_busy, res_valid, calc_done;
  logic [7:0]        res_idx, calc_num;
  logic [FACT_W-1:0] res_factor;
  logic [DIM_W-1:0]  res_w, res_h;

  pix_stream_t       stream;
  logic              scu_load;
  scu_cfg_t          scu_cfg [N_SCU];
  logic              factors_ready, late;
  logic [7:0]        num_scales;

  logic              o_valid [N_SCU];
  logic              o_ready [N_SCU];
  logic [PIX_W-1:0]  o_pix   [N_SCU];
  logic              o_first [N_SCU];
  logic [N_SCU-1:0]  ovf;
  logic [31:0]       wr_count [N_SCU];
  logic              ovf_sticky;

  ctrl_regs #(.N_SCU(N_SCU)) u_regs (
    .clk, .rst_n,
    .wr_en(reg_wr), .rd_en(reg_rd), .addr(reg_addr), .wdata(reg_wdata),
    .rdata(reg_rdata), .rd_valid(reg_rvalid),
    .cfg, .base_addr, .cfg_changed, .sticky_clr, .status
  );

  controller #(.N_SCU(N_SCU)) u_ctrl (
    .clk, .rst_n, .cfg, .cfg_changed, .sticky_clr,
    .vid_vsync, .vid_hsync, .vid_valid, .vid_pix,
    .calc_start, .calc_busy, .res_valid, .res_idx, .res_factor, .res_w, .res_h,
    .calc_done, .calc_num,
    .stream, .scu_load, .scu_cfg,
    .factors_ready, .late, .num_scales
  );

  calc_factors #(.N_SCU(N_SCU)) u_calc (
    .clk, .rst_n, .start(calc_start),
    .scale(cfg.scale), .no_of_scales(cfg.no_of_scales),
    .img_w(cfg.img_width), .img_h(cfg.img_height),
    .win_w(cfg.win_width), .win_h(cfg.win_height),
    .busy(calc_busy), .res_valid, .res_idx, .res_factor, .res_w, .res_h,
    .done(calc_done), .num_scales(calc_num)
  );

  for (genvar k = 0; k < N_SCU; k++) begin : g_scu
    scu #(.W_MAX(W_MAX)) u_scu (
      .clk, .rst_n,
      .img_w(cfg.img_width), .img_h(cfg.img_height),
      .cfg_load(scu_load), .cfg_in(scu_cfg[k]),
      .stream,
      .out_valid(o_valid[k]), .out_ready(o_ready[k]),
      .out_pix(o_pix[k]), .out_first(o_first[k]),
      .overflow(ovf[k])
    );
  end

  mem_master #(.N_SCU(N_SCU)) u_mcm (
    .clk, .rst_n, .base_addr,
    .in_valid(o_valid), .in_ready(o_ready), .in_pix(o_pix), .in_first(o_first),
    .mem_wr, .mem_ready, .wr_count
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ovf_sticky   <= 1'b0;
      irq_overflow <= 1'b0;
    end else begin
      irq_overflow <= |ovf;
      if (|ovf) ovf_sticky <= 1'b1;
      else if (sticky_clr) ovf_sticky <= 1'b0;
    end
  end

  // status word: [7:0] scales found, [8] factors ready, [9] calc busy,
  // [10] factors were late for a frame, [11] an output pixel was dropped
  assign status = {20'd0, ovf_sticky, late, calc_busy, factors_ready, num_scales};

endmodule
