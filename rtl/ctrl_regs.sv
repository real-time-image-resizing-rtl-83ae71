// ctrl_regs: host-visible control registers of the resizing accelerator.
//
// Holds the configuration the host processor writes before the accelerator
// runs: Scale (initial scale, fixed point with FRAC_BITS fractional bits),
// No_of_Scales, Image_Width, Image_Height, Win_Width and Win_Height, an enable
// bit, and one base address per scale telling where in main memory that scaled
// image is written. A status word reports the controller's state.
//
// Interface: a simple single-cycle register bus (wr_en/rd_en, word address,
// 32-bit data); reads return rdata one cycle later (rd_valid). Register map in
// resize_pkg::reg_addr_e. `cfg_changed` pulses after any configuration write
// so the controller recomputes the factors at the next frame. Writing the
// status word clears its sticky error bits (sticky_clr pulse).
// Reset values are the reference setting: 320x240 frames, scale 1.05, a 64x128
// window and 12 scales, accelerator disabled. The six configuration
// registers follow the design description; the bus, the enable bit, the base
// address registers and the status word are this design's choices.
module ctrl_regs
  import resize_pkg::*;
#(
  parameter int unsigned N_SCU = NUM_SCU
) (
  input  logic              clk,
  input  logic              rst_n,
  // register bus
  input  logic              wr_en,
  input  logic              rd_en,
  input  logic [5:0]        addr,
  input  logic [31:0]       wdata,
  output logic [31:0]       rdata,
  output logic              rd_valid,
  // to the accelerator
  output cfg_t              cfg,
  output logic [ADDR_W-1:0] base_addr [N_SCU],
  output logic              cfg_changed,
  output logic              sticky_clr,
  input  logic [31:0]       status
);

  localparam logic [FACT_W-1:0] SCALE_RESET = FACT_W'(64'd140928614); // round(1.05 * 2^27)

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg.scale        <= SCALE_RESET;
      cfg.no_of_scales <= 8'd12;
      cfg.img_width    <= DIM_W'(MAX_W);
      cfg.img_height   <= DIM_W'(MAX_H);
      cfg.win_width    <= DIM_W'(64);
      cfg.win_height   <= DIM_W'(128);
      cfg.enable       <= 1'b0;
      cfg_changed      <= 1'b0;
      sticky_clr       <= 1'b0;
      for (int k = 0; k < N_SCU; k++) base_addr[k] <= '0;
    end else begin
      cfg_changed <= 1'b0;
      sticky_clr  <= 1'b0;
      if (wr_en) begin
        cfg_changed <= (addr != REG_STATUS);
        unique case (addr)
          REG_SCALE:      cfg.scale        <= FACT_W'(wdata);
          REG_NO_SCALES:  cfg.no_of_scales <= wdata[7:0];
          REG_IMG_WIDTH:  cfg.img_width    <= wdata[DIM_W-1:0];
          REG_IMG_HEIGHT: cfg.img_height   <= wdata[DIM_W-1:0];
          REG_WIN_WIDTH:  cfg.win_width    <= wdata[DIM_W-1:0];
          REG_WIN_HEIGHT: cfg.win_height   <= wdata[DIM_W-1:0];
          REG_CONTROL:    cfg.enable       <= wdata[0];
          REG_STATUS:     sticky_clr       <= 1'b1;
          default: begin
            for (int k = 0; k < N_SCU; k++)
              if (addr == 6'(REG_BASE0) + 6'(k)) base_addr[k] <= ADDR_W'(wdata);
          end
        endcase
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rdata    <= '0;
      rd_valid <= 1'b0;
    end else begin
      rd_valid <= rd_en;
      if (rd_en) begin
        unique case (addr)
          REG_SCALE:      rdata <= 32'(cfg.scale);
          REG_NO_SCALES:  rdata <= 32'(cfg.no_of_scales);
          REG_IMG_WIDTH:  rdata <= 32'(cfg.img_width);
          REG_IMG_HEIGHT: rdata <= 32'(cfg.img_height);
          REG_WIN_WIDTH:  rdata <= 32'(cfg.win_width);
          REG_WIN_HEIGHT: rdata <= 32'(cfg.win_height);
          REG_CONTROL:    rdata <= 32'(cfg.enable);
          REG_STATUS:     rdata <= status;
          default: begin
            rdata <= '0;
            for (int k = 0; k < N_SCU; k++)
              if (addr == 6'(REG_BASE0) + 6'(k)) rdata <= 32'(base_addr[k]);
          end
        endcase
      end
    end
  end

endmodule
