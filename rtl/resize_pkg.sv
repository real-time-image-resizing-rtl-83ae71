// resize_pkg: sizes, fixed-point format and shared types of the online image
// resizing accelerator.
//
// All scale factors are unsigned fixed-point numbers with FRAC_BITS fractional
// bits (about eight decimal digits of precision) and FACT_INT_BITS integer bits.
// A factor is the ratio source size / scaled size, so it is >= 1 for every
// scale the accelerator produces. The defaults (320x240 frames, 12 scales,
// 8-bit grey pixels) are the configuration the design was sized for; the
// pixel width and the register map are this design's own choices.
package resize_pkg;

  // Largest frame the row buffers hold.
  parameter int unsigned MAX_W = 320;
  parameter int unsigned MAX_H = 240;
  // Number of Scale Computation Units, one per scaled image.
  parameter int unsigned NUM_SCU = 12;
  // Grey-level pixel width.
  parameter int unsigned PIX_W = 8;

  // Fixed point: 2^-27 is about 7.5e-9, i.e. eight decimal digits.
  parameter int unsigned FRAC_BITS = 27;
  parameter int unsigned FACT_INT_BITS = 5;
  parameter int unsigned FACT_W = FRAC_BITS + FACT_INT_BITS;

  // Widths of size and coordinate fields.
  parameter int unsigned DIM_W = 12;   // image sizes up to 4095
  parameter int unsigned ADDR_W = 32;  // byte address in main memory

  // Host register map (word index on the register bus).
  typedef enum logic [5:0] {
    REG_SCALE      = 6'd0,   // initial scale, FACT_W-bit fixed point
    REG_NO_SCALES  = 6'd1,   // maximum number of scales to produce
    REG_IMG_WIDTH  = 6'd2,
    REG_IMG_HEIGHT = 6'd3,
    REG_WIN_WIDTH  = 6'd4,
    REG_WIN_HEIGHT = 6'd5,
    REG_CONTROL    = 6'd6,   // bit 0: enable
    REG_STATUS     = 6'd7,   // read only
    REG_BASE0      = 6'd32   // REG_BASE0 + k: base address of scale k
  } reg_addr_e;

  // Configuration held by the control registers.
  typedef struct packed {
    logic [FACT_W-1:0] scale;
    logic [7:0]        no_of_scales;
    logic [DIM_W-1:0]  img_width;
    logic [DIM_W-1:0]  img_height;
    logic [DIM_W-1:0]  win_width;
    logic [DIM_W-1:0]  win_height;
    logic              enable;
  } cfg_t;

  // Per-scale setup the controller loads into one SCU.
  typedef struct packed {
    logic              active;
    logic [FACT_W-1:0] factor;
    logic [DIM_W-1:0]  dst_w;
    logic [DIM_W-1:0]  dst_h;
  } scu_cfg_t;

  // Input pixel stream as the controller broadcasts it to every SCU.
  typedef struct packed {
    logic             hsync;  // one-cycle pulse before the first pixel of a row
    logic             vsync;  // one-cycle pulse before the first row of a frame
    logic             valid;  // pixel present (I/P line control)
    logic [PIX_W-1:0] pix;
    logic [DIM_W-1:0] col;    // column of pix
    logic [DIM_W-1:0] row;    // row counter value of the current row
  } pix_stream_t;

  // Write request from the memory master to one MPMC port.
  typedef struct packed {
    logic              valid;
    logic [ADDR_W-1:0] addr;
    logic [PIX_W-1:0]  data;
  } mem_wr_t;

endpackage
