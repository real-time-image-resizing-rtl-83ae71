// tb_ctrl_regs: self-checking testbench of the control registers.
//
// Checks the reset values (320x240, scale 1.05, 64x128 window, 12 scales,
// disabled), then writes random values to every configuration and base
// address register and checks the cfg/base_addr outputs and the read-back
// (one cycle read latency), the cfg_changed pulse after configuration writes,
// and the sticky_clr pulse and status read for the status word.
module tb_ctrl_regs;
  import resize_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic wr_en, rd_en, rd_valid, cfg_changed, sticky_clr;
  logic [5:0] addr;
  logic [31:0] wdata, rdata, status;
  cfg_t cfg;
  logic [ADDR_W-1:0] base_addr [NUM_SCU];

  ctrl_regs dut (.clk, .rst_n, .wr_en, .rd_en, .addr, .wdata, .rdata, .rd_valid,
                 .cfg, .base_addr, .cfg_changed, .sticky_clr, .status);

  int checks = 0, failures = 0;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wr(logic [5:0] a, logic [31:0] d);
    @(negedge clk); wr_en = 1; addr = a; wdata = d;
    @(negedge clk); wr_en = 0;
    check(cfg_changed == (a != REG_STATUS) && sticky_clr == (a == REG_STATUS),
          $sformatf("pulses after write to %0d", a));
    @(negedge clk);
    check(!cfg_changed && !sticky_clr, "pulses last one cycle");
  endtask

  task automatic rd(logic [5:0] a, logic [31:0] exp);
    @(negedge clk); rd_en = 1; addr = a;
    @(negedge clk); rd_en = 0;
    check(rd_valid && rdata == exp, $sformatf("read %0d: %0h expected %0h", a, rdata, exp));
  endtask

  logic [31:0] m [64];

  initial begin
    wr_en = 0; rd_en = 0; addr = 0; wdata = 0; status = 32'h0000_0A5C;
    repeat (3) @(negedge clk);
    rst_n = 1;
    check(cfg.scale == 32'd140928614 && cfg.no_of_scales == 12 && cfg.img_width == 320
          && cfg.img_height == 240 && cfg.win_width == 64 && cfg.win_height == 128
          && !cfg.enable, "reset values");
    rd(REG_IMG_WIDTH, 320);
    rd(REG_STATUS, 32'h0000_0A5C);
    for (int t = 0; t < 5; t++) begin
      m[REG_SCALE]      = $urandom;
      m[REG_NO_SCALES]  = $urandom_range(255);
      m[REG_IMG_WIDTH]  = $urandom_range(4095);
      m[REG_IMG_HEIGHT] = $urandom_range(4095);
      m[REG_WIN_WIDTH]  = $urandom_range(4095);
      m[REG_WIN_HEIGHT] = $urandom_range(4095);
      m[REG_CONTROL]    = $urandom_range(1);
      for (int k = 0; k < NUM_SCU; k++) m[REG_BASE0 + k] = $urandom;
      for (int a = 0; a <= REG_CONTROL; a++) wr(6'(a), m[a]);
      for (int k = 0; k < NUM_SCU; k++) wr(6'(REG_BASE0 + k), m[REG_BASE0 + k]);
      check(cfg.scale == m[REG_SCALE] && cfg.no_of_scales == m[REG_NO_SCALES][7:0]
            && cfg.img_width == m[REG_IMG_WIDTH][11:0] && cfg.img_height == m[REG_IMG_HEIGHT][11:0]
            && cfg.win_width == m[REG_WIN_WIDTH][11:0] && cfg.win_height == m[REG_WIN_HEIGHT][11:0]
            && cfg.enable == m[REG_CONTROL][0], "cfg outputs");
      for (int k = 0; k < NUM_SCU; k++)
        check(base_addr[k] == m[REG_BASE0 + k], $sformatf("base %0d", k));
      for (int a = 0; a <= REG_CONTROL; a++) rd(6'(a), m[a]);
      for (int k = 0; k < NUM_SCU; k++) rd(6'(REG_BASE0 + k), m[REG_BASE0 + k]);
      status = $urandom;
      rd(REG_STATUS, status);
      wr(REG_STATUS, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
