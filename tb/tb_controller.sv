// tb_controller: self-checking testbench of the controller.
//
// A camera model sends frames larger than the configured image (extra columns
// and rows, random gaps); the Calculate Factors side is played by the
// testbench, answering calc_start with a configurable delay. Checks:
//  * the SCU stream carries exactly the configured Image_Width x Image_Height
//    pixels, each with its own value, column and row, an hsync with the row
//    number before every row, then the tail row (row Image_Height,
//    Image_Width valid cycles), and vsync per frame;
//  * a configuration change starts the factor calculation at the next frame,
//    first loading inactive SCU settings;
//  * factors that arrive during row 0 are loaded at once (factors_ready, the
//    table holds them); factors that arrive later set `late` and are loaded at
//    the next frame start; sticky_clr clears `late`;
//  * with the enable bit clear no pixel is passed on.
module tb_controller;
  import resize_pkg::*;
  import tb_resize_ref_pkg::*;

  localparam int unsigned N = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  cfg_t cfg;
  logic cfg_changed, sticky_clr, vid_vsync, vid_hsync, vid_valid;
  logic [PIX_W-1:0] vid_pix;
  logic calc_start, calc_busy, res_valid, calc_done;
  logic [7:0] res_idx, calc_num, num_scales;
  logic [FACT_W-1:0] res_factor;
  logic [DIM_W-1:0] res_w, res_h;
  pix_stream_t stream;
  logic scu_load, factors_ready, late;
  scu_cfg_t scu_cfg [N];

  controller #(.N_SCU(N)) dut (.clk, .rst_n, .cfg, .cfg_changed, .sticky_clr,
    .vid_vsync, .vid_hsync, .vid_valid, .vid_pix,
    .calc_start, .calc_busy, .res_valid, .res_idx, .res_factor, .res_w, .res_h,
    .calc_done, .calc_num, .stream, .scu_load, .scu_cfg, .factors_ready, .late, .num_scales);

  int checks = 0, failures = 0;
  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  // ---------------------------------------------- stream monitor
  int unsigned seed, n_pix, n_tail, n_hs, n_vs, n_loads, n_starts, cur_row;
  bit bad_pix;
  always @(posedge clk) begin
    if (rst_n) begin
      if (stream.vsync) n_vs++;
      if (stream.hsync) begin n_hs++; cur_row = stream.row; end
      if (scu_load) n_loads++;
      if (calc_start) n_starts++;
      if (stream.valid) begin
        if (stream.row == cfg.img_height) n_tail++;
        else begin
          n_pix++;
          if (stream.row != DIM_W'(cur_row) || stream.row >= cfg.img_height
              || stream.col >= cfg.img_width
              || stream.pix != PIX_W'(src_pix(seed, stream.row, stream.col)))
            bad_pix = 1;
        end
      end
    end
  end

  // ---------------------------------------------- Calculate Factors stand-in
  int unsigned calc_delay = 50;
  int unsigned calc_n = 3;
  initial begin
    calc_busy = 0; res_valid = 0; calc_done = 0; res_idx = 0; res_factor = 0;
    res_w = 0; res_h = 0; calc_num = 0;
    forever begin
      @(posedge clk);
      if (rst_n && calc_start) begin
        @(negedge clk); calc_busy = 1;
        repeat (calc_delay) @(negedge clk);
        for (int k = 0; k < calc_n; k++) begin
          res_valid = 1; res_idx = 8'(k); res_factor = FACT_W'(1000 + k);
          res_w = DIM_W'(10 + k); res_h = DIM_W'(20 + k);
          @(negedge clk); res_valid = 0;
        end
        calc_done = 1; calc_num = 8'(calc_n); calc_busy = 0;
        @(negedge clk); calc_done = 0;
      end
    end
  end

  // ---------------------------------------------- camera
  task automatic frame(int unsigned s, int unsigned CW_, int unsigned CH_, int gap);
    seed = s;
    @(negedge clk); vid_vsync = 1;
    @(negedge clk); vid_vsync = 0;
    repeat (3) @(negedge clk);
    for (int unsigned r = 0; r < CH_; r++) begin
      vid_hsync = 1;
      @(negedge clk); vid_hsync = 0;
      for (int unsigned c = 0; c < CW_; c++) begin
        while ($urandom_range(99) < gap) @(negedge clk);
        vid_valid = 1; vid_pix = PIX_W'(src_pix(s, r, c));
        @(negedge clk); vid_valid = 0;
      end
      repeat (3) @(negedge clk);
    end
    repeat (CW_ + 10) @(negedge clk);   // vertical blanking
  endtask

  task automatic frame_check(int unsigned s, int unsigned CW_, int unsigned CH_, int gap,
                             int unsigned exp_pix);
    n_pix = 0; n_tail = 0; n_hs = 0; n_vs = 0; bad_pix = 0;
    frame(s, CW_, CH_, gap);
    check(n_vs == 1, "one vsync");
    check(n_pix == exp_pix, $sformatf("%0d pixels passed, expected %0d", n_pix, exp_pix));
    check(!bad_pix, "pixel value/column/row");
    check(n_tail == (exp_pix ? cfg.img_width : 0), $sformatf("tail row %0d cycles", n_tail));
    check(n_hs == (exp_pix ? cfg.img_height + 1 : cfg.img_height + 1),
          $sformatf("%0d hsyncs", n_hs));
  endtask

  task automatic write_cfg();
    @(negedge clk); cfg_changed = 1;
    @(negedge clk); cfg_changed = 0;
  endtask

  initial begin
    cfg = '0;
    cfg.img_width = 24; cfg.img_height = 10; cfg.enable = 0;
    cfg_changed = 0; sticky_clr = 0; vid_vsync = 0; vid_hsync = 0; vid_valid = 0; vid_pix = 0;
    cur_row = 0; n_loads = 0; n_starts = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // disabled: nothing passes, no tail row
    n_pix = 0; n_tail = 0;
    frame(1, 30, 12, 0);
    check(n_pix == 0 && n_tail == 0, "disabled passes nothing");

    // enable: factors ready during row 0 (24-pixel rows, 50-cycle delay would be late;
    // use a short delay first)
    cfg.enable = 1; calc_delay = 2; write_cfg();
    n_loads = 0; n_starts = 0;
    frame_check(2, 30, 12, 0, 24 * 10);
    check(n_starts == 1 && n_loads == 2, $sformatf("starts %0d loads %0d", n_starts, n_loads));
    check(factors_ready && !late && num_scales == 3, "ready in time");
    for (int k = 0; k < N; k++)
      check(scu_cfg[k].active == (k < 3) && (k >= 3 || (scu_cfg[k].factor == FACT_W'(1000 + k)
            && scu_cfg[k].dst_w == DIM_W'(10 + k) && scu_cfg[k].dst_h == DIM_W'(20 + k))),
            $sformatf("table entry %0d: %0d %0d %0d %0d", k, scu_cfg[k].active, scu_cfg[k].factor, scu_cfg[k].dst_w, scu_cfg[k].dst_h));

    // further frames with gaps: no reload
    n_loads = 0;
    frame_check(3, 24, 10, 30, 24 * 10);
    check(n_loads == 0, "no reload without change");

    // reconfigure with a slow calculation: late, loaded at the next frame
    calc_delay = 200; write_cfg();
    n_loads = 0;
    frame_check(4, 26, 11, 0, 24 * 10);
    check(late && !factors_ready && n_loads == 1, "late factors");
    frame_check(5, 26, 11, 10, 24 * 10);
    check(factors_ready && n_loads == 2, "loaded at next frame");
    @(negedge clk); sticky_clr = 1;
    @(negedge clk); sticky_clr = 0;
    check(!late, "late cleared");

    // disable again
    cfg.enable = 0; write_cfg();
    n_loads = 0; n_starts = 0;
    frame(6, 24, 10, 0);
    check(n_starts == 0 && n_loads == 1 && !factors_ready, "disable deactivates SCUs");
    for (int k = 0; k < N; k++) check(!scu_cfg[k].active, "inactive after disable");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
