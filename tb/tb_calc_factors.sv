// tb_calc_factors: self-checking testbench of the scale-factor calculator.
//
// For each configuration the expected factor list is worked out with 64-bit
// integer arithmetic: f_0 = s, f_k = FLOOR(f_(k-1) * s / 2^F), sizes
// round(W / f_k) and round(H / f_k), stop before the first size below the
// window, after min(No_of_Scales, N_SCU) scales, or when the next factor
// reaches 2^FACT_W. Every reported scale and
// the final count are compared. Cases: the reference configuration (320x240,
// scale 1.05, 64x128 window: 12 scales, the last 178x134), the same frame with
// a 24x24 window and scale 1.02 (limited by No_of_Scales), a scale below 1,
// No_of_Scales = 0, and random configurations. The reference case must finish
// within 320 cycles, the time of one 320-pixel input row.
module tb_calc_factors;
  import resize_pkg::*;
  import tb_resize_ref_pkg::*;

  localparam int unsigned F = FRAC_BITS;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, busy, res_valid, done;
  logic [FACT_W-1:0] scale, res_factor;
  logic [7:0] no_of_scales, res_idx, num_scales;
  logic [DIM_W-1:0] img_w, img_h, win_w, win_h, res_w, res_h;

  calc_factors dut (
    .clk, .rst_n, .start, .scale, .no_of_scales, .img_w, .img_h, .win_w, .win_h,
    .busy, .res_valid, .res_idx, .res_factor, .res_w, .res_h, .done, .num_scales
  );

  int checks = 0, failures = 0;
  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // run one configuration; returns the number of cycles from start to done
  task automatic run(longint unsigned s, int unsigned lim, int unsigned W, int unsigned H,
                     int unsigned ww, int unsigned wh, output int cycles,
                     output int unsigned got_n, output int unsigned last_w, output int unsigned last_h);
    longint unsigned ef [$];
    int unsigned ew [$], eh [$];
    longint unsigned f;
    int unsigned cap, k;
    cap = (lim < NUM_SCU) ? lim : NUM_SCU;
    f = s;
    if (s >= (64'd1 << F))
      while (ef.size() < cap) begin
        if (scaled_size(W, f, F) < ww || scaled_size(H, f, F) < wh) break;
        ef.push_back(f); ew.push_back(scaled_size(W, f, F)); eh.push_back(scaled_size(H, f, F));
        f = (f * s) >> F;
        if (f >= (64'd1 << FACT_W)) break;   // next factor does not fit
      end
    @(negedge clk);
    scale = FACT_W'(s); no_of_scales = 8'(lim);
    img_w = DIM_W'(W); img_h = DIM_W'(H); win_w = DIM_W'(ww); win_h = DIM_W'(wh);
    start = 1;
    @(negedge clk); start = 0;
    cycles = 1; k = 0; last_w = 0; last_h = 0;
    while (!done) begin
      if (res_valid) begin
        check(k < ef.size() && res_idx == 8'(k) && res_factor == FACT_W'(ef[k])
              && res_w == DIM_W'(ew[k]) && res_h == DIM_W'(eh[k]),
              $sformatf("scale %0d: f=%0d %0dx%0d", k, res_factor, res_w, res_h));
        last_w = res_w; last_h = res_h;
        k++;
      end
      @(negedge clk); cycles++;
    end
    if (res_valid) begin   // the last result comes with done
      check(k < ef.size() && res_factor == FACT_W'(ef[k]) && res_w == DIM_W'(ew[k])
            && res_h == DIM_W'(eh[k]), $sformatf("last scale %0d", k));
      last_w = res_w; last_h = res_h;
      k++;
    end
    got_n = num_scales;
    check(num_scales == 8'(ef.size()) && k == ef.size(),
          $sformatf("count %0d (%0d reported), expected %0d", num_scales, k, ef.size()));
    @(negedge clk);
    check(!busy, "busy after done");
  endtask

  initial begin
    int cyc;
    int unsigned n, lw, lh;
    start = 0; scale = 0; no_of_scales = 0; img_w = 0; img_h = 0; win_w = 0; win_h = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    run(to_fix(1.05, F), 12, 320, 240, 64, 128, cyc, n, lw, lh);
    check(n == 12 && lw == 178 && lh == 134, $sformatf("reference: %0d scales, last %0dx%0d", n, lw, lh));
    check(cyc <= 320, $sformatf("reference took %0d cycles", cyc));
    $display("reference configuration: %0d scales, last %0dx%0d, %0d cycles", n, lw, lh, cyc);
    run(to_fix(1.05, F), 40, 320, 240, 64, 128, cyc, n, lw, lh);
    check(n == 12, "window stop");
    run(to_fix(1.02, F), 12, 320, 240, 24, 24, cyc, n, lw, lh);
    check(n == 12, "No_of_Scales stop");
    run(to_fix(0.9, F), 12, 320, 240, 24, 24, cyc, n, lw, lh);
    check(n == 0, "scale below 1");
    run(to_fix(1.2, F), 0, 320, 240, 24, 24, cyc, n, lw, lh);
    check(n == 0, "no scales");
    for (int t = 0; t < 300; t++)
      run(to_fix(1.0 + $urandom_range(20000) / 10000.0, F), $urandom_range(16),
          $urandom_range(4095, 16), $urandom_range(4095, 16),
          $urandom_range(200, 1), $urandom_range(200, 1), cyc, n, lw, lh);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
