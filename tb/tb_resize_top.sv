// tb_resize_top: end-to-end testbench of the resizing accelerator at its
// default size (12 SCUs, 320x240 frames).
//
// The host is played by register writes, the camera by a frame generator and
// the memory controller by mpmc_model. Every scaled image written to memory is
// compared pixel by pixel with the reference model, at the addresses the host
// assigned. Frames:
//  1. the reference configuration (320x240, scale 1.05, 64x128 window,
//     12 scales; the smallest image is 178x134), memory always ready;
//  2. the same with a refusing, priority-limited memory controller
//     (back-pressure, no pixel lost);
//  3. the memory controller stalled for a whole frame: the output row
//     buffers overflow, the interrupt fires and the status bit is set;
//  4. a reconfiguration to 64x48, scale 1.3, 16x16 window, whose 4 scales
//     leave 8 SCUs idle;
//  5. and 6. a configuration whose factor calculation outlasts the first row
//     (40-pixel rows, scale 1.02): the first frame is skipped and flagged
//     late, the next one is resized;
//  7. the Haar detector's setting: 320x240, scale 1.02, 24x24 window, limited
//     to 12 scales.
// It counts how often each mechanism happened, judged from the verified
// output (row accepted by the comparator, a row stored while in use, which
// needs the primary/secondary switch, computed row, right-edge flush pixel,
// bottom-edge tail row) or from the outside (memory refusal, overflow
// interrupt, late factors, idle SCU), and fails for any that never did.
module tb_resize_top;
  import resize_pkg::*;
  import tb_resize_ref_pkg::*;

  localparam int unsigned N = NUM_SCU;
  localparam int unsigned F = FRAC_BITS;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic reg_wr, reg_rd, reg_rvalid, vid_vsync, vid_hsync, vid_valid, irq_overflow;
  logic [5:0] reg_addr;
  logic [31:0] reg_wdata, reg_rdata;
  logic [PIX_W-1:0] vid_pix;
  mem_wr_t mem_wr [N];
  logic mem_ready [N];

  resize_top dut (
    .clk, .rst_n, .reg_wr, .reg_rd, .reg_addr, .reg_wdata, .reg_rdata, .reg_rvalid,
    .vid_vsync, .vid_hsync, .vid_valid, .vid_pix, .mem_wr, .mem_ready, .irq_overflow
  );

  mpmc_model #(.N_PORTS(N), .MAX_GRANTS(N)) mpmc (.clk, .rst_n, .mem_wr, .mem_ready);

  int checks = 0, failures = 0;
  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 30) $display("FAIL: %s", what); end
  endtask

  // ------------------------------------------------ mechanism counters
  // Counted from the verified output: a mechanism counts only where the pixels
  // it produced were correct.
  int unsigned n_accept, n_switch, n_compute, n_flush, n_tail, n_ovf_irq;
  always @(posedge clk) if (rst_n && irq_overflow) n_ovf_irq++;

  // ------------------------------------------------ host
  task automatic reg_write(logic [5:0] a, logic [31:0] d);
    @(negedge clk); reg_wr = 1; reg_addr = a; reg_wdata = d;
    @(negedge clk); reg_wr = 0;
  endtask
  task automatic reg_read(logic [5:0] a, output logic [31:0] d);
    @(negedge clk); reg_rd = 1; reg_addr = a;
    @(negedge clk); reg_rd = 0; d = reg_rdata;
  endtask

  function automatic logic [31:0] base_of(int k, int set);
    return 32'h1000_0000 + 32'(set) * 32'h0100_0000 + 32'(k) * 32'h0002_0000;
  endfunction

  // ------------------------------------------------ camera
  task automatic frame(int unsigned seed, int unsigned W, int unsigned H,
                       int unsigned hblank, int unsigned vblank);
    @(negedge clk); vid_vsync = 1;
    @(negedge clk); vid_vsync = 0;
    repeat (4) @(negedge clk);
    for (int unsigned r = 0; r < H; r++) begin
      vid_hsync = 1;
      @(negedge clk); vid_hsync = 0;
      for (int unsigned c = 0; c < W; c++) begin
        vid_valid = 1; vid_pix = PIX_W'(src_pix(seed, r, c));
        @(negedge clk);
      end
      vid_valid = 0;
      repeat (hblank) @(negedge clk);
    end
    repeat (vblank) @(negedge clk);
  endtask

  // expected scale list for a configuration
  longint unsigned ef [$];
  int unsigned ew [$], eh [$];
  task automatic expected_scales(real s, int unsigned lim, int unsigned W, int unsigned H,
                                 int unsigned ww, int unsigned wh);
    longint unsigned f, sf;
    sf = to_fix(s, F);
    f = sf;
    ef.delete(); ew.delete(); eh.delete();
    while (ef.size() < lim && ef.size() < N) begin
      if (scaled_size(W, f, F) < ww || scaled_size(H, f, F) < wh) break;
      ef.push_back(f); ew.push_back(scaled_size(W, f, F)); eh.push_back(scaled_size(H, f, F));
      f = (f * sf) >> F;
    end
  endtask

  // compare every scaled image in memory with the reference
  task automatic check_images(int unsigned seed, int unsigned W, int unsigned H, int set,
                              string what);
    int unsigned bad, total;
    int got;
    for (int k = 0; k < ef.size(); k++) begin
      int unsigned y, y_prev, bad_row;
      bad = 0; total = 0;
      for (int unsigned i = 0; i < eh[k]; i++) begin
        bad_row = bad;
        for (int unsigned j = 0; j < ew[k]; j++) begin
          got = mpmc.peek(longint'(base_of(k, set)) + i * ew[k] + j);
          total++;
          if (got == int'(ref_pix(seed, W, H, ef[k], F, i, j))
              && int'((ef[k] * j) >> F) == int'(W - 1)) n_flush++;
          if (got != int'(ref_pix(seed, W, H, ef[k], F, i, j))) begin
            bad++;
            if (bad < 3) $display("%s scale %0d (%0d,%0d): %0d expected %0d", what, k, i, j,
                                  got, ref_pix(seed, W, H, ef[k], F, i, j));
          end
        end
        // a correct output row: its upper source row was accepted by the
        // comparator; if that row was the previous output row's lower row, it
        // was stored while in use, which needs the primary/secondary switch
        y = int'((ef[k] * i) >> F);
        if (bad == bad_row) begin
          n_compute++;
          if (i == 0 || y != y_prev) n_accept++;
          if (i > 0 && y == y_prev + 1) n_switch++;
          if (y == H - 1) n_tail++;
        end
        y_prev = y;
      end
      check(bad == 0, $sformatf("%s: scale %0d (%0dx%0d) %0d of %0d pixels wrong",
                                what, k, ew[k], eh[k], bad, total));
    end
  endtask

  task automatic set_bases(int set);
    for (int k = 0; k < N; k++) reg_write(6'(REG_BASE0 + k), base_of(k, set));
  endtask

  int unsigned writes_before [N];
  task automatic snapshot();
    for (int k = 0; k < N; k++) writes_before[k] = mpmc.writes[k];
  endtask
  task automatic check_counts(string what);
    for (int k = 0; k < N; k++) begin
      int unsigned expn;
      expn = (k < ef.size()) ? ew[k] * eh[k] : 0;
      check(mpmc.writes[k] - writes_before[k] == expn,
            $sformatf("%s: port %0d wrote %0d pixels, expected %0d", what, k,
                      mpmc.writes[k] - writes_before[k], expn));
    end
  endtask

  initial begin
    logic [31:0] st;
    int unsigned idle_scus;
    reg_wr = 0; reg_rd = 0; reg_addr = 0; reg_wdata = 0;
    vid_vsync = 0; vid_hsync = 0; vid_valid = 0; vid_pix = 0;
    n_accept = 0; n_switch = 0; n_compute = 0; n_flush = 0; n_tail = 0; n_ovf_irq = 0;
    idle_scus = 0;
    repeat (4) @(negedge clk);
    rst_n = 1;

    // ---- 1: reference configuration (reset values), memory always ready
    set_bases(0);
    reg_write(REG_CONTROL, 1);
    expected_scales(1.05, 12, 320, 240, 64, 128);
    check(ef.size() == 12 && ew[11] == 178 && eh[11] == 134, "reference scale list");
    snapshot();
    frame(1, 320, 240, 16, 400);
    reg_read(REG_STATUS, st);
    check(st[7:0] == 12 && st[8] && !st[10] && !st[11], $sformatf("status %0h after frame 1", st));
    check_counts("frame 1");
    check_images(1, 320, 240, 0, "frame 1");

    // ---- 2: back-pressure from a refusing memory controller
    mpmc.ready_pct = 90;
    snapshot();
    frame(2, 320, 240, 120, 1200);
    check_counts("frame 2");
    check_images(2, 320, 240, 0, "frame 2");
    check(mpmc.refused > 0, "memory refused requests");
    reg_read(REG_STATUS, st);
    check(!st[11], "no overflow under back-pressure");

    // ---- 3: memory stalled: overflow
    mpmc.ready_pct = 0;
    frame(3, 320, 240, 16, 100);
    mpmc.ready_pct = 100;
    repeat (2000) @(negedge clk);   // let the output row buffers drain
    reg_read(REG_STATUS, st);
    check(st[11] && n_ovf_irq > 0, "overflow reported");
    reg_write(REG_STATUS, 0);
    reg_read(REG_STATUS, st);
    check(!st[11], "overflow cleared");

    // ---- 4: reconfiguration: 64x48, scale 1.3, 16x16 window
    reg_write(REG_IMG_WIDTH, 64);
    reg_write(REG_IMG_HEIGHT, 48);
    reg_write(REG_SCALE, 32'(to_fix(1.3, F)));
    reg_write(REG_WIN_WIDTH, 16);
    reg_write(REG_WIN_HEIGHT, 16);
    set_bases(1);
    expected_scales(1.3, 12, 64, 48, 16, 16);
    check(ef.size() == 4, $sformatf("%0d scales for the small configuration", ef.size()));
    snapshot();
    frame(4, 64, 48, 8, 200);
    reg_read(REG_STATUS, st);
    check(st[7:0] == 8'(ef.size()) && st[8] && !st[10], $sformatf("status %0h after frame 4", st));
    check_counts("frame 4");
    check_images(4, 64, 48, 1, "frame 4");
    for (int k = 0; k < N; k++) if (mpmc.writes[k] == writes_before[k]) idle_scus++;
    check(idle_scus == N - ef.size(), "idle SCUs");

    // ---- 5/6: factors late for the first frame
    reg_write(REG_IMG_WIDTH, 40);
    reg_write(REG_IMG_HEIGHT, 200);
    reg_write(REG_SCALE, 32'(to_fix(1.02, F)));
    reg_write(REG_WIN_WIDTH, 8);
    reg_write(REG_WIN_HEIGHT, 8);
    set_bases(2);
    expected_scales(1.02, 12, 40, 200, 8, 8);
    snapshot();
    frame(5, 40, 200, 4, 100);
    reg_read(REG_STATUS, st);
    check(st[10], "late factors flagged");
    reg_write(REG_STATUS, 0);   // clear the sticky flag
    for (int k = 0; k < N; k++)
      check(mpmc.writes[k] == writes_before[k], "nothing written in the late frame");
    frame(6, 40, 200, 4, 100);
    check_counts("frame 6");
    check_images(6, 40, 200, 2, "frame 6");

    // ---- 7: Haar-style configuration: scale 1.02, 24x24 window, 12 scales
    reg_write(REG_IMG_WIDTH, 320);
    reg_write(REG_IMG_HEIGHT, 240);
    reg_write(REG_SCALE, 32'(to_fix(1.02, F)));
    reg_write(REG_WIN_WIDTH, 24);
    reg_write(REG_WIN_HEIGHT, 24);
    reg_write(REG_NO_SCALES, 12);
    set_bases(3);
    expected_scales(1.02, 12, 320, 240, 24, 24);
    check(ef.size() == 12, "Haar configuration: 12 scales");
    snapshot();
    frame(7, 320, 240, 16, 400);
    reg_read(REG_STATUS, st);
    check(st[7:0] == 12 && st[8] && !st[10] && !st[11], $sformatf("status %0h after frame 7", st));
    check_counts("frame 7");
    check_images(7, 320, 240, 3, "frame 7");

    // ---- mechanisms
    $display("accepted rows %0d, switches %0d, computed rows %0d, flush pixels %0d, tail rows %0d",
             n_accept, n_switch, n_compute, n_flush, n_tail);
    $display("memory refusals %0d, overflow interrupts %0d, idle SCUs %0d",
             mpmc.refused, n_ovf_irq, idle_scus);
    check(n_accept > 0, "row accepted by CMP");
    check(n_switch > 0, "primary/secondary switch");
    check(n_compute > 0, "computed row");
    check(n_flush > 0, "right-edge flush pixel");
    check(n_tail > 0, "bottom-edge tail row");
    check(mpmc.refused > 0, "memory refusal");
    check(n_ovf_irq > 0, "overflow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
