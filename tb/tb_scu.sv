// tb_scu: self-checking testbench of one Scale Computation Unit.
//
// Drives the broadcast pixel stream directly (vsync, then per row an hsync
// cycle, the pixels and a blanking gap), loads the SCU's factor during row 0
// as the controller does, and compares every output pixel, in order, with the
// reference model. Cases cover small and large factors, factor 1.0, frames
// with gaps between pixels, back-pressure from the memory side, a frame at the
// reference 320x240 size with factor 1.05^12, and a stalled output that must
// overflow the output row buffer. It also checks the latency: with no
// back-pressure the last output pixel follows the last input pixel within 6
// cycles.
module tb_scu;
  import resize_pkg::*;
  import tb_resize_ref_pkg::*;

  localparam int unsigned WMAX = 320;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          cfg_load;
  scu_cfg_t      cfg_in;
  pix_stream_t   stream;
  logic [DIM_W-1:0] img_w, img_h;
  logic          out_valid, out_ready, out_first, overflow;
  logic [PIX_W-1:0] out_pix;

  scu #(.W_MAX(WMAX)) dut (
    .clk, .rst_n, .img_w, .img_h, .cfg_load, .cfg_in, .stream,
    .out_valid, .out_ready, .out_pix, .out_first, .overflow
  );

  int checks = 0, failures = 0;
  int unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #(20_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected-output bookkeeping
  int unsigned e_seed, e_W, e_H, e_w, e_h, e_i, e_j, n_out, n_ovf;
  longint unsigned e_f;
  int unsigned ready_pct;
  int unsigned last_out_cyc;

  always @(posedge clk) begin
    if (rst_n) begin
      out_ready <= ($urandom_range(99) < ready_pct);
      if (overflow) n_ovf++;
      if (out_valid && out_ready) begin
        int unsigned exp_p;
        exp_p = ref_pix(e_seed, e_W, e_H, e_f, FRAC_BITS, e_i, e_j);
        checks++;
        if (out_pix != exp_p[PIX_W-1:0] || out_first != (e_i == 0 && e_j == 0)) begin
          failures++;
          if (failures < 10)
            $display("mismatch f=%0d (%0d,%0d): got %0d first=%0d expected %0d",
                     e_f, e_i, e_j, out_pix, out_first, exp_p);
        end
        n_out++;
        last_out_cyc = cyc;
        if (e_j + 1 == e_w) begin e_j = 0; e_i++; end else e_j++;
      end
    end
  end

  task automatic idle(int n);
    repeat (n) begin
      @(negedge clk);
      stream = '0;
    end
  endtask

  // Stream one frame; the SCU gets its configuration during row 0.
  task automatic send_frame(int unsigned seed, int unsigned W, int unsigned H,
                            longint unsigned f, int unsigned gap_pct, bit count_check,
                            output int unsigned last_in_cyc);
    int unsigned w, h;
    w = scaled_size(W, f, FRAC_BITS);
    h = scaled_size(H, f, FRAC_BITS);
    e_seed = seed; e_W = W; e_H = H; e_f = f; e_w = w; e_h = h; e_i = 0; e_j = 0;
    n_out = 0;
    img_w = DIM_W'(W); img_h = DIM_W'(H);
    @(negedge clk); stream = '0; stream.vsync = 1;
    for (int unsigned r = 0; r <= H; r++) begin   // row H is the tail row
      @(negedge clk); stream = '0; stream.hsync = 1; stream.row = DIM_W'(r);
      cfg_load = 0;
      for (int unsigned c = 0; c < W; c++) begin
        while ($urandom_range(99) < gap_pct) begin
          @(negedge clk); stream.hsync = 0; stream.valid = 0;
          cfg_load = 0;
        end
        @(negedge clk);
        stream.hsync = 0; stream.valid = 1;
        stream.pix = (r < H) ? PIX_W'(src_pix(seed, r, c)) : '0;
        stream.col = DIM_W'(c);
        last_in_cyc = cyc;
        cfg_load = (r == 0 && c == W / 2);
        cfg_in.active = 1; cfg_in.factor = FACT_W'(f);
        cfg_in.dst_w = DIM_W'(w); cfg_in.dst_h = DIM_W'(h);
      end
      @(negedge clk); stream.valid = 0; cfg_load = 0;
      idle(4);
    end
    idle(W + 20);  // drain
    if (count_check) checks++;
    if (count_check && n_out != w * h) begin
      failures++;
      $display("frame f=%0d %0dx%0d: %0d outputs, expected %0d", f, W, H, n_out, w * h);
    end
  endtask

  initial begin
    int unsigned t_in;
    longint unsigned f12;
    stream = '0; cfg_load = 0; cfg_in = '0; img_w = 0; img_h = 0;
    ready_pct = 100; n_ovf = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // factor 1.05 on a small frame, no back-pressure, check latency
    send_frame(1, 40, 30, to_fix(1.05, FRAC_BITS), 0, 1, t_in);
    checks++;
    if (last_out_cyc - t_in > 6) begin
      failures++;
      $display("latency %0d cycles after last input", last_out_cyc - t_in);
    end
    // assorted factors, gaps in the input and back-pressure at the output
    ready_pct = 85;
    send_frame(2, 40, 30, to_fix(1.5, FRAC_BITS), 20, 1, t_in);
    send_frame(3, 37, 23, to_fix(2.0, FRAC_BITS), 10, 1, t_in);
    send_frame(4, 50, 41, to_fix(3.7, FRAC_BITS), 0, 1, t_in);
    send_frame(5, 31, 17, to_fix(1.0, FRAC_BITS), 0, 1, t_in);
    send_frame(6, 45, 33, to_fix(1.2345678, FRAC_BITS), 30, 1, t_in);
    // reference size: 320x240 at 1.05^12 (178x134)
    ready_pct = 100;
    f12 = to_fix(1.05, FRAC_BITS);
    for (int k = 1; k < 12; k++) f12 = (f12 * to_fix(1.05, FRAC_BITS)) >> FRAC_BITS;
    send_frame(7, 320, 240, f12, 0, 1, t_in);
    checks++;
    if (e_w != 178 || e_h != 134) begin
      failures++;
      $display("scaled size %0dx%0d, expected 178x134", e_w, e_h);
    end
    checks++;
    if (n_ovf != 0) begin failures++; $display("unexpected overflow"); end
    // stalled memory side: the output row buffer must overflow
    ready_pct = 0;
    send_frame(8, 64, 20, to_fix(1.1, FRAC_BITS), 0, 0, t_in);
    checks++;
    if (n_ovf == 0) begin failures++; $display("no overflow with a stalled output"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
