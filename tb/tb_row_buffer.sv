// tb_row_buffer: self-checking testbench of an input row buffer.
//
// Writes rows of random length n (the modulus) with random pixels and random
// gaps, then reads them back serially and checks every pixel against a copy
// kept by the testbench, including the wrap of both counters from n-1 to 0
// (a second pass of reads without restart returns the row again) and the
// one-cycle read latency. Writing and reading one row while the previous row
// is read back is covered as well.
module tb_row_buffer;
  import resize_pkg::*;

  localparam int unsigned DEPTH = 64;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [DIM_W-1:0] n;
  logic restart, we, re;
  logic [PIX_W-1:0] wdata, rdata;

  row_buffer #(.DEPTH(DEPTH)) dut (.clk, .rst_n, .n, .restart, .we, .wdata, .re, .rdata);

  int checks = 0, failures = 0;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [PIX_W-1:0] model [DEPTH];
  logic             exp_v;
  logic [PIX_W-1:0] exp_d;

  // read data check: one cycle after re
  always @(posedge clk) begin
    if (exp_v) begin
      checks++;
      if (rdata != exp_d) begin
        failures++;
        if (failures < 10) $display("read %0h expected %0h", rdata, exp_d);
      end
    end
  end

  initial begin
    int unsigned len;
    n = 0; restart = 0; we = 0; re = 0; wdata = 0; exp_v = 0; exp_d = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 40; t++) begin
      len = $urandom_range(DEPTH, 1);
      @(negedge clk); n = DIM_W'(len); restart = 1; exp_v = 0;
      @(negedge clk); restart = 0;
      // write one row (with gaps)
      for (int unsigned c = 0; c < len; c++) begin
        while ($urandom_range(3) == 0) begin @(negedge clk); we = 0; end
        @(negedge clk);
        we = 1; wdata = PIX_W'($urandom); model[c] = wdata;
      end
      @(negedge clk); we = 0;
      // read it twice without restart: the read counter wraps at n
      for (int unsigned pass = 0; pass < 2; pass++)
        for (int unsigned c = 0; c < len; c++) begin
          re = 1;
          @(posedge clk); #1 exp_v = 1; exp_d = model[c];
          @(negedge clk);
          re = 0;
          @(posedge clk); #1 exp_v = 0;
          @(negedge clk);
        end
      // the write counter wrapped too: a new write lands at column 0
      @(negedge clk); we = 1; wdata = ~model[0]; model[0] = wdata;
      @(negedge clk); we = 0; restart = 1;
      @(negedge clk); restart = 0; re = 1;
      @(posedge clk); #1 exp_v = 1; exp_d = model[0];
      @(negedge clk); re = 0;
      @(posedge clk); #1 exp_v = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
