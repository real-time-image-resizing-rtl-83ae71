// tb_mem_master: self-checking testbench of the memory control master.
//
// Every port gets its own random pixel stream, split into frames whose first
// pixel carries the first flag, and its own base address; the memory side
// accepts requests at random. For each port the testbench checks every
// accepted write, in order, against the expected (base + offset, pixel) pair,
// checks that a refused request is held unchanged (also asserted in the RTL),
// that a port moves one pixel per cycle when never refused, and the write
// counters.
module tb_mem_master;
  import resize_pkg::*;

  localparam int unsigned N = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [ADDR_W-1:0] base_addr [N];
  logic in_valid [N], in_ready [N], in_first [N], mem_ready [N];
  logic [PIX_W-1:0] in_pix [N];
  mem_wr_t mem_wr [N];
  logic [31:0] wr_count [N];

  mem_master #(.N_SCU(N)) dut (.clk, .rst_n, .base_addr, .in_valid, .in_ready, .in_pix,
                               .in_first, .mem_wr, .mem_ready, .wr_count);

  int checks = 0, failures = 0;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [ADDR_W+PIX_W-1:0] exp_q [N][$];
  int unsigned offs [N], nacc [N], ntot [N], in_pct, rdy_pct;
  mem_wr_t prev [N];
  logic    prev_stall [N];
  longint unsigned t_first [N], t_last [N];
  int cyc = 0;

  // sources and checkers, evaluated on the clock edge
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n)
      for (int k = 0; k < N; k++) begin
        if (prev_stall[k]) begin
          checks++;
          if (!mem_wr[k].valid || mem_wr[k].addr != prev[k].addr || mem_wr[k].data != prev[k].data) begin
            failures++; $display("port %0d: refused request changed", k);
          end
        end
        if (mem_wr[k].valid && mem_ready[k]) begin
          checks++;
          if (exp_q[k].size() == 0 || {mem_wr[k].addr, mem_wr[k].data} != exp_q[k][0]) begin
            failures++;
            if (failures < 10) $display("port %0d: wrote %0h@%0h", k, mem_wr[k].data, mem_wr[k].addr);
          end
          if (exp_q[k].size() != 0) void'(exp_q[k].pop_front());
          nacc[k]++;
          ntot[k]++;
          if (nacc[k] == 1) t_first[k] = cyc;
          t_last[k] = cyc;
        end
        prev[k] = mem_wr[k];
        prev_stall[k] = mem_wr[k].valid && !mem_ready[k];
        if (in_valid[k] && in_ready[k]) begin
          if (in_first[k]) offs[k] = 0;
          exp_q[k].push_back({base_addr[k] + ADDR_W'(offs[k]), in_pix[k]});
          offs[k]++;
        end
      end
  end

  always @(negedge clk) begin
    for (int k = 0; k < N; k++) begin
      mem_ready[k] = ($urandom_range(99) < rdy_pct);
      // a source may only change its offer once the previous one was taken
      if (!in_valid[k] || in_ready[k]) begin
        in_valid[k] = ($urandom_range(99) < in_pct);
        in_pix[k]   = PIX_W'($urandom);
        in_first[k] = ($urandom_range(49) == 0);
      end
    end
  end

  initial begin
    for (int k = 0; k < N; k++) begin
      base_addr[k] = ADDR_W'($urandom) & 32'hFFFF_0000;
      offs[k] = 0; nacc[k] = 0; ntot[k] = 0; prev_stall[k] = 0; prev[k] = '0;
      in_valid[k] = 0; in_pix[k] = 0; in_first[k] = 0; mem_ready[k] = 0;
    end
    in_pct = 60; rdy_pct = 60;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (5000) @(negedge clk);
    // full rate: every cycle offered and accepted
    in_pct = 100; rdy_pct = 100;
    repeat (20) @(negedge clk);
    for (int k = 0; k < N; k++) nacc[k] = 0;
    repeat (100) @(negedge clk);
    for (int k = 0; k < N; k++) begin
      checks++;
      if (nacc[k] < 99) begin failures++; $display("port %0d: %0d writes in 100 cycles", k, nacc[k]); end
    end
    in_pct = 0;
    repeat (10) @(negedge clk);
    for (int k = 0; k < N; k++) begin
      checks++;
      if (exp_q[k].size() != 0) begin failures++; $display("port %0d: %0d writes missing", k, exp_q[k].size()); end
      checks++;
      if (wr_count[k] != ntot[k]) begin failures++; $display("port %0d: wr_count %0d, %0d writes", k, wr_count[k], ntot[k]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
