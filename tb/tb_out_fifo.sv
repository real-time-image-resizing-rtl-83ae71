// tb_out_fifo: self-checking testbench of the output row buffer.
//
// Pushes and pops at random rates and compares the popped stream with a
// queue model; checks that a push into a full buffer is dropped with an
// overflow pulse, that nothing is popped from an empty buffer, that the buffer
// holds exactly DEPTH entries, and that flush empties it.
module tb_out_fifo;
  localparam int unsigned DEPTH = 20;
  localparam int unsigned DW = 9;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic flush, push, pop_valid, pop_ready, overflow;
  logic [DW-1:0] push_data, pop_data;

  out_fifo #(.DEPTH(DEPTH), .DW(DW)) dut (
    .clk, .rst_n, .flush, .push, .push_data, .pop_valid, .pop_ready, .pop_data, .overflow
  );

  int checks = 0, failures = 0;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [DW-1:0] q [$];
  bit exp_ovf;
  int n_ovf = 0;
  int push_pct = 50, pop_pct = 50;

  always @(posedge clk) begin
    if (rst_n && !flush) begin
      // check the pop side, then update the model with this cycle's actions
      checks++;
      if (pop_valid != (q.size() != 0) || (pop_valid && pop_data != q[0])) begin
        failures++;
        if (failures < 10) $display("pop_valid=%0d data=%0h, model size %0d", pop_valid, pop_data, q.size());
      end
      exp_ovf = push && (q.size() == DEPTH);
      if (pop_valid && pop_ready) void'(q.pop_front());
      if (push && !exp_ovf) q.push_back(push_data);
      #1;
      checks++;
      if (overflow != exp_ovf) begin failures++; $display("overflow %0d expected %0d", overflow, exp_ovf); end
      if (overflow) n_ovf++;
    end
  end

  initial begin
    flush = 0; push = 0; pop_ready = 0; push_data = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int phase = 0; phase < 4; phase++) begin
      case (phase)
        0: begin push_pct = 50; pop_pct = 50; end
        1: begin push_pct = 90; pop_pct = 10; end   // fills, overflows
        2: begin push_pct = 10; pop_pct = 90; end   // drains, underflow guard
        3: begin push_pct = 100; pop_pct = 100; end
      endcase
      repeat (3000) begin
        @(negedge clk);
        push = ($urandom_range(99) < push_pct);
        pop_ready = ($urandom_range(99) < pop_pct);
        push_data = DW'($urandom);
      end
    end
    // fill exactly DEPTH entries, then flush
    @(negedge clk); push = 0; pop_ready = 1;
    repeat (DEPTH + 2) @(negedge clk);
    pop_ready = 0; push = 1;
    repeat (DEPTH) @(negedge clk);
    push = 0;
    @(negedge clk);
    checks++;
    if (q.size() != DEPTH || overflow) begin failures++; $display("capacity %0d", q.size()); end
    flush = 1;
    @(negedge clk); flush = 0; q.delete();
    @(negedge clk);
    checks++;
    if (pop_valid) begin failures++; $display("not empty after flush"); end
    checks++;
    if (n_ovf == 0) begin failures++; $display("overflow never seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
