// tb_row_counter: self-checking testbench of the row counter.
//
// Sends frames with a random number of rows and random gaps between hsync
// pulses and checks after every hsync that the count equals the number of
// rows seen since vsync minus one, that in_frame is low between vsync and the
// first hsync and high afterwards, and that vsync restarts the count.
module tb_row_counter;
  import resize_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic vsync, hsync, in_frame;
  logic [DIM_W-1:0] row;

  row_counter dut (.clk, .rst_n, .vsync, .hsync, .row, .in_frame);

  int checks = 0, failures = 0;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit exp_in, int exp_row);
    checks++;
    if (in_frame != exp_in || (exp_in && row != DIM_W'(exp_row))) begin
      failures++;
      $display("row=%0d in_frame=%0d, expected %0d/%0d", row, in_frame, exp_row, exp_in);
    end
  endtask

  initial begin
    int rows;
    vsync = 0; hsync = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 30; f++) begin
      rows = $urandom_range(300, 1);
      @(negedge clk); vsync = 1;
      @(negedge clk); vsync = 0;
      check(0, 0);
      for (int r = 0; r < rows; r++) begin
        repeat ($urandom_range(3)) @(negedge clk);
        hsync = 1;
        @(negedge clk); hsync = 0;
        check(1, r);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
