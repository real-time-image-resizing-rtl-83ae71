// out_fifo: output (O/P) row buffer of a Scale Computation Unit.
//
// A first-in first-out buffer of DEPTH entries (one output row by default)
// that decouples the SCU, which produces pixels at the video rate, from the
// memory port, which may stall. Push data is dropped when the buffer is full
// and `overflow` pulses for that cycle.
// Interface: push/push_data in; pop side is valid/ready (pop_valid high while
// not empty, an entry leaves in a cycle with pop_valid && pop_ready; pop_data
// shows the oldest entry). Timing: a pushed entry is visible on the pop side
// the next cycle. The buffer follows the design description; depth, drop
// policy and handshake are this design's choices.
module out_fifo #(
  parameter int unsigned DEPTH = 320,
  parameter int unsigned DW    = 9
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          flush,
  input  logic          push,
  input  logic [DW-1:0] push_data,
  output logic          pop_valid,
  input  logic          pop_ready,
  output logic [DW-1:0] pop_data,
  output logic          overflow
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [DW-1:0] mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic [AW:0]   count;

  logic do_push, do_pop;
  assign pop_valid = (count != '0);
  assign do_pop    = pop_valid && pop_ready;
  assign do_push   = push && (count != (AW+1)'(DEPTH));
  assign pop_data  = mem[rp];

  function automatic logic [AW-1:0] inc(input logic [AW-1:0] p);
    return (p == AW'(DEPTH-1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp       <= '0;
      rp       <= '0;
      count    <= '0;
      overflow <= 1'b0;
    end else if (flush) begin
      wp       <= '0;
      rp       <= '0;
      count    <= '0;
      overflow <= 1'b0;
    end else begin
      overflow <= push && !do_push;
      if (do_push) wp <= inc(wp);
      if (do_pop)  rp <= inc(rp);
      count <= count + (AW+1)'(do_push) - (AW+1)'(do_pop);
    end
  end

  always_ff @(posedge clk) begin
    if (do_push) mem[wp] <= push_data;
  end

endmodule
