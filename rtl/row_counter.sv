// row_counter: counts the rows of the incoming video frame.
//
// Triggered by the row-start pulse (hsync) of the input device. vsync marks the
// start of a frame; the first hsync after it gives row 0, each further hsync
// adds one. `in_frame` is high from that first row to the next vsync.
// Timing: row changes at the end of the hsync cycle and is stable for the
// whole row. Counting on hsync follows the design description; the vsync
// handling is this design's choice.
module row_counter
  import resize_pkg::*;
#(
  parameter int unsigned CW = DIM_W
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          vsync,
  input  logic          hsync,
  output logic [CW-1:0] row,
  output logic          in_frame
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      row      <= '0;
      in_frame <= 1'b0;
    end else if (vsync) begin
      row      <= '0;
      in_frame <= 1'b0;
    end else if (hsync) begin
      row      <= in_frame ? row + 1'b1 : '0;
      in_frame <= 1'b1;
    end
  end

endmodule
