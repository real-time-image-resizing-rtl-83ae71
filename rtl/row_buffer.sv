// row_buffer: one input (I/P) row buffer of a Scale Computation Unit.
//
// A single-port-per-direction RAM of DEPTH pixels addressed by two modulo-n
// counters, n being the frame width: the write counter advances on every
// written pixel, the read counter on every read, and each wraps from n-1 to 0.
// Pixels are therefore stored and fetched serially in scan order without an
// external address. `restart` (driven by the row start) returns both counters
// to 0.
//
// Timing: a write lands at the end of the cycle with we=1. A read issued with
// re=1 in cycle t returns its pixel on rdata in cycle t+1 (registered RAM
// output). Modulo-n counters follow the design description; the registered
// read is this design's choice so the RAM maps to block memory.
module row_buffer
  import resize_pkg::*;
#(
  parameter int unsigned DEPTH = MAX_W,
  parameter int unsigned PW    = PIX_W,
  parameter int unsigned CW    = DIM_W
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [CW-1:0] n,        // modulus: frame width, 1..DEPTH
  input  logic          restart,
  input  logic          we,
  input  logic [PW-1:0] wdata,
  input  logic          re,
  output logic [PW-1:0] rdata
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [PW-1:0] mem [DEPTH];
  logic [CW-1:0] wr_ctr, rd_ctr;

  function automatic logic [CW-1:0] next_mod(input logic [CW-1:0] v, input logic [CW-1:0] m);
    return (v + 1'b1 >= m) ? '0 : v + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ctr <= '0;
      rd_ctr <= '0;
    end else if (restart) begin
      wr_ctr <= '0;
      rd_ctr <= '0;
    end else begin
      if (we) wr_ctr <= next_mod(wr_ctr, n);
      if (re) rd_ctr <= next_mod(rd_ctr, n);
    end
  end

  always_ff @(posedge clk) begin
    if (we) mem[AW'(wr_ctr)] <= wdata;
    if (re) rdata <= mem[AW'(rd_ctr)];
  end

endmodule
