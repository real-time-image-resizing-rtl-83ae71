// mem_master: memory control master interface between the SCUs and the
// multi-port memory controller.
//
// Each SCU owns one write port of the memory controller, so all scaled images
// are written at the same time into their own memory-mapped regions. For port
// k the master takes the next pixel from SCU k's output row buffer and issues
// a one-byte write to base_addr[k] + n, where n counts the pixels of the
// current scaled frame; a pixel flagged as the first of a frame restarts n at
// 0, so frame k is stored row by row, dst_w bytes per row.
//
// Interface per port: SCU side valid/ready (in_valid, in_ready, in_pix,
// in_first); memory side a request (mem_wr: valid, addr, data) that is held
// until the controller accepts it with mem_ready. A new request can be issued
// in the cycle the previous one is accepted, so a port moves one pixel per
// cycle while mem_ready stays high. `wr_count` counts the writes accepted on
// each port. One port per SCU and byte-wide writes are this design's choices.
module mem_master
  import resize_pkg::*;
#(
  parameter int unsigned N_SCU = NUM_SCU
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [ADDR_W-1:0] base_addr [N_SCU],
  input  logic              in_valid  [N_SCU],
  output logic              in_ready  [N_SCU],
  input  logic [PIX_W-1:0]  in_pix    [N_SCU],
  input  logic              in_first  [N_SCU],
  output mem_wr_t           mem_wr    [N_SCU],
  input  logic              mem_ready [N_SCU],
  output logic [31:0]       wr_count  [N_SCU]
);

  for (genvar k = 0; k < N_SCU; k++) begin : g_port
    logic [ADDR_W-1:0] offset;

    // a slot is free when nothing is pending or the pending write is taken now
    assign in_ready[k] = !mem_wr[k].valid || mem_ready[k];

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        mem_wr[k]   <= '0;
        offset      <= '0;
        wr_count[k] <= '0;
      end else begin
        if (mem_wr[k].valid && mem_ready[k]) wr_count[k] <= wr_count[k] + 1;
        if (in_ready[k]) begin
          mem_wr[k].valid <= in_valid[k];
          if (in_valid[k]) begin
            mem_wr[k].addr <= base_addr[k] + (in_first[k] ? '0 : offset);
            mem_wr[k].data <= in_pix[k];
            offset         <= (in_first[k] ? '0 : offset) + 1'b1;
          end
        end
      end
    end

    // a pending request must stay stable until it is accepted
    a_hold: assert property (@(posedge clk) disable iff (!rst_n)
      mem_wr[k].valid && !mem_ready[k] |=> mem_wr[k].valid && $stable(mem_wr[k].addr)
                                           && $stable(mem_wr[k].data));
  end

endmodule
