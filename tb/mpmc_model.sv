// mpmc_model: behavioural model of the multi-port memory controller and the
// main memory behind it, for simulation only.
//
// N_PORTS byte-wide write ports. Each cycle at most MAX_GRANTS requests are
// accepted, lower port numbers first (port priority); a port that is granted
// is additionally refused at random with probability (100 - READY_PCT)% to
// imitate DRAM refresh and other traffic. Accepted bytes go into a sparse
// memory that the testbench reads with peek(); writes are counted per port.
module mpmc_model
  import resize_pkg::*;
#(
  parameter int unsigned N_PORTS    = NUM_SCU,
  parameter int unsigned MAX_GRANTS = NUM_SCU
) (
  input  logic    clk,
  input  logic    rst_n,
  input  mem_wr_t mem_wr    [N_PORTS],
  output logic    mem_ready [N_PORTS]
);

  int unsigned ready_pct = 100;
  logic [PIX_W-1:0] mem [longint];
  int unsigned writes [N_PORTS];
  int unsigned refused = 0;
  logic [N_PORTS-1:0] rnd;

  initial foreach (writes[k]) writes[k] = 0;

  always @(posedge clk)
    for (int k = 0; k < N_PORTS; k++) rnd[k] <= ($urandom_range(99) < ready_pct);

  always_comb begin
    int unsigned granted;
    granted = 0;
    for (int k = 0; k < N_PORTS; k++) begin
      mem_ready[k] = 1'b0;
      if (granted < MAX_GRANTS && rnd[k]) begin
        mem_ready[k] = 1'b1;
        if (mem_wr[k].valid) granted++;
      end
    end
  end

  always @(posedge clk) begin
    if (rst_n)
      for (int k = 0; k < N_PORTS; k++) begin
        if (mem_wr[k].valid && mem_ready[k]) begin
          mem[longint'(mem_wr[k].addr)] = mem_wr[k].data;
          writes[k]++;
        end else if (mem_wr[k].valid) begin
          refused++;
        end
      end
  end

  function automatic int peek(longint addr);
    return mem.exists(addr) ? int'(mem[addr]) : -1;
  endfunction

endmodule
