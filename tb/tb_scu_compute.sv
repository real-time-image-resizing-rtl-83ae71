// tb_scu_compute: self-checking testbench of the bilinear compute unit.
//
// Feeds random neighbour pixels and fractional positions (plus the corner
// cases x_diff = y_diff = 0 and the largest fractions), one per cycle with
// random idle cycles, and checks every result against a 64-bit reference
// evaluation of the four-term formula with FLOOR. Also checks that each result
// appears exactly two cycles after its input, with its tag.
module tb_scu_compute;
  import resize_pkg::*;

  localparam int unsigned F = FRAC_BITS;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          in_valid;
  logic [PIX_W-1:0] a, b, c, d;
  logic [F-1:0]  xd, yd;
  logic [7:0]    tag_in, tag_out;
  logic          out_valid;
  logic [PIX_W-1:0] out_pix;

  scu_compute #(.TAG_W(8)) dut (
    .clk, .rst_n, .in_valid, .a, .b, .c, .d, .x_diff(xd), .y_diff(yd),
    .in_tag(tag_in), .out_valid, .out_pix, .out_tag(tag_out)
  );

  int checks = 0, failures = 0;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected results, indexed by the cycle they must appear in
  int unsigned exp_pix [int];
  int unsigned exp_tag [int];
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  function automatic int unsigned model(int unsigned pa, int unsigned pb, int unsigned pc,
                                        int unsigned pd, longint unsigned x, longint unsigned y);
    longint unsigned one, s;
    one = 64'd1 << F;
    s = pa * (one - x) * (one - y) + pb * x * (one - y) + pc * y * (one - x) + pd * x * y;
    return int'(s >> (2 * F));
  endfunction

  always @(posedge clk) begin
    if (rst_n) begin
      if (out_valid) begin
        checks++;
        if (!exp_pix.exists(cyc)) begin
          failures++;
          $display("unexpected output at cycle %0d", cyc);
        end else if (out_pix != exp_pix[cyc][PIX_W-1:0] || tag_out != exp_tag[cyc][7:0]) begin
          failures++;
          if (failures < 10) $display("cycle %0d: got %0d expected %0d", cyc, out_pix, exp_pix[cyc]);
        end
        exp_pix.delete(cyc);
      end else if (exp_pix.exists(cyc)) begin
        failures++; checks++;
        $display("missing output at cycle %0d", cyc);
        exp_pix.delete(cyc);
      end
    end
  end

  initial begin
    in_valid = 0; a = 0; b = 0; c = 0; d = 0; xd = 0; yd = 0; tag_in = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      in_valid = ($urandom_range(3) != 0);
      a = PIX_W'($urandom); b = PIX_W'($urandom); c = PIX_W'($urandom); d = PIX_W'($urandom);
      xd = F'($urandom); yd = F'($urandom);
      case (n % 50)
        0: begin xd = 0; yd = 0; end
        1: begin xd = '1; yd = '1; end
        2: begin xd = '1; yd = 0; a = 8'hFF; b = 8'hFF; c = 8'hFF; d = 8'hFF; end
        3: begin xd = F'(1) << (F - 1); yd = 0; end
        default: ;
      endcase
      tag_in = 8'(n);
      if (in_valid) begin
        // the input is sampled at the next edge (cycle cyc), result at cyc+2
        exp_pix[cyc + 2] = model(a, b, c, d, xd, yd);
        exp_tag[cyc + 2] = tag_in;
      end
    end
    @(negedge clk); in_valid = 0;
    repeat (5) @(negedge clk);
    checks++;
    if (exp_pix.num() != 0) begin failures++; $display("%0d results never came", exp_pix.num()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
