// tb_rgb2bw: random RGB pixels with random gaps over two short frames; checks
// the BT.601 grey value and the raster position of every output pixel.
module tb_rgb2bw;
  import orb_pkg::*;
  localparam int W = 8;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_sof = 0;
  logic [7:0] r = 0, g = 0, b = 0;
  logic o_valid, o_sof;
  logic [XW-1:0] o_x;
  logic [YW-1:0] o_y;
  logic [7:0] o_pix;
  int checks = 0, failures = 0;

  rgb2bw #(.W(W)) dut (.clk, .rst_n, .in_valid, .in_sof, .in_r(r), .in_g(g), .in_b(b),
                       .o_valid, .o_sof, .o_x, .o_y, .o_pix);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int exp_x, exp_y, exp_p, n;
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 2; f++) begin
      n = 0;
      while (n < W * 5) begin
        @(negedge clk);
        in_valid = ($urandom % 4) != 0;
        in_sof   = in_valid && n == 0;
        r = 8'($urandom); g = 8'($urandom); b = 8'($urandom);
        exp_p = (77 * r + 150 * g + 29 * b + 128) / 256;
        exp_x = n % W; exp_y = n / W;
        @(posedge clk); #1;
        if (in_valid) begin
          checks++;
          if (!o_valid || o_pix != 8'(exp_p) || o_x != XW'(exp_x) || o_y != YW'(exp_y) ||
              o_sof != (n == 0)) begin
            failures++;
            $display("mismatch n=%0d pix %0d/%0d x %0d/%0d y %0d/%0d", n, o_pix, exp_p, o_x, exp_x, o_y, exp_y);
          end
          n++;
        end else begin
          checks++;
          if (o_valid) failures++;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
