// tb_gaussian_smooth: streams a random 20x14 image and compares every smoothed
// pixel with a direct 7x7 convolution by the sigma-2 kernel
// w = [5 10 14 16 14 10 5] (outer product), normalised by *766 >> 22; also
// checks the number of output samples.
module tb_gaussian_smooth;
  import orb_pkg::*;
  localparam int W = 20, H = 14;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic [XW-1:0] in_x = 0;
  logic [YW-1:0] in_y = 0;
  logic [7:0] in_pix = 0;
  logic o_valid;
  logic [XW-1:0] o_x;
  logic [YW-1:0] o_y;
  logic [7:0] o_pix;
  int img [H][W];
  int checks = 0, failures = 0, n = 0;
  int gw [7] = '{5, 10, 14, 16, 14, 10, 5};

  gaussian_smooth #(.W(W)) dut (.clk, .rst_n, .in_valid, .in_x, .in_y, .in_pix, .o_valid, .o_x, .o_y, .o_pix);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && o_valid) begin
    longint acc;
    int e;
    acc = 0;
    for (int dy = -3; dy <= 3; dy++) for (int dx = -3; dx <= 3; dx++)
      acc += gw[dy+3] * gw[dx+3] * img[o_y+dy][o_x+dx];
    e = int'((acc * 766) >> 22);
    if (e > 255) e = 255;
    checks++; n++;
    if (o_pix != 8'(e)) begin failures++; $display("(%0d,%0d) got %0d exp %0d", o_x, o_y, o_pix, e); end
  end

  initial begin
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) img[y][x] = (x > 9) ? 200 + $urandom % 56 : $urandom % 256;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) begin
      @(negedge clk); in_valid = 1; in_x = XW'(x); in_y = YW'(y); in_pix = 8'(img[y][x]);
      if ($urandom % 3 == 0) begin @(negedge clk); in_valid = 0; end
    end
    @(negedge clk); in_valid = 0;
    repeat (5) @(posedge clk);
    checks++;
    if (n != (W - 6) * (H - 6)) begin failures++; $display("outputs %0d", n); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
