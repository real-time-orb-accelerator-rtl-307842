// tb_image_scaler: streams a random 16x8 image and checks every output pixel
// against the truncated mean of its 2x2 block and its half-size coordinate.
module tb_image_scaler;
  import orb_pkg::*;
  localparam int W = 16, H = 8;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic [XW-1:0] in_x = 0;
  logic [YW-1:0] in_y = 0;
  logic [7:0] in_pix = 0;
  logic o_valid;
  logic [XW-1:0] o_x;
  logic [YW-1:0] o_y;
  logic [7:0] o_pix;
  logic [7:0] img [H][W];
  int checks = 0, failures = 0, outs = 0;

  image_scaler #(.W(W)) dut (.clk, .rst_n, .in_valid, .in_x, .in_y, .in_pix, .o_valid, .o_x, .o_y, .o_pix);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && o_valid) begin
    int e;
    e = (int'(img[2*o_y][2*o_x]) + img[2*o_y][2*o_x+1] + img[2*o_y+1][2*o_x] + img[2*o_y+1][2*o_x+1]) / 4;
    checks++; outs++;
    if (o_pix != 8'(e)) begin
      failures++;
      $display("(%0d,%0d) got %0d exp %0d", o_x, o_y, o_pix, e);
    end
  end

  initial begin
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) img[y][x] = 8'($urandom);
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) begin
      @(negedge clk); in_valid = 1; in_x = XW'(x); in_y = YW'(y); in_pix = img[y][x];
      if ($urandom % 3 == 0) begin @(negedge clk); in_valid = 0; end
    end
    @(negedge clk); in_valid = 0;
    repeat (4) @(posedge clk);
    checks++;
    if (outs != W * H / 4) begin failures++; $display("outputs %0d", outs); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
