// tb_orientation: streams a 64x48 image of random bright discs on noise through
// the orientation block and, for every position whose 31x31 patch is inside the
// image, compares
//  * the sector with round(atan2(m01, m10) / (360/N)) mod N computed directly
//    from the patch moments in floating point (positions within 0.02 sector of
//    a boundary are skipped),
//  * the 31-pixel column output with the image.
// Also checks the number of complete patches and that many sectors occur.
module tb_orientation;
  import orb_pkg::*;
  localparam int W = 64, H = 48, N = 32;
  localparam real PI = 3.14159265358979;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic [XW-1:0] in_x = 0;
  logic [YW-1:0] in_y = 0;
  logic [7:0] in_pix = 0;
  logic o_valid, o_ok;
  logic [XW-1:0] o_x;
  logic [YW-1:0] o_y;
  logic [1:0] o_q;
  logic [2:0] o_theta;
  logic [7:0] o_col [31];
  int img [H][W];
  int checks = 0, failures = 0, n_ok = 0, skipped = 0;
  bit seen [N];

  orientation #(.W(W), .N_SECT(N), .FIRST(0)) dut (
    .clk, .rst_n, .in_valid, .in_x, .in_y, .in_pix,
    .o_valid, .o_ok, .o_x, .o_y, .o_q, .o_theta, .o_col);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && o_valid && o_ok) begin
    longint m10, m01;
    real ang, pos;
    int e, got, cx, cy;
    cx = o_x; cy = o_y;
    m10 = 0; m01 = 0;
    for (int dy = -15; dy <= 15; dy++) for (int dx = -15; dx <= 15; dx++) begin
      m10 += dx * img[cy+dy][cx+dx];
      m01 += dy * img[cy+dy][cx+dx];
    end
    ang = $atan2(real'(m01), real'(m10));
    if (ang < 0) ang += 2.0 * PI;
    pos = ang / (2.0 * PI / N);
    e = int'($floor(pos + 0.5)) % N;
    got = int'(o_q) * (N / 4) + int'(o_theta);
    n_ok++;
    if (pos - $floor(pos) > 0.48 && pos - $floor(pos) < 0.52) skipped++;
    else begin
      checks++;
      seen[got] = 1;
      if (got != e) begin
        failures++;
        $display("(%0d,%0d) m10=%0d m01=%0d sector %0d exp %0d", cx, cy, m10, m01, got, e);
      end
    end
    for (int r = 0; r < 31; r++) begin
      checks++;
      if (o_col[r] != 8'(img[cy - 15 + r][cx + 15])) failures++;
    end
  end

  initial begin
    int nseen;
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) img[y][x] = 20 + $urandom % 10;
    for (int d = 0; d < 14; d++) begin
      int bx, by, br;
      bx = $urandom % W; by = $urandom % H; br = 3 + $urandom % 5;
      for (int y = 0; y < H; y++) for (int x = 0; x < W; x++)
        if ((x - bx) * (x - bx) + (y - by) * (y - by) <= br * br) img[y][x] = 150 + $urandom % 100;
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) begin
      @(negedge clk); in_valid = 1; in_x = XW'(x); in_y = YW'(y); in_pix = 8'(img[y][x]);
      if ($urandom % 4 == 0) begin @(negedge clk); in_valid = 0; end
    end
    @(negedge clk); in_valid = 0;
    repeat (6) @(posedge clk);
    checks++;
    if (n_ok != (W - 30) * (H - 30)) begin failures++; $display("patches %0d", n_ok); end
    nseen = 0;
    foreach (seen[i]) nseen += seen[i];
    checks++;
    if (nseen < N / 2) begin failures++; $display("only %0d sectors seen", nseen); end
    $display("sectors seen %0d, skipped %0d", nseen, skipped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
