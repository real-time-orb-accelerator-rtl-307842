// tb_fast_corner: streams a 48x40 test image (noise plus bright and dark
// rectangles, whose corners are FAST corners) through fast_corner and checks
//  * every per-pixel score against an independent FAST-9 model (16-pixel
//    circle, 9 contiguous brighter/darker, score = sum |p - c|),
//  * the reported features against the model's 3x3 non-maximum suppression,
//    in raster order, including the feature count,
//  * the score latency (2 cycles after pixel (x+3, y+3)).
module tb_fast_corner;
  import orb_pkg::*;
  localparam int W = 48, H = 40, BRD = 6, T = 20;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic [XW-1:0] in_x = 0;
  logic [YW-1:0] in_y = 0;
  logic [7:0] in_pix = 0;
  logic s_valid, f_valid;
  logic [XW-1:0] s_x, f_x;
  logic [YW-1:0] s_y, f_y;
  logic [SCORE_W-1:0] s_score, f_score;
  int checks = 0, failures = 0;
  int img [H][W];
  int score [H][W];
  int exp_fx [$], exp_fy [$], exp_fs [$];
  int n_scores = 0, n_feat = 0;

  fast_corner #(.W(W), .H(H), .BRD(BRD)) dut (
    .clk, .rst_n, .in_valid, .in_x, .in_y, .in_pix, .threshold(8'(T)),
    .s_valid, .s_x, .s_y, .s_score, .f_valid, .f_x, .f_y, .f_score);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_score(int x, int y);
    int dx [16] = '{0, 1, 2, 3, 3, 3, 2, 1, 0, -1, -2, -3, -3, -3, -2, -1};
    int dy [16] = '{-3, -3, -2, -1, 0, 1, 2, 3, 3, 3, 2, 1, 0, -1, -2, -3};
    int c, p, sad, best_b, best_d, run_b, run_d;
    c = img[y][x]; sad = 0; best_b = 0; best_d = 0; run_b = 0; run_d = 0;
    // walk the circle twice to catch wrapping runs
    for (int k = 0; k < 32; k++) begin
      p = img[y + dy[k % 16]][x + dx[k % 16]];
      if (k < 16) sad += (p > c) ? p - c : c - p;
      run_b = (p > c + T) ? run_b + 1 : 0;
      run_d = (p < c - T) ? run_d + 1 : 0;
      if (run_b > best_b) best_b = run_b;
      if (run_d > best_d) best_d = run_d;
    end
    return (best_b >= 9 || best_d >= 9) ? sad : 0;
  endfunction

  // score stream check
  always @(posedge clk) if (rst_n && s_valid) begin
    checks++; n_scores++;
    if (s_score != SCORE_W'(score[s_y][s_x])) begin
      failures++;
      $display("score (%0d,%0d) got %0d exp %0d", s_x, s_y, s_score, score[s_y][s_x]);
    end
  end

  // feature check
  always @(posedge clk) if (rst_n && f_valid) begin
    checks++; n_feat++;
    if (exp_fx.size() == 0) begin
      failures++; $display("unexpected feature (%0d,%0d)", f_x, f_y);
    end else begin
      if (f_x != XW'(exp_fx[0]) || f_y != YW'(exp_fy[0]) || f_score != SCORE_W'(exp_fs[0])) begin
        failures++;
        $display("feature got (%0d,%0d,%0d) exp (%0d,%0d,%0d)", f_x, f_y, f_score, exp_fx[0], exp_fy[0], exp_fs[0]);
      end
      void'(exp_fx.pop_front()); void'(exp_fy.pop_front()); void'(exp_fs.pop_front());
    end
  end

  initial begin
    // image: noise + rectangles
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) img[y][x] = 60 + $urandom % 8;
    for (int y = 10; y < 20; y++) for (int x = 10; x < 22; x++) img[y][x] = 200;
    for (int y = 24; y < 33; y++) for (int x = 28; x < 40; x++) img[y][x] = 5;
    for (int y = 8; y < 12; y++) for (int x = 32; x < 36; x++) img[y][x] = 180;
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++)
      score[y][x] = (x >= 3 && x < W - 3 && y >= 3 && y < H - 3) ? ref_score(x, y) : 0;
    for (int y = BRD; y < H - BRD; y++) for (int x = BRD; x < W - BRD; x++) begin
      int c; bit keep;
      c = score[y][x];
      keep = c > 0 && c > score[y-1][x-1] && c > score[y-1][x] && c > score[y-1][x+1] &&
             c > score[y][x-1] && c >= score[y][x+1] && c >= score[y+1][x-1] &&
             c >= score[y+1][x] && c >= score[y+1][x+1];
      if (keep) begin exp_fx.push_back(x); exp_fy.push_back(y); exp_fs.push_back(c); end
    end
    $display("expected features: %0d", exp_fx.size());
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) begin
      @(negedge clk); in_valid = 1; in_x = XW'(x); in_y = YW'(y); in_pix = 8'(img[y][x]);
      if (x == 20 && y == 20) begin
        // latency check on the pixel whose score is (17,17)
        fork begin
          int k;
          @(posedge clk);
          k = 0;
          do begin @(posedge clk); #1; k++; end while (!(s_valid && s_x == XW'(17) && s_y == YW'(17)) && k < 10);
          checks++;
          // pixel presented in cycle T, score visible in cycle T+2
          if (k != 1) begin failures++; $display("score latency %0d", k); end
        end join_none
      end
      if ($urandom % 4 == 0) begin @(negedge clk); in_valid = 0; end
    end
    @(negedge clk); in_valid = 0;
    repeat (10) @(posedge clk);
    checks++;
    if (exp_fx.size() != 0 || n_feat == 0) begin
      failures++; $display("missing features: %0d, found %0d", exp_fx.size(), n_feat);
    end
    checks++;
    if (n_scores != (W - 6) * (H - 6)) begin failures++; $display("score samples %0d", n_scores); end
    $display("features %0d", n_feat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
