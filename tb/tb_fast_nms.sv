// tb_fast_nms: streams a random sparse score map (with plateaus of equal
// scores) through fast_nms and compares the reported features, in raster order,
// with an independent 3x3 non-maximum suppression that keeps the first pixel of
// a tie in raster order and honours the border.
module tb_fast_nms;
  import orb_pkg::*;
  localparam int W = 24, H = 20, BRD = 3;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic [XW-1:0] in_x = 0;
  logic [YW-1:0] in_y = 0;
  logic [SCORE_W-1:0] in_score = 0;
  logic f_valid;
  logic [XW-1:0] f_x;
  logic [YW-1:0] f_y;
  logic [SCORE_W-1:0] f_score;
  int sc [H][W];
  int ex [$], ey [$];
  int checks = 0, failures = 0, nf = 0;

  fast_nms #(.W(W), .H(H), .BRD(BRD)) dut (.clk, .rst_n, .in_valid, .in_x, .in_y, .in_score,
                                          .f_valid, .f_x, .f_y, .f_score);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && f_valid) begin
    checks++; nf++;
    if (ex.size() == 0 || f_x != XW'(ex[0]) || f_y != YW'(ey[0]) || f_score != SCORE_W'(sc[f_y][f_x])) begin
      failures++;
      $display("got (%0d,%0d,%0d) exp (%0d,%0d)", f_x, f_y, f_score, ex.size() ? ex[0] : -1, ey.size() ? ey[0] : -1);
    end
    if (ex.size()) begin void'(ex.pop_front()); void'(ey.pop_front()); end
  end

  initial begin
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++)
      sc[y][x] = ($urandom % 4 == 0) ? 1 + $urandom % 6 : 0;   // small range: many ties
    for (int y = BRD; y < H - BRD; y++) for (int x = BRD; x < W - BRD; x++) begin
      int c; bit keep;
      c = sc[y][x];
      keep = c != 0;
      for (int dy = -1; dy <= 1; dy++) for (int dx = -1; dx <= 1; dx++) begin
        int is_prev;
        is_prev = (dy < 0) || (dy == 0 && dx < 0);
        if (!(dx == 0 && dy == 0)) begin
          if (is_prev && !(c > sc[y+dy][x+dx])) keep = 0;
          if (!is_prev && !(c >= sc[y+dy][x+dx])) keep = 0;
        end
      end
      if (keep) begin ex.push_back(x); ey.push_back(y); end
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) begin
      @(negedge clk); in_valid = 1; in_x = XW'(x); in_y = YW'(y); in_score = SCORE_W'(sc[y][x]);
      if ($urandom % 3 == 0) begin @(negedge clk); in_valid = 0; end
    end
    @(negedge clk); in_valid = 0;
    repeat (5) @(posedge clk);
    checks++;
    if (ex.size() != 0 || nf == 0) begin failures++; $display("missing %0d found %0d", ex.size(), nf); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
