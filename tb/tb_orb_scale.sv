// tb_orb_scale: one pyramid level (128x96, 32 sectors) fed with a synthetic
// image of random rectangles and discs on low noise, with line blanking.
// Every descriptor that leaves the block is checked against the software
// reference (position, score, sector unless within 0.02 sector of a boundary,
// and all 256 descriptor bits). The reference feature count must equal the
// descriptors produced plus the features dropped while the encoder was busy,
// and busy drops, all four quadrants and a FIFO holding several corners must
// each occur at least once.
module tb_orb_scale;
  import orb_pkg::*;
  import orb_ref_pkg::*;
  localparam int W = 128, H = 96, N = 32, T = 20;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic [XW-1:0] in_x = 0;
  logic [YW-1:0] in_y = 0;
  logic [7:0] in_pix = 0;
  logic o_valid;
  logic [XW-1:0] o_x;
  logic [YW-1:0] o_y;
  logic [SCORE_W-1:0] o_score;
  logic [4:0] o_sector;
  logic [BRIEF_BITS-1:0] o_desc;
  logic ev_launch, ev_busy_drop, ev_stale, ev_overflow;
  int checks = 0, failures = 0;
  int n_out = 0, n_busy = 0, n_stale = 0, n_ovf = 0, n_launch = 0, max_level = 0;
  bit quad [4];
  orb_ref_pkg::orb_ref rf;

  orb_scale #(.W(W), .H(H), .N_SECT(N)) dut (
    .clk, .rst_n, .in_valid, .in_x, .in_y, .in_pix, .threshold(8'(T)),
    .o_valid, .o_x, .o_y, .o_score, .o_sector, .o_desc,
    .ev_launch, .ev_busy_drop, .ev_stale, .ev_overflow);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    n_busy += int'(ev_busy_drop); n_stale += int'(ev_stale);
    n_ovf += int'(ev_overflow); n_launch += int'(ev_launch);
    if (int'(dut.q_level) > max_level) max_level = int'(dut.q_level);
  end

  always @(posedge clk) if (rst_n && o_valid) begin
    int i;
    n_out++;
    i = rf.find(o_x, o_y);
    checks++;
    if (i < 0) begin failures++; $display("unexpected feature (%0d,%0d)", o_x, o_y); end
    else begin
      if (o_score != SCORE_W'(rf.feats[i].score)) begin failures++; $display("score (%0d,%0d)", o_x, o_y); end
      if (!rf.feats[i].amb) begin
        checks++;
        if (o_sector != 5'(rf.feats[i].sector)) begin
          failures++; $display("sector (%0d,%0d) %0d exp %0d", o_x, o_y, o_sector, rf.feats[i].sector);
        end
      end
      checks++;
      if (o_desc != rf.desc(o_x, o_y, o_sector)) begin failures++; $display("descriptor (%0d,%0d)", o_x, o_y); end
      quad[o_sector / (N / 4)] = 1;
    end
  end

  initial begin
    rf = new(W, H, N, BORDER);
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) rf.img[y][x] = 40 + $urandom % 8;
    for (int k = 0; k < 14; k++) begin
      int x0, y0, ww, hh, v;
      x0 = $urandom % W; y0 = $urandom % H; ww = 6 + $urandom % 30; hh = 6 + $urandom % 20;
      v = ($urandom % 2) ? 150 + $urandom % 100 : $urandom % 10;
      for (int y = y0; y < y0 + hh && y < H; y++) for (int x = x0; x < x0 + ww && x < W; x++) rf.img[y][x] = v;
    end
    for (int k = 0; k < 6; k++) begin
      int cx, cy, r, v;
      cx = $urandom % W; cy = $urandom % H; r = 3 + $urandom % 6; v = 120 + $urandom % 120;
      for (int y = 0; y < H; y++) for (int x = 0; x < W; x++)
        if ((x - cx) * (x - cx) + (y - cy) * (y - cy) <= r * r) rf.img[y][x] = v;
    end
    rf.compute(T);
    $display("reference: %0d corners, %0d suppressed, %0d features", rf.n_corners, rf.n_suppressed, rf.feats.size());
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int y = 0; y < H; y++) begin
      for (int x = 0; x < W; x++) begin
        @(negedge clk); in_valid = 1; in_x = XW'(x); in_y = YW'(y); in_pix = 8'(rf.img[y][x]);
      end
      @(negedge clk); in_valid = 0;
      repeat (8) @(negedge clk);
    end
    @(negedge clk); in_valid = 0;
    repeat (400) @(posedge clk);
    checks++;
    if (n_out + n_busy + n_stale + n_ovf != rf.feats.size()) begin
      failures++; $display("count mismatch: out %0d busy %0d stale %0d ovf %0d ref %0d", n_out, n_busy, n_stale, n_ovf, rf.feats.size());
    end
    checks++;
    if (n_launch != n_out) failures++;
    checks++;
    if (n_busy == 0 || n_out < 5 || !(quad[0] && quad[1] && quad[2] && quad[3]) || max_level < 2) begin
      failures++; $display("coverage: out %0d busy %0d quadrants %0d%0d%0d%0d fifo max %0d", n_out, n_busy, quad[0], quad[1], quad[2], quad[3], max_level);
    end
    $display("descriptors %0d, busy drops %0d, stale %0d, fifo max level %0d", n_out, n_busy, n_stale, max_level);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
