// tb_orb_top_full: end-to-end test of the accelerator at its default size
// (640x480, two pyramid levels, 32 sectors). An RGB test image (random
// rectangles and discs on low noise) is sent as video with line blanking; after
// the frame the feature memory is read over AXI4-Lite and every stored feature
// is checked against the software reference of its pyramid level (position,
// score, sector, all 256 descriptor bits). The number stored plus the features
// counted as dropped must equal the reference count. A second frame runs with
// the FAST threshold raised over AXI (fewer features expected), then a third
// frame start checks the frame counter and last-frame count, and pixels sent
// while the accelerator is disabled must be ignored. Mechanisms counted (each
// must occur): corners, non-maximum suppression, features from each level,
// busy drops, all four orientation quadrants, threshold change.
// Latency: the last feature of frame 1 must be written into the feature memory
// within 320,000 cycles of the frame's first pixel (3.2 ms at 100 MHz, the
// figure reported for the lower-right feature) and within 200 cycles of the
// frame's last pixel (it may come earlier when the image has no corner near
// the lower-right border).
module tb_orb_top_full;
  import orb_pkg::*;
  import orb_ref_pkg::*;
  localparam int W = IMG_W, H = IMG_H, N = N_SECTORS, NS = N_SCALES;
  localparam int AW = 17;
  logic clk = 0, rst_n = 0;
  logic vid_valid = 0, vid_sof = 0;
  logic [7:0] vid_r = 0, vid_g = 0, vid_b = 0;
  logic [AW-1:0] s_awaddr = 0, s_araddr = 0;
  logic s_awvalid = 0, s_wvalid = 0, s_bready = 1, s_arvalid = 0, s_rready = 1;
  logic [31:0] s_wdata = 0;
  logic [3:0] s_wstrb = 4'hF;
  logic s_awready, s_wready, s_bvalid, s_arready, s_rvalid, frame_irq;
  logic [1:0] s_bresp, s_rresp;
  logic [31:0] s_rdata;
  int checks = 0, failures = 0;
  int rgb [H][W][3];
  orb_ref_pkg::orb_ref rf [NS];
  int n_corners = 0, n_supp = 0, n_busy = 0, n_irq = 0;
  int per_scale [NS];
  bit quad [4];

  orb_top dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && frame_irq) n_irq++;

  // cycle stamps for the latency check
  longint cyc = 0, t_sof = -1, t_lastpix = 0, t_lastwr = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (vid_valid && vid_sof && t_sof < 0) t_sof <= cyc;
    if (vid_valid) t_lastpix <= cyc;
    if (dut.wr_valid) t_lastwr <= cyc;
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic axi_write(input int a, input logic [31:0] d);
    @(negedge clk);
    s_awvalid = 1; s_awaddr = AW'(a); s_wvalid = 1; s_wdata = d;
    do @(posedge clk); while (!(s_awready && s_wready));
    @(negedge clk); s_awvalid = 0; s_wvalid = 0;
    while (!s_bvalid) @(negedge clk);
    @(negedge clk);
  endtask

  task automatic axi_read(input int a, output logic [31:0] d);
    @(negedge clk);
    s_arvalid = 1; s_araddr = AW'(a);
    do @(posedge clk); while (!s_arready);
    @(negedge clk); s_arvalid = 0;
    while (!s_rvalid) @(negedge clk);
    d = s_rdata;
    @(negedge clk);
  endtask

  task automatic make_image();
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) begin
      int v;
      v = 40 + $urandom % 8;
      for (int c = 0; c < 3; c++) rgb[y][x][c] = v;
    end
    for (int k = 0; k < ((W * H / 3000 > 12) ? W * H / 3000 : 12); k++) begin
      int x0, y0, ww, hh, v;
      x0 = $urandom % W; y0 = $urandom % H; ww = 6 + $urandom % 40; hh = 6 + $urandom % 30;
      v = ($urandom % 2) ? 150 + $urandom % 90 : $urandom % 10;
      for (int y = y0; y < y0 + hh && y < H; y++) for (int x = x0; x < x0 + ww && x < W; x++) begin
        rgb[y][x][0] = v + $urandom % 16; rgb[y][x][1] = v; rgb[y][x][2] = v + $urandom % 8;
      end
    end
    for (int k = 0; k < ((W * H / 6000 > 6) ? W * H / 6000 : 6); k++) begin
      int cx, cy, r, v;
      cx = $urandom % W; cy = $urandom % H; r = 3 + $urandom % 7; v = 120 + $urandom % 120;
      for (int y = cy - r; y <= cy + r; y++) for (int x = cx - r; x <= cx + r; x++)
        if (x >= 0 && y >= 0 && x < W && y < H && (x - cx) * (x - cx) + (y - cy) * (y - cy) <= r * r)
          for (int c = 0; c < 3; c++) rgb[y][x][c] = v;
    end
    // a bright block whose upper-left corner lies just inside the lower-right
    // feature border, so that the frame has a feature near its lower-right end
    for (int y = H - BORDER - 3; y < H; y++) for (int x = W - BORDER - 12; x < W; x++)
      for (int c = 0; c < 3; c++) rgb[y][x][c] = 200;
  endtask

  task automatic make_reference(int t);
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++)
      rf[0].img[y][x] = (77 * rgb[y][x][0] + 150 * rgb[y][x][1] + 29 * rgb[y][x][2] + 128) / 256;
    for (int s = 1; s < NS; s++)
      for (int y = 0; y < (H >> s); y++) for (int x = 0; x < (W >> s); x++)
        rf[s].img[y][x] = (rf[s-1].img[2*y][2*x] + rf[s-1].img[2*y][2*x+1] +
                           rf[s-1].img[2*y+1][2*x] + rf[s-1].img[2*y+1][2*x+1]) / 4;
    for (int s = 0; s < NS; s++) begin
      rf[s].compute(t);
      n_corners += rf[s].n_corners; n_supp += rf[s].n_suppressed;
      $display("level %0d reference: %0d corners, %0d features", s, rf[s].n_corners, rf[s].feats.size());
    end
  endtask

  task automatic send_frame();
    for (int y = 0; y < H; y++) begin
      for (int x = 0; x < W; x++) begin
        @(negedge clk);
        vid_valid = 1; vid_sof = (x == 0 && y == 0);
        vid_r = 8'(rgb[y][x][0]); vid_g = 8'(rgb[y][x][1]); vid_b = 8'(rgb[y][x][2]);
      end
      @(negedge clk); vid_valid = 0; vid_sof = 0;
      repeat (16) @(negedge clk);
    end
    repeat (2000) @(negedge clk);   // vertical blanking: pipeline drains
  endtask

  // reads the stored features and checks them; returns the number stored
  task automatic check_frame(output int stored);
    logic [31:0] d, busy0, ovf0, stale0;
    int total_ref;
    logic [31:0] cnt, busy, ovf, stale, lost;
    axi_read('h10, cnt);
    axi_read('h14, lost);
    axi_read('h18, busy);
    axi_read('h1C, ovf);
    axi_read('h20, stale);
    stored = int'(cnt);
    total_ref = 0;
    for (int s = 0; s < NS; s++) total_ref += rf[s].feats.size();
    for (int i = 0; i < stored; i++) begin
      logic [BRIEF_BITS-1:0] desc;
      logic [31:0] w8, w9;
      int x, y, sc, score, sector, k;
      for (int w = 0; w < 8; w++) begin axi_read('h10000 + i * 64 + w * 4, d); desc[32*w +: 32] = d; end
      axi_read('h10000 + i * 64 + 32, w8);
      axi_read('h10000 + i * 64 + 36, w9);
      x = int'(w8[9:0]); y = int'(w8[28:20]); sc = int'(w8[31:30]);
      score = int'(w9[11:0]); sector = int'(w9[17:12]);
      checks++;
      if (sc >= NS) begin failures++; $display("bad scale %0d", sc); continue; end
      k = rf[sc].find(x, y);
      if (k < 0) begin failures++; $display("level %0d: unexpected feature (%0d,%0d)", sc, x, y); continue; end
      per_scale[sc]++;
      quad[sector / (N / 4)] = 1;
      checks++;
      if (score != rf[sc].feats[k].score) begin failures++; $display("score (%0d,%0d)", x, y); end
      if (!rf[sc].feats[k].amb) begin
        checks++;
        if (sector != rf[sc].feats[k].sector) begin failures++; $display("sector (%0d,%0d) %0d exp %0d", x, y, sector, rf[sc].feats[k].sector); end
      end
      checks++;
      if (desc != rf[sc].desc(x, y, sector)) begin failures++; $display("descriptor level %0d (%0d,%0d)", sc, x, y); end
    end
    checks++;
    if (stored + int'(lost) + int'(busy) - n_busy + int'(ovf) + int'(stale) != total_ref) begin
      failures++;
      $display("count: stored %0d lost %0d busy %0d ovf %0d stale %0d reference %0d", stored, lost, int'(busy) - n_busy, ovf, stale, total_ref);
    end
    $display("frame: %0d stored, %0d dropped while encoder busy, reference %0d", stored, int'(busy) - n_busy, total_ref);
    n_busy = int'(busy);
  endtask

  initial begin
    int stored1, stored2;
    logic [31:0] d;
    for (int s = 0; s < NS; s++) rf[s] = new(W >> s, H >> s, N, BORDER);
    make_image();
    repeat (3) @(posedge clk);
    rst_n = 1;
    // frame 1, threshold 20 (reset value)
    make_reference(20);
    send_frame();
    checks++;
    if (t_lastwr - t_sof > 320_000 || t_lastwr - t_lastpix > 200) begin
      failures++; $display("latency: first pixel %0d, last pixel %0d, last feature %0d", t_sof, t_lastpix, t_lastwr);
    end
    $display("latency: last feature written %0d cycles after the first pixel, %0d after the last",
             t_lastwr - t_sof, t_lastwr - t_lastpix);
    check_frame(stored1);
    // frame 2, threshold raised to 40 at run time
    axi_write('h04, 32'd40);
    make_reference(40);
    send_frame();
    check_frame(stored2);
    // start of frame 3 latches the frame-2 count
    @(negedge clk); vid_valid = 1; vid_sof = 1; @(negedge clk); vid_valid = 0; vid_sof = 0;
    repeat (4) @(negedge clk);
    axi_read('h0C, d);
    checks++; if (int'(d) != stored2) begin failures++; $display("last count %0d", d); end
    axi_read('h08, d);
    checks++; if (d != 3) begin failures++; $display("frame number %0d", d); end
    // disabled: a further frame start must be ignored
    axi_write('h00, 32'd0);
    @(negedge clk); vid_valid = 1; vid_sof = 1; @(negedge clk); vid_valid = 0; vid_sof = 0;
    repeat (4) @(negedge clk);
    axi_read('h08, d);
    checks++; if (d != 3) begin failures++; $display("frame number while disabled %0d", d); end
    // mechanisms
    checks++;
    if (n_corners == 0 || n_supp == 0 || n_busy == 0 || stored2 >= stored1 || n_irq != 3 ||
        !(quad[0] && quad[1] && quad[2] && quad[3])) begin
      failures++; $display("coverage failed: frames %0d", n_irq);
    end
    for (int s = 0; s < NS; s++) begin
      checks++;
      if (per_scale[s] == 0) begin failures++; $display("no features from level %0d", s); end
    end
    $display("mechanisms: corners %0d, suppressed %0d, busy drops %0d, frames %0d, per level %0d/%0d, quadrants %0d%0d%0d%0d, stored %0d then %0d",
             n_corners, n_supp, n_busy, n_irq, per_scale[0], per_scale[NS-1], quad[0], quad[1], quad[2], quad[3], stored1, stored2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
