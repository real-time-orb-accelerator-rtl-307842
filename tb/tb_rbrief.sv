// tb_rbrief: streams random 31-pixel columns into rbrief and launches
// descriptors for random patches and sectors. Each descriptor is compared with
// a reference built from the un-rotated test pattern, rotated here in floating
// point by sector * 360/N degrees (round half away from zero), and the test
// a < b applied to the stored columns. Also checks the returned fields, the
// latency (start in cycle T, result in cycle T+88), that starts while busy are
// refused, and that every quadrant is exercised.
module tb_rbrief;
  import orb_pkg::*;
  localparam int N = 32, NCOL = 6000;
  localparam real PI = 3.14159265358979;
  logic clk = 0, rst_n = 0;
  logic col_valid = 0;
  logic [7:0] col [31];
  logic start = 0;
  logic [XW-1:0] s_x = 0;
  logic [YW-1:0] s_y = 0;
  logic [SCORE_W-1:0] s_score = 0;
  logic [4:0] s_sector = 0;
  logic ready, o_valid;
  logic [XW-1:0] o_x;
  logic [YW-1:0] o_y;
  logic [SCORE_W-1:0] o_score;
  logic [4:0] o_sector;
  logic [BRIEF_BITS-1:0] o_desc;
  logic [7:0] cols [NCOL][31];
  int checks = 0, failures = 0, launches = 0, refused = 0;
  int pend_n [$], pend_s [$], pend_t [$];
  bit quad_seen [4];

  rbrief #(.N_SECT(N), .DEPTH(128)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (NCOL * 3) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int rnd(real v);
    return (v >= 0) ? int'($floor(v + 0.5)) : -int'($floor(-v + 0.5));
  endfunction

  function automatic logic [BRIEF_BITS-1:0] ref_desc(int n, int s);
    logic [BRIEF_BITS-1:0] d;
    real a, c, sn;
    a = 2.0 * PI * s / N; c = $cos(a); sn = $sin(a);
    for (int i = 0; i < BRIEF_BITS; i++) begin
      int ax, ay, bx, by, rax, ray, rbx, rby;
      ax = pattern_coord(i, 0, 0); ay = pattern_coord(i, 0, 1);
      bx = pattern_coord(i, 1, 0); by = pattern_coord(i, 1, 1);
      rax = rnd(ax * c - ay * sn); ray = rnd(ax * sn + ay * c);
      rbx = rnd(bx * c - by * sn); rby = rnd(bx * sn + by * c);
      d[i] = cols[n - 15 + rax][15 + ray] < cols[n - 15 + rbx][15 + rby];
    end
    return d;
  endfunction

  always @(posedge clk) if (rst_n && o_valid) begin
    logic [BRIEF_BITS-1:0] e;
    checks++;
    if (pend_n.size() == 0) begin failures++; $display("unexpected descriptor"); end
    else begin
      e = ref_desc(pend_n[0], pend_s[0]);
      if (o_desc != e || o_x != XW'(pend_n[0]) || o_y != YW'(7) || o_score != SCORE_W'(pend_n[0] * 3) ||
          o_sector != 5'(pend_s[0])) begin
        failures++;
        $display("col %0d sector %0d: %0d of 256 bits differ", pend_n[0], pend_s[0], $countones(o_desc ^ e));
      end
      checks++;
      // start presented mid-cycle T at pend_t; the result is sampled at the end of cycle T+88
      if (int'($time) - pend_t[0] - 5 != 880) begin failures++; $display("latency %0d", (int'($time) - pend_t[0] - 5) / 10); end
      void'(pend_n.pop_front()); void'(pend_s.pop_front()); void'(pend_t.pop_front());
    end
  end

  initial begin
    int n;
    for (int i = 0; i < NCOL; i++) for (int r = 0; r < 31; r++) cols[i][r] = 8'($urandom);
    repeat (2) @(posedge clk);
    rst_n = 1;
    n = 0;
    while (n < NCOL - 200) begin
      @(negedge clk);
      col_valid = ($urandom % 5) != 0;
      start = 0;
      if (col_valid) begin
        col = cols[n];
        if (n >= 30 && ($urandom % 20 == 0)) begin
          int s;
          s = (launches < 4) ? launches * 8 : $urandom % N;
          start = 1; s_sector = 5'(s); s_x = XW'(n); s_y = YW'(7); s_score = SCORE_W'(n * 3);
          #1;
          if (ready) begin
            pend_n.push_back(n); pend_s.push_back(s); pend_t.push_back(int'($time) - 1);
            launches++;
            quad_seen[s / (N / 4)] = 1;
          end else refused++;
        end
        n++;
      end
    end
    @(negedge clk); col_valid = 0; start = 0;
    repeat (100) @(posedge clk);
    checks++;
    if (pend_n.size() != 0 || launches < 20 || refused == 0 || !(quad_seen[0] && quad_seen[1] && quad_seen[2] && quad_seen[3])) begin
      failures++; $display("pending %0d launches %0d refused %0d", pend_n.size(), launches, refused);
    end
    $display("launches %0d refused %0d", launches, refused);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
