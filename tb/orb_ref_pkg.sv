// orb_ref_pkg: software reference of one ORB pyramid level, used by the
// scale and top-level testbenches. Written directly from the algorithm, not
// from the RTL structure:
//  * FAST-9 on the 16-pixel radius-3 circle (threshold t, score = sum |p - c|),
//  * 3x3 non-maximum suppression, first of equal neighbours in raster order,
//    features only BORDER pixels or more from every edge,
//  * 7x7 Gaussian with weights [5 10 14 16 14 10 5] (outer product), * 766 >> 22,
//  * orientation atan2(m01, m10) of the smoothed 31x31 patch, rounded to the
//    nearest of N sectors (flagged ambiguous within 0.02 sector of a boundary),
//  * steered BRIEF: the pattern points rotated in floating point.
package orb_ref_pkg;
  import orb_pkg::*;

  typedef struct {
    int  x, y, score, sector;
    bit  amb;
  } ref_feat_t;

  class orb_ref;
    int w, h, nsect, brd;
    int img [][];
    int sm [][];
    int score [][];
    ref_feat_t feats [$];
    int n_corners, n_suppressed;

    function new(int w_, int h_, int nsect_, int brd_);
      w = w_; h = h_; nsect = nsect_; brd = brd_;
      img = new[h]; sm = new[h]; score = new[h];
      foreach (img[y]) begin img[y] = new[w]; sm[y] = new[w]; score[y] = new[w]; end
    endfunction

    function int fast_score(int x, int y, int t);
      int dx [16] = '{0, 1, 2, 3, 3, 3, 2, 1, 0, -1, -2, -3, -3, -3, -2, -1};
      int dy [16] = '{-3, -3, -2, -1, 0, 1, 2, 3, 3, 3, 2, 1, 0, -1, -2, -3};
      int c, p, sad, best_b, best_d, run_b, run_d;
      c = img[y][x]; sad = 0; best_b = 0; best_d = 0; run_b = 0; run_d = 0;
      for (int k = 0; k < 32; k++) begin
        p = img[y + dy[k % 16]][x + dx[k % 16]];
        if (k < 16) sad += (p > c) ? p - c : c - p;
        run_b = (p > c + t) ? run_b + 1 : 0;
        run_d = (p < c - t) ? run_d + 1 : 0;
        if (run_b > best_b) best_b = run_b;
        if (run_d > best_d) best_d = run_d;
      end
      return (best_b >= 9 || best_d >= 9) ? sad : 0;
    endfunction

    function void compute(int t);
      int gw [7] = '{5, 10, 14, 16, 14, 10, 5};
      feats.delete();
      n_corners = 0; n_suppressed = 0;
      for (int y = 0; y < h; y++) for (int x = 0; x < w; x++) begin
        score[y][x] = (x >= 3 && x < w - 3 && y >= 3 && y < h - 3) ? fast_score(x, y, t) : 0;
        sm[y][x] = 0;
        if (x >= 3 && x < w - 3 && y >= 3 && y < h - 3) begin
          longint acc;
          acc = 0;
          for (int j = -3; j <= 3; j++) for (int i = -3; i <= 3; i++)
            acc += gw[j+3] * gw[i+3] * img[y+j][x+i];
          sm[y][x] = int'((acc * 766) >> 22);
          if (sm[y][x] > 255) sm[y][x] = 255;
        end
      end
      for (int y = brd; y < h - brd; y++) for (int x = brd; x < w - brd; x++) begin
        int c;
        bit keep;
        c = score[y][x];
        if (c == 0) continue;
        n_corners++;
        keep = 1;
        for (int j = -1; j <= 1; j++) for (int i = -1; i <= 1; i++) begin
          bit prev;
          prev = (j < 0) || (j == 0 && i < 0);
          if (!(i == 0 && j == 0)) begin
            if (prev && !(c > score[y+j][x+i])) keep = 0;
            if (!prev && !(c >= score[y+j][x+i])) keep = 0;
          end
        end
        if (!keep) begin n_suppressed++; continue; end
        begin
          ref_feat_t f;
          longint m10, m01;
          real ang, pos, fr;
          m10 = 0; m01 = 0;
          for (int j = -15; j <= 15; j++) for (int i = -15; i <= 15; i++) begin
            m10 += i * sm[y+j][x+i];
            m01 += j * sm[y+j][x+i];
          end
          ang = $atan2(real'(m01), real'(m10));
          if (ang < 0) ang += 2.0 * 3.14159265358979;
          pos = ang / (2.0 * 3.14159265358979 / nsect);
          fr = pos - $floor(pos);
          f.x = x; f.y = y; f.score = c;
          f.sector = int'($floor(pos + 0.5)) % nsect;
          f.amb = (fr > 0.48 && fr < 0.52) || (m10 == 0 && m01 == 0);
          feats.push_back(f);
        end
      end
    endfunction

    function int find(int x, int y);
      foreach (feats[i]) if (feats[i].x == x && feats[i].y == y) return i;
      return -1;
    endfunction

    static function int rnd(real v);
      return (v >= 0) ? int'($floor(v + 0.5)) : -int'($floor(-v + 0.5));
    endfunction

    function logic [BRIEF_BITS-1:0] desc(int x, int y, int s);
      logic [BRIEF_BITS-1:0] d;
      real a, c, sn;
      a = 2.0 * 3.14159265358979 * s / nsect; c = $cos(a); sn = $sin(a);
      for (int i = 0; i < BRIEF_BITS; i++) begin
        int ax, ay, bx, by;
        ax = pattern_coord(i, 0, 0); ay = pattern_coord(i, 0, 1);
        bx = pattern_coord(i, 1, 0); by = pattern_coord(i, 1, 1);
        d[i] = sm[y + rnd(ax * sn + ay * c)][x + rnd(ax * c - ay * sn)] <
               sm[y + rnd(bx * sn + by * c)][x + rnd(bx * c - by * sn)];
      end
      return d;
    endfunction
  endclass
endpackage
