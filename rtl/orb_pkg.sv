// orb_pkg: types, constants and elaboration-time functions shared by the ORB
// feature-extraction pipeline.
//
// Contents:
//  * default frame geometry (640x480, the evaluated resolution), number of scales
//    (2) and orientation sectors (32, the middle of the three evaluated
//    discretisations 16/32/64),
//  * fixed-point sine/cosine/tangent evaluated by an integer Taylor series, used
//    only at elaboration to build the sector-boundary tangent table and the
//    pre-rotated BRIEF patterns,
//  * the un-rotated BRIEF test pattern: 256 point pairs inside a circle of radius
//    15. The pattern itself is this design's own: each coordinate is drawn from a
//    32-bit integer hash of the pair index (hash_u32 below), x uniform in [-15,15]
//    and y uniform in [-ymax,ymax] with ymax = floor(sqrt(225 - x*x)),
//  * the feature record written to the feature memory.
package orb_pkg;

  localparam int unsigned IMG_W      = 640;
  localparam int unsigned IMG_H      = 480;
  localparam int unsigned N_SCALES   = 2;
  localparam int unsigned N_SECTORS  = 32;
  localparam int unsigned XW         = 10;   // x coordinate width
  localparam int unsigned YW         = 9;    // y coordinate width
  localparam int unsigned SCORE_W    = 12;   // FAST score: sum of 16 |differences|
  localparam int unsigned BRIEF_BITS = 256;
  localparam int unsigned PATCH_R    = 15;   // 31x31 patch radius
  localparam int unsigned GAUSS_R    = 3;    // 7x7 Gaussian radius
  localparam int unsigned BORDER     = PATCH_R + GAUSS_R;  // 18
  localparam int unsigned PAIRS_PER_CYCLE = 3;
  localparam int unsigned BRIEF_CYCLES = (BRIEF_BITS + PAIRS_PER_CYCLE - 1) / PAIRS_PER_CYCLE; // 86
  localparam int unsigned TAN_F      = 12;   // fraction bits of the tangent table

  // Feature record (one entry of the feature memory).
  typedef struct packed {
    logic [1:0]            scale;
    logic [XW-1:0]         x;
    logic [YW-1:0]         y;
    logic [SCORE_W-1:0]    score;
    logic [5:0]            sector;   // full-circle sector index q*N/4 + theta
    logic [BRIEF_BITS-1:0] desc;
  } feature_t;

  // ---------------------------------------------------------------- fixed point
  localparam longint Q      = 64'sd1 << 30;
  localparam longint PI_Q30 = 64'sd3373259426;   // round(pi * 2^30)

  // sin(pi/2 * num/den) in Q30, 0 <= num <= den.
  function automatic longint sin_q30(input int num, input int den);
    longint a, a2, term, acc;
    a    = (PI_Q30 * num) / (2 * den);
    a2   = (a * a) >>> 30;
    term = a;
    acc  = a;
    for (int k = 1; k <= 7; k++) begin
      term = -((term * a2) >>> 30) / ((2 * k) * (2 * k + 1));
      acc  = acc + term;
    end
    return acc;
  endfunction

  function automatic longint cos_q30(input int num, input int den);
    return sin_q30(den - num, den);
  endfunction

  // Tangent of the upper boundary of sub-sector i (1..M-1 used) inside a
  // quadrant split into M sectors that are centred on multiples of 90/M degrees:
  // boundary angle = (i - 0.5) * 90/M degrees, in TAN_F fraction bits.
  function automatic longint tan_boundary(input int i, input int m);
    longint s, c;
    s = sin_q30(2 * i - 1, 2 * m);
    c = cos_q30(2 * i - 1, 2 * m);
    return ((s <<< TAN_F) + c / 2) / c;
  endfunction

  // ---------------------------------------------------------------- BRIEF pattern
  function automatic logic [31:0] hash_u32(input logic [31:0] v);
    logic [31:0] h;
    h = v * 32'h9E3779B1;
    h = h ^ (h >> 15);
    h = h * 32'h85EBCA77;
    h = h ^ (h >> 13);
    h = h * 32'hC2B2AE3D;
    h = h ^ (h >> 16);
    return h;
  endfunction

  function automatic int isqrt(input int v);
    int r;
    r = 0;
    while ((r + 1) * (r + 1) <= v) r++;
    return r;
  endfunction

  // Coordinate of point `which` (0 = a, 1 = b) of pair `pair`; axis 0 = x, 1 = y.
  function automatic int pattern_coord(input int pair, input int which, input int axis);
    int x, ymax, y;
    x    = int'(hash_u32(32'(pair * 4 + which * 2 + 1)) % 31) - 15;
    ymax = isqrt(225 - x * x);
    y    = int'(hash_u32(32'(pair * 4 + which * 2 + 2)) % (2 * ymax + 1)) - ymax;
    // keep the two points of a pair distinct
    if (which == 1 && x == pattern_coord_a_x(pair) && y == pattern_coord_a_y(pair))
      y = (y > 0) ? y - 1 : y + 1;
    return (axis == 0) ? x : y;
  endfunction

  function automatic int pattern_coord_a_x(input int pair);
    return int'(hash_u32(32'(pair * 4 + 1)) % 31) - 15;
  endfunction

  function automatic int pattern_coord_a_y(input int pair);
    int x, ymax;
    x    = pattern_coord_a_x(pair);
    ymax = isqrt(225 - x * x);
    return int'(hash_u32(32'(pair * 4 + 2)) % (2 * ymax + 1)) - ymax;
  endfunction

  // Round-half-away-from-zero of a Q30 value to an integer.
  function automatic int round_q30(input longint v);
    if (v >= 0) return int'((v + (Q / 2)) >>> 30);
    else        return -int'(((-v) + (Q / 2)) >>> 30);
  endfunction

  // Pattern point rotated by sector s of n sectors: angle = s * 360/n degrees.
  // The rotation is split into an exact quarter turn (q = s / (n/4)) and a
  // residual angle k * 90/(n/4) computed with the Q30 sine table.
  function automatic int rot_coord(input int pair, input int which, input int axis,
                                   input int s, input int n);
    int m, q, k, x, y, xr, yr, t;
    longint sn, cs;
    m  = n / 4;
    q  = s / m;
    k  = s % m;
    x  = pattern_coord(pair, which, 0);
    y  = pattern_coord(pair, which, 1);
    sn = sin_q30(k, m);
    cs = cos_q30(k, m);
    xr = round_q30(x * cs - y * sn);
    yr = round_q30(x * sn + y * cs);
    for (int j = 0; j < q; j++) begin
      t  = xr;
      xr = -yr;
      yr = t;
    end
    return (axis == 0) ? xr : yr;
  endfunction


endpackage
