// orb_scale: complete ORB feature extraction for one level of the image pyramid.
//
// The grey pixel stream feeds two branches in parallel:
//  * fast_corner (7-line buffer, 7x7 window, FAST-9 test and score, 3x3
//    non-maximum suppression) reports corners as (x, y, score), which wait in
//    feat_fifo;
//  * gaussian_smooth (7x7, sigma 2) feeds orientation (31-line buffer, moments
//    from column sums, quadrant and sector priority encoder), which emits for
//    every position the sector of its 31x31 patch together with the newest
//    31-pixel column of that patch.
// The coordinator waits until the orientation stream reaches the oldest queued
// corner, then launches rbrief with that corner's sector; rbrief reads the patch
// from its own column memories and emits the 256-bit descriptor 88 cycles later.
//
// Interface: pixel stream in (in_valid, in_x, in_y, in_pix), run-time FAST
// threshold, feature out (o_valid, o_x, o_y, o_score, o_sector, o_desc; o_sector
// = quadrant * N_SECT/4 + in-quadrant sector) and one-cycle event pulses for
// launched, dropped (encoder busy), stale and FIFO-overflow features.
module orb_scale
  import orb_pkg::*;
#(
  parameter int unsigned W          = IMG_W,
  parameter int unsigned H          = IMG_H,
  parameter int unsigned N_SECT     = N_SECTORS,
  parameter int unsigned FIFO_DEPTH = 64,
  parameter int unsigned WIN_DEPTH  = 128,
  localparam int unsigned SW        = $clog2(N_SECT),
  localparam int unsigned TW        = SW - 2
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic [XW-1:0]         in_x,
  input  logic [YW-1:0]         in_y,
  input  logic [7:0]            in_pix,
  input  logic [7:0]            threshold,
  output logic                  o_valid,
  output logic [XW-1:0]         o_x,
  output logic [YW-1:0]         o_y,
  output logic [SCORE_W-1:0]    o_score,
  output logic [SW-1:0]         o_sector,
  output logic [BRIEF_BITS-1:0] o_desc,
  output logic                  ev_launch,
  output logic                  ev_busy_drop,
  output logic                  ev_stale,
  output logic                  ev_overflow
);
  // ------------------------------------------------------------ FAST branch
  logic               s_valid, f_valid;
  logic [XW-1:0]      s_x, f_x;
  logic [YW-1:0]      s_y, f_y;
  logic [SCORE_W-1:0] s_score, f_score;

  fast_corner #(.W(W), .H(H)) u_fast (
    .clk, .rst_n, .in_valid, .in_x, .in_y, .in_pix, .threshold,
    .s_valid, .s_x, .s_y, .s_score,
    .f_valid, .f_x, .f_y, .f_score);

  localparam int unsigned FDW = XW + YW + SCORE_W;
  logic [FDW-1:0] q_dout;
  logic           q_empty, q_full, q_pop;
  logic [$clog2(FIFO_DEPTH):0] q_level;

  feat_fifo #(.DW(FDW), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n, .push(f_valid), .din({f_x, f_y, f_score}),
    .pop(q_pop), .dout(q_dout), .empty(q_empty), .full(q_full), .level(q_level),
    .overflow(ev_overflow));

  // ------------------------------------------------------------ orientation branch
  logic          g_valid;
  logic [XW-1:0] g_x;
  logic [YW-1:0] g_y;
  logic [7:0]    g_pix;

  gaussian_smooth #(.W(W)) u_gauss (
    .clk, .rst_n, .in_valid, .in_x, .in_y, .in_pix,
    .o_valid(g_valid), .o_x(g_x), .o_y(g_y), .o_pix(g_pix));

  logic          or_valid, or_ok;
  logic [XW-1:0] or_x;
  logic [YW-1:0] or_y;
  logic [1:0]    or_q;
  logic [TW-1:0] or_theta;
  logic [7:0]    or_col [31];

  orientation #(.W(W), .N_SECT(N_SECT)) u_orient (
    .clk, .rst_n, .in_valid(g_valid), .in_x(g_x), .in_y(g_y), .in_pix(g_pix),
    .o_valid(or_valid), .o_ok(or_ok), .o_x(or_x), .o_y(or_y), .o_q(or_q),
    .o_theta(or_theta), .o_col(or_col));

  // ------------------------------------------------------------ coordinator + rBRIEF
  logic               br_ready, br_start;
  logic [XW-1:0]      br_x;
  logic [YW-1:0]      br_y;
  logic [SCORE_W-1:0] br_score;
  logic [SW-1:0]      br_sector;

  coordinator #(.SW(SW)) u_coord (
    .clk, .rst_n,
    .or_valid, .or_ok, .or_x, .or_y, .or_sector({or_q, or_theta}),
    .f_empty(q_empty), .f_x(q_dout[FDW-1 -: XW]), .f_y(q_dout[SCORE_W +: YW]),
    .f_score(q_dout[SCORE_W-1:0]), .f_pop(q_pop),
    .br_ready, .br_start, .br_x, .br_y, .br_score, .br_sector,
    .ev_launch, .ev_busy_drop, .ev_stale);

  rbrief #(.N_SECT(N_SECT), .DEPTH(WIN_DEPTH)) u_brief (
    .clk, .rst_n, .col_valid(or_valid), .col(or_col),
    .start(br_start), .s_x(br_x), .s_y(br_y), .s_score(br_score), .s_sector(br_sector),
    .ready(br_ready), .o_valid, .o_x, .o_y, .o_score, .o_sector, .o_desc);
endmodule
