// fast_corner: FAST-9 corner detector with score and non-maximum suppression.
//
// A 7-line line buffer and a 7x7 window buffer give the neighbourhood of each
// pixel. The 16 pixels of the radius-3 Bresenham circle are compared with the
// centre: "brighter" when p > c + t and "darker" when p < c - t, t being the
// run-time threshold. The two 16-bit comparison vectors are ANDed with the 16
// bitmaps of 9 contiguous circle positions; any full match marks a corner. The
// score of a corner is the sum of the absolute differences |p - c| over the 16
// circle pixels (zero for non-corners). The per-pixel score stream then goes
// through fast_nms (3-line buffer, 3x3 window, non-maximum suppression).
//
// Interface: grey pixel stream (in_valid, in_x, in_y, in_pix) with the image
// coordinate of each pixel; threshold; per-pixel score stream (s_*: coordinate of
// the window centre) and the feature stream (f_valid, f_x, f_y, f_score).
// Timing: the score of the pixel at (x, y) leaves 2 cycles after the pixel at
// (x+3, y+3) was accepted; only centres with a complete window in the same
// line band (x >= 3, x <= W-4, y >= 3) produce score samples.
module fast_corner
  import orb_pkg::*;
#(
  parameter int unsigned W   = IMG_W,
  parameter int unsigned H   = IMG_H,
  parameter int unsigned BRD = BORDER
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  logic [XW-1:0]      in_x,
  input  logic [YW-1:0]      in_y,
  input  logic [7:0]         in_pix,
  input  logic [7:0]         threshold,
  output logic               s_valid,
  output logic [XW-1:0]      s_x,
  output logic [YW-1:0]      s_y,
  output logic [SCORE_W-1:0] s_score,
  output logic               f_valid,
  output logic [XW-1:0]      f_x,
  output logic [YW-1:0]      f_y,
  output logic [SCORE_W-1:0] f_score
);
  localparam int unsigned AW = $clog2(W);

  // Bresenham circle of radius 3, clockwise from the top (dx, dy)
  localparam int CDX [16] = '{0, 1, 2, 3, 3, 3, 2, 1, 0, -1, -2, -3, -3, -3, -2, -1};
  localparam int CDY [16] = '{-3, -3, -2, -1, 0, 1, 2, 3, 3, 3, 2, 1, 0, -1, -2, -3};

  logic [7:0] col [7];
  logic [7:0] win [7][7];

  line_buffer #(.LINES(7), .WIDTH(W), .DW(8)) u_lb (
    .clk, .in_valid, .in_col(in_x[AW-1:0]), .in_data(in_pix), .col_out(col));

  window_buffer #(.K(7), .DW(8)) u_wb (
    .clk, .in_valid, .col_in(col), .win(win));

  logic          v1;
  logic [XW-1:0] cx1;
  logic [YW-1:0] cy1;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; cx1 <= '0; cy1 <= '0;
    end else begin
      v1  <= in_valid && in_x >= XW'(6) && in_y >= YW'(6);
      cx1 <= in_x - XW'(3);
      cy1 <= in_y - YW'(3);
    end
  end

  // corner test on the current window
  logic [15:0]        bright, dark;
  logic [SCORE_W-1:0] sad;
  logic               corner;
  always_comb begin
    logic [8:0] c, p, t;
    logic [15:0] arc;
    c   = {1'b0, win[3][3]};
    t   = {1'b0, threshold};
    sad = '0;
    for (int i = 0; i < 16; i++) begin
      p         = {1'b0, win[3 + CDY[i]][3 + CDX[i]]};
      bright[i] = p > c + t;
      dark[i]   = p + t < c;
      sad       = sad + {3'b000, ((p > c) ? p - c : c - p)};
    end
    corner = 1'b0;
    for (int s = 0; s < 16; s++) begin
      arc = 16'h01FF;
      arc = (arc << s) | (arc >> (16 - s));
      if (((bright & arc) == arc) || ((dark & arc) == arc)) corner = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_valid <= 1'b0; s_x <= '0; s_y <= '0; s_score <= '0;
    end else begin
      s_valid <= v1;
      s_x     <= cx1;
      s_y     <= cy1;
      s_score <= corner ? sad : '0;
    end
  end

  fast_nms #(.W(W), .H(H), .BRD(BRD)) u_nms (
    .clk, .rst_n,
    .in_valid(s_valid), .in_x(s_x), .in_y(s_y), .in_score(s_score),
    .f_valid, .f_x, .f_y, .f_score);
endmodule
