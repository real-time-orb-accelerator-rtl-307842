// fast_nms: 3x3 non-maximum suppression of the FAST score stream.
//
// The per-pixel score stream (zero where no corner was found) passes through a
// 3-line line buffer and a 3x3 window buffer. A pixel is reported as a feature
// when its score is non-zero and no neighbour in the 3x3 window beats it. Equal
// neighbours are resolved by raster order (this design's choice): the centre must
// be strictly greater than the four neighbours that precede it in raster order
// and at least equal to the four that follow, so a plateau of equal scores
// yields exactly one feature. Only features at least BORDER pixels from every
// image edge are reported, so that the 31x31 descriptor patch and the 7x7
// smoothing kernel around them stay inside the image.
//
// Interface: score stream in (in_valid, in_x, in_y, in_score: coordinate of the
// score sample), feature out (f_valid, f_x, f_y, f_score).
// Timing: a feature at (x, y) is reported 2 clock cycles after the score sample
// at (x+1, y+1) was accepted.
module fast_nms
  import orb_pkg::*;
#(
  parameter int unsigned W      = IMG_W,
  parameter int unsigned H      = IMG_H,
  parameter int unsigned BRD    = BORDER
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  logic [XW-1:0]      in_x,
  input  logic [YW-1:0]      in_y,
  input  logic [SCORE_W-1:0] in_score,
  output logic               f_valid,
  output logic [XW-1:0]      f_x,
  output logic [YW-1:0]      f_y,
  output logic [SCORE_W-1:0] f_score
);
  localparam int unsigned AW = $clog2(W);

  logic [SCORE_W-1:0] col [3];
  logic [SCORE_W-1:0] win [3][3];

  line_buffer #(.LINES(3), .WIDTH(W), .DW(SCORE_W)) u_lb (
    .clk, .in_valid, .in_col(in_x[AW-1:0]), .in_data(in_score), .col_out(col));

  window_buffer #(.K(3), .DW(SCORE_W)) u_wb (
    .clk, .in_valid, .col_in(col), .win(win));

  // centre coordinate of the window after the accepting edge
  logic          v1;
  logic [XW-1:0] cx1;
  logic [YW-1:0] cy1;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; cx1 <= '0; cy1 <= '0;
    end else begin
      v1  <= in_valid && in_x >= XW'(BRD + 1) && in_x <= XW'(W - BRD) &&
             in_y >= YW'(BRD + 1) && in_y <= YW'(H - BRD);
      cx1 <= in_x - XW'(1);
      cy1 <= in_y - YW'(1);
    end
  end

  logic               is_max;
  logic [SCORE_W-1:0] c;
  always_comb begin
    c      = win[1][1];
    is_max = (c != '0) &&
             (c >  win[0][0]) && (c >  win[0][1]) && (c >  win[0][2]) && (c > win[1][0]) &&
             (c >= win[1][2]) && (c >= win[2][0]) && (c >= win[2][1]) && (c >= win[2][2]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      f_valid <= 1'b0; f_x <= '0; f_y <= '0; f_score <= '0;
    end else begin
      f_valid <= v1 && is_max;
      f_x     <= cx1;
      f_y     <= cy1;
      f_score <= c;
    end
  end
endmodule
