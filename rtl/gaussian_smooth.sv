// gaussian_smooth: 7x7 integer Gaussian smoothing (sigma = 2) of a grey stream.
//
// A 7-line line buffer and a 7x7 window buffer give the neighbourhood of each
// pixel, which is convolved with constant integer weights (constant-multiplicand
// products). The kernel is the outer product of the 1-D weights
// w = [5 10 14 16 14 10 5], i.e. round(16 * exp(-d^2 / (2 * 2^2))) for d = -3..3;
// its 2-D sum is 74^2 = 5476. The result is normalised by multiplying with
// round(2^22 / 5476) = 766 and shifting right by 22, then clipped to 255. The
// integer weights and the normalisation are this design's own.
//
// Interface: pixel stream in (in_valid, in_x, in_y, in_pix), smoothed stream
// out (o_valid, o_x, o_y, o_pix) where o_x/o_y is the centre of the window.
// Only centres with a complete window in one line band are emitted
// (3 <= x <= W-4, y >= 3).
// Timing: the smoothed pixel at (x, y) leaves 2 cycles after the input pixel at
// (x+3, y+3) was accepted.
module gaussian_smooth
  import orb_pkg::*;
#(
  parameter int unsigned W = IMG_W
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [XW-1:0] in_x,
  input  logic [YW-1:0] in_y,
  input  logic [7:0]    in_pix,
  output logic          o_valid,
  output logic [XW-1:0] o_x,
  output logic [YW-1:0] o_y,
  output logic [7:0]    o_pix
);
  localparam int unsigned AW = $clog2(W);
  localparam int GW [7] = '{5, 10, 14, 16, 14, 10, 5};
  localparam int NORM_MUL = 766;   // round(2^22 / 5476)

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

  logic [31:0] acc, scaled;
  always_comb begin
    acc = '0;
    for (int r = 0; r < 7; r++)
      for (int c = 0; c < 7; c++)
        acc = acc + 32'(GW[r] * GW[c]) * 32'(win[r][c]);
    scaled = (acc * 32'(NORM_MUL)) >> 22;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      o_valid <= 1'b0; o_x <= '0; o_y <= '0; o_pix <= '0;
    end else begin
      o_valid <= v1;
      o_x     <= cx1;
      o_y     <= cy1;
      o_pix   <= (scaled > 32'd255) ? 8'd255 : scaled[7:0];
    end
  end
endmodule
