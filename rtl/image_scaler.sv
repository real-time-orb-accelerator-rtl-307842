// image_scaler: 2:1 down-scaler producing the next level of the image pyramid.
//
// Each output pixel is the average of a 2x2 input block,
// (p00 + p01 + p10 + p11) >> 2 (truncating; rounding is not specified and this
// design truncates). A 2-line line buffer provides the pixel above, and the
// previous column is kept in two registers. An output pixel is produced when the
// bottom-right pixel of a block (odd x, odd y) arrives, at coordinate
// (x/2, y/2), so the output stream carries one pixel per clock at a quarter of
// the input rate.
//
// Interface: pixel stream in (in_valid, in_x, in_y, in_pix) of width W; pixel
// stream out (o_valid, o_x, o_y, o_pix) of width W/2.
// Timing: the output follows the bottom-right input pixel by one cycle.
module image_scaler
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

  logic [7:0] col [2];
  logic [7:0] prev_top, prev_bot;
  logic [9:0] sum;

  line_buffer #(.LINES(2), .WIDTH(W), .DW(8)) u_lb (
    .clk, .in_valid, .in_col(in_x[AW-1:0]), .in_data(in_pix), .col_out(col));

  assign sum = 10'(prev_top) + 10'(prev_bot) + 10'(col[0]) + 10'(col[1]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev_top <= '0; prev_bot <= '0;
      o_valid <= 1'b0; o_x <= '0; o_y <= '0; o_pix <= '0;
    end else begin
      o_valid <= in_valid && in_x[0] && in_y[0];
      if (in_valid) begin
        prev_top <= col[0];
        prev_bot <= col[1];
        o_x      <= in_x >> 1;
        o_y      <= in_y >> 1;
        o_pix    <= sum[9:2];
      end
    end
  end
endmodule
