// rgb2bw: RGB-to-grey conversion of the incoming video stream, one pixel per
// clock, plus the raster position of every pixel.
//
// The luminance uses the ITU-R BT.601 weights in 8-bit fixed point (this
// design's choice; the conversion itself is only named by the architecture):
//   Y = (77 R + 150 G + 29 B + 128) >> 8.
// A raster counter restarts at (0,0) on the pixel flagged with in_sof (start of
// frame) and advances x on every accepted pixel, wrapping to the next line after
// W pixels. Pixels only count when in_valid is high, so blanking gaps may occur
// anywhere.
//
// Timing: one register stage; o_valid/o_x/o_y/o_pix follow the input pixel by one
// cycle. o_sof marks the first pixel of a frame.
module rgb2bw
  import orb_pkg::*;
#(
  parameter int unsigned W = IMG_W
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic          in_sof,
  input  logic [7:0]    in_r,
  input  logic [7:0]    in_g,
  input  logic [7:0]    in_b,
  output logic          o_valid,
  output logic          o_sof,
  output logic [XW-1:0] o_x,
  output logic [YW-1:0] o_y,
  output logic [7:0]    o_pix
);
  logic [XW-1:0] x_cnt;
  logic [YW-1:0] y_cnt;
  logic [XW-1:0] x_cur;
  logic [YW-1:0] y_cur;
  logic [17:0]   lum;

  assign x_cur = in_sof ? '0 : x_cnt;
  assign y_cur = in_sof ? '0 : y_cnt;
  assign lum   = 18'd77 * in_r + 18'd150 * in_g + 18'd29 * in_b + 18'd128;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_cnt <= '0; y_cnt <= '0;
      o_valid <= 1'b0; o_sof <= 1'b0; o_x <= '0; o_y <= '0; o_pix <= '0;
    end else begin
      o_valid <= in_valid;
      o_sof   <= in_valid && in_sof;
      if (in_valid) begin
        o_x   <= x_cur;
        o_y   <= y_cur;
        o_pix <= lum[15:8];
        if (x_cur == XW'(W - 1)) begin
          x_cnt <= '0;
          y_cnt <= y_cur + YW'(1);
        end else begin
          x_cnt <= x_cur + XW'(1);
          y_cnt <= y_cur;
        end
      end
    end
  end
endmodule
