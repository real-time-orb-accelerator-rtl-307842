// orientation: patch orientation of every pixel of a smoothed stream, quantised
// into N_SECT sectors without an arc tangent.
//
// A 31-line line buffer delivers, for each accepted pixel, the column of 31
// pixels above it. The intensity moments of the 31x31 patch (Eq. m_pq = sum
// x^p y^q I(x,y), x,y in [-15,15]) are kept incrementally from column sums only:
// with C the plain sum and D the y-weighted sum of a column, the patch sum S and
// moments are updated when column C_in enters and column C_out leaves as
//   m01' = m01 - D_out + D_in
//   m10' = m10 - S + 16*C_out + 15*C_in
//   S'   = S - C_out + C_in
// The last 31 column sums are held in a shift register. The quadrant follows
// from the signs of m10 and m01; inside the quadrant the angle phi (measured
// from the quadrant's first axis, u along it and v across it) is found by a
// priority encoder over the M = N_SECT/4 conditions u*tan(b_i) >= v, where the
// boundaries b_i = (i - 1/2) * 90/M degrees put sector centres on multiples of
// 90/M (so 0, 90, 180, 270 degrees are exact). The count k of boundaries passed
// gives the full sector (q*M + k) mod N_SECT, output as quadrant o_q and
// in-quadrant index o_theta. The tangent table (TAN_F fraction bits) is computed
// at elaboration. Ties (u*tan = v) and the placement of boundaries are this
// design's choice.
//
// Interface: smoothed stream in (in_valid, in_x, in_y, in_pix). Out, for every
// accepted input column: o_valid, o_col (the 31 pixels, o_col[0] the top row),
// o_x/o_y (centre of the patch whose newest column is o_col), o_q, o_theta and
// o_ok (the patch lies completely inside the smoothed image band).
// Timing: outputs leave 3 cycles after the input pixel was accepted.
module orientation
  import orb_pkg::*;
#(
  parameter int unsigned W      = IMG_W,
  parameter int unsigned N_SECT = N_SECTORS,
  parameter int unsigned FIRST  = GAUSS_R,   // first valid column/row of the stream
  localparam int unsigned M     = N_SECT / 4,
  localparam int unsigned TW    = (M > 1) ? $clog2(M) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [XW-1:0] in_x,
  input  logic [YW-1:0] in_y,
  input  logic [7:0]    in_pix,
  output logic          o_valid,
  output logic          o_ok,
  output logic [XW-1:0] o_x,
  output logic [YW-1:0] o_y,
  output logic [1:0]    o_q,
  output logic [TW-1:0] o_theta,
  output logic [7:0]    o_col [31]
);
  localparam int unsigned AW = $clog2(W);

  // ---------------------------------------------------------- tangent table
  logic [47:0] tanb [M];
  for (genvar i = 0; i < M; i++) begin : g_tan
    localparam longint TB = tan_boundary(i + 1, M);
    assign tanb[i] = 48'(TB);
  end

  // ---------------------------------------------------------- stage 1: column sums
  logic [7:0] col [31];
  line_buffer #(.LINES(31), .WIDTH(W), .DW(8)) u_lb (
    .clk, .in_valid, .in_col(in_x[AW-1:0]), .in_data(in_pix), .col_out(col));

  logic signed [31:0] c_in, d_in;
  always_comb begin
    c_in = '0;
    d_in = '0;
    for (int r = 0; r < 31; r++) begin
      c_in = c_in + 32'(col[r]);
      d_in = d_in + (r - 15) * $signed({24'd0, col[r]});
    end
  end

  logic               v1, v2;
  logic [XW-1:0]      x1, x2;
  logic [YW-1:0]      y1, y2;
  logic signed [31:0] c1, d1;
  logic [7:0]         col1 [31];
  logic [7:0]         col2 [31];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; x1 <= '0; y1 <= '0; c1 <= '0; d1 <= '0;
    end else begin
      v1 <= in_valid;
      if (in_valid) begin
        x1 <= in_x; y1 <= in_y; c1 <= c_in; d1 <= d_in;
      end
    end
  end
  always_ff @(posedge clk) if (in_valid) col1 <= col;

  // ---------------------------------------------------------- stage 2: moments
  logic signed [31:0] hc [31];
  logic signed [31:0] hd [31];
  logic signed [31:0] s_sum, m10, m01;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 31; i++) begin hc[i] <= '0; hd[i] <= '0; end
      s_sum <= '0; m10 <= '0; m01 <= '0;
      v2 <= 1'b0; x2 <= '0; y2 <= '0;
    end else begin
      v2 <= v1;
      if (v1) begin
        for (int i = 0; i < 30; i++) begin hc[i] <= hc[i+1]; hd[i] <= hd[i+1]; end
        hc[30] <= c1;
        hd[30] <= d1;
        s_sum  <= s_sum - hc[0] + c1;
        m01    <= m01 - hd[0] + d1;
        m10    <= m10 - s_sum + 16 * hc[0] + 15 * c1;
        x2     <= x1;
        y2     <= y1;
      end
    end
  end
  always_ff @(posedge clk) if (v1) col2 <= col1;

  // ---------------------------------------------------------- stage 3: sector
  logic [47:0]           u, v;
  logic [1:0]            q;
  logic [$clog2(M+1)-1:0] k;
  logic [TW+1:0]         sector;
  always_comb begin
    logic [31:0] ax, ay;
    ax = (m10 < 0) ? 32'(-m10) : 32'(m10);
    ay = (m01 < 0) ? 32'(-m01) : 32'(m01);
    if (m01 >= 0) q = (m10 >= 0) ? 2'd0 : 2'd1;
    else          q = (m10 <  0) ? 2'd2 : 2'd3;
    if (q[0]) begin u = 48'(ay); v = 48'(ax); end
    else      begin u = 48'(ax); v = 48'(ay); end
    // priority encoder: first boundary not yet passed
    k = ($clog2(M+1))'(M);
    for (int i = M - 1; i >= 0; i--)
      if (u * tanb[i] >= (v << TAN_F)) k = ($clog2(M+1))'(i);
    sector = (TW+2)'((32'(q) * M + 32'(k)) % N_SECT);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      o_valid <= 1'b0; o_ok <= 1'b0; o_x <= '0; o_y <= '0; o_q <= '0; o_theta <= '0;
    end else begin
      o_valid <= v2;
      o_ok    <= v2 && x2 >= XW'(FIRST + 30) && y2 >= YW'(FIRST + 30);
      o_x     <= x2 - XW'(15);
      o_y     <= y2 - YW'(15);
      o_q     <= sector[TW+1:TW];
      o_theta <= sector[TW-1:0];
    end
  end
  always_ff @(posedge clk) if (v2) o_col <= col2;
endmodule
