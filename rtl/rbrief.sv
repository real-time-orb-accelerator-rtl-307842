// rbrief: steered (rotated) BRIEF descriptor encoder, three test pairs per cycle.
//
// The smoothed image reaches this block one 31-pixel column per accepted sample
// (col_valid, col) and is kept in three identical circular column memories
// (brief_window_mem), each read at two addresses per cycle, so three pairs of
// pixels (six pixels) are compared every cycle. A descriptor of 256 bits thus
// takes ceil(256/3) = 86 read cycles. Bit i of the descriptor is 1 when the
// pixel at point a_i of the rotated pattern is darker than the pixel at b_i.
// The bits are merged into the descriptor with a mask of three ones that is
// shifted by three positions every cycle.
//
// The rotated patterns are not computed at run time: for every one of the
// N_SECT orientation sectors the 256 pairs are pre-rotated at elaboration into a
// constant table (orb_pkg::rot_coord), indexed by the sector of the feature.
// Pattern points lie inside a circle of radius 15, so rotated points never leave
// the 31x31 patch.
//
// Interface:
//  * col_valid/col: column stream (col[0] is the top row of the 31-line band).
//  * start: launch a descriptor for the patch whose newest (rightmost) column is
//    the one written in the same cycle; must coincide with col_valid. Accepted
//    only when ready. s_x, s_y, s_score, s_sector travel with the request.
//  * o_valid pulses for one cycle with o_desc and the request's fields.
// Timing: start in cycle T -> 86 read cycles T+1..T+86 -> o_valid in cycle T+88;
// ready again in cycle T+87. The window memories keep a patch for DEPTH-31
// column writes, which must cover those 88 cycles (DEPTH = 128 gives 97).
module rbrief
  import orb_pkg::*;
#(
  parameter int unsigned N_SECT = N_SECTORS,
  parameter int unsigned DEPTH  = 128,
  localparam int unsigned AW    = $clog2(DEPTH),
  localparam int unsigned SW    = $clog2(N_SECT)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  col_valid,
  input  logic [7:0]            col [31],
  input  logic                  start,
  input  logic [XW-1:0]         s_x,
  input  logic [YW-1:0]         s_y,
  input  logic [SCORE_W-1:0]    s_score,
  input  logic [SW-1:0]         s_sector,
  output logic                  ready,
  output logic                  o_valid,
  output logic [XW-1:0]         o_x,
  output logic [YW-1:0]         o_y,
  output logic [SCORE_W-1:0]    o_score,
  output logic [SW-1:0]         o_sector,
  output logic [BRIEF_BITS-1:0] o_desc
);
  // ------------------------------------------------------------ pattern table
  // entry = {ax+15, ay+15, bx+15, by+15}, 5 bits each
  logic [19:0] rom [N_SECT][BRIEF_BITS];
  for (genvar s = 0; s < N_SECT; s++) begin : g_sect
    for (genvar i = 0; i < BRIEF_BITS; i++) begin : g_pair
      localparam int AX = rot_coord(i, 0, 0, s, N_SECT) + 15;
      localparam int AY = rot_coord(i, 0, 1, s, N_SECT) + 15;
      localparam int BX = rot_coord(i, 1, 0, s, N_SECT) + 15;
      localparam int BY = rot_coord(i, 1, 1, s, N_SECT) + 15;
      assign rom[s][i] = {5'(AX), 5'(AY), 5'(BX), 5'(BY)};
    end
  end

  // ------------------------------------------------------------ window memories
  logic [AW-1:0] wptr;
  logic [AW-1:0] raddr_a [3];
  logic [AW-1:0] raddr_b [3];
  logic [7:0]    rcol_a [3][31];
  logic [7:0]    rcol_b [3][31];

  for (genvar j = 0; j < 3; j++) begin : g_win
    brief_window_mem #(.DEPTH(DEPTH)) u_mem (
      .clk, .we(col_valid), .waddr(wptr), .wcol(col),
      .raddr_a(raddr_a[j]), .raddr_b(raddr_b[j]),
      .rcol_a(rcol_a[j]), .rcol_b(rcol_b[j]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) wptr <= '0;
    else if (col_valid) wptr <= wptr + AW'(1);
  end

  // ------------------------------------------------------------ control
  logic                  busy;
  logic [6:0]            cnt;
  logic [AW-1:0]         base;
  logic [SW-1:0]         sect;
  logic [XW-1:0]         fx;
  logic [YW-1:0]         fy;
  logic [SCORE_W-1:0]    fscore;
  logic [BRIEF_BITS-1:0] mask, desc;
  // read stage
  logic                  rd_v, rd_last;
  logic [BRIEF_BITS-1:0] rd_mask;
  logic [4:0]            row_a [3];
  logic [4:0]            row_b [3];

  assign ready = !busy;

  // addresses of the three pairs of this cycle
  logic [19:0] ent [3];
  always_comb begin
    for (int j = 0; j < 3; j++) begin
      logic [8:0] pidx;
      pidx       = 9'(cnt) * 9'd3 + 9'(j);
      ent[j]     = rom[sect][pidx[7:0]];
      raddr_a[j] = base + AW'(ent[j][19:15]) - AW'(30);
      raddr_b[j] = base + AW'(ent[j][9:5])   - AW'(30);
    end
  end

  // comparison of the pixels returned by the memories
  logic [2:0]            tau;
  logic [BRIEF_BITS-1:0] tau_rep;
  always_comb begin
    for (int j = 0; j < 3; j++) tau[j] = rcol_a[j][row_a[j]] < rcol_b[j][row_b[j]];
    for (int i = 0; i < BRIEF_BITS; i++) tau_rep[i] = tau[i % 3];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; cnt <= '0; base <= '0; sect <= '0; fx <= '0; fy <= '0; fscore <= '0;
      mask <= '0; desc <= '0; rd_v <= 1'b0; rd_last <= 1'b0; rd_mask <= '0;
      for (int j = 0; j < 3; j++) begin row_a[j] <= '0; row_b[j] <= '0; end
      o_valid <= 1'b0; o_x <= '0; o_y <= '0; o_score <= '0; o_sector <= '0; o_desc <= '0;
    end else begin
      o_valid <= 1'b0;
      // compare stage
      if (rd_v) begin
        desc <= desc | (rd_mask & tau_rep);
        if (rd_last) begin
          o_valid  <= 1'b1;
          o_desc   <= desc | (rd_mask & tau_rep);
          o_x      <= fx;
          o_y      <= fy;
          o_score  <= fscore;
          o_sector <= sect;
        end
      end
      // read stage
      rd_v <= busy;
      rd_last <= busy && cnt == 7'(BRIEF_CYCLES - 1);
      if (busy) begin
        rd_mask <= mask;
        for (int j = 0; j < 3; j++) begin
          row_a[j] <= ent[j][14:10];
          row_b[j] <= ent[j][4:0];
        end
        mask <= mask << 3;
        cnt  <= cnt + 7'd1;
        if (cnt == 7'(BRIEF_CYCLES - 1)) busy <= 1'b0;
      end else if (start) begin
        busy   <= 1'b1;
        cnt    <= '0;
        base   <= wptr;
        sect   <= s_sector;
        fx     <= s_x;
        fy     <= s_y;
        fscore <= s_score;
        mask   <= BRIEF_BITS'(3'b111);
        desc   <= '0;
      end
    end
  end

  // a launch must name a column that is being written
  assert property (@(posedge clk) disable iff (!rst_n) (start && ready) |-> col_valid);
endmodule
