// coordinator: pairs queued FAST features with the orientation stream and
// launches the descriptor encoder.
//
// The orientation block emits, for every pixel position in raster order, the
// sector of the 31x31 patch centred there. Whenever that position equals the
// oldest queued feature, the feature is taken from the queue and, if the rBRIEF
// encoder is ready, launched with the sector; the launch coincides with the
// write of the patch's newest column into the encoder's window memory. If the
// encoder is still busy with an earlier feature the new one is dropped (the
// encoder needs 86 cycles per descriptor and the window moves on meanwhile; the
// architecture gives no policy for this, dropping is this design's choice). A
// queued feature that the stream has already passed is discarded as stale.
// Only positions whose patch lies inside the image (o_ok) are considered.
//
// Interface: orientation stream (or_valid, or_ok, or_x, or_y, or_sector), FIFO
// head (f_empty, f_x, f_y, f_score) and f_pop, encoder handshake (br_ready,
// br_start + fields), and one-cycle event pulses ev_launch, ev_busy_drop,
// ev_stale.
// Timing: combinational from inputs to f_pop/br_start; the pulses are registered.
// The request fields br_x/br_y/br_score/br_sector are the FIFO head and the
// stream's sector passed through unchanged; only the control is decided here.
module coordinator
  import orb_pkg::*;
#(
  parameter int unsigned SW = 5
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               or_valid,
  input  logic               or_ok,
  input  logic [XW-1:0]      or_x,
  input  logic [YW-1:0]      or_y,
  input  logic [SW-1:0]      or_sector,
  input  logic               f_empty,
  input  logic [XW-1:0]      f_x,
  input  logic [YW-1:0]      f_y,
  input  logic [SCORE_W-1:0] f_score,
  output logic               f_pop,
  input  logic               br_ready,
  output logic               br_start,
  output logic [XW-1:0]      br_x,
  output logic [YW-1:0]      br_y,
  output logic [SCORE_W-1:0] br_score,
  output logic [SW-1:0]      br_sector,
  output logic               ev_launch,
  output logic               ev_busy_drop,
  output logic               ev_stale
);
  logic active, match, passed;

  assign active   = or_valid && or_ok && !f_empty;
  assign match    = active && f_y == or_y && f_x == or_x;
  assign passed   = active && (f_y < or_y || (f_y == or_y && f_x < or_x));
  assign f_pop    = match || passed;
  assign br_start = match && br_ready;
  assign br_x     = f_x;
  assign br_y     = f_y;
  assign br_score = f_score;
  assign br_sector = or_sector;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ev_launch <= 1'b0; ev_busy_drop <= 1'b0; ev_stale <= 1'b0;
    end else begin
      ev_launch    <= br_start;
      ev_busy_drop <= match && !br_ready;
      ev_stale     <= passed;
    end
  end
endmodule
