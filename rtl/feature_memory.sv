// feature_memory: frame feature store readable by the processor.
//
// Features from the arbiter are appended in arrival order. At every start of
// frame the number of features stored for the finished frame is latched into
// last_count, the frame counter advances and the write index restarts at zero
// (a single buffer: software reads a frame's features while the next frame's
// first rows are being processed, which produce no features for BORDER lines;
// this policy is this design's choice). Writes beyond MAX_FEAT entries are
// discarded and counted in `lost`.
//
// The processor side sees each feature as 16 32-bit words (word index = low 4
// bits of rd_word):
//   0..7  descriptor bits [32w+31 : 32w]
//   8     {scale[1:0], 1'b0, y[8:0], 10'b0, x[9:0]}  (x in [9:0], y in [28:20])
//   9     {14'b0, sector[5:0], score[11:0]}
//   10-15 zero
// Timing: synchronous read, rd_data valid one cycle after rd_en.
module feature_memory
  import orb_pkg::*;
#(
  parameter int unsigned MAX_FEAT = 1024,
  localparam int unsigned AW      = $clog2(MAX_FEAT)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          frame_start,
  input  logic          wr_valid,
  input  feature_t      wr_feat,
  input  logic          rd_en,
  input  logic [AW-1:0] rd_index,
  input  logic [3:0]    rd_word,
  output logic [31:0]   rd_data,
  output logic [AW:0]   count,
  output logic [AW:0]   last_count,
  output logic [15:0]   frame_no,
  output logic [15:0]   lost
);
  feature_t mem [MAX_FEAT];
  feature_t rf;

  logic [AW:0] wr_addr;
  assign wr_addr = frame_start ? '0 : count;

  always_ff @(posedge clk)
    if (wr_valid && wr_addr < (AW+1)'(MAX_FEAT)) mem[wr_addr[AW-1:0]] <= wr_feat;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count <= '0; last_count <= '0; frame_no <= '0; lost <= '0;
    end else begin
      if (frame_start) begin
        last_count <= count;
        frame_no   <= frame_no + 16'd1;
        count      <= (AW+1)'(wr_valid);
      end else if (wr_valid) begin
        if (count < (AW+1)'(MAX_FEAT)) count <= count + (AW+1)'(1);
        else                           lost  <= lost + 16'd1;
      end
    end
  end

  // read port
  always_ff @(posedge clk) if (rd_en) rf <= mem[rd_index];
  logic [3:0] word_q;
  always_ff @(posedge clk) if (rd_en) word_q <= rd_word;

  always_comb begin
    case (word_q)
      4'd0, 4'd1, 4'd2, 4'd3, 4'd4, 4'd5, 4'd6, 4'd7:
              rd_data = rf.desc[32 * word_q[2:0] +: 32];
      4'd8:   rd_data = {rf.scale, 1'b0, rf.y, 10'd0, rf.x};
      4'd9:   rd_data = {14'd0, rf.sector, rf.score};
      default: rd_data = '0;
    endcase
  end
endmodule
