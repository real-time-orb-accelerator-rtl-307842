// brief_window_mem: circular column memory holding the recent columns of the
// smoothed image band around the rBRIEF patches.
//
// Each word is one image column of 31 8-bit pixels (row 0 on top), so a whole
// column of a patch is written in one cycle. There is one write port and two
// synchronous read ports (a dual-port RAM in an FPGA); rbrief instantiates three
// copies with the same write data to read six pixels (three test pairs) per
// cycle. DEPTH columns are kept; a patch stays readable for DEPTH-31 further
// column writes.
//
// Timing: write on the clock edge with we; read data appears one cycle after the
// address (read-before-write for the same address in the same cycle).
module brief_window_mem #(
  parameter int unsigned DEPTH = 128,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [7:0]    wcol [31],
  input  logic [AW-1:0] raddr_a,
  input  logic [AW-1:0] raddr_b,
  output logic [7:0]    rcol_a [31],
  output logic [7:0]    rcol_b [31]
);
  logic [247:0] mem [DEPTH];
  logic [247:0] wword, ra, rb;

  always_comb
    for (int r = 0; r < 31; r++) wword[r*8 +: 8] = wcol[r];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wword;
    ra <= mem[raddr_a];
    rb <= mem[raddr_b];
  end

  always_comb
    for (int r = 0; r < 31; r++) begin
      rcol_a[r] = ra[r*8 +: 8];
      rcol_b[r] = rb[r*8 +: 8];
    end
endmodule
