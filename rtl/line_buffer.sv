// line_buffer: delay line holding the previous LINES-1 image lines of a
// one-sample-per-clock raster stream.
//
// For each accepted sample (in_valid) at column in_col it presents the vertical
// column of LINES samples ending at that sample: col_out[LINES-1] is the incoming
// sample, col_out[LINES-2] the sample one line above, ... col_out[0] the sample
// LINES-1 lines above. The lines are stored as one word per image column (the
// LINES-1 older samples of that column), read combinationally and rewritten
// shifted by one line when the sample is accepted. This behaves exactly like the
// chain of line-long 8-bit shift registers the architecture describes, and maps
// onto block or distributed RAM; the storage style is this design's choice.
// Columns of lines that were never written read as zero after reset is not
// guaranteed (the memory has no reset); consumers ignore border windows.
//
// Timing: col_out is combinational from in_col/in_data and the memory; the
// memory updates on the clock edge that accepts the sample.
module line_buffer #(
  parameter int unsigned LINES = 7,
  parameter int unsigned WIDTH = 640,
  parameter int unsigned DW    = 8,
  localparam int unsigned AW   = (WIDTH > 1) ? $clog2(WIDTH) : 1
) (
  input  logic              clk,
  input  logic              in_valid,
  input  logic [AW-1:0]     in_col,
  input  logic [DW-1:0]     in_data,
  output logic [DW-1:0]     col_out [LINES]
);
  logic [(LINES-1)*DW-1:0] mem [WIDTH];
  logic [(LINES-1)*DW-1:0] word;
  logic [LINES*DW-1:0]     shifted;

  assign word    = mem[in_col];
  assign shifted = {in_data, word};

  always_comb begin
    for (int l = 0; l < LINES - 1; l++) col_out[l] = word[l*DW +: DW];
    col_out[LINES-1] = in_data;
  end

  always_ff @(posedge clk) begin
    if (in_valid) mem[in_col] <= shifted[LINES*DW-1:DW];
  end
endmodule
