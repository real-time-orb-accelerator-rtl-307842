// window_buffer: K x K window of a raster stream built from line-buffer columns.
//
// Every accepted column (in_valid) is shifted in from the right: win[r][K-1] is
// the newest column, win[r][0] the column K-1 samples earlier; row 0 is the
// oldest line. Together with a K-line line_buffer this gives the K x K
// neighbourhood of the sample that arrived (K-1)/2 lines and (K-1)/2 columns
// before the newest one. The registers shift only on accepted samples, as the
// 8-bit shift registers of the architecture do.
//
// Timing: win updates on the clock edge that accepts a column (one-cycle
// latency from col_in).
module window_buffer #(
  parameter int unsigned K  = 7,
  parameter int unsigned DW = 8
) (
  input  logic          clk,
  input  logic          in_valid,
  input  logic [DW-1:0] col_in [K],
  output logic [DW-1:0] win [K][K]
);
  always_ff @(posedge clk) begin
    if (in_valid) begin
      for (int r = 0; r < K; r++) begin
        for (int c = 0; c < K - 1; c++) win[r][c] <= win[r][c+1];
        win[r][K-1] <= col_in[r];
      end
    end
  end
endmodule
