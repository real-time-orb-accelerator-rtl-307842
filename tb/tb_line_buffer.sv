// tb_line_buffer: streams a random 8-column image through a 4-line buffer and
// checks every presented column against the stored image.
module tb_line_buffer;
  localparam int LINES = 4, WIDTH = 8, ROWS = 10;
  logic clk = 0;
  logic in_valid = 0;
  logic [2:0] in_col = 0;
  logic [7:0] in_data = 0;
  logic [7:0] col_out [LINES];
  logic [7:0] img [ROWS][WIDTH];
  int checks = 0, failures = 0;

  line_buffer #(.LINES(LINES), .WIDTH(WIDTH), .DW(8)) dut (.clk, .in_valid, .in_col, .in_data, .col_out);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int y = 0; y < ROWS; y++) for (int x = 0; x < WIDTH; x++) img[y][x] = 8'($urandom);
    for (int y = 0; y < ROWS; y++) begin
      for (int x = 0; x < WIDTH; x++) begin
        @(negedge clk);
        in_valid = 1; in_col = 3'(x); in_data = img[y][x];
        #1;
        if (y >= LINES - 1) begin
          for (int l = 0; l < LINES; l++) begin
            checks++;
            if (col_out[l] != img[y - (LINES - 1) + l][x]) begin
              failures++;
              $display("y=%0d x=%0d l=%0d got %0d exp %0d", y, x, l, col_out[l], img[y-(LINES-1)+l][x]);
            end
          end
        end
        @(posedge clk);
        // a gap: nothing must change
        @(negedge clk); in_valid = 0; in_data = 8'($urandom);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
