// tb_window_buffer: shifts random columns (with gaps) into a 3x3 window and
// checks that it holds the last three accepted columns.
module tb_window_buffer;
  localparam int K = 3, N = 40;
  logic clk = 0, in_valid = 0;
  logic [7:0] col_in [K];
  logic [7:0] win [K][K];
  logic [7:0] cols [N][K];
  int checks = 0, failures = 0;

  window_buffer #(.K(K), .DW(8)) dut (.clk, .in_valid, .col_in, .win);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    n = 0;
    for (int i = 0; i < N; i++) for (int r = 0; r < K; r++) cols[i][r] = 8'($urandom);
    while (n < N) begin
      @(negedge clk);
      in_valid = ($urandom % 3) != 0;
      for (int r = 0; r < K; r++) col_in[r] = in_valid ? cols[n][r] : 8'($urandom);
      @(posedge clk); #1;
      if (in_valid) n++;
      if (n >= K) begin
        for (int r = 0; r < K; r++) for (int c = 0; c < K; c++) begin
          checks++;
          if (win[r][c] != cols[n - K + c][r]) failures++;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
