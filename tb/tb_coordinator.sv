// tb_coordinator: drives an orientation position stream in raster order against
// a queue of features and checks launch, busy-drop and stale behaviour:
// a feature is launched exactly at its own position with that position's
// sector, dropped when the encoder is busy, and discarded once passed.
module tb_coordinator;
  import orb_pkg::*;
  localparam int SW = 5;
  logic clk = 0, rst_n = 0;
  logic or_valid = 0, or_ok = 0;
  logic [XW-1:0] or_x = 0;
  logic [YW-1:0] or_y = 0;
  logic [SW-1:0] or_sector = 0;
  logic f_empty;
  logic [XW-1:0] f_x;
  logic [YW-1:0] f_y;
  logic [SCORE_W-1:0] f_score;
  logic f_pop, br_ready = 1, br_start;
  logic [XW-1:0] br_x;
  logic [YW-1:0] br_y;
  logic [SCORE_W-1:0] br_score;
  logic [SW-1:0] br_sector;
  logic ev_launch, ev_busy_drop, ev_stale;
  int checks = 0, failures = 0;
  int qx [$], qy [$];
  int n_launch = 0, n_busy = 0, n_stale = 0;

  assign f_score = 12'd77;

  // queue head as seen by the block
  task automatic show_head();
    f_empty = qx.size() == 0;
    f_x = f_empty ? '0 : XW'(qx[0]);
    f_y = f_empty ? '0 : YW'(qy[0]);
  endtask

  coordinator #(.SW(SW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (ev_launch) n_launch++;
    if (ev_busy_drop) n_busy++;
    if (ev_stale) n_stale++;
  end

  initial begin
    // features at known positions; (5,2) is not on the stream (odd x skipped) -> stale
    qx = '{3, 6, 8, 5, 10, 12};
    qy = '{1, 1, 1, 2, 2, 3};
    show_head();
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int y = 0; y < 5; y++) for (int x = 0; x < 16; x++) begin
      bit exp_match, exp_pass;
      if (y == 2 && x == 5) continue;   // position missing from the stream
      @(negedge clk);
      or_valid = 1; or_ok = 1; or_x = XW'(x); or_y = YW'(y);
      or_sector = SW'(x + y);
      br_ready = !(y == 1 && x == 8);   // encoder busy for the feature at (8,1)
      #1;
      exp_match = qx.size() > 0 && qx[0] == x && qy[0] == y;
      exp_pass  = qx.size() > 0 && (qy[0] < y || (qy[0] == y && qx[0] < x));
      checks++;
      if (f_pop != (exp_match || exp_pass) || br_start != (exp_match && br_ready)) begin
        failures++; $display("(%0d,%0d) pop %0d start %0d", x, y, f_pop, br_start);
      end
      if (br_start) begin
        checks++;
        if (br_x != XW'(x) || br_y != YW'(y) || br_sector != SW'(x + y) || br_score != 12'd77) failures++;
      end
      @(posedge clk); #1;
      if (exp_match || exp_pass) begin void'(qx.pop_front()); void'(qy.pop_front()); end
      show_head();
    end
    @(negedge clk); or_valid = 0;
    repeat (2) @(posedge clk);
    checks += 3;
    if (n_launch != 4) begin failures++; $display("launches %0d", n_launch); end
    if (n_busy != 1)   begin failures++; $display("busy drops %0d", n_busy); end
    if (n_stale != 1)  begin failures++; $display("stale %0d", n_stale); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
