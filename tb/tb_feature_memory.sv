// tb_feature_memory: writes random features over three frames, reads every
// word of every stored feature back and checks the layout, the per-frame
// count, last_count and frame number latching, a write in the same cycle as
// the frame start, and the overflow counter when more than MAX_FEAT arrive.
module tb_feature_memory;
  import orb_pkg::*;
  localparam int MAX = 16;
  logic clk = 0, rst_n = 0;
  logic frame_start = 0, wr_valid = 0, rd_en = 0;
  feature_t wr_feat;
  logic [3:0] rd_index;
  logic [3:0] rd_word;
  logic [31:0] rd_data;
  logic [4:0] count, last_count;
  logic [15:0] frame_no, lost;
  feature_t model [MAX];
  int checks = 0, failures = 0;

  feature_memory #(.MAX_FEAT(MAX)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] exp_word(feature_t f, int w);
    if (w < 8)  return f.desc[32*w +: 32];
    if (w == 8) return {f.scale, 1'b0, f.y, 10'd0, f.x};
    if (w == 9) return {14'd0, f.sector, f.score};
    return 32'd0;
  endfunction

  task automatic write_feats(int n, bit first_with_sof);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      wr_valid = 1;
      frame_start = first_with_sof && i == 0;
      wr_feat.scale = 2'($urandom); wr_feat.x = XW'($urandom); wr_feat.y = YW'($urandom);
      wr_feat.score = SCORE_W'($urandom); wr_feat.sector = 6'($urandom);
      wr_feat.desc = {32'($urandom), 32'($urandom), 32'($urandom), 32'($urandom),
                      32'($urandom), 32'($urandom), 32'($urandom), 32'($urandom)};
      if (i < MAX) model[i] = wr_feat;
    end
    @(negedge clk); wr_valid = 0; frame_start = 0;
  endtask

  task automatic read_check(int n);
    for (int i = 0; i < n; i++) for (int w = 0; w < 16; w++) begin
      @(negedge clk); rd_en = 1; rd_index = 4'(i); rd_word = 4'(w);
      @(negedge clk); rd_en = 0;
      checks++;
      if (rd_data != exp_word(model[i], w)) begin
        failures++; $display("feature %0d word %0d: %h exp %h", i, w, rd_data, exp_word(model[i], w));
      end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    // frame 1: 5 features, the first written with the frame start
    write_feats(5, 1);
    checks += 2;
    if (count != 5) begin failures++; $display("count %0d", count); end
    if (frame_no != 1) failures++;
    read_check(5);
    // frame 2: 20 features, 4 more than fit
    @(negedge clk); frame_start = 1; @(negedge clk); frame_start = 0;
    checks += 2;
    if (last_count != 5 || frame_no != 2) failures++;
    if (count != 0) failures++;
    write_feats(20, 0);
    checks += 2;
    if (count != 16) failures++;
    if (lost != 4) begin failures++; $display("lost %0d", lost); end
    read_check(16);
    @(negedge clk); frame_start = 1; @(negedge clk); frame_start = 0;
    checks++;
    if (last_count != 16 || frame_no != 3) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
