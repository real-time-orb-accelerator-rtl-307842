// tb_feat_fifo: random pushes and pops against a queue model, including pushes
// while full (must be dropped and flagged) and simultaneous push/pop.
module tb_feat_fifo;
  localparam int DW = 31, DEPTH = 8;
  logic clk = 0, rst_n = 0;
  logic push = 0, pop = 0;
  logic [DW-1:0] din = 0, dout;
  logic empty, full, overflow;
  logic [3:0] level;
  logic [DW-1:0] model [$];
  int checks = 0, failures = 0, n_ovf = 0;

  feat_fifo #(.DW(DW), .DEPTH(DEPTH)) dut (.clk, .rst_n, .push, .din, .pop, .dout, .empty, .full, .level, .overflow);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit exp_ovf;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      // phases: fill-heavy, then drain-heavy
      push = ($urandom % 100) < ((i / 200) % 2 ? 30 : 70);
      pop  = ($urandom % 100) < ((i / 200) % 2 ? 70 : 30);
      din  = DW'($urandom);
      #1;
      checks++;
      if (empty != (model.size() == 0) || full != (model.size() == DEPTH) || level != 4'(model.size()))
        failures++;
      if (model.size() > 0) begin
        checks++;
        if (dout != model[0]) failures++;
      end
      exp_ovf = 0;
      if (pop && model.size() > 0) void'(model.pop_front());
      if (push) begin
        if (model.size() < DEPTH) model.push_back(din);
        else exp_ovf = 1;
      end
      @(posedge clk); #1;
      checks++;
      if (overflow != exp_ovf) failures++;
      n_ovf += exp_ovf;
    end
    checks++;
    if (n_ovf == 0) failures++;
    $display("overflows %0d", n_ovf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
