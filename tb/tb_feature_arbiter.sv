// tb_feature_arbiter: three scale inputs with random arrivals, including
// simultaneous arrivals on all inputs and back-to-back arrivals on one input.
// Checks every output against a cycle model of a one-entry-per-input,
// round-robin merger (data, scale stamp, order), and the overflow flag.
module tb_feature_arbiter;
  import orb_pkg::*;
  localparam int N = 3;
  logic clk = 0, rst_n = 0;
  logic in_valid [N];
  feature_t in_feat [N];
  logic o_valid, overflow;
  feature_t o_feat;
  int checks = 0, failures = 0, n_out = 0, n_ovf = 0, n_all3 = 0;
  // model state
  bit m_pend [N];
  feature_t m_hold [N];
  int m_last = N - 1;

  feature_arbiter #(.N(N)) dut (.clk, .rst_n, .in_valid, .in_feat, .o_valid, .o_feat, .overflow);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N; i++) begin in_valid[i] = 0; in_feat[i] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      int g;
      bit exp_v, exp_ovf;
      feature_t exp_f;
      @(negedge clk);
      for (int i = 0; i < N; i++) begin
        in_valid[i] = (t % 50 == 0) ? 1 : (($urandom % 6) == 0);
        in_feat[i] = '0;
        in_feat[i].x = XW'($urandom); in_feat[i].y = YW'($urandom);
        in_feat[i].score = SCORE_W'($urandom); in_feat[i].sector = 6'($urandom);
        in_feat[i].desc = {8{32'($urandom)}};
        in_feat[i].scale = 2'($urandom);
      end
      if (in_valid[0] && in_valid[1] && in_valid[2]) n_all3++;
      // model: grant among pending (state before this edge)
      g = -1;
      for (int k = 1; k <= N; k++) if (g < 0 && m_pend[(m_last + k) % N]) g = (m_last + k) % N;
      exp_v = g >= 0;
      if (exp_v) begin exp_f = m_hold[g]; exp_f.scale = 2'(g); m_last = g; end
      exp_ovf = 0;
      for (int i = 0; i < N; i++) begin
        if (in_valid[i]) begin
          if (m_pend[i] && g != i) exp_ovf = 1;
          else begin m_pend[i] = 1; m_hold[i] = in_feat[i]; end
        end else if (g == i) m_pend[i] = 0;
      end
      @(posedge clk); #1;
      checks++;
      if (o_valid != exp_v || overflow != exp_ovf || (exp_v && o_feat != exp_f)) begin
        failures++;
        $display("t=%0d valid %0d/%0d ovf %0d/%0d", t, o_valid, exp_v, overflow, exp_ovf);
      end
      n_out += exp_v; n_ovf += exp_ovf;
    end
    checks++;
    if (n_ovf == 0 || n_all3 == 0 || n_out < 100) failures++;
    $display("outputs %0d overflows %0d all-three %0d", n_out, n_ovf, n_all3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
