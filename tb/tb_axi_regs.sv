// tb_axi_regs: AXI4-Lite master exercising the register map: reset values,
// writes and read-back of CTRL and THRESH (with wstrb), status registers, the
// feature-memory window (served here by a one-cycle-latency memory stand-in
// whose data is a known function of index and word), address and data phases
// arriving in either order, and responses held while the master stalls.
module tb_axi_regs;
  localparam int AW = 17, MAX = 1024;
  logic clk = 0, rst_n = 0;
  logic [AW-1:0] s_awaddr = 0, s_araddr = 0;
  logic s_awvalid = 0, s_wvalid = 0, s_bready = 0, s_arvalid = 0, s_rready = 0;
  logic [31:0] s_wdata = 0;
  logic [3:0] s_wstrb = 0;
  logic s_awready, s_wready, s_bvalid, s_arready, s_rvalid;
  logic [1:0] s_bresp, s_rresp;
  logic [31:0] s_rdata;
  logic enable;
  logic [7:0] threshold;
  logic [15:0] frame_no = 16'h1234, lost = 16'h0042;
  logic [10:0] last_count = 11'd321, count = 11'd17;
  logic [31:0] busy_drops = 32'hB0B0, overflows = 32'h0F0F, stale = 32'h5A5A, launched = 32'h7777;
  logic fm_rd_en;
  logic [9:0] fm_rd_index;
  logic [3:0] fm_rd_word;
  logic [31:0] fm_rd_data;
  int checks = 0, failures = 0;

  axi_regs #(.ADDR_W(AW), .MAX_FEAT(MAX)) dut (.*);
  always #5 clk = ~clk;

  // feature memory stand-in: synchronous read
  always @(posedge clk) if (fm_rd_en) fm_rd_data <= {6'd0, fm_rd_index, 12'hABC, fm_rd_word};

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic axi_write(input logic [AW-1:0] a, input logic [31:0] d, input logic [3:0] strb, input bit data_first);
    @(negedge clk);
    if (data_first) begin
      s_wvalid = 1; s_wdata = d; s_wstrb = strb;
      repeat (2) @(negedge clk);
      s_awvalid = 1; s_awaddr = a;
    end else begin
      s_awvalid = 1; s_awaddr = a;
      repeat (2) @(negedge clk);
      s_wvalid = 1; s_wdata = d; s_wstrb = strb;
    end
    do @(posedge clk); while (!(s_awready && s_wready));
    @(negedge clk); s_awvalid = 0; s_wvalid = 0;
    repeat ($urandom % 3) @(negedge clk);   // stall the response
    checks++;
    if (!s_bvalid || s_bresp != 2'b00) failures++;
    s_bready = 1;
    @(negedge clk); s_bready = 0;
  endtask

  task automatic axi_read(input logic [AW-1:0] a, output logic [31:0] d);
    logic [31:0] first;
    @(negedge clk);
    s_arvalid = 1; s_araddr = a;
    do @(posedge clk); while (!s_arready);
    @(negedge clk); s_arvalid = 0;
    while (!s_rvalid) @(negedge clk);
    first = s_rdata;
    repeat (1 + $urandom % 3) @(negedge clk);   // stall: data must hold
    checks++;
    if (!s_rvalid || s_rdata != first || s_rresp != 2'b00) failures++;
    d = s_rdata;
    s_rready = 1;
    @(negedge clk); s_rready = 0;
  endtask

  task automatic expect_read(input logic [AW-1:0] a, input logic [31:0] e);
    logic [31:0] d;
    axi_read(a, d);
    checks++;
    if (d != e) begin failures++; $display("read %h: %h exp %h", a, d, e); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    expect_read('h00, 32'd1);
    expect_read('h04, 32'd20);
    checks += 2;
    if (enable != 1 || threshold != 20) failures++;
    axi_write('h04, 32'h0000_0037, 4'b0001, 0);
    checks++; if (threshold != 8'h37) failures++;
    axi_write('h04, 32'h0000_0099, 4'b0000, 1);   // no byte enabled: unchanged
    checks++; if (threshold != 8'h37) failures++;
    axi_write('h00, 32'h0, 4'b1111, 1);
    checks++; if (enable != 0) failures++;
    expect_read('h00, 32'd0);
    expect_read('h04, 32'h37);
    expect_read('h08, 32'h1234);
    expect_read('h0C, 32'd321);
    expect_read('h10, 32'd17);
    expect_read('h14, 32'h42);
    expect_read('h18, 32'hB0B0);
    expect_read('h1C, 32'h0F0F);
    expect_read('h20, 32'h5A5A);
    expect_read('h24, 32'h7777);
    expect_read('h40, 32'h0);
    for (int k = 0; k < 20; k++) begin
      int idx, w;
      idx = $urandom % MAX; w = $urandom % 16;
      expect_read(AW'('h10000 + idx * 64 + w * 4), {6'd0, 10'(idx), 12'hABC, 4'(w)});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
