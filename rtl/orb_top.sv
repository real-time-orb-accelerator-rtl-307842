// orb_top: ORB feature-extraction accelerator for a live video stream.
//
// RGB pixels arrive one per clock from the video input. They are converted to
// grey (rgb2bw), which also assigns each pixel its raster position, and form
// level 0 of an image pyramid; each further level is made by a 2:1 averaging
// image_scaler from the level above. Every level has its own orb_scale pipeline
// (FAST + non-maximum suppression, Gaussian smoothing, sector-quantised
// orientation, steered BRIEF). The features of all levels are merged by the
// feature_arbiter into the feature_memory, which the processor reads, together
// with the control and status registers, through the AXI4-Lite slave axi_regs.
//
// Parameters: frame size W x H (640x480), number of pyramid levels N_SCALES (2),
// orientation sectors N_SECT (32; 16 and 64 are the other evaluated settings),
// feature memory size MAX_FEAT, per-scale corner queue depth FIFO_DEPTH and
// descriptor window depth WIN_DEPTH (both this design's own sizes).
//
// Interface: video stream (vid_valid, vid_sof on the first pixel of a frame,
// vid_r/g/b), 32-bit AXI4-Lite slave (s_*), and frame_irq, a one-cycle pulse at
// every frame start after the previous frame's feature count has been latched.
// Timing: features appear in the feature memory about 18 lines (plus the
// 88-cycle descriptor time) after the pixel they are centred on arrives.
module orb_top
  import orb_pkg::*;
#(
  parameter int unsigned W          = IMG_W,
  parameter int unsigned H          = IMG_H,
  parameter int unsigned NSC        = N_SCALES,
  parameter int unsigned N_SECT     = N_SECTORS,
  parameter int unsigned MAX_FEAT   = 1024,
  parameter int unsigned FIFO_DEPTH = 64,
  parameter int unsigned WIN_DEPTH  = 128,
  parameter int unsigned ADDR_W     = 17,
  localparam int unsigned SW        = $clog2(N_SECT),
  localparam int unsigned FAW       = $clog2(MAX_FEAT)
) (
  input  logic              clk,
  input  logic              rst_n,
  // video input
  input  logic              vid_valid,
  input  logic              vid_sof,
  input  logic [7:0]        vid_r,
  input  logic [7:0]        vid_g,
  input  logic [7:0]        vid_b,
  // AXI4-Lite slave
  input  logic [ADDR_W-1:0] s_awaddr,
  input  logic              s_awvalid,
  output logic              s_awready,
  input  logic [31:0]       s_wdata,
  input  logic [3:0]        s_wstrb,
  input  logic              s_wvalid,
  output logic              s_wready,
  output logic [1:0]        s_bresp,
  output logic              s_bvalid,
  input  logic              s_bready,
  input  logic [ADDR_W-1:0] s_araddr,
  input  logic              s_arvalid,
  output logic              s_arready,
  output logic [31:0]       s_rdata,
  output logic [1:0]        s_rresp,
  output logic              s_rvalid,
  input  logic              s_rready,
  output logic              frame_irq
);
  logic       enable;
  logic [7:0] threshold;

  // ------------------------------------------------------------ grey conversion
  logic          g_valid, g_sof;
  logic [XW-1:0] g_x;
  logic [YW-1:0] g_y;
  logic [7:0]    g_pix;

  rgb2bw #(.W(W)) u_rgb2bw (
    .clk, .rst_n, .in_valid(vid_valid && enable), .in_sof(vid_sof),
    .in_r(vid_r), .in_g(vid_g), .in_b(vid_b),
    .o_valid(g_valid), .o_sof(g_sof), .o_x(g_x), .o_y(g_y), .o_pix(g_pix));

  // ------------------------------------------------------------ pyramid
  logic          lv_valid [NSC];
  logic [XW-1:0] lv_x     [NSC];
  logic [YW-1:0] lv_y     [NSC];
  logic [7:0]    lv_pix   [NSC];

  assign lv_valid[0] = g_valid;
  assign lv_x[0]     = g_x;
  assign lv_y[0]     = g_y;
  assign lv_pix[0]   = g_pix;

  logic     sc_valid [NSC];
  feature_t sc_feat  [NSC];
  logic     ev_launch [NSC];
  logic     ev_busy [NSC];
  logic     ev_stale [NSC];
  logic     ev_ovf [NSC];

  for (genvar s = 0; s < NSC; s++) begin : g_scale
    if (s > 0) begin : g_scaler
      image_scaler #(.W(W >> (s - 1))) u_scaler (
        .clk, .rst_n,
        .in_valid(lv_valid[s-1]), .in_x(lv_x[s-1]), .in_y(lv_y[s-1]), .in_pix(lv_pix[s-1]),
        .o_valid(lv_valid[s]), .o_x(lv_x[s]), .o_y(lv_y[s]), .o_pix(lv_pix[s]));
    end

    logic [XW-1:0]         fx;
    logic [YW-1:0]         fy;
    logic [SCORE_W-1:0]    fscore;
    logic [SW-1:0]         fsect;
    logic [BRIEF_BITS-1:0] fdesc;

    orb_scale #(.W(W >> s), .H(H >> s), .N_SECT(N_SECT),
                .FIFO_DEPTH(FIFO_DEPTH), .WIN_DEPTH(WIN_DEPTH)) u_scale (
      .clk, .rst_n,
      .in_valid(lv_valid[s]), .in_x(lv_x[s]), .in_y(lv_y[s]), .in_pix(lv_pix[s]),
      .threshold,
      .o_valid(sc_valid[s]), .o_x(fx), .o_y(fy), .o_score(fscore), .o_sector(fsect),
      .o_desc(fdesc),
      .ev_launch(ev_launch[s]), .ev_busy_drop(ev_busy[s]), .ev_stale(ev_stale[s]),
      .ev_overflow(ev_ovf[s]));

    always_comb begin
      sc_feat[s]        = '0;
      sc_feat[s].x      = fx;
      sc_feat[s].y      = fy;
      sc_feat[s].score  = fscore;
      sc_feat[s].sector = 6'(fsect);
      sc_feat[s].desc   = fdesc;
    end
  end

  // ------------------------------------------------------------ arbiter + memory
  logic     wr_valid, arb_ovf;
  feature_t wr_feat;

  feature_arbiter #(.N(NSC)) u_arb (
    .clk, .rst_n, .in_valid(sc_valid), .in_feat(sc_feat),
    .o_valid(wr_valid), .o_feat(wr_feat), .overflow(arb_ovf));

  logic           fm_rd_en;
  logic [FAW-1:0] fm_rd_index;
  logic [3:0]     fm_rd_word;
  logic [31:0]    fm_rd_data;
  logic [FAW:0]   count, last_count;
  logic [15:0]    frame_no, lost;

  feature_memory #(.MAX_FEAT(MAX_FEAT)) u_fmem (
    .clk, .rst_n, .frame_start(g_sof), .wr_valid, .wr_feat,
    .rd_en(fm_rd_en), .rd_index(fm_rd_index), .rd_word(fm_rd_word), .rd_data(fm_rd_data),
    .count, .last_count, .frame_no, .lost);

  // ------------------------------------------------------------ event counters
  logic [31:0] busy_drops, overflows, stale, launched;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_drops <= '0; overflows <= '0; stale <= '0; launched <= '0; frame_irq <= 1'b0;
    end else begin
      logic [31:0] nb, no, ns, nl;
      nb = busy_drops; no = overflows + 32'(arb_ovf); ns = stale; nl = launched;
      for (int s = 0; s < NSC; s++) begin
        nb = nb + 32'(ev_busy[s]);
        no = no + 32'(ev_ovf[s]);
        ns = ns + 32'(ev_stale[s]);
        nl = nl + 32'(ev_launch[s]);
      end
      busy_drops <= nb;
      overflows  <= no;
      stale      <= ns;
      launched   <= nl;
      frame_irq  <= g_sof;
    end
  end

  axi_regs #(.ADDR_W(ADDR_W), .MAX_FEAT(MAX_FEAT)) u_axi (
    .clk, .rst_n,
    .s_awaddr, .s_awvalid, .s_awready, .s_wdata, .s_wstrb, .s_wvalid, .s_wready,
    .s_bresp, .s_bvalid, .s_bready, .s_araddr, .s_arvalid, .s_arready,
    .s_rdata, .s_rresp, .s_rvalid, .s_rready,
    .enable, .threshold,
    .frame_no, .last_count, .count, .lost, .busy_drops, .overflows, .stale, .launched,
    .fm_rd_en, .fm_rd_index, .fm_rd_word, .fm_rd_data);
endmodule
