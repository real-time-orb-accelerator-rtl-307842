// axi_regs: 32-bit AXI4-Lite slave giving the processor access to the
// accelerator's control registers and to the feature memory.
//
// Register map (byte addresses; this map is this design's own):
//   0x00 CTRL       [0] enable: pixels reach the pyramid only when set (reset 1)
//   0x04 THRESH     [7:0] FAST contrast threshold, changeable at run time (reset 20)
//   0x08 FRAME      [15:0] frames started since reset
//   0x0C LAST_COUNT features stored for the previous frame
//   0x10 COUNT      features stored so far in the current frame
//   0x14 LOST       features discarded because the feature memory was full
//   0x18 BUSY_DROPS features dropped because a descriptor encoder was busy
//   0x1C OVERFLOWS  features lost in a corner queue or in the arbiter
//   0x20 STALE      queued corners passed by the orientation stream
//   0x24 LAUNCHED   descriptors started by all scales
//   0x10000 + 64*i + 4*w : word w of feature i (see feature_memory)
// Unmapped addresses read as zero; writes to read-only registers are ignored.
// All responses are OKAY (BRESP/RRESP are constant). The feature-memory read
// index is taken directly from the read address bits above bit 5.
//
// Protocol: one outstanding read and one outstanding write. AWREADY and WREADY
// rise together once both address and data are valid; ARREADY is high while no
// read response is pending. Reads return after two cycles for the feature memory
// (synchronous RAM) and after one cycle for registers.
module axi_regs #(
  parameter int unsigned ADDR_W   = 17,
  parameter int unsigned MAX_FEAT = 1024,
  localparam int unsigned FAW     = $clog2(MAX_FEAT)
) (
  input  logic              clk,
  input  logic              rst_n,
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
  // control outputs
  output logic              enable,
  output logic [7:0]        threshold,
  // status inputs
  input  logic [15:0]       frame_no,
  input  logic [FAW:0]      last_count,
  input  logic [FAW:0]      count,
  input  logic [15:0]       lost,
  input  logic [31:0]       busy_drops,
  input  logic [31:0]       overflows,
  input  logic [31:0]       stale,
  input  logic [31:0]       launched,
  // feature memory read port
  output logic              fm_rd_en,
  output logic [FAW-1:0]    fm_rd_index,
  output logic [3:0]        fm_rd_word,
  input  logic [31:0]       fm_rd_data
);
  // ------------------------------------------------------------ write channel
  logic do_write;
  assign do_write  = s_awvalid && s_wvalid && !s_bvalid;
  assign s_awready = do_write;
  assign s_wready  = do_write;
  assign s_bresp   = 2'b00;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_bvalid <= 1'b0; enable <= 1'b1; threshold <= 8'd20;
    end else begin
      if (s_bvalid && s_bready) s_bvalid <= 1'b0;
      if (do_write) begin
        s_bvalid <= 1'b1;
        if (!s_awaddr[16]) begin
          case (s_awaddr[7:2])
            6'h00: if (s_wstrb[0]) enable    <= s_wdata[0];
            6'h01: if (s_wstrb[0]) threshold <= s_wdata[7:0];
            default: ;
          endcase
        end
      end
    end
  end

  // ------------------------------------------------------------ read channel
  logic        rd_mem_pend;
  logic        do_read;
  logic [31:0] reg_data;

  assign s_arready   = !s_rvalid && !rd_mem_pend;
  assign do_read     = s_arvalid && s_arready;
  assign s_rresp     = 2'b00;
  assign fm_rd_en    = do_read && s_araddr[16];
  assign fm_rd_index = s_araddr[6 +: FAW];
  assign fm_rd_word  = s_araddr[5:2];

  always_comb begin
    case (s_araddr[7:2])
      6'h00:   reg_data = {31'd0, enable};
      6'h01:   reg_data = {24'd0, threshold};
      6'h02:   reg_data = {16'd0, frame_no};
      6'h03:   reg_data = 32'(last_count);
      6'h04:   reg_data = 32'(count);
      6'h05:   reg_data = {16'd0, lost};
      6'h06:   reg_data = busy_drops;
      6'h07:   reg_data = overflows;
      6'h08:   reg_data = stale;
      6'h09:   reg_data = launched;
      default: reg_data = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_rvalid <= 1'b0; s_rdata <= '0; rd_mem_pend <= 1'b0;
    end else begin
      if (s_rvalid && s_rready) s_rvalid <= 1'b0;
      if (rd_mem_pend) begin
        rd_mem_pend <= 1'b0;
        s_rvalid    <= 1'b1;
        s_rdata     <= fm_rd_data;
      end
      if (do_read) begin
        if (s_araddr[16]) rd_mem_pend <= 1'b1;
        else begin
          s_rvalid <= 1'b1;
          s_rdata  <= reg_data;
        end
      end
    end
  end

  // AXI rule: a response stays valid until it is accepted
  assert property (@(posedge clk) disable iff (!rst_n)
                   s_rvalid && !s_rready |=> s_rvalid && $stable(s_rdata));
  assert property (@(posedge clk) disable iff (!rst_n)
                   s_bvalid && !s_bready |=> s_bvalid);
endmodule
