// hdmi_subsystem: HDMI video controller driving an ADV7511 transmitter.
//
// The processor selects a video mode and a frame buffer through two AXI4-Lite
// registers (axi_reg_handler). A mode write sends the mode's timing to the
// signal generator, starts the PLL sequencer (pll_drp_handler), which writes the
// mode's ten clock-controller registers through the csr_* port, and gives the
// visible size to the DMA reader. The DMA reader (vdma_reader) fetches the frame
// from main memory through an AXI3 read master, two RGB pixels per 64-bit beat;
// rgb2ycbcr422 turns each beat into a YCbCr 4:2:2 pair; an asynchronous FIFO
// carries the pairs from the bus clock (aclk) into the pixel clock (pix_clk),
// which the external PLL produces; a second one carries the timing. In the pixel
// domain hdmi_signal_gen makes HSYNC, VSYNC, DE and the 24-bit data bus.
// hdmi_clk is pix_clk passed on to the transmitter; SPDIF audio is not driven
// (constant 0), as in the document's design. Each pixel pair carries a
// start-of-frame flag from the DMA reader to the signal generator, which uses it
// to line the stream up with the screen (video_locked).
//
// The split into these units, the two clock domains with FIFOs between them and
// the pin list follow the document; the details of each unit are described in
// its own file. The pixel domain's reset is aresetn, released through a
// synchroniser on pix_clk. The register block's mode output is not used here:
// the mode acts through the timing and PLL values it selects, and the number is
// only kept for reading back over the bus.
module hdmi_subsystem
  import hdmi_pkg::*;
#(
  parameter mode_timing_table_t TIMING_TABLE = MODE_TIMINGS,
  parameter mode_pll_table_t    PLL_TABLE    = MODE_PLL,
  parameter logic [15:0]        REG_BASE     = 16'h0200,
  parameter int unsigned        BURST_BEATS  = 16,
  parameter int unsigned        PIX_FIFO_DEPTH = 32
) (
  input  logic        aclk,
  input  logic        aresetn,
  // AXI4-Lite register port
  input  logic [15:0] s_axi_awaddr,
  input  logic        s_axi_awvalid,
  output logic        s_axi_awready,
  input  logic [31:0] s_axi_wdata,
  input  logic [3:0]  s_axi_wstrb,
  input  logic        s_axi_wvalid,
  output logic        s_axi_wready,
  output logic [1:0]  s_axi_bresp,
  output logic        s_axi_bvalid,
  input  logic        s_axi_bready,
  input  logic [15:0] s_axi_araddr,
  input  logic        s_axi_arvalid,
  output logic        s_axi_arready,
  output logic [31:0] s_axi_rdata,
  output logic [1:0]  s_axi_rresp,
  output logic        s_axi_rvalid,
  input  logic        s_axi_rready,
  // AXI3 read master to main memory
  output logic [31:0] m_axi_araddr,
  output logic [3:0]  m_axi_arlen,
  output logic [2:0]  m_axi_arsize,
  output logic [1:0]  m_axi_arburst,
  output logic [1:0]  m_axi_arlock,
  output logic [3:0]  m_axi_arcache,
  output logic [2:0]  m_axi_arprot,
  output logic        m_axi_arvalid,
  input  logic        m_axi_arready,
  input  logic [63:0] m_axi_rdata,
  input  logic [1:0]  m_axi_rresp,
  input  logic        m_axi_rlast,
  input  logic        m_axi_rvalid,
  output logic        m_axi_rready,
  // clock controller register port and its output clock
  output logic        pll_csr_valid,
  input  logic        pll_csr_ready,
  output logic        pll_csr_rnw,
  output logic [4:0]  pll_csr_addr,
  output logic [31:0] pll_csr_data,
  output logic        pll_busy,
  input  logic        pix_clk,
  // ADV7511 pins
  output logic        hdmi_clk,
  output logic [23:0] hdmi_data,
  output logic        hdmi_de,
  output logic        hdmi_hsync,
  output logic        hdmi_vsync,
  output logic        hdmi_spdif,
  // status
  output logic        frame_start,
  output logic [31:0] underflow_count,
  output logic [31:0] frames_fetched,
  output logic        video_locked,
  output logic        pll_done,
  output logic [31:0] dma_errors
);
  logic pix_rst_n;
  reset_sync u_pix_reset (.clk(pix_clk), .rst_n_in(aresetn), .rst_n_out(pix_rst_n));

  // register handler
  logic          t_valid, t_ready, p_valid, p_ready, fb_enable;
  video_timing_t timing;
  pll_regs_t     pll_regs;
  logic [11:0]   res_h, res_v;
  logic [31:0]   fb_addr;
  logic [1:0]    mode;  // read back over the bus only

  axi_reg_handler #(
    .ADDR_BITS(16), .REG_BASE(REG_BASE), .TIMING_TABLE(TIMING_TABLE), .PLL_TABLE(PLL_TABLE)
  ) u_regs (
    .clk(aclk), .rst_n(aresetn),
    .s_axi_awaddr, .s_axi_awvalid, .s_axi_awready, .s_axi_wdata, .s_axi_wstrb,
    .s_axi_wvalid, .s_axi_wready, .s_axi_bresp, .s_axi_bvalid, .s_axi_bready,
    .s_axi_araddr, .s_axi_arvalid, .s_axi_arready, .s_axi_rdata, .s_axi_rresp,
    .s_axi_rvalid, .s_axi_rready,
    .timing_valid(t_valid), .timing_ready(t_ready), .timing,
    .pll_start_valid(p_valid), .pll_start_ready(p_ready), .pll_regs,
    .res_h, .res_v, .fb_addr, .fb_enable, .mode
  );

  pll_drp_handler u_pll (
    .clk(aclk), .rst_n(aresetn),
    .start_valid(p_valid), .start_ready(p_ready), .regs_in(pll_regs),
    .csr_valid(pll_csr_valid), .csr_ready(pll_csr_ready), .csr_rnw(pll_csr_rnw),
    .csr_addr(pll_csr_addr), .csr_data(pll_csr_data), .busy(pll_busy), .done(pll_done)
  );

  // pixel fetch and conversion
  logic        rgb_valid, rgb_ready, yc_valid, yc_ready, rgb_sof, yc_sof;
  logic [63:0] rgb_data;
  ycbcr_pair_t yc_pair;

  vdma_reader #(.BURST_BEATS(BURST_BEATS)) u_dma (
    .clk(aclk), .rst_n(aresetn),
    .fb_addr, .fb_enable, .res_h, .res_v,
    .m_axi_araddr, .m_axi_arlen, .m_axi_arsize, .m_axi_arburst, .m_axi_arlock,
    .m_axi_arcache, .m_axi_arprot, .m_axi_arvalid, .m_axi_arready,
    .m_axi_rdata, .m_axi_rresp, .m_axi_rlast, .m_axi_rvalid, .m_axi_rready,
    .out_valid(rgb_valid), .out_ready(rgb_ready), .out_data(rgb_data),
    .out_sof(rgb_sof), .frames_started(frames_fetched), .rresp_errors(dma_errors)
  );

  rgb2ycbcr422 u_csc (
    .clk(aclk), .rst_n(aresetn),
    .in_valid(rgb_valid), .in_ready(rgb_ready), .in_rgb(rgb_data), .in_sof(rgb_sof),
    .out_valid(yc_valid), .out_ready(yc_ready), .out_pix(yc_pair), .out_sof(yc_sof)
  );

  // clock-domain crossings
  logic          px_valid, px_ready, pt_valid, pt_ready, px_sof;
  ycbcr_pair_t   px_pair;
  video_timing_t pt_timing;

  async_fifo #(.WIDTH($bits(ycbcr_pair_t) + 1), .DEPTH(PIX_FIFO_DEPTH)) u_pix_cdc (
    .wr_clk(aclk), .wr_rst_n(aresetn), .in_valid(yc_valid), .in_ready(yc_ready),
    .in_data({yc_sof, yc_pair}),
    .rd_clk(pix_clk), .rd_rst_n(pix_rst_n), .out_valid(px_valid), .out_ready(px_ready),
    .out_data({px_sof, px_pair})
  );

  async_fifo #(.WIDTH($bits(video_timing_t)), .DEPTH(4)) u_timing_cdc (
    .wr_clk(aclk), .wr_rst_n(aresetn), .in_valid(t_valid), .in_ready(t_ready), .in_data(timing),
    .rd_clk(pix_clk), .rd_rst_n(pix_rst_n), .out_valid(pt_valid), .out_ready(pt_ready),
    .out_data(pt_timing)
  );

  hdmi_signal_gen #(.INIT_TIMING(TIMING_TABLE[0])) u_gen (
    .clk(pix_clk), .rst_n(pix_rst_n),
    .timing_valid(pt_valid), .timing_ready(pt_ready), .timing_in(pt_timing),
    .pix_valid(px_valid), .pix_ready(px_ready), .pix_in(px_pair), .pix_sof(px_sof),
    .hdmi_data, .hdmi_de, .hdmi_hsync, .hdmi_vsync, .frame_start, .underflow_count,
    .locked(video_locked)
  );

  assign hdmi_clk   = pix_clk;
  assign hdmi_spdif = 1'b0;
endmodule
