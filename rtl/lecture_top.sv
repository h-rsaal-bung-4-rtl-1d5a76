// lecture_top: the two independent designs side by side, each with its own
// ports and clock.
//
//   cache_*  a direct-mapped write-back cache of 512-bit lines with 128 slots
//            (dm_cache with its line fetcher). cache_user_* is the RAM-server
//            port for the user, cache_ram_* the RAM-client port to the memory
//            above, which is outside this design.
//   hdmi_*   the HDMI video controller (hdmi_subsystem): AXI4-Lite registers,
//            AXI3 frame-buffer reads, pixel-clock PLL register port, and the
//            ADV7511 transmitter pins. The PLL itself, the transmitter and the
//            processor are outside this design; their signals are ports.
// Both parts use synchronous active-low resets; see the sub-modules for timing.
// hdmi_aresetn also feeds the pixel domain's reset synchroniser, where it acts
// asynchronously; lint tools note a reset used both ways, which is intended.
module lecture_top
  import cache_pkg::*;
  import hdmi_pkg::*;
#(
  parameter int unsigned CACHE_LINE_BITS = 512,
  parameter int unsigned CACHE_SLOTS     = 128,
  parameter mode_timing_table_t HDMI_TIMING_TABLE = MODE_TIMINGS,
  localparam int unsigned CACHE_BE_BITS  = CACHE_LINE_BITS / 8
) (
  // ---------------- cache ----------------
  input  logic                       cache_clk,
  input  logic                       cache_rst_n,
  input  logic                       cache_user_req_valid,
  output logic                       cache_user_req_ready,
  input  ram_op_e                    cache_user_req_op,
  input  logic [31:0]                cache_user_req_addr,
  input  logic [CACHE_LINE_BITS-1:0] cache_user_req_line,
  input  logic [CACHE_BE_BITS-1:0]   cache_user_req_be,
  output logic                       cache_user_rsp_valid,
  input  logic                       cache_user_rsp_ready,
  output logic [CACHE_LINE_BITS-1:0] cache_user_rsp_line,
  output logic                       cache_ram_req_valid,
  input  logic                       cache_ram_req_ready,
  output ram_op_e                    cache_ram_req_op,
  output logic [31:0]                cache_ram_req_addr,
  output logic [CACHE_LINE_BITS-1:0] cache_ram_req_line,
  output logic [CACHE_BE_BITS-1:0]   cache_ram_req_be,
  input  logic                       cache_ram_rsp_valid,
  output logic                       cache_ram_rsp_ready,
  input  logic [CACHE_LINE_BITS-1:0] cache_ram_rsp_line,
  input  logic                       cache_clear_req,
  output logic                       cache_clear_ready,
  output logic [31:0]                cache_hit_count,
  output logic [31:0]                cache_miss_count,
  output logic [31:0]                cache_writeback_count,
  // ---------------- HDMI controller ----------------
  input  logic        hdmi_aclk,
  input  logic        hdmi_aresetn,
  input  logic [15:0] hdmi_s_axi_awaddr,
  input  logic        hdmi_s_axi_awvalid,
  output logic        hdmi_s_axi_awready,
  input  logic [31:0] hdmi_s_axi_wdata,
  input  logic [3:0]  hdmi_s_axi_wstrb,
  input  logic        hdmi_s_axi_wvalid,
  output logic        hdmi_s_axi_wready,
  output logic [1:0]  hdmi_s_axi_bresp,
  output logic        hdmi_s_axi_bvalid,
  input  logic        hdmi_s_axi_bready,
  input  logic [15:0] hdmi_s_axi_araddr,
  input  logic        hdmi_s_axi_arvalid,
  output logic        hdmi_s_axi_arready,
  output logic [31:0] hdmi_s_axi_rdata,
  output logic [1:0]  hdmi_s_axi_rresp,
  output logic        hdmi_s_axi_rvalid,
  input  logic        hdmi_s_axi_rready,
  output logic [31:0] hdmi_m_axi_araddr,
  output logic [3:0]  hdmi_m_axi_arlen,
  output logic [2:0]  hdmi_m_axi_arsize,
  output logic [1:0]  hdmi_m_axi_arburst,
  output logic [1:0]  hdmi_m_axi_arlock,
  output logic [3:0]  hdmi_m_axi_arcache,
  output logic [2:0]  hdmi_m_axi_arprot,
  output logic        hdmi_m_axi_arvalid,
  input  logic        hdmi_m_axi_arready,
  input  logic [63:0] hdmi_m_axi_rdata,
  input  logic [1:0]  hdmi_m_axi_rresp,
  input  logic        hdmi_m_axi_rlast,
  input  logic        hdmi_m_axi_rvalid,
  output logic        hdmi_m_axi_rready,
  output logic        hdmi_pll_csr_valid,
  input  logic        hdmi_pll_csr_ready,
  output logic        hdmi_pll_csr_rnw,
  output logic [4:0]  hdmi_pll_csr_addr,
  output logic [31:0] hdmi_pll_csr_data,
  output logic        hdmi_pll_busy,
  input  logic        hdmi_pix_clk,
  output logic        hdmi_clk,
  output logic [23:0] hdmi_data,
  output logic        hdmi_de,
  output logic        hdmi_hsync,
  output logic        hdmi_vsync,
  output logic        hdmi_spdif,
  output logic        hdmi_frame_start,
  output logic [31:0] hdmi_underflow_count,
  output logic [31:0] hdmi_frames_fetched,
  output logic        hdmi_video_locked,
  output logic        hdmi_pll_done,
  output logic [31:0] hdmi_dma_errors
);

  dm_cache #(.ADDR_BITS(32), .LINE_BITS(CACHE_LINE_BITS), .SLOTS(CACHE_SLOTS)) u_cache (
    .clk(cache_clk), .rst_n(cache_rst_n),
    .user_req_valid(cache_user_req_valid), .user_req_ready(cache_user_req_ready),
    .user_req_op(cache_user_req_op), .user_req_addr(cache_user_req_addr),
    .user_req_line(cache_user_req_line), .user_req_be(cache_user_req_be),
    .user_rsp_valid(cache_user_rsp_valid), .user_rsp_ready(cache_user_rsp_ready),
    .user_rsp_line(cache_user_rsp_line),
    .ram_req_valid(cache_ram_req_valid), .ram_req_ready(cache_ram_req_ready),
    .ram_req_op(cache_ram_req_op), .ram_req_addr(cache_ram_req_addr),
    .ram_req_line(cache_ram_req_line), .ram_req_be(cache_ram_req_be),
    .ram_rsp_valid(cache_ram_rsp_valid), .ram_rsp_ready(cache_ram_rsp_ready),
    .ram_rsp_line(cache_ram_rsp_line),
    .clear_req(cache_clear_req), .clear_ready(cache_clear_ready),
    .hit_count(cache_hit_count), .miss_count(cache_miss_count),
    .writeback_count(cache_writeback_count)
  );

  hdmi_subsystem #(.TIMING_TABLE(HDMI_TIMING_TABLE)) u_hdmi (
    .aclk(hdmi_aclk), .aresetn(hdmi_aresetn),
    .s_axi_awaddr(hdmi_s_axi_awaddr), .s_axi_awvalid(hdmi_s_axi_awvalid),
    .s_axi_awready(hdmi_s_axi_awready), .s_axi_wdata(hdmi_s_axi_wdata),
    .s_axi_wstrb(hdmi_s_axi_wstrb), .s_axi_wvalid(hdmi_s_axi_wvalid),
    .s_axi_wready(hdmi_s_axi_wready), .s_axi_bresp(hdmi_s_axi_bresp),
    .s_axi_bvalid(hdmi_s_axi_bvalid), .s_axi_bready(hdmi_s_axi_bready),
    .s_axi_araddr(hdmi_s_axi_araddr), .s_axi_arvalid(hdmi_s_axi_arvalid),
    .s_axi_arready(hdmi_s_axi_arready), .s_axi_rdata(hdmi_s_axi_rdata),
    .s_axi_rresp(hdmi_s_axi_rresp), .s_axi_rvalid(hdmi_s_axi_rvalid),
    .s_axi_rready(hdmi_s_axi_rready),
    .m_axi_araddr(hdmi_m_axi_araddr), .m_axi_arlen(hdmi_m_axi_arlen),
    .m_axi_arsize(hdmi_m_axi_arsize), .m_axi_arburst(hdmi_m_axi_arburst),
    .m_axi_arlock(hdmi_m_axi_arlock), .m_axi_arcache(hdmi_m_axi_arcache),
    .m_axi_arprot(hdmi_m_axi_arprot), .m_axi_arvalid(hdmi_m_axi_arvalid),
    .m_axi_arready(hdmi_m_axi_arready), .m_axi_rdata(hdmi_m_axi_rdata),
    .m_axi_rresp(hdmi_m_axi_rresp), .m_axi_rlast(hdmi_m_axi_rlast),
    .m_axi_rvalid(hdmi_m_axi_rvalid), .m_axi_rready(hdmi_m_axi_rready),
    .pll_csr_valid(hdmi_pll_csr_valid), .pll_csr_ready(hdmi_pll_csr_ready),
    .pll_csr_rnw(hdmi_pll_csr_rnw), .pll_csr_addr(hdmi_pll_csr_addr),
    .pll_csr_data(hdmi_pll_csr_data), .pll_busy(hdmi_pll_busy),
    .pix_clk(hdmi_pix_clk),
    .hdmi_clk, .hdmi_data, .hdmi_de, .hdmi_hsync, .hdmi_vsync, .hdmi_spdif,
    .frame_start(hdmi_frame_start), .underflow_count(hdmi_underflow_count),
    .frames_fetched(hdmi_frames_fetched), .video_locked(hdmi_video_locked),
    .pll_done(hdmi_pll_done), .dma_errors(hdmi_dma_errors)
  );
endmodule
