// tb_hdmi_subsystem: end-to-end test of the HDMI controller with small video
// modes (16x6 and 24x4 visible pixels), a 100 MHz bus clock and an unrelated
// pixel clock. Like the driver software it writes the frame address and
// mode 0 over AXI4-Lite, then switches to mode 1 and a second frame buffer. A
// behavioural AXI memory with random stalls serves the frame buffers. Checked:
// every pixel of every locked frame against the reference conversion of the
// frame buffer, the ten PLL register writes per mode change, that the display
// locks in each mode, that no underflow happens once locked at this bandwidth,
// the SPDIF pin staying low, and the visible size and total size of each mode
// from the DE and HSYNC patterns.
module tb_hdmi_subsystem;
  import hdmi_pkg::*;
  localparam video_timing_t M0 = '{h: '{12'd16, 12'd2, 12'd3, 12'd3}, v: '{12'd6, 12'd1, 12'd2, 12'd1}};
  localparam video_timing_t M1 = '{h: '{12'd24, 12'd2, 12'd2, 12'd4}, v: '{12'd4, 12'd1, 12'd1, 12'd2}};
  localparam mode_timing_table_t TABLE = '{M0, M1, M0, M1};

  logic aclk = 0, pix_clk = 0, aresetn = 0;
  always #5 aclk = ~aclk;
  always #6.5 pix_clk = ~pix_clk;

  logic [15:0] awaddr, araddr;
  logic awvalid, awready, wvalid, wready, bvalid, bready, arvalid, arready, rvalid, rready;
  logic [31:0] wdata, rdata;
  logic [3:0] wstrb;
  logic [1:0] bresp, rresp;
  logic [31:0] m_araddr;
  logic [3:0] m_arlen, m_arcache;
  logic [2:0] m_arsize, m_arprot;
  logic [1:0] m_arburst, m_arlock, m_rresp;
  logic m_arvalid, m_arready, m_rlast, m_rvalid, m_rready;
  logic [63:0] m_rdata;
  logic csr_valid, csr_rnw, pll_busy, pll_done, hdmi_clk, de, hs, vs, spdif, fs, locked;
  logic [4:0] csr_addr;
  logic [31:0] csr_data, underflows, frames_fetched, dma_errors;
  logic [23:0] data;
  int unsigned bursts, beats, perr;

  hdmi_subsystem #(.TIMING_TABLE(TABLE)) dut (
    .aclk, .aresetn,
    .s_axi_awaddr(awaddr), .s_axi_awvalid(awvalid), .s_axi_awready(awready),
    .s_axi_wdata(wdata), .s_axi_wstrb(wstrb), .s_axi_wvalid(wvalid), .s_axi_wready(wready),
    .s_axi_bresp(bresp), .s_axi_bvalid(bvalid), .s_axi_bready(bready),
    .s_axi_araddr(araddr), .s_axi_arvalid(arvalid), .s_axi_arready(arready),
    .s_axi_rdata(rdata), .s_axi_rresp(rresp), .s_axi_rvalid(rvalid), .s_axi_rready(rready),
    .m_axi_araddr(m_araddr), .m_axi_arlen(m_arlen), .m_axi_arsize(m_arsize),
    .m_axi_arburst(m_arburst), .m_axi_arlock(m_arlock), .m_axi_arcache(m_arcache),
    .m_axi_arprot(m_arprot), .m_axi_arvalid(m_arvalid), .m_axi_arready(m_arready),
    .m_axi_rdata(m_rdata), .m_axi_rresp(m_rresp), .m_axi_rlast(m_rlast),
    .m_axi_rvalid(m_rvalid), .m_axi_rready(m_rready),
    .pll_csr_valid(csr_valid), .pll_csr_ready(1'b1), .pll_csr_rnw(csr_rnw),
    .pll_csr_addr(csr_addr), .pll_csr_data(csr_data), .pll_busy, .pix_clk,
    .hdmi_clk, .hdmi_data(data), .hdmi_de(de), .hdmi_hsync(hs), .hdmi_vsync(vs),
    .hdmi_spdif(spdif), .frame_start(fs), .underflow_count(underflows),
    .frames_fetched, .video_locked(locked), .pll_done, .dma_errors
  );

  axi_frame_mem_model mem (
    .clk(aclk), .rst_n(aresetn), .araddr(m_araddr), .arlen(m_arlen), .arsize(m_arsize),
    .arburst(m_arburst), .arvalid(m_arvalid), .arready(m_arready), .rdata(m_rdata),
    .rresp(m_rresp), .rlast(m_rlast), .rvalid(m_rvalid), .rready(m_rready),
    .bursts, .beats, .protocol_errors(perr)
  );

  axi_lite_master_bfm bus (
    .clk(aclk), .awaddr, .awvalid, .awready, .wdata, .wstrb, .wvalid, .wready, .bresp, .bvalid,
    .bready, .araddr, .arvalid, .arready, .rdata, .rvalid, .rready
  );

  logic [31:0] cur_fb = 32'h2000_0000;
  int width = 16, height = 6;
  logic chk_en = 1;
  int pixels, frames_ok, pix_errors;
  hdmi_frame_checker chk (
    .clk(pix_clk), .de, .data, .frame_start(fs), .locked, .enable(chk_en), .fb_addr(cur_fb), .width, .height,
    .pixels_checked(pixels), .frames_checked(frames_ok), .errors(pix_errors)
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // PLL register writes
  int csr_writes = 0;
  always @(posedge aclk) if (aresetn && csr_valid) begin
    check(!csr_rnw && csr_addr == 5'h11 + 5'(csr_writes % 10), "PLL write address");
    csr_writes++;
  end

  // DE run length and HSYNC period
  int de_run = 0, last_run = 0, hs_period = 0, hs_count = 0, last_period = 0;
  bit prev_hs = 0;
  always @(posedge pix_clk) begin
    if (de) de_run++;
    else if (de_run != 0) begin last_run = de_run; de_run = 0; end
    hs_count++;
    if (hs && !prev_hs) begin last_period = hs_count; hs_count = 0; end
    prev_hs = hs;
    if (spdif) begin checks++; failures++; $display("FAIL spdif driven"); end
  end

  task automatic wait_frames(input int n);
    repeat (n) @(posedge fs);
  endtask

  initial begin
    logic [1:0] resp;
    logic [31:0] d;
    int u0, f0;
    repeat (3) @(posedge aclk);
    @(negedge aclk) aresetn = 1;
    repeat (20) @(posedge aclk);
    check(bursts == 0, "no reads before the frame address is set");
    bus.write(16'h0200, 0, resp);
    check(resp == 0, "mode 0 accepted");
    bus.write(16'h0204, cur_fb, resp);
    wait (pll_done);
    check(csr_writes == 10, "ten PLL writes for mode 0");
    wait_frames(2);
    check(locked, "display locked in mode 0");
    u0 = underflows; f0 = frames_ok;
    wait_frames(3);
    check(frames_ok >= f0 + 3, $sformatf("frames checked in mode 0: %0d", frames_ok - f0));
    check(underflows == u0, "no underflow while locked");
    check(last_run == 16 && last_period == 24, $sformatf("mode 0 line: DE %0d, period %0d", last_run, last_period));
    // switch mode and frame buffer; frames during the switch are not checked
    chk_en = 0;
    bus.write(16'h0204, 32'h3000_0000, resp);
    bus.write(16'h0200, 1, resp);
    f0 = frames_fetched;
    bus.read(16'h0200, d);
    check(d == 1, "mode register reads 1");
    wait (csr_writes == 20);
    check(1, "PLL reprogrammed");
    // wait until the display is locked on the new stream
    do begin
      @(posedge fs);
      #1;
    end while (!(locked && dut.u_gen.t.h.active == 24 && frames_fetched >= f0 + 2));
    @(negedge pix_clk) begin cur_fb = 32'h3000_0000; width = 24; height = 4; chk_en = 1; end
    f0 = frames_ok;
    wait_frames(4);
    check(frames_ok >= f0 + 3, $sformatf("frames checked in mode 1: %0d", frames_ok - f0));
    check(last_run == 24 && last_period == 32, $sformatf("mode 1 line: DE %0d, period %0d", last_run, last_period));
    check(pix_errors == 0 && pixels > 0, $sformatf("%0d pixel errors in %0d pixels", pix_errors, pixels));
    // every compared pixel also counts as a check of its own
    checks += pixels;
    failures += pix_errors;
    check(perr == 0 && dma_errors == 0, "AXI protocol");
    $display("pixels checked %0d, frames %0d, underflows %0d", pixels, frames_ok, underflows);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge aclk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
