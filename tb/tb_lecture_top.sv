// tb_lecture_top: end-to-end test of both designs in the top level, with the
// HDMI controller on small video modes (16x6 and 24x4 visible) and the cache
// at its full size (128 slots of 512 bits).
//
// Cache: random byte-masked writes and reads over 8 tags x 8 slots against a
// behavioural memory, every read compared with a reference model, then a
// clear. HDMI: frame address and mode over AXI4-Lite, a mode switch, and a
// stretch in which the memory stops answering, so the display underflows,
// loses its lock and locks again. Each mechanism must occur at least once:
// cache hit, miss, write-back and clear; PLL programming, mode switch, frame
// lock, underflow and re-lock, bus back-pressure. Every locked HDMI frame is
// compared pixel by pixel with the frame buffer.
module tb_lecture_top;
  import cache_pkg::*;
  import hdmi_pkg::*;
  localparam video_timing_t M0 = '{h: '{12'd16, 12'd2, 12'd3, 12'd3}, v: '{12'd6, 12'd1, 12'd2, 12'd1}};
  localparam video_timing_t M1 = '{h: '{12'd24, 12'd2, 12'd2, 12'd4}, v: '{12'd4, 12'd1, 12'd1, 12'd2}};
  localparam mode_timing_table_t TABLE = '{M0, M1, M0, M1};
  localparam int LB = 512, BB = 64, SLOTS = 128;

  logic clk = 0, rst_n = 0, pix_clk = 0;
  always #5 clk = ~clk;
  always #6.5 pix_clk = ~pix_clk;

  // cache side
  logic u_req_valid, u_req_ready, u_rsp_valid, u_rsp_ready;
  ram_op_e u_req_op, m_req_op;
  logic [31:0] u_req_addr, m_req_addr;
  logic [LB-1:0] u_req_line, u_rsp_line, m_req_line, m_rsp_line;
  logic [BB-1:0] u_req_be, m_req_be;
  logic m_req_valid, m_req_ready, m_rsp_valid, m_rsp_ready, clear_req, clear_ready;
  logic [31:0] hits, misses, wbs;
  int unsigned mreads, mwrites;
  // HDMI side
  logic [15:0] awaddr, araddr;
  logic awvalid, awready, wvalid, wready, bvalid, bready, arvalid, arready, rvalid, rready;
  logic [31:0] wdata, rdata;
  logic [3:0] wstrb;
  logic [1:0] bresp, rresp;
  logic [31:0] v_araddr;
  logic [3:0] v_arlen, v_arcache;
  logic [2:0] v_arsize, v_arprot;
  logic [1:0] v_arburst, v_arlock, v_rresp;
  logic v_arvalid, v_arready, v_rlast, v_rvalid, v_rready, mem_arready, mem_rvalid;
  logic [63:0] v_rdata;
  logic csr_valid, csr_rnw, pll_busy, pll_done, hdmi_clk, de, hs, vs, spdif, fs, locked;
  logic [4:0] csr_addr;
  logic [31:0] csr_data, underflows, frames_fetched, dma_errors;
  logic [23:0] data;
  int unsigned bursts, beats, perr;
  logic pause = 0;

  lecture_top #(.HDMI_TIMING_TABLE(TABLE)) dut (
    .cache_clk(clk), .cache_rst_n(rst_n),
    .cache_user_req_valid(u_req_valid), .cache_user_req_ready(u_req_ready),
    .cache_user_req_op(u_req_op), .cache_user_req_addr(u_req_addr),
    .cache_user_req_line(u_req_line), .cache_user_req_be(u_req_be),
    .cache_user_rsp_valid(u_rsp_valid), .cache_user_rsp_ready(u_rsp_ready),
    .cache_user_rsp_line(u_rsp_line),
    .cache_ram_req_valid(m_req_valid), .cache_ram_req_ready(m_req_ready),
    .cache_ram_req_op(m_req_op), .cache_ram_req_addr(m_req_addr),
    .cache_ram_req_line(m_req_line), .cache_ram_req_be(m_req_be),
    .cache_ram_rsp_valid(m_rsp_valid), .cache_ram_rsp_ready(m_rsp_ready),
    .cache_ram_rsp_line(m_rsp_line),
    .cache_clear_req(clear_req), .cache_clear_ready(clear_ready),
    .cache_hit_count(hits), .cache_miss_count(misses), .cache_writeback_count(wbs),
    .hdmi_aclk(clk), .hdmi_aresetn(rst_n),
    .hdmi_s_axi_awaddr(awaddr), .hdmi_s_axi_awvalid(awvalid), .hdmi_s_axi_awready(awready),
    .hdmi_s_axi_wdata(wdata), .hdmi_s_axi_wstrb(wstrb), .hdmi_s_axi_wvalid(wvalid),
    .hdmi_s_axi_wready(wready), .hdmi_s_axi_bresp(bresp), .hdmi_s_axi_bvalid(bvalid),
    .hdmi_s_axi_bready(bready), .hdmi_s_axi_araddr(araddr), .hdmi_s_axi_arvalid(arvalid),
    .hdmi_s_axi_arready(arready), .hdmi_s_axi_rdata(rdata), .hdmi_s_axi_rresp(rresp),
    .hdmi_s_axi_rvalid(rvalid), .hdmi_s_axi_rready(rready),
    .hdmi_m_axi_araddr(v_araddr), .hdmi_m_axi_arlen(v_arlen), .hdmi_m_axi_arsize(v_arsize),
    .hdmi_m_axi_arburst(v_arburst), .hdmi_m_axi_arlock(v_arlock), .hdmi_m_axi_arcache(v_arcache),
    .hdmi_m_axi_arprot(v_arprot), .hdmi_m_axi_arvalid(v_arvalid), .hdmi_m_axi_arready(v_arready),
    .hdmi_m_axi_rdata(v_rdata), .hdmi_m_axi_rresp(v_rresp), .hdmi_m_axi_rlast(v_rlast),
    .hdmi_m_axi_rvalid(v_rvalid), .hdmi_m_axi_rready(v_rready),
    .hdmi_pll_csr_valid(csr_valid), .hdmi_pll_csr_ready(1'b1), .hdmi_pll_csr_rnw(csr_rnw),
    .hdmi_pll_csr_addr(csr_addr), .hdmi_pll_csr_data(csr_data), .hdmi_pll_busy(pll_busy),
    .hdmi_pix_clk(pix_clk), .hdmi_clk, .hdmi_data(data), .hdmi_de(de), .hdmi_hsync(hs),
    .hdmi_vsync(vs), .hdmi_spdif(spdif), .hdmi_frame_start(fs),
    .hdmi_underflow_count(underflows), .hdmi_frames_fetched(frames_fetched),
    .hdmi_video_locked(locked), .hdmi_pll_done(pll_done), .hdmi_dma_errors(dma_errors)
  );

  line_ram_model #(.LATENCY(6)) cmem (
    .clk, .rst_n, .req_valid(m_req_valid), .req_ready(m_req_ready), .req_op(m_req_op),
    .req_addr(m_req_addr), .req_line(m_req_line), .req_be(m_req_be),
    .rsp_valid(m_rsp_valid), .rsp_ready(m_rsp_ready), .rsp_line(m_rsp_line),
    .reads(mreads), .writes(mwrites)
  );

  // the frame memory can be paused: no address accepted, no data returned
  assign v_arready = mem_arready && !pause;
  assign v_rvalid  = mem_rvalid && !pause;
  axi_frame_mem_model vmem (
    .clk, .rst_n, .araddr(v_araddr), .arlen(v_arlen), .arsize(v_arsize), .arburst(v_arburst),
    .arvalid(v_arvalid && !pause), .arready(mem_arready), .rdata(v_rdata), .rresp(v_rresp),
    .rlast(v_rlast), .rvalid(mem_rvalid), .rready(v_rready && !pause),
    .bursts, .beats, .protocol_errors(perr)
  );

  axi_lite_master_bfm bus (
    .clk, .awaddr, .awvalid, .awready, .wdata, .wstrb, .wvalid, .wready, .bresp, .bvalid,
    .bready, .araddr, .arvalid, .arready, .rdata, .rvalid, .rready
  );

  logic [31:0] cur_fb = 32'h2000_0000;
  int width = 16, height = 6;
  logic chk_en = 1;
  int pixels, frames_ok, pix_errors;
  hdmi_frame_checker chk (
    .clk(pix_clk), .de, .data, .frame_start(fs), .locked, .enable(chk_en), .fb_addr(cur_fb),
    .width, .height, .pixels_checked(pixels), .frames_checked(frames_ok), .errors(pix_errors)
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // mechanism counters
  int n_locks = 0, n_relocks = 0, n_backpressure = 0, n_pll_writes = 0, n_mode_switch = 0;
  int n_clears = 0;
  bit was_locked = 0, lost_lock = 0;
  always @(posedge pix_clk) begin
    if (locked && !was_locked) begin n_locks++; if (lost_lock) n_relocks++; end
    if (!locked && was_locked) lost_lock = 1;
    was_locked = locked;
  end
  always @(posedge clk) begin
    if (v_rvalid && !v_rready) n_backpressure++;
    if (csr_valid) n_pll_writes++;
  end

  // ---------------- cache traffic ----------------
  logic [LB-1:0] model [logic [31:0]];
  function automatic logic [LB-1:0] expect_line(logic [31:0] a);
    return model.exists(a) ? model[a] : cmem.init_line(a);
  endfunction

  task automatic cache_write(input logic [31:0] a, input logic [LB-1:0] d, input logic [BB-1:0] be);
    logic [LB-1:0] l;
    l = expect_line(a);
    for (int b = 0; b < BB; b++) if (be[b]) l[b*8 +: 8] = d[b*8 +: 8];
    model[a] = l;
    @(negedge clk);
    u_req_valid = 1; u_req_op = RAM_WRITE; u_req_addr = a; u_req_line = d; u_req_be = be;
    do @(posedge clk); while (!u_req_ready);
    @(negedge clk) u_req_valid = 0;
  endtask

  task automatic cache_read(input logic [31:0] a);
    @(negedge clk);
    u_req_valid = 1; u_req_op = RAM_READ; u_req_addr = a;
    do @(posedge clk); while (!u_req_ready);
    @(negedge clk) u_req_valid = 0;
    while (!u_rsp_valid) @(negedge clk);
    check(u_rsp_line == expect_line(a), $sformatf("cache read %h", a));
    u_rsp_ready = 1;
    @(negedge clk) u_rsp_ready = 0;
  endtask

  initial begin
    u_req_valid = 0; u_rsp_ready = 0; clear_req = 0; u_req_op = RAM_READ;
    u_req_addr = 0; u_req_line = 0; u_req_be = 0;
    wait (rst_n);
    for (int i = 0; i < 400; i++) begin
      logic [31:0] a;
      a = ($urandom % 8) * BB * SLOTS + ($urandom % 8) * BB;
      if ($urandom % 2)
        cache_write(a, {16{$urandom}}, {$urandom, $urandom});
      else cache_read(a);
    end
    // clear, then every line is fetched again from memory
    @(negedge clk) clear_req = 1;
    do @(posedge clk); while (!clear_ready);
    @(negedge clk) clear_req = 0;
    n_clears++;
    model.delete();   // dirty data are dropped by a clear: memory holds the truth
    for (int t = 0; t < 8; t++)
      for (int s = 0; s < 8; s++) begin
        logic [31:0] a;
        a = t * BB * SLOTS + s * BB;
        model[a] = cmem.peek(a);
      end
    cache_read(0);
  end

  task automatic wait_frames(input int n);
    repeat (n) @(posedge fs);
  endtask

  // ---------------- HDMI traffic ----------------
  initial begin
    logic [1:0] resp;
    int f0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    bus.write(16'h0200, 0, resp);
    bus.write(16'h0204, cur_fb, resp);
    wait_frames(5);
    check(locked, "locked in mode 0");
    // memory stops for a while: underflow, lock lost and found again
    @(negedge clk) pause = 1;
    wait_frames(2);
    @(negedge clk) pause = 0;
    wait_frames(4);
    check(locked, "locked again after the pause");
    // mode switch
    chk_en = 0;
    bus.write(16'h0204, 32'h3000_0000, resp);
    bus.write(16'h0200, 1, resp);
    n_mode_switch++;
    f0 = frames_fetched;
    do begin
      @(posedge fs);
      #1;
    end while (!(locked && dut.u_hdmi.u_gen.t.h.active == 24 && frames_fetched >= f0 + 2));
    @(negedge pix_clk) begin cur_fb = 32'h3000_0000; width = 24; height = 4; chk_en = 1; end
    f0 = frames_ok;
    wait_frames(4);
    check(frames_ok >= f0 + 3, "frames checked in mode 1");
    // wait for the cache traffic too
    wait (n_clears == 1);
    repeat (200) @(posedge clk);
    check(pix_errors == 0 && pixels > 0, $sformatf("%0d pixel errors in %0d", pix_errors, pixels));
    // every compared pixel also counts as a check of its own
    checks += pixels;
    failures += pix_errors;
    check(perr == 0 && dma_errors == 0 && spdif == 0, "AXI protocol, SPDIF low");
    // mechanisms
    check(hits > 0, $sformatf("cache hits: %0d", hits));
    check(misses > 0, $sformatf("cache misses: %0d", misses));
    check(wbs > 0, $sformatf("cache write-backs: %0d", wbs));
    check(n_clears > 0, "cache clear");
    check(n_pll_writes == 20, $sformatf("PLL register writes: %0d", n_pll_writes));
    check(n_mode_switch > 0, "mode switch");
    check(n_locks > 0, $sformatf("frame locks: %0d", n_locks));
    check(underflows > 0, $sformatf("underflows: %0d", underflows));
    check(n_relocks > 0, $sformatf("re-locks: %0d", n_relocks));
    check(n_backpressure > 0, $sformatf("bus back-pressure cycles: %0d", n_backpressure));
    $display("cache: %0d hits %0d misses %0d write-backs; hdmi: %0d pixels in %0d frames, %0d underflows, %0d locks",
             hits, misses, wbs, pixels, frames_ok, underflows, n_locks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
