// tb_vdma_reader: self-checking test of the frame-buffer DMA reader against a
// behavioural AXI3 memory with random stalls and a randomly stalling receiver.
// Frames of 24x5 pixels (60 beats: three 16-beat bursts and one of 12) are
// read from one address, then the address and size change. Every beat must
// carry the pixels of the expected address, in order; the test also checks the
// start-of-frame flag, the burst count, that nothing is read before the DMA is enabled and that the
// new configuration starts with a new frame.
module tb_vdma_reader;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [31:0] fb_addr, araddr, frames;
  logic out_sof, fb_enable, arvalid, arready, rlast, rvalid, rready, out_valid, out_ready;
  logic [11:0] res_h, res_v;
  logic [3:0] arlen, arcache;
  logic [2:0] arsize, arprot;
  logic [1:0] arburst, arlock, rresp;
  logic [63:0] rdata, out_data;
  logic [31:0] errs;
  int unsigned bursts, beats, perr;

  vdma_reader dut (
    .clk, .rst_n, .fb_addr, .fb_enable, .res_h, .res_v,
    .m_axi_araddr(araddr), .m_axi_arlen(arlen), .m_axi_arsize(arsize), .m_axi_arburst(arburst),
    .m_axi_arlock(arlock), .m_axi_arcache(arcache), .m_axi_arprot(arprot),
    .m_axi_arvalid(arvalid), .m_axi_arready(arready),
    .m_axi_rdata(rdata), .m_axi_rresp(rresp), .m_axi_rlast(rlast), .m_axi_rvalid(rvalid),
    .m_axi_rready(rready), .out_valid, .out_ready, .out_data, .out_sof, .frames_started(frames),
    .rresp_errors(errs)
  );
  axi_frame_mem_model mem (
    .clk, .rst_n, .araddr, .arlen, .arsize, .arburst, .arvalid, .arready,
    .rdata, .rresp, .rlast, .rvalid, .rready, .bursts, .beats, .protocol_errors(perr)
  );

  int checks = 0, failures = 0;
  int beat_in_frame = 0, frame_beats = 60, frames_seen = 0;
  logic [31:0] cur_base = 32'h1000_0000;

  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    logic [31:0] a;
    a = cur_base + beat_in_frame * 8;
    checks++;
    if (out_data != {tb_video_pkg::pixel_at(a + 4), tb_video_pkg::pixel_at(a)}) begin
      failures++;
      $display("FAIL beat %0d of frame %0d: %h", beat_in_frame, frames_seen, out_data);
    end
    checks++;
    if (out_sof != (beat_in_frame == 0)) begin
      failures++;
      $display("FAIL start-of-frame flag at beat %0d", beat_in_frame);
    end
    beat_in_frame++;
    if (beat_in_frame == frame_beats) begin
      beat_in_frame = 0;
      frames_seen++;
      if (frames_seen == 3) begin cur_base = 32'h2000_0100; frame_beats = 32 * 3 / 2; end
    end
  end

  initial begin
    fb_addr = 32'h1000_0000; fb_enable = 0; res_h = 24; res_v = 5; out_ready = 1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (20) @(posedge clk);
    checks++;
    if (mem.bursts != 0) begin failures++; $display("FAIL read before enable"); end
    @(negedge clk) fb_enable = 1;
    fork
      forever @(negedge clk) out_ready = ($urandom % 4 != 0);
    join_none
    // change the configuration during frame 2 (frame 3 is already prefetched
    // at most by two bursts, so switch after frame 2 has been started)
    wait (frames == 3);
    @(negedge clk) begin fb_addr = 32'h2000_0100; res_h = 32; res_v = 3; end
    wait (frames_seen == 6);
    checks++;
    if (perr != 0 || errs != 0) begin failures++; $display("FAIL protocol"); end
    checks++;
    // 3 frames of 4 bursts, then 3 frames of 3 bursts (48 beats)
    if (mem.bursts < 21) begin failures++; $display("FAIL bursts %0d", mem.bursts); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
