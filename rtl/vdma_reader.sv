// vdma_reader: video DMA that streams frames from main memory to the pixel path.
//
// An AXI3 read master (4-bit burst length, as on the processor's high-performance
// port) with 64-bit data. A frame is res_h x res_v pixels of 4 bytes stored
// row by row from fb_addr, so a 64-bit beat holds two neighbouring pixels. The
// reader walks the frame in INCR bursts of BURST_BEATS beats (the last burst of a
// frame may be shorter), from fb_addr up to fb_addr + res_h*res_v*4 (the frame's
// end address), then starts the next frame at fb_addr again. fb_addr, res_h and
// res_v are sampled at the start of each frame, so a change takes effect at the
// next frame. Nothing is read until fb_enable is high.
// At most MAX_OUTSTANDING bursts are in flight. Read data go out unchanged as a
// valid/ready stream; RREADY is the stream's ready, so a full pixel path stalls
// the bus. fb_addr should be a multiple of BURST_BEATS*8 bytes, which keeps every
// burst inside a 4 KiB page.
// The document gives this block's role and its read-address port; the frame
// walk, burst size and pixel format are this design's choices.
// out_sof marks the first beat of each frame, so that the display side can find
// the frame start in the stream (this design's addition).
// Reset is synchronous, active low. frames_started counts frames begun.
module vdma_reader #(
  parameter int unsigned BURST_BEATS     = 16,
  parameter int unsigned MAX_OUTSTANDING = 2  // at most 4
) (
  input  logic        clk,
  input  logic        rst_n,
  // configuration
  input  logic [31:0] fb_addr,
  input  logic        fb_enable,
  input  logic [11:0] res_h,
  input  logic [11:0] res_v,
  // AXI3 read address channel
  output logic [31:0] m_axi_araddr,
  output logic [3:0]  m_axi_arlen,
  output logic [2:0]  m_axi_arsize,
  output logic [1:0]  m_axi_arburst,
  output logic [1:0]  m_axi_arlock,
  output logic [3:0]  m_axi_arcache,
  output logic [2:0]  m_axi_arprot,
  output logic        m_axi_arvalid,
  input  logic        m_axi_arready,
  // AXI3 read data channel
  input  logic [63:0] m_axi_rdata,
  input  logic [1:0]  m_axi_rresp,
  input  logic        m_axi_rlast,
  input  logic        m_axi_rvalid,
  output logic        m_axi_rready,
  // pixel stream (two pixels per word)
  output logic        out_valid,
  input  logic        out_ready,
  output logic [63:0] out_data,
  output logic        out_sof,
  output logic [31:0] frames_started,
  output logic [31:0] rresp_errors
);
  localparam int unsigned OUT_W = $clog2(MAX_OUTSTANDING + 1);

  logic [31:0] base, beat_off, frame_beats;
  logic        in_frame;
  logic [OUT_W-1:0] outstanding;

  wire [31:0] left  = frame_beats - beat_off;
  wire [31:0] beats = (left < BURST_BEATS) ? left : BURST_BEATS;

  assign m_axi_araddr  = base + (beat_off << 3);
  assign m_axi_arlen   = 4'(beats - 1);
  assign m_axi_arsize  = 3'd3;        // 8 bytes per beat
  assign m_axi_arburst = 2'b01;       // INCR
  assign m_axi_arlock  = 2'b00;
  assign m_axi_arcache = 4'b0011;
  assign m_axi_arprot  = 3'b000;
  assign m_axi_arvalid = in_frame && (outstanding < OUT_W'(MAX_OUTSTANDING));

  assign out_valid    = m_axi_rvalid;
  assign out_data     = m_axi_rdata;
  assign m_axi_rready = out_ready;

  wire ar_fire   = m_axi_arvalid && m_axi_arready;
  wire last_fire = m_axi_rvalid && m_axi_rready && m_axi_rlast;

  // one flag per burst in flight: does it start a frame?
  localparam int unsigned FQ = 4;
  logic [FQ-1:0] first_of_frame;
  logic [1:0]    fq_wr, fq_rd;
  logic          first_beat;
  assign out_sof = first_of_frame[fq_rd] && first_beat;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      in_frame       <= 1'b0;
      beat_off       <= '0;
      outstanding    <= '0;
      fq_wr          <= '0;
      fq_rd          <= '0;
      first_beat     <= 1'b1;
      frames_started <= '0;
      rresp_errors   <= '0;
    end else begin
      outstanding <= outstanding + OUT_W'(ar_fire) - OUT_W'(last_fire);
      if (ar_fire) begin
        first_of_frame[fq_wr] <= (beat_off == 0);
        fq_wr <= fq_wr + 2'd1;
      end
      if (m_axi_rvalid && m_axi_rready) first_beat <= m_axi_rlast;
      if (last_fire) fq_rd <= fq_rd + 2'd1;
      if (m_axi_rvalid && m_axi_rready && m_axi_rresp != 2'b00) rresp_errors <= rresp_errors + 1;
      if (!in_frame) begin
        // frame start: sample the configuration
        if (fb_enable && res_h != 0 && res_v != 0) begin
          base           <= fb_addr;
          frame_beats    <= (32'(res_h) * 32'(res_v)) >> 1;
          beat_off       <= '0;
          in_frame       <= 1'b1;
          frames_started <= frames_started + 1;
        end
      end else if (ar_fire) begin
        if (beat_off + beats >= frame_beats) in_frame <= 1'b0;
        beat_off <= beat_off + beats;
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n)
                   m_axi_arvalid && !m_axi_arready |=> m_axi_arvalid && $stable(m_axi_araddr));
endmodule
