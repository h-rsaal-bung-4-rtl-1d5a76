// hdmi_signal_gen: video timing generator and pixel formatter for the ADV7511.
//
// Runs on the pixel clock. A horizontal counter counts pixels 0..H_total-1 and
// a vertical counter counts lines 0..V_total-1, advancing when the horizontal
// counter wraps. HSYNC is high while the horizontal count lies in the sync
// pulse, i.e. above active+front_porch-1 and at most active+front_porch+sync-1;
// VSYNC likewise on the line count. DE is high inside the visible area. Syncs
// are active high, as in the document.
//
// Pixels arrive as YCbCr 4:2:2 pairs on a valid/ready stream. In the visible
// area an even column sends chroma Cb with luma Y1 of the pair, the following
// odd column sends Cr with Y2 and consumes the pair (the ADV7511's 4:2:2 format
// carries Cb with the first and Cr with the second pixel; the document's listing
// picks the halves by the column's lowest bit). If no pair is waiting in a
// visible column the bus shows 0; underflow_count counts such pixels while
// locked.
//
// Frame lock (this design's addition): each pair carries a start-of-frame flag.
// At the first pixel of every frame the generator checks that the waiting pair
// starts a frame; only then is it "locked" and takes pairs for that frame. An
// underflow drops the lock. While unlocked it discards pairs that do not start
// a frame and shows 0, so the stream and the screen always line up again at
// the next frame start after reset, a mode change or an underflow.
//
// A new timing (timing_valid/timing_ready) is taken at the end of a frame; until
// the first one arrives, INIT_TIMING (the document's 1920x1440 mode) is used.
// All outputs are registered: they show the state of the counters one cycle
// earlier. Reset is synchronous and active low.
module hdmi_signal_gen
  import hdmi_pkg::*;
#(
  parameter video_timing_t INIT_TIMING = MODE_1920X1440
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          timing_valid,
  output logic          timing_ready,
  input  video_timing_t timing_in,
  input  logic          pix_valid,
  output logic          pix_ready,
  input  ycbcr_pair_t   pix_in,
  input  logic          pix_sof,
  output logic [23:0]   hdmi_data,
  output logic          hdmi_de,
  output logic          hdmi_hsync,
  output logic          hdmi_vsync,
  output logic          frame_start,
  output logic [31:0]   underflow_count,
  output logic          locked
);
  video_timing_t t;
  logic [11:0]   h_cnt, v_cnt;

  // sync windows and counter limits from the current timing
  logic [12:0] h_max, v_max, h_fp_end, h_sync_end, v_fp_end, v_sync_end;
  always_comb begin
    h_max      = line_total(t.h) - 13'd1;
    v_max      = line_total(t.v) - 13'd1;
    h_fp_end   = 13'(t.h.active) + 13'(t.h.fporch) - 13'd1;
    h_sync_end = h_fp_end + 13'(t.h.sync);
    v_fp_end   = 13'(t.v.active) + 13'(t.v.fporch) - 13'd1;
    v_sync_end = v_fp_end + 13'(t.v.sync);
  end

  wire h_last   = ({1'b0, h_cnt} == h_max);
  wire v_last   = ({1'b0, v_cnt} == v_max);
  wire visible  = (h_cnt < t.h.active) && (v_cnt < t.v.active);
  wire second   = h_cnt[0];

  wire at_origin = (h_cnt == '0) && (v_cnt == '0);
  wire lock_now  = at_origin ? (pix_valid && pix_sof) : locked;
  wire take      = lock_now && visible && second;

  assign timing_ready = h_last && v_last;
  assign pix_ready    = take || (!lock_now && !pix_sof);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      t               <= INIT_TIMING;
      h_cnt           <= '0;
      v_cnt           <= '0;
      hdmi_data       <= '0;
      hdmi_de         <= 1'b0;
      hdmi_hsync      <= 1'b0;
      hdmi_vsync      <= 1'b0;
      frame_start     <= 1'b0;
      underflow_count <= '0;
      locked          <= 1'b0;
    end else begin
      locked <= lock_now && !(visible && !pix_valid);
      // counters
      if (h_last) begin
        h_cnt <= '0;
        v_cnt <= v_last ? '0 : v_cnt + 12'd1;
      end else begin
        h_cnt <= h_cnt + 12'd1;
      end
      if (timing_valid && timing_ready) t <= timing_in;
      // syncs
      hdmi_hsync  <= ({1'b0, h_cnt} > h_fp_end) && ({1'b0, h_cnt} <= h_sync_end);
      hdmi_vsync  <= ({1'b0, v_cnt} > v_fp_end) && ({1'b0, v_cnt} <= v_sync_end);
      hdmi_de     <= visible;
      frame_start <= (h_cnt == '0) && (v_cnt == '0);
      // pixel data
      if (lock_now && visible && pix_valid) begin
        hdmi_data <= second ? adv_place(pix_in.cr, pix_in.y2) : adv_place(pix_in.cb, pix_in.y1);
      end else begin
        hdmi_data <= '0;
        if (lock_now && visible) underflow_count <= underflow_count + 1;
      end
    end
  end

  // a visible line must hold whole pixel pairs
  assert property (@(posedge clk) disable iff (!rst_n) t.h.active[0] == 1'b0);
endmodule
