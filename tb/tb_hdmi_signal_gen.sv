// tb_hdmi_signal_gen: self-checking test of the timing generator and the
// ADV7511 pixel formatter. It starts with a small 16x8 total / 8x4 visible mode,
// switches to a 20x9 mode after two frames, and feeds random YCbCr pairs with
// a start-of-frame flag on the first pair of each frame. The stream starts
// late (the generator must wait for a frame start), and one stretch of missing
// pairs causes an underflow, a loss of lock and a re-lock at the next frame.
// A reference model kept in the testbench predicts DE, HSYNC, VSYNC and data for
// every cycle, and the underflow count.
module tb_hdmi_signal_gen;
  import hdmi_pkg::*;
  localparam video_timing_t T0 = '{h: '{12'd8, 12'd2, 12'd3, 12'd3}, v: '{12'd4, 12'd1, 12'd2, 12'd1}};
  localparam video_timing_t T1 = '{h: '{12'd12, 12'd1, 12'd4, 12'd3}, v: '{12'd5, 12'd2, 12'd1, 12'd1}};

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic timing_valid, timing_ready, pix_valid, pix_ready, pix_sof, de, hs, vs, fs, locked;
  video_timing_t timing_in;
  ycbcr_pair_t pix;
  logic [23:0] data;
  logic [31:0] underflows;

  hdmi_signal_gen #(.INIT_TIMING(T0)) dut (
    .clk, .rst_n, .timing_valid, .timing_ready, .timing_in,
    .pix_valid, .pix_ready, .pix_in(pix), .pix_sof,
    .hdmi_data(data), .hdmi_de(de), .hdmi_hsync(hs), .hdmi_vsync(vs),
    .frame_start(fs), .underflow_count(underflows), .locked
  );

  int checks = 0, failures = 0;
  int h = 0, v = 0, cycle = 0, exp_underflows = 0, frames = 0, locks = 0;
  int k = 0;           // index of the offered pair inside its frame
  video_timing_t tt = T0;
  bit gap = 1, ref_locked = 0;
  logic [23:0] exp_data;
  logic exp_de, exp_hs, exp_vs;

  function automatic int tot(axis_timing_t a);
    return int'(a.active) + int'(a.fporch) + int'(a.sync) + int'(a.bporch);
  endfunction

  assign pix_valid = !gap;
  assign pix_sof   = (k == 0);

  // reference: what the outputs must show after this edge
  always @(posedge clk) if (rst_n) begin
    bit vis, lock_now, consume;
    vis = (h < tt.h.active) && (v < tt.v.active);
    lock_now = (h == 0 && v == 0) ? (pix_valid && pix_sof) : ref_locked;
    if (h == 0 && v == 0 && lock_now) locks++;
    exp_de = vis;
    exp_hs = (h >= tt.h.active + tt.h.fporch) && (h < tt.h.active + tt.h.fporch + tt.h.sync);
    exp_vs = (v >= tt.v.active + tt.v.fporch) && (v < tt.v.active + tt.v.fporch + tt.v.sync);
    if (lock_now && vis && pix_valid)
      exp_data = (h % 2) ? {pix.cr[11:4], pix.y2[11:4], pix.cr[3:0], pix.y2[3:0]}
                         : {pix.cb[11:4], pix.y1[11:4], pix.cb[3:0], pix.y1[3:0]};
    else begin
      exp_data = 0;
      if (lock_now && vis) exp_underflows++;
    end
    consume = pix_valid && ((lock_now && vis && (h % 2)) || (!lock_now && !pix_sof));
    ref_locked = lock_now && !(vis && !pix_valid);
    checks++;
    if (pix_ready !== ((lock_now && vis && (h % 2)) || (!lock_now && !pix_sof))) begin
      failures++; $display("FAIL pix_ready at cycle %0d", cycle);
    end
    if (consume) begin
      pix <= '{cb: 12'($urandom), cr: 12'($urandom), y1: 12'($urandom), y2: 12'($urandom)};
      k = (k + 1 == int'(tt.h.active) * int'(tt.v.active) / 2) ? 0 : k + 1;
    end
    if (h == tot(tt.h) - 1) begin
      h = 0;
      if (v == tot(tt.v) - 1) begin
        v = 0; frames++;
        if (timing_valid) tt = timing_in;
      end else v++;
    end else h++;
  end

  always @(negedge clk) if (rst_n && cycle > 0) begin
    checks++;
    if (de !== exp_de || hs !== exp_hs || vs !== exp_vs || data !== exp_data) begin
      failures++;
      $display("FAIL cycle %0d: de %b/%b hs %b/%b vs %b/%b data %h/%h", cycle,
               de, exp_de, hs, exp_hs, vs, exp_vs, data, exp_data);
    end
  end

  initial begin
    timing_valid = 0; timing_in = T1;
    pix = '{cb: 12'hABC, cr: 12'h123, y1: 12'h456, y2: 12'h789};
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    fork
      forever @(posedge clk) cycle++;
    join_none
    // the stream starts in the middle of frame 0
    repeat (40) @(negedge clk);
    gap = 0;
    wait (frames == 2);
    @(negedge clk) timing_valid = 1;
    wait (frames == 3);
    @(negedge clk) timing_valid = 0;
    // missing pairs for a stretch of the visible area
    wait (v == 1 && h == 0);
    @(negedge clk) gap = 1;
    repeat (9) @(negedge clk);
    gap = 0;
    wait (frames == 6);
    @(negedge clk);
    checks++;
    if (underflows != exp_underflows || exp_underflows == 0 || locks < 3) begin
      failures++;
      $display("FAIL underflow count %0d expected %0d, %0d locks", underflows, exp_underflows, locks);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
