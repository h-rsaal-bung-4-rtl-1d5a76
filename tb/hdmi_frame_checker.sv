// hdmi_frame_checker: checks the ADV7511 bus of the HDMI controller against the
// frame buffer of the behavioural memory. It follows the position on screen
// from frame_start and DE: at frame_start the position is the top-left pixel,
// every DE cycle moves one pixel right, the end of a DE run starts the next
// row. For every pixel of a frame that begins locked it decodes chroma and luma
// from the bus and compares them with the reference conversion of the two RGB
// pixels of its pair (stored row by row from fb_addr), allowing 1 LSB.
// Frame address and size are sampled at frame start; frames that start while
// enable is low are not checked. It counts
// checked pixels (a frame that loses its lock is not checked further), whole frames checked and mismatches.
module hdmi_frame_checker
  import tb_video_pkg::*;
(
  input  logic        clk,
  input  logic        de,
  input  logic [23:0] data,
  input  logic        frame_start,
  input  logic        locked,
  input  logic        enable,
  input  logic [31:0] fb_addr,
  input  int          width,
  input  int          height,
  output int          pixels_checked,
  output int          frames_checked,
  output int          errors
);
  int x = 0, y = 0, w = 0, hgt = 0;
  logic [31:0] base;
  bit checking = 0, prev_de = 0;

  initial begin pixels_checked = 0; frames_checked = 0; errors = 0; end

  always @(posedge clk) begin
    if (frame_start) begin
      if (checking && y == hgt) frames_checked++;
      x = 0; y = 0;
      checking = locked && enable;
      base = fb_addr; w = width; hgt = height;
    end else if (prev_de && !de) begin
      x = 0; y++;
    end
    if (!locked) checking = 0;
    if (de && checking) begin
      logic [31:0] p0, p1, a;
      int exp_c, exp_l, got_c, got_l;
      a  = base + (y * w + (x & ~1)) * 4;
      p0 = pixel_at(a);
      p1 = pixel_at(a + 4);
      if (x % 2 == 0) begin
        exp_c = (ref_cb(p0[23:16], p0[15:8], p0[7:0]) + ref_cb(p1[23:16], p1[15:8], p1[7:0])) / 2;
        exp_l = ref_y(p0[23:16], p0[15:8], p0[7:0]);
      end else begin
        exp_c = (ref_cr(p0[23:16], p0[15:8], p0[7:0]) + ref_cr(p1[23:16], p1[15:8], p1[7:0])) / 2;
        exp_l = ref_y(p1[23:16], p1[15:8], p1[7:0]);
      end
      got_c = {data[23:16], data[7:4]};
      got_l = {data[15:8], data[3:0]};
      pixels_checked++;
      if (got_c - exp_c > 1 || exp_c - got_c > 1 || got_l - exp_l > 1 || exp_l - got_l > 1) begin
        errors++;
        if (errors < 10) $display("pixel (%0d,%0d): chroma %0d/%0d luma %0d/%0d", x, y,
                                  got_c, exp_c, got_l, exp_l);
      end
      x++;
    end
    prev_de = de;
  end
endmodule
