// rgb2ycbcr422: converts two neighbouring RGB pixels into one YCbCr 4:2:2 pair.
//
// Input: one 64-bit word holding two pixels, the left one in bits [31:0] and the
// right one in bits [63:32], each as 8-bit R, G, B in bits [23:16], [15:8],
// [7:0] (bits [31:24] are ignored). Output: ycbcr_pair_t with 12-bit samples.
// The coefficients are the ITU-R BT.601 studio-range ones scaled to 12 bits
// (16x the 8-bit values), in fixed point with 8 fraction bits:
//   Y  =  256 + ( 1052 R + 2065 G +  401 B) / 256
//   Cb = 2048 + ( -607 R - 1192 G + 1799 B) / 256
//   Cr = 2048 + ( 1799 R - 1507 G -  292 B) / 256
// Y is computed for each pixel; Cb and Cr are computed from the sum of both
// pixels and halved, i.e. the chroma of the pair is the average of the two.
// The document names this converter but gives neither format nor coefficients;
// both are this design's choice. Divisions round towards minus infinity.
//
// A start-of-frame flag (in_sof) travels with the data unchanged.
// One register stage with a valid/ready handshake: a result appears the cycle
// after its input is taken, and the stage accepts a new input whenever its
// output register is empty or being read. Reset is synchronous, active low.
module rgb2ycbcr422
  import hdmi_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  output logic        in_ready,
  input  logic [63:0] in_rgb,
  input  logic        in_sof,
  output logic        out_valid,
  input  logic        out_ready,
  output ycbcr_pair_t out_pix,
  output logic        out_sof
);
  function automatic logic [11:0] luma(logic [7:0] r, logic [7:0] g, logic [7:0] b);
    logic [19:0] s;
    s = 20'd1052 * r + 20'd2065 * g + 20'd401 * b;
    return 12'd256 + s[19:8];
  endfunction

  logic signed [20:0] cb_sum, cr_sum;
  ycbcr_pair_t        conv;
  always_comb begin
    logic signed [20:0] r0, g0, b0, r1, g1, b1;
    r0 = 21'(in_rgb[23:16]); g0 = 21'(in_rgb[15:8]);  b0 = 21'(in_rgb[7:0]);
    r1 = 21'(in_rgb[55:48]); g1 = 21'(in_rgb[47:40]); b1 = 21'(in_rgb[39:32]);
    cb_sum = -21'sd607 * (r0 + r1) - 21'sd1192 * (g0 + g1) + 21'sd1799 * (b0 + b1);
    cr_sum =  21'sd1799 * (r0 + r1) - 21'sd1507 * (g0 + g1) - 21'sd292 * (b0 + b1);
    conv.y1 = luma(in_rgb[23:16], in_rgb[15:8], in_rgb[7:0]);
    conv.y2 = luma(in_rgb[55:48], in_rgb[47:40], in_rgb[39:32]);
    conv.cb = 12'(21'sd2048 + (cb_sum >>> 9));
    conv.cr = 12'(21'sd2048 + (cr_sum >>> 9));
  end

  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
    end else if (in_ready) begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_pix <= conv;
        out_sof <= in_sof;
      end
    end
  end
endmodule
