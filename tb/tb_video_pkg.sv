// tb_video_pkg: reference functions shared by the video testbenches.
//   pixel_at(a)   the RGB pixel the behavioural memory holds at byte address a
//   ref_y/cb/cr   BT.601 studio-range conversion to 12-bit samples, in floating
//                 point, rounded to nearest.
package tb_video_pkg;
  function automatic logic [31:0] pixel_at(logic [31:0] a);
    logic [31:0] h;
    h = a * 32'h9E37_79B1;
    return {8'h00, h[31:8]};
  endfunction

  function automatic int ref_y(int r, int g, int b);
    return $rtoi($floor(256.0 + (65.738 * r + 129.057 * g + 25.064 * b) / 256.0 * 16.0 + 0.5));
  endfunction
  function automatic int ref_cb(int r, int g, int b);
    return $rtoi($floor(2048.0 + (-37.945 * r - 74.494 * g + 112.439 * b) / 256.0 * 16.0 + 0.5));
  endfunction
  function automatic int ref_cr(int r, int g, int b);
    return $rtoi($floor(2048.0 + (112.439 * r - 94.154 * g - 18.285 * b) / 256.0 * 16.0 + 0.5));
  endfunction
endpackage
