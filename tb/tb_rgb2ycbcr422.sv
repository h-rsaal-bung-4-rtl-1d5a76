// tb_rgb2ycbcr422: self-checking test of the RGB to YCbCr 4:2:2 converter.
// It sends black, white, the primaries and 2000 random pixel pairs with a
// randomly stalling receiver, and compares every result with the BT.601
// studio-range equations evaluated in floating point (12-bit scale, chroma
// from the average of the two pixels), allowing 1 LSB for rounding. It also
// checks that the start-of-frame flag (tied to input bit 24 here) travels
// with its data and that results come out in order and one cycle after their input.
module tb_rgb2ycbcr422;
  import hdmi_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, in_ready, out_valid, out_ready;
  logic [63:0] in_rgb;
  ycbcr_pair_t out_pix;
  logic out_sof;

  rgb2ycbcr422 dut (.clk, .rst_n, .in_valid, .in_ready, .in_rgb, .in_sof(in_rgb[24]), .out_valid, .out_ready, .out_pix, .out_sof);

  int checks = 0, failures = 0;
  logic [63:0] sent [$];

  function automatic int ref_y(int r, int g, int b);
    return $rtoi($floor(256.0 + (65.738 * r + 129.057 * g + 25.064 * b) / 256.0 * 16.0 + 0.5));
  endfunction
  function automatic int ref_cb(int r, int g, int b);
    return $rtoi($floor(2048.0 + (-37.945 * r - 74.494 * g + 112.439 * b) / 256.0 * 16.0 + 0.5));
  endfunction
  function automatic int ref_cr(int r, int g, int b);
    return $rtoi($floor(2048.0 + (112.439 * r - 94.154 * g - 18.285 * b) / 256.0 * 16.0 + 0.5));
  endfunction
  function automatic bit near(int a, int b);
    return (a - b <= 1) && (b - a <= 1);
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (out_valid && out_ready) begin
      logic [63:0] p;
      int r0, g0, b0, r1, g1, b1, ey1, ey2, ecb, ecr;
      p = sent.pop_front();
      r0 = p[23:16]; g0 = p[15:8]; b0 = p[7:0];
      r1 = p[55:48]; g1 = p[47:40]; b1 = p[39:32];
      ey1 = ref_y(r0, g0, b0); ey2 = ref_y(r1, g1, b1);
      // chroma of the pair: average of the two pixels' chroma
      ecb = (ref_cb(r0, g0, b0) + ref_cb(r1, g1, b1)) / 2;
      ecr = (ref_cr(r0, g0, b0) + ref_cr(r1, g1, b1)) / 2;
      checks++;
      if (!near(out_pix.y1, ey1) || !near(out_pix.y2, ey2) || !near(out_pix.cb, ecb)
          || !near(out_pix.cr, ecr) || out_sof != p[24]) begin
        failures++;
        $display("FAIL %h: got y1 %0d y2 %0d cb %0d cr %0d, expected %0d %0d %0d %0d",
                 p, out_pix.y1, out_pix.y2, out_pix.cb, out_pix.cr, ey1, ey2, ecb, ecr);
      end
    end
    if (in_valid && in_ready) sent.push_back(in_rgb);
  end

  task automatic send(input logic [63:0] v);
    @(negedge clk);
    in_valid = 1; in_rgb = v;
    do @(posedge clk); while (!in_ready);
    @(negedge clk) in_valid = 0;
  endtask

  initial begin
    in_valid = 0; in_rgb = 0; out_ready = 1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // latency: result valid right after the input is taken
    @(negedge clk) in_valid = 1; in_rgb = {32'h00FFFFFF, 32'h00000000};
    @(negedge clk) in_valid = 0;
    checks++;
    if (!out_valid) begin failures++; $display("FAIL latency"); end
    send({32'h00FF0000, 32'h00FF0000});
    send({32'h0000FF00, 32'h0000FF00});
    send({32'h000000FF, 32'h000000FF});
    send({32'h00FFFFFF, 32'h00FFFFFF});
    fork
      forever @(negedge clk) out_ready = ($urandom % 3 != 0);
    join_none
    for (int i = 0; i < 2000; i++) send({$urandom, $urandom});
    @(negedge clk) out_ready = 1;
    repeat (5) @(negedge clk);
    checks++;
    if (sent.size() != 0) begin failures++; $display("FAIL %0d results missing", sent.size()); end
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
