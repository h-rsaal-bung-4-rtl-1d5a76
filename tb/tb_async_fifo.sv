// tb_async_fifo: checks the dual-clock FIFO between two unrelated clocks.
// Phase 1 fills the FIFO with the reader stopped and checks that it takes
// exactly DEPTH words and then refuses more. Phase 2 streams 3000 numbered
// words with random stalls on both sides, once with a fast writer and once with
// a fast reader, and checks that every word arrives once and in order.
// A watchdog ends the run if the stream stops.
module tb_async_fifo;
  localparam int W = 16, D = 8;
  logic wclk = 0, rclk = 0, wrst_n = 0, rrst_n = 0;
  real wper = 5.0, rper = 7.3;
  always #(wper) wclk = ~wclk;
  always #(rper) rclk = ~rclk;

  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  logic [W-1:0] in_data = '0, out_data;

  async_fifo #(.WIDTH(W), .DEPTH(D)) dut (
    .wr_clk(wclk), .wr_rst_n(wrst_n), .in_valid, .in_ready, .in_data,
    .rd_clk(rclk), .rd_rst_n(rrst_n), .out_valid, .out_ready, .out_data
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int unsigned sent = 0, got = 0, limit = 0;
  int unsigned wr_stall = 0, rd_stall = 0;  // percent of cycles held back
  bit streaming = 0;

  // writer: numbered words, random gaps
  always @(posedge wclk) if (streaming) begin
    if (in_valid && in_ready) sent <= sent + 1;
    if (!(in_valid && !in_ready)) begin
      if (sent + (in_valid && in_ready) < limit && ($urandom % 100) >= wr_stall) begin
        in_valid <= 1'b1;
        in_data  <= W'(sent + (in_valid && in_ready));
      end else begin
        in_valid <= 1'b0;
      end
    end
  end

  // reader: random ready, order check
  always @(posedge rclk) if (streaming) begin
    if (out_valid && out_ready) begin
      check(out_data == W'(got), $sformatf("word %0d arrived as %0d", got, out_data));
      got <= got + 1;
    end
    out_ready <= ($urandom % 100) >= rd_stall;
  end

  task automatic stream(input int unsigned n, input int unsigned ws, input int unsigned rs);
    wr_stall = ws; rd_stall = rs;
    limit = sent + n;
    streaming = 1;
    wait (got == limit);
    repeat (5) @(posedge rclk);
    check(!out_valid, "FIFO empty after the stream");
  endtask

  initial begin
    int n;
    repeat (4) @(posedge rclk);
    wrst_n = 1; rrst_n = 1;
    repeat (4) @(posedge rclk);
    // phase 1: fill with the reader stopped
    n = 0;
    @(negedge wclk);
    in_valid = 1;
    repeat (3 * D) begin
      in_data = W'(n);
      @(posedge wclk);
      if (in_ready) n++;
      @(negedge wclk);
    end
    in_valid = 0;
    check(n == D, $sformatf("took %0d words while full at %0d", n, D));
    repeat (6) @(posedge rclk);
    check(out_valid && out_data == 0, "first word waiting at the output");
    // drain phase 1 by hand
    for (int i = 0; i < D; i++) begin
      @(negedge rclk);
      check(out_valid && out_data == W'(i), $sformatf("fill word %0d", i));
      out_ready = 1;
      @(negedge rclk);
      out_ready = 0;
    end
    repeat (6) @(posedge rclk);
    check(!out_valid, "empty after draining");
    // phase 2: streams, numbered from 0 again
    @(negedge wclk);
    sent = 0; got = 0;
    stream(1500, 10, 50);   // reader slower: FIFO runs full
    stream(1500, 50, 10);   // writer slower: FIFO runs empty
    check(got == 3000, "all words received");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge wclk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
