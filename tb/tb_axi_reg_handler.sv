// tb_axi_reg_handler: self-checking test of the HDMI configuration registers.
// Over the AXI4-Lite port it writes the frame address and each of the four
// modes (with slow timing and PLL receivers that hold the write response back),
// a mode number out of range and an unused address, reads the registers back,
// and checks the handed-on timing, PLL set and resolution against the tables.
module tb_axi_reg_handler;
  import hdmi_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [15:0] awaddr, araddr;
  logic awvalid, awready, wvalid, wready, bvalid, bready, arvalid, arready, rvalid, rready;
  logic [31:0] wdata, rdata, fb_addr;
  logic [3:0] wstrb;
  logic [1:0] bresp, rresp, mode;
  logic timing_valid, timing_ready, pll_start_valid, pll_start_ready, fb_enable;
  video_timing_t timing;
  pll_regs_t pll_regs;
  logic [11:0] res_h, res_v;

  axi_reg_handler dut (
    .clk, .rst_n,
    .s_axi_awaddr(awaddr), .s_axi_awvalid(awvalid), .s_axi_awready(awready),
    .s_axi_wdata(wdata), .s_axi_wstrb(wstrb), .s_axi_wvalid(wvalid), .s_axi_wready(wready),
    .s_axi_bresp(bresp), .s_axi_bvalid(bvalid), .s_axi_bready(bready),
    .s_axi_araddr(araddr), .s_axi_arvalid(arvalid), .s_axi_arready(arready),
    .s_axi_rdata(rdata), .s_axi_rresp(rresp), .s_axi_rvalid(rvalid), .s_axi_rready(rready),
    .timing_valid, .timing_ready, .timing, .pll_start_valid, .pll_start_ready, .pll_regs,
    .res_h, .res_v, .fb_addr, .fb_enable, .mode
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // slow receivers
  int timing_taken = 0, pll_taken = 0;
  video_timing_t last_timing;
  pll_regs_t last_pll;
  always @(negedge clk) begin
    timing_ready = ($urandom % 4 == 0);
    pll_start_ready = ($urandom % 3 == 0);
  end
  always @(posedge clk) if (rst_n) begin
    if (timing_valid && timing_ready) begin timing_taken++; last_timing = timing; end
    if (pll_start_valid && pll_start_ready) begin pll_taken++; last_pll = pll_regs; end
  end

  task automatic axi_write(input logic [15:0] a, input logic [31:0] d, output logic [1:0] resp);
    @(negedge clk);
    awaddr = a; awvalid = 1; wdata = d; wstrb = 4'hF; wvalid = 1;
    do @(posedge clk); while (!(awready && wready));
    @(negedge clk) begin awvalid = 0; wvalid = 0; end
    while (!bvalid) @(negedge clk);
    resp = bresp;
    bready = 1;
    @(negedge clk) bready = 0;
  endtask

  task automatic axi_read(input logic [15:0] a, output logic [31:0] d);
    @(negedge clk);
    araddr = a; arvalid = 1;
    do @(posedge clk); while (!arready);
    @(negedge clk) arvalid = 0;
    while (!rvalid) @(negedge clk);
    d = rdata;
    rready = 1;
    @(negedge clk) rready = 0;
  endtask

  localparam video_timing_t TT [4] = MODE_TIMINGS;

  initial begin
    logic [1:0] resp;
    logic [31:0] d;
    int t0, p0;
    awaddr = 0; awvalid = 0; wdata = 0; wstrb = 0; wvalid = 0; bready = 0;
    araddr = 0; arvalid = 0; rready = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!fb_enable, "DMA disabled after reset");
    axi_write(16'h0204, 32'h2000_0000, resp);
    check(resp == 2'b00 && fb_addr == 32'h2000_0000 && fb_enable, "frame address written");
    for (int m = 3; m >= 0; m--) begin
      t0 = timing_taken; p0 = pll_taken;
      axi_write(16'h0200, m, resp);
      // the response comes only after both hand-offs
      check(resp == 2'b00 && timing_taken == t0 + 1 && pll_taken == p0 + 1,
            $sformatf("mode %0d handed on before the response", m));
      check(last_timing == TT[m], $sformatf("timing of mode %0d", m));
      check(last_pll == PLL_SET_DOC, $sformatf("PLL set of mode %0d", m));
      check(res_h == TT[m].h.active && res_v == TT[m].v.active, $sformatf("resolution of mode %0d", m));
      axi_read(16'h0200, d);
      check(d == m, "mode reads back");
    end
    t0 = timing_taken;
    axi_write(16'h0200, 7, resp);
    check(resp == 2'b10 && mode == 0 && timing_taken == t0, "mode out of range refused");
    axi_write(16'h0010, 32'h1234, resp);
    check(resp == 2'b00 && mode == 0 && fb_addr == 32'h2000_0000, "unused address ignored");
    axi_read(16'h0204, d);
    check(d == 32'h2000_0000, "frame address reads back");
    axi_read(16'h0040, d);
    check(d == 0, "unused address reads 0");
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
