// axi_reg_handler: the HDMI controller's configuration registers on an AXI4-Lite
// slave port (32-bit data).
//
// Two registers, word-addressed from REG_BASE (byte offset 0x200 by default,
// the processor writes them as 32-bit words 128 and 129 of the block):
//   REG_BASE + 0  MODE   write 0..NUM_MODES-1 to select a video mode. The handler
//                        looks the mode up in the timing and PLL tables, sends the
//                        timing towards the signal generator (timing_*), starts
//                        the PLL programming sequence (pll_start_*) and hands the
//                        visible width and height to the DMA reader (res_h, res_v).
//                        The write is answered only when both the timing and the
//                        PLL start have been taken; a mode number out of range is
//                        answered with SLVERR and changes nothing.
//   REG_BASE + 4  FBADDR frame start address in main memory for the DMA reader;
//                        the first write also sets fb_enable.
// Both read back their last written value; other addresses read 0 and ignore
// writes. The register map and the use of AXI4-Lite are this design's choices;
// the two operations are the document's.
// Handshake: a write is taken when address and data are both valid and no
// response is pending; the response follows one cycle later for FBADDR and
// after the hand-off for MODE. A read answers the cycle after it is taken.
// Reset is synchronous, active low; after reset mode 0 and address 0 are set.
// Only whole 32-bit words are addressed: the two lowest address bits are
// ignored, and lint reports them as unused.
module axi_reg_handler
  import hdmi_pkg::*;
#(
  parameter int unsigned        ADDR_BITS    = 16,
  parameter logic [15:0]        REG_BASE     = 16'h0200,
  parameter mode_timing_table_t TIMING_TABLE = MODE_TIMINGS,
  parameter mode_pll_table_t    PLL_TABLE    = MODE_PLL
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // AXI4-Lite slave
  input  logic [ADDR_BITS-1:0] s_axi_awaddr,
  input  logic                 s_axi_awvalid,
  output logic                 s_axi_awready,
  input  logic [31:0]          s_axi_wdata,
  input  logic [3:0]           s_axi_wstrb,
  input  logic                 s_axi_wvalid,
  output logic                 s_axi_wready,
  output logic [1:0]           s_axi_bresp,
  output logic                 s_axi_bvalid,
  input  logic                 s_axi_bready,
  input  logic [ADDR_BITS-1:0] s_axi_araddr,
  input  logic                 s_axi_arvalid,
  output logic                 s_axi_arready,
  output logic [31:0]          s_axi_rdata,
  output logic [1:0]           s_axi_rresp,
  output logic                 s_axi_rvalid,
  input  logic                 s_axi_rready,
  // to the signal generator (through the clock-domain crossing)
  output logic                 timing_valid,
  input  logic                 timing_ready,
  output video_timing_t        timing,
  // to the PLL handler
  output logic                 pll_start_valid,
  input  logic                 pll_start_ready,
  output pll_regs_t            pll_regs,
  // to the DMA reader
  output logic [11:0]          res_h,
  output logic [11:0]          res_v,
  output logic [31:0]          fb_addr,
  output logic                 fb_enable,
  // current mode
  output logic [1:0]           mode
);
  localparam logic [1:0] OKAY = 2'b00, SLVERR = 2'b10;
  localparam int unsigned MODE_BITS = $clog2(NUM_MODES);

  wire take_write = s_axi_awvalid && s_axi_wvalid && !s_axi_bvalid
                    && !timing_valid && !pll_start_valid;
  assign s_axi_awready = take_write;
  assign s_axi_wready  = take_write;

  wire [ADDR_BITS-1:0] off = s_axi_awaddr - ADDR_BITS'(REG_BASE);
  wire is_mode   = (s_axi_awaddr >= ADDR_BITS'(REG_BASE)) && (off[ADDR_BITS-1:2] == '0);
  wire is_fbaddr = (s_axi_awaddr >= ADDR_BITS'(REG_BASE)) && (off[ADDR_BITS-1:2] == 1);
  wire mode_ok   = (s_axi_wdata < NUM_MODES);

  // a mode write answers once both hand-offs are done
  logic mode_pending;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s_axi_bvalid    <= 1'b0;
      s_axi_bresp     <= OKAY;
      timing_valid    <= 1'b0;
      pll_start_valid <= 1'b0;
      mode_pending    <= 1'b0;
      mode            <= '0;
      res_h           <= TIMING_TABLE[0].h.active;
      res_v           <= TIMING_TABLE[0].v.active;
      fb_addr         <= '0;
      fb_enable       <= 1'b0;
    end else begin
      if (s_axi_bvalid && s_axi_bready) s_axi_bvalid <= 1'b0;
      if (timing_valid && timing_ready) timing_valid <= 1'b0;
      if (pll_start_valid && pll_start_ready) pll_start_valid <= 1'b0;
      if (take_write) begin
        s_axi_bresp <= OKAY;
        if (is_mode && mode_ok) begin
          mode            <= s_axi_wdata[MODE_BITS-1:0];
          timing          <= TIMING_TABLE[s_axi_wdata[MODE_BITS-1:0]];
          pll_regs        <= PLL_TABLE[s_axi_wdata[MODE_BITS-1:0]];
          res_h           <= TIMING_TABLE[s_axi_wdata[MODE_BITS-1:0]].h.active;
          res_v           <= TIMING_TABLE[s_axi_wdata[MODE_BITS-1:0]].v.active;
          timing_valid    <= 1'b1;
          pll_start_valid <= 1'b1;
          mode_pending    <= 1'b1;
        end else begin
          if (is_mode) s_axi_bresp <= SLVERR;
          if (is_fbaddr && s_axi_wstrb == 4'hF) begin
            fb_addr   <= s_axi_wdata;
            fb_enable <= 1'b1;
          end
          s_axi_bvalid <= 1'b1;
        end
      end
      if (mode_pending && !(timing_valid && !timing_ready)
                       && !(pll_start_valid && !pll_start_ready)) begin
        mode_pending <= 1'b0;
        s_axi_bvalid <= 1'b1;
      end
    end
  end

  // read side
  wire [ADDR_BITS-1:0] roff = s_axi_araddr - ADDR_BITS'(REG_BASE);
  assign s_axi_arready = !s_axi_rvalid;
  assign s_axi_rresp   = OKAY;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s_axi_rvalid <= 1'b0;
      s_axi_rdata  <= '0;
    end else begin
      if (s_axi_rvalid && s_axi_rready) s_axi_rvalid <= 1'b0;
      if (s_axi_arvalid && s_axi_arready) begin
        s_axi_rvalid <= 1'b1;
        if (s_axi_araddr >= ADDR_BITS'(REG_BASE) && roff[ADDR_BITS-1:2] == 0)
          s_axi_rdata <= 32'(mode);
        else if (s_axi_araddr >= ADDR_BITS'(REG_BASE) && roff[ADDR_BITS-1:2] == 1)
          s_axi_rdata <= fb_addr;
        else
          s_axi_rdata <= '0;
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n)
                   s_axi_bvalid && !s_axi_bready |=> s_axi_bvalid);
endmodule
