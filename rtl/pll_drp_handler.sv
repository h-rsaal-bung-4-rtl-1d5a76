// pll_drp_handler: programs the pixel-clock PLL of a new video mode.
//
// When started (start_valid/start_ready, only taken while idle) with the ten
// register values of a mode, it sends ten write requests, one after the other,
// to the clock controller's register port (csr_*, valid/ready, rnw = 0 for a
// write). Order and addresses:
//   0x11 clk_fb1, 0x12 clk_fb2, 0x13 clk_div, 0x14 clk_out1, 0x15 clk_out2,
//   0x16 lock1, 0x17 lock2, 0x18 lock3, 0x19 filter1, 0x1A filter2.
// The first two addresses are the document's; it leaves out the rest, so the
// following ones continuing in the same order are this design's assumption.
// Each request is held until it is accepted; with an always-ready port the
// sequence takes ten cycles. busy is high from start until the last write has
// been accepted, and done pulses for one cycle then.
// Reset is synchronous and active low.
module pll_drp_handler
  import hdmi_pkg::*;
#(
  parameter logic [4:0] BASE_ADDR = 5'h11
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start_valid,
  output logic        start_ready,
  input  pll_regs_t   regs_in,
  output logic        csr_valid,
  input  logic        csr_ready,
  output logic        csr_rnw,
  output logic [4:0]  csr_addr,
  output logic [31:0] csr_data,
  output logic        busy,
  output logic        done
);
  pll_regs_t   regs;
  logic [3:0]  idx;
  logic [15:0] vals [PLL_NUM_REGS];

  always_comb begin
    vals[0] = regs.clk_fb1;  vals[1] = regs.clk_fb2;  vals[2] = regs.clk_div;
    vals[3] = regs.clk_out1; vals[4] = regs.clk_out2; vals[5] = regs.lock1;
    vals[6] = regs.lock2;    vals[7] = regs.lock3;    vals[8] = regs.filter1;
    vals[9] = regs.filter2;
  end

  assign start_ready = !busy;
  assign csr_valid   = busy;
  assign csr_rnw     = 1'b0;
  assign csr_addr    = BASE_ADDR + 5'(idx);
  assign csr_data    = {16'd0, vals[idx]};

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      idx  <= '0;
    end else begin
      done <= 1'b0;
      if (start_valid && start_ready) begin
        regs <= regs_in;
        idx  <= '0;
        busy <= 1'b1;
      end else if (csr_valid && csr_ready) begin
        if (idx == 4'(PLL_NUM_REGS - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
        idx <= idx + 4'd1;
      end
    end
  end
endmodule
