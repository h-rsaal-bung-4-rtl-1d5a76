// axi_frame_mem_model: behavioural AXI3 read-only memory holding a frame
// buffer, for simulation only. Every 32-bit word at byte address a holds the
// pixel pixel_at(a) (a fixed hash of the address), and a 64-bit beat at a holds
// {pixel_at(a+4), pixel_at(a)}. Address requests are queued (up to 8) and
// answered in order, one beat per cycle, with a gap or a not-ready address
// channel now and then when STALLS is set. It checks that bursts are INCR with
// 8-byte beats and counts the bursts and beats it served.
module axi_frame_mem_model
  import tb_video_pkg::*;
#(
  parameter bit STALLS = 1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] araddr,
  input  logic [3:0]  arlen,
  input  logic [2:0]  arsize,
  input  logic [1:0]  arburst,
  input  logic        arvalid,
  output logic        arready,
  output logic [63:0] rdata,
  output logic [1:0]  rresp,
  output logic        rlast,
  output logic        rvalid,
  input  logic        rready,
  output int unsigned bursts,
  output int unsigned beats,
  output int unsigned protocol_errors
);

  logic [31:0] q_addr [$];
  int          q_len  [$];
  logic [31:0] cur_addr;
  int          cur_left;
  logic        active, gap;

  assign rresp  = 2'b00;
  assign rvalid = active && !gap;
  assign rdata  = {pixel_at(cur_addr + 4), pixel_at(cur_addr)};
  assign rlast  = (cur_left == 1);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      arready <= 0; active <= 0; gap <= 0; bursts <= 0; beats <= 0; protocol_errors <= 0;
      q_addr.delete(); q_len.delete();
    end else begin
      arready <= (q_addr.size() < 7) && (!STALLS || ($urandom % 4 != 0));
      gap     <= STALLS && ($urandom % 5 == 0);
      if (arvalid && arready) begin
        q_addr.push_back(araddr);
        q_len.push_back(int'(arlen) + 1);
        bursts <= bursts + 1;
        if (arsize != 3'd3 || arburst != 2'b01) protocol_errors <= protocol_errors + 1;
      end
      if (!active || (rvalid && rready && rlast)) begin
        if (q_addr.size() > 0) begin
          cur_addr <= q_addr.pop_front();
          cur_left <= q_len.pop_front();
          active   <= 1;
        end else active <= 0;
      end else if (rvalid && rready) begin
        cur_addr <= cur_addr + 8;
        cur_left <= cur_left - 1;
      end
      if (rvalid && rready) beats <= beats + 1;
    end
  end
endmodule
