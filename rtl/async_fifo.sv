// async_fifo: first-in first-out buffer between two unrelated clocks.
//
// Classic dual-clock design: the write side and the read side each keep a
// binary pointer with one extra wrap bit and publish it in Gray code; the other
// side samples it through two flip-flops. Full and empty are decided from the
// synchronised Gray pointers, so both are pessimistic by the synchronisation
// delay (about two cycles of the observing clock) but never wrong.
// DEPTH must be a power of two. Both sides use valid/ready handshakes; each
// side has its own synchronous, active-low reset, and both resets must be
// applied together.
module async_fifo #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 16,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             wr_clk,
  input  logic             wr_rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [WIDTH-1:0] in_data,
  input  logic             rd_clk,
  input  logic             rd_rst_n,
  output logic             out_valid,
  input  logic             out_ready,
  output logic [WIDTH-1:0] out_data
);
  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0] wr_bin, wr_gray, rd_bin, rd_gray;
  logic [AW:0] rd_gray_w1, rd_gray_w2, wr_gray_r1, wr_gray_r2;

  function automatic logic [AW:0] bin2gray(logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // write side
  wire [AW:0] wr_bin_next = wr_bin + 1'b1;
  assign in_ready = (wr_gray != {~rd_gray_w2[AW:AW-1], rd_gray_w2[AW-2:0]});
  always_ff @(posedge wr_clk) begin
    if (!wr_rst_n) begin
      wr_bin <= '0; wr_gray <= '0; rd_gray_w1 <= '0; rd_gray_w2 <= '0;
    end else begin
      rd_gray_w1 <= rd_gray;
      rd_gray_w2 <= rd_gray_w1;
      if (in_valid && in_ready) begin
        mem[wr_bin[AW-1:0]] <= in_data;
        wr_bin  <= wr_bin_next;
        wr_gray <= bin2gray(wr_bin_next);
      end
    end
  end

  // read side
  wire [AW:0] rd_bin_next = rd_bin + 1'b1;
  assign out_valid = (rd_gray != wr_gray_r2);
  assign out_data  = mem[rd_bin[AW-1:0]];
  always_ff @(posedge rd_clk) begin
    if (!rd_rst_n) begin
      rd_bin <= '0; rd_gray <= '0; wr_gray_r1 <= '0; wr_gray_r2 <= '0;
    end else begin
      wr_gray_r1 <= wr_gray;
      wr_gray_r2 <= wr_gray_r1;
      if (out_valid && out_ready) begin
        rd_bin  <= rd_bin_next;
        rd_gray <= bin2gray(rd_bin_next);
      end
    end
  end
endmodule
