// bypass_fifo: one-entry buffer whose input passes straight to the output when
// the buffer is empty, so data can cross it in the cycle it arrives. When the
// receiver is not ready the word is stored and offered from the register in
// the following cycles; while a word is stored no new one is accepted.
// The pass-through makes a combinational path from input to output, which is
// what lets the line fetcher talk to memory without an added cycle, at the cost
// of a longer path in hardware.
// Reset (synchronous, active low) empties it.
module bypass_fifo #(
  parameter int unsigned WIDTH = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [WIDTH-1:0] in_data,
  output logic             out_valid,
  input  logic             out_ready,
  output logic [WIDTH-1:0] out_data
);
  logic             full;
  logic [WIDTH-1:0] stored;

  assign in_ready  = !full;
  assign out_valid = full || in_valid;
  assign out_data  = full ? stored : in_data;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      full <= 1'b0;
    end else if (full) begin
      if (out_ready) full <= 1'b0;
    end else if (in_valid && !out_ready) begin
      full   <= 1'b1;
      stored <= in_data;
    end
  end
endmodule
