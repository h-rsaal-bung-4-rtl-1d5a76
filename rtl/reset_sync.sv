// reset_sync: makes a reset for another clock domain. The active-low reset
// input takes effect at once (asynchronously); its release is passed through
// two flip-flops of the target clock, so the target domain leaves reset
// cleanly on one of its own edges, two to three cycles after the release.
// Lint tools flag the input as a net used both as an asynchronous reset here
// and as a synchronous one elsewhere (the bus-clock logic); that is the
// purpose of this synchroniser and the warning stands.
module reset_sync (
  input  logic clk,
  input  logic rst_n_in,
  output logic rst_n_out
);
  logic meta;
  always_ff @(posedge clk or negedge rst_n_in) begin
    if (!rst_n_in) begin
      meta      <= 1'b0;
      rst_n_out <= 1'b0;
    end else begin
      meta      <= 1'b1;
      rst_n_out <= meta;
    end
  end
endmodule
