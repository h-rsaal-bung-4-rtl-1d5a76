// line_fetcher: moves whole cache lines between the cache and the memory above.
//
// The cache hands it one request at a time:
//   FETCH       read the line at req_rd_addr and return it,
//   FETCH_DIRTY first write req_line (all bytes enabled) to req_wr_addr, then
//               read the line at req_rd_addr and return it,
//   JUST_WRITE  write req_line with the byte enables req_be to req_wr_addr and
//               return nothing.
// A request is accepted only while no other is in progress (req_ready). The
// fetcher then sends exactly one memory request per step: a write while its
// "dirty" flag is set, a read otherwise. After a write the flag is cleared and
// the read is sent; once the read data arrive they are kept in a line register
// and offered on rsp_* until the cache takes them. This sequence follows the
// document; JUST_WRITE (which the document defines but leaves unhandled) and
// the explicit response-valid flag are this design's additions.
//
// The memory side passes through one-entry bypass buffers in each direction,
// so a request can leave, and read data can be taken, in the cycle they are
// produced or arrive.
//
// Timing: with a memory that is always ready, a FETCH issues its read one cycle
// after acceptance and the line is offered one cycle after the read data
// arrive; FETCH_DIRTY adds two cycles for the write-back.
// Handshakes are valid/ready; reset is synchronous and active low.
module line_fetcher
  import cache_pkg::*;
#(
  parameter int unsigned ADDR_BITS = 32,
  parameter int unsigned LINE_BITS = 512,
  localparam int unsigned BE_BITS  = LINE_BITS / 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // requests from the cache
  input  logic                 req_valid,
  output logic                 req_ready,
  input  fetch_op_e            req_op,
  input  logic [ADDR_BITS-1:0] req_rd_addr,
  input  logic [ADDR_BITS-1:0] req_wr_addr,
  input  logic [LINE_BITS-1:0] req_line,
  input  logic [BE_BITS-1:0]   req_be,
  // fetched line back to the cache
  output logic                 rsp_valid,
  input  logic                 rsp_ready,
  output logic [LINE_BITS-1:0] rsp_line,
  // requests to the memory above
  output logic                 ram_req_valid,
  input  logic                 ram_req_ready,
  output ram_op_e              ram_req_op,
  output logic [ADDR_BITS-1:0] ram_req_addr,
  output logic [LINE_BITS-1:0] ram_req_line,
  output logic [BE_BITS-1:0]   ram_req_be,
  // read data from the memory above
  input  logic                 ram_rsp_valid,
  output logic                 ram_rsp_ready,
  input  logic [LINE_BITS-1:0] ram_rsp_line
);
  localparam int unsigned REQ_W = 1 + ADDR_BITS + LINE_BITS + BE_BITS;

  logic                 in_progress;   // a request is being worked on
  logic                 dirty;         // next memory request is a write
  logic                 request_done;  // memory request of this step has been sent
  logic                 write_only;    // JUST_WRITE: no read follows
  logic                 line_ready;    // cur_line holds a line for the cache
  logic [ADDR_BITS-1:0] rd_addr, wr_addr;
  logic [LINE_BITS-1:0] cur_line;
  logic [BE_BITS-1:0]   wr_be;

  // memory-side bypass buffers
  logic             oq_in_valid, oq_in_ready;
  logic [REQ_W-1:0] oq_in_data, oq_out_data;
  logic             iq_out_valid, iq_out_ready;
  logic [LINE_BITS-1:0] iq_out_data;

  bypass_fifo #(.WIDTH(REQ_W)) u_req_out (
    .clk, .rst_n,
    .in_valid (oq_in_valid), .in_ready (oq_in_ready), .in_data (oq_in_data),
    .out_valid(ram_req_valid), .out_ready(ram_req_ready), .out_data(oq_out_data)
  );
  assign {ram_req_op, ram_req_addr, ram_req_line, ram_req_be} = oq_out_data;

  bypass_fifo #(.WIDTH(LINE_BITS)) u_data_in (
    .clk, .rst_n,
    .in_valid (ram_rsp_valid), .in_ready (ram_rsp_ready), .in_data (ram_rsp_line),
    .out_valid(iq_out_valid), .out_ready(iq_out_ready), .out_data(iq_out_data)
  );

  // step 1: send the write (dirty) or the read
  assign oq_in_valid = in_progress && !request_done;
  assign oq_in_data  = dirty ? {RAM_WRITE, wr_addr, cur_line, wr_be}
                             : {RAM_READ,  rd_addr, {LINE_BITS{1'b0}}, {BE_BITS{1'b0}}};
  // step 3: take the read data
  assign iq_out_ready = in_progress && !dirty && request_done;

  assign req_ready = !in_progress && !line_ready;
  assign rsp_valid = line_ready;
  assign rsp_line  = cur_line;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      in_progress  <= 1'b0;
      dirty        <= 1'b0;
      request_done <= 1'b0;
      write_only   <= 1'b0;
      line_ready   <= 1'b0;
    end else begin
      if (req_valid && req_ready) begin
        in_progress  <= 1'b1;
        request_done <= 1'b0;
        rd_addr      <= req_rd_addr;
        wr_addr      <= req_wr_addr;
        dirty        <= (req_op != FETCH);
        write_only   <= (req_op == JUST_WRITE);
        cur_line     <= req_line;
        wr_be        <= (req_op == JUST_WRITE) ? req_be : {BE_BITS{1'b1}};
      end
      if (oq_in_valid && oq_in_ready) request_done <= 1'b1;
      // step 2: after the write-back, go on with the read (or finish)
      if (in_progress && dirty && request_done) begin
        dirty        <= 1'b0;
        request_done <= 1'b0;
        if (write_only) in_progress <= 1'b0;
      end
      if (iq_out_valid && iq_out_ready) begin
        cur_line    <= iq_out_data;
        in_progress <= 1'b0;
        line_ready  <= 1'b1;
      end
      if (rsp_valid && rsp_ready) line_ready <= 1'b0;
    end
  end

  // a response is only offered while no request is being worked on
  assert property (@(posedge clk) disable iff (!rst_n) rsp_valid |-> !in_progress);
endmodule
