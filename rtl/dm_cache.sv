// dm_cache: direct-mapped, write-back, write-allocate cache of whole lines.
//
// Users send line requests (read: address; write: address, line data, one
// enable bit per byte) and get a whole line back for every read. A byte address
// splits into tag | slot | offset, where the offset selects a byte inside the
// LINE_BITS-wide line and is ignored, the slot picks one of SLOTS entries and
// the tag is the rest. Each slot holds valid, dirty, tag and line registers.
//
// Operation, one request at a time, as described in the document:
//   1. a request is taken from the input buffer and its tag and slot latched;
//   2. on a miss (tag differs or slot invalid) the line fetcher is asked for
//      the new line; if the slot is dirty its old line is written back first
//      (FETCH_DIRTY). The slot is marked invalid with the new tag meanwhile;
//   3. when the fetched line arrives it is stored and the slot marked valid;
//   4. on a hit a read returns the line through the output buffer, a write
//      merges the new bytes, line = (line & ~en) | (new & en), with en the byte
//      enables widened to bits, and marks the slot dirty.
// clear_req (taken while clear_ready, i.e. no request is in progress) marks all
// slots invalid and clean in one cycle, without writing anything back.
// hit_count, miss_count and writeback_count count finished hits, misses and
// write-backs since reset.
//
// All four ports go through two-entry FIFOs (pipe_fifo). Timing with an
// always-ready user: a read hit answers 2 cycles after it is accepted; a miss
// adds the memory round trip plus a few cycles of hand-over (and a second
// round trip for the write-back of a dirty line). Writes are posted: the user
// sees no response for them. clear_ready only says that no request is being
// worked on; requests already queued in the input FIFO are served after the
// clear, so a user that wants them served before must wait for them.
// The lowest address bits (the byte offset in the line) are not used by the
// cache itself: a request always names a whole line, with byte enables.
// The address of a clean miss is built from the requested tag (the document's
// listing uses the slot's old tag there, which would fetch the wrong line).
// Handshakes are valid/ready; reset is synchronous and active low.
module dm_cache
  import cache_pkg::*;
#(
  parameter int unsigned ADDR_BITS = 32,
  parameter int unsigned LINE_BITS = 512,
  parameter int unsigned SLOTS     = 128,
  localparam int unsigned BE_BITS   = LINE_BITS / 8,
  localparam int unsigned OFF_BITS  = $clog2(BE_BITS),
  localparam int unsigned SLOT_BITS = $clog2(SLOTS),
  localparam int unsigned TAG_BITS  = ADDR_BITS - SLOT_BITS - OFF_BITS
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // user side (RAM server)
  input  logic                 user_req_valid,
  output logic                 user_req_ready,
  input  ram_op_e              user_req_op,
  input  logic [ADDR_BITS-1:0] user_req_addr,
  input  logic [LINE_BITS-1:0] user_req_line,
  input  logic [BE_BITS-1:0]   user_req_be,
  output logic                 user_rsp_valid,
  input  logic                 user_rsp_ready,
  output logic [LINE_BITS-1:0] user_rsp_line,
  // memory side (RAM client)
  output logic                 ram_req_valid,
  input  logic                 ram_req_ready,
  output ram_op_e              ram_req_op,
  output logic [ADDR_BITS-1:0] ram_req_addr,
  output logic [LINE_BITS-1:0] ram_req_line,
  output logic [BE_BITS-1:0]   ram_req_be,
  input  logic                 ram_rsp_valid,
  output logic                 ram_rsp_ready,
  input  logic [LINE_BITS-1:0] ram_rsp_line,
  // clear all slots
  input  logic                 clear_req,
  output logic                 clear_ready,
  // statistics
  output logic [31:0]          hit_count,
  output logic [31:0]          miss_count,
  output logic [31:0]          writeback_count
);
  localparam int unsigned REQ_W = 1 + ADDR_BITS + LINE_BITS + BE_BITS;

  // ---------------- slot storage ----------------
  logic [SLOTS-1:0]    valid_q, dirty_q;
  logic [TAG_BITS-1:0] tag_q  [SLOTS];
  logic [LINE_BITS-1:0] line_q [SLOTS];

  // ---------------- request state ----------------
  logic                 in_progress, fetch_active, was_miss, is_read;
  logic [TAG_BITS-1:0]  exp_tag;
  logic [SLOT_BITS-1:0] exp_slot;
  logic [LINE_BITS-1:0] wr_line;
  logic [BE_BITS-1:0]   wr_be;

  // ---------------- port buffers ----------------
  logic             rq_valid, rq_ready;
  logic [REQ_W-1:0] rq_data;
  ram_op_e              rq_op;
  logic [ADDR_BITS-1:0] rq_addr;
  logic [LINE_BITS-1:0] rq_line;
  logic [BE_BITS-1:0]   rq_be;

  pipe_fifo #(.WIDTH(REQ_W)) u_request_in (
    .clk, .rst_n,
    .in_valid (user_req_valid), .in_ready (user_req_ready),
    .in_data  ({user_req_op, user_req_addr, user_req_line, user_req_be}),
    .out_valid(rq_valid), .out_ready(rq_ready), .out_data(rq_data)
  );
  assign {rq_op, rq_addr, rq_line, rq_be} = rq_data;

  logic dq_valid, dq_ready;
  pipe_fifo #(.WIDTH(LINE_BITS)) u_data_out (
    .clk, .rst_n,
    .in_valid (dq_valid), .in_ready (dq_ready), .in_data (line_q[exp_slot]),
    .out_valid(user_rsp_valid), .out_ready(user_rsp_ready), .out_data(user_rsp_line)
  );

  // fetcher and the memory-side buffers
  logic                 f_req_valid, f_req_ready, f_rsp_valid, f_rsp_ready;
  fetch_op_e            f_req_op;
  logic [ADDR_BITS-1:0] f_rd_addr, f_wr_addr;
  logic [LINE_BITS-1:0] f_rsp_line;
  logic                 fr_valid, fr_ready, fd_valid, fd_ready;
  ram_op_e              fr_op;
  logic [ADDR_BITS-1:0] fr_addr;
  logic [LINE_BITS-1:0] fr_line, fd_line;
  logic [BE_BITS-1:0]   fr_be;

  line_fetcher #(.ADDR_BITS(ADDR_BITS), .LINE_BITS(LINE_BITS)) u_fetcher (
    .clk, .rst_n,
    .req_valid(f_req_valid), .req_ready(f_req_ready), .req_op(f_req_op),
    .req_rd_addr(f_rd_addr), .req_wr_addr(f_wr_addr),
    .req_line(line_q[exp_slot]), .req_be({BE_BITS{1'b1}}),
    .rsp_valid(f_rsp_valid), .rsp_ready(f_rsp_ready), .rsp_line(f_rsp_line),
    .ram_req_valid(fr_valid), .ram_req_ready(fr_ready), .ram_req_op(fr_op),
    .ram_req_addr(fr_addr), .ram_req_line(fr_line), .ram_req_be(fr_be),
    .ram_rsp_valid(fd_valid), .ram_rsp_ready(fd_ready), .ram_rsp_line(fd_line)
  );

  logic [REQ_W-1:0] ro_data;
  pipe_fifo #(.WIDTH(REQ_W)) u_request_out (
    .clk, .rst_n,
    .in_valid (fr_valid), .in_ready (fr_ready), .in_data ({fr_op, fr_addr, fr_line, fr_be}),
    .out_valid(ram_req_valid), .out_ready(ram_req_ready), .out_data(ro_data)
  );
  assign {ram_req_op, ram_req_addr, ram_req_line, ram_req_be} = ro_data;

  pipe_fifo #(.WIDTH(LINE_BITS)) u_data_in (
    .clk, .rst_n,
    .in_valid (ram_rsp_valid), .in_ready (ram_rsp_ready), .in_data (ram_rsp_line),
    .out_valid(fd_valid), .out_ready(fd_ready), .out_data(fd_line)
  );

  // ---------------- control ----------------
  function automatic logic [ADDR_BITS-1:0] to_addr(logic [TAG_BITS-1:0] t,
                                                   logic [SLOT_BITS-1:0] s);
    return {t, s, {OFF_BITS{1'b0}}};
  endfunction

  wire hit  = valid_q[exp_slot] && (tag_q[exp_slot] == exp_tag);
  wire miss = in_progress && !hit && !fetch_active;

  assign rq_ready    = !in_progress && !clear_req;
  assign clear_ready = !in_progress;

  assign f_req_valid = miss;
  assign f_req_op    = dirty_q[exp_slot] ? FETCH_DIRTY : FETCH;
  assign f_rd_addr   = to_addr(exp_tag, exp_slot);
  assign f_wr_addr   = to_addr(tag_q[exp_slot], exp_slot);
  assign f_rsp_ready = in_progress && fetch_active;

  wire finish = in_progress && !fetch_active && hit && (!is_read || dq_ready);
  assign dq_valid = finish && is_read;

  // byte enables widened to one enable per bit
  logic [LINE_BITS-1:0] bit_en;
  always_comb begin
    for (int i = 0; i < LINE_BITS; i++) bit_en[i] = wr_be[i/8];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      valid_q         <= '0;
      dirty_q         <= '0;
      in_progress     <= 1'b0;
      fetch_active    <= 1'b0;
      was_miss        <= 1'b0;
      hit_count       <= '0;
      miss_count      <= '0;
      writeback_count <= '0;
    end else begin
      if (clear_req && clear_ready) begin
        valid_q <= '0;
        dirty_q <= '0;
      end
      // 1. accept a user request
      if (rq_valid && rq_ready) begin
        exp_tag     <= rq_addr[ADDR_BITS-1 -: TAG_BITS];
        exp_slot    <= rq_addr[OFF_BITS +: SLOT_BITS];
        is_read     <= (rq_op == RAM_READ);
        wr_line     <= rq_line;
        wr_be       <= rq_be;
        in_progress <= 1'b1;
        was_miss    <= 1'b0;
      end
      // 2. miss: start the fetcher
      if (f_req_valid && f_req_ready) begin
        valid_q[exp_slot] <= 1'b0;
        dirty_q[exp_slot] <= 1'b0;
        tag_q[exp_slot]   <= exp_tag;
        fetch_active      <= 1'b1;
        was_miss          <= 1'b1;
        miss_count        <= miss_count + 1;
        if (dirty_q[exp_slot]) writeback_count <= writeback_count + 1;
      end
      // 3. store the fetched line
      if (f_rsp_valid && f_rsp_ready) begin
        valid_q[exp_slot] <= 1'b1;
        line_q[exp_slot]  <= f_rsp_line;
        fetch_active      <= 1'b0;
      end
      // 4. hit: answer a read or merge a write
      if (finish) begin
        if (!is_read) begin
          line_q[exp_slot]  <= (line_q[exp_slot] & ~bit_en) | (wr_line & bit_en);
          dirty_q[exp_slot] <= 1'b1;
        end
        if (!was_miss) hit_count <= hit_count + 1;
        in_progress <= 1'b0;
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) f_rsp_valid |-> fetch_active);
endmodule
