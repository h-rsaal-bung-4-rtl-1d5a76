// tb_dm_cache: self-checking test of the direct-mapped cache with its fetcher
// against a behavioural memory. A reference model holds the expected contents
// of every line (the memory pattern plus all writes). The test
//   - reads a line twice (miss, then hit) and checks the hit latency,
//   - writes bytes into lines that map to the same slot, forcing write-backs,
//   - runs 600 random reads and byte-masked writes over 4 tags x 4 slots,
//   - clears the cache and checks that a clean line now misses,
// and compares every read line and the hit/miss/write-back counters.
module tb_dm_cache;
  import cache_pkg::*;
  localparam int AB = 32, LB = 512, BB = LB / 8, SLOTS = 128;
  localparam int SLOT_STRIDE = BB, TAG_STRIDE = BB * SLOTS;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic u_req_valid, u_req_ready, u_rsp_valid, u_rsp_ready;
  ram_op_e u_req_op;
  logic [AB-1:0] u_req_addr;
  logic [LB-1:0] u_req_line, u_rsp_line;
  logic [BB-1:0] u_req_be;
  logic m_req_valid, m_req_ready, m_rsp_valid, m_rsp_ready;
  ram_op_e m_req_op;
  logic [AB-1:0] m_req_addr;
  logic [LB-1:0] m_req_line, m_rsp_line;
  logic [BB-1:0] m_req_be;
  logic clear_req, clear_ready;
  logic [31:0] hits, misses, wbs;
  int unsigned mreads, mwrites;

  dm_cache dut (
    .clk, .rst_n,
    .user_req_valid(u_req_valid), .user_req_ready(u_req_ready), .user_req_op(u_req_op),
    .user_req_addr(u_req_addr), .user_req_line(u_req_line), .user_req_be(u_req_be),
    .user_rsp_valid(u_rsp_valid), .user_rsp_ready(u_rsp_ready), .user_rsp_line(u_rsp_line),
    .ram_req_valid(m_req_valid), .ram_req_ready(m_req_ready), .ram_req_op(m_req_op),
    .ram_req_addr(m_req_addr), .ram_req_line(m_req_line), .ram_req_be(m_req_be),
    .ram_rsp_valid(m_rsp_valid), .ram_rsp_ready(m_rsp_ready), .ram_rsp_line(m_rsp_line),
    .clear_req, .clear_ready,
    .hit_count(hits), .miss_count(misses), .writeback_count(wbs)
  );

  line_ram_model #(.LATENCY(7)) mem (
    .clk, .rst_n,
    .req_valid(m_req_valid), .req_ready(m_req_ready), .req_op(m_req_op),
    .req_addr(m_req_addr), .req_line(m_req_line), .req_be(m_req_be),
    .rsp_valid(m_rsp_valid), .rsp_ready(m_rsp_ready), .rsp_line(m_rsp_line),
    .reads(mreads), .writes(mwrites)
  );

  int checks = 0, failures = 0;
  logic [LB-1:0] model [logic [AB-1:0]];

  function automatic logic [LB-1:0] expect_line(logic [AB-1:0] a);
    return model.exists(a) ? model[a] : mem.init_line(a);
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic do_write(input logic [AB-1:0] a, input logic [LB-1:0] d, input logic [BB-1:0] be);
    logic [LB-1:0] l;
    l = expect_line(a);
    for (int b = 0; b < BB; b++) if (be[b]) l[b*8 +: 8] = d[b*8 +: 8];
    model[a] = l;
    @(negedge clk);
    u_req_valid = 1; u_req_op = RAM_WRITE; u_req_addr = a; u_req_line = d; u_req_be = be;
    do @(posedge clk); while (!u_req_ready);
    @(negedge clk) u_req_valid = 0;
  endtask

  // returns the number of cycles from acceptance to response
  task automatic do_read(input logic [AB-1:0] a, output int lat);
    int c;
    @(negedge clk);
    u_req_valid = 1; u_req_op = RAM_READ; u_req_addr = a + ($urandom % BB);
    do @(posedge clk); while (!u_req_ready);
    @(negedge clk) u_req_valid = 0;
    c = 1;
    while (!u_rsp_valid) begin @(negedge clk); c++; end
    lat = c - 1;
    check(u_rsp_line == expect_line(a), $sformatf("read data at %h", a));
    u_rsp_ready = 1;
    @(negedge clk) u_rsp_ready = 0;
  endtask

  initial begin
    int lat, h0, m0;
    u_req_valid = 0; u_rsp_ready = 0; clear_req = 0;
    u_req_op = RAM_READ; u_req_addr = 0; u_req_line = 0; u_req_be = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // miss then hit
    do_read(32'h0000_1040, lat);
    check(misses == 1 && hits == 0, "first read misses");
    do_read(32'h0000_1040, lat);
    check(hits == 1 && misses == 1, "second read hits");
    check(lat == 2, $sformatf("hit latency %0d, expected 2", lat));
    // writes to one slot with different tags: write-backs
    do_write(32'h0000_0080, {16{32'hA5A5_0001}}, 64'h0000_0000_0000_00FF);
    do_write(32'h0000_0080 + TAG_STRIDE, {16{32'h1234_5678}}, '1);
    repeat (40) @(negedge clk);
    check(wbs == 1, "dirty line written back on conflict");
    do_read(32'h0000_0080, lat);
    check(wbs == 2, "second write-back");
    do_read(32'h0000_0080 + TAG_STRIDE, lat);
    // random traffic
    for (int i = 0; i < 600; i++) begin
      logic [AB-1:0] a;
      a = ($urandom % 4) * TAG_STRIDE + ($urandom % 4) * SLOT_STRIDE;
      if ($urandom % 2) do_write(a, {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom,
                                     $urandom, $urandom, $urandom, $urandom, $urandom, $urandom,
                                     $urandom, $urandom, $urandom, $urandom},
                                 {$urandom, $urandom});
      else do_read(a, lat);
    end
    // every line of the random region once more
    for (int t = 0; t < 4; t++)
      for (int s = 0; s < 4; s++) do_read(t * TAG_STRIDE + s * SLOT_STRIDE, lat);
    check(hits + misses == 600 + 16 + 6, $sformatf("hit+miss count %0d", hits + misses));
    check(mwrites == wbs, "memory writes equal write-backs");
    check(mreads == misses, "memory reads equal misses");
    // clear: a clean line that hit before misses afterwards
    do_read(32'h0004_0000, lat);
    do_read(32'h0004_0000, lat);
    h0 = hits; m0 = misses;
    @(negedge clk) clear_req = 1;
    do @(posedge clk); while (!clear_ready);
    @(negedge clk) clear_req = 0;
    do_read(32'h0004_0000, lat);
    check(misses == m0 + 1 && hits == h0, "line misses after clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
