// tb_cache_bench: the cache benchmark workloads. For 128, 256, 512, 1024 and
// 16384 32-bit words, each with 1, 8, 16 and 32 words skipped between
// accesses (a stride of skip words), it runs three patterns on a freshly
// cleared cache: only writes, only reads, and writes followed by reads of the
// same words. Every access is one 32-bit word: a write sets the 4 byte enables
// of that word, a read takes the word out of the returned line. It checks the
// read data against a reference model, checks the number of misses against a
// separate direct-mapped tag model, and prints the cycles per operation of
// each case. The memory answers after 20 cycles.
module tb_cache_bench;
  import cache_pkg::*;
  localparam int LB = 512, BB = 64, SLOTS = 128, LAT = 20;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic u_req_valid, u_req_ready, u_rsp_valid, u_rsp_ready;
  ram_op_e u_req_op, m_req_op;
  logic [31:0] u_req_addr, m_req_addr;
  logic [LB-1:0] u_req_line, u_rsp_line, m_req_line, m_rsp_line;
  logic [BB-1:0] u_req_be, m_req_be;
  logic m_req_valid, m_req_ready, m_rsp_valid, m_rsp_ready, clear_req, clear_ready;
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
    .clear_req, .clear_ready, .hit_count(hits), .miss_count(misses), .writeback_count(wbs)
  );
  line_ram_model #(.LATENCY(LAT)) mem (
    .clk, .rst_n, .req_valid(m_req_valid), .req_ready(m_req_ready), .req_op(m_req_op),
    .req_addr(m_req_addr), .req_line(m_req_line), .req_be(m_req_be),
    .rsp_valid(m_rsp_valid), .rsp_ready(m_rsp_ready), .rsp_line(m_rsp_line),
    .reads(mreads), .writes(mwrites)
  );

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle++;

  logic [31:0] words [logic [31:0]];   // reference: word contents
  // separate direct-mapped tag model for the expected miss count
  logic [31:0] tag_m [SLOTS];
  bit          val_m [SLOTS];
  int          exp_misses;

  function automatic void touch(logic [31:0] a);
    int s;
    logic [31:0] t;
    s = (a / BB) % SLOTS;
    t = a / (BB * SLOTS);
    if (!val_m[s] || tag_m[s] != t) begin exp_misses++; val_m[s] = 1; tag_m[s] = t; end
  endfunction

  function automatic logic [31:0] word_expect(logic [31:0] a);
    logic [LB-1:0] l;
    if (words.exists(a)) return words[a];
    l = mem.peek((a / BB) * BB);
    return l[(a % BB) * 8 +: 32];
  endfunction

  task automatic wr(input logic [31:0] a, input logic [31:0] d);
    touch(a);
    words[a] = d;
    @(negedge clk);
    u_req_valid = 1; u_req_op = RAM_WRITE; u_req_addr = a;
    u_req_line = '0; u_req_line[(a % BB) * 8 +: 32] = d;
    u_req_be = '0;   u_req_be[a % BB +: 4] = 4'hF;
    do @(posedge clk); while (!u_req_ready);
    @(negedge clk) u_req_valid = 0;
  endtask

  task automatic rd(input logic [31:0] a);
    touch(a);
    @(negedge clk);
    u_req_valid = 1; u_req_op = RAM_READ; u_req_addr = a;
    do @(posedge clk); while (!u_req_ready);
    @(negedge clk) u_req_valid = 0;
    while (!u_rsp_valid) @(negedge clk);
    checks++;
    if (u_rsp_line[(a % BB) * 8 +: 32] != word_expect(a)) begin
      failures++; $display("FAIL read %h", a);
    end
    u_rsp_ready = 1;
    @(negedge clk) u_rsp_ready = 0;
  endtask

  task automatic clear_all();
    @(negedge clk) clear_req = 1;
    do @(posedge clk); while (!clear_ready);
    @(negedge clk) clear_req = 0;
    for (int s = 0; s < SLOTS; s++) val_m[s] = 0;
    // a clear drops dirty lines: the reference forgets unwritten-back words
    words.delete();
  endtask

  int sizes [5] = '{128, 256, 512, 1024, 16384};
  int skips [4] = '{1, 8, 16, 32};

  initial begin
    u_req_valid = 0; u_rsp_ready = 0; clear_req = 0; u_req_op = RAM_READ;
    u_req_addr = 0; u_req_line = 0; u_req_be = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    foreach (sizes[si]) foreach (skips[ki]) for (int pat = 0; pat < 3; pat++) begin
      int n, k, m0, ops;
      longint c0;
      logic [31:0] base;
      n = sizes[si]; k = skips[ki];
      base = 32'h0100_0000 * (1 + si) + 32'h0010_0000 * ki + 32'h0004_0000 * pat;
      // make the memory hold what the reference expects, then start cold
      clear_all();
      exp_misses = 0;
      m0 = misses;
      c0 = cycle;
      ops = 0;
      if (pat != 1) for (int i = 0; i < n; i++) begin wr(base + i * k * 4, $urandom); ops++; end
      if (pat != 0) for (int i = 0; i < n; i++) begin rd(base + i * k * 4); ops++; end
      // drain: the posted writes still queued in the cache's input buffer must
      // be finished before counting
      do @(negedge clk); while (!clear_ready || dut.rq_valid);
      checks++;
      if (misses - m0 != exp_misses) begin
        failures++;
        $display("FAIL %0d words skip %0d pattern %0d: %0d misses, expected %0d",
                 n, k, pat, misses - m0, exp_misses);
      end
      $display("words %5d skip %2d %-10s: %6.2f cycles per operation, %0d misses",
               n, k, pat == 0 ? "write" : pat == 1 ? "read" : "write+read",
               real'(cycle - c0) / ops, misses - m0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
