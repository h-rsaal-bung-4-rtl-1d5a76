// tb_line_fetcher: self-checking test of the line fetcher against a
// behavioural memory. It runs FETCH, FETCH_DIRTY and JUST_WRITE requests with
// random addresses and lines, and checks the returned line, the data left in
// memory, the number of memory reads and writes, that JUST_WRITE returns no
// line, and the cycle count of a FETCH with a 1-cycle memory.
module tb_line_fetcher;
  import cache_pkg::*;
  localparam int AB = 32, LB = 512, BB = LB / 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic req_valid, req_ready, rsp_valid, rsp_ready;
  fetch_op_e req_op;
  logic [AB-1:0] rd_addr, wr_addr;
  logic [LB-1:0] req_line, rsp_line;
  logic [BB-1:0] req_be;
  logic m_req_valid, m_req_ready, m_rsp_valid, m_rsp_ready;
  ram_op_e m_req_op;
  logic [AB-1:0] m_req_addr;
  logic [LB-1:0] m_req_line, m_rsp_line;
  logic [BB-1:0] m_req_be;
  int unsigned mreads, mwrites;

  line_fetcher dut (
    .clk, .rst_n, .req_valid, .req_ready, .req_op, .req_rd_addr(rd_addr), .req_wr_addr(wr_addr),
    .req_line, .req_be, .rsp_valid, .rsp_ready, .rsp_line,
    .ram_req_valid(m_req_valid), .ram_req_ready(m_req_ready), .ram_req_op(m_req_op),
    .ram_req_addr(m_req_addr), .ram_req_line(m_req_line), .ram_req_be(m_req_be),
    .ram_rsp_valid(m_rsp_valid), .ram_rsp_ready(m_rsp_ready), .ram_rsp_line(m_rsp_line)
  );
  line_ram_model #(.LATENCY(1)) mem (
    .clk, .rst_n, .req_valid(m_req_valid), .req_ready(m_req_ready), .req_op(m_req_op),
    .req_addr(m_req_addr), .req_line(m_req_line), .req_be(m_req_be),
    .rsp_valid(m_rsp_valid), .rsp_ready(m_rsp_ready), .rsp_line(m_rsp_line),
    .reads(mreads), .writes(mwrites)
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [LB-1:0] rnd_line();
    logic [LB-1:0] l;
    for (int i = 0; i < LB / 32; i++) l[i*32 +: 32] = $urandom;
    return l;
  endfunction

  // issue one request; returns cycles from acceptance until the line is offered
  task automatic run(input fetch_op_e op, input logic [AB-1:0] ra, input logic [AB-1:0] wa,
                     input logic [LB-1:0] l, input logic [BB-1:0] be, output int cyc);
    @(negedge clk);
    req_valid = 1; req_op = op; rd_addr = ra; wr_addr = wa; req_line = l; req_be = be;
    do @(posedge clk); while (!req_ready);
    @(negedge clk) req_valid = 0;
    cyc = 0;
    if (op == JUST_WRITE) begin
      repeat (10) @(negedge clk);
      check(!rsp_valid, "JUST_WRITE returns no line");
    end else begin
      while (!rsp_valid) begin @(negedge clk); cyc++; end
      rsp_ready = 1;
      @(negedge clk) rsp_ready = 0;
    end
  endtask

  initial begin
    int cyc;
    logic [LB-1:0] l, exp_l;
    logic [BB-1:0] be;
    logic [AB-1:0] ra, wa;
    req_valid = 0; rsp_ready = 0; req_op = FETCH; rd_addr = 0; wr_addr = 0; req_line = 0; req_be = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // plain fetch
    run(FETCH, 32'h0000_4000, 32'h0, '0, '0, cyc);
    check(rsp_line == mem.init_line(32'h0000_4000), "FETCH data");
    check(mreads == 1 && mwrites == 0, "FETCH makes one read");
    check(cyc == 2, $sformatf("FETCH takes %0d cycles, expected 2", cyc));
    for (int i = 0; i < 40; i++) begin
      int r, w;
      r = mreads; w = mwrites;
      ra = {$urandom % 64, 6'b0}; wa = {($urandom % 64) + 64, 6'b0};
      l = rnd_line(); be = {$urandom, $urandom};
      case (i % 3)
        0: begin
          exp_l = mem.peek(ra);
          run(FETCH, ra, wa, l, be, cyc);
          check(rsp_line == exp_l && mreads == r + 1 && mwrites == w, "FETCH");
        end
        1: begin
          run(FETCH_DIRTY, ra, wa, l, be, cyc);
          check(mem.peek(wa) == l, "FETCH_DIRTY writes the whole line back");
          check(rsp_line == mem.peek(ra) && mreads == r + 1 && mwrites == w + 1, "FETCH_DIRTY read");
        end
        default: begin
          exp_l = mem.peek(wa);
          for (int b = 0; b < BB; b++) if (be[b]) exp_l[b*8 +: 8] = l[b*8 +: 8];
          run(JUST_WRITE, ra, wa, l, be, cyc);
          check(mem.peek(wa) == exp_l && mreads == r && mwrites == w + 1, "JUST_WRITE");
        end
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
