// line_ram_model: behavioural model of the memory above the cache, for
// simulation only. It serves whole-line reads and byte-enabled line writes, one
// request at a time: a request is accepted when the model is idle, a read is
// answered LATENCY cycles later, a write takes LATENCY cycles before the next
// request is accepted. Lines never written read as a pattern derived from
// their address (init_line), so a checker can predict them.
module line_ram_model
  import cache_pkg::*;
#(
  parameter int unsigned ADDR_BITS = 32,
  parameter int unsigned LINE_BITS = 512,
  parameter int unsigned LATENCY   = 10,
  localparam int unsigned BE_BITS  = LINE_BITS / 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 req_valid,
  output logic                 req_ready,
  input  ram_op_e              req_op,
  input  logic [ADDR_BITS-1:0] req_addr,
  input  logic [LINE_BITS-1:0] req_line,
  input  logic [BE_BITS-1:0]   req_be,
  output logic                 rsp_valid,
  input  logic                 rsp_ready,
  output logic [LINE_BITS-1:0] rsp_line,
  output int unsigned          reads,
  output int unsigned          writes
);
  localparam int unsigned OFF = $clog2(BE_BITS);
  logic [LINE_BITS-1:0] mem [logic [ADDR_BITS-1:0]];
  int unsigned wait_cnt;
  logic        busy, pending_read;
  logic [ADDR_BITS-1:0] cur_addr;

  function automatic logic [LINE_BITS-1:0] init_line(logic [ADDR_BITS-1:0] a);
    logic [LINE_BITS-1:0] l;
    for (int w = 0; w < LINE_BITS / 32; w++) l[w*32 +: 32] = a * 32'h9E3779B1 + w;
    return l;
  endfunction

  function automatic logic [LINE_BITS-1:0] peek(logic [ADDR_BITS-1:0] a);
    logic [ADDR_BITS-1:0] k = (a >> OFF) << OFF;
    return mem.exists(k) ? mem[k] : init_line(k);
  endfunction

  assign req_ready = !busy;
  assign rsp_valid = busy && pending_read && wait_cnt == 0;
  assign rsp_line  = peek(cur_addr);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy <= 0; pending_read <= 0; wait_cnt <= 0; reads <= 0; writes <= 0;
    end else if (!busy) begin
      if (req_valid) begin
        logic [ADDR_BITS-1:0] k;
        k = (req_addr >> OFF) << OFF;
        busy     <= 1;
        cur_addr <= k;
        wait_cnt <= LATENCY - 1;
        pending_read <= (req_op == RAM_READ);
        if (req_op == RAM_WRITE) begin
          logic [LINE_BITS-1:0] l;
          l = peek(k);
          for (int b = 0; b < BE_BITS; b++) if (req_be[b]) l[b*8 +: 8] = req_line[b*8 +: 8];
          mem[k] = l;
          writes <= writes + 1;
        end else reads <= reads + 1;
      end
    end else if (wait_cnt != 0) begin
      wait_cnt <= wait_cnt - 1;
    end else if (!pending_read || rsp_ready) begin
      busy <= 0;
    end
  end
endmodule
