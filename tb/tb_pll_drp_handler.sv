// tb_pll_drp_handler: self-checking test of the PLL register sequencer. It
// starts it with the document's register set and with random sets, stalls the
// register port at random, and checks the order, addresses, data and write
// flag of all ten requests, that a start is refused while busy, and that the
// sequence takes exactly ten cycles on an always-ready port.
module tb_pll_drp_handler;
  import hdmi_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start_valid, start_ready, csr_valid, csr_ready, csr_rnw, busy, done;
  logic [4:0] csr_addr;
  logic [31:0] csr_data;
  pll_regs_t regs_in;

  pll_drp_handler dut (.clk, .rst_n, .start_valid, .start_ready, .regs_in,
                       .csr_valid, .csr_ready, .csr_rnw, .csr_addr, .csr_data, .busy, .done);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [15:0] expv [10];
  int n_seen;
  always @(posedge clk) if (rst_n && csr_valid && csr_ready) begin
    check(csr_rnw == 1'b0, "write request");
    check(csr_addr == 5'h11 + 5'(n_seen), $sformatf("address %h at step %0d", csr_addr, n_seen));
    check(csr_data == {16'd0, expv[n_seen % 10]}, $sformatf("data %0d at step %0d", csr_data, n_seen));
    n_seen++;
  end

  task automatic run(input pll_regs_t r, input bit stall, output int cyc);
    expv = '{r.clk_fb1, r.clk_fb2, r.clk_div, r.clk_out1, r.clk_out2, r.lock1, r.lock2,
             r.lock3, r.filter1, r.filter2};
    n_seen = 0;
    @(negedge clk);
    start_valid = 1; regs_in = r;
    do @(posedge clk); while (!start_ready);
    @(negedge clk) start_valid = 0;
    // a second start while busy is not taken
    check(!start_ready, "start refused while busy");
    cyc = 1;
    while (!done) begin
      if (stall) csr_ready = ($urandom % 2);
      @(negedge clk);
      cyc++;
    end
    csr_ready = 1;
    check(n_seen == 10, $sformatf("%0d register writes", n_seen));
  endtask

  initial begin
    int cyc;
    start_valid = 0; csr_ready = 1; regs_in = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(PLL_SET_DOC, 0, cyc);
    check(cyc == 11, $sformatf("sequence took %0d cycles", cyc));
    for (int i = 0; i < 20; i++) begin
      pll_regs_t r;
      r = {$urandom, $urandom, $urandom, $urandom, $urandom};
      run(r, 1, cyc);
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
