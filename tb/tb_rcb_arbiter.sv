// tb_rcb_arbiter: self-checking test of the bridge arbiter.
// Checks round-robin order among masters against a reference pointer,
// immediate PLB grants, stalling of a running master by a PLB request,
// and resumption after it.
module tb_rcb_arbiter;
  logic clk = 0, rst_n = 0, plb_req = 0, plb_done = 0, m_done = 0;
  logic [15:0] m_req = '0;
  logic plb_gnt, m_gnt, m_stall;
  logic [3:0] m_idx;
  int checks = 0, failures = 0, stalls = 0, grants = 0;

  rcb_arbiter dut (.*);

  always #5 clk = ~clk;
  initial begin #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic chk(input logic [31:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("%s: got %0d exp %0d", what, got, exp); end
  endtask

  initial begin
    int last = 15;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      int exp_idx;
      logic [15:0] r;
      r = 16'($urandom);
      if (r == 0) r = 16'h0001;
      @(negedge clk); m_req = r;
      // reference: first requester after last
      exp_idx = -1;
      for (int k = 1; k <= 16 && exp_idx < 0; k++)
        if (r[(last + k) % 16]) exp_idx = (last + k) % 16;
      @(negedge clk);
      chk(32'(m_gnt), 1, "master granted");
      chk(32'(m_idx), 32'(exp_idx), "round robin index");
      last = exp_idx; grants++;
      m_req = '0;
      // sometimes a PLB access arrives while the master owns the bus
      if (t % 3 == 0) begin
        plb_req = 1;
        @(negedge clk);
        chk(32'(plb_gnt), 1, "PLB granted during master transfer");
        chk(32'(m_stall), 1, "master stalled");
        if (m_stall) stalls++;
        plb_done = 1;
        @(negedge clk); plb_done = 0; plb_req = 0;
        chk(32'(plb_gnt), 0, "PLB released");
        chk(32'(m_stall), 0, "master resumes");
        chk(32'(m_gnt), 1, "master keeps grant");
      end
      m_done = 1;
      @(negedge clk); m_done = 0;
      chk(32'(m_gnt), 0, "master released");
    end
    // PLB priority over a waiting master on a free bus
    @(negedge clk); m_req = 16'h0100; plb_req = 1;
    @(negedge clk);
    chk(32'(plb_gnt), 1, "PLB first"); chk(32'(m_gnt), 0, "master waits");
    plb_done = 1; @(negedge clk); plb_done = 0; plb_req = 0;
    @(negedge clk);
    chk(32'(m_gnt), 1, "master after PLB");
    chk(32'(stalls > 0), 1, "stall seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
