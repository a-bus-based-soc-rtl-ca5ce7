// tb_npi_module: self-checking test of the NPI module with a memory model.
// Writes bursts of random length and data, reads them back, checks the
// data and the number of NPI transfers (bursts cut at 32 words), and
// checks that a 256-word burst moves at close to one word per cycle
// (the 400 MB/s of a 32-bit port at 100 MHz).
module tb_npi_module;
  import rcb_pkg::*;
  logic clk = 0, rst_n = 0;
  logic cmd_valid = 0, cmd_ready, wvalid = 0, wready, rvalid, rready = 1, busy;
  burst_cmd_t cmd = '0;
  logic [31:0] wdata = '0, rdata;
  logic npi_addr_req, npi_addr_ack, npi_rnw, npi_wr_push, npi_wr_full, npi_rd_pop, npi_rd_empty;
  logic [31:0] npi_addr, npi_wr_data, npi_rd_data;
  logic [7:0] npi_size;
  int checks = 0, failures = 0;
  logic [31:0] ref_mem [int];

  npi_module dut (.*);
  npi_mem_model #(.WORDS(1 << 16), .LAT(8)) u_mem (.*);

  always #5 clk = ~clk;
  initial begin #20000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic chk(input logic [31:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("%s: got %h exp %h", what, got, exp); end
  endtask

  task automatic burst(input logic wr, input logic [31:0] a, input int n, output int cycles);
    int t0 = $time;
    @(negedge clk);
    cmd.write = wr; cmd.addr = a; cmd.len = 8'(n - 1); cmd_valid = 1;
    @(posedge clk); @(negedge clk); cmd_valid = 0;
    wvalid = wr; rready = !wr;
    for (int i = 0; i < n; ) begin
      wdata = a ^ 32'(i * 7919);
      @(posedge clk);
      if (wr && wready) begin ref_mem[int'(a >> 2) + i] = wdata; i++; end
      if (!wr && rvalid) begin chk(rdata, ref_mem[int'(a >> 2) + i], "read data"); i++; end
      @(negedge clk);
    end
    wvalid = 0;
    while (busy) @(negedge clk);
    cycles = ($time - t0) / 10;
  endtask

  initial begin
    int cyc, req0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 30; t++) begin
      automatic int n = 1 + $urandom % 100;
      automatic logic [31:0] a = 32'(($urandom % 4096) * 4);
      req0 = u_mem.requests;
      burst(1, a, n, cyc);
      chk(32'(u_mem.requests - req0), 32'((n + 31) / 32), "NPI transfers per write burst");
      burst(0, a, n, cyc);
    end
    chk(32'(u_mem.errors), 0, "write FIFO filled before each write request");
    burst(1, 32'h8000, 256, cyc);
    $display("256-word write burst: %0d cycles", cyc);
    checks++; if (cyc > 300) begin failures++; $display("write burst too slow"); end
    burst(0, 32'h8000, 256, cyc);
    $display("256-word read burst: %0d cycles", cyc);
    checks++; if (cyc > 400) begin failures++; $display("read burst too slow"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
