// tb_npi_throughput: transfer rate of the NPI path over the transfer
// length, for the lengths of the original speed comparison (5, 10, 50, 100,
// 200, 500 and 1000 bytes).
//
// The NPI module is driven as the bridge switch drives it: one burst
// command, then the data words with valid/ready. The memory behind it is
// the NPI memory model with 8 cycles of latency (this testbench's choice).
// For each length a write burst and a read burst of ceil(bytes/4) words
// are timed from the command to the module going idle. The rate in MB/s
// is bytes * 100 / cycles at 100 MHz. Checked: read data equal to the
// written data; the rate rising with the length; and, for 1000 bytes, a
// write rate of at least 300 MB/s and a read rate of at least 250 MB/s.
// The original reports that long NPI transfers come near the 400 MB/s of
// a 32-bit port at 100 MHz; the two bounds are this testbench's reading of
// "near".
module tb_npi_throughput;
  import rcb_pkg::*;
  localparam int NL = 7;
  localparam int LEN_B [NL] = '{5, 10, 50, 100, 200, 500, 1000};
  logic clk = 0, rst_n = 0;
  logic cmd_valid = 0, cmd_ready, wvalid = 0, wready, rvalid, rready = 1, busy;
  burst_cmd_t cmd = '0;
  logic [31:0] wdata = '0, rdata;
  logic npi_addr_req, npi_addr_ack, npi_rnw, npi_wr_push, npi_wr_full, npi_rd_pop, npi_rd_empty;
  logic [31:0] npi_addr, npi_wr_data, npi_rd_data;
  logic [7:0] npi_size;
  int checks = 0, failures = 0;

  npi_module dut (.*);
  npi_mem_model #(.WORDS(1 << 16), .LAT(8)) u_mem (.*);

  always #5 clk = ~clk;
  initial begin #20000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  // one burst of n words at byte address a; returns the cycles it took
  task automatic burst(input logic wr, input logic [31:0] a, input int n, output int cycles);
    int t0;
    @(negedge clk);
    t0 = $time;
    cmd.write = wr; cmd.addr = a; cmd.len = 8'(n - 1); cmd_valid = 1;
    do @(posedge clk); while (!cmd_ready);
    @(negedge clk); cmd_valid = 0;
    wvalid = wr; rready = !wr;
    for (int i = 0; i < n; ) begin
      wdata = a ^ 32'(i * 40503);
      @(posedge clk);
      if (wr && wready) i++;
      if (!wr && rvalid) begin
        checks++;
        if (rdata !== (a ^ 32'(i * 40503))) begin failures++; $display("read word %0d of %0d", i, n); end
        i++;
      end
      @(negedge clk);
    end
    wvalid = 0;
    while (busy) @(negedge clk);
    cycles = ($time - t0) / 10;
  endtask

  initial begin
    int n, cw, cr, rw, rr, last_w = 0, last_r = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int l = 0; l < NL; l++) begin
      n = (LEN_B[l] + 3) / 4;
      burst(1, 32'h0001_0000, n, cw);
      burst(0, 32'h0001_0000, n, cr);
      rw = LEN_B[l] * 100 / cw;
      rr = LEN_B[l] * 100 / cr;
      $display("%4d B (%3d words): write %4d cycles %3d MB/s, read %4d cycles %3d MB/s",
               LEN_B[l], n, cw, rw, cr, rr);
      checks += 2;
      if (rw < last_w) begin failures++; $display("write rate fell at %0d B", LEN_B[l]); end
      if (rr < last_r) begin failures++; $display("read rate fell at %0d B", LEN_B[l]); end
      last_w = rw; last_r = rr;
    end
    checks += 2;
    if (last_w < 300) begin failures++; $display("1000 B write rate below 300 MB/s"); end
    if (last_r < 250) begin failures++; $display("1000 B read rate below 250 MB/s"); end
    checks++; if (u_mem.errors != 0) begin failures++; $display("memory protocol errors"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
