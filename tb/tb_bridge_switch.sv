// tb_bridge_switch: self-checking test of the bridge switch.
// Sends write and read bursts with random addresses; destination models
// accept with random ready. Checks that each burst's command and all its
// words reach the destination the address selects, and read words come
// back from it.
module tb_bridge_switch;
  import rcb_pkg::*;
  logic clk = 0, rst_n = 0;
  logic s_cmd_valid = 0, s_cmd_ready, s_wvalid = 0, s_wready, s_rvalid, s_rready = 1;
  burst_cmd_t s_cmd = '0;
  logic [31:0] s_wdata = '0, s_rdata;
  logic [1:0] d_cmd_valid, d_cmd_ready, d_wvalid, d_wready, d_rvalid, d_rready;
  burst_cmd_t d_cmd;
  logic [31:0] d_wdata;
  logic [1:0][31:0] d_rdata;
  logic busy;
  int checks = 0, failures = 0;
  int wcount [2], rcount [2], ccount [2];

  bridge_switch dut (.*);

  always #5 clk = ~clk;
  initial begin #4000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  // destination models: random ready, read data = {dest, counter}
  always @(negedge clk) begin
    d_cmd_ready = 2'($urandom);
    d_wready    = 2'($urandom);
    d_rvalid    = 2'($urandom);
  end
  always_comb for (int d = 0; d < 2; d++) d_rdata[d] = {8'(d), 24'(rcount[d])};
  always @(posedge clk) for (int d = 0; d < 2; d++) begin
    if (d_cmd_valid[d] && d_cmd_ready[d]) ccount[d]++;
    if (d_wvalid[d] && d_wready[d]) wcount[d]++;
    if (d_rvalid[d] && d_rready[d]) rcount[d]++;
  end

  task automatic chk(input logic [31:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("%s: got %h exp %h", what, got, exp); end
  endtask

  initial begin
    for (int d = 0; d < 2; d++) begin wcount[d] = 0; rcount[d] = 0; ccount[d] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 100; t++) begin
      int dst, n, w0, r0, c0;
      @(negedge clk);
      s_cmd.addr  = {4'($urandom % 3), 28'($urandom)};
      s_cmd.write = 1'($urandom);
      s_cmd.len   = 8'($urandom % 20);
      dst = (s_cmd.addr[31:28] == 4'h0) ? 0 : 1;
      n = int'(s_cmd.len) + 1;
      w0 = wcount[dst]; r0 = rcount[dst]; c0 = ccount[dst];
      s_cmd_valid = 1;
      do @(posedge clk); while (!s_cmd_ready);
      @(negedge clk); s_cmd_valid = 0;
      for (int i = 0; i < n; i++) begin
        if (s_cmd.write) begin
          s_wvalid = 1; s_wdata = 32'(i);
          do @(posedge clk); while (!s_wready);
          @(negedge clk); s_wvalid = 0;
        end else begin
          s_rready = 1;
          do @(posedge clk); while (!s_rvalid);
          chk(32'(s_rdata[31:24]), 32'(dst), "read word source");
          @(negedge clk);
        end
      end
      @(negedge clk);
      chk(32'(busy), 0, "idle after burst");
      chk(32'(ccount[dst] - c0), 1, "command to destination");
      if (s_cmd.write) chk(32'(wcount[dst] - w0), 32'(n), "write words to destination");
      else             chk(32'(rcount[dst] - r0), 32'(n), "read words from destination");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
