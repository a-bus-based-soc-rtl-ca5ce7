// tb_request_switch: self-checking test of the request switch.
// Programs random interrupt and bus request masks and checks the
// separated outputs, the pending latch and its write-one-to-clear.
module tb_request_switch;
  logic clk = 0, rst_n = 0, irq_mask_we = 0, req_mask_we = 0, irq_clr_we = 0, irq;
  logic [15:0] mask_wdata = '0, requests = '0, bus_req, irq_pending, irq_mask, req_mask;
  logic [15:0] im, rm, pend;
  int checks = 0, failures = 0;

  request_switch dut (.*);

  always #5 clk = ~clk;
  initial begin #400000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic chk(input logic [31:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("%s: got %h exp %h", what, got, exp); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    pend = '0;
    for (int r = 0; r < 10; r++) begin
      @(negedge clk);
      im = 16'($urandom); rm = 16'($urandom) & ~im;
      mask_wdata = im; irq_mask_we = 1;
      @(negedge clk); irq_mask_we = 0; mask_wdata = rm; req_mask_we = 1;
      @(negedge clk); req_mask_we = 0;
      // pending from the previous round, then clear all
      mask_wdata = 16'hFFFF; irq_clr_we = 1; requests = '0;
      @(negedge clk); irq_clr_we = 0;
      chk(32'(irq_pending), 32'h0, "pending after clear");
      pend = '0;
      for (int t = 0; t < 30; t++) begin
        requests = 16'($urandom);
        #1;
        chk(32'(bus_req), 32'(requests & rm), "bus requests");
        @(negedge clk);
        pend |= requests & im;
        chk(32'(irq_pending), 32'(pend), "pending");
        chk(32'(irq), 32'(|pend), "irq");
      end
      chk(32'(irq_mask), 32'(im), "irq mask readback");
      chk(32'(req_mask), 32'(rm), "req mask readback");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
