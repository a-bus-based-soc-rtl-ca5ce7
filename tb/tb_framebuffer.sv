// tb_framebuffer: self-checking test of the frame buffer master module.
// A small frame format (24x8) keeps the run short. The ReCoBus side is the
// behavioural host model with random wait cycles. Three frames are
// streamed; checks that each lands word-exact in the alternating buffers,
// that the status reports the last complete buffer and frame count, and
// that no pixel was dropped.
module tb_framebuffer;
  import rcb_pkg::*;
  localparam int FW = 24, FH = 8;
  logic clk = 0, rst_n = 0;
  logic sel, req;
  rcb_op_e op;
  logic [7:0] off;
  logic [47:0] din, dout;
  video_t vin = '0;
  logic acc_req = 0, acc_we = 0, acc_ack;
  logic [7:0] acc_off = '0;
  logic [31:0] acc_wdata = '0, acc_rdata;
  int checks = 0, failures = 0;
  localparam logic [31:0] B0 = 32'h0000_4000, B1 = 32'h0000_8000;

  framebuffer #(.FW(FW), .FH(FH)) dut (.clk, .rst_n, .sel, .op, .off, .din, .dout, .req, .video_in(vin));
  tb_rcb_host #(.W(6), .WORDS(1 << 14)) host (.*);

  always #5 clk = ~clk;
  initial begin #4000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic acc(logic we, int o, logic [31:0] d, output logic [31:0] q);
    @(negedge clk); acc_req = 1; acc_we = we; acc_off = 8'(o); acc_wdata = d;
    do @(posedge clk); while (!acc_ack);
    q = acc_rdata;
    @(negedge clk); acc_req = 0;
  endtask

  function automatic logic [31:0] pix(int f, int i);
    return {8'(f * 3 + i), 24'(i * 40503 + f * 977)};
  endfunction

  initial begin
    logic [31:0] q;
    repeat (2) @(posedge clk);
    rst_n = 1;
    acc(1, 0, B0, q); acc(1, 1, B1, q); acc(1, 2, 1, q);
    for (int f = 0; f < 3; f++) begin
      for (int i = 0; i < FW * FH; i++) begin
        @(negedge clk);
        vin = '0; vin.valid = 1; vin.sof = (i == 0); vin.eol = (i % FW == FW - 1);
        {vin.cls, vin.rgb} = pix(f, i);
        @(negedge clk); vin = '0;
      end
      repeat (100) @(negedge clk);
      acc(0, 3, 0, q);
      checks += 3;
      if (q[0] !== 1'(f % 2)) begin failures++; $display("frame %0d: last buffer %0d", f, q[0]); end
      if (q[15:1] !== 15'(f + 1)) begin failures++; $display("frame count %0d", q[15:1]); end
      if (q[31:16] !== 16'd0) begin failures++; $display("overflows %0d", q[31:16]); end
      for (int i = 0; i < FW * FH; i++) begin
        automatic logic [31:0] a = ((f % 2) ? B1 : B0) / 4 + i;
        checks++;
        if (host.mem[a] !== pix(f, i)) begin failures++; if (failures < 5) $display("frame %0d pixel %0d: %h", f, i, host.mem[a]); end
      end
    end
    checks++; if (host.waits == 0) begin failures++; $display("no wait cycle exercised"); end
    $display("bursts %0d, beats %0d, waits %0d", host.bursts, host.beats, host.waits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
