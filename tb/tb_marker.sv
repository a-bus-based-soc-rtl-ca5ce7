// tb_marker: self-checking test of the marker module.
// Programs position, colour and size over the ReCoBus, streams two small
// frames with random pixels and checks every output pixel against the
// expected square, including after the position moves.
module tb_marker;
  import rcb_pkg::*;
  localparam int FW = 40, FH = 30;
  logic clk = 0, rst_n = 0, sel = 0;
  rcb_op_e op = RCB_IDLE;
  logic [7:0] off = '0;
  logic [31:0] din = '0, dout;
  video_t vin = '0, vout;
  int checks = 0, failures = 0, hits = 0;

  marker dut (.clk, .rst_n, .sel, .op, .off, .din, .dout, .video_in(vin), .video_out(vout));

  always #5 clk = ~clk;
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic wr(int o, logic [31:0] d);
    @(negedge clk); sel = 1; op = RCB_WRITE; off = 8'(o); din = d;
    @(negedge clk); sel = 0; op = RCB_IDLE;
  endtask

  task automatic frame(int px, int py, int h, logic [23:0] col);
    for (int y = 0; y < FH; y++)
      for (int x = 0; x < FW; x++) begin
        video_t v;
        logic exp_hit;
        @(negedge clk);
        v = '0; v.valid = 1; v.sof = (x == 0 && y == 0); v.eol = (x == FW - 1);
        v.rgb = 24'($urandom); v.cls = 8'($urandom);
        vin = v;
        exp_hit = (x >= px - h && x <= px + h && y >= py - h && y <= py + h);
        @(negedge clk);
        vin = '0;          // idle cycle between pixels
        checks++;
        if (vout.rgb !== (exp_hit ? col : v.rgb) || vout.cls !== v.cls) begin
          failures++; $display("pixel (%0d,%0d) wrong", x, y);
        end
        if (exp_hit) hits++;
      end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    wr(0, {16'd10, 16'd7});
    wr(1, 32'h00FF00);
    wr(2, {16'd0, 8'd3, 8'd1});
    @(negedge clk); sel = 1; op = RCB_READ; off = 0; #1;
    checks++; if (dout !== {16'd10, 16'd7}) begin failures++; $display("readback"); end
    @(negedge clk); sel = 0; op = RCB_IDLE;
    frame(7, 10, 3, 24'h00FF00);
    wr(0, {16'd29, 16'd1});          // near the corner: clipped square
    frame(1, 29, 3, 24'h00FF00);
    checks++; if (hits == 0) begin failures++; $display("marker never drawn"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
