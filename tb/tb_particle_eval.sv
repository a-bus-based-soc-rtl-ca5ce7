// tb_particle_eval: self-checking test of the particle evaluation
// co-processor on a small 40x30 image (parameters override the frame size).
// The host model holds a random classified image and a particle set with
// positions inside and at the borders of the image; after a run the weight
// of each particle must equal the number of skin pixels in its clipped 9x9
// region, counted here. Also checks done flag, interrupt, a second run with
// 150 particles (two load bursts) and the cycle counter.
module tb_particle_eval;
  import rcb_pkg::*;
  localparam int FW = 40, FH = 30;
  localparam logic [31:0] PB = 32'h0000_1000, IB = 32'h0000_8000;
  logic clk = 0, rst_n = 0;
  logic sel, req, irq;
  rcb_op_e op;
  logic [7:0] off;
  logic [55:0] din, dout;
  logic acc_req = 0, acc_we = 0, acc_ack;
  logic [7:0] acc_off = '0;
  logic [31:0] acc_wdata = '0, acc_rdata;
  int checks = 0, failures = 0;

  particle_eval #(.FW(FW), .FH(FH)) dut (.clk, .rst_n, .sel, .op, .off, .din, .dout, .req, .irq);
  tb_rcb_host #(.W(7), .WORDS(1 << 14)) host (.*);

  always #5 clk = ~clk;
  initial begin #20000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic acc(logic we, int o, logic [31:0] d, output logic [31:0] q);
    @(negedge clk); acc_req = 1; acc_we = we; acc_off = 8'(o); acc_wdata = d;
    do @(posedge clk); while (!acc_ack);
    q = acc_rdata;
    @(negedge clk); acc_req = 0;
  endtask

  function automatic int ref_weight(int px, int py);
    int n = 0;
    for (int y = py - 4; y <= py + 4; y++)
      for (int x = px - 4; x <= px + 4; x++)
        if (x >= 0 && x < FW && y >= 0 && y < FH && host.mem[IB / 4 + y * FW + x][24]) n++;
    return n;
  endfunction

  task automatic run(int np);
    logic [31:0] q;
    int px [], py [];
    px = new[np]; py = new[np];
    for (int i = 0; i < np; i++) begin
      px[i] = $urandom % FW; py[i] = $urandom % FH;
      if (i == 0) begin px[i] = 0; py[i] = 0; end
      if (i == 1) begin px[i] = FW - 1; py[i] = FH - 2; end
      host.mem[PB / 4 + 2 * i]     = {16'(py[i]), 16'(px[i])};
      host.mem[PB / 4 + 2 * i + 1] = 32'hDEAD_BEEF;
    end
    acc(1, 0, PB, q); acc(1, 1, np, q); acc(1, 2, IB, q); acc(1, 3, 1, q);
    while (!irq) @(negedge clk);
    acc(0, 3, 0, q);
    checks++; if (q[1:0] !== 2'b01) begin failures++; $display("status %b", q[1:0]); end
    for (int i = 0; i < np; i++) begin
      checks++;
      if (host.mem[PB / 4 + 2 * i + 1] !== 32'(ref_weight(px[i], py[i]))) begin
        failures++;
        $display("particle %0d at (%0d,%0d): weight %0d exp %0d", i, px[i], py[i],
                 host.mem[PB / 4 + 2 * i + 1], ref_weight(px[i], py[i]));
      end
      checks++;
      if (host.mem[PB / 4 + 2 * i] !== {16'(py[i]), 16'(px[i])}) begin failures++; $display("state overwritten"); end
    end
    acc(0, 4, 0, q);
    $display("%0d particles evaluated in %0d cycles", np, q);
    checks++; if (q == 0) begin failures++; $display("cycle counter"); end
    acc(1, 3, 2, q);                      // clear done
    @(negedge clk);
    checks++; if (irq !== 1'b0) begin failures++; $display("irq not cleared"); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < FW * FH; i++)
      host.mem[IB / 4 + i] = {7'd0, 1'($urandom % 3 == 0), 24'($urandom)};
    run(20);
    run(150);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
