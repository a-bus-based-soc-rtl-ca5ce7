// tb_particle_workload: the particle-filter evaluation workload on the full
// SoC, with every parameter at its default (720x576 frame, 1024-entry
// particle buffer).
//
// A CPU model places the accelerator (macro 2, slots 0..6), wires its bus
// request and interrupt, and runs four evaluations with 100, 200, 500 and
// 1000 particles. The classified frame and the particle set both sit in the
// DDR memory behind the NPI (memory model with 8 cycles latency), as in the
// original system. For each run the testbench checks:
//  - every weight against the skin count of the clipped 9x9 region,
//    computed here from the frame;
//  - that every particle state is left unchanged;
//  - the completion interrupt;
//  - the evaluation time against the hardware evaluation times reported
//    for the original system (0.4, 0.8, 2.1 and 4.2 ms at 100 MHz). The
//    time must not exceed them. Those times include the original
//    memory's behaviour, so this check is an upper bound, not a match.
// The time measured here runs from the start write to the interrupt and
// is printed in cycles and milliseconds.
module tb_particle_workload;
  import rcb_pkg::*;
  localparam int FW = FRAME_W, FH = FRAME_H;
  localparam logic [31:0] BRIDGE = 32'h0010_0000;     // bridge register space (bit 20)
  localparam logic [31:0] IMG  = 32'h0010_0000;       // frame in DDR (NPI region)
  localparam logic [31:0] PART = 32'h0030_0000;       // particle set in DDR
  localparam int NRUN = 4;
  localparam int RUN_NP [NRUN] = '{100, 200, 500, 1000};
  localparam int RUN_MAX_CYC [NRUN] = '{40000, 80000, 210000, 420000};   // 0.4 .. 4.2 ms

  logic clk = 0, rst_n = 0;
  logic plb_req = 0, plb_rnw = 0, plb_ack, irq;
  logic [31:0] plb_addr = '0, plb_wdata = '0, plb_rdata;
  logic plbm_cmd_valid, plbm_cmd_ready, plbm_wvalid, plbm_wready, plbm_rvalid, plbm_rready;
  burst_cmd_t plbm_cmd;
  logic [31:0] plbm_wdata, plbm_rdata;
  logic npi_addr_req, npi_addr_ack, npi_rnw, npi_wr_push, npi_wr_full, npi_rd_pop, npi_rd_empty;
  logic [31:0] npi_addr, npi_wr_data, npi_rd_data;
  logic [7:0] npi_size;
  video_t video_in = '0, video_out;
  logic iob_cfg_we = 0;
  logic [2:0] iob_cfg_idx = '0, iob_cfg_src = '0;
  int checks = 0, failures = 0;

  soc_top dut (.*);
  npi_mem_model #(.WORDS(1 << 20), .LAT(8)) u_mem (.clk, .rst_n, .npi_addr_req, .npi_addr_ack,
    .npi_addr, .npi_rnw, .npi_size, .npi_wr_push, .npi_wr_data, .npi_wr_full,
    .npi_rd_pop, .npi_rd_data, .npi_rd_empty);

  // nothing is expected on the PLB master port in this test
  int plbm_used = 0;
  assign plbm_cmd_ready = 1'b1;
  assign plbm_wready    = 1'b1;
  assign plbm_rvalid    = 1'b1;
  assign plbm_rdata     = '0;
  always @(posedge clk) if (rst_n && plbm_cmd_valid) plbm_used++;

  always #5 clk = ~clk;
  initial begin
    #100000000;
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic plb(logic rnw, logic [31:0] a, logic [31:0] d, output logic [31:0] q);
    @(negedge clk); plb_req = 1; plb_rnw = rnw; plb_addr = a; plb_wdata = d;
    do @(posedge clk); while (!plb_ack);
    q = plb_rdata;
    @(negedge clk); plb_req = 0;
  endtask
  function automatic logic [31:0] mod(int m, int code, int o);
    return {14'd0, 2'(m), 4'(code), 2'd0, 8'(o), 2'd0};
  endfunction
  task automatic chk(input logic [31:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin failures++; if (failures < 20) $display("%s: got %0d exp %0d", what, got, exp); end
  endtask

  function automatic int ref_weight(int px, int py);
    int n = 0;
    for (int y = py - 4; y <= py + 4; y++)
      for (int x = px - 4; x <= px + 4; x++)
        if (x >= 0 && x < FW && y >= 0 && y < FH && u_mem.mem[IMG / 4 + y * FW + x][24]) n++;
    return n;
  endfunction

  int ppx [1024], ppy [1024];
  initial begin
    logic [31:0] q;
    int np, t0, cyc;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // classified frame: skin blobs plus scattered skin pixels
    for (int y = 0; y < FH; y++)
      for (int x = 0; x < FW; x++) begin
        automatic logic s = ((x / 40) % 3 == 0 && (y / 30) % 2 == 1) || ($urandom % 7 == 0);
        u_mem.mem[IMG / 4 + y * FW + x] = {7'd0, s, 24'($urandom)};
      end
    // accelerator placement: RSG code 1 on slots 0..6 of macro 2, alignment 0,
    // request on its slot 0 -> wire 0 (line 8), interrupt on slot 1 -> wire 1 (line 9)
    for (int s = 0; s < 7; s++)
      plb(0, BRIDGE + 96 * 4, {2'd0, 2'd2, 3'd0, 5'(s), 4'd0, 16'(1 << 1)}, q);
    plb(0, BRIDGE + 4 * (2 * 16 + 1), 0, q);
    plb(0, BRIDGE + 97 * 4, {2'd0, 2'd2, 3'd0, 5'd0, 11'd0, 1'b1, 6'd0, 2'd0}, q);
    plb(0, BRIDGE + 97 * 4, {2'd0, 2'd2, 3'd0, 5'd1, 11'd0, 1'b1, 6'd0, 2'd1}, q);
    plb(0, BRIDGE + 65 * 4, 32'h0100, q);
    plb(0, BRIDGE + 64 * 4, 32'h0200, q);
    plb(0, BRIDGE + (80 + 8) * 4, 1, q);
    plb(0, mod(2, 1, 0), PART, q);
    plb(0, mod(2, 1, 2), IMG, q);

    for (int r = 0; r < NRUN; r++) begin
      np = RUN_NP[r];
      for (int i = 0; i < np; i++) begin
        ppx[i] = $urandom % FW; ppy[i] = $urandom % FH;
        if (i == 0) begin ppx[i] = 0; ppy[i] = FH - 1; end
        u_mem.mem[PART / 4 + 2 * i]     = {16'(ppy[i]), 16'(ppx[i])};
        u_mem.mem[PART / 4 + 2 * i + 1] = 32'hFFFF_FFFF;
      end
      plb(0, mod(2, 1, 1), np, q);
      plb(0, mod(2, 1, 3), 1, q);              // start
      t0 = $time;
      while (!irq) @(negedge clk);
      cyc = ($time - t0) / 10;
      plb(1, BRIDGE + 66 * 4, 0, q); chk(q, 32'h0200, "interrupt pending");
      plb(1, mod(2, 1, 3), 0, q);    chk(32'(q[1:0]), 1, "done, not busy");
      plb(0, mod(2, 1, 3), 2, q);              // clear done
      plb(0, BRIDGE + 66 * 4, 32'h0200, q);    // clear pending
      for (int i = 0; i < np; i++) begin
        chk(u_mem.mem[PART / 4 + 2 * i + 1], 32'(ref_weight(ppx[i], ppy[i])), $sformatf("weight of particle %0d", i));
        chk(u_mem.mem[PART / 4 + 2 * i], {16'(ppy[i]), 16'(ppx[i])}, "particle state");
      end
      $display("%0d particles: %0d cycles = %0d.%03d ms at 100 MHz (original hardware: %0d.%01d ms)",
               np, cyc, cyc / 100000, (cyc % 100000) / 100, RUN_MAX_CYC[r] / 100000,
               (RUN_MAX_CYC[r] % 100000) / 10000);
      checks++;
      if (cyc > RUN_MAX_CYC[r]) begin failures++; $display("evaluation slower than the reported time"); end
      repeat (10) @(negedge clk);
      checks++; if (irq !== 1'b0) begin failures++; $display("interrupt not cleared"); end
    end
    chk(32'(u_mem.errors), 0, "memory protocol errors");
    chk(32'(plbm_used), 0, "bursts on the PLB master port");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
