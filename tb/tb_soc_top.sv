// tb_soc_top: end-to-end test of the SoC at its full size (720x576 video,
// four 24-slot ReCoBus macros), with every parameter at its default.
//
// A CPU model configures the system over the PLB exactly as the driver
// software would: RSG tables, request wiring, alignment registers, request
// masks, master select codes, I/O bar sources, then the module registers.
// Two full frames with skin-coloured rectangles are streamed through
// video_in at one pixel every five cycles (the PAL pixel rate at 100 MHz). Checked:
//  - every output pixel: skin class bit set by the skin detector and the
//    three marker squares drawn, against a reference computed here;
//  - both frames stored word-exact by the frame buffer (classified stream,
//    before the markers), alternately in its
//    two buffers (double buffering), and its status;
//  - the particle accelerator, started during the second frame, reads its
//    particle set over the PLB master path and the stored first frame over
//    the NPI, and writes weights equal to the skin-pixel counts of the 9x9
//    regions computed here; it signals completion by interrupt;
//  - mechanisms: burst stalls by CPU accesses, both masters requesting at
//    once (round robin), non-zero alignment, both burst destinations,
//    interrupt, a bus-generated reset of one module; each is counted and
//    must occur.
module tb_soc_top;
  import rcb_pkg::*;
  localparam int FW = FRAME_W, FH = FRAME_H, NP = 60;
  // 720x576 at 50 frames/s is 20.7 Mpixel/s: one pixel per ~4.8 cycles of 100 MHz
  localparam int PIX_CYC = 5;
  localparam logic [31:0] BRIDGE = 32'h0010_0000;     // bridge register space (bit 20)
  localparam logic [31:0] FB0 = 32'h0010_0000, FB1 = 32'h0020_0000;
  localparam logic [31:0] PART = 32'h4000_0000;       // particle set in PLB-side memory

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

  // PLB-side memory reached through the PLB master port
  logic [31:0] pmem [1024];
  logic [31:0] paddr = '0; int pcnt = 0, pbursts = 0;
  assign plbm_cmd_ready = 1'b1;
  assign plbm_wready    = 1'b1;
  assign plbm_rvalid    = 1'b1;
  assign plbm_rdata     = pmem[((paddr >> 2) + pcnt) % 1024];
  always @(posedge clk) begin
    if (plbm_cmd_valid) begin paddr <= plbm_cmd.addr; pcnt <= 0; pbursts <= pbursts + 1; end
    if (plbm_wvalid) begin pmem[((paddr >> 2) + pcnt) % 1024] <= plbm_wdata; pcnt <= pcnt + 1; end
    if (plbm_rready) pcnt <= pcnt + 1;
  end

  always #5 clk = ~clk;
  initial begin
    #300000000;
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // ---------------- mechanism counters ----------------
  int n_both_req = 0, n_irq = 0, n_mod_rst = 0;
  always @(posedge clk) begin
    if (dut.u_fb.req && dut.u_pe.req) n_both_req++;
    if (irq) n_irq++;
  end

  // ---------------- reference image ----------------
  int mk_x [3] = '{100, 360, 600};
  int mk_y [3] = '{80, 300, 500};
  localparam logic [23:0] MK_COL [3] = '{24'h0000FF, 24'h00FF00, 24'hFFFF00};
  function automatic logic is_skin(int f, int x, int y);
    int o = f * 37;
    return (x >= 80 + o && x < 160 + o && y >= 60 && y < 150) ||
           (x >= 400 && x < 470 && y >= 250 + o && y < 330 + o) ||
           (x >= 700 && y >= 560);
  endfunction
  function automatic logic [23:0] in_rgb(int f, int x, int y);
    return is_skin(f, x, y) ? 24'hC8785A : {8'(20 + (x % 8)), 8'(40 + (y % 8)), 8'd200};
  endfunction
  function automatic logic [31:0] stored_word(int f, int x, int y);
    return {7'd0, is_skin(f, x, y), in_rgb(f, x, y)};
  endfunction
  function automatic logic [31:0] out_word(int f, int x, int y);
    logic [23:0] c = in_rgb(f, x, y);
    for (int k = 0; k < 3; k++)
      if (x >= mk_x[k] - 2 && x <= mk_x[k] + 2 && y >= mk_y[k] - 2 && y <= mk_y[k] + 2) c = MK_COL[k];
    return {7'd0, is_skin(f, x, y), c};
  endfunction

  // ---------------- CPU model ----------------
  task automatic plb(logic rnw, logic [31:0] a, logic [31:0] d, output logic [31:0] q);
    @(negedge clk); plb_req = 1; plb_rnw = rnw; plb_addr = a; plb_wdata = d;
    do @(posedge clk); while (!plb_ack);
    q = plb_rdata;
    @(negedge clk); plb_req = 0;
  endtask
  function automatic logic [31:0] mod(int m, int code, int o);
    return {14'd0, 2'(m), 4'(code), 2'd0, 8'(o), 2'd0};
  endfunction
  task automatic place(int m, int first, int width, int code);
    logic [31:0] q;
    for (int s = first; s < first + width; s++)
      plb(0, BRIDGE + 96 * 4, {2'd0, 2'(m), 3'd0, 5'(s), 4'd0, 16'(1 << code)}, q);
    plb(0, BRIDGE + 4 * (m * 16 + code), first % 6, q);
  endtask
  task automatic wire_req(int m, int slot, int w);
    logic [31:0] q;
    plb(0, BRIDGE + 97 * 4, {2'd0, 2'(m), 3'd0, 5'(slot), 11'd0, 1'b1, 6'd0, 2'(w)}, q);
  endtask
  task automatic iob(int idx, int src);
    @(negedge clk); iob_cfg_we = 1; iob_cfg_idx = 3'(idx); iob_cfg_src = 3'(src);
    @(negedge clk); iob_cfg_we = 0;
  endtask
  task automatic chk(input logic [31:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin failures++; if (failures < 20) $display("%s: got %h exp %h", what, got, exp); end
  endtask

  // ---------------- video source and output checker ----------------
  int cur_frame = 0;
  bit streaming = 0;
  int out_idx = 0, out_bad = 0;
  task automatic send_frame(int f);
    cur_frame = f;
    streaming = 1;
    for (int y = 0; y < FH; y++)
      for (int x = 0; x < FW; x++) begin
        @(negedge clk);
        video_in = '0; video_in.valid = 1; video_in.sof = (x == 0 && y == 0);
        video_in.eol = (x == FW - 1); video_in.rgb = in_rgb(f, x, y);
        @(negedge clk); video_in = '0;
        repeat (PIX_CYC - 2) @(negedge clk);
      end
    repeat (20) @(negedge clk);
    streaming = 0;
  endtask
  always @(posedge clk) if (rst_n && video_out.valid) begin
    automatic int x = out_idx % FW, y = (out_idx / FW) % FH;
    automatic int f = out_idx / (FW * FH);
    if ({video_out.cls, video_out.rgb} !== out_word(f, x, y) ||
        video_out.sof !== (x == 0 && y == 0) || video_out.eol !== (x == FW - 1)) begin
      out_bad++;
      if (out_bad < 5) $display("output pixel (%0d,%0d) of frame %0d: %h exp %h", x, y, f,
                                {video_out.cls, video_out.rgb}, out_word(f, x, y));
    end
    out_idx++;
  end

  function automatic int ref_weight(int px, int py);
    int n = 0;
    for (int y = py - 4; y <= py + 4; y++)
      for (int x = px - 4; x <= px + 4; x++)
        if (x >= 0 && x < FW && y >= 0 && y < FH && is_skin(0, x, y)) n++;
    return n;
  endfunction

  // ---------------- test sequence ----------------
  int ppx [NP], ppy [NP];
  initial begin
    logic [31:0] q;
    int t0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // placement as loaded by the driver
    place(0, 0, 7, 1);                       // skin colour detection
    place(0, 7, 6, 5);                       // frame buffer (first chain 1)
    place(1, 8, 4, 2); place(1, 12, 4, 3); place(1, 16, 4, 4);   // markers
    place(2, 0, 7, 1);                       // particle accelerator
    wire_req(0, 7, 0);                       // frame buffer request -> line 0
    wire_req(2, 0, 0);                       // accelerator request  -> line 8
    wire_req(2, 1, 1);                       // accelerator interrupt -> line 9
    plb(0, BRIDGE + 65 * 4, 32'h0101, q);    // bus requests: lines 0, 8
    plb(0, BRIDGE + 64 * 4, 32'h0200, q);    // interrupt: line 9
    plb(0, BRIDGE + (80 + 0) * 4, 5, q);
    plb(0, BRIDGE + (80 + 8) * 4, 1, q);
    iob(0, 0); iob(1, 1); iob(4, 2);         // in -> bar 0 -> bar 1 -> out
    // module registers
    for (int k = 0; k < 3; k++) begin
      plb(0, mod(1, 2 + k, 0), {16'(mk_y[k]), 16'(mk_x[k])}, q);
      plb(0, mod(1, 2 + k, 1), 32'(MK_COL[k]), q);
      plb(0, mod(1, 2 + k, 2), {16'd0, 8'd2, 8'd1}, q);
    end
    for (int k = 0; k < 3; k++) begin      // markers sit on chains 2, 0, 4
      plb(1, mod(1, 2 + k, 0), 0, q);
      chk(q, {16'(mk_y[k]), 16'(mk_x[k])}, "marker position readback (alignment)");
    end
    plb(1, mod(0, 1, 1), 0, q); chk(q, {8'd255, 8'd127, 8'd173}, "skin template readback");
    // bus-generated module reset of the third marker (macro 1, code 4) only
    plb(0, BRIDGE + 100 * 4, {2'd0, 2'd1, 12'd0, 4'd4, 11'd0, 1'b1}, q);
    plb(0, BRIDGE + 100 * 4, {2'd0, 2'd1, 12'd0, 4'd4, 11'd0, 1'b0}, q);
    plb(1, mod(1, 4, 0), 0, q); chk(q, 0, "marker 2 position after module reset");
    plb(1, mod(1, 4, 1), 0, q); chk(q, 32'h0000FF, "marker 2 colour after module reset");
    plb(1, mod(1, 3, 0), 0, q); chk(q, {16'(mk_y[1]), 16'(mk_x[1])}, "marker 1 untouched by the reset");
    n_mod_rst = int'(q == {16'(mk_y[1]), 16'(mk_x[1])});
    plb(0, mod(1, 4, 0), {16'(mk_y[2]), 16'(mk_x[2])}, q);
    plb(0, mod(1, 4, 1), 32'(MK_COL[2]), q);
    plb(0, mod(1, 4, 2), {16'd0, 8'd2, 8'd1}, q);
    plb(0, mod(0, 5, 0), FB0, q); plb(0, mod(0, 5, 1), FB1, q); plb(0, mod(0, 5, 2), 1, q);

    // frame 0, with CPU reads in between (they stall frame buffer bursts)
    fork
      send_frame(0);
      begin
        repeat (2000) begin
          repeat (700) @(negedge clk);
          plb(1, mod(1, 3, 0), 0, q);
        end
      end
    join
    repeat (200) @(negedge clk);
    plb(1, mod(0, 5, 3), 0, q);
    chk(32'(q[0]), 0, "frame 0 complete in buffer 0");
    chk(32'(q[15:1]), 1, "one frame stored");
    chk(32'(q[31:16]), 0, "no pixel dropped");
    for (int i = 0; i < FW * FH; i++) begin
      checks++;
      if (u_mem.mem[FB0 / 4 + i] !== stored_word(0, i % FW, i / FW)) begin
        failures++; if (failures < 20) $display("stored pixel %0d: %h exp %h", i, u_mem.mem[FB0 / 4 + i], stored_word(0, i % FW, i / FW));
      end
    end

    // particles around the skin regions and elsewhere
    for (int i = 0; i < NP; i++) begin
      ppx[i] = (i < 20) ? 70 + 5 * i : $urandom % FW;
      ppy[i] = (i < 20) ? 55 + 3 * i : $urandom % FH;
      if (i == 20) begin ppx[i] = FW - 1; ppy[i] = FH - 1; end
      pmem[2 * i] = {16'(ppy[i]), 16'(ppx[i])};
      pmem[2 * i + 1] = 32'hFFFF_FFFF;
    end
    plb(0, mod(2, 1, 0), PART, q); plb(0, mod(2, 1, 1), NP, q); plb(0, mod(2, 1, 2), FB0, q);

    // frame 1 while the accelerator evaluates frame 0
    fork
      send_frame(1);
      begin
        repeat (1000) @(negedge clk);
        plb(0, mod(2, 1, 3), 1, q);            // start
        t0 = $time;
        while (!irq) @(negedge clk);
        $display("accelerator: %0d particles in %0d cycles", NP, ($time - t0) / 10);
        plb(1, BRIDGE + 66 * 4, 0, q); chk(q, 32'h0200, "accelerator interrupt pending");
        plb(0, mod(2, 1, 3), 2, q);            // clear done
        plb(0, BRIDGE + 66 * 4, 32'h0200, q);  // clear pending
      end
    join
    repeat (200) @(negedge clk);
    for (int i = 0; i < NP; i++)
      chk(pmem[2 * i + 1], 32'(ref_weight(ppx[i], ppy[i])), $sformatf("weight of particle %0d", i));
    plb(1, mod(0, 5, 3), 0, q);
    chk(32'(q[0]), 1, "frame 1 complete in buffer 1");
    chk(32'(q[15:1]), 2, "two frames stored");
    chk(32'(q[31:16]), 0, "no pixel dropped in frame 1");
    for (int i = 0; i < FW * FH; i++) begin
      checks++;
      if (u_mem.mem[FB1 / 4 + i] !== stored_word(1, i % FW, i / FW)) begin
        failures++; if (failures < 20) $display("stored pixel %0d of frame 1: %h exp %h", i, u_mem.mem[FB1 / 4 + i], stored_word(1, i % FW, i / FW));
      end
    end
    chk(32'(out_idx), 2 * FW * FH, "output pixels");
    chk(32'(out_bad), 0, "wrong output pixels");
    chk(32'(u_mem.errors), 0, "memory protocol errors");

    // mechanisms
    plb(1, BRIDGE + 98 * 4, 0, q);
    $display("stall cycles %0d, both masters requesting %0d cycles, PLB bursts %0d, NPI transfers %0d, irq cycles %0d",
             q, n_both_req, pbursts, u_mem.requests, n_irq);
    checks++; if (q == 0)           begin failures++; $display("no master burst stalled"); end
    checks++; if (n_both_req == 0)  begin failures++; $display("masters never competed"); end
    checks++; if (pbursts == 0)     begin failures++; $display("PLB master path unused"); end
    checks++; if (u_mem.requests == 0) begin failures++; $display("NPI path unused"); end
    checks++; if (n_irq == 0)       begin failures++; $display("no interrupt"); end
    checks++; if (n_mod_rst == 0)   begin failures++; $display("no module reset"); end
    plb(1, BRIDGE + 99 * 4, 0, q);
    $display("master bursts: %0d", q);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
