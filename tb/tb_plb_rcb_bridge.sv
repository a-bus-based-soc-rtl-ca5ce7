// tb_plb_rcb_bridge: self-checking test of the PLB/RCB bridge with four
// real ReCoBus macros, the NPI module and a memory model.
// A register-file slave sits on macro 1, slots 3..8 (first chain 3); two
// masters (rcb_master_port driven here) sit on macro 2, slots 7..12 and
// macro 3, slots 2..7. The test programs RSGs, request wiring, alignment
// and masks through PLB register writes, then checks slave register
// accesses, master write and read bursts to the NPI memory and to the PLB
// master port, round-robin order when both masters request, stalling of a
// burst by PLB accesses, an interrupt routed by the request switch, and
// module reset generation (register 100) reaching exactly the slots of the
// module it names.
module tb_plb_rcb_bridge;
  import rcb_pkg::*;
  logic clk = 0, rst_n = 0;
  logic plb_req = 0, plb_rnw = 0, plb_ack, irq;
  logic [31:0] plb_addr = '0, plb_wdata = '0, plb_rdata;
  rcb_op_e [3:0] m_op;
  logic [3:0][MADDR_BITS-1:0] m_maddr;
  logic [3:0][5:0][7:0] m_wchain, m_rchain;
  logic [3:0][3:0] m_req;
  logic [3:0] cfg_rsg_we, cfg_req_we;
  logic [4:0] cfg_slot;
  logic [15:0] cfg_lut;
  logic cfg_req_en;
  logic [1:0] cfg_req_wire;
  logic [1:0] d_cmd_valid, d_cmd_ready, d_wvalid, d_wready, d_rvalid, d_rready;
  burst_cmd_t d_cmd;
  logic [31:0] d_wdata;
  logic [1:0][31:0] d_rdata;
  logic npi_addr_req, npi_addr_ack, npi_rnw, npi_wr_push, npi_wr_full, npi_rd_pop, npi_rd_empty, npi_busy;
  logic [31:0] npi_addr, npi_wr_data, npi_rd_data;
  logic [7:0] npi_size;
  int checks = 0, failures = 0;
  logic [3:0] m_rst_en;
  logic [3:0][3:0] m_rst_code;

  plb_rcb_bridge dut (.*);
  npi_module u_npi (.clk, .rst_n,
    .cmd_valid(d_cmd_valid[0]), .cmd_ready(d_cmd_ready[0]), .cmd(d_cmd),
    .wvalid(d_wvalid[0]), .wready(d_wready[0]), .wdata(d_wdata),
    .rvalid(d_rvalid[0]), .rready(d_rready[0]), .rdata(d_rdata[0]),
    .npi_addr_req, .npi_addr_ack, .npi_addr, .npi_rnw, .npi_size, .npi_wr_push,
    .npi_wr_data, .npi_wr_full, .npi_rd_pop, .npi_rd_data, .npi_rd_empty, .busy(npi_busy));
  npi_mem_model #(.WORDS(1 << 14), .LAT(6)) u_mem (.clk, .rst_n, .npi_addr_req, .npi_addr_ack,
    .npi_addr, .npi_rnw, .npi_size, .npi_wr_push, .npi_wr_data, .npi_wr_full,
    .npi_rd_pop, .npi_rd_data, .npi_rd_empty);

  // PLB master destination: word memory, always ready
  logic [31:0] pmem [1024];
  logic [31:0] paddr; logic pwrite; int pcnt = 0, pbursts = 0;
  assign d_cmd_ready[1] = 1'b1;
  assign d_wready[1]    = 1'b1;
  assign d_rvalid[1]    = 1'b1;
  assign d_rdata[1]     = pmem[((paddr >> 2) + pcnt) % 1024];
  always @(posedge clk) begin
    if (d_cmd_valid[1]) begin paddr <= d_cmd.addr; pcnt <= 0; pbursts <= pbursts + 1; end
    if (d_wvalid[1]) begin pmem[((paddr >> 2) + pcnt) % 1024] <= d_wdata; pcnt <= pcnt + 1; end
    if (d_rready[1]) pcnt <= pcnt + 1;
  end

  // macros
  logic [3:0][23:0] slot_sel, slot_req, slot_rst;
  rcb_op_e [3:0] slot_op;
  logic [3:0][7:0] slot_off;
  logic [3:0][23:0][7:0] slot_din, slot_dout;
  for (genvar m = 0; m < 4; m++) begin : g_m
    recobus_macro u_macro (.clk, .rst_n, .op(m_op[m]), .maddr(m_maddr[m]),
      .wchain(m_wchain[m]), .rchain(m_rchain[m]), .req_bundle(m_req[m]),
      .cfg_rsg_we(cfg_rsg_we[m]), .cfg_req_we(cfg_req_we[m]), .cfg_slot, .cfg_lut,
      .cfg_req_en, .cfg_req_wire, .slot_sel(slot_sel[m]), .slot_op(slot_op[m]),
      .slot_off(slot_off[m]), .slot_din(slot_din[m]), .slot_dout(slot_dout[m]),
      .slot_req(slot_req[m]), .rst_en(m_rst_en[m]), .rst_code(m_rst_code[m]),
      .slot_rst(slot_rst[m]));
  end

  // slave register file on macro 1, slots 3..8
  logic [31:0] sregs [8];
  logic [47:0] s_din, s_dout;
  assign s_din = slot_din[1][8:3];
  always @(posedge clk)
    if (slot_sel[1][3] && slot_op[1] == RCB_WRITE) sregs[slot_off[1][2:0]] <= s_din[31:0];
  assign s_dout = (slot_sel[1][3] && slot_op[1] == RCB_READ) ? {16'hA5A5, sregs[slot_off[1][2:0]]} : '0;
  logic slave_irq = 0;

  // masters
  logic [1:0] mc_valid = '0, mc_ready, mc_write = '0, mwbeat, mrvalid, mdone, mgranted, mreq;
  logic [1:0][31:0] mc_addr = '0, mwdata, mrdata;
  logic [1:0][7:0] mc_len = '0;
  logic [1:0][47:0] mdin, mdout;
  int mword [2];
  assign mdin[0] = slot_din[2][12:7];
  assign mdin[1] = slot_din[3][7:2];
  for (genvar k = 0; k < 2; k++) begin : g_mst
    rcb_master_port u_mp (.clk, .rst_n,
      .sel(k == 0 ? slot_sel[2][7] : slot_sel[3][2]), .op(k == 0 ? slot_op[2] : slot_op[3]),
      .off(k == 0 ? slot_off[2] : slot_off[3]), .din(mdin[k]), .dout(mdout[k]),
      .granted(mgranted[k]), .req(mreq[k]), .cmd_valid(mc_valid[k]), .cmd_ready(mc_ready[k]),
      .cmd_write(mc_write[k]), .cmd_addr(mc_addr[k]), .cmd_len(mc_len[k]),
      .wdata(mwdata[k]), .wbeat(mwbeat[k]), .rdata(mrdata[k]), .rvalid(mrvalid[k]), .done(mdone[k]));
    assign mwdata[k] = mc_addr[k] ^ 32'(mword[k] * 12345 + k);
    always @(posedge clk) if (mwbeat[k] || mrvalid[k]) mword[k] <= mword[k] + 1;
  end
  logic [1:0][31:0] rd_seen [64];
  always @(posedge clk) for (int k = 0; k < 2; k++) if (mrvalid[k]) rd_seen[mword[k] % 64][k] <= mrdata[k];

  always_comb begin
    slot_dout = '0; slot_req = '0;
    slot_dout[1][8:3]  = s_dout;
    slot_dout[2][12:7] = mdout[0];
    slot_dout[3][7:2]  = mdout[1];
    slot_req[2][7] = mreq[0];
    slot_req[3][2] = mreq[1];
    slot_req[1][3] = slave_irq;
  end

  always #5 clk = ~clk;
  initial begin #20000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic chk(input logic [31:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("%s: got %h exp %h", what, got, exp); end
  endtask

  task automatic plb(logic rnw, logic [31:0] a, logic [31:0] d, output logic [31:0] q);
    @(negedge clk); plb_req = 1; plb_rnw = rnw; plb_addr = a; plb_wdata = d;
    do @(posedge clk); while (!plb_ack);
    q = plb_rdata;
    @(negedge clk); plb_req = 0;
  endtask
  localparam logic [31:0] CFG = 32'h0010_0000;
  function automatic logic [31:0] maddr(int m, int code, int o);
    return {14'd0, 2'(m), 4'(code), 2'd0, 8'(o), 2'd0};
  endfunction

  task automatic place(int m, int first, int width, int code);
    logic [31:0] q;
    for (int s = first; s < first + width; s++)
      plb(0, CFG + 96 * 4, {2'd0, 2'(m), 3'd0, 5'(s), 4'd0, 16'(1 << code)}, q);
    plb(0, CFG + 4 * (m * 16 + code), first % 6, q);
  endtask

  task automatic mburst(int k, logic wr, logic [31:0] a, int n);
    @(negedge clk);
    mword[k] = 0;
    mc_valid[k] = 1; mc_write[k] = wr; mc_addr[k] = a; mc_len[k] = 8'(n - 1);
    @(negedge clk); mc_valid[k] = 0;
  endtask

  initial begin
    logic [31:0] q;
    int st0;
    mword[0] = 0; mword[1] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    place(1, 3, 6, 2);
    place(2, 7, 6, 5);
    place(3, 2, 6, 9);
    // request wiring: master 0 -> macro 2 wire 1 (line 9), master 1 -> macro 3 wire 0 (line 12),
    // slave irq -> macro 1 wire 2 (line 6)
    plb(0, CFG + 97 * 4, {2'd0, 2'd2, 3'd0, 5'd7, 11'd0, 1'b1, 6'd0, 2'd1}, q);
    plb(0, CFG + 97 * 4, {2'd0, 2'd3, 3'd0, 5'd2, 11'd0, 1'b1, 6'd0, 2'd0}, q);
    plb(0, CFG + 97 * 4, {2'd0, 2'd1, 3'd0, 5'd3, 11'd0, 1'b1, 6'd0, 2'd2}, q);
    plb(0, CFG + 64 * 4, 32'h0040, q);             // irq mask: line 6
    plb(0, CFG + 65 * 4, 32'h1200, q);             // bus request mask: lines 9, 12
    plb(0, CFG + 80 * 4 + 9 * 4, 5, q);            // line 9 -> code 5
    plb(0, CFG + 80 * 4 + 12 * 4, 9, q);           // line 12 -> code 9
    plb(1, CFG + 65 * 4, 0, q); chk(q, 32'h1200, "mask readback");

    // slave register access through the alignment
    for (int r = 0; r < 8; r++) plb(0, maddr(1, 2, r), 32'hC0DE_0000 + 32'(r * 17), q);
    for (int r = 0; r < 8; r++) begin
      plb(1, maddr(1, 2, r), 0, q);
      chk(q, 32'hC0DE_0000 + 32'(r * 17), "slave register readback");
      chk(sregs[r], 32'hC0DE_0000 + 32'(r * 17), "slave register content");
    end
    plb(1, maddr(1, 3, 0), 0, q); chk(q, 32'h0, "unused select code reads zero");

    // module reset generation: hold the slave (macro 1, code 2) in reset
    plb(0, CFG + 100 * 4, {2'd0, 2'd1, 12'd0, 4'd2, 11'd0, 1'b1}, q);
    repeat (2) @(negedge clk);
    for (int m = 0; m < 4; m++)
      for (int s = 0; s < 24; s++)
        chk(32'(slot_rst[m][s]), 32'(m == 1 && s >= 3 && s <= 8), $sformatf("reset of macro %0d slot %0d", m, s));
    plb(1, CFG + 100 * 4, 0, q); chk(q, 32'h2, "reset register readback");
    plb(0, CFG + 100 * 4, {2'd0, 2'd1, 12'd0, 4'd2, 11'd0, 1'b0}, q);
    repeat (2) @(negedge clk);
    chk(32'(slot_rst != '0), 0, "reset released");

    // master 0: write 40 words to NPI memory with PLB accesses in between (stall)
    st0 = 0;
    mburst(0, 1, 32'h0000_0400, 40);
    repeat (20) @(negedge clk);
    for (int r = 0; r < 4; r++) begin plb(1, maddr(1, 2, r), 0, q); chk(q, 32'hC0DE_0000 + 32'(r * 17), "slave read during burst"); end
    wait (mc_ready[0]); repeat (10) @(negedge clk);
    for (int i = 0; i < 40; i++) chk(u_mem.mem[256 + i], 32'h0000_0400 ^ 32'(i * 12345), "NPI write data");
    plb(1, CFG + 98 * 4, 0, q);
    checks++; if (q == 0) begin failures++; $display("no stall happened"); end else $display("stall cycles: %0d", q);

    // master 0 reads them back
    mburst(0, 0, 32'h0000_0400, 40);
    wait (mc_ready[0]); repeat (3) @(negedge clk);
    for (int i = 0; i < 40; i++) chk(rd_seen[i][0], 32'h0000_0400 ^ 32'(i * 12345), "NPI read data");

    // master 1 writes to the PLB side (address outside the NPI region)
    mburst(1, 1, 32'h4000_0100, 8);
    wait (mc_ready[1]); repeat (3) @(negedge clk);
    for (int i = 0; i < 8; i++) chk(pmem[64 + i], 32'h4000_0100 ^ 32'(i * 12345 + 1), "PLB master write");
    chk(32'(pbursts), 1, "one PLB burst");

    // both request together: round robin alternates
    begin
      int order [4]; int n = 0;
      for (int rep = 0; rep < 2; rep++) begin
        mburst(0, 1, 32'h0000_0800, 4); mburst(1, 1, 32'h0000_0900, 4);
        for (int j = 0; j < 2; j++) begin
          @(posedge clk iff (mgranted != 0));
          order[n++] = mgranted[1] ? 1 : 0;
          @(posedge clk iff (mdone != 0));
        end
      end
      $display("grant order %0d %0d %0d %0d", order[0], order[1], order[2], order[3]);
      chk(32'(order[0] != order[1]), 1, "round robin alternates (1)");
      chk(32'(order[2] != order[3]), 1, "round robin alternates (2)");
    end
    repeat (4) @(negedge clk);
    plb(1, CFG + 99 * 4, 0, q); chk(q, 32'd7, "master bursts counted");

    // interrupt from the slave's request line
    @(negedge clk); slave_irq = 1; @(negedge clk); slave_irq = 0;
    repeat (2) @(negedge clk);
    chk(32'(irq), 1, "interrupt raised");
    plb(1, CFG + 66 * 4, 0, q); chk(q, 32'h0040, "pending line 6");
    plb(0, CFG + 66 * 4, 32'h0040, q);
    @(negedge clk); chk(32'(irq), 0, "interrupt cleared");
    chk(32'(u_mem.errors), 0, "memory model protocol errors");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
