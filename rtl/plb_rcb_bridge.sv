// plb_rcb_bridge: bridge between the CPU sub-system (PLB) and the ReCoBus
// macros of the dynamic area.
//
// The bridge does two jobs. (1) It lets the CPU reach the registers of
// modules on the ReCoBus: a PLB access is turned into one ReCoBus cycle on
// the macro and select code given by the address, with the data rotated by
// the alignment logic, and is acknowledged the next cycle. (2) It serves
// ReCoBus masters: a master raises a request wire; the request switch
// passes it to the arbiter if the wire is masked as a bus request; when
// granted, the bridge selects the master, reads its 48-bit header
// ({control, address}), and moves the burst words between the master and
// the bridge switch, which forwards them to the NPI module or the PLB
// master port. PLB accesses have priority and stall a running burst for as
// long as they use the ReCoBus.
//
// Sub-blocks: connect_logic, adapt_alignment, request_switch, rcb_arbiter,
// bridge_switch, as in the bridge's structure in the document. The
// configuration registers the CPU uses to set alignment, request masks,
// RSG tables and request wiring stand in for what the document's driver
// does partly by bitstream manipulation.
//
// PLB address map (byte addresses, bit 20 selects the bridge registers):
//   module access : addr[17:16] macro, addr[15:12] select code,
//                   addr[9:2] register offset
//   registers     : word index addr[10:2]
//     0..63  alignment register {macro, code} <- first-slot chain (0..5)
//     64 irq mask, 65 bus request mask, 66 irq pending (write 1 to clear)
//     80..95 select code of the master on request line r (0..15)
//     96 RSG write   {macro[29:28], slot[24:20], lut[15:0]}
//     97 req wiring  {macro[29:28], slot[24:20], enable[8], wire[1:0]}
//     98 stall counter, 99 master burst counter (read only)
//     100 module reset {macro[29:28], code[15:12], assert[0]}: holds the
//         modules of that macro answering to the code in reset until
//         written again with assert = 0 (one entry per macro; reads back
//         {en[3:0] per macro} in bits 3:0)
//
// PLB side: plb_req held until the one-cycle plb_ack; plb_rdata valid with
// plb_ack. The PLB protocol itself is reduced to this request/ack pair.
module plb_rcb_bridge
  import rcb_pkg::*;
#(
  parameter int unsigned NMACRO     = NUM_MACROS,
  parameter logic [3:0]  NPI_REGION = 4'h0
) (
  input  logic          clk,
  input  logic          rst_n,
  // PLB slave port (CPU -> bridge)
  input  logic          plb_req,
  input  logic          plb_rnw,
  input  logic [AW-1:0] plb_addr,
  input  logic [DW-1:0] plb_wdata,
  output logic          plb_ack,
  output logic [DW-1:0] plb_rdata,
  output logic          irq,
  // ReCoBus macros
  output rcb_op_e [NMACRO-1:0]               m_op,
  output logic [NMACRO-1:0][MADDR_BITS-1:0]  m_maddr,
  output logic [NMACRO-1:0][INTERLEAVE-1:0][SLOT_BITS-1:0] m_wchain,
  input  logic [NMACRO-1:0][INTERLEAVE-1:0][SLOT_BITS-1:0] m_rchain,
  input  logic [NMACRO-1:0][REQ_WIRES-1:0]   m_req,
  output logic [NMACRO-1:0]                  cfg_rsg_we,
  output logic [NMACRO-1:0]                  cfg_req_we,
  output logic [4:0]                         cfg_slot,
  output logic [(1<<SEL_BITS)-1:0]           cfg_lut,
  output logic                               cfg_req_en,
  output logic [$clog2(REQ_WIRES)-1:0]       cfg_req_wire,
  output logic [NMACRO-1:0]                  m_rst_en,
  output logic [NMACRO-1:0][SEL_BITS-1:0]    m_rst_code,
  // burst destinations: index 0 = NPI module, 1 = PLB master port
  output logic [1:0]          d_cmd_valid,
  input  logic [1:0]          d_cmd_ready,
  output burst_cmd_t          d_cmd,
  output logic [1:0]          d_wvalid,
  input  logic [1:0]          d_wready,
  output logic [DW-1:0]       d_wdata,
  input  logic [1:0]          d_rvalid,
  output logic [1:0]          d_rready,
  input  logic [1:0][DW-1:0]  d_rdata
);
  localparam int unsigned MW   = $clog2(NMACRO);
  localparam int unsigned NREQ = NMACRO * REQ_WIRES;
  localparam int unsigned RW   = $clog2(NREQ);

  // ---------------- PLB side state ----------------
  typedef enum logic [1:0] {P_IDLE, P_WAIT, P_ACK} pstate_e;
  pstate_e     pst_q;
  logic        is_cfg;
  logic [8:0]  cfg_word;
  logic        cfg_wr, cfg_rd;
  logic        plb_bus;          // PLB access uses the ReCoBus this cycle
  logic [DW-1:0] rdata_q;

  assign is_cfg   = plb_addr[20];
  assign cfg_word = plb_addr[10:2];
  assign cfg_wr   = (pst_q == P_IDLE) && plb_req && is_cfg && !plb_rnw;
  assign cfg_rd   = (pst_q == P_IDLE) && plb_req && is_cfg &&  plb_rnw;

  // ---------------- sub-blocks ----------------
  logic              arb_plb_gnt, arb_m_gnt, arb_m_stall, m_done;
  logic [RW-1:0]     arb_m_idx;
  logic [NREQ-1:0]   requests, bus_req, irq_pending, irq_mask, req_mask;

  logic [MW-1:0]     bus_macro;
  rcb_op_e           bus_op;
  logic [MADDR_BITS-1:0] bus_maddr;
  logic [INTERLEAVE-1:0][SLOT_BITS-1:0] bus_wchain, bus_rchain;
  logic [BUS_BITS-1:0] bus_wdata, bus_rdata;

  connect_logic #(.NMACRO(NMACRO), .NWIRES(REQ_WIRES)) u_connect (
    .macro_sel(bus_macro), .op(bus_op), .maddr(bus_maddr),
    .wchain(bus_wchain), .rchain(bus_rchain), .requests(requests),
    .m_op(m_op), .m_maddr(m_maddr), .m_wchain(m_wchain),
    .m_rchain(m_rchain), .m_req(m_req)
  );

  adapt_alignment #(.NMACRO(NMACRO)) u_align (
    .clk(clk), .rst_n(rst_n),
    .cfg_we(cfg_wr && (cfg_word < 9'(NMACRO << SEL_BITS))),
    .cfg_idx((MW+SEL_BITS)'(cfg_word)),
    .cfg_first(plb_wdata[2:0]),
    .module_select({bus_macro, bus_maddr[MADDR_BITS-1 -: SEL_BITS]}),
    .rchain(bus_rchain), .rdata(bus_rdata),
    .wdata(bus_wdata), .wchain(bus_wchain)
  );

  request_switch #(.NREQ(NREQ)) u_reqsw (
    .clk(clk), .rst_n(rst_n),
    .irq_mask_we(cfg_wr && cfg_word == 9'd64),
    .req_mask_we(cfg_wr && cfg_word == 9'd65),
    .mask_wdata(plb_wdata[NREQ-1:0]),
    .irq_clr_we(cfg_wr && cfg_word == 9'd66),
    .requests(requests), .bus_req(bus_req),
    .irq_pending(irq_pending), .irq(irq),
    .irq_mask(irq_mask), .req_mask(req_mask)
  );

  rcb_arbiter #(.NREQ(NREQ)) u_arb (
    .clk(clk), .rst_n(rst_n),
    .plb_req(pst_q == P_WAIT), .plb_done(plb_bus),
    .m_req(bus_req), .m_done(m_done),
    .plb_gnt(arb_plb_gnt), .m_gnt(arb_m_gnt), .m_idx(arb_m_idx),
    .m_stall(arb_m_stall)
  );

  logic          sw_cmd_valid, sw_cmd_ready, sw_wvalid, sw_wready;
  logic          sw_rvalid, sw_rready, sw_busy;
  logic [DW-1:0] sw_rdata;
  burst_cmd_t    sw_cmd;

  bridge_switch #(.NPI_REGION(NPI_REGION)) u_switch (
    .clk(clk), .rst_n(rst_n),
    .s_cmd_valid(sw_cmd_valid), .s_cmd_ready(sw_cmd_ready), .s_cmd(sw_cmd),
    .s_wvalid(sw_wvalid), .s_wready(sw_wready), .s_wdata(bus_rdata[DW-1:0]),
    .s_rvalid(sw_rvalid), .s_rready(sw_rready), .s_rdata(sw_rdata),
    .d_cmd_valid(d_cmd_valid), .d_cmd_ready(d_cmd_ready), .d_cmd(d_cmd),
    .d_wvalid(d_wvalid), .d_wready(d_wready), .d_wdata(d_wdata),
    .d_rvalid(d_rvalid), .d_rready(d_rready), .d_rdata(d_rdata),
    .busy(sw_busy)
  );

  // ---------------- configuration registers ----------------
  logic [NREQ-1:0][SEL_BITS-1:0] mst_code_q;
  logic [15:0] stall_cnt_q, burst_cnt_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) mst_code_q <= '0;
    else if (cfg_wr && cfg_word >= 9'd80 && cfg_word < 9'(80 + NREQ))
      mst_code_q[RW'(cfg_word - 9'd80)] <= plb_wdata[SEL_BITS-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m_rst_en   <= '0;
      m_rst_code <= '0;
    end else if (cfg_wr && cfg_word == 9'd100) begin
      for (int m = 0; m < NMACRO; m++)
        if (plb_wdata[29:28] == 2'(m)) begin
          m_rst_en[m]   <= plb_wdata[0];
          m_rst_code[m] <= plb_wdata[15:12];
        end
    end
  end

  assign cfg_slot     = plb_wdata[24:20];
  assign cfg_lut      = plb_wdata[(1<<SEL_BITS)-1:0];
  assign cfg_req_en   = plb_wdata[8];
  assign cfg_req_wire = plb_wdata[$clog2(REQ_WIRES)-1:0];
  always_comb begin
    for (int m = 0; m < NMACRO; m++) begin
      cfg_rsg_we[m] = cfg_wr && cfg_word == 9'd96 && plb_wdata[29:28] == 2'(m);
      cfg_req_we[m] = cfg_wr && cfg_word == 9'd97 && plb_wdata[29:28] == 2'(m);
    end
  end

  // ---------------- master engine ----------------
  typedef enum logic [2:0] {M_IDLE, M_HDR, M_CMD, M_WR, M_RD, M_DONE} mstate_e;
  mstate_e        mst_q;
  logic [MW-1:0]  mm_macro_q;
  logic [SEL_BITS-1:0] mm_code_q;
  burst_cmd_t     hdr_q;
  logic [8:0]     mcnt_q;
  logic           m_bus;          // master uses the ReCoBus this cycle
  mst_phase_e     m_phase;
  rcb_ctrl_t      hdr_ctrl;

  assign hdr_ctrl     = rcb_ctrl_t'(bus_rdata[BUS_BITS-1:DW]);
  assign sw_cmd       = hdr_q;
  assign sw_cmd_valid = (mst_q == M_CMD);
  assign sw_wvalid    = (mst_q == M_WR) && !arb_m_stall;
  assign sw_rready    = (mst_q == M_RD) && !arb_m_stall;
  assign m_done       = (mst_q == M_DONE) && !arb_m_stall;
  assign m_bus        = !arb_m_stall &&
                        (mst_q == M_HDR || mst_q == M_WR || mst_q == M_RD);

  always_comb begin
    m_phase = MST_WAIT;
    unique case (mst_q)
      M_HDR:   m_phase = MST_HDR;
      M_WR:    if (sw_wvalid && sw_wready) m_phase = MST_WBEAT;
      M_RD:    if (sw_rvalid && sw_rready) m_phase = MST_RBEAT;
      default: m_phase = MST_WAIT;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mst_q       <= M_IDLE;
      mm_macro_q  <= '0;
      mm_code_q   <= '0;
      hdr_q       <= '0;
      mcnt_q      <= '0;
      stall_cnt_q <= '0;
      burst_cnt_q <= '0;
    end else begin
      if (arb_m_stall && mst_q != M_IDLE) stall_cnt_q <= stall_cnt_q + 16'd1;
      unique case (mst_q)
        M_IDLE: if (arb_m_gnt) begin
          mm_macro_q <= MW'(arb_m_idx / RW'(REQ_WIRES));
          mm_code_q  <= mst_code_q[arb_m_idx];
          mst_q      <= M_HDR;
        end
        M_HDR: if (m_bus) begin
          hdr_q.addr  <= bus_rdata[AW-1:0];
          hdr_q.len   <= hdr_ctrl.len;
          hdr_q.write <= hdr_ctrl.write;
          mst_q       <= M_CMD;
        end
        M_CMD: if (sw_cmd_ready) begin
          mcnt_q <= '0;
          mst_q  <= hdr_q.write ? M_WR : M_RD;
        end
        M_WR: if (sw_wvalid && sw_wready) begin
          mcnt_q <= mcnt_q + 9'd1;
          if (mcnt_q == {1'b0, hdr_q.len}) mst_q <= M_DONE;
        end
        M_RD: if (sw_rvalid && sw_rready) begin
          mcnt_q <= mcnt_q + 9'd1;
          if (mcnt_q == {1'b0, hdr_q.len}) mst_q <= M_DONE;
        end
        M_DONE: if (m_done) begin
          burst_cnt_q <= burst_cnt_q + 16'd1;
          mst_q       <= M_IDLE;
        end
        default: mst_q <= M_IDLE;
      endcase
    end
  end

  // ---------------- ReCoBus ownership per cycle ----------------
  assign plb_bus = (pst_q == P_WAIT) && arb_plb_gnt;

  always_comb begin
    bus_macro = '0;
    bus_op    = RCB_IDLE;
    bus_maddr = '0;
    bus_wdata = '0;
    if (plb_bus) begin
      bus_macro = plb_addr[16 +: MW];
      bus_op    = plb_rnw ? RCB_READ : RCB_WRITE;
      bus_maddr = {plb_addr[15:12], plb_addr[9:2]};
      bus_wdata = BUS_BITS'(plb_wdata);
    end else if (mst_q == M_HDR || mst_q == M_WR || mst_q == M_RD) begin
      bus_macro = mm_macro_q;
      bus_op    = arb_m_stall ? RCB_IDLE : RCB_GRANT;
      bus_maddr = {mm_code_q, OFF_BITS'(m_phase)};
      bus_wdata = BUS_BITS'(sw_rdata);
    end
  end

  // ---------------- PLB handshake ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pst_q   <= P_IDLE;
      rdata_q <= '0;
    end else begin
      unique case (pst_q)
        P_IDLE: if (plb_req) begin
          if (is_cfg) begin
            pst_q <= P_ACK;
            if (cfg_rd) begin
              unique case (cfg_word)
                9'd64:   rdata_q <= DW'(irq_mask);
                9'd65:   rdata_q <= DW'(req_mask);
                9'd66:   rdata_q <= DW'(irq_pending);
                9'd98:   rdata_q <= DW'(stall_cnt_q);
                9'd99:   rdata_q <= DW'(burst_cnt_q);
                9'd100:  rdata_q <= DW'(m_rst_en);
                default: rdata_q <= '0;
              endcase
            end
          end else begin
            pst_q <= P_WAIT;
          end
        end
        P_WAIT: if (plb_bus) begin
          rdata_q <= bus_rdata[DW-1:0];
          pst_q   <= P_ACK;
        end
        P_ACK:   pst_q <= P_IDLE;
        default: pst_q <= P_IDLE;
      endcase
    end
  end

  assign plb_ack   = (pst_q == P_ACK);
  assign plb_rdata = rdata_q;

  // the PLB and a master never drive the ReCoBus in the same cycle
  assert property (@(posedge clk) disable iff (!rst_n) !(plb_bus && m_bus));
endmodule
