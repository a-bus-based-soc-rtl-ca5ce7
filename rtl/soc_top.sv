// soc_top: the reconfigurable smart-camera SoC, static part plus one
// placement of modules in the dynamic area.
//
// Static part: the PLB/RCB bridge (with its connect logic, alignment,
// request switch, arbiter and switch), the NPI module towards the memory
// controller, and the I/O bar connection multiplexers. Dynamic part: four
// ReCoBus macros (two per dynamic area, one per 16-CLB row) and one I/O bar
// per macro row, 24 slots each. The CPU, the PLB itself, the memory
// controller, the video board and the VGA output are outside this module:
// their signals are ports.
//
// Module placement (slot numbers are first..last):
//   macro 0 / bar 0 : skin colour detection (YCbCr) slots 0..6,
//                     frame buffer slots 7..12 (ReCoBus master, request
//                     on its slot 0); it stores the classified stream
//   macro 1 / bar 1 : markers at 8..11, 12..15, 16..19
//   macro 2 / bar 2 : particle evaluation accelerator slots 0..6
//                     (ReCoBus master; bus request on its slot 0, interrupt
//                     on its slot 1)
//   macro 3 / bar 3 : free
// The modules are fixed here as a bitstream would fix them; what the
// software still has to set at run time is what it sets on the FPGA too:
// the RSG tables, the request wiring, the alignment registers and the
// request masks (through the bridge registers), and the I/O bar sources.
//
// Each module's reset is the system reset combined with the reset the
// ReCoBus generates for the module's first slot (bridge register 100), so
// software can reset one module without touching the others.
//
// The set of blocks, their connections and the rows they sit in follow
// the document's system overview and case study (skin detection and frame
// buffer side by side, the markers in the row below them, the accelerator
// in the other dynamic area); the slot positions are this design's choice.
// The intended video path is IO_in -> bar 0 -> bar 1 -> IO_out.
module soc_top
  import rcb_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  // PLB slave access from the CPU to the bridge
  input  logic          plb_req,
  input  logic          plb_rnw,
  input  logic [AW-1:0] plb_addr,
  input  logic [DW-1:0] plb_wdata,
  output logic          plb_ack,
  output logic [DW-1:0] plb_rdata,
  output logic          irq,
  // bursts of ReCoBus masters towards the PLB (addresses outside the NPI region)
  output logic          plbm_cmd_valid,
  input  logic          plbm_cmd_ready,
  output burst_cmd_t    plbm_cmd,
  output logic          plbm_wvalid,
  input  logic          plbm_wready,
  output logic [DW-1:0] plbm_wdata,
  input  logic          plbm_rvalid,
  output logic          plbm_rready,
  input  logic [DW-1:0] plbm_rdata,
  // native port of the memory controller
  output logic          npi_addr_req,
  input  logic          npi_addr_ack,
  output logic [AW-1:0] npi_addr,
  output logic          npi_rnw,
  output logic [7:0]    npi_size,
  output logic          npi_wr_push,
  output logic [DW-1:0] npi_wr_data,
  input  logic          npi_wr_full,
  output logic          npi_rd_pop,
  input  logic [DW-1:0] npi_rd_data,
  input  logic          npi_rd_empty,
  // video
  input  video_t        video_in,
  output video_t        video_out,
  // I/O bar source selection (written by the CPU)
  input  logic          iob_cfg_we,
  input  logic [2:0]    iob_cfg_idx,
  input  logic [2:0]    iob_cfg_src
);
  localparam int unsigned NM = NUM_MACROS;
  localparam int unsigned NS = NUM_SLOTS;

  // ---------------- bridge and macros ----------------
  rcb_op_e [NM-1:0]                       m_op;
  logic [NM-1:0][MADDR_BITS-1:0]          m_maddr;
  logic [NM-1:0][INTERLEAVE-1:0][SLOT_BITS-1:0] m_wchain, m_rchain;
  logic [NM-1:0][REQ_WIRES-1:0]           m_req;
  logic [NM-1:0]                          cfg_rsg_we, cfg_req_we;
  logic [4:0]                             cfg_slot;
  logic [(1<<SEL_BITS)-1:0]               cfg_lut;
  logic                                   cfg_req_en;
  logic [$clog2(REQ_WIRES)-1:0]           cfg_req_wire;

  logic [1:0]         d_cmd_valid, d_cmd_ready, d_wvalid, d_wready, d_rvalid, d_rready;
  burst_cmd_t         d_cmd;
  logic [DW-1:0]      d_wdata;
  logic [1:0][DW-1:0] d_rdata;
  logic               npi_busy;
  logic [NM-1:0]                 m_rst_en;
  logic [NM-1:0][SEL_BITS-1:0]   m_rst_code;

  plb_rcb_bridge u_bridge (
    .clk(clk), .rst_n(rst_n),
    .plb_req(plb_req), .plb_rnw(plb_rnw), .plb_addr(plb_addr),
    .plb_wdata(plb_wdata), .plb_ack(plb_ack), .plb_rdata(plb_rdata), .irq(irq),
    .m_op(m_op), .m_maddr(m_maddr), .m_wchain(m_wchain), .m_rchain(m_rchain),
    .m_req(m_req), .cfg_rsg_we(cfg_rsg_we), .cfg_req_we(cfg_req_we),
    .cfg_slot(cfg_slot), .cfg_lut(cfg_lut), .cfg_req_en(cfg_req_en),
    .cfg_req_wire(cfg_req_wire), .m_rst_en(m_rst_en), .m_rst_code(m_rst_code),
    .d_cmd_valid(d_cmd_valid), .d_cmd_ready(d_cmd_ready), .d_cmd(d_cmd),
    .d_wvalid(d_wvalid), .d_wready(d_wready), .d_wdata(d_wdata),
    .d_rvalid(d_rvalid), .d_rready(d_rready), .d_rdata(d_rdata)
  );

  npi_module u_npi (
    .clk(clk), .rst_n(rst_n),
    .cmd_valid(d_cmd_valid[0]), .cmd_ready(d_cmd_ready[0]), .cmd(d_cmd),
    .wvalid(d_wvalid[0]), .wready(d_wready[0]), .wdata(d_wdata),
    .rvalid(d_rvalid[0]), .rready(d_rready[0]), .rdata(d_rdata[0]),
    .npi_addr_req(npi_addr_req), .npi_addr_ack(npi_addr_ack),
    .npi_addr(npi_addr), .npi_rnw(npi_rnw), .npi_size(npi_size),
    .npi_wr_push(npi_wr_push), .npi_wr_data(npi_wr_data),
    .npi_wr_full(npi_wr_full), .npi_rd_pop(npi_rd_pop),
    .npi_rd_data(npi_rd_data), .npi_rd_empty(npi_rd_empty), .busy(npi_busy)
  );

  assign plbm_cmd_valid = d_cmd_valid[1];
  assign d_cmd_ready[1] = plbm_cmd_ready;
  assign plbm_cmd       = d_cmd;
  assign plbm_wvalid    = d_wvalid[1];
  assign d_wready[1]    = plbm_wready;
  assign plbm_wdata     = d_wdata;
  assign d_rvalid[1]    = plbm_rvalid;
  assign plbm_rready    = d_rready[1];
  assign d_rdata[1]     = plbm_rdata;

  logic    [NM-1:0][NS-1:0]                slot_sel;
  rcb_op_e [NM-1:0]                        slot_op;
  logic    [NM-1:0][OFF_BITS-1:0]          slot_off;
  logic    [NM-1:0][NS-1:0][SLOT_BITS-1:0] slot_din, slot_dout;
  logic    [NM-1:0][NS-1:0]                slot_req;
  logic    [NM-1:0][NS-1:0]                slot_rst;

  for (genvar m = 0; m < NM; m++) begin : g_macro
    recobus_macro u_macro (
      .clk(clk), .rst_n(rst_n),
      .op(m_op[m]), .maddr(m_maddr[m]), .wchain(m_wchain[m]),
      .rchain(m_rchain[m]), .req_bundle(m_req[m]),
      .cfg_rsg_we(cfg_rsg_we[m]), .cfg_req_we(cfg_req_we[m]),
      .cfg_slot(cfg_slot), .cfg_lut(cfg_lut), .cfg_req_en(cfg_req_en),
      .cfg_req_wire(cfg_req_wire),
      .rst_en(m_rst_en[m]), .rst_code(m_rst_code[m]),
      .slot_sel(slot_sel[m]), .slot_op(slot_op[m]), .slot_off(slot_off[m]),
      .slot_din(slot_din[m]), .slot_dout(slot_dout[m]), .slot_req(slot_req[m]),
      .slot_rst(slot_rst[m])
    );
  end

  // ---------------- I/O bars ----------------
  video_t [NM-1:0]         bar_start, bar_end;
  video_t [NM-1:0][NS-1:0] bar_slot_in, bar_mod_data;
  logic   [NM-1:0][NS-1:0] bar_mod_en;

  io_bar_connection #(.NBARS(NM)) u_iobc (
    .clk(clk), .rst_n(rst_n),
    .cfg_we(iob_cfg_we), .cfg_idx(iob_cfg_idx), .cfg_src(iob_cfg_src),
    .io_in(video_in), .bar_end(bar_end), .bar_start(bar_start), .io_out(video_out)
  );

  for (genvar b = 0; b < NM; b++) begin : g_bar
    io_bar u_bar (
      .bar_in(bar_start[b]), .mod_en(bar_mod_en[b]), .mod_data(bar_mod_data[b]),
      .slot_in(bar_slot_in[b]), .bar_out(bar_end[b])
    );
  end

  // ---------------- placed modules ----------------
  localparam int unsigned SKIN_P = 0,  SKIN_W = 7;
  localparam int unsigned MARK_W = 4;
  localparam int unsigned MARK_P [3] = '{8, 12, 16};
  localparam int unsigned FB_P   = 7,  FB_W = 6;
  localparam int unsigned PE_P   = 0,  PE_W = 7;

  logic [SKIN_W*SLOT_BITS-1:0] skin_dout;
  logic [2:0][MARK_W*SLOT_BITS-1:0] mark_dout;
  logic [FB_W*SLOT_BITS-1:0]   fb_dout;
  logic [PE_W*SLOT_BITS-1:0]   pe_dout;
  video_t                      skin_vout;
  video_t [2:0]                mark_vout;
  logic                        fb_req, pe_req, pe_irq;
  // module resets: system reset or the bus-generated reset of the first slot
  logic                        skin_rst_n, fb_rst_n, pe_rst_n;
  logic [2:0]                  mark_rst_n;
  assign skin_rst_n = rst_n && !slot_rst[0][SKIN_P];
  assign fb_rst_n   = rst_n && !slot_rst[0][FB_P];
  assign pe_rst_n   = rst_n && !slot_rst[2][PE_P];
  for (genvar k = 0; k < 3; k++) begin : g_mark_rst
    assign mark_rst_n[k] = rst_n && !slot_rst[1][MARK_P[k]];
  end

  skin_color_detect #(.W(SKIN_W), .YCBCR(1'b1)) u_skin (
    .clk(clk), .rst_n(skin_rst_n),
    .sel(slot_sel[0][SKIN_P]), .op(slot_op[0]), .off(slot_off[0]),
    .din(slot_din[0][SKIN_P +: SKIN_W]), .dout(skin_dout),
    .video_in(bar_slot_in[0][SKIN_P]), .video_out(skin_vout)
  );

  for (genvar k = 0; k < 3; k++) begin : g_marker
    marker #(.W(MARK_W)) u_marker (
      .clk(clk), .rst_n(mark_rst_n[k]),
      .sel(slot_sel[1][MARK_P[k]]), .op(slot_op[1]), .off(slot_off[1]),
      .din(slot_din[1][MARK_P[k] +: MARK_W]), .dout(mark_dout[k]),
      .video_in(bar_slot_in[1][MARK_P[k]]), .video_out(mark_vout[k])
    );
  end

  framebuffer #(.W(FB_W)) u_fb (
    .clk(clk), .rst_n(fb_rst_n),
    .sel(slot_sel[0][FB_P]), .op(slot_op[0]), .off(slot_off[0]),
    .din(slot_din[0][FB_P +: FB_W]), .dout(fb_dout), .req(fb_req),
    .video_in(bar_slot_in[0][FB_P])
  );

  particle_eval #(.W(PE_W)) u_pe (
    .clk(clk), .rst_n(pe_rst_n),
    .sel(slot_sel[2][PE_P]), .op(slot_op[2]), .off(slot_off[2]),
    .din(slot_din[2][PE_P +: PE_W]), .dout(pe_dout), .req(pe_req), .irq(pe_irq)
  );

  // slot outputs, requests and I/O bar drivers of the placement
  always_comb begin
    slot_dout    = '0;
    slot_req     = '0;
    bar_mod_en   = '0;
    bar_mod_data = '0;
    slot_dout[0][SKIN_P +: SKIN_W] = skin_dout;
    bar_mod_en[0][SKIN_P + SKIN_W - 1]   = 1'b1;
    bar_mod_data[0][SKIN_P + SKIN_W - 1] = skin_vout;
    for (int k = 0; k < 3; k++) begin
      slot_dout[1][MARK_P[k] +: MARK_W] = mark_dout[k];
      bar_mod_en[1][MARK_P[k] + MARK_W - 1]   = 1'b1;
      bar_mod_data[1][MARK_P[k] + MARK_W - 1] = mark_vout[k];
    end
    slot_dout[0][FB_P +: FB_W] = fb_dout;
    slot_req[0][FB_P]          = fb_req;
    slot_dout[2][PE_P +: PE_W] = pe_dout;
    slot_req[2][PE_P]          = pe_req;
    slot_req[2][PE_P + 1]      = pe_irq;
  end
endmodule
