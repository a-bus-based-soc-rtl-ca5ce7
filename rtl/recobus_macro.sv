// recobus_macro: one ReCoBus macro spanning a row of resource slots.
//
// Every slot is one CLB column wide and exchanges one byte per direction.
// Slot s belongs to interleaved chain (s mod INTERLEAVE). Towards the
// static side, each chain is an AND/OR multiplexer chain: a slot ANDs its
// output byte with its select and ORs the result into its chain, so only
// the selected module's bytes reach the static side. Towards the modules,
// chain c of the write bus is distributed to every slot of chain c. A
// module covering k consecutive slots thus sees min(k, INTERLEAVE) distinct
// chains and gets a bus of up to 48 bits, with its first slot on whatever
// chain its placement gives; the bridge's alignment logic undoes that.
//
// Each slot has a Reconfigurable Select Generator (rsg) decoding the
// select code of the macro address. The op code and the register offset are
// broadcast to all slots. Request signals of the modules are routed onto a
// bundle of REQ_WIRES wires; which wire a slot drives is configuration
// (cfg_req_*), standing in for the switch-matrix entries that are set by
// bitstream manipulation in the FPGA.
//
// Reset generation: while rst_en is high, every slot whose RSG answers to
// rst_code raises slot_rst, one clock after rst_en/rst_code change
// (registered, so the module's asynchronous reset sees no decode glitch).
//
// The AND/OR chain structure, the interleave of six, the byte per slot and
// the request wire bundle follow the document. The configuration write
// ports, the bundle width and the shared (not interleaved) macro address
// are this design's choices, as is the way reset generation is decoded.
// All bus paths through the macro are combinational; only the RSG tables,
// the request routing and the slot resets are stored.
module recobus_macro
  import rcb_pkg::*;
#(
  parameter int unsigned NSLOTS = NUM_SLOTS,
  parameter int unsigned NCHAIN = INTERLEAVE,
  parameter int unsigned NWIRES = REQ_WIRES
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // static side
  input  rcb_op_e                    op,
  input  logic [MADDR_BITS-1:0]      maddr,
  input  logic [NCHAIN-1:0][SLOT_BITS-1:0] wchain,
  output logic [NCHAIN-1:0][SLOT_BITS-1:0] rchain,
  output logic [NWIRES-1:0]          req_bundle,
  // configuration
  input  logic                       cfg_rsg_we,
  input  logic                       cfg_req_we,
  input  logic [4:0]                 cfg_slot,
  input  logic [(1<<SEL_BITS)-1:0]   cfg_lut,
  input  logic                       cfg_req_en,
  input  logic [$clog2(NWIRES)-1:0]  cfg_req_wire,
  // module reset generation
  input  logic                       rst_en,
  input  logic [SEL_BITS-1:0]        rst_code,
  // module side, one entry per slot
  output logic [NSLOTS-1:0]                 slot_sel,
  output rcb_op_e                           slot_op,
  output logic [OFF_BITS-1:0]               slot_off,
  output logic [NSLOTS-1:0][SLOT_BITS-1:0]  slot_din,
  input  logic [NSLOTS-1:0][SLOT_BITS-1:0]  slot_dout,
  input  logic [NSLOTS-1:0]                 slot_req,
  output logic [NSLOTS-1:0]                 slot_rst
);
  logic [NSLOTS-1:0]                 rsg_sel, rsg_rst;
  logic [NSLOTS-1:0]                 req_en_q;
  logic [NSLOTS-1:0][$clog2(NWIRES)-1:0] req_wire_q;

  for (genvar s = 0; s < NSLOTS; s++) begin : g_slot
    rsg #(.SEL_BITS(SEL_BITS)) u_rsg (
      .clk    (clk),
      .rst_n  (rst_n),
      .cfg_we (cfg_rsg_we && (cfg_slot == 5'(s))),
      .cfg_lut(cfg_lut),
      .code   (maddr[MADDR_BITS-1 -: SEL_BITS]),
      .sel    (rsg_sel[s]),
      .rst_code(rst_code),
      .rst_sel(rsg_rst[s])
    );
    // select is only active while the static side runs an operation
    assign slot_sel[s] = rsg_sel[s] && (op != RCB_IDLE);
    assign slot_din[s] = wchain[s % NCHAIN];
  end

  assign slot_op  = op;
  assign slot_off = maddr[OFF_BITS-1:0];

  // module resets, registered
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) slot_rst <= '0;
    else        slot_rst <= rsg_rst & {NSLOTS{rst_en}};
  end

  // request routing registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      req_en_q   <= '0;
      req_wire_q <= '0;
    end else if (cfg_req_we) begin
      for (int s = 0; s < NSLOTS; s++)
        if (cfg_slot == 5'(s)) begin
          req_en_q[s]   <= cfg_req_en;
          req_wire_q[s] <= cfg_req_wire;
        end
    end
  end

  // interleaved AND/OR read chains and request wire bundle
  always_comb begin
    rchain     = '0;
    req_bundle = '0;
    for (int s = 0; s < NSLOTS; s++) begin
      rchain[s % NCHAIN] |= slot_dout[s] & {SLOT_BITS{slot_sel[s]}};
      if (req_en_q[s] && slot_req[s])
        req_bundle[req_wire_q[s]] = 1'b1;
    end
  end
endmodule
