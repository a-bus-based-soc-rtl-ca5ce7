// connect_logic: common interface from the bridge to all ReCoBus macros.
//
// The bridge talks to one ReCoBus at a time. The module select names the
// macro (and, inside it, the select code carried by the address). The
// connect logic distributes the operation, the address and the write chains
// to the selected macro only (all others see RCB_IDLE, so none of their
// slots is selected), takes the read chains from the selected macro, and
// merges the request bundles of all macros into one request vector,
// macro 0 in the lowest bits.
//
// That the connect logic merges and distributes the macro signals is the
// document's; how (one active macro per cycle, a read multiplexer) is this
// design's choice. Purely combinational.
module connect_logic
  import rcb_pkg::*;
#(
  parameter int unsigned NMACRO = NUM_MACROS,
  parameter int unsigned NWIRES = REQ_WIRES
) (
  // bridge side
  input  logic [$clog2(NMACRO)-1:0]          macro_sel,
  input  rcb_op_e                            op,
  input  logic [MADDR_BITS-1:0]              maddr,
  input  logic [INTERLEAVE-1:0][SLOT_BITS-1:0] wchain,
  output logic [INTERLEAVE-1:0][SLOT_BITS-1:0] rchain,
  output logic [NMACRO*NWIRES-1:0]           requests,
  // macro side
  output rcb_op_e [NMACRO-1:0]               m_op,
  output logic [NMACRO-1:0][MADDR_BITS-1:0]  m_maddr,
  output logic [NMACRO-1:0][INTERLEAVE-1:0][SLOT_BITS-1:0] m_wchain,
  input  logic [NMACRO-1:0][INTERLEAVE-1:0][SLOT_BITS-1:0] m_rchain,
  input  logic [NMACRO-1:0][NWIRES-1:0]      m_req
);
  always_comb begin
    for (int m = 0; m < NMACRO; m++) begin
      m_op[m]     = (macro_sel == m[$clog2(NMACRO)-1:0]) ? op : RCB_IDLE;
      m_maddr[m]  = maddr;
      m_wchain[m] = wchain;
      requests[m*NWIRES +: NWIRES] = m_req[m];
    end
    rchain = m_rchain[macro_sel];
  end
endmodule
