// rcb_pkg: shared constants and types of the reconfigurable SoC.
//
// The ReCoBus (reconfigurable bus) is organised in resource slots of one
// CLB column each. Every slot carries one byte of data in each direction,
// and neighbouring slots belong to different interleaved multiplexer
// chains, so a module that covers six consecutive slots sees all six
// chains and can move 48 bits per cycle. Four ReCoBus macros of 24 slots
// each form the two-dimensional bus of the two dynamic areas.
//
// The slot byte width, the six-way interleave, the 24-slot width of a
// dynamic area, the four macros, the 32-bit memory word and the 720x576
// video format are the figures of the architecture. The macro address
// layout, the request wire count, the video word layout and the master
// header format are this design's own choices.
package rcb_pkg;

  // ---- ReCoBus geometry ----
  localparam int unsigned SLOT_BITS  = 8;   // data bits per slot and direction
  localparam int unsigned INTERLEAVE = 6;   // interleaved chains per macro
  localparam int unsigned BUS_BITS   = SLOT_BITS * INTERLEAVE; // 48
  localparam int unsigned NUM_SLOTS  = 24;  // slots per macro (CLB columns)
  localparam int unsigned NUM_MACROS = 4;   // ReCoBus macros in the SoC

  // Macro-internal address vector: {select code, register offset}.
  // The select code is decoded by the Reconfigurable Select Generators.
  localparam int unsigned SEL_BITS  = 4;    // RSG look-up table inputs
  localparam int unsigned OFF_BITS  = 8;    // register offset inside a module
  localparam int unsigned MADDR_BITS = SEL_BITS + OFF_BITS;

  localparam int unsigned REQ_WIRES = 4;    // request wire bundle per macro
  localparam int unsigned NUM_REQ   = REQ_WIRES * NUM_MACROS;

  localparam int unsigned AW = 32;          // system address width
  localparam int unsigned DW = 32;          // system data word

  // ---- ReCoBus master header ----
  // A granted master first drives a header on its 48 output bits:
  // [31:0] memory byte address, [47:32] control.
  typedef struct packed {
    logic [6:0] rsvd;
    logic       write;     // 1: master writes memory, 0: master reads
    logic [7:0] len;       // number of 32-bit words minus one
  } rcb_ctrl_t;

  // ---- Static-side view of one macro (bridge <-> macro) ----
  typedef enum logic [1:0] {
    RCB_IDLE  = 2'd0,
    RCB_WRITE = 2'd1,   // static side writes to the selected module
    RCB_READ  = 2'd2,   // static side reads from the selected module
    RCB_GRANT = 2'd3    // selected module is the granted master
  } rcb_op_e;

  // While a master holds the grant (RCB_GRANT), the register offset field
  // of the macro address tells the master what the bridge does this cycle.
  typedef enum logic [1:0] {
    MST_HDR   = 2'd0,   // bridge samples the 48-bit header
    MST_WBEAT = 2'd1,   // bridge takes one write word from the master
    MST_RBEAT = 2'd2,   // bridge hands one read word to the master
    MST_WAIT  = 2'd3    // granted, nothing moves (stalled or waiting)
  } mst_phase_e;

  // ---- Video word carried on the I/O bar ----
  typedef struct packed {
    logic        valid;    // pixel present in this cycle
    logic        sof;      // first pixel of a frame
    logic        eol;      // last pixel of a line
    logic [7:0]  cls;      // classification byte written by modules
    logic [23:0] rgb;      // {R, G, B}
  } video_t;
  localparam int unsigned VIDEO_BITS = $bits(video_t);

  // ---- Video format ----
  localparam int unsigned FRAME_W = 720;
  localparam int unsigned FRAME_H = 576;

  // ---- Memory burst port (bridge switch <-> NPI / PLB master) ----
  typedef struct packed {
    logic          write;
    logic [7:0]    len;    // words minus one
    logic [AW-1:0] addr;
  } burst_cmd_t;

endpackage
