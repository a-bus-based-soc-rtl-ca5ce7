// adapt_alignment: undoes the placement-dependent rotation of the
// interleaved ReCoBus chains.
//
// A module always puts its first data byte on its first slot, but which of
// the six interleaved chains that slot belongs to depends on where the
// module was placed. For every module select (macro number and select
// code) an alignment register holds the chain of the module's first slot.
// On the read side, byte k of the aligned bus comes from chain
// (first + k) mod 6; on the write side, chain c carries byte
// (c - first) mod 6. So D[7:0] is always the module's first byte.
//
// The alignment registers addressed by module select and the set of 6:1
// byte multiplexers follow the document. The register write port is this
// design's. Register writes take effect on the next clock edge; the data
// paths are combinational.
module adapt_alignment
  import rcb_pkg::*;
#(
  parameter int unsigned NMACRO = NUM_MACROS
) (
  input  logic                               clk,
  input  logic                               rst_n,
  // alignment register write
  input  logic                               cfg_we,
  input  logic [$clog2(NMACRO)+SEL_BITS-1:0] cfg_idx,
  input  logic [2:0]                         cfg_first,
  // active module
  input  logic [$clog2(NMACRO)+SEL_BITS-1:0] module_select,
  // read direction: chains from the connect logic -> aligned bus
  input  logic [INTERLEAVE-1:0][SLOT_BITS-1:0] rchain,
  output logic [BUS_BITS-1:0]                rdata,
  // write direction: aligned bus -> chains towards the connect logic
  input  logic [BUS_BITS-1:0]                wdata,
  output logic [INTERLEAVE-1:0][SLOT_BITS-1:0] wchain
);
  localparam int unsigned NREG = NMACRO << SEL_BITS;
  logic [NREG-1:0][2:0] first_q;
  logic [2:0]           first;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) first_q <= '0;
    else if (cfg_we) first_q[cfg_idx] <= (cfg_first < 3'(INTERLEAVE)) ? cfg_first : 3'd0;
  end

  assign first = first_q[module_select];

  always_comb begin
    for (int k = 0; k < INTERLEAVE; k++) begin
      rdata[k*SLOT_BITS +: SLOT_BITS] = rchain[(int'(first) + k) % INTERLEAVE];
      // chain k carries aligned byte (k - first) mod INTERLEAVE
      wchain[k] = wdata[((k + INTERLEAVE - int'(first)) % INTERLEAVE)*SLOT_BITS +: SLOT_BITS];
    end
  end
endmodule
