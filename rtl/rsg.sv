// rsg: Reconfigurable Select Generator of one ReCoBus slot.
//
// The select signal of a slot is produced by a small look-up table that
// decodes the select-code part of the macro-internal address vector. The
// table can be rewritten at run time, so the same module bitstream can be
// placed several times and each copy answers to its own select code,
// without the module knowing its code.
//
// The document describes the RSG as an updatable look-up table. The
// table width (a 4-input table, 16 entries) and the write port that stands
// in for rewriting the table's configuration bits are this design's own.
//
// The same table also decodes the module-reset code: rst_sel is the entry
// addressed by rst_code, so a reset aimed at a select code reaches exactly
// the slots that answer to that code. This second read port is this
// design's way of providing the bus's reset-generation signal.
//
// Interface: cfg_we loads cfg_lut on the rising clock edge; sel is the
// table entry addressed by code and rst_sel the entry addressed by
// rst_code, both combinationally. Reset clears the table, so an empty slot
// never drives the bus.
module rsg #(
  parameter int unsigned SEL_BITS = rcb_pkg::SEL_BITS
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      cfg_we,
  input  logic [(1<<SEL_BITS)-1:0]  cfg_lut,
  input  logic [SEL_BITS-1:0]       code,
  output logic                      sel,
  input  logic [SEL_BITS-1:0]       rst_code,
  output logic                      rst_sel
);
  logic [(1<<SEL_BITS)-1:0] lut_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      lut_q <= '0;
    else if (cfg_we) lut_q <= cfg_lut;
  end

  assign sel     = lut_q[code];
  assign rst_sel = lut_q[rst_code];
endmodule
