// io_bar: one I/O bar, a streaming line running through the slots of a
// dynamic area.
//
// The bar gives modules a point-to-point connection without using the
// ReCoBus. At each slot a module can read the word arriving at that slot,
// and a module can replace it: if its slot's enable is set, the word it
// drives there is passed on instead of the incoming one. A module reads at
// its first slot and, if it modifies the stream, drives at its last slot,
// so everything to its right sees its result. A filter that only reads
// (a frame buffer) leaves its enables low.
//
// The read-modify-pass principle is the document's; the enable per slot,
// standing in for the module's configuration, is this design's. The bar
// itself is combinational; modules that modify the stream register their
// output, so a chain of modules forms a pipeline.
module io_bar
  import rcb_pkg::*;
#(
  parameter int unsigned NSLOTS = NUM_SLOTS
) (
  input  video_t                bar_in,
  input  logic   [NSLOTS-1:0]   mod_en,
  input  video_t [NSLOTS-1:0]   mod_data,
  output video_t [NSLOTS-1:0]   slot_in,
  output video_t                bar_out
);
  video_t [NSLOTS-1:0] slot_out;

  for (genvar s = 0; s < NSLOTS; s++) begin : g_slot
    if (s == 0) begin : g_first
      assign slot_in[s] = bar_in;
    end else begin : g_next
      assign slot_in[s] = slot_out[s-1];
    end
    assign slot_out[s] = mod_en[s] ? mod_data[s] : slot_in[s];
  end

  assign bar_out = slot_out[NSLOTS-1];
endmodule
