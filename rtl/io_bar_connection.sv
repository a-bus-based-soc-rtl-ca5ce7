// io_bar_connection: the static multiplexers that feed the I/O bars.
//
// Every I/O bar starts at a multiplexer in the static part that selects
// its source: the video input (IO_in) or the end of any I/O bar. A last
// multiplexer selects which of them leaves the chip as IO_out. With these
// the bars of the two dynamic areas can be chained in any order, e.g.
// video in -> bar 0 -> bar 1 -> video out.
//
// Select codes: 0 = IO_in, 1 + b = end of bar b. Every multiplexer output
// is registered, so a bar fed from its own end does not form a
// combinational loop, and each pass through the static part costs one
// cycle. The multiplexer structure is the document's; the register stage,
// the select coding and the write port are this design's. Reset selects
// IO_in for every bar and for IO_out (video passes straight through).
module io_bar_connection
  import rcb_pkg::*;
#(
  parameter int unsigned NBARS = 4
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       cfg_we,
  input  logic [$clog2(NBARS+1)-1:0] cfg_idx,   // 0..NBARS-1 bar, NBARS = IO_out
  input  logic [$clog2(NBARS+1)-1:0] cfg_src,
  input  video_t                     io_in,
  input  video_t [NBARS-1:0]         bar_end,
  output video_t [NBARS-1:0]         bar_start,
  output video_t                     io_out
);
  localparam int unsigned SW = $clog2(NBARS+1);
  logic   [NBARS:0][SW-1:0] src_q;
  video_t [NBARS:0]         srcs;

  assign srcs = {bar_end, io_in};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      src_q     <= '0;
      bar_start <= '0;
      io_out    <= '0;
    end else begin
      if (cfg_we && cfg_idx <= SW'(NBARS)) src_q[cfg_idx] <= cfg_src;
      for (int b = 0; b < NBARS; b++)
        bar_start[b] <= (src_q[b] <= SW'(NBARS)) ? srcs[src_q[b]] : '0;
      io_out <= (src_q[NBARS] <= SW'(NBARS)) ? srcs[src_q[NBARS]] : '0;
    end
  end
endmodule
