// framebuffer: ReCoBus master that stores the video stream in memory.
//
// The module reads the video stream from the I/O bar at its first slot.
// When enabled it waits for a start-of-frame pixel and then stores every
// valid pixel of the frame as one 32-bit word {classification byte, R, G,
// B} at base + 4 * pixel index, using two buffers in turn (double
// buffering): while one frame is written into one buffer, the other holds
// the last complete frame, whose number the CPU reads from the status
// register. Pixels wait in a FIFO; a write burst of BURST words is issued
// whenever that many are waiting, and the remainder at the end of the
// frame. A pixel that finds the FIFO full is dropped and counted (the
// following pixels of that frame then land one word earlier).
//
// Registers on the ReCoBus (offset): 0 base of buffer 0, 1 base of buffer
// 1, 2 control {enable[0]}, 3 status {overflows[31:16], frames[15:1],
// last complete buffer[0]}.
//
// Storing the frame as 32-bit pixels (24 colour bits, 8 bits for
// classification), double buffering, and the master access to memory
// through the ReCoBus follow the document. The FIFO, the burst length and
// the register layout are this design's. Timing: up to one pixel per
// cycle is accepted; the bus moves one word per cycle during a burst.
module framebuffer
  import rcb_pkg::*;
#(
  parameter int unsigned W       = 6,
  parameter int unsigned FW      = FRAME_W,
  parameter int unsigned FH      = FRAME_H,
  parameter int unsigned BURST   = 16,
  parameter int unsigned FIFO_D  = 64
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              sel,
  input  rcb_op_e           op,
  input  logic [OFF_BITS-1:0] off,
  input  logic [W*SLOT_BITS-1:0] din,
  output logic [W*SLOT_BITS-1:0] dout,
  output logic              req,
  input  video_t            video_in
);
  localparam int unsigned NPIX = FW * FH;
  localparam int unsigned PW   = $clog2(NPIX + 1);
  localparam int unsigned FA   = $clog2(FIFO_D);

  logic [AW-1:0] base_q [2];
  logic          en_q, cur_q, last_q, capturing_q;
  logic [15:0]   ovf_q;
  logic [14:0]   frames_q;
  logic [PW-1:0] pix_in_q;     // pixels of this frame taken from the bar
  logic [PW-1:0] pix_out_q;    // pixels of this frame handed to bursts

  // FIFO
  logic [DW-1:0] fifo_q [FIFO_D];
  logic [FA:0]   count_q;
  logic [FA-1:0] rd_q, wr_q;
  logic          push, pop, take;

  // master port
  logic [BUS_BITS-1:0] mdout;
  logic          granted, cmd_valid, cmd_ready, wbeat, mdone, rvalid_unused;
  logic [DW-1:0] rdata_unused;
  logic [7:0]    cmd_len;
  logic          in_burst_q;

  rcb_master_port u_mport (
    .clk(clk), .rst_n(rst_n), .sel(sel), .op(op), .off(off),
    .din(din[BUS_BITS-1:0]), .dout(mdout), .granted(granted), .req(req),
    .cmd_valid(cmd_valid), .cmd_ready(cmd_ready), .cmd_write(1'b1),
    .cmd_addr(base_q[cur_q] + AW'({pix_out_q, 2'b00})), .cmd_len(cmd_len),
    .wdata(fifo_q[rd_q]), .wbeat(wbeat),
    .rdata(rdata_unused), .rvalid(rvalid_unused), .done(mdone)
  );

  // pixels of the current frame
  assign take = capturing_q && video_in.valid ||
                (en_q && !capturing_q && video_in.valid && video_in.sof &&
                 !in_burst_q && pix_out_q == 0);
  assign push = take && count_q != (FA+1)'(FIFO_D);
  assign pop  = wbeat;

  // burst when BURST words wait, or the rest at the end of the frame
  always_comb begin
    cmd_len   = 8'(BURST - 1);
    cmd_valid = 1'b0;
    if (!in_burst_q && cmd_ready) begin
      if (count_q >= (FA+1)'(BURST)) cmd_valid = 1'b1;
      else if (count_q != 0 && !capturing_q) begin
        cmd_valid = 1'b1;
        cmd_len   = 8'(count_q - 1);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (push) fifo_q[wr_q] <= {video_in.cls, video_in.rgb};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      base_q[0] <= '0; base_q[1] <= '0;
      en_q <= 1'b0; cur_q <= 1'b0; last_q <= 1'b1; capturing_q <= 1'b0;
      ovf_q <= '0; frames_q <= '0; pix_in_q <= '0; pix_out_q <= '0;
      count_q <= '0; rd_q <= '0; wr_q <= '0; in_burst_q <= 1'b0;
    end else begin
      if (sel && op == RCB_WRITE)
        unique case (off)
          8'd0:    base_q[0] <= din[31:0];
          8'd1:    base_q[1] <= din[31:0];
          8'd2:    en_q      <= din[0];
          default: ;
        endcase

      // frame capture
      if (take) begin
        if (!push) ovf_q <= ovf_q + 16'd1;
        if (pix_in_q == PW'(NPIX - 1)) begin
          capturing_q <= 1'b0;
          pix_in_q    <= '0;
        end else begin
          capturing_q <= 1'b1;
          pix_in_q    <= pix_in_q + 1'b1;
        end
      end

      if (push) wr_q <= (wr_q == FA'(FIFO_D - 1)) ? '0 : wr_q + 1'b1;
      if (pop)  rd_q <= (rd_q == FA'(FIFO_D - 1)) ? '0 : rd_q + 1'b1;
      count_q <= count_q + (FA+1)'(push) - (FA+1)'(pop);

      // bursts: pixel counter advances per word written
      if (cmd_valid && cmd_ready) in_burst_q <= 1'b1;
      if (pop) pix_out_q <= pix_out_q + 1'b1;
      if (mdone) in_burst_q <= 1'b0;
      // frame complete: all taken pixels written, no burst open
      if (!in_burst_q && !capturing_q && count_q == 0 && pix_out_q != 0) begin
        pix_out_q <= '0;
        last_q    <= cur_q;
        cur_q     <= !cur_q;
        frames_q  <= frames_q + 15'd1;
      end
    end
  end

  always_comb begin
    dout = '0;
    if (granted) dout = (W*SLOT_BITS)'(mdout);
    else if (sel && op == RCB_READ)
      unique case (off)
        8'd0:    dout[31:0] = base_q[0];
        8'd1:    dout[31:0] = base_q[1];
        8'd2:    dout[31:0] = {31'd0, en_q};
        8'd3:    dout[31:0] = {ovf_q, frames_q, last_q};
        default: dout = '0;
      endcase
  end
endmodule
