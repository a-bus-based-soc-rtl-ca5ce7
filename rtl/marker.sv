// marker: draws the position of one tracked region into the video stream.
//
// The module counts pixel columns and rows of the stream on the I/O bar
// (a pixel with sof is column 0 of row 0, a pixel with eol ends its row)
// and replaces the colour of every pixel within HALF pixels of the
// programmed position, horizontally and vertically, by the programmed
// colour, so a filled square of side 2*HALF+1 marks the position. The CPU
// writes the position after every tracking step; one marker is used per
// tracked region.
//
// Registers on the ReCoBus (offset): 0 position {y[31:16], x[15:0]},
// 1 colour {R, G, B}, 2 control {half size [15:8], enable [0]}.
// Reset: disabled, blue, half size 2. Latency: one cycle on the I/O bar.
//
// That a marker module per region displays the tracking result in the
// image follows the document; the square shape and the register layout are
// this design's.
module marker
  import rcb_pkg::*;
#(
  parameter int unsigned W = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              sel,
  input  rcb_op_e           op,
  input  logic [OFF_BITS-1:0] off,
  input  logic [W*SLOT_BITS-1:0] din,
  output logic [W*SLOT_BITS-1:0] dout,
  input  video_t            video_in,
  output video_t            video_out
);
  logic [15:0] px_q, py_q;       // programmed position
  logic [23:0] color_q;
  logic [7:0]  half_q;
  logic        en_q;
  logic [15:0] cx_q, cy_q;       // coordinates of the next pixel
  logic [15:0] x, y;
  logic        hit;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      px_q <= '0; py_q <= '0;
      color_q <= 24'h0000FF;
      half_q  <= 8'd2;
      en_q    <= 1'b0;
    end else if (sel && op == RCB_WRITE) begin
      unique case (off)
        8'd0:    {py_q, px_q} <= din[31:0];
        8'd1:    color_q <= din[23:0];
        8'd2:    {half_q, en_q} <= {din[15:8], din[0]};
        default: ;
      endcase
    end
  end

  always_comb begin
    dout = '0;
    if (sel && op == RCB_READ)
      unique case (off)
        8'd0:    dout[31:0] = {py_q, px_q};
        8'd1:    dout[31:0] = {8'd0, color_q};
        8'd2:    dout[31:0] = {16'd0, half_q, 7'd0, en_q};
        default: dout = '0;
      endcase
  end

  // coordinates of the current pixel
  assign x = video_in.sof ? 16'd0 : cx_q;
  assign y = video_in.sof ? 16'd0 : cy_q;

  always_comb begin
    logic [16:0] dx, dy;
    dx  = (x >= px_q) ? 17'(x - px_q) : 17'(px_q - x);
    dy  = (y >= py_q) ? 17'(y - py_q) : 17'(py_q - y);
    hit = en_q && video_in.valid && dx <= 17'(half_q) && dy <= 17'(half_q);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cx_q <= '0; cy_q <= '0;
      video_out <= '0;
    end else begin
      if (video_in.valid) begin
        cx_q <= video_in.eol ? 16'd0 : x + 16'd1;
        cy_q <= video_in.eol ? y + 16'd1 : y;
      end
      video_out <= video_in;
      if (hit) video_out.rgb <= color_q;
    end
  end
endmodule
