// skin_color_detect: per-pixel skin colour classification on the I/O bar.
//
// The module reads the RGB video stream at its first slot, compares each
// pixel with a colour template and writes the result into bit 0 of the
// classification byte (1 = skin), leaving the colour untouched. The
// template is a box: a pixel is skin when every one of its three channel
// values lies between the programmed minimum and maximum. With
// YCBCR = 1 the pixel is first converted to Y, Cb, Cr (ITU-R BT.601
// full-range, 8-bit fixed point), otherwise R, G, B are compared directly.
//
// Registers on the ReCoBus (32-bit words, offset):
//   0 template minimum {c0[23:16], c1[15:8], c2[7:0]}
//   1 template maximum, same layout
//   2 control: bit 0 enable (when 0 the stream passes unchanged)
// Reset values: YCbCr Cb 77..127, Cr 133..173, Y unrestricted;
// RGB R >= 95, G >= 40, B >= 20. Latency: one cycle on the I/O bar.
//
// That a slave module classifies the stream against a colour template, in
// RGB or YCbCr, and writes the class onto the bar next to the unchanged
// video follows the document. The box template, the conversion
// coefficients and the reset template are this design's.
module skin_color_detect
  import rcb_pkg::*;
#(
  parameter int unsigned W     = 7,   // slots covered
  parameter bit          YCBCR = 1'b1
) (
  input  logic              clk,
  input  logic              rst_n,
  // ReCoBus slave (module view, first slot's select)
  input  logic              sel,
  input  rcb_op_e           op,
  input  logic [OFF_BITS-1:0] off,
  input  logic [W*SLOT_BITS-1:0] din,
  output logic [W*SLOT_BITS-1:0] dout,
  // I/O bar
  input  video_t            video_in,
  output video_t            video_out
);
  logic [23:0] tmin_q, tmax_q;
  logic        en_q;
  logic [7:0]  c0, c1, c2;
  logic        skin;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tmin_q <= YCBCR ? {8'd0, 8'd77, 8'd133}   : {8'd95, 8'd40, 8'd20};
      tmax_q <= YCBCR ? {8'd255, 8'd127, 8'd173} : {8'd255, 8'd255, 8'd255};
      en_q   <= 1'b1;
    end else if (sel && op == RCB_WRITE) begin
      unique case (off)
        8'd0:    tmin_q <= din[23:0];
        8'd1:    tmax_q <= din[23:0];
        8'd2:    en_q   <= din[0];
        default: ;
      endcase
    end
  end

  always_comb begin
    dout = '0;
    if (sel && op == RCB_READ)
      unique case (off)
        8'd0:    dout[31:0] = {8'd0, tmin_q};
        8'd1:    dout[31:0] = {8'd0, tmax_q};
        8'd2:    dout[31:0] = {31'd0, en_q};
        default: dout = '0;
      endcase
  end

  // colour conversion
  always_comb begin
    logic signed [17:0] r, g, b, y, cb, cr;
    r = 18'(video_in.rgb[23:16]);
    g = 18'(video_in.rgb[15:8]);
    b = 18'(video_in.rgb[7:0]);
    if (YCBCR) begin
      y  = ( 18'sd77 * r + 18'sd150 * g + 18'sd29 * b) >>> 8;
      cb = ((-18'sd43 * r - 18'sd85 * g + 18'sd128 * b) >>> 8) + 18'sd128;
      cr = (( 18'sd128 * r - 18'sd107 * g - 18'sd21 * b) >>> 8) + 18'sd128;
      c0 = y[7:0];
      c1 = (cb > 18'sd255) ? 8'd255 : (cb < 0) ? 8'd0 : cb[7:0];
      c2 = (cr > 18'sd255) ? 8'd255 : (cr < 0) ? 8'd0 : cr[7:0];
    end else begin
      c0 = video_in.rgb[23:16];
      c1 = video_in.rgb[15:8];
      c2 = video_in.rgb[7:0];
    end
    skin = c0 >= tmin_q[23:16] && c0 <= tmax_q[23:16] &&
           c1 >= tmin_q[15:8]  && c1 <= tmax_q[15:8]  &&
           c2 >= tmin_q[7:0]   && c2 <= tmax_q[7:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) video_out <= '0;
    else begin
      video_out <= video_in;
      if (en_q) video_out.cls[0] <= video_in.valid && skin;
    end
  end
endmodule
