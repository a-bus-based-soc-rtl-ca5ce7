// tb_skin_color_detect: self-checking test of the skin colour detector,
// YCbCr and RGB variants. Streams random pixels, checks the class bit one
// cycle later against a reference classification computed here, checks
// that colour and flags pass unchanged, and that a new template written
// over the ReCoBus takes effect.
module tb_skin_color_detect;
  import rcb_pkg::*;
  logic clk = 0, rst_n = 0;
  logic sel = 0;
  rcb_op_e op = RCB_IDLE;
  logic [7:0] off = '0;
  logic [55:0] din = '0, dout_y, dout_r;
  video_t vin = '0, vout_y, vout_r;
  logic [23:0] tmin_y = {8'd0, 8'd77, 8'd133}, tmax_y = {8'd255, 8'd127, 8'd173};
  int checks = 0, failures = 0, skins = 0;

  skin_color_detect #(.YCBCR(1'b1)) dut_y (.clk, .rst_n, .sel, .op, .off, .din, .dout(dout_y), .video_in(vin), .video_out(vout_y));
  skin_color_detect #(.YCBCR(1'b0)) dut_r (.clk, .rst_n, .sel, .op, .off, .din, .dout(dout_r), .video_in(vin), .video_out(vout_r));

  always #5 clk = ~clk;
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  function automatic logic in_box(int a, int b, int c, logic [23:0] lo, logic [23:0] hi);
    return a >= lo[23:16] && a <= hi[23:16] && b >= lo[15:8] && b <= hi[15:8] && c >= lo[7:0] && c <= hi[7:0];
  endfunction
  function automatic int clamp(int v);
    return v < 0 ? 0 : v > 255 ? 255 : v;
  endfunction
  function automatic int fdiv(int v);  // floor division by 256
    return (v >= 0) ? v / 256 : -((-v + 255) / 256);
  endfunction
  function automatic logic ref_y(logic [23:0] p, logic [23:0] lo, logic [23:0] hi);
    int r = p[23:16], g = p[15:8], b = p[7:0];
    int y = fdiv(77*r + 150*g + 29*b);
    int cb = clamp(fdiv(-43*r - 85*g + 128*b) + 128);
    int cr = clamp(fdiv(128*r - 107*g - 21*b) + 128);
    return in_box(y, cb, cr, lo, hi);
  endfunction

  task automatic stream(int n, logic [23:0] lo, logic [23:0] hi, logic [23:0] rlo, logic [23:0] rhi);
    for (int t = 0; t < n; t++) begin
      video_t v;
      logic ey, er;
      @(negedge clk);
      v = video_t'({$urandom, $urandom});
      v.valid = 1;
      // bias towards skin tones
      if (t % 2 == 0) v.rgb = {8'(150 + $urandom % 100), 8'(80 + $urandom % 60), 8'(60 + $urandom % 60)};
      vin = v;
      ey = ref_y(v.rgb, lo, hi);
      er = in_box(v.rgb[23:16], v.rgb[15:8], v.rgb[7:0], rlo, rhi);
      @(negedge clk);
      checks += 4;
      if (vout_y.cls[0] !== ey) begin failures++; $display("YCbCr class of %h: %b exp %b", v.rgb, vout_y.cls[0], ey); end
      if (vout_r.cls[0] !== er) begin failures++; $display("RGB class of %h: %b exp %b", v.rgb, vout_r.cls[0], er); end
      if (vout_y.rgb !== v.rgb || vout_y.cls[7:1] !== v.cls[7:1]) begin failures++; $display("colour changed"); end
      if (vout_y.sof !== v.sof || vout_y.eol !== v.eol) begin failures++; $display("flags changed"); end
      if (ey) skins++;
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    stream(400, tmin_y, tmax_y, {8'd95, 8'd40, 8'd20}, 24'hFFFFFF);
    // new template over the bus, read back
    @(negedge clk); sel = 1; op = RCB_WRITE; off = 0; din = 56'({8'd40, 8'd90, 8'd140});
    @(negedge clk); off = 1; din = 56'({8'd200, 8'd120, 8'd165});
    @(negedge clk); op = RCB_READ; off = 1; #1;
    checks++; if (dout_y[23:0] !== {8'd200, 8'd120, 8'd165}) begin failures++; $display("readback"); end
    @(negedge clk); sel = 0; op = RCB_IDLE;
    // both instances got the same template
    stream(400, {8'd40, 8'd90, 8'd140}, {8'd200, 8'd120, 8'd165}, {8'd40, 8'd90, 8'd140}, {8'd200, 8'd120, 8'd165});
    checks++; if (skins == 0) begin failures++; $display("no skin pixel seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
