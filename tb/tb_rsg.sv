// tb_rsg: self-checking test of the Reconfigurable Select Generator.
// Loads random look-up tables and checks the select for every code
// against the table bit, on both read ports (select code and module-reset
// code, driven with different codes); checks that reset clears the table.
module tb_rsg;
  logic clk = 0, rst_n = 0, cfg_we = 0, sel;
  logic [15:0] lut = '0;
  logic [3:0] code = '0, rst_code = '0;
  logic rst_sel;
  int checks = 0, failures = 0;

  rsg dut (.clk(clk), .rst_n(rst_n), .cfg_we(cfg_we), .cfg_lut(lut), .code(code), .sel(sel),
           .rst_code(rst_code), .rst_sel(rst_sel));

  always #5 clk = ~clk;
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 16; c++) begin
      code = 4'(c); #1; checks++;
      if (sel !== 1'b0) begin failures++; $display("reset table selects code %0d", c); end
    end
    for (int t = 0; t < 20; t++) begin
      logic [15:0] v;
      v = 16'($urandom);
      if (t == 0) v = 16'h0008;            // one module on code 3
      @(negedge clk); lut = v; cfg_we = 1;
      @(negedge clk); cfg_we = 0; lut = ~v; // changing the input must not matter
      for (int c = 0; c < 16; c++) begin
        code = 4'(c); rst_code = 4'(15 - c); #1; checks += 2;
        if (sel !== v[c]) begin failures++; $display("table %h code %0d sel %b", v, c, sel); end
        if (rst_sel !== v[15 - c]) begin failures++; $display("table %h reset code %0d rst_sel %b", v, 15 - c, rst_sel); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
