// tb_adapt_alignment: self-checking test of the alignment logic.
// Loads an alignment register for every module select, then checks for
// random data that aligned byte k is read from chain (first + k) mod 6 and
// written to the same chain.
module tb_adapt_alignment;
  import rcb_pkg::*;
  logic clk = 0, rst_n = 0, cfg_we = 0;
  logic [5:0] cfg_idx = '0, module_select = '0;
  logic [2:0] cfg_first = '0;
  logic [INTERLEAVE-1:0][SLOT_BITS-1:0] rchain = '0, wchain;
  logic [47:0] rdata, wdata = '0;
  int first_of [64];
  int checks = 0, failures = 0;

  adapt_alignment dut (.*);

  always #5 clk = ~clk;
  initial begin #400000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 64; i++) begin
      @(negedge clk);
      first_of[i] = $urandom % 6;
      cfg_idx = 6'(i); cfg_first = 3'(first_of[i]); cfg_we = 1;
    end
    @(negedge clk); cfg_we = 0;
    for (int t = 0; t < 500; t++) begin
      int f;
      module_select = 6'($urandom);
      f = first_of[module_select];
      rchain = {$urandom, $urandom};
      wdata  = {$urandom, $urandom};
      #1;
      for (int k = 0; k < 6; k++) begin
        checks += 2;
        if (rdata[8*k +: 8] !== rchain[(f + k) % 6]) begin
          failures++; $display("read: sel %0d first %0d byte %0d", module_select, f, k);
        end
        if (wchain[(f + k) % 6] !== wdata[8*k +: 8]) begin
          failures++; $display("write: sel %0d first %0d byte %0d", module_select, f, k);
        end
      end
      #9;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
