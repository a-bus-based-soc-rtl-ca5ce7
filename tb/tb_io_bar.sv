// tb_io_bar: self-checking test of an I/O bar.
// Random slot enables and module words; checks that every slot sees the
// word of the nearest enabled slot to its left (or the bar input) and that
// the bar output is the last such word.
module tb_io_bar;
  import rcb_pkg::*;
  video_t bar_in, bar_out;
  logic [NUM_SLOTS-1:0] mod_en;
  video_t [NUM_SLOTS-1:0] mod_data, slot_in;
  int checks = 0, failures = 0;

  io_bar dut (.*);

  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    for (int t = 0; t < 300; t++) begin
      video_t cur;
      bar_in = video_t'({$urandom, $urandom});
      mod_en = NUM_SLOTS'($urandom) & NUM_SLOTS'($urandom);
      for (int s = 0; s < NUM_SLOTS; s++) mod_data[s] = video_t'({$urandom, $urandom});
      #1;
      cur = bar_in;
      for (int s = 0; s < NUM_SLOTS; s++) begin
        checks++;
        if (slot_in[s] !== cur) begin failures++; $display("slot %0d input wrong", s); end
        if (mod_en[s]) cur = mod_data[s];
      end
      checks++;
      if (bar_out !== cur) begin failures++; $display("bar output wrong"); end
      #9;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
