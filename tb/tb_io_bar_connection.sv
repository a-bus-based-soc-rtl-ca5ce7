// tb_io_bar_connection: self-checking test of the static I/O bar
// multiplexers. Random source selections and inputs; checks each bar start
// and IO_out one cycle later against the selected source.
module tb_io_bar_connection;
  import rcb_pkg::*;
  logic clk = 0, rst_n = 0, cfg_we = 0;
  logic [2:0] cfg_idx = '0, cfg_src = '0;
  video_t io_in = '0, io_out;
  video_t [3:0] bar_end = '0, bar_start;
  int src [5];
  int checks = 0, failures = 0;

  io_bar_connection dut (.*);

  always #5 clk = ~clk;
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  function automatic video_t pick(int s, video_t i, video_t [3:0] e);
    return (s == 0) ? i : e[s-1];
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 5; i++) src[i] = 0;
    for (int t = 0; t < 300; t++) begin
      video_t i_s; video_t [3:0] e_s;
      @(negedge clk);
      if (t % 10 == 0) begin
        cfg_idx = 3'($urandom % 5); cfg_src = 3'($urandom % 5); cfg_we = 1;
        src[cfg_idx] = int'(cfg_src);
        @(negedge clk); cfg_we = 0;
      end
      io_in = video_t'({$urandom, $urandom});
      for (int b = 0; b < 4; b++) bar_end[b] = video_t'({$urandom, $urandom});
      i_s = io_in; e_s = bar_end;
      @(negedge clk);
      for (int b = 0; b < 4; b++) begin
        checks++;
        if (bar_start[b] !== pick(src[b], i_s, e_s)) begin failures++; $display("bar %0d source wrong", b); end
      end
      checks++;
      if (io_out !== pick(src[4], i_s, e_s)) begin failures++; $display("IO_out source wrong"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
