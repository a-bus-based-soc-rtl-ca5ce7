// tb_recobus_macro: self-checking test of one ReCoBus macro.
// Places a module on slots 2..5 (select code 3) and one on slots 9..15
// (code 5) by loading their RSG tables, drives random slot outputs and
// checks the interleaved read chains, the write distribution, the
// broadcast op/offset, the slot selects and the request wire bundle
// against a reference computed here. Also checks module reset generation:
// with rst_en, exactly the slots answering to rst_code raise slot_rst, one
// clock later.
module tb_recobus_macro;
  import rcb_pkg::*;
  logic clk = 0, rst_n = 0;
  rcb_op_e op = RCB_IDLE;
  logic [MADDR_BITS-1:0] maddr = '0;
  logic [INTERLEAVE-1:0][SLOT_BITS-1:0] wchain = '0, rchain;
  logic [REQ_WIRES-1:0] req_bundle;
  logic cfg_rsg_we = 0, cfg_req_we = 0, cfg_req_en = 0;
  logic [4:0] cfg_slot = '0;
  logic [15:0] cfg_lut = '0;
  logic [1:0] cfg_req_wire = '0;
  logic rst_en = 0;
  logic [SEL_BITS-1:0] rst_code = '0;
  logic [NUM_SLOTS-1:0] slot_rst;
  logic [NUM_SLOTS-1:0] slot_sel, slot_req = '0;
  rcb_op_e slot_op;
  logic [OFF_BITS-1:0] slot_off;
  logic [NUM_SLOTS-1:0][SLOT_BITS-1:0] slot_din, slot_dout = '0;
  int checks = 0, failures = 0;

  recobus_macro dut (.*);

  always #5 clk = ~clk;
  initial begin #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic chk(input logic [63:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("%s: got %h exp %h", what, got, exp); end
  endtask

  function automatic int code_of(int s);
    if (s >= 2 && s <= 5)  return 3;
    if (s >= 9 && s <= 15) return 5;
    return -1;
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    // program the RSG tables
    for (int s = 0; s < NUM_SLOTS; s++) begin
      @(negedge clk);
      cfg_slot = 5'(s);
      cfg_lut  = (code_of(s) < 0) ? 16'h0 : 16'(1 << code_of(s));
      cfg_rsg_we = 1;
    end
    // request wiring: slot 2 -> wire 1, slot 9 -> wire 3
    @(negedge clk); cfg_rsg_we = 0;
    cfg_slot = 2; cfg_req_en = 1; cfg_req_wire = 1; cfg_req_we = 1;
    @(negedge clk); cfg_slot = 9; cfg_req_wire = 3;
    @(negedge clk); cfg_req_we = 0;

    for (int t = 0; t < 200; t++) begin
      int code;
      logic [INTERLEAVE-1:0][SLOT_BITS-1:0] exp_r;
      logic [REQ_WIRES-1:0] exp_req;
      @(negedge clk);
      code = $urandom % 8;
      op = rcb_op_e'($urandom % 4);
      maddr = {4'(code), 8'($urandom)};
      wchain = {$urandom, $urandom};
      for (int s = 0; s < NUM_SLOTS; s++) slot_dout[s] = 8'($urandom);
      slot_req = NUM_SLOTS'($urandom);
      rst_en = 1'($urandom);
      rst_code = 4'($urandom % 8);
      @(posedge clk); #1;
      for (int s = 0; s < NUM_SLOTS; s++)
        chk(64'(slot_rst[s]), 64'(rst_en && code_of(s) == int'(rst_code)), $sformatf("reset slot %0d", s));
      exp_r = '0;
      for (int s = 0; s < NUM_SLOTS; s++) begin
        logic es;
        es = (code_of(s) == code) && (op != RCB_IDLE);
        chk(64'(slot_sel[s]), 64'(es), $sformatf("sel slot %0d", s));
        chk(64'(slot_din[s]), 64'(wchain[s % 6]), $sformatf("din slot %0d", s));
        if (es) exp_r[s % 6] = exp_r[s % 6] | slot_dout[s];
      end
      chk(64'(rchain), 64'(exp_r), "read chains");
      exp_req = '0;
      if (slot_req[2]) exp_req[1] = 1'b1;
      if (slot_req[9]) exp_req[3] = 1'b1;
      chk(64'(req_bundle), 64'(exp_req), "request bundle");
      chk(64'(slot_off), 64'(maddr[7:0]), "offset");
      chk(64'(slot_op), 64'(op), "op");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
