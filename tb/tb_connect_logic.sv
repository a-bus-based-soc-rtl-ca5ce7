// tb_connect_logic: self-checking test of the connect logic.
// Random macro selects, ops and chain values; checks that only the
// selected macro sees the op, that the read chains come from it and that
// the request bundles are merged in macro order.
module tb_connect_logic;
  import rcb_pkg::*;
  logic [1:0] macro_sel;
  rcb_op_e op;
  logic [MADDR_BITS-1:0] maddr;
  logic [INTERLEAVE-1:0][SLOT_BITS-1:0] wchain, rchain;
  logic [15:0] requests;
  rcb_op_e [3:0] m_op;
  logic [3:0][MADDR_BITS-1:0] m_maddr;
  logic [3:0][INTERLEAVE-1:0][SLOT_BITS-1:0] m_wchain, m_rchain;
  logic [3:0][REQ_WIRES-1:0] m_req;
  int checks = 0, failures = 0;

  connect_logic dut (.*);

  task automatic chk(input logic [63:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("%s: got %h exp %h", what, got, exp); end
  endtask

  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    for (int t = 0; t < 300; t++) begin
      macro_sel = 2'($urandom);
      op = rcb_op_e'($urandom % 4);
      maddr = 12'($urandom);
      wchain = {$urandom, $urandom};
      for (int m = 0; m < 4; m++) begin
        m_rchain[m] = {$urandom, $urandom};
        m_req[m] = 4'($urandom);
      end
      #1;
      for (int m = 0; m < 4; m++) begin
        chk(64'(m_op[m]), 64'((m == int'(macro_sel)) ? op : RCB_IDLE), $sformatf("op macro %0d", m));
        chk(64'(m_wchain[m]), 64'(wchain), "wchain");
        chk(64'(m_maddr[m]), 64'(maddr), "maddr");
        chk(64'(requests[4*m +: 4]), 64'(m_req[m]), "requests");
      end
      chk(64'(rchain), 64'(m_rchain[macro_sel]), "rchain");
      #9;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
