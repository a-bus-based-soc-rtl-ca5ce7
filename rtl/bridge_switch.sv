// bridge_switch: routes the memory bursts of ReCoBus masters.
//
// A burst from a ReCoBus master leaves the bridge through this switch,
// either towards the NPI module (direct, fast path to the memory
// controller) or towards the PLB master port (everything in the CPU
// sub-system). The destination is chosen from the burst address when the
// command is accepted: addresses whose top four bits equal NPI_REGION go to
// the NPI. The choice is held until the last data word of the burst has
// passed, so command and data can never be split across destinations.
//
// Port protocol (all three ports alike): valid/ready handshakes for the
// command, the write words and the read words; a word moves in a cycle
// where both are high. len is the number of words minus one.
//
// That the bridge multiplexes data and address between PLB, NPI and ReCoBus
// is the document's; the address-based rule and the handshake are this
// design's.
module bridge_switch
  import rcb_pkg::*;
#(
  parameter logic [3:0] NPI_REGION = 4'h0
) (
  input  logic          clk,
  input  logic          rst_n,
  // from the bridge master engine
  input  logic          s_cmd_valid,
  output logic          s_cmd_ready,
  input  burst_cmd_t    s_cmd,
  input  logic          s_wvalid,
  output logic          s_wready,
  input  logic [DW-1:0] s_wdata,
  output logic          s_rvalid,
  input  logic          s_rready,
  output logic [DW-1:0] s_rdata,
  // two destinations: 0 = NPI, 1 = PLB master
  output logic [1:0]          d_cmd_valid,
  input  logic [1:0]          d_cmd_ready,
  output burst_cmd_t          d_cmd,
  output logic [1:0]          d_wvalid,
  input  logic [1:0]          d_wready,
  output logic [DW-1:0]       d_wdata,
  input  logic [1:0]          d_rvalid,
  output logic [1:0]          d_rready,
  input  logic [1:0][DW-1:0]  d_rdata,
  output logic                busy
);
  logic       dst_q;     // destination of the burst in flight
  logic       write_q;
  logic [8:0] left_q;    // words still to move
  logic       dst_new;

  assign dst_new = (s_cmd.addr[AW-1 -: 4] == NPI_REGION) ? 1'b0 : 1'b1;
  assign busy    = (left_q != 0);

  // command: only when no burst is in flight
  always_comb begin
    d_cmd         = s_cmd;
    d_cmd_valid   = '0;
    d_cmd_valid[dst_new] = s_cmd_valid && !busy;
    s_cmd_ready   = d_cmd_ready[dst_new] && !busy;
  end

  // data follows the held destination
  always_comb begin
    d_wdata   = s_wdata;
    d_wvalid  = '0;
    d_rready  = '0;
    d_wvalid[dst_q] = busy && write_q && s_wvalid;
    s_wready  = busy && write_q && d_wready[dst_q];
    d_rready[dst_q] = busy && !write_q && s_rready;
    s_rvalid  = busy && !write_q && d_rvalid[dst_q];
    s_rdata   = d_rdata[dst_q];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dst_q   <= 1'b0;
      write_q <= 1'b0;
      left_q  <= '0;
    end else if (s_cmd_valid && s_cmd_ready) begin
      dst_q   <= dst_new;
      write_q <= s_cmd.write;
      left_q  <= {1'b0, s_cmd.len} + 9'd1;
    end else if ((s_wvalid && s_wready) || (s_rvalid && s_rready)) begin
      left_q  <= left_q - 9'd1;
    end
  end
endmodule
