// rcb_master_port: module-side ReCoBus master interface.
//
// A master module hands a burst command (read or write, byte address,
// length) to this port. The port raises the module's request wire and
// waits for the bridge to grant it: the bridge selects the module with op
// RCB_GRANT and phase MST_HDR, and the port answers with the 48-bit header
// {control, address}, using all six interleaved chains. The request is
// dropped once the header is taken. Then, for a write, the bridge takes one
// word (bits 31:0) per MST_WBEAT cycle and the port pulses wbeat so the
// module presents the next word; for a read, each MST_RBEAT cycle delivers
// a word on rdata with rvalid. done pulses with the last word. MST_WAIT
// cycles (the bridge stalled for a CPU access, or the memory not ready)
// move nothing.
//
// The 48-bit master interface with 32 data bits and up to 16 control bits
// is the document's; the header-then-data sequence and the phase coding
// are this design's. Timing: cmd_ready is high only while idle; dout is
// combinational from the bus inputs.
module rcb_master_port
  import rcb_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  // bus side (module view, first slot's select)
  input  logic                sel,
  input  rcb_op_e             op,
  input  logic [OFF_BITS-1:0] off,
  input  logic [BUS_BITS-1:0] din,
  output logic [BUS_BITS-1:0] dout,
  output logic                granted,
  output logic                req,
  // user side
  input  logic                cmd_valid,
  output logic                cmd_ready,
  input  logic                cmd_write,
  input  logic [AW-1:0]       cmd_addr,
  input  logic [7:0]          cmd_len,
  input  logic [DW-1:0]       wdata,
  output logic                wbeat,
  output logic [DW-1:0]       rdata,
  output logic                rvalid,
  output logic                done
);
  typedef enum logic [1:0] {IDLE, REQ, DATA} state_e;
  state_e     st_q;
  logic       write_q;
  logic [AW-1:0] addr_q;
  logic [7:0] len_q, cnt_q;
  rcb_ctrl_t  ctrl;
  logic       hdr, beat;

  assign granted   = sel && op == RCB_GRANT;
  assign hdr       = granted && st_q == REQ  && off == OFF_BITS'(MST_HDR);
  assign wbeat     = granted && st_q == DATA && write_q  && off == OFF_BITS'(MST_WBEAT);
  assign rvalid    = granted && st_q == DATA && !write_q && off == OFF_BITS'(MST_RBEAT);
  assign beat      = wbeat || rvalid;
  assign done      = beat && cnt_q == len_q;
  assign rdata     = din[DW-1:0];
  assign cmd_ready = st_q == IDLE;
  assign req       = st_q == REQ;

  always_comb begin
    ctrl       = '0;
    ctrl.write = write_q;
    ctrl.len   = len_q;
    dout       = '0;
    if (granted) dout = (st_q == REQ) ? {ctrl, addr_q} : BUS_BITS'(wdata);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q <= IDLE; write_q <= 1'b0; addr_q <= '0; len_q <= '0; cnt_q <= '0;
    end else begin
      unique case (st_q)
        IDLE: if (cmd_valid) begin
          write_q <= cmd_write; addr_q <= cmd_addr; len_q <= cmd_len;
          cnt_q   <= '0;
          st_q    <= REQ;
        end
        REQ:  if (hdr) st_q <= DATA;
        DATA: if (beat) begin
          cnt_q <= cnt_q + 8'd1;
          if (done) st_q <= IDLE;
        end
        default: st_q <= IDLE;
      endcase
    end
  end
endmodule
