// tb_rcb_host: behavioural stand-in for the bridge side of a ReCoBus, as
// seen by one module, for simulation only.
//
// It performs register accesses on request (acc_req held until acc_ack)
// and serves the module's master requests with a word memory mem[]
// (byte address / 4, modulo WORDS): it takes the 48-bit header, then moves
// one word per beat, inserting random MST_WAIT cycles when STALLS is set.
// Counters: bursts, beats and waits served.
module tb_rcb_host
  import rcb_pkg::*;
#(
  parameter int unsigned W      = 6,
  parameter int unsigned WORDS  = 1 << 20,
  parameter bit          STALLS = 1'b1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  output logic                  sel,
  output rcb_op_e               op,
  output logic [OFF_BITS-1:0]   off,
  output logic [W*SLOT_BITS-1:0] din,
  input  logic [W*SLOT_BITS-1:0] dout,
  input  logic                  req,
  input  logic                  acc_req,
  input  logic                  acc_we,
  input  logic [OFF_BITS-1:0]   acc_off,
  input  logic [31:0]           acc_wdata,
  output logic                  acc_ack,
  output logic [31:0]           acc_rdata
);
  typedef enum {H_IDLE, H_ACC, H_HDR, H_BEAT} hst_e;
  hst_e        st = H_IDLE;
  logic [31:0] mem [WORDS];
  logic [31:0] haddr;
  logic        hwrite;
  int          hlen, cnt;
  logic        wait_now = 1'b0;
  int          bursts = 0, beats = 0, waits = 0;

  initial begin acc_ack = 1'b0; acc_rdata = '0; end

  always_comb begin
    sel = 1'b0; op = RCB_IDLE; off = '0; din = '0;
    unique case (st)
      H_ACC: begin
        sel = 1'b1; op = acc_we ? RCB_WRITE : RCB_READ; off = acc_off;
        din = (W*SLOT_BITS)'(acc_wdata);
      end
      H_HDR: begin sel = 1'b1; op = RCB_GRANT; off = OFF_BITS'(MST_HDR); end
      H_BEAT: begin
        sel = 1'b1; op = RCB_GRANT;
        off = wait_now ? OFF_BITS'(MST_WAIT) : hwrite ? OFF_BITS'(MST_WBEAT) : OFF_BITS'(MST_RBEAT);
        din = (W*SLOT_BITS)'(mem[((haddr >> 2) + cnt) % WORDS]);
      end
      default: ;
    endcase
  end

  always @(posedge clk) begin
    acc_ack <= 1'b0;
    wait_now <= STALLS && ($urandom % 4 == 0);
    if (!rst_n) st <= H_IDLE;
    else unique case (st)
      H_IDLE: if (acc_req && !acc_ack) st <= H_ACC;
              else if (req) st <= H_HDR;
      H_ACC: begin
        acc_rdata <= dout[31:0];
        acc_ack   <= 1'b1;
        st        <= H_IDLE;
      end
      H_HDR: begin
        haddr  <= dout[31:0];
        hwrite <= dout[40];
        hlen   <= int'(dout[39:32]);
        cnt    <= 0;
        bursts <= bursts + 1;
        st     <= H_BEAT;
      end
      H_BEAT: begin
        if (wait_now) waits <= waits + 1;
        else begin
          beats <= beats + 1;
          if (hwrite) mem[((haddr >> 2) + cnt) % WORDS] <= dout[31:0];
          cnt <= cnt + 1;
          if (cnt == hlen) st <= H_IDLE;
        end
      end
      default: st <= H_IDLE;
    endcase
  end
endmodule
