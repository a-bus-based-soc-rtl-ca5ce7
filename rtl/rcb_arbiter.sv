// rcb_arbiter: bus arbiter of the PLB/RCB bridge.
//
// Two kinds of users compete for the ReCoBus: the CPU, whose PLB accesses
// arrive at the bridge, and ReCoBus master modules. CPU accesses have
// priority: a PLB request is granted at once, even while a master owns the
// bus; the master's transfer is then stalled (m_stall) until the PLB access
// is done, and resumes afterwards. Without this, a CPU access to a module
// and a module's access to the CPU sub-system could wait for each other.
// Among masters the grant rotates round robin: the search for the next
// master starts after the one granted last.
//
// Interface: plb_req is held until plb_done pulses; a master's bus request
// only needs to be high when the bus is free, m_gnt stays high until
// m_done pulses. Grants are registered: they rise the edge after the
// request is seen.
//
// PLB priority, round robin among masters and stalling follow the
// document; the handshake is this design's.
module rcb_arbiter #(
  parameter int unsigned NREQ = rcb_pkg::NUM_REQ
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    plb_req,
  input  logic                    plb_done,
  input  logic [NREQ-1:0]         m_req,
  input  logic                    m_done,
  output logic                    plb_gnt,
  output logic                    m_gnt,
  output logic [$clog2(NREQ)-1:0] m_idx,
  output logic                    m_stall
);
  localparam int unsigned IW = $clog2(NREQ);
  logic [IW-1:0] last_q;
  logic          found;
  logic [IW-1:0] next_idx;

  // round robin: first requesting master after last_q
  always_comb begin
    found    = 1'b0;
    next_idx = '0;
    for (int k = 1; k <= NREQ; k++) begin
      automatic int unsigned i = (int'(last_q) + k) % NREQ;
      if (!found && m_req[i]) begin
        found    = 1'b1;
        next_idx = IW'(i);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      plb_gnt <= 1'b0;
      m_gnt   <= 1'b0;
      m_idx   <= '0;
      last_q  <= IW'(NREQ - 1);
    end else begin
      if (plb_gnt && plb_done)   plb_gnt <= 1'b0;
      else if (plb_req)          plb_gnt <= 1'b1;

      if (m_gnt && m_done)       m_gnt <= 1'b0;
      else if (!m_gnt && !plb_gnt && !plb_req && found) begin
        m_gnt  <= 1'b1;
        m_idx  <= next_idx;
        last_q <= next_idx;
      end
    end
  end

  assign m_stall = m_gnt && plb_gnt;

  // a master transfer can only end while it is not stalled
  assert property (@(posedge clk) disable iff (!rst_n) m_done |-> (m_gnt && !m_stall));
endmodule
