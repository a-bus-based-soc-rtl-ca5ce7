// request_switch: separates the ReCoBus request lines into interrupts and
// bus requests.
//
// A request wire of a macro may be used by its module as an interrupt or as
// a bus request. Two mask registers, written by the CPU, say which: a line
// whose bit is set in irq_mask is forwarded as an interrupt, one whose bit
// is set in busreq_mask goes to the arbiter. A line in neither mask is
// ignored. Interrupts are additionally latched in a pending register that
// the CPU clears by writing ones (irq_clr), so a short pulse is not lost.
//
// The mask registers come from the document; the pending/clear register is
// this design's addition. Masks load on the clock edge; outputs follow the
// request lines combinationally (bus requests) or after one edge (pending).
module request_switch #(
  parameter int unsigned NREQ = rcb_pkg::NUM_REQ
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            irq_mask_we,
  input  logic            req_mask_we,
  input  logic [NREQ-1:0] mask_wdata,
  input  logic            irq_clr_we,
  input  logic [NREQ-1:0] requests,
  output logic [NREQ-1:0] bus_req,
  output logic [NREQ-1:0] irq_pending,
  output logic            irq,
  output logic [NREQ-1:0] irq_mask,
  output logic [NREQ-1:0] req_mask
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      irq_mask    <= '0;
      req_mask    <= '0;
      irq_pending <= '0;
    end else begin
      if (irq_mask_we) irq_mask <= mask_wdata;
      if (req_mask_we) req_mask <= mask_wdata;
      irq_pending <= (irq_pending & ~(irq_clr_we ? mask_wdata : '0))
                     | (requests & irq_mask);
    end
  end

  assign bus_req = requests & req_mask;
  assign irq     = |irq_pending;
endmodule
