// npi_mem_model: behavioural model of a memory controller's native port
// with an attached memory, for simulation only.
//
// Write words are pushed into a write FIFO; an acknowledged write request
// moves size+1 words from the FIFO into memory. An acknowledged read
// request delivers size+1 words into the read FIFO, the first LAT cycles
// after the request, then one per cycle. The address request is
// acknowledged one cycle after it is seen. mem[] is word-addressed
// (byte address / 4, modulo WORDS) and may be read and preloaded by the
// testbench.
module npi_mem_model #(
  parameter int unsigned WORDS = 1 << 20,
  parameter int unsigned LAT   = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        npi_addr_req,
  output logic        npi_addr_ack,
  input  logic [31:0] npi_addr,
  input  logic        npi_rnw,
  input  logic [7:0]  npi_size,
  input  logic        npi_wr_push,
  input  logic [31:0] npi_wr_data,
  output logic        npi_wr_full,
  input  logic        npi_rd_pop,
  output logic [31:0] npi_rd_data,
  output logic        npi_rd_empty
);
  logic [31:0] mem [WORDS];
  logic [31:0] wq[$];
  logic [31:0] rq[$];
  longint      rt[$];
  longint      cyc = 0;
  int          errors = 0;
  int          requests = 0;

  initial npi_addr_ack = 1'b0;

  assign npi_wr_full  = wq.size() >= 64;
  assign npi_rd_empty = !(rq.size() > 0 && rt[0] <= cyc);
  assign npi_rd_data  = (rq.size() > 0) ? rq[0] : 32'd0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && npi_wr_push) wq.push_back(npi_wr_data);
    if (npi_rd_pop && rq.size() > 0) begin
      void'(rq.pop_front());
      void'(rt.pop_front());
    end
    npi_addr_ack <= 1'b0;
    if (rst_n && npi_addr_req && !npi_addr_ack) begin
      npi_addr_ack <= 1'b1;
      requests++;
      for (int i = 0; i <= int'(npi_size); i++) begin
        automatic int unsigned a = ((npi_addr >> 2) + i) % WORDS;
        if (npi_rnw) begin
          rq.push_back(mem[a]);
          rt.push_back(cyc + LAT + i);
        end else if (wq.size() > 0) begin
          mem[a] = wq.pop_front();
        end else begin errors++; if (errors < 3) $display("model: write of %0d words at %h finds %0d in FIFO (word %0d)", npi_size+1, npi_addr, wq.size(), i); end
      end
    end
  end
endmodule
