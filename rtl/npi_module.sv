// npi_module: direct burst path from ReCoBus masters to the memory
// controller's native port interface (NPI).
//
// Bursts arriving from the bridge switch bypass the PLB and go straight to
// the memory controller, one 32-bit word per cycle when the memory keeps
// up. A burst of up to 256 words is cut into NPI transfers of at most
// MAX_XFER words. For a write transfer the words are first pushed into the
// controller's write FIFO, then the address request is raised until it is
// acknowledged (the controller wants the data in its FIFO before the
// request). For a read transfer the address request comes first and the
// words are popped from the controller's read FIFO as they arrive.
//
// Burst port: valid/ready handshakes as in bridge_switch. NPI port:
// addr_req/addr_ack, addr, rnw, size (words minus one) and the write/read
// FIFO push, pop, full and empty signals.
//
// The document says only that this module gives masters high-speed memory
// access without the PLB; the transfer split and the NPI signal set are
// this design's (modelled on a typical multi-port memory controller).
module npi_module
  import rcb_pkg::*;
#(
  parameter int unsigned MAX_XFER = 32
) (
  input  logic          clk,
  input  logic          rst_n,
  // burst port from the bridge switch
  input  logic          cmd_valid,
  output logic          cmd_ready,
  input  burst_cmd_t    cmd,
  input  logic          wvalid,
  output logic          wready,
  input  logic [DW-1:0] wdata,
  output logic          rvalid,
  input  logic          rready,
  output logic [DW-1:0] rdata,
  // NPI
  output logic          npi_addr_req,
  input  logic          npi_addr_ack,
  output logic [AW-1:0] npi_addr,
  output logic          npi_rnw,
  output logic [7:0]    npi_size,
  output logic          npi_wr_push,
  output logic [DW-1:0] npi_wr_data,
  input  logic          npi_wr_full,
  output logic          npi_rd_pop,
  input  logic [DW-1:0] npi_rd_data,
  input  logic          npi_rd_empty,
  output logic          busy
);
  typedef enum logic [2:0] {S_IDLE, S_WFILL, S_WREQ, S_RREQ, S_RDATA} state_e;
  state_e        st_q;
  logic          write_q;
  logic [AW-1:0] addr_q;      // address of the current transfer
  logic [8:0]    left_q;      // words of the burst not yet started
  logic [8:0]    xfer_q;      // words in the current transfer
  logic [8:0]    cnt_q;       // words of the current transfer moved
  logic [8:0]    xfer_n;

  assign xfer_n    = (left_q > 9'(MAX_XFER)) ? 9'(MAX_XFER) : left_q;
  assign cmd_ready = (st_q == S_IDLE);
  assign busy      = (st_q != S_IDLE);

  assign npi_addr     = addr_q;
  assign npi_rnw      = !write_q;
  assign npi_size     = 8'(xfer_q - 9'd1);
  assign npi_addr_req = (st_q == S_WREQ) || ((st_q == S_RREQ) && (xfer_q != 0));

  assign wready      = (st_q == S_WFILL) && !npi_wr_full;
  assign npi_wr_push = wready && wvalid;
  assign npi_wr_data = wdata;

  assign rvalid     = (st_q == S_RDATA) && !npi_rd_empty;
  assign npi_rd_pop = rvalid && rready;
  assign rdata      = npi_rd_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q    <= S_IDLE;
      write_q <= 1'b0;
      addr_q  <= '0;
      left_q  <= '0;
      xfer_q  <= '0;
      cnt_q   <= '0;
    end else begin
      unique case (st_q)
        S_IDLE: if (cmd_valid) begin
          write_q <= cmd.write;
          addr_q  <= cmd.addr;
          left_q  <= {1'b0, cmd.len} + 9'd1;
          xfer_q  <= '0;
          cnt_q   <= '0;
          st_q    <= cmd.write ? S_WFILL : S_RREQ;
          // first transfer size is taken in the next state via xfer_n
        end
        S_WFILL: begin
          if (xfer_q == 0) xfer_q <= xfer_n;
          if (npi_wr_push) begin
            cnt_q <= cnt_q + 9'd1;
            if (cnt_q + 9'd1 == ((xfer_q == 0) ? xfer_n : xfer_q)) st_q <= S_WREQ;
          end
        end
        S_WREQ: if (npi_addr_ack) begin
          left_q <= left_q - xfer_q;
          addr_q <= addr_q + AW'({xfer_q, 2'b00});
          cnt_q  <= '0;
          xfer_q <= '0;
          st_q   <= (left_q == xfer_q) ? S_IDLE : S_WFILL;
        end
        S_RREQ: begin
          if (xfer_q == 0) xfer_q <= xfer_n;
          else if (npi_addr_ack) st_q <= S_RDATA;
        end
        S_RDATA: if (npi_rd_pop) begin
          cnt_q <= cnt_q + 9'd1;
          if (cnt_q + 9'd1 == xfer_q) begin
            left_q <= left_q - xfer_q;
            addr_q <= addr_q + AW'({xfer_q, 2'b00});
            cnt_q  <= '0;
            xfer_q <= '0;
            st_q   <= (left_q == xfer_q) ? S_IDLE : S_RREQ;
          end
        end
        default: st_q <= S_IDLE;
      endcase
    end
  end

  // the address request is held until it is acknowledged
  assert property (@(posedge clk) disable iff (!rst_n)
                   (npi_addr_req && !npi_addr_ack) |=> npi_addr_req);
endmodule
