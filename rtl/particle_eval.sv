// particle_eval: particle evaluation co-processor of the region tracker.
//
// The CPU keeps the particle set in memory, two words per particle:
// {y[31:16], x[15:0]} followed by the weight. After a start command the
// module, a ReCoBus master, first loads the states of all particles into
// its local buffer with read bursts. It then evaluates the particles one by
// one: for each it reads the 9x9 image region centred on the particle
// (one read burst per row, clipped at the image border) from the stored
// frame, counts the pixels whose classification bit 0 is set (skin), and
// writes that count back as the particle's weight. When all are done it
// raises its interrupt line and sets its done flag.
//
// Registers on the ReCoBus (offset): 0 particle array base, 1 number of
// particles (at most MAX_PART), 2 image base (frame of 32-bit pixels,
// FW per row), 3 control: write bit 0 = start, bit 1 = clear done;
// read {busy[1], done[0]}, 4 cycles taken by the last run.
//
// The local particle buffer, the sequential evaluation, the 9x9 region and
// the skin-pixel count as weight follow the document; the memory layout of
// the particle set, the register layout and the row-wise bursts are this
// design's. The buffer holds MAX_PART = 1024 particles, enough for the
// 1000-particle set the document evaluates.
module particle_eval
  import rcb_pkg::*;
#(
  parameter int unsigned W        = 7,
  parameter int unsigned FW       = FRAME_W,
  parameter int unsigned FH       = FRAME_H,
  parameter int unsigned MAX_PART = 1024,
  parameter int unsigned REGION   = 9
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              sel,
  input  rcb_op_e           op,
  input  logic [OFF_BITS-1:0] off,
  input  logic [W*SLOT_BITS-1:0] din,
  output logic [W*SLOT_BITS-1:0] dout,
  output logic              req,
  output logic              irq
);
  localparam int unsigned PA = $clog2(MAX_PART);
  localparam int unsigned HR = REGION / 2;

  typedef enum logic [3:0] {
    S_IDLE, S_LREQ, S_LDATA, S_EREAD, S_EINIT, S_RREQ, S_RDATA, S_WREQ, S_WDATA
  } state_e;
  state_e st_q;

  logic [AW-1:0] pbase_q, ibase_q;
  logic [PA:0]   num_q, li_q, i_q;
  logic          done_q;
  logic [31:0]   cyc_q, run_q;
  logic [DW-1:0] pbuf [MAX_PART];
  logic [DW-1:0] pstate_q;
  logic [8:0]    wcnt_q;                 // word index inside a load burst
  logic [15:0]   row_q, row1_q, col0_q, col1_q;
  logic [7:0]    cnt_q;

  // master port
  logic [BUS_BITS-1:0] mdout;
  logic          granted, cmd_valid, cmd_ready, cmd_write, wbeat, rvalid, mdone;
  logic [AW-1:0] cmd_addr;
  logic [7:0]    cmd_len;
  logic [DW-1:0] rdata;

  rcb_master_port u_mport (
    .clk(clk), .rst_n(rst_n), .sel(sel), .op(op), .off(off),
    .din(din[BUS_BITS-1:0]), .dout(mdout), .granted(granted), .req(req),
    .cmd_valid(cmd_valid), .cmd_ready(cmd_ready), .cmd_write(cmd_write),
    .cmd_addr(cmd_addr), .cmd_len(cmd_len),
    .wdata(DW'(cnt_q)), .wbeat(wbeat),
    .rdata(rdata), .rvalid(rvalid), .done(mdone)
  );

  logic [PA:0] left;
  logic [8:0]  lwords;
  assign left   = num_q - li_q;
  assign lwords = (left > (PA+1)'(128)) ? 9'd256 : 9'({left, 1'b0});

  always_comb begin
    cmd_valid = 1'b0;
    cmd_write = 1'b0;
    cmd_addr  = '0;
    cmd_len   = '0;
    unique case (st_q)
      S_LREQ: begin
        cmd_valid = 1'b1;
        cmd_addr  = pbase_q + AW'({li_q, 3'b000});
        cmd_len   = 8'(lwords - 9'd1);
      end
      S_RREQ: begin
        cmd_valid = 1'b1;
        cmd_addr  = ibase_q + AW'({32'(row_q) * 32'(FW) + 32'(col0_q), 2'b00});
        cmd_len   = 8'(col1_q - col0_q);
      end
      S_WREQ: begin
        cmd_valid = 1'b1;
        cmd_write = 1'b1;
        cmd_addr  = pbase_q + AW'({i_q, 3'b100});
        cmd_len   = 8'd0;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (st_q == S_LDATA && rvalid && !wcnt_q[0])
      pbuf[PA'(li_q + (PA+1)'(wcnt_q[8:1]))] <= rdata;
    pstate_q <= pbuf[PA'(i_q)];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q <= S_IDLE;
      pbase_q <= '0; ibase_q <= '0; num_q <= '0; li_q <= '0; i_q <= '0;
      done_q <= 1'b0; cyc_q <= '0; run_q <= '0; wcnt_q <= '0;
      row_q <= '0; row1_q <= '0; col0_q <= '0; col1_q <= '0; cnt_q <= '0;
    end else begin
      if (st_q != S_IDLE) cyc_q <= cyc_q + 32'd1;
      if (sel && op == RCB_WRITE)
        unique case (off)
          8'd0: pbase_q <= din[31:0];
          8'd1: num_q   <= (din[31:0] > 32'(MAX_PART)) ? (PA+1)'(MAX_PART) : (PA+1)'(din[31:0]);
          8'd2: ibase_q <= din[31:0];
          8'd3: begin
            if (din[1]) done_q <= 1'b0;
            if (din[0] && st_q == S_IDLE) begin
              done_q <= 1'b0;
              li_q   <= '0;
              i_q    <= '0;
              cyc_q  <= '0;
              st_q   <= (num_q == 0) ? S_IDLE : S_LREQ;
              if (num_q == 0) done_q <= 1'b1;
            end
          end
          default: ;
        endcase

      unique case (st_q)
        S_LREQ: if (cmd_ready) begin
          wcnt_q <= '0;
          st_q   <= S_LDATA;
        end
        S_LDATA: begin
          if (rvalid) wcnt_q <= wcnt_q + 9'd1;
          if (mdone) begin
            li_q <= li_q + (PA+1)'(lwords[8:1]);
            st_q <= (li_q + (PA+1)'(lwords[8:1]) == num_q) ? S_EREAD : S_LREQ;
          end
        end
        S_EREAD: st_q <= S_EINIT;       // buffer read of particle i_q
        S_EINIT: begin
          row_q  <= (pstate_q[31:16] < 16'(HR)) ? 16'd0 : pstate_q[31:16] - 16'(HR);
          row1_q <= (pstate_q[31:16] + 16'(HR) > 16'(FH - 1)) ? 16'(FH - 1) : pstate_q[31:16] + 16'(HR);
          col0_q <= (pstate_q[15:0] < 16'(HR)) ? 16'd0 : pstate_q[15:0] - 16'(HR);
          col1_q <= (pstate_q[15:0] + 16'(HR) > 16'(FW - 1)) ? 16'(FW - 1) : pstate_q[15:0] + 16'(HR);
          cnt_q  <= '0;
          st_q   <= S_RREQ;
        end
        S_RREQ: if (cmd_ready) st_q <= S_RDATA;
        S_RDATA: begin
          if (rvalid && rdata[24]) cnt_q <= cnt_q + 8'd1;
          if (mdone) begin
            if (row_q >= row1_q) st_q <= S_WREQ;
            else begin
              row_q <= row_q + 16'd1;
              st_q  <= S_RREQ;
            end
          end
        end
        S_WREQ: if (cmd_ready) st_q <= S_WDATA;
        S_WDATA: if (mdone) begin
          i_q <= i_q + 1'b1;
          if (i_q + 1'b1 == num_q) begin
            st_q   <= S_IDLE;
            done_q <= 1'b1;
            run_q  <= cyc_q + 32'd1;
          end else st_q <= S_EREAD;
        end
        default: ;
      endcase
    end
  end

  assign irq = done_q;

  always_comb begin
    dout = '0;
    if (granted) dout = (W*SLOT_BITS)'(mdout);
    else if (sel && op == RCB_READ)
      unique case (off)
        8'd0:    dout[31:0] = pbase_q;
        8'd1:    dout[31:0] = 32'(num_q);
        8'd2:    dout[31:0] = ibase_q;
        8'd3:    dout[31:0] = {30'd0, st_q != S_IDLE, done_q};
        8'd4:    dout[31:0] = run_q;
        default: dout = '0;
      endcase
  end
endmodule
