// DMA controller: bulk transfers between RAM and the coprocessor memories.
//
// Taking the CPU out of the data path lets it keep running, and even
// reconfigure the matrix, while operands and results move. The controller
// has a read master and a write master joined by a small FIFO, so it can
// read the source while it writes the destination (the bus arbitrates per
// slave, so a RAM-to-coprocessor copy moves about one beat per two cycles,
// limited by the two-cycle reads).
//
// Control (a bus slave, any address in the DMA region): a write with lane 0
// = source beat address, lane 1 = destination beat address and lane 2 =
// number of 256-bit beats starts a transfer; it stalls while a transfer is
// running. A read returns the status at once: lane 0 bit 0 busy, bit 1 done
// since the last start; lane 1 beats still to write. irq pulses for one
// cycle when the last beat has been written. Both addresses advance by one
// beat per transfer. The DMA controller and its two masters follow the
// described design; the register layout and the FIFO are this design's
// choices.
module dma_ctrl
  import coproc_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 4,
  parameter int unsigned LEN_W      = 17
) (
  input  logic     clk,
  input  logic     rst_n,
  input  bus_req_t s_req,
  output bus_rsp_t s_rsp,
  output bus_req_t rd_req,
  input  bus_rsp_t rd_rsp,
  output bus_req_t wr_req,
  input  bus_rsp_t wr_rsp,
  output logic     irq
);

  logic [ADDR_W-1:0] rd_addr, wr_addr;
  logic [LEN_W-1:0]  rd_left, wr_left;
  logic              busy, done_flag;
  logic              start;
  logic              f_push, f_pop, f_full, f_empty;
  logic [BUS_W-1:0]  f_dout;

  assign busy  = wr_left != '0;
  assign start = s_req.write && !busy;

  // Control slave.
  always_comb begin
    s_rsp.waitreq = s_req.write && busy;
    s_rsp.rdata   = '0;
    s_rsp.rdata[0] = busy;
    s_rsp.rdata[1] = done_flag;
    s_rsp.rdata[DATA_W +: LEN_W] = wr_left;
  end

  // Read master.
  always_comb begin
    rd_req       = '0;
    rd_req.read  = rd_left != '0 && !f_full;
    rd_req.addr  = rd_addr;
  end
  assign f_push = rd_req.read && !rd_rsp.waitreq;

  // Write master.
  always_comb begin
    wr_req       = '0;
    wr_req.write = !f_empty;
    wr_req.addr  = wr_addr;
    wr_req.wdata = f_dout;
  end
  assign f_pop = wr_req.write && !wr_rsp.waitreq;

  sync_fifo #(.W(BUS_W), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n, .push(f_push), .din(rd_rsp.rdata), .pop(f_pop),
    .dout(f_dout), .full(f_full), .empty(f_empty));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_addr   <= '0;
      wr_addr   <= '0;
      rd_left   <= '0;
      wr_left   <= '0;
      done_flag <= 1'b0;
      irq       <= 1'b0;
    end else begin
      irq <= 1'b0;
      if (start) begin
        rd_addr   <= s_req.wdata[0 +: ADDR_W];
        wr_addr   <= s_req.wdata[DATA_W +: ADDR_W];
        rd_left   <= s_req.wdata[2*DATA_W +: LEN_W];
        wr_left   <= s_req.wdata[2*DATA_W +: LEN_W];
        done_flag <= 1'b0;
      end else begin
        if (f_push) begin
          rd_addr <= rd_addr + 1'b1;
          rd_left <= rd_left - 1'b1;
        end
        if (f_pop) begin
          wr_addr <= wr_addr + 1'b1;
          wr_left <= wr_left - 1'b1;
          if (wr_left == LEN_W'(1)) begin
            irq       <= 1'b1;
            done_flag <= 1'b1;
          end
        end
      end
    end
  end

  // The FIFO never holds more beats than remain to be written.
  assert property (@(posedge clk) disable iff (!rst_n) !busy |-> f_empty);

endmodule
