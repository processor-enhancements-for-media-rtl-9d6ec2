// Control block of the reconfigurable matrix ("Control (ROM)").
//
// The matrix is used like a memory: every embedded memory keeps a fixed
// address space, and processing starts when a specific address is written.
// This block decodes the memory-mapped port (chipselect, address, read,
// write, 256-bit write/read data), holds one configuration word per row and
// the number of data to process, looks up each row's predefined path in the
// fixed path table (coproc_pkg::path_rom) and runs the generic sequencer.
//
// Address = {region[3:0], index[AW-1:0]} (regions in coproc_pkg). A write to
// an operand memory region writes lane r of the data into row r's memory at
// index, so one 256-bit beat loads eight rows. A read of a memory region
// returns lane r from row r. Control region: index CTRL_CFG takes lane r as
// row r's configuration word, CTRL_COUNT takes the data count from lane 0,
// a write to CTRL_START starts the instruction and a read of it returns the
// status (lane 0: bit 0 busy, bit 1 done since last start). Memory and
// configuration accesses are ignored while busy; the bus interface stalls
// them instead. Read data is valid one cycle after read.
//
// The address map, the status layout and the ignore-while-busy rule are
// this design's choices; the fixed memory attachment, start-by-address and
// per-row configuration word follow the described design.
module matrix_ctrl
  import coproc_pkg::*;
#(
  parameter int unsigned LN    = LANES,
  parameter int unsigned W     = DATA_W,
  parameter int unsigned DEPTH = 256,
  parameter int unsigned AW    = $clog2(DEPTH),
  parameter int unsigned CAW   = AW + 4
) (
  input  logic            clk,
  input  logic            rst_n,
  // memory-mapped port
  input  logic            cs,
  input  logic [CAW-1:0]  addr,
  input  logic            read,
  input  logic            write,
  input  logic [LN*W-1:0] wdata,
  output logic [LN*W-1:0] rdata,
  // to the rows
  output row_cfg_t        cfg   [LN],
  output row_path_t       path  [LN],
  output logic            host_we,
  output logic            host_re,
  output logic [3:0]      host_sel,
  output logic [AW-1:0]   host_addr,
  input  logic [W-1:0]    row_rdata [LN],
  output logic            seq_clear,
  output logic            seq_rd,
  output logic [AW-1:0]   seq_raddr,
  // status
  output logic            busy,
  output logic            done
);

  logic [3:0]    region;
  logic [AW-1:0] index;
  logic          is_mem, is_ctrl;
  logic [AW:0]   count_q;
  logic          done_flag;
  logic          start;
  logic          rd_status_q;
  logic [1:0]    depth_max;

  assign region  = addr[CAW-1 -: 4];
  assign index   = addr[AW-1:0];
  assign is_mem  = region <= REG_RES;
  assign is_ctrl = region == REG_CTRL;

  assign host_sel  = region;
  assign host_addr = index;
  assign host_we   = cs && write && is_mem && region != REG_RES && !busy;
  assign host_re   = cs && read && is_mem && !busy;
  assign start     = cs && write && is_ctrl && index == AW'(CTRL_START) && !busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < int'(LN); r++) cfg[r] <= '0;
      count_q     <= '0;
      done_flag   <= 1'b0;
      rd_status_q <= 1'b0;
    end else begin
      if (cs && write && is_ctrl && !busy) begin
        if (index == AW'(CTRL_CFG))
          for (int r = 0; r < int'(LN); r++) cfg[r] <= row_cfg_t'(wdata[r*W +: W]);
        if (index == AW'(CTRL_COUNT))
          count_q <= wdata[AW:0];
      end
      if (start)     done_flag <= 1'b0;
      else if (done) done_flag <= 1'b1;
      if (cs && read) rd_status_q <= is_ctrl;
    end
  end

  // Predefined paths and the pipeline depth of the instruction.
  always_comb begin
    depth_max = '0;
    for (int r = 0; r < int'(LN); r++) begin
      path[r] = path_rom(cfg[r].nops);
      if (path[r].depth > depth_max) depth_max = path[r].depth;
    end
  end

  sequencer #(.AW(AW)) u_seq (
    .clk, .rst_n, .start, .count(count_q), .depth(depth_max),
    .clear(seq_clear), .rd(seq_rd), .raddr(seq_raddr), .busy, .done);

  always_comb begin
    rdata = '0;
    if (rd_status_q) begin
      rdata[0] = busy;
      rdata[1] = done_flag || done;   // also in the cycle busy falls
    end else begin
      for (int r = 0; r < int'(LN); r++) rdata[r*W +: W] = row_rdata[r];
    end
  end

endmodule
