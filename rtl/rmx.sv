// Reconfigurable matrix (8 rows x 3 PEs) of the media coprocessor.
//
// Eight independent rows process eight data streams in parallel, each row
// chaining up to three operations (multiply, add, subtract, accumulate) on
// 32-bit data read from its own embedded memories. The 256-bit data port
// carries one word per row, so one bus beat loads or unloads a whole column
// of the matrix. The control block decodes the memory-mapped port, holds the
// configuration and runs the sequencer that streams all rows in lock step.
//
// Port timing: chipselect with write is taken in one cycle; read data is
// valid one cycle after chipselect with read. busy is high while an
// instruction runs (count + depth + 1 cycles after the start write); done
// pulses once at the end. Row count, chain length and widths follow the
// described design; the memory depth (DEPTH) is this design's choice.
module rmx
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
  input  logic            chipselect,
  input  logic [CAW-1:0]  address,
  input  logic            read,
  input  logic            write,
  input  logic [LN*W-1:0] write_data,
  output logic [LN*W-1:0] read_data,
  output logic            busy,
  output logic            done
);

  row_cfg_t      cfg  [LN];
  row_path_t     path [LN];
  logic          host_we, host_re;
  logic [3:0]    host_sel;
  logic [AW-1:0] host_addr;
  logic [W-1:0]  row_rdata [LN];
  logic          seq_clear, seq_rd;
  logic [AW-1:0] seq_raddr;

  matrix_ctrl #(.LN(LN), .W(W), .DEPTH(DEPTH)) u_ctrl (
    .clk, .rst_n, .cs(chipselect), .addr(address), .read, .write,
    .wdata(write_data), .rdata(read_data), .cfg, .path,
    .host_we, .host_re, .host_sel, .host_addr, .row_rdata,
    .seq_clear, .seq_rd, .seq_raddr, .busy, .done);

  for (genvar r = 0; r < int'(LN); r++) begin : g_row
    pe_row #(.W(W), .DEPTH(DEPTH)) u_row (
      .clk, .rst_n, .cfg(cfg[r]), .path(path[r]),
      .host_we, .host_wsel(host_sel), .host_addr, .host_wdata(write_data[r*W +: W]),
      .host_re, .host_rsel(host_sel), .host_rdata(row_rdata[r]),
      .seq_clear, .seq_rd, .seq_raddr);
  end

endmodule
