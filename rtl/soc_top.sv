// Media coprocessor system: a CPU tightly coupled with a reconfigurable
// matrix of 8 x 3 processing elements, a DMA controller and RAM, joined by
// a 256-bit bus module.
//
// The CPU core itself is not part of this RTL: its instruction and data
// masters are ports (cpu_i_*, cpu_d_*) that a processor core, or a
// testbench acting as one, drives with the bus protocol of coproc_pkg.
// Typical use: the CPU writes operand data to RAM, programs the DMA to copy
// it into the matrix memories (bus address region SEL_COPROC), writes the
// row configuration words and the data count, writes the start address,
// waits for coproc_irq (or polls the status), and has the DMA copy the
// result memory back to RAM. The CPU stays free while the DMA and the matrix
// work. dma_irq and coproc_irq pulse when a transfer or an instruction ends.
//
// Block structure follows the described system; bus protocol, address map,
// RAM size and memory depth are this design's choices (see coproc_pkg).
module soc_top
  import coproc_pkg::*;
#(
  parameter int unsigned RAM_DEPTH  = 1024,
  parameter int unsigned MEM_DEPTH  = 256,
  parameter int unsigned FIFO_DEPTH = 4
) (
  input  logic     clk,
  input  logic     rst_n,
  input  bus_req_t cpu_i_req,
  output bus_rsp_t cpu_i_rsp,
  input  bus_req_t cpu_d_req,
  output bus_rsp_t cpu_d_rsp,
  output logic     dma_irq,
  output logic     coproc_irq,
  output logic     coproc_busy
);

  localparam int unsigned RAW = $clog2(RAM_DEPTH);
  localparam int unsigned MAW = $clog2(MEM_DEPTH);
  localparam int unsigned CAW = MAW + 4;

  bus_req_t m_req [4];
  bus_rsp_t m_rsp [4];
  bus_req_t s_req [3];
  bus_rsp_t s_rsp [3];

  assign m_req[0]  = cpu_i_req;
  assign cpu_i_rsp = m_rsp[0];
  assign m_req[1]  = cpu_d_req;
  assign cpu_d_rsp = m_rsp[1];

  bus_module #(.NM(4), .NS(3)) u_bus (.clk, .rst_n, .m_req, .m_rsp, .s_req, .s_rsp);

  // RAM
  logic             ram_we, ram_re;
  logic [RAW-1:0]   ram_addr;
  logic [BUS_W-1:0] ram_wdata, ram_rdata;

  ram_if #(.AW(RAW)) u_ram_if (
    .clk, .rst_n, .s_req(s_req[SEL_RAM]), .s_rsp(s_rsp[SEL_RAM]),
    .ram_we, .ram_re, .ram_addr, .ram_wdata, .ram_rdata);

  ram #(.W(BUS_W), .DEPTH(RAM_DEPTH)) u_ram (
    .clk, .we(ram_we), .re(ram_re), .addr(ram_addr), .wdata(ram_wdata), .rdata(ram_rdata));

  // DMA controller: masters 2 (read) and 3 (write)
  dma_ctrl #(.FIFO_DEPTH(FIFO_DEPTH)) u_dma (
    .clk, .rst_n, .s_req(s_req[SEL_DMA]), .s_rsp(s_rsp[SEL_DMA]),
    .rd_req(m_req[2]), .rd_rsp(m_rsp[2]), .wr_req(m_req[3]), .wr_rsp(m_rsp[3]),
    .irq(dma_irq));

  // Coprocessor
  logic             cp_cs, cp_rd, cp_wr;
  logic [CAW-1:0]   cp_addr;
  logic [BUS_W-1:0] cp_wdata, cp_rdata;

  coproc_if #(.AW(MAW)) u_cp_if (
    .clk, .rst_n, .s_req(s_req[SEL_COPROC]), .s_rsp(s_rsp[SEL_COPROC]),
    .chipselect(cp_cs), .address(cp_addr), .read(cp_rd), .write(cp_wr),
    .write_data(cp_wdata), .read_data(cp_rdata), .busy(coproc_busy));

  rmx #(.DEPTH(MEM_DEPTH)) u_rmx (
    .clk, .rst_n, .chipselect(cp_cs), .address(cp_addr), .read(cp_rd), .write(cp_wr),
    .write_data(cp_wdata), .read_data(cp_rdata), .busy(coproc_busy), .done(coproc_irq));

endmodule
