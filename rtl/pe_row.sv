// One row of the reconfigurable matrix: three chained PEs and five
// embedded memories.
//
// Memory op1 and op2 feed PE1, op4 feeds PE2's second operand and op6
// PE3's; PE2 and PE3 take their first operand from the PE above them. The
// result memory is connected to PE1, PE2 or PE3 according to the number of
// chained operations (path.res_sel, from the control's path table), so a
// row computes e.g. y = ((op1 * op2) + op4) * op6 with three operations.
// Memory names and this connection scheme follow the described design; the
// memory depth and the write-pointer scheme are this design's choices.
//
// Host port: host_we writes host_wdata into the operand memory chosen by
// host_wsel (a coproc_pkg region number) at host_addr. host_re reads the
// memory chosen by host_rsel; host_rdata is valid the next cycle.
//
// Stream port (from the sequencer): seq_clear starts an instruction
// (clears accumulators and the result write pointer); seq_rd reads index
// seq_raddr of all operand memories. Each result is written to the result
// memory at the next free index, so result i lands at index i. A datum read
// in cycle t is written to the result memory at the end of cycle t+depth+1.
module pe_row
  import coproc_pkg::*;
#(
  parameter int unsigned W     = DATA_W,
  parameter int unsigned DEPTH = 256,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  row_cfg_t      cfg,
  input  row_path_t     path,
  input  logic          host_we,
  input  logic [3:0]    host_wsel,
  input  logic [AW-1:0] host_addr,
  input  logic [W-1:0]  host_wdata,
  input  logic          host_re,
  input  logic [3:0]    host_rsel,
  output logic [W-1:0]  host_rdata,
  input  logic          seq_clear,
  input  logic          seq_rd,
  input  logic [AW-1:0] seq_raddr
);

  logic          rd;
  logic [AW-1:0] raddr;
  logic [W-1:0]  q_op1, q_op2, q_op4, q_op6, q_res;
  logic          rd_q;
  logic [3:0]    rsel_q;

  assign rd    = seq_rd | host_re;
  assign raddr = seq_rd ? seq_raddr : host_addr;

  op_mem #(.W(W), .DEPTH(DEPTH)) u_op1 (.clk, .we(host_we && host_wsel == REG_OP1),
    .waddr(host_addr), .wdata(host_wdata), .re(rd), .raddr, .rdata(q_op1));
  op_mem #(.W(W), .DEPTH(DEPTH)) u_op2 (.clk, .we(host_we && host_wsel == REG_OP2),
    .waddr(host_addr), .wdata(host_wdata), .re(rd), .raddr, .rdata(q_op2));
  op_mem #(.W(W), .DEPTH(DEPTH)) u_op4 (.clk, .we(host_we && host_wsel == REG_OP4),
    .waddr(host_addr), .wdata(host_wdata), .re(rd), .raddr, .rdata(q_op4));
  op_mem #(.W(W), .DEPTH(DEPTH)) u_op6 (.clk, .we(host_we && host_wsel == REG_OP6),
    .waddr(host_addr), .wdata(host_wdata), .re(rd), .raddr, .rdata(q_op6));

  // Operands read by the sequencer are valid one cycle after seq_rd.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_q   <= 1'b0;
      rsel_q <= '0;
    end else begin
      rd_q   <= seq_rd & path.active;
      if (host_re) rsel_q <= host_rsel;
    end
  end

  logic [W-1:0] y1, y2, y3;
  logic         v1, v2, v3;

  pe #(.W(W), .DELAY(0)) u_pe1 (.clk, .rst_n, .clear(seq_clear), .en(rd_q),
    .op(cfg.op1), .frac(cfg.frac), .a(q_op1), .b_mem(q_op2), .y(y1), .y_valid(v1));
  pe #(.W(W), .DELAY(1)) u_pe2 (.clk, .rst_n, .clear(seq_clear), .en(v1),
    .op(cfg.op2), .frac(cfg.frac), .a(y1), .b_mem(q_op4), .y(y2), .y_valid(v2));
  pe #(.W(W), .DELAY(2)) u_pe3 (.clk, .rst_n, .clear(seq_clear), .en(v2),
    .op(cfg.op3), .frac(cfg.frac), .a(y2), .b_mem(q_op6), .y(y3), .y_valid(v3));

  // Result memory: connected to the last PE of the chain.
  logic          res_we;
  logic [W-1:0]  res_d;
  logic [AW-1:0] res_ptr;

  always_comb begin
    unique case (path.res_sel)
      2'd0:    begin res_we = v1; res_d = y1; end
      2'd1:    begin res_we = v2; res_d = y2; end
      default: begin res_we = v3; res_d = y3; end
    endcase
    res_we = res_we & path.active;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         res_ptr <= '0;
    else if (seq_clear) res_ptr <= '0;
    else if (res_we)    res_ptr <= res_ptr + 1'b1;
  end

  op_mem #(.W(W), .DEPTH(DEPTH)) u_res (.clk, .we(res_we), .waddr(res_ptr), .wdata(res_d),
    .re(host_re), .raddr(host_addr), .rdata(q_res));

  always_comb begin
    unique case (rsel_q)
      REG_OP1: host_rdata = q_op1;
      REG_OP2: host_rdata = q_op2;
      REG_OP4: host_rdata = q_op4;
      REG_OP6: host_rdata = q_op6;
      REG_RES: host_rdata = q_res;
      default: host_rdata = '0;
    endcase
  end

endmodule
