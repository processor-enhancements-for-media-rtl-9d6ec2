// Processing element (PE) of the reconfigurable matrix.
//
// A PE holds a dedicated 32-bit multiplier, a 32-bit add/subtract/accumulate
// unit and a shift register, and performs one configured operation (see
// coproc_pkg::pe_op_e) per datum of a stream. Input a is the chained operand
// (the previous PE's result, or memory op1 for the first PE of a row);
// input b comes from the PE's own embedded memory.
//
// All memories of a row are read with the same index in the same cycle, but
// a chained operand reaches PE k only k-1 cycles later. The shift register
// delays b by DELAY cycles (0, 1, 2 for PE1..PE3) so that both operands of a
// datum meet. Reading the figure's "Shift reg" as this alignment delay is
// this design's interpretation.
//
// Products are signed 32x32 -> 64 bits, shifted right arithmetically by
// frac (fixed-point format chosen by the configuration word), truncated to
// 32 bits. Sums wrap modulo 2^32.
//
// Timing: y and y_valid are registered; a datum with en=1 in cycle t gives
// y_valid=1 in cycle t+1. clear zeroes the accumulator (start of an
// instruction) and has priority over en.
module pe
  import coproc_pkg::*;
#(
  parameter int unsigned W     = DATA_W,
  parameter int unsigned DELAY = 0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         en,
  input  pe_op_e       op,
  input  logic [4:0]   frac,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b_mem,
  output logic [W-1:0] y,
  output logic         y_valid
);

  logic [W-1:0] b;

  // Operand alignment shift register.
  if (DELAY == 0) begin : g_nodelay
    assign b = b_mem;
  end else begin : g_delay
    logic [W-1:0] sr [DELAY];
    always_ff @(posedge clk) begin
      sr[0] <= b_mem;
      for (int i = 1; i < int'(DELAY); i++) sr[i] <= sr[i-1];
    end
    assign b = sr[DELAY-1];
  end

  logic signed [2*W-1:0] prod_full;
  logic        [W-1:0]   prod;
  logic        [W-1:0]   acc;
  logic        [W-1:0]   result;

  always_comb begin
    prod_full = $signed(a) * $signed(b);
    prod      = W'(prod_full >>> frac);
    unique case (op)
      OP_MUL:  result = prod;
      OP_ADD:  result = a + b;
      OP_SUB:  result = a - b;
      OP_ACC:  result = acc + a;
      OP_MAC:  result = acc + prod;
      default: result = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc     <= '0;
      y       <= '0;
      y_valid <= 1'b0;
    end else begin
      y_valid <= en & ~clear;
      if (clear) begin
        acc <= '0;
      end else if (en) begin
        y <= result;
        if (op == OP_ACC || op == OP_MAC) acc <= result;
      end
    end
  end

endmodule
