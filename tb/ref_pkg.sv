// Reference model shared by the matrix testbenches.
//
// row_model computes what one row of the matrix must leave in its result
// memory for a stream of n data: the chain of up to three PE operations of
// the configuration word, with accumulators starting at zero, applied to
// operand memories op1, op2 (PE1), op4 (PE2) and op6 (PE3). It is written
// from the operation definitions alone, independently of the RTL.
package ref_pkg;
  import coproc_pkg::*;

  typedef logic [31:0] word_t;
  typedef word_t       vec_t [];

  function automatic word_t pe_op(pe_op_e o, word_t x, word_t z, inout word_t acc,
                                  logic [4:0] f);
    logic signed [63:0] p;
    p = $signed(x) * $signed(z);
    p = p >>> f;
    case (o)
      OP_MUL: return p[31:0];
      OP_ADD: return x + z;
      OP_SUB: return x - z;
      OP_ACC: begin acc = acc + x; return acc; end
      OP_MAC: begin acc = acc + p[31:0]; return acc; end
      default: return '0;
    endcase
  endfunction

  function automatic vec_t row_model(row_cfg_t c, int n, vec_t op1, vec_t op2,
                                     vec_t op4, vec_t op6);
    vec_t  res = new[n];
    word_t acc1 = 0, acc2 = 0, acc3 = 0;
    for (int i = 0; i < n; i++) begin
      word_t v;
      v = pe_op(c.op1, op1[i], op2[i], acc1, c.frac);
      if (c.nops >= 2) v = pe_op(c.op2, v, op4[i], acc2, c.frac);
      if (c.nops >= 3) v = pe_op(c.op3, v, op6[i], acc3, c.frac);
      res[i] = v;
    end
    return res;
  endfunction

  function automatic row_cfg_t rand_cfg(logic [1:0] nops);
    row_cfg_t c;
    c      = '0;
    c.nops = nops;
    c.op1  = pe_op_e'($urandom_range(0, 4));
    c.op2  = pe_op_e'($urandom_range(0, 4));
    c.op3  = pe_op_e'($urandom_range(0, 4));
    c.frac = 5'($urandom_range(0, 3) * 4);
    return c;
  endfunction

endpackage
