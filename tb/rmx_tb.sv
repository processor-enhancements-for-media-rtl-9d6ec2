// Self-checking testbench of the reconfigurable matrix (8 rows x 3 PEs).
//
// Loads the operand memories of all eight rows through the 256-bit port
// (one beat = one index of every row), gives each row its own chain length
// and random operations, starts the instruction and checks that busy lasts
// count + depth + 1 cycles (one datum per row per cycle plus the pipeline
// fill of the deepest row). The result memories are then read back and
// every row compared with ref_pkg::row_model. Three instructions are run:
// mixed chain lengths over all 256 entries, all rows with one operation,
// and all rows with three operations.
module rmx_tb;
  import coproc_pkg::*;
  import ref_pkg::*;

  localparam int LN = 8, W = 32, DEPTH = 256, AW = 8, CAW = 12;

  logic clk = 0, rst_n = 0;
  logic chipselect = 0, read = 0, write = 0;
  logic [CAW-1:0] address = 0;
  logic [LN*W-1:0] write_data = 0, read_data;
  logic busy, done;

  int checks = 0, failures = 0;

  rmx #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(logic [3:0] region, int idx, logic [LN*W-1:0] d);
    @(negedge clk);
    chipselect = 1; write = 1; address = {region, AW'(idx)}; write_data = d;
    @(negedge clk);
    chipselect = 0; write = 0;
  endtask

  task automatic rd(logic [3:0] region, int idx, output logic [LN*W-1:0] d);
    @(negedge clk);
    chipselect = 1; read = 1; address = {region, AW'(idx)};
    @(negedge clk);
    chipselect = 0; read = 0;
    d = read_data;
  endtask

  vec_t m1 [LN], m2 [LN], m4 [LN], m6 [LN];

  task automatic instr(logic [1:0] nops_of [LN], int n);
    logic [LN*W-1:0] cw, d;
    row_cfg_t c [LN];
    vec_t exp [LN];
    int depth = 0, bc = 0, dones = 0;
    for (int r = 0; r < LN; r++) begin
      c[r] = rand_cfg(nops_of[r]);
      cw[r*W +: W] = c[r];
      if (int'(nops_of[r]) > depth) depth = nops_of[r];
      exp[r] = row_model(c[r], n, m1[r], m2[r], m4[r], m6[r]);
    end
    wr(REG_CTRL, CTRL_CFG, cw);
    wr(REG_CTRL, CTRL_COUNT, (LN*W)'(n));
    wr(REG_CTRL, CTRL_START, '0);
    while (busy || bc == 0) begin
      if (busy) bc++;
      @(negedge clk);
      if (done) dones++;
      if (bc > 1000) break;
    end
    checks++;
    if (bc != n + depth + 1) begin
      failures++;
      $display("FAIL busy %0d cycles, exp %0d", bc, n + depth + 1);
    end
    checks++;
    if (dones != 1) begin failures++; $display("FAIL done pulses %0d", dones); end
    for (int i = 0; i < n; i++) begin
      rd(REG_RES, i, d);
      for (int r = 0; r < LN; r++) begin
        if (nops_of[r] == 0) continue;
        checks++;
        if (d[r*W +: W] !== exp[r][i]) begin
          failures++;
          if (failures < 10)
            $display("FAIL row %0d nops %0d i %0d got %h exp %h", r, nops_of[r], i, d[r*W +: W], exp[r][i]);
        end
      end
    end
  endtask

  initial begin
    logic [LN*W-1:0] b1, b2, b4, b6;
    logic [1:0] mix [LN] = '{2'd1, 2'd2, 2'd3, 2'd3, 2'd2, 2'd1, 2'd0, 2'd3};
    logic [1:0] ones [LN] = '{default: 2'd1};
    logic [1:0] threes [LN] = '{default: 2'd3};
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < LN; r++) begin
      m1[r] = new[DEPTH]; m2[r] = new[DEPTH]; m4[r] = new[DEPTH]; m6[r] = new[DEPTH];
    end
    for (int i = 0; i < DEPTH; i++) begin
      for (int r = 0; r < LN; r++) begin
        m1[r][i] = $urandom_range(0, 65535) - 32768;
        m2[r][i] = $urandom;
        m4[r][i] = $urandom;
        m6[r][i] = $urandom_range(0, 4095);
        b1[r*W +: W] = m1[r][i]; b2[r*W +: W] = m2[r][i];
        b4[r*W +: W] = m4[r][i]; b6[r*W +: W] = m6[r][i];
      end
      wr(REG_OP1, i, b1);
      wr(REG_OP2, i, b2);
      wr(REG_OP4, i, b4);
      wr(REG_OP6, i, b6);
    end
    instr(mix, DEPTH);
    instr(ones, 50);
    instr(threes, 17);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
