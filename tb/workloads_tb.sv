// Workload testbench: the media kernels the matrix is meant for, run on the
// reconfigurable matrix (rmx) at its default size (8 rows, 256 entries).
//
// The testbench plays the host: it loads operand memories through the
// 256-bit port, writes the row configuration words and the count, starts an
// instruction, waits for it to end and reads the result memories. Every
// expected value is computed here by plain integer arithmetic on the
// kernel's formula, not from the row model of the other testbenches.
//
//  1. Atom normalization: every pixel of an atom divided by the atom norm,
//     done as a multiplication by a fixed-point reciprocal (Q24, frac = 24).
//     Eight atoms (one per row) of 256 pixels in one instruction. The
//     result must be floor(pixel / norm) or one less.
//  2. Video reconstruction, frame update: frame += c * atom, a two-operation
//     chain (MUL then ADD, frac = 12) over 8 x 256 pixels. Three atoms are
//     added one after another, the result memory being copied back into the
//     frame operand between instructions; the final frame must equal the
//     direct sum.
//  3. Video reconstruction, accumulation: one pixel per row, one atom per
//     index, a single MAC: result i is the sum over atoms 0..i of
//     (c * atom) >>> 12.
//  4. Radix-2 FFT butterfly (4 multiplies, 2 adds, 2 subtracts), which does
//     not fit in one row of three PEs. It is split into two passes: pass 1
//     forms the products xi*wi and xr*wi in four rows; pass 2 forms
//     ar + tr, ar - tr, ai + ti, ai - ti (tr = xr*wr - xi*wi,
//     ti = xr*wi + xi*wr) with three-operation chains in all eight rows.
//     The subtraction outputs use the negated twiddle -wr. Two groups of 256
//     butterflies (Q14 twiddles of a 128-point transform) per two passes.
//  5. Atom generation and norm: samples of the second mother function,
//     g = (4x^2 - 2) * e with e = k * exp(-(x^2 + y^2)) supplied as a table,
//     as a three-operation chain (MUL x by 4x, SUB 2, MUL by e; Q12), one
//     atom line per row; then the squared norm, sum of g^2, as a MAC over
//     the 256 samples of each row.
// Every instruction must keep the matrix busy exactly count + depth + 1
// cycles.
module workloads_tb;
  import coproc_pkg::*;

  localparam int LN = 8, W = 32, N = 256, AW = 8, CAW = 12;

  typedef logic [W-1:0] word_t;
  typedef word_t arr_t [LN][N];

  logic clk = 0, rst_n = 0;
  logic chipselect = 0, read = 0, write = 0;
  logic [CAW-1:0] address = 0;
  logic [LN*W-1:0] write_data = 0, read_data;
  logic busy, done;

  int checks = 0, failures = 0;

  rmx dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 12) $display("FAIL %s", msg);
    end
  endtask

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

  // one operand memory of all rows, entries 0..n-1
  task automatic load(logic [3:0] region, const ref arr_t a, input int n);
    logic [LN*W-1:0] b;
    for (int i = 0; i < n; i++) begin
      for (int r = 0; r < LN; r++) b[r*W +: W] = a[r][i];
      wr(region, i, b);
    end
  endtask

  function automatic row_cfg_t cfg(int nops, pe_op_e o1, pe_op_e o2, pe_op_e o3, int frac);
    row_cfg_t c = '0;
    c.nops = 2'(nops); c.op1 = o1; c.op2 = o2; c.op3 = o3; c.frac = 5'(frac);
    return c;
  endfunction

  // configure, run n data, check the busy time, read back all results
  task automatic run(row_cfg_t c [LN], int n, output arr_t res, input string name);
    logic [LN*W-1:0] cw, d;
    int depth = 0, bc = 0;
    for (int r = 0; r < LN; r++) begin
      cw[r*W +: W] = c[r];
      if (int'(c[r].nops) > depth) depth = int'(c[r].nops);
    end
    wr(REG_CTRL, CTRL_CFG, cw);
    wr(REG_CTRL, CTRL_COUNT, (LN*W)'(n));
    wr(REG_CTRL, CTRL_START, '0);
    while (busy || bc == 0) begin
      if (busy) bc++;
      @(negedge clk);
      if (bc > 2000) break;
    end
    chk(bc == n + depth + 1, $sformatf("%s: busy %0d cycles, exp %0d", name, bc, n + depth + 1));
    $display("%s: %0d data x %0d rows in %0d cycles", name, n, LN, bc);
    for (int i = 0; i < n; i++) begin
      rd(REG_RES, i, d);
      for (int r = 0; r < LN; r++) res[r][i] = d[r*W +: W];
    end
  endtask

  function automatic int asr(longint v, int f);
    return int'(v >>> f);
  endfunction

  arr_t a1, a2, a4, a6, res;
  row_cfg_t c [LN];

  // 1. atom normalization
  task automatic set_pixel_value();
    int norm [LN];
    for (int r = 0; r < LN; r++) begin
      norm[r] = $urandom_range(1, 1000);
      for (int i = 0; i < N; i++) begin
        a1[r][i] = $urandom_range(0, 65535);           // pixel, Q8
        a2[r][i] = (1 << 24) / norm[r];                 // reciprocal, Q24
      end
      c[r] = cfg(1, OP_MUL, OP_MUL, OP_MUL, 24);
    end
    load(REG_OP1, a1, N);
    load(REG_OP2, a2, N);
    run(c, N, res, "SetPixelValue");
    for (int r = 0; r < LN; r++)
      for (int i = 0; i < N; i++) begin
        int q = int'(a1[r][i]) / norm[r];
        int g = int'(res[r][i]);
        chk(g == q || g == q - 1,
            $sformatf("normalize row %0d px %0d: %0d / %0d gave %0d", r, i, a1[r][i], norm[r], g));
      end
  endtask

  // 2. frame update over three atoms
  task automatic decode_frame();
    int frame [LN][N];
    for (int r = 0; r < LN; r++)
      for (int i = 0; i < N; i++) begin
        frame[r][i] = $urandom_range(0, 4095) - 2048;
        a4[r][i] = frame[r][i];
      end
    load(REG_OP4, a4, N);
    for (int k = 0; k < 3; k++) begin
      int coef = $urandom_range(0, 2000) - 1000;
      for (int r = 0; r < LN; r++) begin
        for (int i = 0; i < N; i++) begin
          a1[r][i] = $urandom_range(0, 8192) - 4096;  // atom sample, Q12
          a2[r][i] = coef;
          frame[r][i] += asr(longint'(int'(a1[r][i])) * coef, 12);
        end
        c[r] = cfg(2, OP_MUL, OP_ADD, OP_MUL, 12);
      end
      load(REG_OP1, a1, N);
      load(REG_OP2, a2, N);
      run(c, N, res, $sformatf("DecodeVideo frame update, atom %0d", k));
      load(REG_OP4, res, N);                        // reconstructed frame feeds the next atom
    end
    for (int r = 0; r < LN; r++)
      for (int i = 0; i < N; i++)
        chk(int'(res[r][i]) == frame[r][i],
            $sformatf("frame row %0d px %0d got %0d exp %0d", r, i, int'(res[r][i]), frame[r][i]));
  endtask

  // 3. pixel = sum over atoms of c_i * g_i
  task automatic decode_mac();
    for (int r = 0; r < LN; r++) begin
      for (int i = 0; i < N; i++) begin
        a1[r][i] = $urandom_range(0, 8192) - 4096;
        a2[r][i] = $urandom_range(0, 2000) - 1000;
      end
      c[r] = cfg(1, OP_MAC, OP_MUL, OP_MUL, 12);
    end
    load(REG_OP1, a1, N);
    load(REG_OP2, a2, N);
    run(c, N, res, "DecodeVideo MAC");
    for (int r = 0; r < LN; r++) begin
      int s = 0;
      for (int i = 0; i < N; i++) begin
        s += asr(longint'(int'(a1[r][i])) * int'(a2[r][i]), 12);
        chk(int'(res[r][i]) == s, $sformatf("mac row %0d atom %0d got %0d exp %0d",
                                            r, i, int'(res[r][i]), s));
      end
    end
  endtask

  // 4. radix-2 butterflies in two passes
  task automatic fft_butterfly();
    int xr [2][N], xi [2][N], ar [2][N], ai [2][N], wr_ [2][N], wi [2][N];
    arr_t p1;
    for (int g = 0; g < 2; g++)
      for (int i = 0; i < N; i++) begin
        int k = (i + 17 * g) % 64;
        real ang = -2.0 * 3.14159265358979 * k / 128.0;
        wr_[g][i] = int'($rtoi($cos(ang) * 16384.0));
        wi[g][i]  = int'($rtoi($sin(ang) * 16384.0));
        xr[g][i] = $urandom_range(0, 65535) - 32768;
        xi[g][i] = $urandom_range(0, 65535) - 32768;
        ar[g][i] = $urandom_range(0, 65535) - 32768;
        ai[g][i] = $urandom_range(0, 65535) - 32768;
      end
    // pass 1: rows 2g and 2g+1 form xi*wi and xr*wi of group g
    for (int r = 0; r < LN; r++) c[r] = cfg(0, OP_MUL, OP_MUL, OP_MUL, 14);
    for (int g = 0; g < 2; g++) begin
      c[2*g] = cfg(1, OP_MUL, OP_MUL, OP_MUL, 14);
      c[2*g+1] = cfg(1, OP_MUL, OP_MUL, OP_MUL, 14);
      for (int i = 0; i < N; i++) begin
        a1[2*g][i] = xi[g][i];   a2[2*g][i] = wi[g][i];
        a1[2*g+1][i] = xr[g][i]; a2[2*g+1][i] = wi[g][i];
      end
    end
    for (int r = 4; r < LN; r++)
      for (int i = 0; i < N; i++) begin a1[r][i] = 0; a2[r][i] = 0; end
    load(REG_OP1, a1, N);
    load(REG_OP2, a2, N);
    run(c, N, p1, "FFT butterfly pass 1");
    // pass 2: rows 4g..4g+3 give ar+tr, ar-tr, ai+ti, ai-ti of group g
    for (int g = 0; g < 2; g++) begin
      int b = 4 * g;
      c[b]   = cfg(3, OP_MUL, OP_SUB, OP_ADD, 14);
      c[b+1] = cfg(3, OP_MUL, OP_ADD, OP_ADD, 14);
      c[b+2] = cfg(3, OP_MUL, OP_ADD, OP_ADD, 14);
      c[b+3] = cfg(3, OP_MUL, OP_SUB, OP_ADD, 14);
      for (int i = 0; i < N; i++) begin
        a1[b][i] = xr[g][i];   a2[b][i] = wr_[g][i];   a4[b][i] = p1[2*g][i];   a6[b][i] = ar[g][i];
        a1[b+1][i] = xr[g][i]; a2[b+1][i] = -wr_[g][i]; a4[b+1][i] = p1[2*g][i]; a6[b+1][i] = ar[g][i];
        a1[b+2][i] = xi[g][i]; a2[b+2][i] = wr_[g][i];   a4[b+2][i] = p1[2*g+1][i]; a6[b+2][i] = ai[g][i];
        a1[b+3][i] = xi[g][i]; a2[b+3][i] = -wr_[g][i]; a4[b+3][i] = p1[2*g+1][i]; a6[b+3][i] = ai[g][i];
      end
    end
    load(REG_OP1, a1, N);
    load(REG_OP2, a2, N);
    load(REG_OP4, a4, N);
    load(REG_OP6, a6, N);
    run(c, N, res, "FFT butterfly pass 2");
    for (int g = 0; g < 2; g++)
      for (int i = 0; i < N; i++) begin
        int pr = asr(longint'(xr[g][i]) * wr_[g][i], 14);
        int pi = asr(longint'(xi[g][i]) * wi[g][i], 14);
        int qr = asr(longint'(xr[g][i]) * wi[g][i], 14);
        int qi = asr(longint'(xi[g][i]) * wr_[g][i], 14);
        int tr = pr - pi, ti = qr + qi;
        int o [4];
        for (int k = 0; k < 4; k++) o[k] = int'(res[4*g+k][i]);
        chk(o[0] == ar[g][i] + tr, $sformatf("bfly %0d.%0d ar+tr got %0d exp %0d", g, i, o[0], ar[g][i] + tr));
        chk(o[2] == ai[g][i] + ti, $sformatf("bfly %0d.%0d ai+ti got %0d exp %0d", g, i, o[2], ai[g][i] + ti));
        // the products with -wr round towards minus infinity too: within 1
        chk(o[1] - (ar[g][i] - tr) inside {[-1:1]},
            $sformatf("bfly %0d.%0d ar-tr got %0d exp %0d", g, i, o[1], ar[g][i] - tr));
        chk(o[3] - (ai[g][i] - ti) inside {[-1:1]},
            $sformatf("bfly %0d.%0d ai-ti got %0d exp %0d", g, i, o[3], ai[g][i] - ti));
      end
  endtask

  // 5. g = (4x^2 - 2) * e, then sum of g^2
  task automatic compute_norm();
    int g [LN][N];
    for (int r = 0; r < LN; r++) begin
      real y = (r - 3.5) / 4.0;
      for (int i = 0; i < N; i++) begin
        real x = (i - 128) / 64.0;
        int t;
        a1[r][i] = $rtoi(x * 4096.0);                                  // x, Q12
        a2[r][i] = 4 * int'(a1[r][i]);                                 // 4x
        a4[r][i] = 2 * 4096;                                           // 2.0
        a6[r][i] = $rtoi(2.0 / $sqrt(3.0 * 3.14159265358979) *
                         $exp(-(x * x + y * y)) * 4096.0);             // e, Q12
        t = asr(longint'(int'(a1[r][i])) * int'(a2[r][i]), 12) - 8192;  // 4x^2 - 2
        g[r][i] = asr(longint'(t) * int'(a6[r][i]), 12);
      end
      c[r] = cfg(3, OP_MUL, OP_SUB, OP_MUL, 12);
    end
    load(REG_OP1, a1, N);
    load(REG_OP2, a2, N);
    load(REG_OP4, a4, N);
    load(REG_OP6, a6, N);
    run(c, N, res, "ComputeNorm atom samples");
    for (int r = 0; r < LN; r++)
      for (int i = 0; i < N; i++)
        chk(int'(res[r][i]) == g[r][i],
            $sformatf("atom row %0d x %0d got %0d exp %0d", r, i, int'(res[r][i]), g[r][i]));
    // squared norm: MAC of the samples with themselves
    for (int r = 0; r < LN; r++) c[r] = cfg(1, OP_MAC, OP_MUL, OP_MUL, 12);
    load(REG_OP1, res, N);
    load(REG_OP2, res, N);
    run(c, N, res, "ComputeNorm squared norm");
    for (int r = 0; r < LN; r++) begin
      int s = 0;
      for (int i = 0; i < N; i++) s += asr(longint'(g[r][i]) * g[r][i], 12);
      chk(int'(res[r][N-1]) == s,
          $sformatf("norm row %0d got %0d exp %0d", r, int'(res[r][N-1]), s));
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    set_pixel_value();
    decode_frame();
    decode_mac();
    fft_butterfly();
    compute_norm();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
