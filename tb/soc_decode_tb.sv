// System workload testbench: video reconstruction (frame += c * atom) for a
// series of atoms, run through the whole system at its default sizes.
//
// The testbench plays the CPU's data master. RAM holds the frame (beats
// 0..255, 8 x 256 pixels), two atom buffers (256..511 and 512..767) and the
// coefficient array (768..1023). For each atom:
//  1. the DMA copies the atom to op1, the coefficients to op2 and the frame
//     to op4 of all eight rows; the CPU writes the configuration (MUL, ADD)
//     and the count while the last copy runs;
//  2. the CPU starts the instruction and, while the matrix runs, writes the
//     next atom into the other buffer (double buffering);
//  3. once the status shows the matrix idle, the DMA copies the result
//     memory back over the frame in RAM, while the CPU writes the next
//     coefficients.
// At the end the CPU reads the frame and compares every pixel with the
// direct sum computed here. The testbench counts CPU transfers that overlap
// a running instruction and a running DMA transfer (both must happen) and
// prints the cycles per atom, data movement included.
module soc_decode_tb;
  import coproc_pkg::*;

  localparam int LN = 8, W = 32, N = 256, ATOMS = 4;

  logic clk = 0, rst_n = 0;
  bus_req_t cpu_i_req = '0, cpu_d_req = '0;
  bus_rsp_t cpu_i_rsp, cpu_d_rsp;
  logic dma_irq, coproc_irq, coproc_busy;

  int checks = 0, failures = 0;
  int n_cpu_while_busy = 0, n_cpu_while_dma = 0;
  logic dma_active = 0;

  soc_top dut (.*);

  always #5 clk = ~clk;

  int cycle = 0;
  always @(posedge clk) cycle++;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [ADDR_W-1:0] ram_a(int i);
    return {SEL_RAM, 14'(i)};
  endfunction
  function automatic logic [ADDR_W-1:0] cp_a(logic [3:0] region, int i);
    return {SEL_COPROC, 2'b00, region, 8'(i)};
  endfunction
  localparam logic [ADDR_W-1:0] DMA_A = {SEL_DMA, 14'd0};

  task automatic chk(logic cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 12) $display("FAIL %s", msg);
    end
  endtask

  task automatic cpu(logic wr, logic [ADDR_W-1:0] ad, logic [BUS_W-1:0] wd,
                     output logic [BUS_W-1:0] rdv);
    @(negedge clk);
    cpu_d_req.read = !wr; cpu_d_req.write = wr; cpu_d_req.addr = ad; cpu_d_req.wdata = wd;
    #1;
    while (cpu_d_rsp.waitreq) begin @(negedge clk); #1; end
    rdv = cpu_d_rsp.rdata;
    if (coproc_busy) n_cpu_while_busy++;
    if (dma_active && ad[15:14] == SEL_RAM) n_cpu_while_dma++;
    @(posedge clk);
    #1 cpu_d_req = '0;
  endtask

  task automatic cpu_wr(logic [ADDR_W-1:0] ad, logic [BUS_W-1:0] wd);
    logic [BUS_W-1:0] d;
    cpu(1, ad, wd, d);
  endtask

  task automatic dma_start(logic [ADDR_W-1:0] s, logic [ADDR_W-1:0] d, int n);
    logic [BUS_W-1:0] w = '0;
    w[15:0] = s; w[47:32] = d; w[80:64] = 17'(n);
    cpu_wr(DMA_A, w);
    dma_active = 1;
  endtask

  task automatic dma_wait();
    logic [BUS_W-1:0] st;
    do cpu(0, DMA_A, '0, st); while (st[0]);
    dma_active = 0;
  endtask

  int frame [LN][N];
  int atom [ATOMS][LN][N];
  int coef [ATOMS];

  task automatic put_atom(int k);
    logic [BUS_W-1:0] b;
    for (int i = 0; i < N; i++) begin
      for (int r = 0; r < LN; r++) b[r*W +: W] = atom[k][r][i];
      cpu_wr(ram_a(256 + 256 * (k % 2) + i), b);
    end
  endtask

  task automatic put_coef(int k);
    for (int i = 0; i < N; i++) cpu_wr(ram_a(768 + i), {LN{32'(coef[k])}});
  endtask

  initial begin
    logic [BUS_W-1:0] b, cw;
    row_cfg_t c;
    int t0, t1, cyc;
    for (int k = 0; k < ATOMS; k++) begin
      coef[k] = $urandom_range(0, 2000) - 1000;
      for (int r = 0; r < LN; r++)
        for (int i = 0; i < N; i++) atom[k][r][i] = $urandom_range(0, 8192) - 4096;
    end
    c = '0; c.nops = 2; c.op1 = OP_MUL; c.op2 = OP_ADD; c.frac = 12;
    cw = {LN{c}};
    repeat (3) @(negedge clk);
    rst_n = 1;
    // initial frame, first atom and coefficients
    for (int i = 0; i < N; i++) begin
      for (int r = 0; r < LN; r++) begin
        frame[r][i] = $urandom_range(0, 4095) - 2048;
        b[r*W +: W] = frame[r][i];
      end
      cpu_wr(ram_a(i), b);
    end
    put_atom(0);
    put_coef(0);
    for (int k = 0; k < ATOMS; k++) begin
      t0 = cycle;
      dma_start(ram_a(256 + 256 * (k % 2)), cp_a(REG_OP1, 0), N); dma_wait();
      dma_start(ram_a(768), cp_a(REG_OP2, 0), N); dma_wait();
      dma_start(ram_a(0), cp_a(REG_OP4, 0), N);
      cpu_wr(cp_a(REG_CTRL, CTRL_CFG), cw);
      cpu_wr(cp_a(REG_CTRL, CTRL_COUNT), BUS_W'(N));
      dma_wait();
      cpu_wr(cp_a(REG_CTRL, CTRL_START), '0);
      if (k + 1 < ATOMS) put_atom(k + 1);
      do cpu(0, cp_a(REG_CTRL, CTRL_START), '0, b); while (b[0]);
      chk(b[1], $sformatf("status shows done: %h", b[7:0]));
      dma_start(cp_a(REG_RES, 0), ram_a(0), N);
      if (k + 1 < ATOMS) put_coef(k + 1);
      dma_wait();
      for (int r = 0; r < LN; r++)
        for (int i = 0; i < N; i++)
          frame[r][i] += int'((longint'(atom[k][r][i]) * coef[k]) >>> 12);
      t1 = cycle;
      $display("atom %0d: %0d cycles for %0d pixels, transfers included", k, t1 - t0, LN * N);
    end
    for (int i = 0; i < N; i++) begin
      cpu(0, ram_a(i), '0, b);
      for (int r = 0; r < LN; r++)
        chk(int'(b[r*W +: W]) == frame[r][i],
            $sformatf("pixel %0d,%0d got %0d exp %0d", r, i, int'(b[r*W +: W]), frame[r][i]));
    end
    chk(n_cpu_while_busy > 0, "CPU works while the matrix runs");
    chk(n_cpu_while_dma > 0, "CPU works during a DMA transfer");
    $display("cpu transfers while matrix busy=%0d, to RAM during DMA=%0d",
             n_cpu_while_busy, n_cpu_while_dma);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
