// End-to-end testbench of the media coprocessor system, at the default
// sizes (1024-beat RAM, 256-entry matrix memories).
//
// The testbench plays the CPU: its data master and instruction master are
// driven by tasks following the bus protocol. One complete operation:
//  1. the CPU writes four operand arrays (256 beats each, one 32-bit word
//     per matrix row) into RAM;
//  2. the DMA copies each array into its operand memory (op1, op2, op4,
//     op6) of all eight rows, while the CPU writes the row configuration
//     words and the data count into the matrix (reconfiguration during a
//     DMA transfer) and fetches instructions from RAM;
//  3. the CPU writes the start address; rows with 1, 2 and 3 chained
//     operations run side by side over 256 data;
//  4. the DMA is told at once to copy the result memory back to RAM: its
//     reads stall until the instruction ends; a CPU configuration write is
//     also stalled while the matrix is busy, and the CPU polls the status;
//  5. the CPU reads the results from RAM and compares them with a model.
// A second instruction with a new configuration (accumulating chains) over
// 64 data reuses the loaded operands. Matrix busy time must be
// count + depth + 1 cycles. Each mechanism (chain lengths 1/2/3, DMA into
// and out of the matrix, reconfiguration during DMA, access stalled by a
// busy matrix, status poll while busy, bus contention, instruction fetch
// during DMA) is counted; one that never happened counts as a failure.
module soc_top_tb;
  import coproc_pkg::*;
  import ref_pkg::*;

  localparam int LN = 8, W = 32, N = 256;

  logic clk = 0, rst_n = 0;
  bus_req_t cpu_i_req = '0, cpu_d_req = '0;
  bus_rsp_t cpu_i_rsp, cpu_d_rsp;
  logic dma_irq, coproc_irq, coproc_busy;

  int checks = 0, failures = 0;
  int n_chain [4];
  int n_dma_in = 0, n_dma_out = 0, n_reconf_dma = 0, n_stall = 0, n_poll_busy = 0;
  int n_contention = 0, n_fetch_dma = 0, dma_irqs = 0, cp_irqs = 0;
  logic dma_active = 0, fetch_on = 0;

  soc_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    if (dma_irq) dma_irqs++;
    if (coproc_irq) cp_irqs++;
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
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  // CPU data master transfer; cyc = cycles until waitreq was low.
  task automatic cpu(logic wr, logic [ADDR_W-1:0] ad, logic [BUS_W-1:0] wd,
                     output logic [BUS_W-1:0] rdv, output int cyc);
    @(negedge clk);
    cpu_d_req.read = !wr; cpu_d_req.write = wr; cpu_d_req.addr = ad; cpu_d_req.wdata = wd;
    cyc = 1;
    #1;
    while (cpu_d_rsp.waitreq) begin @(negedge clk); #1 cyc++; end
    rdv = cpu_d_rsp.rdata;
    if (ad[15:14] == SEL_RAM && cyc > (wr ? 1 : 2)) n_contention++;
    @(posedge clk);
    #1 cpu_d_req = '0;
  endtask

  task automatic cpu_wr(logic [ADDR_W-1:0] ad, logic [BUS_W-1:0] wd);
    logic [BUS_W-1:0] d;
    int c;
    cpu(1, ad, wd, d, c);
  endtask

  task automatic dma_start(logic [ADDR_W-1:0] s, logic [ADDR_W-1:0] d, int n);
    logic [BUS_W-1:0] w = '0;
    w[15:0] = s; w[47:32] = d; w[80:64] = 17'(n);
    cpu_wr(DMA_A, w);
    dma_active = 1;
  endtask

  task automatic dma_wait();
    logic [BUS_W-1:0] st;
    int c;
    do cpu(0, DMA_A, '0, st, c); while (st[0]);
    dma_active = 0;
  endtask

  // Operand data, per row
  vec_t m1 [LN], m2 [LN], m4 [LN], m6 [LN];

  // Instruction master: fetches from the op6 area of RAM, which stays
  // constant after loading, and checks what it gets.
  initial begin
    int i = 0, cyc;
    wait (fetch_on);
    forever begin
      @(negedge clk);
      if (!fetch_on) continue;
      cpu_i_req.read = 1; cpu_i_req.addr = ram_a(768 + i);
      #1;
      while (cpu_i_rsp.waitreq) begin @(negedge clk); #1; end
      checks++;
      for (int r = 0; r < LN; r++)
        if (cpu_i_rsp.rdata[r*W +: W] !== m6[r][i]) begin
          failures++; $display("FAIL fetch %0d", i); break;
        end
      if (dma_active) n_fetch_dma++;
      @(posedge clk);
      #1 cpu_i_req = '0;
      i = (i + 7) % N;
      repeat ($urandom_range(0, 3)) @(negedge clk);
    end
  end

  task automatic run_instr(logic [1:0] nops_of [LN], int n, int res_ram);
    logic [BUS_W-1:0] cw = '0, d;
    row_cfg_t c [LN];
    vec_t exp [LN];
    int depth = 0, c_cyc, busy_cycles = 0;
    for (int r = 0; r < LN; r++) begin
      c[r] = rand_cfg(nops_of[r]);
      if (r == 0 && nops_of[r] != 0) c[r].op1 = OP_MAC;   // accumulate chain
      cw[r*W +: W] = c[r];
      if (int'(nops_of[r]) > depth) depth = nops_of[r];
      n_chain[nops_of[r]]++;
      exp[r] = row_model(c[r], n, m1[r], m2[r], m4[r], m6[r]);
    end
    // configure; counted as reconfiguration during DMA when one is running
    cpu_wr(cp_a(REG_CTRL, CTRL_CFG), cw);
    cpu_wr(cp_a(REG_CTRL, CTRL_COUNT), BUS_W'(n));
    if (dma_active) n_reconf_dma++;
    if (dma_active) dma_wait();
    // start, then count busy cycles
    cpu_wr(cp_a(REG_CTRL, CTRL_START), '0);
    fork
      begin
        do @(negedge clk); while (!coproc_busy);
        while (coproc_busy) begin busy_cycles++; @(negedge clk); end
      end
      begin
        // status poll while busy
        cpu(0, cp_a(REG_CTRL, CTRL_START), '0, d, c_cyc);
        if (d[0]) n_poll_busy++;
        // DMA result copy issued while the matrix runs: its reads stall
        dma_start(cp_a(REG_RES, 0), ram_a(res_ram), n);
        n_dma_out++;
        // a configuration write waits for the end of the instruction
        cpu(1, cp_a(REG_CTRL, CTRL_CFG), cw, d, c_cyc);
        if (c_cyc > 1) n_stall++;
        chk(!coproc_busy, "config write completed only after the instruction");
      end
    join
    chk(busy_cycles == n + depth + 1,
        $sformatf("matrix busy %0d cycles, exp %0d", busy_cycles, n + depth + 1));
    dma_wait();
    for (int i = 0; i < n; i++) begin
      cpu(0, ram_a(res_ram + i), '0, d, c_cyc);
      for (int r = 0; r < LN; r++) begin
        if (nops_of[r] == 0) continue;
        checks++;
        if (d[r*W +: W] !== exp[r][i]) begin
          failures++;
          if (failures < 10)
            $display("FAIL row %0d i %0d got %h exp %h", r, i, d[r*W +: W], exp[r][i]);
        end
      end
    end
  endtask

  initial begin
    logic [BUS_W-1:0] b;
    logic [1:0] mix [LN] = '{2'd1, 2'd2, 2'd3, 2'd3, 2'd2, 2'd1, 2'd0, 2'd3};
    logic [1:0] mix2 [LN] = '{2'd2, 2'd2, 2'd1, 2'd1, 2'd3, 2'd3, 2'd3, 2'd2};
    foreach (n_chain[i]) n_chain[i] = 0;
    for (int r = 0; r < LN; r++) begin
      m1[r] = new[N]; m2[r] = new[N]; m4[r] = new[N]; m6[r] = new[N];
      for (int i = 0; i < N; i++) begin
        m1[r][i] = $urandom_range(0, 65535) - 32768;
        m2[r][i] = $urandom_range(0, 65535) - 32768;
        m4[r][i] = $urandom;
        m6[r][i] = $urandom_range(0, 255);
      end
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    // 1. operands into RAM: op1 at 0, op2 at 256, op4 at 512, op6 at 768
    for (int i = 0; i < N; i++) begin
      for (int r = 0; r < LN; r++) b[r*W +: W] = m1[r][i];
      cpu_wr(ram_a(i), b);
      for (int r = 0; r < LN; r++) b[r*W +: W] = m2[r][i];
      cpu_wr(ram_a(256 + i), b);
      for (int r = 0; r < LN; r++) b[r*W +: W] = m4[r][i];
      cpu_wr(ram_a(512 + i), b);
      for (int r = 0; r < LN; r++) b[r*W +: W] = m6[r][i];
      cpu_wr(ram_a(768 + i), b);
    end
    fetch_on = 1;
    // 2. DMA the operands into the matrix memories
    dma_start(ram_a(0), cp_a(REG_OP1, 0), N);   dma_wait(); n_dma_in++;
    dma_start(ram_a(256), cp_a(REG_OP2, 0), N); dma_wait(); n_dma_in++;
    dma_start(ram_a(512), cp_a(REG_OP4, 0), N); dma_wait(); n_dma_in++;
    dma_start(ram_a(768), cp_a(REG_OP6, 0), N); n_dma_in++;
    // 3-5. configure during the last transfer, run, copy back, check
    run_instr(mix, N, 0);
    // second instruction: new configuration over 64 data
    run_instr(mix2, 64, 256);
    fetch_on = 0;
    repeat (5) @(negedge clk);
    chk(dma_irqs == 6, $sformatf("dma irqs %0d exp 6", dma_irqs));
    chk(cp_irqs == 2, $sformatf("coprocessor irqs %0d exp 2", cp_irqs));
    for (int k = 1; k <= 3; k++) chk(n_chain[k] > 0, $sformatf("chain length %0d used", k));
    chk(n_dma_in > 0 && n_dma_out > 0, "DMA into and out of the matrix");
    chk(n_reconf_dma > 0, "reconfiguration during DMA");
    chk(n_stall > 0, "access stalled by busy matrix");
    chk(n_poll_busy > 0, "status poll while busy");
    chk(n_contention > 0, "bus contention on RAM");
    chk(n_fetch_dma > 0, "instruction fetch during DMA");
    $display("mechanisms: chain1=%0d chain2=%0d chain3=%0d dma_in=%0d dma_out=%0d reconf_during_dma=%0d stall=%0d poll_busy=%0d contention=%0d fetch_during_dma=%0d",
             n_chain[1], n_chain[2], n_chain[3], n_dma_in, n_dma_out, n_reconf_dma, n_stall,
             n_poll_busy, n_contention, n_fetch_dma);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
