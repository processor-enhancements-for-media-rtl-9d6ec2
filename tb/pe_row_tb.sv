// Self-checking testbench of one matrix row.
//
// Loads the four operand memories through the host port with random data,
// runs streams with chain lengths 1, 2 and 3 (random operations, including
// accumulation and fixed-point products) and an idle row, and reads the
// result memory back through the host port. The results are compared with
// ref_pkg::row_model. The host read is started exactly depth+1 cycles after
// the last stream read, so a row that is slower than its pipeline schedule
// fails. Operand memories are also read back to check the host port.
module pe_row_tb;
  import coproc_pkg::*;
  import ref_pkg::*;

  localparam int DEPTH = 64;
  localparam int AW = 6;

  logic clk = 0, rst_n = 0;
  row_cfg_t cfg = '0;
  row_path_t path;
  logic host_we = 0, host_re = 0;
  logic [3:0] host_wsel = 0, host_rsel = 0;
  logic [AW-1:0] host_addr = 0;
  logic [31:0] host_wdata = 0, host_rdata;
  logic seq_clear = 0, seq_rd = 0;
  logic [AW-1:0] seq_raddr = 0;

  int checks = 0, failures = 0;

  assign path = path_rom(cfg.nops);

  pe_row #(.W(32), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  vec_t m1, m2, m4, m6;

  task automatic host_write(logic [3:0] sel, int idx, word_t d);
    @(negedge clk);
    host_we = 1; host_wsel = sel; host_addr = AW'(idx); host_wdata = d;
    @(negedge clk);
    host_we = 0;
  endtask

  task automatic host_read(logic [3:0] sel, int idx, output word_t d);
    host_re = 1; host_rsel = sel; host_addr = AW'(idx);
    @(negedge clk);
    host_re = 0;
    d = host_rdata;
  endtask

  task automatic run(logic [1:0] nops, int n);
    vec_t exp;
    word_t d;
    cfg = rand_cfg(nops);
    exp = row_model(cfg, n, m1, m2, m4, m6);
    @(negedge clk);
    seq_clear = 1;
    @(negedge clk);
    seq_clear = 0;
    for (int i = 0; i < n; i++) begin
      seq_rd = 1; seq_raddr = AW'(i);
      @(negedge clk);
    end
    seq_rd = 0;
    // depth+1 cycles after the last read the last result must be stored
    repeat (int'(path.depth) + 1) @(negedge clk);
    if (nops == 0) begin
      host_read(REG_RES, 0, d);
      checks++;
      if (d !== 32'hdead_beef) begin failures++; $display("FAIL idle row wrote result %h", d); end
    end else begin
      for (int i = n - 1; i >= 0; i--) begin
        host_read(REG_RES, i, d);
        checks++;
        if (d !== exp[i]) begin
          failures++;
          $display("FAIL nops=%0d ops=%s/%s/%s i=%0d got %h exp %h", nops, cfg.op1.name(),
                   cfg.op2.name(), cfg.op3.name(), i, d, exp[i]);
        end
      end
    end
  endtask

  initial begin
    word_t d;
    m1 = new[DEPTH]; m2 = new[DEPTH]; m4 = new[DEPTH]; m6 = new[DEPTH];
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < DEPTH; i++) begin
      m1[i] = $urandom; m2[i] = $urandom; m4[i] = $urandom; m6[i] = $urandom;
      if (i % 2 == 0) begin m1[i] = $urandom_range(0, 1000); m2[i] = -$urandom_range(0, 1000); end
      host_write(REG_OP1, i, m1[i]);
      host_write(REG_OP2, i, m2[i]);
      host_write(REG_OP4, i, m4[i]);
      host_write(REG_OP6, i, m6[i]);
    end
    for (int i = 0; i < 8; i++) begin
      host_read(REG_OP4, i, d);
      checks++;
      if (d !== m4[i]) begin failures++; $display("FAIL op4 readback %0d", i); end
    end
    // mark result word 0 so that an idle row can be seen not to write
    cfg = '0; cfg.nops = 1; cfg.op1 = OP_ADD;
    // result 0 = op1[63] + op2[63] = deadbeef
    host_write(REG_OP1, 63, 32'hdead_0000);
    host_write(REG_OP2, 63, 32'h0000_beef);
    m1[63] = 32'hdead_0000; m2[63] = 32'h0000_beef;
    @(negedge clk); seq_clear = 1; @(negedge clk); seq_clear = 0;
    seq_rd = 1; seq_raddr = 63; @(negedge clk); seq_rd = 0;
    repeat (4) @(negedge clk);
    for (int rep = 0; rep < 3; rep++) begin
      run(2'd1, 40);
      run(2'd2, 33);
      run(2'd3, 64);
    end
    // idle row: result word 0 set to deadbeef first
    @(negedge clk); cfg = '0; cfg.nops = 1; cfg.op1 = OP_ADD; seq_clear = 1;
    @(negedge clk); seq_clear = 0; seq_rd = 1; seq_raddr = 63;
    @(negedge clk); seq_rd = 0;
    repeat (4) @(negedge clk);
    run(2'd0, 10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
