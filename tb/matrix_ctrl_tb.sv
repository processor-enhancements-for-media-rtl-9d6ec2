// Self-checking testbench of the matrix control block.
//
// Checks the address decode towards the rows (write/read strobes, memory
// select, index), that a configuration write gives each row the word of its
// own lane and the path of the fixed path table, that the data count and a
// write to the start address launch the sequencer with the deepest active
// chain (busy for count + depth + 1 cycles), that memory and configuration
// accesses are blocked while busy, the status word, and that memory reads
// return lane r from row r one cycle later.
module matrix_ctrl_tb;
  import coproc_pkg::*;

  localparam int LN = 8, W = 32, AW = 8, CAW = 12;

  logic clk = 0, rst_n = 0;
  logic cs = 0, read = 0, write = 0;
  logic [CAW-1:0] addr = 0;
  logic [LN*W-1:0] wdata = 0, rdata;
  row_cfg_t cfg [LN];
  row_path_t path [LN];
  logic host_we, host_re;
  logic [3:0] host_sel;
  logic [AW-1:0] host_addr;
  logic [W-1:0] row_rdata [LN];
  logic seq_clear, seq_rd;
  logic [AW-1:0] seq_raddr;
  logic busy, done;

  int checks = 0, failures = 0;

  matrix_ctrl #(.LN(LN), .W(W), .DEPTH(256)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  function automatic logic [CAW-1:0] a(logic [3:0] region, int idx);
    return {region, AW'(idx)};
  endfunction

  task automatic wr(logic [CAW-1:0] ad, logic [LN*W-1:0] d);
    @(negedge clk);
    cs = 1; write = 1; addr = ad; wdata = d;
    @(negedge clk);
    cs = 0; write = 0;
  endtask

  task automatic rd(logic [CAW-1:0] ad, output logic [LN*W-1:0] d);
    @(negedge clk);
    cs = 1; read = 1; addr = ad;
    @(negedge clk);
    cs = 0; read = 0;
    d = rdata;
  endtask

  always_comb
    for (int r = 0; r < LN; r++) row_rdata[r] = {8'(r), 8'hA5, host_addr, 8'(host_sel)};

  initial begin
    logic [LN*W-1:0] d, cw;
    row_cfg_t c;
    int bc;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // decode of a memory write
    @(negedge clk);
    cs = 1; write = 1; addr = a(REG_OP4, 77); wdata = '1;
    #1 chk(host_we && !host_re && host_sel == REG_OP4 && host_addr == 77, "op4 write decode");
    addr = a(REG_RES, 3);
    #1 chk(!host_we, "result memory is not host-writable");
    addr = a(REG_CTRL, CTRL_CFG);
    #1 chk(!host_we, "control write is not a memory write");
    write = 0; read = 1; addr = a(REG_OP6, 5);
    #1 chk(host_re && host_sel == REG_OP6 && host_addr == 5, "op6 read decode");
    cs = 0;
    #1 chk(!host_re, "no read without chipselect");
    read = 0;
    // memory read: lane r from row r, registered
    @(negedge clk);
    cs = 1; read = 1; addr = a(REG_RES, 9);
    @(negedge clk);
    cs = 0; read = 0;
    for (int r = 0; r < LN; r++)
      chk(rdata[r*W +: W] == {8'(r), 8'hA5, 8'd9, 8'(REG_RES)}, "read lane mapping");
    // configuration: row r gets nops = r % 4
    cw = '0;
    for (int r = 0; r < LN; r++) begin
      c = '0; c.nops = 2'(r % 4); c.op1 = OP_ADD; c.op2 = OP_MUL; c.op3 = pe_op_e'(r % 5); c.frac = 5'(r);
      cw[r*W +: W] = c;
    end
    wr(a(REG_CTRL, CTRL_CFG), cw);
    for (int r = 0; r < LN; r++) begin
      chk(cfg[r] == row_cfg_t'(cw[r*W +: W]), $sformatf("cfg row %0d", r));
      chk(path[r].active == (r % 4 != 0), "path active");
      if (r % 4 != 0) chk(path[r].res_sel == 2'(r % 4 - 1) && path[r].depth == 2'(r % 4), "path table");
    end
    wr(a(REG_CTRL, CTRL_COUNT), 256'd20);
    rd(a(REG_CTRL, CTRL_START), d);
    chk(d[0] == 0, "idle status");
    // start: depth = 3 (deepest active row)
    @(negedge clk);
    cs = 1; write = 1; addr = a(REG_CTRL, CTRL_START);
    #1 chk(seq_clear, "clear with start");
    @(negedge clk);
    cs = 0; write = 0;
    bc = 0;
    while (busy) begin
      if (bc == 3) begin
        cs = 1; write = 1; addr = a(REG_OP1, 1);
        #1 chk(!host_we, "memory write blocked while busy");
        addr = a(REG_CTRL, CTRL_CFG); wdata = '0;
      end
      if (bc == 4) begin
        write = 0; read = 1; addr = a(REG_CTRL, CTRL_START);
      end
      if (bc == 5) begin
        chk(rdata[0] == 1 && rdata[1] == 0, "busy status");
        cs = 0; read = 0;
      end
      if (bc == 20 + 3) begin
        cs = 1; read = 1; addr = a(REG_CTRL, CTRL_START);
      end
      bc++;
      @(negedge clk);
    end
    chk(bc == 20 + 3 + 1, $sformatf("busy %0d cycles exp 24", bc));
    // status read answered in the cycle busy falls: done already shows
    #1 chk(done && rdata[0] == 0 && rdata[1] == 1, "status as busy falls");
    cs = 0; read = 0;
    chk(cfg[3] == row_cfg_t'(cw[3*W +: W]), "config write blocked while busy");
    rd(a(REG_CTRL, CTRL_START), d);
    chk(d[0] == 0 && d[1] == 1, "done status");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
