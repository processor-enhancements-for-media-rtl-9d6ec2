// Self-checking testbench of the RAM bus interface.
//
// The interface drives a RAM instance. Random bus writes and reads are
// checked against a reference array: a write must complete in one cycle,
// a read in exactly two, and read data must match the last word written.
// Back-to-back reads are included to check that the interface returns to
// its idle state after each read.
module ram_if_tb;
  import coproc_pkg::*;

  localparam int AW = 6;

  logic clk = 0, rst_n = 0;
  bus_req_t s_req = '0;
  bus_rsp_t s_rsp;
  logic ram_we, ram_re;
  logic [AW-1:0] ram_addr;
  logic [BUS_W-1:0] ram_wdata, ram_rdata;
  logic [BUS_W-1:0] ref_mem [2**AW];

  int checks = 0, failures = 0;

  ram_if #(.AW(AW)) dut (.*);
  ram #(.W(BUS_W), .DEPTH(2**AW)) u_ram (.clk, .we(ram_we), .re(ram_re), .addr(ram_addr),
                                         .wdata(ram_wdata), .rdata(ram_rdata));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic xfer(logic is_wr, logic [ADDR_W-1:0] ad, logic [BUS_W-1:0] wd,
                      output logic [BUS_W-1:0] rdv, output int cyc);
    s_req.read = !is_wr; s_req.write = is_wr; s_req.addr = ad; s_req.wdata = wd;
    cyc = 1;
    #1;
    while (s_rsp.waitreq) begin
      @(negedge clk);
      #1 cyc++;
    end
    rdv = s_rsp.rdata;
    @(negedge clk);
    s_req = '0;
  endtask

  initial begin
    logic [BUS_W-1:0] d, wd;
    int cyc;
    logic [AW-1:0] a;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 2**AW; i++) begin
      wd = {8{$urandom}};
      xfer(1, ADDR_W'(i), wd, d, cyc);
      ref_mem[i] = wd;
      checks++;
      if (cyc != 1) begin failures++; $display("FAIL write took %0d cycles", cyc); end
    end
    for (int k = 0; k < 600; k++) begin
      a = AW'($urandom);
      if ($urandom_range(0, 2) == 0) begin
        wd = {8{$urandom}};
        xfer(1, ADDR_W'(a), wd, d, cyc);
        ref_mem[a] = wd;
      end else begin
        xfer(0, ADDR_W'(a), '0, d, cyc);
        checks++;
        if (cyc != 2 || d !== ref_mem[a]) begin
          failures++;
          $display("FAIL read %0d cycles %0d", a, cyc);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
