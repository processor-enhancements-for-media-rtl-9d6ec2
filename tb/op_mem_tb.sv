// Self-checking testbench of the embedded memory.
//
// Fills the memory with random words, then issues random reads and writes,
// some in the same cycle, against a reference array: read data must appear
// one cycle after the read and hold until the next read, and a read of the
// address being written returns the old word.
module op_mem_tb;

  localparam int DEPTH = 256;

  logic clk = 0;
  logic we = 0, re = 0;
  logic [7:0] waddr = 0, raddr = 0;
  logic [31:0] wdata = 0, rdata;
  logic [31:0] ref_mem [DEPTH];

  int checks = 0, failures = 0;

  op_mem #(.W(32), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] exp;
    @(negedge clk);
    for (int i = 0; i < DEPTH; i++) begin
      we = 1; waddr = 8'(i); wdata = $urandom; ref_mem[i] = wdata;
      @(negedge clk);
    end
    we = 0;
    for (int k = 0; k < 2000; k++) begin
      re = (k == 0) || ($urandom_range(0, 3) != 0);
      raddr = 8'($urandom);
      we = $urandom_range(0, 1);
      waddr = ($urandom_range(0, 3) == 0) ? raddr : 8'($urandom);
      wdata = $urandom;
      if (re) exp = ref_mem[raddr];
      @(negedge clk);
      if (we) ref_mem[waddr] = wdata;
      checks++;
      if (rdata !== exp) begin
        failures++;
        $display("FAIL k=%0d raddr=%0d got %h exp %h", k, raddr, rdata, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
