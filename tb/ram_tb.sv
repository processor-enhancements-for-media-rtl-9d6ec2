// Self-checking testbench of the system RAM.
//
// Writes random 256-bit words to random addresses and reads random
// addresses against a reference array: read data must appear one cycle
// after the read and stay until the next read.
module ram_tb;

  localparam int DEPTH = 1024;

  logic clk = 0;
  logic we = 0, re = 0;
  logic [9:0] addr = 0;
  logic [255:0] wdata = 0, rdata;
  logic [255:0] ref_mem [DEPTH];
  logic valid [DEPTH];

  int checks = 0, failures = 0;

  ram #(.W(256), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [255:0] exp;
    foreach (valid[i]) valid[i] = 0;
    @(negedge clk);
    for (int k = 0; k < 4000; k++) begin
      addr = 10'($urandom_range(0, 63) * 16 + $urandom_range(0, 1));
      if ($urandom_range(0, 1) == 1 || !valid[addr]) begin
        we = 1; re = 0; wdata = {8{$urandom}};
        ref_mem[addr] = wdata; valid[addr] = 1;
        @(negedge clk);
        we = 0;
      end else begin
        we = 0; re = 1; exp = ref_mem[addr];
        @(negedge clk);
        re = 0;
        checks++;
        if (rdata !== exp) begin failures++; $display("FAIL addr %0d", addr); end
        @(negedge clk);
        checks++;
        if (rdata !== exp) begin failures++; $display("FAIL hold addr %0d", addr); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
