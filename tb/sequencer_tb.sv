// Self-checking testbench of the generic sequencer.
//
// For chain depths 1..3 and several data counts (including 0 and the full
// memory) it starts the sequencer and checks, cycle by cycle: clear only in
// the start cycle, read indices 0..count-1 on consecutive cycles, busy high
// for exactly count + depth + 1 cycles, and a single done pulse as busy
// falls. A second start while busy must be ignored.
module sequencer_tb;

  localparam int AW = 8;

  logic clk = 0, rst_n = 0;
  logic start = 0;
  logic [AW:0] count = 0;
  logic [1:0] depth = 0;
  logic clear, rd, busy, done;
  logic [AW-1:0] raddr;

  int checks = 0, failures = 0;

  sequencer #(.AW(AW)) dut (.*);

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

  task automatic run(int n, int d);
    int busy_cycles = 0, reads = 0, dones = 0;
    @(negedge clk);
    count = (AW+1)'(n); depth = 2'(d); start = 1;
    #1 chk(clear == 1'b1, "clear with start");
    @(negedge clk);
    start = 1'b0;
    for (int c = 0; c < n + d + 8; c++) begin
      if (busy) busy_cycles++;
      if (c > 0) chk(!clear, $sformatf("no clear while running c=%0d n=%0d d=%0d", c, n, d));
      if (rd) begin
        chk(raddr == AW'(reads), $sformatf("raddr %0d exp %0d", raddr, reads));
        chk(c == reads, "reads on consecutive cycles");
        reads++;
      end
      if (done) begin
        dones++;
        chk(c == n + d + 1, $sformatf("done at %0d exp %0d", c, n + d + 1));
        chk(!busy, "busy low with done");
      end
      start = (c == 1);   // a start while busy is ignored
      @(negedge clk);
    end
    chk(reads == n, $sformatf("reads %0d exp %0d", reads, n));
    chk(busy_cycles == n + d + 1, $sformatf("busy %0d exp %0d (n=%0d d=%0d)", busy_cycles, n + d + 1, n, d));
    chk(dones == 1, "one done pulse");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int d = 1; d <= 3; d++) begin
      run(1, d);
      run(7, d);
      run(256, d);
      run($urandom_range(2, 100), d);
    end
    // count 0: one busy cycle, then done
    @(negedge clk); count = 0; depth = 3; start = 1;
    @(negedge clk); start = 0;
    chk(busy && !rd, "count 0 busy without reads");
    @(negedge clk);
    chk(done && !busy, "count 0 done");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
