// Self-checking testbench of the per-slave round-robin arbiter.
//
// Four model masters raise requests at random and hold them until their
// transfer completes; each granted transfer takes 1 to 3 cycles (done is
// raised in its last cycle). A reference model of the policy (grant held
// until done, then the nearest requesting master after the one served)
// predicts the grant of every cycle. Also checked: the grant is one-hot and
// only to a requesting master, and no master waits for more than three
// other transfers.
module bus_arbiter_tb;

  localparam int N = 4;

  logic clk = 0, rst_n = 0;
  logic [N-1:0] req = '0;
  logic done = 0;
  logic [N-1:0] gnt;
  logic [1:0] gnt_idx;
  logic gnt_valid;

  int checks = 0, failures = 0;

  bus_arbiter #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int m_last = N - 1, m_owner = -1, exp, left = 0, waits [N];
    int served_while_waiting [N];
    int contended = 0;
    foreach (waits[i]) begin waits[i] = 0; served_while_waiting[i] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < 3000; c++) begin
      // new requests from idle masters
      for (int m = 0; m < N; m++)
        if (!req[m] && $urandom_range(0, 3) == 0) req[m] = 1'b1;
      // reference grant
      exp = -1;
      if (m_owner >= 0) exp = m_owner;
      else for (int k = 1; k <= N; k++)
        if (exp < 0 && req[(m_last + k) % N]) exp = (m_last + k) % N;
      if (exp >= 0 && m_owner < 0) left = $urandom_range(1, 3);
      if ($countones(req) > 1) contended++;
      done = (exp >= 0) && (left == 1);
      #1;
      checks++;
      if (exp < 0) begin
        if (gnt_valid || gnt != 0) begin failures++; $display("FAIL grant without request"); end
      end else if (!gnt_valid || gnt_idx != 2'(exp) || gnt != N'(1) << exp) begin
        failures++;
        $display("FAIL c=%0d req=%b exp %0d got %0d/%b", c, req, exp, gnt_idx, gnt);
      end
      @(negedge clk);
      if (exp >= 0) begin
        if (left == 1) begin
          req[exp] = 1'b0;
          m_last = exp; m_owner = -1;
          for (int m = 0; m < N; m++)
            if (req[m] && m != exp) served_while_waiting[m]++;
          served_while_waiting[exp] = 0;
        end else begin
          m_owner = exp; left--;
        end
      end
      for (int m = 0; m < N; m++) begin
        checks++;
        if (served_while_waiting[m] > N - 1) begin
          failures++; $display("FAIL master %0d starved", m);
          served_while_waiting[m] = 0;
        end
      end
    end
    checks++;
    if (contended < 100) begin failures++; $display("FAIL too little contention"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
