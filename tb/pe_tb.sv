// Self-checking testbench of the processing element.
//
// Uses a PE with a 2-cycle operand shift register (the third PE of a row):
// b values are presented two cycles before the a values they pair with.
// For every operation (MUL with several fixed-point shifts, ADD, SUB, ACC,
// MAC) a stream of random operands is run and each registered result is
// compared with a reference model one cycle after its operands, including
// the accumulator clear between streams.
module pe_tb;
  import coproc_pkg::*;

  localparam int N = 24;
  localparam int D = 2;

  logic clk = 0, rst_n = 0;
  logic clear = 0, en = 0;
  pe_op_e op = OP_MUL;
  logic [4:0] frac = 0;
  logic [31:0] a = 0, b_mem = 0, y;
  logic y_valid;

  int checks = 0, failures = 0;

  pe #(.W(32), .DELAY(D)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] model(pe_op_e o, logic [31:0] x, logic [31:0] z,
                                         logic [31:0] acc, logic [4:0] f);
    logic signed [63:0] p;
    p = $signed(x) * $signed(z);
    p = p >>> f;
    case (o)
      OP_MUL:  return p[31:0];
      OP_ADD:  return x + z;
      OP_SUB:  return x - z;
      OP_ACC:  return acc + x;
      default: return acc + p[31:0];
    endcase
  endfunction

  task automatic run(pe_op_e o, logic [4:0] f);
    logic [31:0] av [N], bv [N];
    logic [31:0] acc, exp;
    for (int i = 0; i < N; i++) begin
      av[i] = $urandom;
      bv[i] = $urandom;
      if (i % 3 == 0) begin av[i] = $urandom_range(0, 255); bv[i] = -$urandom_range(0, 255); end
    end
    @(negedge clk);
    op = o; frac = f; clear = 1;
    @(negedge clk);
    clear = 0;
    acc = 0;
    for (int c = 0; c < N + D + 1; c++) begin
      b_mem = (c < N) ? bv[c] : 32'h0;
      en    = (c >= D) && (c - D < N);
      a     = en ? av[c - D] : 32'h0;
      @(negedge clk);
      if (c >= D && c - D < N) begin
        exp = model(o, av[c - D], bv[c - D], acc, f);
        if (o == OP_ACC || o == OP_MAC) acc = exp;
        checks++;
        if (!y_valid || y !== exp) begin
          failures++;
          $display("FAIL op=%s f=%0d i=%0d y=%h exp=%h v=%b", o.name(), f, c - D, y, exp, y_valid);
        end
      end else if (c > D + N - 1 && c > 0) begin
        checks++;
        if (y_valid) begin failures++; $display("FAIL spurious valid"); end
      end
    end
    en = 0;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(OP_MUL, 0);
    run(OP_MUL, 16);
    run(OP_ADD, 0);
    run(OP_SUB, 0);
    run(OP_ACC, 0);
    run(OP_MAC, 0);
    run(OP_MAC, 8);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
