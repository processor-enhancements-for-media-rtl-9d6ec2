// Round-robin arbiter for one slave of the bus module.
//
// Among the masters requesting this slave (req), it grants one. The grant
// is combinational in the first cycle of a transfer, so an uncontended
// access sees no extra delay, and it is then held (locked) until the
// transfer completes (done: the granted transfer saw waitreq low). After a
// completed transfer the search for the next grant starts at the master
// after the one just served, so no requesting master waits for more than
// N-1 other transfers. The arbitration policy is this design's choice.
module bus_arbiter #(
  parameter int unsigned N  = 4,
  parameter int unsigned IW = $clog2(N)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [N-1:0]  req,
  input  logic          done,
  output logic [N-1:0]  gnt,
  output logic [IW-1:0] gnt_idx,
  output logic          gnt_valid
);

  logic          locked;
  logic [IW-1:0] owner;
  logic [IW-1:0] last;

  always_comb begin
    gnt_idx   = owner;
    gnt_valid = locked;
    if (!locked) begin
      for (int k = int'(N); k >= 1; k--) begin
        // Scan from last+N down to last+1 so the nearest master after last wins.
        if (req[(int'(last) + k) % int'(N)]) begin
          gnt_idx   = IW'((int'(last) + k) % int'(N));
          gnt_valid = 1'b1;
        end
      end
    end
    gnt = '0;
    if (gnt_valid) gnt[gnt_idx] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      locked <= 1'b0;
      owner  <= '0;
      last   <= IW'(N - 1);
    end else if (gnt_valid) begin
      if (done) begin
        locked <= 1'b0;
        last   <= gnt_idx;
      end else begin
        locked <= 1'b1;
        owner  <= gnt_idx;
      end
    end
  end

  // A master keeps its request until its transfer completes.
  assert property (@(posedge clk) disable iff (!rst_n) locked |-> req[owner]);

endmodule
