// Generic sequencer of the reconfigurable matrix.
//
// The matrix runs short chains of 1, 2 or 3 operations over streams, so one
// sequencer serves every instruction: it is parameterized at run time only
// by the number of data to process (count) and the chain length (depth, the
// largest of the active rows). It issues one memory read per cycle, index 0
// to count-1, to all rows at once, then waits for the pipeline to drain.
//
// Timing: start (while idle) pulses clear in the same cycle. busy is high
// for exactly count + depth + 1 cycles from the next cycle on: count issue
// cycles, then depth + 1 drain cycles (one memory read stage plus one stage
// per chained PE). done pulses for one cycle as busy falls. A start with
// count = 0 gives a done pulse after a single busy cycle. A start while busy
// is ignored. The exact schedule is this design's choice.
module sequencer #(
  parameter int unsigned AW    = 8,
  parameter int unsigned CNT_W = AW + 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [CNT_W-1:0] count,
  input  logic [1:0]       depth,
  output logic             clear,
  output logic             rd,
  output logic [AW-1:0]    raddr,
  output logic             busy,
  output logic             done
);

  typedef enum logic [1:0] {S_IDLE, S_ISSUE, S_DRAIN} state_e;

  state_e           state;
  logic [CNT_W-1:0] idx;
  logic [CNT_W-1:0] cnt_q;
  logic [2:0]       drain;

  assign clear = start && state == S_IDLE;
  assign rd    = state == S_ISSUE;
  assign raddr = idx[AW-1:0];
  assign busy  = state != S_IDLE;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      idx   <= '0;
      cnt_q <= '0;
      drain <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          idx   <= '0;
          cnt_q <= count;
          drain <= {1'b0, depth};
          state <= (count == '0) ? S_DRAIN : S_ISSUE;
          if (count == '0) drain <= '0;
        end
        S_ISSUE: begin
          idx <= idx + 1'b1;
          if (idx + 1'b1 == cnt_q) state <= S_DRAIN;
        end
        S_DRAIN: begin
          if (drain == '0) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else begin
            drain <= drain - 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
