// shift_divider: divide by 2**STAGES as a chain of one-bit right shifts,
// one shift per clock on which the control line `d` is high.
//
// The moving-average example divides by 4 in two clock cycles, each a "shift
// right 1 bit" step. This unit holds one register per shift step: on a clock
// with `d` high, stage 1 takes the input shifted right by one and every later
// stage takes its predecessor shifted right by one. An operand presented on
// `din` therefore appears as din >> STAGES on `q` after STAGES clocks with `d`
// high. Because each step has its own register, a new operand can enter stage
// 1 while the previous one finishes in stage 2, which is what lets the
// schedule issue `d` in every steady-state cycle with a period of two. The
// staging is this design's reading; the source gives only the shift steps and
// the two-cycle latency. Unsigned operands, so the shift is floor division.
module shift_divider #(
  parameter int unsigned W      = 18,  // operand width
  parameter int unsigned STAGES = 2    // number of one-bit shifts (divide by 4)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         d,      // shift step enable
  input  logic [W-1:0] din,
  output logic [W-1:0] q       // din >> STAGES, after STAGES d-cycles
);

  logic [W-1:0] stage [STAGES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < STAGES; i++) stage[i] <= '0;
    end else if (d) begin
      stage[0] <= din >> 1;
      for (int i = 1; i < STAGES; i++) stage[i] <= stage[i-1] >> 1;
    end
  end

  assign q = stage[STAGES-1];

endmodule
