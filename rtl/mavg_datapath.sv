// mavg_datapath: datapath of the moving-average loop
//   for (i = 0; i < N; i++) b[i] = (a[i] + a[i+1] + a[i+2]) / 4;
//
// Structure, input to output: a three-entry input queue (one new a[] element
// per `s`), two binary adders forming the three-input sum, register R1
// (loaded on `l1`), a divide-by-4 unit that shifts right one bit per `d`
// cycle, and register R2 (loaded on `l2`) whose value is the result to store.
// The structure is the source's pipelined datapath with control signals; the
// operand widths are this design's: W-bit unsigned inputs, a W+2-bit sum
// (no overflow for three operands) and a W-bit result, which always holds
// sum/4.
//
// Timing: with the schedule s, l1, d, d, l2 on consecutive cycles, the
// result of the queue contents sampled at l1 is on `result` after the l2
// edge. The datapath has no sequencing of its own; ctrl_fsm drives it.
module mavg_datapath
  import mavg_pkg::*;
#(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  ctrl_t        ctrl,
  input  logic [W-1:0] din,     // next array element, taken on ctrl.s
  output logic [W-1:0] result   // register R2
);

  localparam int unsigned SW = W + 2;  // sum width

  logic [W-1:0]  q [3];   // q[2] = a[i], q[1] = a[i+1], q[0] = a[i+2]
  logic [W:0]    sum_lo;  // a[i+1] + a[i+2]
  logic [W+1:0]  sum;     // a[i] + a[i+1] + a[i+2]
  logic [SW-1:0] r1;
  logic [SW-1:0] quot;
  logic [SW-1:0] r2;

  input_queue #(.W(W), .ALPHA(1), .BETA_MIN(0), .BETA_MAX(2)) u_queue (
    .clk, .rst_n, .shift(ctrl.s), .din, .q
  );

  adder #(.W(W)) u_add_lo (
    .a(q[1]), .b(q[0]), .y(sum_lo)
  );

  adder #(.W(W + 1)) u_add_hi (
    .a({1'b0, q[2]}), .b(sum_lo), .y(sum)
  );

  load_reg #(.W(SW)) u_r1 (
    .clk, .rst_n, .load(ctrl.l1), .d(sum), .q(r1)
  );

  shift_divider #(.W(SW), .STAGES(2)) u_div (
    .clk, .rst_n, .d(ctrl.d), .din(r1), .q(quot)
  );

  load_reg #(.W(SW)) u_r2 (
    .clk, .rst_n, .load(ctrl.l2), .d(quot), .q(r2)
  );

  // The two top bits of R2 are always zero (sum / 4 < 2**W).
  assign result = r2[W-1:0];

endmodule
