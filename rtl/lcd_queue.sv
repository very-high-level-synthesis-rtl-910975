// lcd_queue: input queue extended for a loop-carried dependence.
//
// Like input_queue, entries move up one place on each `shift` with `din`
// entering q[0]; but entry q[INS] is fed through a two-input multiplexor
// that selects either its queue predecessor q[INS-1] (sel_fb low) or the
// value `fb` just computed by the datapath (sel_fb high). That inserts a
// freshly computed element into the middle of the queue, so a later
// iteration that reads it gets the new value without a trip through memory.
// For a[i] = (a[i-1] + a[i] + a[i+1]) / 4 the queue has three entries and the
// multiplexor feeds the oldest one (q[2] = a[i-1]), as in the source's
// drawing of this queue. Entries above INS shift as usual. Reset to zero is
// this design's choice.
module lcd_queue #(
  parameter int unsigned W   = 16,
  parameter int unsigned LEN = 3,
  parameter int unsigned INS = LEN - 1   // entry fed by the multiplexor
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         shift,
  input  logic         sel_fb,   // 1: q[INS] takes fb, 0: takes q[INS-1]
  input  logic [W-1:0] din,
  input  logic [W-1:0] fb,
  output logic [W-1:0] q [LEN]
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < LEN; j++) q[j] <= '0;
    end else if (shift) begin
      q[0] <= din;
      for (int j = 1; j < LEN; j++)
        q[j] <= (j == INS && sel_fb) ? fb : q[j-1];
    end
  end

endmodule
