// input_queue: shift-register queue that reuses array elements between loop
// iterations, so each iteration reads only one new element.
//
// For references a[ALPHA*i + beta] whose betas fall in one remainder class
// modulo ALPHA, the queue holds LEN = (BETA_MAX - BETA_MIN)/ALPHA + 1 entries.
// On a clock with `shift` high, `din` enters q[0] and every entry moves one
// place up (q[j] <= q[j-1]); q[LEN-1] is the oldest element. After the queue
// has been filled, q[LEN-1-j] holds the element referenced with
// beta = BETA_MIN + j*ALPHA. The length formula is the source's; the entry
// numbering and the reset to zero are this design's. The moving-average
// example (betas 0, 1, 2, ALPHA 1) gives the default length of three.
module input_queue #(
  parameter int unsigned W        = 16,
  parameter int unsigned ALPHA    = 1,
  parameter int unsigned BETA_MIN = 0,
  parameter int unsigned BETA_MAX = 2,
  parameter int unsigned LEN      = (BETA_MAX - BETA_MIN) / ALPHA + 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         shift,
  input  logic [W-1:0] din,
  output logic [W-1:0] q [LEN]
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < LEN; j++) q[j] <= '0;
    end else if (shift) begin
      q[0] <= din;
      for (int j = 1; j < LEN; j++) q[j] <= q[j-1];
    end
  end

endmodule
