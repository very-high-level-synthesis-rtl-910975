// loop_counter: the counter of a counter-based controller.
//
// Counts up by one on each enabled clock while its value is below `limit`;
// once it reaches `limit` it holds and raises `done` ("if < limit increment,
// else done"). `clr` is a synchronous reset to zero and wins over `en`; an
// owner that wants a wrapping counter clears it on `done`. `done` is
// combinational from the count and the limit, so it is valid in the same
// cycle as the count it refers to. The asynchronous active-low reset and the
// run-time limit input are this design's choices. The same module serves
// the controller's stage counters and the memory address counters, which is
// the reuse the counter-based style is chosen for.
module loop_counter #(
  parameter int unsigned CW = 8  // counter width
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clr,    // synchronous reset to 0
  input  logic          en,     // count enable
  input  logic [CW-1:0] limit,  // last value the counter reaches
  output logic [CW-1:0] count,
  output logic          done    // count has reached limit
);

  assign done = (count >= limit);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          count <= '0;
    else if (clr)        count <= '0;
    else if (en && !done) count <= count + 1'b1;
  end

endmodule
