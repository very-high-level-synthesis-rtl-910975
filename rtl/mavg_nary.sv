// mavg_nary: streaming moving average built from the n-ary adder form,
//   y_k = (x_k + x_{k-1} + x_{k-2}) / 4 for every new sample x_k.
//
// Addition is commutative and associative, so the three-input sum of
// consecutive samples can reuse a partial sum instead of keeping a
// three-entry queue and separate pipeline registers. The structure is:
//
//   x ──► B1 ──► B2 ──► (+) ──► B3 ──► (+) ──► /4 ──► OUT
//         │              ▲              ▲
//         └──────────────┴──────────────┘
//
// B1 and B2 delay the input by one and two samples. The first adder adds B1
// and B2, and B3 registers that partial sum. The second adder adds B3 and
// B1, which gives x_k + x_{k-1} + x_{k-2} once x_k is in B1. The adder and
// register arrangement follows the source's drawing of this alternative
// datapath. The divide by 4 (a fixed two-bit shift), the output register
// and the valid handshake are this design's, taken from the surrounding
// pipelined version of the same filter.
//
// Interface and timing: a sample on `din` is taken on a clock with
// `in_valid` high (B1, B2 and B3 all advance together). On the next clock
// OUT takes the result, and `out_valid` is high for one cycle, from the
// third sample after `clr` or reset on. `clr` restarts the stream: it
// empties the window count (a result already due is still delivered) but
// does not clear the data registers.
// Unsigned W-bit samples, W-bit results.
module mavg_nary #(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         in_valid,
  input  logic [W-1:0] din,
  output logic         out_valid,
  output logic [W-1:0] dout
);

  logic [W-1:0] b1, b2;
  logic [W:0]   b3;        // x_{k-1} + x_{k-2}, one bit wider
  logic [W:0]   part;      // b1 + b2
  logic [W+1:0] sum;       // b3 + b1
  logic [1:0]   fill;      // samples in the window, saturates at 3
  logic         fresh;     // a sample entered on the previous clock

  adder #(.W(W)) u_add1 (.a(b1), .b(b2), .y(part));
  adder #(.W(W + 1)) u_add2 (.a(b3), .b({1'b0, b1}), .y(sum));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      b1 <= '0;
      b2 <= '0;
      b3 <= '0;
    end else if (in_valid && !clr) begin
      b1 <= din;
      b2 <= b1;
      b3 <= part;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fill      <= '0;
      fresh     <= 1'b0;
      out_valid <= 1'b0;
      dout      <= '0;
    end else begin
      fresh     <= in_valid && !clr;
      out_valid <= 1'b0;
      if (clr)                       fill <= '0;
      else if (in_valid && fill != 2'd3) fill <= fill + 1'b1;
      if (fresh && fill == 2'd3) begin
        dout      <= sum[W+1:2];
        out_valid <= 1'b1;
      end
    end
  end

endmodule
