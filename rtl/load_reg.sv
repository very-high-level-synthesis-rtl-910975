// load_reg: data register with a load control, as used for R1 and R2 of the
// moving-average datapath.
//
// On a rising clock edge with `load` high the register takes `d`; otherwise
// it keeps its value. Asynchronous active-low reset to zero (this design's
// choice). The output is the register itself, so a value loaded at edge t is
// visible from edge t on.
module load_reg #(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    q <= '0;
    else if (load) q <= d;
  end

endmodule
