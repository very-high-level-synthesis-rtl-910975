// tb_shift_divider: checks that an operand comes out divided by four after
// two clocks with d high, that d low freezes the unit, and that operands
// entering every cycle overlap correctly (steady-state use).
module tb_shift_divider;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, d = 0;
  logic [17:0] din, q;
  logic [17:0] hist [$];

  shift_divider #(.W(18), .STAGES(2)) dut (.clk, .rst_n, .d, .din, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    din = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // One operand, two d cycles.
    for (int i = 0; i < 200; i++) begin
      logic [17:0] v;
      v = 18'($urandom);
      @(negedge clk); din = v; d = 1;
      @(negedge clk); din = 18'($urandom); d = 1;   // second step ignores din
      @(negedge clk); d = 0;
      checks++;
      if (q !== (v >> 2)) begin
        failures++; $display("FAIL single: %0d/4 gave %0d", v, q);
      end
      // hold with d low
      repeat (2) @(negedge clk);
      checks++;
      if (q !== (v >> 2)) begin failures++; $display("FAIL hold"); end
    end
    // Stream: a new operand every cycle with d always high.
    hist.delete();
    d = 1;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      din = 18'($urandom);
      hist.push_back(din);
      @(posedge clk);
      #1;
      if (hist.size() >= 2) begin
        checks++;
        if (q !== (hist[hist.size()-2] >> 2)) begin
          failures++; $display("FAIL stream %0d: q=%0d", i, q);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
