// tb_input_queue: checks the queue length formula and the shift behaviour.
// The moving-average queue (betas 0..2, stride 1) must have three entries;
// a stride-2 queue with betas 0..6 must have four. Random shifts are checked
// against a model queue.
module tb_input_queue;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, shift = 0;
  logic [15:0] din;
  logic [15:0] q3 [3];
  logic [15:0] q4 [4];
  logic [15:0] m [4];

  input_queue #(.W(16)) dut3 (.clk, .rst_n, .shift, .din, .q(q3));
  input_queue #(.W(16), .ALPHA(2), .BETA_MIN(0), .BETA_MAX(6)) dut4 (
    .clk, .rst_n, .shift, .din, .q(q4));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    checks += 2;
    if (dut3.LEN != 3) begin failures++; $display("FAIL LEN3 = %0d", dut3.LEN); end
    if (dut4.LEN != 4) begin failures++; $display("FAIL LEN4 = %0d", dut4.LEN); end
    din = '0;
    for (int j = 0; j < 4; j++) m[j] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      shift = 1'($urandom);
      din = 16'($urandom);
      @(posedge clk);
      if (shift) begin
        for (int j = 3; j > 0; j--) m[j] = m[j-1];
        m[0] = din;
      end
      #1;
      for (int j = 0; j < 4; j++) begin
        checks++;
        if (q4[j] !== m[j]) begin failures++; $display("FAIL q4[%0d]", j); end
      end
      for (int j = 0; j < 3; j++) begin
        checks++;
        if (q3[j] !== m[j]) begin failures++; $display("FAIL q3[%0d]", j); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
