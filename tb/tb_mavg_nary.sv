// tb_mavg_nary: streams random samples, with random gaps in in_valid and
// occasional restarts, into the n-ary moving average and compares every
// result with (x_k + x_{k-1} + x_{k-2}) / 4 computed from a model of the
// stream. Checks that a result appears exactly one clock after each sample
// once three samples are in the window, and never before.
module tb_mavg_nary;
  int checks = 0, failures = 0, n_out = 0, n_clr = 0;
  logic clk = 0, rst_n = 0, clr = 0, in_valid = 0;
  logic [15:0] din, dout;
  logic out_valid;
  logic [15:0] win [$];
  int unsigned exp_q [$];

  mavg_nary #(.W(16)) dut (.clk, .rst_n, .clr, .in_valid, .din, .out_valid, .dout);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit expect_out, due;
    int unsigned exp, exp_due;
    din = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    expect_out = 0;
    due = 0;
    exp_due = 0;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      // check the output due from the previous clock's sample
      checks++;
      if (out_valid !== expect_out || (expect_out && dout !== 16'(exp))) begin
        failures++;
        $display("FAIL cycle %0d: out_valid=%b dout=%0d expected %b/%0d",
                 i, out_valid, dout, expect_out, exp);
      end
      if (out_valid) n_out++;
      clr      = (i > 10) && (($urandom % 200) == 0);
      in_valid = (i < 10) ? 1'b1 : (($urandom % 4) != 0);
      din      = (i % 97 == 5) ? 16'hFFFF : 16'($urandom);
      @(posedge clk);
      // the result of the sample taken now appears after the next clock
      expect_out = due;
      exp = exp_due;
      due = 0;
      if (clr) begin
        win.delete();
        n_clr++;
      end else if (in_valid) begin
        win.push_back(din);
        if (win.size() > 3) void'(win.pop_front());
        if (win.size() == 3) begin
          due = 1;
          exp_due = (int'(win[0]) + int'(win[1]) + int'(win[2])) / 4;
        end
      end
    end
    checks += 2;
    if (n_out == 0) begin failures++; $display("FAIL no outputs"); end
    if (n_clr == 0) begin failures++; $display("FAIL no restart"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
