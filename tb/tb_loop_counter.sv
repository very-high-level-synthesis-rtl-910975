// tb_loop_counter: checks counting, saturation at the limit, the done flag
// and the synchronous clear against a reference model, with random enables,
// clears and limits.
module tb_loop_counter;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, clr = 0, en = 0;
  logic [5:0] limit, count, model;
  logic done;

  loop_counter #(.CW(6)) dut (.clk, .rst_n, .clr, .en, .limit, .count, .done);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_now(string what);
    checks++;
    if (count !== model || done !== (model >= limit)) begin
      failures++;
      $display("FAIL %s: count=%0d done=%0b model=%0d limit=%0d",
               what, count, done, model, limit);
    end
  endtask

  initial begin
    limit = 6'd10;
    repeat (2) @(posedge clk);
    rst_n = 1;
    model = 0;
    #1 check_now("after reset");
    // Plain count to the limit, then hold.
    en = 1;
    for (int i = 0; i < 15; i++) begin
      @(posedge clk);
      if (model < limit) model++;
      #1 check_now("count up");
    end
    checks++;
    if (count != 6'd10) begin failures++; $display("FAIL did not stop at limit"); end
    // Random operation.
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      clr = ($urandom % 8) == 0;
      en  = 1'($urandom);
      if (($urandom % 50) == 0) limit = 6'($urandom);
      #1 check_now("random comb");
      @(posedge clk);
      if (clr) model = 0;
      else if (en && model < limit) model++;
      #1 check_now("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
