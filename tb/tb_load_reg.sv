// tb_load_reg: checks that the register takes its input only on clocks with
// load high and holds otherwise, and that reset clears it.
module tb_load_reg;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, load = 0;
  logic [15:0] d, q, model;

  load_reg #(.W(16)) dut (.clk, .rst_n, .load, .d, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = '0;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (q !== 16'd0) begin failures++; $display("FAIL reset value %h", q); end
    rst_n = 1;
    model = '0;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      load = 1'($urandom);
      d    = 16'($urandom);
      @(posedge clk);
      if (load) model = d;
      #1;
      checks++;
      if (q !== model) begin
        failures++;
        $display("FAIL cycle %0d: q=%h expected %h", i, q, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
