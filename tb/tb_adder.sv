// tb_adder: checks the binary adder against integer addition on corner
// values and random operands, at two widths.
module tb_adder;
  int checks = 0, failures = 0;
  logic [15:0] a, b;
  logic [16:0] y;
  logic [4:0]  a5, b5;
  logic [5:0]  y5;

  adder #(.W(16)) dut (.a, .b, .y);
  adder #(.W(5))  dut5 (.a(a5), .b(b5), .y(y5));

  task automatic chk(int unsigned got, int unsigned exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = 16'hFFFF; b = 16'hFFFF; #1;
    chk(y, 32'h1FFFE, "max+max");
    a = 0; b = 0; #1;
    chk(y, 0, "zero");
    for (int i = 0; i < 500; i++) begin
      a = 16'($urandom); b = 16'($urandom);
      a5 = 5'($urandom); b5 = 5'($urandom);
      #1;
      chk(y, int'(a) + int'(b), "random16");
      chk(y5, int'(a5) + int'(b5), "random5");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
