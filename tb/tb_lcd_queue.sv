// tb_lcd_queue: checks that the queue shifts like a plain queue with the
// multiplexor on its predecessor and that, with the multiplexor on feedback,
// the oldest entry takes the fed-back value instead.
module tb_lcd_queue;
  int checks = 0, failures = 0;
  int n_fb = 0;
  logic clk = 0, rst_n = 0, shift = 0, sel_fb = 0;
  logic [15:0] din, fb;
  logic [15:0] q [3];
  logic [15:0] m [3];

  lcd_queue #(.W(16), .LEN(3)) dut (.clk, .rst_n, .shift, .sel_fb, .din, .fb, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    din = '0; fb = '0;
    for (int j = 0; j < 3; j++) m[j] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      shift  = 1'($urandom);
      sel_fb = 1'($urandom);
      din = 16'($urandom);
      fb  = 16'($urandom);
      @(posedge clk);
      if (shift) begin
        m[2] = sel_fb ? fb : m[1];
        m[1] = m[0];
        m[0] = din;
        if (sel_fb) n_fb++;
      end
      #1;
      for (int j = 0; j < 3; j++) begin
        checks++;
        if (q[j] !== m[j]) begin failures++; $display("FAIL q[%0d] cycle %0d", j, i); end
      end
    end
    checks++;
    if (n_fb == 0) begin failures++; $display("FAIL no feedback insertion exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
