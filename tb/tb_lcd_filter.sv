// tb_lcd_filter: loads an array, runs the in-place loop-carried filter and
// compares the memory with a sequential model of
//   for (i = 1; i <= N; i++) a[i] = (a[i-1] + a[i] + a[i+1]) / 4;
// Also checks the run time of 3 + 2N cycles and that untouched words keep
// their values.
module tb_lcd_filter;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic host_we = 0;
  logic [7:0] host_addr, n_iter;
  logic [15:0] host_wdata, host_rdata;
  logic start = 0, busy, done;
  logic [15:0] m [256];

  lcd_filter #(.W(16), .AW(8)) dut (
    .clk, .rst_n, .host_we, .host_addr, .host_wdata, .host_rdata,
    .start, .n_iter, .busy, .done);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int n);
    int cyc = 0;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      host_we = 1; host_addr = 8'(i); host_wdata = 16'($urandom);
      m[i] = host_wdata;
    end
    @(negedge clk);
    host_we = 0;
    for (int i = 1; i <= n; i++)
      m[i] = 16'((int'(m[i-1]) + int'(m[i]) + int'(m[i+1])) / 4);
    n_iter = 8'(n); start = 1;
    @(negedge clk);
    start = 0;
    while (!done) begin
      @(negedge clk);
      cyc++;
      if (cyc > 1000) break;
    end
    checks++;
    if (cyc != 3 + 2 * n) begin
      failures++; $display("FAIL N=%0d took %0d cycles, expected %0d", n, cyc, 3 + 2 * n);
    end
    for (int i = 0; i < 256; i++) begin
      host_addr = 8'(i); #1;
      checks++;
      if (host_rdata !== m[i]) begin
        failures++; $display("FAIL N=%0d a[%0d]=%0d expected %0d", n, i, host_rdata, m[i]);
      end
    end
  endtask

  initial begin
    host_addr = '0; host_wdata = '0; n_iter = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(1);
    run(2);
    run(17);
    run(254);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
