// tb_local_mem: random writes and reads against an array model, including a
// read of an address in the cycle after it was written.
module tb_local_mem;
  int checks = 0, failures = 0;
  logic clk = 0, we = 0;
  logic [5:0] waddr, raddr;
  logic [15:0] wdata, rdata;
  logic [15:0] model [64];

  local_mem #(.W(16), .AW(6)) dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Fill every word.
    for (int i = 0; i < 64; i++) begin
      @(negedge clk);
      we = 1; waddr = 6'(i); wdata = 16'($urandom); model[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 64; i++) begin
      raddr = 6'(i); #1;
      checks++;
      if (rdata !== model[i]) begin failures++; $display("FAIL fill %0d", i); end
    end
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      we = 1'($urandom); waddr = 6'($urandom); wdata = 16'($urandom);
      raddr = 6'($urandom);
      #1;
      checks++;
      if (rdata !== model[raddr]) begin failures++; $display("FAIL read %0d", raddr); end
      @(posedge clk);
      if (we) model[waddr] = wdata;
      #1;
      raddr = waddr;
      #1;
      checks++;
      if (rdata !== model[raddr]) begin failures++; $display("FAIL read after write"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
