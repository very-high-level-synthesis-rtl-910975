// tb_mavg_datapath: drives the datapath with the pipelined schedule (new
// iteration every two cycles, overlapped) generated here, feeds one new
// array element per queue shift, and checks each value R2 holds in a store
// cycle against (a[j] + a[j+1] + a[j+2]) / 4 computed here. Includes
// all-ones inputs, the largest sum.
module tb_mavg_datapath;
  import mavg_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  ctrl_t ctrl;
  logic [15:0] din, result;
  logic [15:0] a [0:301];

  mavg_datapath #(.W(16)) dut (.clk, .rst_n, .ctrl, .din, .result);

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit at(int t, int k, int n);
    int x = t - 2 - k;
    return x >= 0 && (x % 2) == 0 && (x / 2) < n;
  endfunction

  task automatic run(int n, bit ones);
    int si = 0, ri = 0;
    for (int i = 0; i < n + 2; i++) a[i] = ones ? 16'hFFFF : 16'($urandom);
    for (int t = 0; t < 2 * n + 6; t++) begin
      @(negedge clk);
      ctrl.s  = (t < 2) || at(t, 0, n);
      ctrl.l1 = at(t, 1, n);
      ctrl.d  = at(t, 2, n) || at(t, 3, n);
      ctrl.l2 = at(t, 4, n);
      ctrl.r  = at(t, 5, n);
      din = a[si];
      if (ctrl.s) si++;
      if (ctrl.r) begin
        int unsigned exp = (int'(a[ri]) + int'(a[ri+1]) + int'(a[ri+2])) / 4;
        checks++;
        if (result !== 16'(exp)) begin
          failures++;
          $display("FAIL N=%0d b[%0d]=%0d expected %0d", n, ri, result, exp);
        end
        ri++;
      end
    end
    @(negedge clk);
    ctrl = '0;
    checks++;
    if (ri != n || si != n + 2) begin
      failures++; $display("FAIL counts ri=%0d si=%0d", ri, si);
    end
  endtask

  initial begin
    ctrl = '0; din = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(3, 1);
    run(20, 0);
    run(300, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
