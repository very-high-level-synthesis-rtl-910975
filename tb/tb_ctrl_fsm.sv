// tb_ctrl_fsm: checks every control line in every cycle of a run against a
// schedule built independently here: iteration j (0 .. N-1) shifts at cycle
// 2 + c*j (c = 2 pipelined, 6 non-pipelined), loads R1 one cycle later,
// shifts the divider in the two cycles after that, loads R2 next and stores
// the cycle after; cycles 0 and 1 are the two extra queue-fill shifts. It
// also checks the run length (2N + 6 pipelined, 6N + 2 non-pipelined), the
// busy flag, the done pulse and the stage boundaries, and counts that
// prologue, steady state and epilogue occurred, that runs without a steady
// state occurred, and that both modes ran.
module tb_ctrl_fsm;
  import mavg_pkg::*;
  int checks = 0, failures = 0;
  int n_pro = 0, n_steady = 0, n_epi = 0, n_nosteady = 0, n_seq = 0, n_pipe = 0;
  logic clk = 0, rst_n = 0, start = 0;
  logic [7:0] n_iter;
  logic pipelined = 1;
  ctrl_t  ctrl;
  phase_t phase;
  logic   busy, done;

  ctrl_fsm #(.NW(8)) dut (.clk, .rst_n, .start, .n_iter, .pipelined, .ctrl, .phase, .busy, .done);

  always #5 clk = ~clk;

  initial begin
    repeat (80000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Action at offset k of some iteration j in [0, n) at cycle t?
  function automatic bit at(int t, int k, int n, int c);
    int x = t - 2 - k;
    return x >= 0 && (x % c) == 0 && (x / c) < n;
  endfunction

  task automatic run(int n, bit pipe = 1);
    ctrl_t exp;
    int    t;
    bit    saw_steady = 0;
    int    c     = pipe ? 2 : 6;
    int    total = pipe ? 2 * n + 6 : 6 * n + 2;
    int    epi0  = pipe ? 2 * n + 1 : 6 * n + 1;   // first epilogue cycle
    @(negedge clk);
    n_iter    = 8'(n);
    pipelined = pipe;
    start     = 1;
    @(negedge clk);
    start     = 0;
    n_iter    = 8'($urandom);   // must have been latched
    pipelined = 1'($urandom);
    if (pipe) n_pipe++; else n_seq++;
    for (t = 0; t < total; t++) begin
      exp.s  = (t < 2) || at(t, 0, n, c);
      exp.l1 = at(t, 1, n, c);
      exp.d  = at(t, 2, n, c) || at(t, 3, n, c);
      exp.l2 = at(t, 4, n, c);
      exp.r  = at(t, 5, n, c);
      checks++;
      if (ctrl !== exp || !busy || done) begin
        failures++;
        $display("FAIL N=%0d t=%0d ctrl=%b exp=%b busy=%b done=%b",
                 n, t, ctrl, exp, busy, done);
      end
      // stage boundaries: prologue 7 cycles, epilogue from epi0
      checks++;
      if (phase != ((t < 7) ? PH_PRO : (t >= epi0) ? PH_EPI : PH_STEADY)) begin
        failures++;
        $display("FAIL N=%0d t=%0d phase=%0d", n, t, phase);
      end
      if (phase == PH_PRO && t == 0) n_pro++;
      if (phase == PH_EPI && t == epi0) n_epi++;
      if (phase == PH_STEADY) saw_steady = 1;
      @(negedge clk);
    end
    if (saw_steady) n_steady++; else n_nosteady++;
    checks++;
    if (busy || !done || ctrl != '0) begin
      failures++;
      $display("FAIL N=%0d end: busy=%b done=%b ctrl=%b", n, busy, done, ctrl);
    end
    @(negedge clk);
    checks++;
    if (done) begin failures++; $display("FAIL done longer than one cycle"); end
  endtask

  initial begin
    n_iter = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);
    checks++;
    if (busy || ctrl != '0) begin failures++; $display("FAIL idle not quiet"); end
    run(3);
    run(4);
    run(5);
    run(10);
    run(37);
    for (int i = 0; i < 10; i++) run(3 + int'($urandom % 60));
    run(255);
    run(1, 0);
    run(2, 0);
    run(7, 0);
    run(4);
    for (int i = 0; i < 6; i++) run(1 + int'($urandom % 40), 0);
    run(255, 0);
    checks += 6;
    if (n_seq == 0)      begin failures++; $display("FAIL no non-pipelined run"); end
    if (n_pipe == 0)     begin failures++; $display("FAIL no pipelined run"); end
    if (n_pro == 0)      begin failures++; $display("FAIL no prologue seen"); end
    if (n_steady == 0)   begin failures++; $display("FAIL no steady state seen"); end
    if (n_epi == 0)      begin failures++; $display("FAIL no epilogue seen"); end
    if (n_nosteady == 0) begin failures++; $display("FAIL no run without steady state"); end
    $display("runs: prologue %0d steady %0d epilogue %0d no-steady %0d pipelined %0d non-pipelined %0d",
             n_pro, n_steady, n_epi, n_nosteady, n_pipe, n_seq);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
