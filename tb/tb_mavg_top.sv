// tb_mavg_top: end-to-end test of both engines at the top's default sizes
// (16-bit data, 256-word memories).
//
// Moving average: for several N, including N = 3 (no steady state) and the
// largest N = 254, loads a[0 .. N+1] with random values, pulses start,
// checks that done arrives exactly 2N + 6 cycles later (6N + 2 for the
// non-pipelined runs, which are mixed in), then reads b[] back
// and compares it with (a[i] + a[i+1] + a[i+2]) / 4 computed here. While a
// run is in progress it counts, per cycle, the mechanisms of the design:
// prologue, steady state and epilogue cycles; overlapped iterations (a store
// in the same cycle as a queue shift or an R1 load); queue reuse (exactly
// N + 2 array reads for N results); switches between pipelined and
// non-pipelined runs. The loop-carried filter runs at the same
// time on its own memory and is compared with a sequential model; its
// feedback insertions are counted. The streaming engine runs alongside
// too, on random samples with gaps, and each of its results is compared with
// the three-sample average of a model window. Each mechanism must occur at
// least once.
module tb_mavg_top;
  import mavg_pkg::*;
  int checks = 0, failures = 0;
  int c_pro = 0, c_steady = 0, c_epi = 0, c_overlap = 0, c_reuse = 0;
  int c_nosteady = 0, c_feedback = 0, c_switch = 0, c_seq = 0;
  bit last_pipe = 1;

  logic clk = 0, rst_n = 0;
  logic a_we = 0, start = 0, busy, done, pipelined = 1;
  phase_t phase;
  logic [7:0] a_addr, n_iter, b_addr;
  logic [15:0] a_wdata, b_rdata;
  ctrl_t ctrl;
  logic lc_we = 0, lc_start = 0, lc_busy, lc_done;
  logic [7:0] lc_addr, lc_n_iter;
  logic [15:0] lc_wdata, lc_rdata;

  logic st_clr = 0, st_valid = 0, st_out_valid;
  logic [15:0] st_din, st_dout;
  int c_stream = 0;
  bit st_finished = 0;

  logic [15:0] a [256];
  logic [15:0] lm [256];

  mavg_top dut (
    .clk, .rst_n,
    .a_we, .a_addr, .a_wdata,
    .start, .n_iter, .pipelined, .busy, .done, .ctrl, .phase,
    .b_addr, .b_rdata,
    .lc_we, .lc_addr, .lc_wdata, .lc_rdata,
    .lc_start, .lc_n_iter, .lc_busy, .lc_done,
    .st_clr, .st_valid, .st_din, .st_out_valid, .st_dout
  );

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Mechanism counters, sampled every cycle.
  always @(posedge clk) begin
    if (phase == PH_PRO)    c_pro++;
    if (phase == PH_STEADY) c_steady++;
    if (phase == PH_EPI)    c_epi++;
    if (ctrl.r && (ctrl.s || ctrl.l1)) c_overlap++;
    if (dut.u_lcd.shift && dut.u_lcd.sel_fb) c_feedback++;
  end

  // Streaming engine: its own stimulus and model, concurrent with the rest.
  initial begin
    logic [15:0] win [$];
    bit due = 0, expect_out = 0;
    int unsigned exp = 0, exp_due = 0;
    st_din = '0;
    @(posedge rst_n);
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      checks++;
      if (st_out_valid !== expect_out || (expect_out && st_dout !== 16'(exp))) begin
        failures++;
        $display("FAIL stream cycle %0d: valid=%b dout=%0d expected %b/%0d",
                 i, st_out_valid, st_dout, expect_out, exp);
      end
      if (st_out_valid) c_stream++;
      st_clr   = (i == 1500);
      st_valid = (($urandom % 3) != 0);
      st_din   = 16'($urandom);
      @(posedge clk);
      expect_out = due;
      exp = exp_due;
      due = 0;
      if (st_clr) win.delete();
      else if (st_valid) begin
        win.push_back(st_din);
        if (win.size() > 3) void'(win.pop_front());
        if (win.size() == 3) begin
          due = 1;
          exp_due = (int'(win[0]) + int'(win[1]) + int'(win[2])) / 4;
        end
      end
    end
    st_valid = 0;
    st_finished = 1;
  end

  task automatic load_lcd(int n);
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      lc_we = 1; lc_addr = 8'(i); lc_wdata = 16'($urandom); lm[i] = lc_wdata;
    end
    @(negedge clk);
    lc_we = 0;
    for (int i = 1; i <= n; i++)
      lm[i] = 16'((int'(lm[i-1]) + int'(lm[i]) + int'(lm[i+1])) / 4);
    lc_n_iter = 8'(n);
    lc_start = 1;
    @(negedge clk);
    lc_start = 0;
  endtask

  task automatic check_lcd();
    while (lc_busy) @(negedge clk);
    for (int i = 0; i < 256; i++) begin
      lc_addr = 8'(i); #1;
      checks++;
      if (lc_rdata !== lm[i]) begin
        failures++; $display("FAIL lcd a[%0d]=%0d expected %0d", i, lc_rdata, lm[i]);
      end
    end
  endtask

  task automatic run(int n, bit pipe = 1);
    int cyc = 0, reads = 0;
    int total = pipe ? 2 * n + 6 : 6 * n + 2;
    for (int i = 0; i < n + 2; i++) begin
      @(negedge clk);
      a_we = 1; a_addr = 8'(i); a_wdata = 16'($urandom); a[i] = a_wdata;
    end
    @(negedge clk);
    a_we = 0;
    n_iter = 8'(n); pipelined = pipe; start = 1;
    if (pipe != last_pipe) c_switch++;
    if (!pipe) c_seq++;
    last_pipe = pipe;
    @(negedge clk);
    start = 0;
    while (!done && cyc < 4000) begin
      if (ctrl.s) reads++;
      @(negedge clk);
      cyc++;
    end
    checks++;
    if (cyc != total) begin
      failures++;
      $display("FAIL N=%0d pipelined=%0b done after %0d cycles, expected %0d", n, pipe, cyc, total);
    end
    checks++;
    if (reads != n + 2) begin
      failures++; $display("FAIL N=%0d %0d array reads, expected %0d", n, reads, n + 2);
    end else c_reuse++;
    if ((pipe && n == 3) || (!pipe && n == 1)) c_nosteady++;
    for (int i = 0; i < n; i++) begin
      int unsigned exp = (int'(a[i]) + int'(a[i+1]) + int'(a[i+2])) / 4;
      b_addr = 8'(i); #1;
      checks++;
      if (b_rdata !== 16'(exp)) begin
        failures++; $display("FAIL N=%0d b[%0d]=%0d expected %0d", n, i, b_rdata, exp);
      end
    end
  endtask

  initial begin
    a_addr = '0; a_wdata = '0; n_iter = '0; b_addr = '0;
    lc_addr = '0; lc_wdata = '0; lc_n_iter = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    load_lcd(40);
    run(3);
    check_lcd();
    load_lcd(254);
    run(12);
    run(254);
    check_lcd();
    run(100);
    run(1, 0);
    run(9, 0);
    run(5);
    run(254, 0);
    wait (st_finished);
    checks += 10;
    if (c_stream == 0)   begin failures++; $display("FAIL no stream results"); end
    if (c_seq == 0)      begin failures++; $display("FAIL no non-pipelined run"); end
    if (c_switch == 0)   begin failures++; $display("FAIL no mode switch"); end
    if (c_pro == 0)      begin failures++; $display("FAIL no prologue"); end
    if (c_steady == 0)   begin failures++; $display("FAIL no steady state"); end
    if (c_epi == 0)      begin failures++; $display("FAIL no epilogue"); end
    if (c_overlap == 0)  begin failures++; $display("FAIL no overlapped iterations"); end
    if (c_reuse == 0)    begin failures++; $display("FAIL no input reuse"); end
    if (c_nosteady == 0) begin failures++; $display("FAIL no run without steady state"); end
    if (c_feedback == 0) begin failures++; $display("FAIL no feedback insertion"); end
    $display("cycles: prologue %0d steady %0d epilogue %0d overlap %0d; runs with reuse %0d, without steady %0d, non-pipelined %0d, mode switches %0d; feedback insertions %0d; stream results %0d",
             c_pro, c_steady, c_epi, c_overlap, c_reuse, c_nosteady, c_seq, c_switch, c_feedback, c_stream);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
