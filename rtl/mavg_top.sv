// mavg_top: three loop engines generated from C loops, side by side.
//
// 1. Moving average, b[i] = (a[i] + a[i+1] + a[i+2]) / 4 for i = 0 .. N-1.
//    An input local memory holds a[]; an address counter steps through it
//    on every queue shift `s`, so the datapath reads one new element per
//    iteration. mavg_datapath (queue, adders, R1, shift divider, R2) is
//    driven by the counter-based controller ctrl_fsm, which runs a
//    software-pipelined schedule with a new iteration every two cycles.
//    On each `r` the value of R2 is written to the result local memory at
//    the next address of a second counter. A run of N iterations
//    (N >= 3) takes 2N + 6 cycles after `start`; a[0 .. N+1] are read.
//    With `pipelined` low at start, the same datapath runs one iteration at
//    a time instead (N >= 1, 6N + 2 cycles).
// 2. Loop-carried filter, a[i] = (a[i-1] + a[i] + a[i+1]) / 4 for i = 1 .. N,
//    in place, by lcd_filter (queue with feedback multiplexor).
// 3. The moving average again, as a stream: mavg_nary uses the n-ary adder
//    form (a reused partial sum instead of a queue) and returns one result
//    per input sample, one clock after it (st_*).
//
// Host side, moving average: write a[] through a_we/a_addr/a_wdata while
// idle; pulse `start` with `n_iter` and `pipelined`; wait for the `done` pulse; read b[]
// through b_addr/b_rdata (combinational read). The loop-carried filter has
// its own host port and start/done pair (lc_*); the stream engine its own
// valid-qualified ports (st_*). The memory organisation,
// the host ports and all widths are this design's choices; W = 16 bit
// unsigned data and 2**AW = 256-word memories by default.
module mavg_top
  import mavg_pkg::*;
#(
  parameter int unsigned W  = 16,
  parameter int unsigned AW = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  // moving average: input array a[]
  input  logic          a_we,
  input  logic [AW-1:0] a_addr,
  input  logic [W-1:0]  a_wdata,
  // moving average: run control
  input  logic          start,
  input  logic [AW-1:0] n_iter,
  input  logic          pipelined,  // 1: pipelined run, 0: non-pipelined
  output logic          busy,
  output logic          done,
  output ctrl_t         ctrl,       // control lines, for observation
  output phase_t        phase,      // controller stage, for observation
  // moving average: result array b[]
  input  logic [AW-1:0] b_addr,
  output logic [W-1:0]  b_rdata,
  // loop-carried filter
  input  logic          lc_we,
  input  logic [AW-1:0] lc_addr,
  input  logic [W-1:0]  lc_wdata,
  output logic [W-1:0]  lc_rdata,
  input  logic          lc_start,
  input  logic [AW-1:0] lc_n_iter,
  output logic          lc_busy,
  output logic          lc_done,
  // streaming moving average (n-ary adder form)
  input  logic          st_clr,
  input  logic          st_valid,
  input  logic [W-1:0]  st_din,
  output logic          st_out_valid,
  output logic [W-1:0]  st_dout
);

  logic [AW-1:0] rd_addr, wr_addr;
  logic          rd_full, wr_full;
  logic [W-1:0]  a_rdata;
  logic [W-1:0]  result;
  logic          run_start;

  assign run_start = start && !busy;

  // Input array a[]: host writes, datapath reads.
  local_mem #(.W(W), .AW(AW)) u_mem_a (
    .clk, .we(a_we), .waddr(a_addr), .wdata(a_wdata),
    .raddr(rd_addr), .rdata(a_rdata)
  );

  // Address of the next a[] element, advanced by every queue shift.
  loop_counter #(.CW(AW)) u_rd_addr (
    .clk, .rst_n, .clr(run_start), .en(ctrl.s), .limit('1),
    .count(rd_addr), .done(rd_full)
  );

  // Address of the next b[] element, advanced by every store.
  loop_counter #(.CW(AW)) u_wr_addr (
    .clk, .rst_n, .clr(run_start), .en(ctrl.r), .limit('1),
    .count(wr_addr), .done(wr_full)
  );

  ctrl_fsm #(.NW(AW)) u_ctrl (
    .clk, .rst_n, .start(run_start), .n_iter, .pipelined, .ctrl, .phase, .busy, .done
  );

  mavg_datapath #(.W(W)) u_dp (
    .clk, .rst_n, .ctrl, .din(a_rdata), .result
  );

  // Result array b[]: datapath writes on r, host reads.
  local_mem #(.W(W), .AW(AW)) u_mem_b (
    .clk, .we(ctrl.r), .waddr(wr_addr), .wdata(result),
    .raddr(b_addr), .rdata(b_rdata)
  );

  lcd_filter #(.W(W), .AW(AW)) u_lcd (
    .clk, .rst_n,
    .host_we(lc_we), .host_addr(lc_addr), .host_wdata(lc_wdata),
    .host_rdata(lc_rdata),
    .start(lc_start), .n_iter(lc_n_iter), .busy(lc_busy), .done(lc_done)
  );

  mavg_nary #(.W(W)) u_nary (
    .clk, .rst_n, .clr(st_clr), .in_valid(st_valid), .din(st_din),
    .out_valid(st_out_valid), .dout(st_dout)
  );

  // N + 2 inputs and N results must fit in the memories.
  a_n_range: assert property (@(posedge clk) disable iff (!rst_n)
    run_start |-> (n_iter <= AW'(2**AW - 2)))
    else $error("mavg_top: n_iter too large for the memories");

endmodule
