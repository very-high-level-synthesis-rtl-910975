// lcd_filter: cyclic datapath for a loop with a loop-carried dependence,
//   for (i = 1; i <= N; i++) a[i] = (a[i-1] + a[i] + a[i+1]) / 4;
// computed in place in a local memory.
//
// Datapath (the source's queue-with-multiplexor drawing): a three-entry
// lcd_queue holding a[i-1], a[i], a[i+1]; two adders; a divide by 4 (a fixed
// two-bit right shift, combinational here); and the output register. The
// output register feeds back into the queue's multiplexor, so the new a[i]
// becomes the a[i-1] of the next iteration. Because the result loops back,
// the cycle cannot be pipelined and one iteration takes two clocks:
//   CALC  : output register <= (a[i-1] + a[i] + a[i+1]) / 4
//   STORE : a[i] <= output register in memory; unless i = N, shift the queue
//           with the multiplexor on feedback and read a[i+2] into it.
// Before the first iteration, FILL shifts a[0], a[1], a[2] in from memory.
// A run takes 3 + 2N cycles from the cycle after `start`.
//
// The sequencer, the memory ports and the run-time bound are this design's:
// the source draws the datapath and leaves its control open. Interface:
// while idle the host port (host_we/host_addr/host_wdata, host_rdata)
// reaches the memory; `start` with `n_iter` (1 .. 2**AW-2) begins a run;
// `busy` is high during it; `done` pulses for one cycle at its end.
module lcd_filter #(
  parameter int unsigned W  = 16,
  parameter int unsigned AW = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          host_we,
  input  logic [AW-1:0] host_addr,
  input  logic [W-1:0]  host_wdata,
  output logic [W-1:0]  host_rdata,
  input  logic          start,
  input  logic [AW-1:0] n_iter,
  output logic          busy,
  output logic          done
);

  typedef enum logic [1:0] {
    S_IDLE  = 2'd0,
    S_FILL  = 2'd1,
    S_CALC  = 2'd2,
    S_STORE = 2'd3
  } state_t;

  state_t        state;
  logic [AW-1:0] n_lim;
  logic          shift, sel_fb;
  logic [AW-1:0] rd_addr, it_cnt;
  logic          rd_done, it_done;
  logic [W-1:0]  rd_data;
  logic [W-1:0]  q [3];
  logic [W:0]    sum_lo;
  logic [W+1:0]  sum;
  logic [W-1:0]  out_r;
  logic          mem_we;
  logic [AW-1:0] mem_waddr, mem_raddr;
  logic [W-1:0]  mem_wdata;

  assign busy = (state != S_IDLE);

  // Queue control.
  assign shift  = (state == S_FILL) || (state == S_STORE && !it_done);
  assign sel_fb = (state == S_STORE);

  // Read address: counts the elements shifted in (a[0], a[1], ...).
  loop_counter #(.CW(AW)) u_rd_cnt (
    .clk, .rst_n,
    .clr(state == S_IDLE), .en(shift), .limit('1),
    .count(rd_addr), .done(rd_done)
  );

  // Iteration counter: i - 1.
  loop_counter #(.CW(AW)) u_it_cnt (
    .clk, .rst_n,
    .clr(state == S_IDLE), .en(state == S_STORE), .limit(n_lim - 1'b1),
    .count(it_cnt), .done(it_done)
  );

  // Memory: the engine owns the ports while busy, the host while idle.
  assign mem_we    = busy ? (state == S_STORE) : host_we;
  assign mem_waddr = busy ? (it_cnt + 1'b1) : host_addr;
  assign mem_wdata = busy ? out_r : host_wdata;
  assign mem_raddr = busy ? rd_addr : host_addr;
  assign host_rdata = rd_data;

  local_mem #(.W(W), .AW(AW)) u_mem (
    .clk, .we(mem_we), .waddr(mem_waddr), .wdata(mem_wdata),
    .raddr(mem_raddr), .rdata(rd_data)
  );

  lcd_queue #(.W(W), .LEN(3)) u_queue (
    .clk, .rst_n, .shift, .sel_fb, .din(rd_data), .fb(out_r), .q
  );

  adder #(.W(W)) u_add_lo (.a(q[1]), .b(q[0]), .y(sum_lo));
  adder #(.W(W + 1)) u_add_hi (.a({1'b0, q[2]}), .b(sum_lo), .y(sum));

  load_reg #(.W(W)) u_out (
    .clk, .rst_n, .load(state == S_CALC), .d(sum[W+1:2]), .q(out_r)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      n_lim <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE:  if (start) begin
          state <= S_FILL;
          n_lim <= n_iter;
        end
        S_FILL:  if (rd_addr == AW'(2)) state <= S_CALC;
        S_CALC:  state <= S_STORE;
        S_STORE: if (it_done) begin
          state <= S_IDLE;
          done  <= 1'b1;
        end else begin
          state <= S_CALC;
        end
      endcase
    end
  end

  a_n_range: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_IDLE && start) |-> (n_iter != '0 && n_iter <= AW'(2**AW - 2)))
    else $error("lcd_filter: n_iter out of range");

endmodule
