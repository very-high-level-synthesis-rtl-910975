// ctrl_fsm: counter-based Moore controller for a loop datapath, run either
// software-pipelined or non-pipelined (prologue, steady state, epilogue).
//
// The loop body's schedule is a template: each control line is active at
// fixed offsets k (0..D_LAT) after the iteration's own queue shift, and a new
// iteration starts every c cycles after Q_FILL cycles that prefill the input
// queue. In pipelined mode c = C_PER and iterations overlap; in non-pipelined
// mode c = D_LAT + 1, so each iteration ends before the next begins. From
// these the run splits into
//   prologue      D_LAT + Q_FILL cycles
//   steady state  N - ceil(D_LAT/c) iterations of c cycles each
//   epilogue      (ceil(D_LAT/c) - 1) * c + 1 cycles
// which are the stage lengths of the source's schedule equations. Instead of
// enumerating every state, three loop_counter instances hold the position:
// one counts cycles of the prologue and, reused, of the epilogue; two serve
// the steady state, one for the cycle within the period and one for the
// iteration. A two-bit stage register selects which counter is live. The
// control lines are a combinational function of stage, mode and counter
// values only (Moore outputs). That function evaluates the template: in the
// prologue at cycle t an action at offset k fires if t - Q_FILL - k is a
// non-negative multiple of c; in the steady state the same test is applied
// modulo c; in the epilogue it is taken relative to the last iteration.
// Queue-fill shifts (t < Q_FILL) are added to `s`.
//
// Interface: a one-cycle `start` in idle latches the iteration count
// `n_iter` and the mode `pipelined`, and begins the prologue on the next
// cycle. n_iter must be at least ceil(D_LAT/c) (3 pipelined, 1 non-pipelined
// for the defaults; an assertion checks it). `busy` is high from then to the
// last epilogue cycle; `done` is a one-cycle pulse in the cycle after it. For
// the defaults a run of N iterations takes 2N + 6 cycles pipelined and
// 6N + 2 cycles non-pipelined.
// The defaults are the moving-average schedule (see mavg_pkg). The stage
// structure, the equations and the Moore counter style follow the source;
// the counter widths, the handshake, the reset and making the mode a
// run-time input are this design's choices.
module ctrl_fsm
  import mavg_pkg::*;
#(
  parameter int unsigned  NW      = 8,        // width of the iteration count
  parameter int unsigned  D_LAT   = SCHED_D,
  parameter int unsigned  Q_FILL  = SCHED_Q,
  parameter int unsigned  C_PER   = SCHED_C,
  parameter logic [D_LAT:0] M_S   = SLOT_S,
  parameter logic [D_LAT:0] M_L1  = SLOT_L1,
  parameter logic [D_LAT:0] M_D   = SLOT_D,
  parameter logic [D_LAT:0] M_L2  = SLOT_L2,
  parameter logic [D_LAT:0] M_R   = SLOT_R
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [NW-1:0] n_iter,
  input  logic          pipelined,  // 1: overlapped iterations, 0: one at a time
  output ctrl_t         ctrl,
  output phase_t        phase,
  output logic          busy,
  output logic          done
);

  localparam int unsigned C_SEQ = D_LAT + 1;  // non-pipelined period
  localparam int unsigned KC_P  = (D_LAT + C_PER - 1) / C_PER;
  localparam int unsigned KC_S  = (D_LAT + C_SEQ - 1) / C_SEQ;
  localparam int unsigned N_PRO = D_LAT + Q_FILL;
  localparam int unsigned EPI_P = (KC_P - 1) * C_PER + 1;
  localparam int unsigned EPI_S = (KC_S - 1) * C_SEQ + 1;
  localparam int unsigned N_MAX = (N_PRO > EPI_P) ? ((N_PRO > EPI_S) ? N_PRO : EPI_S)
                                                  : ((EPI_P > EPI_S) ? EPI_P : EPI_S);
  localparam int unsigned CW    = $clog2(N_MAX + 1);
  localparam int unsigned PW    = $clog2(C_SEQ);
  // Offset of epilogue cycle 0 relative to the last iteration's first shift.
  localparam int          OFS_P = int'(D_LAT) - int'(C_PER * KC_P) + int'(C_PER);
  localparam int          OFS_S = int'(D_LAT) - int'(C_SEQ * KC_S) + int'(C_SEQ);

  logic [NW-1:0] n_steady;   // steady-state iterations of this run
  logic          pipe_r;     // mode of this run
  logic [CW-1:0] pe_cnt, pe_lim;
  logic [PW-1:0] per_cnt;
  logic [NW-1:0] it_cnt, it_lim;
  logic          pe_done, per_done, it_done;

  // Stage-cycle counter, shared by prologue and epilogue.
  assign pe_lim = (phase == PH_PRO) ? CW'(N_PRO - 1) :
                  pipe_r ? CW'(EPI_P - 1) : CW'(EPI_S - 1);
  loop_counter #(.CW(CW)) u_pe_cnt (
    .clk, .rst_n,
    .clr  (phase == PH_IDLE || phase == PH_STEADY || (phase == PH_PRO && pe_done)),
    .en   (phase == PH_PRO || phase == PH_EPI),
    .limit(pe_lim), .count(pe_cnt), .done(pe_done)
  );

  // Cycle within the steady-state period (wraps).
  loop_counter #(.CW(PW)) u_per_cnt (
    .clk, .rst_n,
    .clr  (phase != PH_STEADY || per_done),
    .en   (phase == PH_STEADY),
    .limit(pipe_r ? PW'(C_PER - 1) : PW'(C_SEQ - 1)), .count(per_cnt), .done(per_done)
  );

  // Steady-state iteration.
  assign it_lim = n_steady - 1'b1;
  loop_counter #(.CW(NW)) u_it_cnt (
    .clk, .rst_n,
    .clr  (phase != PH_STEADY),
    .en   (phase == PH_STEADY && per_done),
    .limit(it_lim), .count(it_cnt), .done(it_done)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase    <= PH_IDLE;
      n_steady <= '0;
      pipe_r   <= 1'b1;
      done     <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (phase)
        PH_IDLE: if (start) begin
          phase    <= PH_PRO;
          pipe_r   <= pipelined;
          n_steady <= n_iter - (pipelined ? NW'(KC_P) : NW'(KC_S));
        end
        PH_PRO: if (pe_done) phase <= (n_steady != '0) ? PH_STEADY : PH_EPI;
        PH_STEADY: if (per_done && it_done) phase <= PH_EPI;
        PH_EPI: if (pe_done) begin
          phase <= PH_IDLE;
          done  <= 1'b1;
        end
      endcase
    end
  end

  assign busy = (phase != PH_IDLE);

  // Is an action with template mask m active at stage ph, counters pe / per,
  // for period c and epilogue offset ofs?
  function automatic logic act(logic [D_LAT:0] m, phase_t ph, int pe, int per,
                               int c, int ofs);
    int x;
    act = 1'b0;
    for (int k = 0; k <= int'(D_LAT); k++) begin
      unique case (ph)
        PH_PRO:    x = pe - int'(Q_FILL) - k;
        PH_STEADY: x = int'(N_PRO) + per - int'(Q_FILL) - k;
        PH_EPI:    x = k - ofs - pe;
        default:   x = -1;
      endcase
      if (m[k] && x >= 0 && (x % c) == 0) act = 1'b1;
    end
  endfunction

  // Control lines for either mode; the latched mode selects.
  function automatic ctrl_t lines(phase_t ph, int pe, int per, int c, int ofs);
    ctrl_t v;
    v.s  = act(M_S,  ph, pe, per, c, ofs) || (ph == PH_PRO && pe < int'(Q_FILL));
    v.l1 = act(M_L1, ph, pe, per, c, ofs);
    v.d  = act(M_D,  ph, pe, per, c, ofs);
    v.l2 = act(M_L2, ph, pe, per, c, ofs);
    v.r  = act(M_R,  ph, pe, per, c, ofs);
    return v;
  endfunction

  always_comb begin
    if (pipe_r) ctrl = lines(phase, int'(pe_cnt), int'(per_cnt), int'(C_PER), OFS_P);
    else        ctrl = lines(phase, int'(pe_cnt), int'(per_cnt), int'(C_SEQ), OFS_S);
  end

  // The schedule equations need at least ceil(D_LAT/C_PER) iterations.
  a_min_iter: assert property (@(posedge clk) disable iff (!rst_n)
    (phase == PH_IDLE && start) |-> (n_iter >= (pipelined ? NW'(KC_P) : NW'(KC_S))))
    else $error("ctrl_fsm: n_iter below the minimum of the chosen mode");

endmodule
