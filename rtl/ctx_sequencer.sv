// Context sequencer with switching matrix: decides which context the shared
// counter works for and when it switches.
//
// The main loop (context 0) counts the intersection states a0..a5 upwards.
// After each step the switching matrix MATRIX[state] names the timer context
// that has to run in that state; the sequencer switches to it, lets it count
// down to zero on the one-second ticks i_en, and then switches back to the
// main loop, which resumes from the state saved in its memory row. One full
// round through a state takes:
//
//   PH_RESTORE (ctx 0, load saved state)          1 clock
//   PH_RUN     (ctx 0, count up by one)           1 clock
//     or PH_WRAP (ctx 0, load 0 after a5)
//   PH_HOLD    (ctx 0, new state written back)    1 clock
//   PH_RESTORE (timer ctx, load its start value)  1 clock
//   PH_RUN     (timer ctx, count down on ticks)   until the count is 0,
//                                                 then 1 more clock
//
// After reset the main loop stands in a0 in PH_HOLD, so the first thing that
// runs is the timer of a0. o_load, o_zero and o_ctx come straight from
// flip-flops because the counter's load is asynchronous; o_dir and o_cen are
// decoded from the phase. The decision to wrap reads the saved main state
// from the memory (i_data), which is valid during PH_RESTORE, and not the
// counter, which is still being loaded then.
//
// Assertions at the end state the rules the datapath relies on: the
// context does not change during a load, a timer counts only on a tick and
// not below zero, and a load lasts at most two clocks.
//
// The main loop, the timer contexts and the 59 s / 5 s assignment of the
// states follow the example's graph. The phase sequence, the write-back
// cycle and the tick input are choices of this implementation.
module ctx_sequencer
  import ctx_pkg::*;
#(
  parameter int unsigned N       = 6,
  parameter int unsigned CTX_W   = 4,
  parameter int unsigned NSTATES = 6,
  parameter logic [CTX_W-1:0] MATRIX [NSTATES] =
    '{CTX_W'(1), CTX_W'(2), CTX_W'(2), CTX_W'(1), CTX_W'(2), CTX_W'(2)}
) (
  input  logic             i_clk,
  input  logic             i_rst,
  input  logic             i_en,
  input  logic [N-1:0]     i_cnt,
  input  logic             i_rdy,
  input  logic [N-1:0]     i_data,
  output logic [CTX_W-1:0] o_ctx,
  output logic             o_load,
  output logic             o_zero,
  output logic             o_dir,
  output logic             o_cen,
  output logic             o_timing,
  output phase_t           o_phase
);

  phase_t           phase_q, phase_d;
  logic [CTX_W-1:0] ctx_q, ctx_d;
  logic             in_main;

  localparam int unsigned SW = (NSTATES > 1) ? $clog2(NSTATES) : 1;
  logic [SW-1:0] state_idx;

  assign state_idx = SW'(i_cnt);

  assign in_main = (ctx_q == CTX_W'(CTX_MAIN));

  always_comb begin
    phase_d = phase_q;
    ctx_d   = ctx_q;
    unique case (phase_q)
      PH_RESTORE: begin
        if (in_main && (i_data >= N'(NSTATES - 1)))
          phase_d = PH_WRAP;
        else
          phase_d = PH_RUN;
      end
      PH_RUN: begin
        if (in_main)
          phase_d = PH_HOLD;
        else if (i_rdy) begin
          phase_d = PH_RESTORE;
          ctx_d   = CTX_W'(CTX_MAIN);
        end
      end
      PH_WRAP: phase_d = PH_HOLD;
      PH_HOLD: begin
        phase_d = PH_RESTORE;
        ctx_d   = (i_cnt < N'(NSTATES)) ? MATRIX[state_idx] : CTX_W'(CTX_MAIN);
      end
      default: phase_d = PH_HOLD;
    endcase
  end

  always_ff @(posedge i_clk or negedge i_rst) begin
    if (!i_rst) begin
      phase_q <= PH_HOLD;
      ctx_q   <= CTX_W'(CTX_MAIN);
      o_load  <= 1'b0;
      o_zero  <= 1'b0;
    end else begin
      phase_q <= phase_d;
      ctx_q   <= ctx_d;
      o_load  <= (phase_d == PH_RESTORE) || (phase_d == PH_WRAP);
      o_zero  <= (phase_d == PH_WRAP);
    end
  end

  assign o_ctx    = ctx_q;
  assign o_phase  = phase_q;
  assign o_dir    = in_main;
  assign o_timing = (phase_q == PH_RUN) && !in_main;
  assign o_cen    = (phase_q == PH_RUN) && (in_main || (i_en && !i_rdy));

  // Rules the datapath relies on.
  // The context number and the zero flag stay put while a load is held.
  a_load_stable: assert property (@(posedge i_clk) disable iff (!i_rst)
    (o_load && $past(o_load)) |-> ($stable(o_ctx) || o_zero))
    else $error("context changed during a load");
  // A timer counts only on a tick and never below zero.
  a_timer_tick: assert property (@(posedge i_clk) disable iff (!i_rst)
    (o_cen && !in_main) |-> (i_en && !i_rdy))
    else $error("timer counted without a tick or below zero");
  // Loads never last longer than two clocks (restore followed by wrap).
  a_load_short: assert property (@(posedge i_clk) disable iff (!i_rst)
    (o_load && $past(o_load)) |=> !o_load)
    else $error("load held too long");

endmodule
