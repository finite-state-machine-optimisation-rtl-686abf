// Traffic light controller for a two-way crossroad built on one shared,
// context-switched counter.
//
// The straightforward design needs three counters: one stepping through the
// six intersection states a0..a5, one 59-second timer for the red/green
// phases and one 5-second timer for the yellow and all-red phases. Because
// the three never count at the same time, this design keeps a single
// up/down counter and swaps its value in and out of a small memory, one row
// per task ("context"):
//   context 0  main loop, counts up a0 -> a5 -> a0, resumes where it stopped
//   context 1  59 s timer, counts down, restarts from 59
//   context 2  5 s timer, counts down, restarts from 5
// ctx_sequencer (FSM plus switching matrix) chooses the context,
// ctx_counter (counter plus context memory) does the counting, and two
// output-logic blocks turn the memory contents into lamps and a display:
// the lamps read the main loop's memory row, so they keep their value while
// a timer is using the counter.
//
// Interface: i_clk, i_rst (asynchronous, active low), i_en (one-second tick,
// one clock long; tie high to count once per clock). Outputs are the two
// lights, the remaining time of the running timer in two BCD digits, and the
// internal counter, context, ready flag and memory row for observation.
//
// TFF_COUNTER = 1 builds the shared counter from T flip-flops instead of the
// default behavioural description; the behaviour is the same.
//
// Timing: state a_k lasts T(a_k) ticks plus 5 clocks, where T is 59 for a0
// and a3 and 5 for the other states; the lamps change on the clock edge that
// writes the main loop's new state back into memory.
//
// The three contexts, their times, the lamp sequence and the shared counter
// with a context memory follow the article's example. The sequencer's phase
// timing, the tick input and the display format are choices of this design.
//
// Lint reports the counter load as used both asynchronously (counter) and
// synchronously (it also blocks the memory write). That is intended: the
// load comes from a flip-flop in the sequencer and must stop the write-back
// for as long as it is high.
module tl_ctx_top
  import ctx_pkg::*;
#(
  parameter int unsigned N     = 6,
  parameter int unsigned CTX_W = 4,
  parameter bit TFF_COUNTER     = 1'b0,
  // switching matrix: timer context that follows each state a0..a5
  parameter logic [CTX_W-1:0] MATRIX [TL_STATES] =
    '{CTX_W'(CTX_LONG),  CTX_W'(CTX_SHORT), CTX_W'(CTX_SHORT),
      CTX_W'(CTX_LONG),  CTX_W'(CTX_SHORT), CTX_W'(CTX_SHORT)}
) (
  input  logic             i_clk,
  input  logic             i_rst,
  input  logic             i_en,
  output lamp_t            o_ns,
  output lamp_t            o_ew,
  output logic [3:0]       o_tens,
  output logic [3:0]       o_ones,
  output logic             o_blank,
  output logic [N-1:0]     o_state,
  output logic [N-1:0]     o_cnt,
  output logic [CTX_W-1:0] o_ctx,
  output logic             o_rdy,
  output logic [N-1:0]     o_data,
  output phase_t           o_phase
);

  logic load, zero, dir, cen, timing;

  ctx_sequencer #(
    .N       (N),
    .CTX_W   (CTX_W),
    .NSTATES (TL_STATES),
    .MATRIX  (MATRIX)
  ) u_seq (
    .i_clk    (i_clk),
    .i_rst    (i_rst),
    .i_en     (i_en),
    .i_cnt    (o_cnt),
    .i_rdy    (o_rdy),
    .i_data   (o_data),
    .o_ctx    (o_ctx),
    .o_load   (load),
    .o_zero   (zero),
    .o_dir    (dir),
    .o_cen    (cen),
    .o_timing (timing),
    .o_phase  (o_phase)
  );

  ctx_counter #(
    .N          (N),
    .CTX_W      (CTX_W),
    .NCTX       (3),
    .CTX_INIT   ('{N'(0), N'(T_LONG), N'(T_SHORT)}),
    .CTX_RESUME (3'b001),
    .TFF_COUNTER(TFF_COUNTER)
  ) u_ctr (
    .i_clk      (i_clk),
    .i_rst      (i_rst),
    .i_dir      (dir),
    .i_en       (cen),
    .i_load     (load),
    .i_zero     (zero),
    .i_ctx      (o_ctx),
    .i_view_ctx (CTX_W'(CTX_MAIN)),
    .o_cnt      (o_cnt),
    .o_rdy      (o_rdy),
    .o_data     (o_data),
    .o_view     (o_state)
  );

  tl_lamp_logic #(.N(N)) u_lamps (
    .i_state (o_state),
    .o_ns    (o_ns),
    .o_ew    (o_ew)
  );

  tl_time_display #(.N(N)) u_disp (
    .i_cnt    (o_cnt),
    .i_active (timing),
    .o_tens   (o_tens),
    .o_ones   (o_ones),
    .o_blank  (o_blank)
  );

endmodule
