// End-to-end testbench of the context-switched traffic light controller
// with the shared counter built from T flip-flops (TFF_COUNTER = 1), all
// other parameters at their defaults. Same checks as tb_tl_ctx_top.
//
// Runs two full rounds of the six intersection states (plus the start of a
// third), first with the one-second tick high on every clock, then with a
// random tick. Checked against values worked out here:
//   - the lamps go through a0..a5 in order, each with its lamp pattern,
//   - each state lasts 59 ticks (a0, a3) or 5 ticks (the others),
//   - the display counts down 59..0 or 5..0 and matches the counter,
//   - the lamps never change while a timer context owns the counter.
// It also counts each mechanism of the design and fails if one never
// happened: context switches, resume of the main loop from memory, restart
// of each timer, timer expiry (ready), the a5 -> a0 wrap, and ticks that
// the timer had to wait for.
module tb_tl_ctx_top_tff;
  import ctx_pkg::*;

  logic       clk = 1'b0;
  logic       rst = 1'b0;
  logic       tick = 1'b1;
  lamp_t      ns, ew;
  logic [3:0] tens, ones;
  logic       blank;
  logic [5:0] state, cnt, data;
  logic [3:0] ctx;
  logic       rdy;
  phase_t     phase;

  int checks = 0;
  int failures = 0;

  // mechanism counters
  int n_switch = 0, n_resume = 0, n_long = 0, n_short = 0, n_expire = 0;
  int n_wrap = 0, n_wait = 0;

  tl_ctx_top #(.TFF_COUNTER(1'b1)) dut (
    .i_clk(clk), .i_rst(rst), .i_en(tick),
    .o_ns(ns), .o_ew(ew), .o_tens(tens), .o_ones(ones), .o_blank(blank),
    .o_state(state), .o_cnt(cnt), .o_ctx(ctx), .o_rdy(rdy), .o_data(data),
    .o_phase(phase)
  );

  always #5 clk = !clk;

  task automatic expect_true(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (t=%0t ctx=%0d cnt=%0d state=%0d)", what, $time, ctx, cnt, state);
    end
  endtask

  // lamp pattern {R1,Y1,G1,R2,Y2,G2} of each state
  function automatic logic [5:0] lamps_of(input int s);
    case (s)
      0: return 6'b100_001;
      1: return 6'b100_010;
      2: return 6'b100_100;
      3: return 6'b001_100;
      4: return 6'b010_100;
      default: return 6'b100_100;
    endcase
  endfunction

  function automatic int time_of(input int s);
    return (s == 0 || s == 3) ? 59 : 5;
  endfunction

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int          exp_state = 0;
  int          ticks_used = 0;
  int          states_seen = 0;
  logic [5:0]  prev_lamps;
  logic [3:0]  prev_ctx;
  logic        prev_blank;
  int          prev_shown;
  int          shown;

  initial begin
    @(negedge clk);
    // after reset: context 0, counter 0, ready (as in the reference simulation)
    expect_true(ctx == 0 && cnt == 0 && rdy && {ns, ew} == lamps_of(0), "reset state");
    rst = 1'b1;
    prev_lamps = {ns, ew};
    prev_ctx   = ctx;
    prev_blank = 1'b1;
    prev_shown = 0;
    while (states_seen < 13) begin
      // a random tick from the second round on
      if (states_seen >= 6) tick = (($urandom % 4) == 0);
      // a running timer uses this cycle's tick on the coming edge
      if (!blank && cnt != 0) begin
        if (tick) ticks_used++;
        else      n_wait++;
      end
      @(posedge clk);
      #1;
      // observe what the last edge did
      if ({ns, ew} != prev_lamps) begin
        expect_true(prev_ctx == 0, "lamps change only in the main-loop context");
        exp_state = (exp_state + 1) % 6;
        states_seen++;
        expect_true({ns, ew} == lamps_of(exp_state), $sformatf("lamps of state %0d", exp_state));
        expect_true(int'(state) == exp_state, "main state in memory row 0");
      end
      if (ctx != prev_ctx) begin
        n_switch++;
        if (ctx == 0) n_resume++;
        if (ctx == 1) n_long++;
        if (ctx == 2) n_short++;
        if (prev_ctx != 0) begin
          n_expire++;
          expect_true(ticks_used == time_of(exp_state), $sformatf("state %0d lasted %0d ticks", exp_state, ticks_used));
        end
        if (prev_ctx == 0) begin
          expect_true(int'(ctx) == ((time_of(exp_state) == 59) ? 1 : 2), "timer context of state");
          ticks_used = 0;
        end
      end
      if (phase == PH_WRAP) n_wrap++;
      if (!blank) begin
        shown = 10 * int'(tens) + int'(ones);
        expect_true(shown == int'(cnt), "display shows the counter");
        if (prev_blank)
          expect_true(shown == time_of(exp_state), "timer starts at its full time");
        else
          expect_true(shown == prev_shown || shown == prev_shown - 1, "display counts down by one");
        prev_shown = shown;
      end
      prev_blank = blank;
      prev_lamps = {ns, ew};
      prev_ctx   = ctx;
    end
    expect_true(n_switch > 0, "context switches happened");
    expect_true(n_resume >= 12, "main loop resumed from memory");
    expect_true(n_long >= 4 && n_short >= 8, "both timers restarted");
    expect_true(n_expire >= 12, "timers expired");
    expect_true(n_wrap >= 2, "a5 -> a0 wrap happened");
    expect_true(n_wait > 0, "timer waited for ticks");
    $display("switches=%0d resumes=%0d long=%0d short=%0d expiries=%0d wraps=%0d waits=%0d",
             n_switch, n_resume, n_long, n_short, n_expire, n_wrap, n_wait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
