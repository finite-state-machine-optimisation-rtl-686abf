// Self-checking testbench for ctx_sequencer.
//
// The shared counter and its context rows are modelled in the testbench
// (load, count, write-back), so the sequencer runs in a closed loop. The
// one-second tick is random. The testbench keeps its own count of the main
// loop state and checks, for a little over two rounds of a0..a5:
//   - which timer context is switched in after each state (59 s timer after
//     a0 and a3, 5 s timer after the others),
//   - that the timer counts exactly 59 or 5 ticks, and only on ticks,
//   - load / zero / direction / enable outputs in every phase,
//   - that the main loop wraps from a5 to a0 through PH_WRAP.
module tb_ctx_sequencer;
  import ctx_pkg::*;

  localparam int unsigned N  = 6;
  localparam int unsigned CW = 4;

  logic          clk = 1'b0;
  logic          rst = 1'b0;
  logic          tick = 1'b0;
  logic [N-1:0]  cnt;
  logic [N-1:0]  row [3];
  logic          rdy;
  logic [N-1:0]  data;
  logic [CW-1:0] ctx;
  logic          load, zero, dir, cen, timing;
  phase_t        phase;

  int checks = 0;
  int failures = 0;
  int main_state = 0;
  int ticks = 0;
  int rounds_done = 0;
  int wraps = 0;
  int timer_runs = 0;
  logic [CW-1:0] last_timer;

  ctx_sequencer #(.N(N), .CTX_W(CW)) dut (
    .i_clk(clk), .i_rst(rst), .i_en(tick), .i_cnt(cnt), .i_rdy(rdy),
    .i_data(data), .o_ctx(ctx), .o_load(load), .o_zero(zero), .o_dir(dir),
    .o_cen(cen), .o_timing(timing), .o_phase(phase)
  );

  // datapath model: counter + context rows
  assign rdy  = (cnt == '0);
  assign data = (ctx < 3) ? row[ctx] : '0;
  always_ff @(posedge clk or negedge rst) begin
    if (!rst) begin
      cnt <= '0;
      row <= '{default: '0};
    end else if (load) begin
      if (zero)          cnt <= '0;
      else if (ctx == 0) cnt <= row[0];
      else if (ctx == 1) cnt <= N'(59);
      else               cnt <= N'(5);
    end else begin
      if (ctx < 3) row[ctx] <= cnt;
      if (cen) cnt <= dir ? cnt + 1'b1 : cnt - 1'b1;
    end
  end

  always #5 clk = !clk;

  task automatic expect_true(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (t=%0t phase=%s ctx=%0d cnt=%0d)", what, $time, phase.name(), ctx, cnt);
    end
  endtask

  function automatic int timer_of(input int s);
    return (s == 0 || s == 3) ? 1 : 2;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end


  phase_t prev_phase;
  logic [CW-1:0] prev_ctx;

  initial begin
    @(negedge clk);
    expect_true(phase == PH_HOLD && ctx == 0 && !load, "reset state");
    rst = 1'b1;
    prev_phase = phase;
    prev_ctx   = ctx;
    while (rounds_done < 13) begin
      @(posedge clk);
      #1;
      tick = (($urandom % 3) == 0);
      // per-phase output rules
      expect_true(dir == (ctx == 0), "direction follows context");
      expect_true(load == (phase == PH_RESTORE || phase == PH_WRAP), "load only in restore/wrap");
      expect_true(zero == (phase == PH_WRAP), "zero only in wrap");
      expect_true(timing == (phase == PH_RUN && ctx != 0), "timing flag");
      if (phase == PH_RESTORE && ctx != 0 && prev_phase == PH_HOLD) begin
        expect_true(int'(ctx) == timer_of(main_state), "switching matrix");
        last_timer = ctx;
        ticks = 0;
      end
      if (phase == PH_WRAP) begin
        wraps++;
        expect_true(main_state == 0, "wrap only after a5");
      end
      if (phase == PH_RESTORE && ctx == 0 && prev_ctx != 0) begin
        // timer has expired
        timer_runs++;
        expect_true(ticks == ((last_timer == 1) ? 59 : 5), $sformatf("timer length %0d", ticks));
        main_state = (main_state + 1) % 6;
        rounds_done++;
      end
      if (phase == PH_HOLD && prev_phase != PH_HOLD)
        expect_true(int'(cnt) == main_state, "main loop state");
      prev_phase = phase;
      prev_ctx   = ctx;
      // count ticks the timer uses in this cycle
      @(negedge clk);
      if (phase == PH_RUN && ctx != 0) begin
        if (cen) begin
          ticks++;
          expect_true(tick, "timer counts only on ticks");
        end
      end
    end
    expect_true(wraps == 2, "two wraps in two rounds");
    expect_true(timer_runs == 13, "thirteen timer runs");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
