// Self-checking testbench for ctx_counter.
//
// First replays the sequence of the reference simulation of the design:
// context 0 after reset, a switch to context 1 that loads 59 and counts down
// to 0, a switch back to context 0 that resumes and counts up, a switch to
// context 2 that loads 5. Then runs random switches and counting against a
// reference model of the counter and the context rows kept in the testbench.
// Controls change on the falling clock edge; a load is held across one
// rising edge. A second instance with the T flip-flop counter runs in
// lockstep and is checked against the same model.
module tb_ctx_counter;

  localparam int unsigned N = 6;
  localparam int unsigned CW = 4;
  localparam logic [N-1:0] INIT [3] = '{N'(0), N'(59), N'(5)};
  localparam logic [2:0] RESUME = 3'b001;

  logic          clk = 1'b0;
  logic          rst = 1'b0;
  logic          dir = 1'b0, en = 1'b0, load = 1'b0, zero = 1'b0;
  logic [CW-1:0] ctx = '0, view = '0;
  logic [N-1:0]  cnt, data, vdata;
  logic          rdy;
  logic [N-1:0]  cnt_t, data_t, vdata_t;
  logic          rdy_t;

  logic [N-1:0]  m_cnt;
  logic [N-1:0]  m_row [1 << CW];
  int            checks = 0;
  int            failures = 0;

  ctx_counter #(.N(N), .CTX_W(CW)) dut (
    .i_clk(clk), .i_rst(rst), .i_dir(dir), .i_en(en), .i_load(load),
    .i_zero(zero), .i_ctx(ctx), .i_view_ctx(view),
    .o_cnt(cnt), .o_rdy(rdy), .o_data(data), .o_view(vdata)
  );

  // the same datapath with the T flip-flop counter, driven in lockstep
  ctx_counter #(.N(N), .CTX_W(CW), .TFF_COUNTER(1'b1)) dut_tff (
    .i_clk(clk), .i_rst(rst), .i_dir(dir), .i_en(en), .i_load(load),
    .i_zero(zero), .i_ctx(ctx), .i_view_ctx(view),
    .o_cnt(cnt_t), .o_rdy(rdy_t), .o_data(data_t), .o_view(vdata_t)
  );

  always #5 clk = !clk;

  // reference model: one rising edge with the current controls
  task automatic model_edge();
    if (load) begin
      if (zero)                         m_cnt = '0;
      else if (ctx > 2)                 m_cnt = '0;
      else if (RESUME[ctx[1:0]])        m_cnt = m_row[ctx];
      else                              m_cnt = INIT[ctx[1:0]];
    end else begin
      m_row[ctx] = m_cnt;
      if (en) m_cnt = dir ? m_cnt + 1'b1 : m_cnt - 1'b1;
    end
  endtask

  task automatic step();
    @(negedge clk);
    model_edge();
  endtask

  task automatic check_all(input string what);
    checks++;
    if (cnt !== m_cnt || rdy !== (m_cnt == '0) || data !== m_row[ctx] || vdata !== m_row[view]) begin
      failures++;
      $display("FAIL %s: ctx %0d cnt %0d/%0d rdy %b data %0d/%0d view %0d/%0d", what, ctx,
               cnt, m_cnt, rdy, data, m_row[ctx], vdata, m_row[view]);
    end
    checks++;
    if (cnt_t !== m_cnt || rdy_t !== (m_cnt == '0) || data_t !== m_row[ctx] || vdata_t !== m_row[view]) begin
      failures++;
      $display("FAIL %s (T flip-flop counter): cnt %0d/%0d data %0d/%0d", what,
               cnt_t, m_cnt, data_t, m_row[ctx]);
    end
  endtask

  task automatic switch_to(input int c);
    ctx = CW'(c); load = 1'b1; en = 1'b0;
    step();
    check_all("switch");
    load = 1'b0;
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    m_cnt = '0;
    for (int i = 0; i < (1 << CW); i++) m_row[i] = '0;
    @(negedge clk);
    check_all("reset");
    rst = 1'b1;

    // context 0 after reset: count up three states
    en = 1'b1; dir = 1'b1;
    repeat (3) begin step(); check_all("ctx0 up"); end
    en = 1'b0;
    step(); check_all("ctx0 hold");      // last value is written into row 0
    // context 1: loads 59, counts down to zero
    switch_to(1);
    checks++;
    if (cnt !== N'(59)) begin failures++; $display("FAIL 59 not loaded"); end
    en = 1'b1; dir = 1'b0;
    for (int i = 58; i >= 0; i--) begin
      step(); check_all("ctx1 down");
    end
    en = 1'b0;
    step(); check_all("ctx1 at zero");   // zero is written into row 1
    checks++;
    if (!rdy) begin failures++; $display("FAIL rdy not set at 0"); end
    // back to context 0: resumes at 3
    switch_to(0);
    checks++;
    if (cnt !== N'(3)) begin failures++; $display("FAIL main loop not resumed: %0d", cnt); end
    en = 1'b1; dir = 1'b1;
    step(); check_all("ctx0 step");
    en = 1'b0;
    step(); check_all("ctx0 hold");
    // context 2: loads 5
    switch_to(2);
    checks++;
    if (cnt !== N'(5)) begin failures++; $display("FAIL 5 not loaded"); end
    en = 1'b1; dir = 1'b0;
    repeat (5) begin step(); check_all("ctx2 down"); end

    // random traffic
    for (int i = 0; i < 2000; i++) begin
      view = CW'($urandom % 4);
      if (($urandom % 6) == 0) begin
        zero = ($urandom % 4) == 0;
        switch_to($urandom % 4);
        zero = 1'b0;
      end else begin
        en  = 1'($urandom);
        dir = 1'($urandom);
        step();
        check_all("random");
      end
    end

    // asynchronous reset clears counter and rows
    #1 rst = 1'b0;
    m_cnt = '0;
    for (int i = 0; i < (1 << CW); i++) m_row[i] = '0;
    #1 check_all("reset again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
