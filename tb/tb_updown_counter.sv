// Self-checking testbench for updown_counter.
//
// Drives random enable / direction / load / data sequences and compares the
// count after every clock edge with a reference count kept in the testbench.
// Also checks that reset and load act without a clock edge (asynchronously)
// and that reset wins over load. Ends with the TB_RESULT line.
module tb_updown_counter;

  localparam int unsigned N = 4;

  logic         clk = 1'b0;
  logic         rst = 1'b0;
  logic         dir = 1'b0;
  logic         en  = 1'b0;
  logic         load = 1'b0;
  logic [N-1:0] data = '0;
  logic [N-1:0] cnt;
  logic [N-1:0] model;
  int           checks = 0;
  int           failures = 0;

  updown_counter #(.N(N)) dut (
    .i_clk(clk), .i_rst(rst), .i_dir(dir), .i_en(en),
    .i_load(load), .i_data(data), .o_cnt(cnt)
  );

  always #5 clk = !clk;

  task automatic check(input logic [N-1:0] exp, input string what);
    checks++;
    if (cnt !== exp) begin
      failures++;
      $display("FAIL %s: cnt=%0d expected %0d", what, cnt, exp);
    end
  endtask

  initial begin
    #20000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // reset holds the count at 0 even while clocking
    repeat (2) @(negedge clk);
    check('0, "reset");
    rst = 1'b1;
    model = '0;

    // up and down with wrap-around
    en = 1'b1; dir = 1'b1;
    for (int i = 0; i < 20; i++) begin
      @(negedge clk);
      model = model + 1'b1;
      check(model, "count up");
    end
    dir = 1'b0;
    for (int i = 0; i < 20; i++) begin
      @(negedge clk);
      model = model - 1'b1;
      check(model, "count down");
    end

    // asynchronous load: value appears before any clock edge
    @(negedge clk);
    model = cnt;
    #1 data = 4'd9; load = 1'b1;
    #1 check(4'd9, "async load");
    @(negedge clk);
    check(4'd9, "load held over edge");
    load = 1'b0;
    model = 4'd9;

    // random operation
    for (int i = 0; i < 300; i++) begin
      en   = 1'($urandom);
      dir  = 1'($urandom);
      data = N'($urandom);
      load = ($urandom % 5) == 0;
      @(negedge clk);
      if (load)      model = data;
      else if (en)   model = dir ? model + 1'b1 : model - 1'b1;
      check(model, "random");
      load = 1'b0;
      #1;
    end

    // asynchronous reset wins over load
    en = 1'b1; dir = 1'b1; data = 4'd7; load = 1'b1;
    #1 check(4'd7, "load before reset");
    rst = 1'b0;
    #1 check('0, "async reset over load");
    @(negedge clk);
    check('0, "reset held");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
