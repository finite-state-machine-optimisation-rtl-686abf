// Self-checking testbench for ctx_mem.
//
// Checks that reset clears every row, that rows are written only on clock
// edges with i_cs high, and that both read ports return what a reference
// array in the testbench holds, using random addresses and data.
module tb_ctx_mem;

  localparam int unsigned A = 4;
  localparam int unsigned W = 8;

  logic         clk = 1'b0;
  logic         rst = 1'b0;
  logic [A-1:0] addr = '0, addr_b = '0;
  logic [W-1:0] wdata = '0;
  logic         cs = 1'b0;
  logic [W-1:0] rdata, rdata_b;
  logic [W-1:0] model [1 << A];
  int           checks = 0;
  int           failures = 0;

  ctx_mem #(.A_SIZE(A), .W_SIZE(W)) dut (
    .i_clk(clk), .i_rst(rst), .i_addr(addr), .i_data(wdata), .i_cs(cs),
    .o_data(rdata), .i_addr_b(addr_b), .o_data_b(rdata_b)
  );

  always #5 clk = !clk;

  task automatic check(input logic [W-1:0] got, input logic [W-1:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #50000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    rst = 1'b1;
    for (int i = 0; i < (1 << A); i++) model[i] = '0;
    // every row is zero after reset
    for (int i = 0; i < (1 << A); i++) begin
      addr = A'(i); addr_b = A'((1 << A) - 1 - i);
      #1;
      check(rdata, '0, "reset row");
      check(rdata_b, '0, "reset row port b");
    end
    // fill every row
    @(negedge clk);
    cs = 1'b1;
    for (int i = 0; i < (1 << A); i++) begin
      addr = A'(i); wdata = W'(8'hA0 + i);
      @(negedge clk);
      model[i] = wdata;
    end
    // random writes, with and without chip select, and reads on both ports
    for (int i = 0; i < 400; i++) begin
      addr   = A'($urandom);
      addr_b = A'($urandom);
      wdata  = W'($urandom);
      cs     = 1'($urandom);
      #1;
      check(rdata, model[addr], "read port a");
      check(rdata_b, model[addr_b], "read port b");
      @(negedge clk);
      if (cs) model[addr] = wdata;
    end
    // reset clears again
    rst = 1'b0;
    #1;
    for (int i = 0; i < (1 << A); i++) begin
      addr = A'(i);
      #1 check(rdata, '0, "second reset");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
