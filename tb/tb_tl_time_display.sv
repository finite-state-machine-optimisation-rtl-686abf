// Self-checking testbench for tl_time_display: every counter value with the
// display active and blanked, against digits computed by repeated
// subtraction of ten in the testbench.
module tb_tl_time_display;

  localparam int unsigned N = 6;

  logic [N-1:0] cnt;
  logic         active;
  logic [3:0]   tens, ones;
  logic         blank;
  int           checks = 0;
  int           failures = 0;
  int           t, o;

  tl_time_display #(.N(N)) dut (
    .i_cnt(cnt), .i_active(active), .o_tens(tens), .o_ones(ones), .o_blank(blank)
  );

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << N); v++) begin
      t = 0; o = v;
      while (o >= 10) begin o -= 10; t++; end
      cnt = N'(v);
      active = 1'b1;
      #1;
      checks++;
      if (tens !== 4'(t) || ones !== 4'(o) || blank !== 1'b0) begin
        failures++;
        $display("FAIL %0d: shown %0d%0d blank %b", v, tens, ones, blank);
      end
      active = 1'b0;
      #1;
      checks++;
      if (blank !== 1'b1 || tens !== 4'd0 || ones !== 4'd0) begin
        failures++;
        $display("FAIL %0d inactive: blank %b digits %0d%0d", v, blank, tens, ones);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
