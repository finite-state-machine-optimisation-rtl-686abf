// Self-checking testbench for tl_lamp_logic: every state a0..a5 and every
// unused code, against the lamp table of the intersection, written out here
// as one R1Y1G1_R2Y2G2 pattern per state.
module tb_tl_lamp_logic;
  import ctx_pkg::*;

  localparam int unsigned N = 6;

  logic [N-1:0] state;
  lamp_t        ns, ew;
  int           checks = 0;
  int           failures = 0;
  logic [5:0]   expected;

  tl_lamp_logic #(.N(N)) dut (.i_state(state), .o_ns(ns), .o_ew(ew));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < (1 << N); s++) begin
      state = N'(s);
      case (s)
        0:       expected = 6'b100_001;  // NS red,    EW green
        1:       expected = 6'b100_010;  // NS red,    EW yellow
        2:       expected = 6'b100_100;  // both red
        3:       expected = 6'b001_100;  // NS green,  EW red
        4:       expected = 6'b010_100;  // NS yellow, EW red
        default: expected = 6'b100_100;  // a5 and unused codes: both red
      endcase
      #1;
      checks++;
      if ({ns, ew} !== expected) begin
        failures++;
        $display("FAIL state %0d: lamps %b expected %b", s, {ns, ew}, expected);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
