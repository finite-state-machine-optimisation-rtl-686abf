// Lamp output logic of the main-loop context (traffic light states a0..a5).
//
// A Moore-type decoder from the main state to the two traffic lights:
//   a0  NS red     EW green
//   a1  NS red     EW yellow
//   a2  NS red     EW red
//   a3  NS green   EW red
//   a4  NS yellow  EW red
//   a5  NS red     EW red
// Light 1 (R1 Y1 G1) controls the North-South direction, light 2 (R2 Y2 G2)
// the East-West direction. The table is the one of the example intersection.
// A state outside a0..a5 shows red in both directions, a safe choice of this
// implementation. Purely combinational.
module tl_lamp_logic
  import ctx_pkg::*;
#(
  parameter int unsigned N = 6
) (
  input  logic [N-1:0] i_state,
  output lamp_t        o_ns,
  output lamp_t        o_ew
);

  localparam lamp_t RED    = '{r: 1'b1, y: 1'b0, g: 1'b0};
  localparam lamp_t YELLOW = '{r: 1'b0, y: 1'b1, g: 1'b0};
  localparam lamp_t GREEN  = '{r: 1'b0, y: 1'b0, g: 1'b1};

  always_comb begin
    o_ns = RED;
    o_ew = RED;
    case (i_state)
      N'(0): o_ew = GREEN;
      N'(1): o_ew = YELLOW;
      N'(3): o_ns = GREEN;
      N'(4): o_ns = YELLOW;
      default: ;  // a2, a5 and unused codes: all red
    endcase
  end

endmodule
