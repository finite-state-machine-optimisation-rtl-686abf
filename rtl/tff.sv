// T flip-flop with asynchronous set and clear.
//
// On a rising clock edge the output toggles when i_t is high and holds
// otherwise. i_set and i_clr (active high) force the output to 1 or 0 at
// once, without the clock; clear wins when both are high. This is the cell
// from which updown_counter_tff is built.
module tff (
  input  logic i_clk,
  input  logic i_t,
  input  logic i_set,
  input  logic i_clr,
  output logic o_q
);

  always_ff @(posedge i_clk or posedge i_set or posedge i_clr) begin
    if (i_clr)
      o_q <= 1'b0;
    else if (i_set)
      o_q <= 1'b1;
    else if (i_t)
      o_q <= !o_q;
  end

endmodule
