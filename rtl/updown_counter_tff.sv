// N-bit synchronous up/down counter built from T flip-flops.
//
// Same function and ports as updown_counter, but written at the structure
// level: one T flip-flop (tff) per bit, all on the same clock. Bit 0 toggles
// whenever the counter is enabled. Bit i toggles when the counter is enabled
// and, counting up, every lower bit is 1, or, counting down, every lower bit
// is 0. The carry chain is purely combinational, so all bits change on the
// same clock edge and no delay accumulates along the clock.
//
// Reset and load act through each flip-flop's asynchronous inputs: with
// i_load high, a bit whose i_data bit is 1 is set and a bit whose i_data bit
// is 0 is cleared; i_rst (active low) clears every bit and wins over load.
// While i_load stays high the bits keep following i_data.
//
// The T flip-flop chain, the set input driven from load and the data bit,
// and the clear from reset follow the article's counter schematic. Clearing
// a bit on a load of 0 is this design's own addition: with set alone a load
// could only turn bits on.
module updown_counter_tff #(
  parameter int unsigned N = 4
) (
  input  logic         i_clk,
  input  logic         i_rst,
  input  logic         i_dir,
  input  logic         i_en,
  input  logic         i_load,
  input  logic [N-1:0] i_data,
  output logic [N-1:0] o_cnt
);

  logic [N-1:0] toggle;
  logic [N-1:0] all_ones_below;   // q[i-1:0] all 1
  logic [N-1:0] all_zeros_below;  // q[i-1:0] all 0

  assign all_ones_below[0]  = 1'b1;
  assign all_zeros_below[0] = 1'b1;

  for (genvar i = 1; i < N; i++) begin : g_chain
    assign all_ones_below[i]  = all_ones_below[i-1]  &&  o_cnt[i-1];
    assign all_zeros_below[i] = all_zeros_below[i-1] && !o_cnt[i-1];
  end

  for (genvar i = 0; i < N; i++) begin : g_bit
    assign toggle[i] = i_en && (i_dir ? all_ones_below[i] : all_zeros_below[i]);

    tff u_tff (
      .i_clk (i_clk),
      .i_t   (toggle[i]),
      .i_set (i_rst && i_load && i_data[i]),
      .i_clr (!i_rst || (i_load && !i_data[i])),
      .o_q   (o_cnt[i])
    );
  end

endmodule
