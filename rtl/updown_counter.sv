// N-bit synchronous up/down counter with asynchronous reset and load.
//
// This is the working register shared by all contexts. On every rising clock
// edge with i_en high it adds one (i_dir = 1) or subtracts one (i_dir = 0),
// wrapping modulo 2**N. All bits change on the same clock edge, so no ripple
// delay builds up along the chain.
//
// i_rst (active low) clears the count at once, independent of the clock.
// i_load (active high) is also asynchronous: its rising edge copies i_data
// into the count, and while it stays high every clock edge copies i_data
// again, so a load pulse that spans one clock edge always leaves the value of
// i_data at that edge. Reset has priority over load, load over counting.
//
// The count enable, the asynchronous reset and load, their priority and the
// default width of 4 follow the article's counter. A flip-flop with both an
// asynchronous clear and an asynchronous load of data is what that counter
// describes; FPGA flows map it, but some generic synthesis flows do not
// accept two asynchronous controls on one register.
module updown_counter #(
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

  always_ff @(posedge i_clk or negedge i_rst or posedge i_load) begin
    if (!i_rst)
      o_cnt <= '0;
    else if (i_load)
      o_cnt <= i_data;
    else if (i_en)
      o_cnt <= i_dir ? o_cnt + N'(1) : o_cnt - N'(1);
  end

endmodule
