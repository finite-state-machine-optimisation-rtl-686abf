// Remaining-time output logic of the timer contexts.
//
// While a timer context counts (i_active high) it shows the counter value,
// the remaining seconds, as two decimal digits; otherwise the display is
// blank (o_blank high, digits 0). The conversion divides by ten with a
// constant divider; values up to 10**2 - 1 are shown exactly, larger ones
// show their last two decimal digits.
//
// That the timer has a remaining-time display comes from the example; the
// two-digit BCD form and the blanking are choices of this implementation.
// Purely combinational.
module tl_time_display #(
  parameter int unsigned N = 6
) (
  input  logic [N-1:0] i_cnt,
  input  logic         i_active,
  output logic [3:0]   o_tens,
  output logic [3:0]   o_ones,
  output logic         o_blank
);

  always_comb begin
    o_blank = !i_active;
    o_tens  = '0;
    o_ones  = '0;
    if (i_active) begin
      o_tens = 4'((32'(i_cnt) / 32'd10) % 32'd10);
      o_ones = 4'(32'(i_cnt) % 32'd10);
    end
  end

endmodule
