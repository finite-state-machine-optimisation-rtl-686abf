// Context memory: the array of state registers, one row per context.
//
// 2**A_SIZE rows of W_SIZE bits. Row i_addr is read without a clock on
// o_data; a second read port shows row i_addr_b on o_data_b, so the output
// logic of one context can keep reading its row while another context is
// active. On a rising clock edge with i_cs high, i_data is written into row
// i_addr; the written value appears on the read ports after that edge.
// i_rst (active low) clears every row at once.
//
// Widths, chip select, asynchronous read and clear on reset follow the
// article's memory module. The depth of 2**A_SIZE rows (A_SIZE address
// bits) and the second read port are choices of this implementation; the
// second port matches the dual-port mode of FPGA block RAM.
module ctx_mem #(
  parameter int unsigned A_SIZE = 4,
  parameter int unsigned W_SIZE = 8
) (
  input  logic              i_clk,
  input  logic              i_rst,
  input  logic [A_SIZE-1:0] i_addr,
  input  logic [W_SIZE-1:0] i_data,
  input  logic              i_cs,
  output logic [W_SIZE-1:0] o_data,
  input  logic [A_SIZE-1:0] i_addr_b,
  output logic [W_SIZE-1:0] o_data_b
);

  localparam int unsigned DEPTH = 1 << A_SIZE;

  logic [W_SIZE-1:0] mem [DEPTH];

  assign o_data   = mem[i_addr];
  assign o_data_b = mem[i_addr_b];

  always_ff @(posedge i_clk or negedge i_rst) begin
    if (!i_rst) begin
      for (int i = 0; i < DEPTH; i++)
        mem[i] <= '0;
    end else if (i_cs) begin
      mem[i_addr] <= i_data;
    end
  end

endmodule
