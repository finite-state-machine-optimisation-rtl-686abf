// Context-switched counter: one counter whose state is swapped in and out of
// a memory array, so several counting tasks share a single piece of logic.
//
// The counter (updown_counter) holds the value of the active context i_ctx.
// The context memory (ctx_mem) has one row per context. On every clock edge
// on which no load takes place, the counter value is written into the row of
// the active context, so that row follows the counter one cycle behind
// (o_data). When the sequencer switches to another context it raises i_load:
// the counter then takes
//   - 0                      if i_zero is high,
//   - the context's own row  if the context resumes (bit set in CTX_RESUME),
//   - CTX_INIT[ctx]          otherwise (a timer that restarts every time).
// i_load is the counter's asynchronous load; hold it high across at least one
// clock edge and keep i_ctx / i_zero stable meanwhile (the sequencer drives
// all three from flip-flops). No row is written while i_load is high.
//
// o_rdy is high while the counter is at zero (a timer has run out).
// i_view_ctx / o_view give a second look into the memory, for output logic
// that must keep showing a context that is not active.
//
// Ports and widths follow the article's simulation of this counter (6-bit
// count, 4-bit context number, contexts 0..2 with 59 and 5 as timer values).
// TFF_COUNTER selects the counter: 0 (default) the behavioural
// updown_counter, 1 the T flip-flop structure updown_counter_tff; both
// behave the same. The resume/restart split, i_zero and the second read port
// are choices of this implementation.
module ctx_counter #(
  parameter int unsigned N          = 6,
  parameter int unsigned CTX_W      = 4,
  parameter int unsigned NCTX       = 3,
  parameter logic [N-1:0] CTX_INIT [NCTX] = '{N'(0), N'(59), N'(5)},
  parameter logic [NCTX-1:0] CTX_RESUME   = 3'b001,
  parameter bit TFF_COUNTER = 1'b0
) (
  input  logic             i_clk,
  input  logic             i_rst,
  input  logic             i_dir,
  input  logic             i_en,
  input  logic             i_load,
  input  logic             i_zero,
  input  logic [CTX_W-1:0] i_ctx,
  input  logic [CTX_W-1:0] i_view_ctx,
  output logic [N-1:0]     o_cnt,
  output logic             o_rdy,
  output logic [N-1:0]     o_data,
  output logic [N-1:0]     o_view
);

  localparam int unsigned IW = (NCTX > 1) ? $clog2(NCTX) : 1;

  logic [N-1:0]  load_value;
  logic [IW-1:0] ctx_idx;

  assign ctx_idx = IW'(i_ctx);

  // Value the counter takes when the context i_ctx is switched in.
  always_comb begin
    load_value = '0;
    if (!i_zero && (int'(i_ctx) < NCTX)) begin
      if (CTX_RESUME[ctx_idx])
        load_value = o_data;
      else
        load_value = CTX_INIT[ctx_idx];
    end
  end

  if (TFF_COUNTER) begin : g_tff
    updown_counter_tff #(.N(N)) u_cnt (
      .i_clk  (i_clk),
      .i_rst  (i_rst),
      .i_dir  (i_dir),
      .i_en   (i_en),
      .i_load (i_load),
      .i_data (load_value),
      .o_cnt  (o_cnt)
    );
  end else begin : g_beh
    updown_counter #(.N(N)) u_cnt (
      .i_clk  (i_clk),
      .i_rst  (i_rst),
      .i_dir  (i_dir),
      .i_en   (i_en),
      .i_load (i_load),
      .i_data (load_value),
      .o_cnt  (o_cnt)
    );
  end

  ctx_mem #(.A_SIZE(CTX_W), .W_SIZE(N)) u_mem (
    .i_clk    (i_clk),
    .i_rst    (i_rst),
    .i_addr   (i_ctx),
    .i_data   (o_cnt),
    .i_cs     (!i_load),
    .o_data   (o_data),
    .i_addr_b (i_view_ctx),
    .o_data_b (o_view)
  );

  assign o_rdy = (o_cnt == '0);

endmodule
