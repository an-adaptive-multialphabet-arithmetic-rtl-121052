// hist_buf: history buffer of the weighted history model.
// A first-in first-out shift register holding the HIST_LEN most recent model
// symbols. On 'shift' the new symbol enters at position 0 and every entry moves
// one place; 'tail' always shows the oldest entry, the one that leaves the
// buffer on the next shift (the (M+1)th previous symbol once the new one is in).
// As the document asks, the buffer starts filled uniformly: entry i holds
// floor(i * NSYM / HIST_LEN), which spreads the HIST_LEN initial symbols evenly
// over the alphabet (the exact pattern is this design's choice).
// Interface: synchronous 'clear' and asynchronous active-low reset both load the
// initial pattern. Timing: one shift per clock when 'shift' is high.
module hist_buf #(
  parameter int unsigned NSYM     = 256,
  parameter int unsigned HIST_LEN = 112,
  parameter int unsigned SYM_W    = $clog2(NSYM)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             shift,
  input  logic [SYM_W-1:0] sym_in,
  output logic [SYM_W-1:0] tail
);
  logic [SYM_W-1:0] buf_q [HIST_LEN];

  function automatic logic [SYM_W-1:0] init_sym(int unsigned i);
    return SYM_W'((i * NSYM) / HIST_LEN);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned i = 0; i < HIST_LEN; i++) buf_q[i] <= init_sym(i);
    end else if (clear) begin
      for (int unsigned i = 0; i < HIST_LEN; i++) buf_q[i] <= init_sym(i);
    end else if (shift) begin
      buf_q[0] <= sym_in;
      for (int unsigned i = 1; i < HIST_LEN; i++) buf_q[i] <= buf_q[i-1];
    end
  end

  assign tail = buf_q[HIST_LEN-1];
endmodule
