// mps_tracker: the dynamic lookup table that names the "last" model symbol.
// The multiplication-free coder gives the remainder of the range to one symbol,
// which should be the one with the largest count. This block holds that symbol.
// At each model update (new symbol 'cur' enters the history, 'prev' leaves)
// it works out both symbols' occurrence counts after the update from the counts
// before it. If 'cur' then occurs more often than the held symbol, 'cur' takes
// its place. The document only says that the table keeps the largest-count
// symbol last. This incremental rule is this design's own: it follows the
// maximum without searching all counts, and may keep a symbol that has fallen
// behind until another overtakes it. Only compression suffers then;
// decodability does not, since any symbol may serve as the last one.
// Interface: 'upd' strobes one update; occ_cur/occ_mps are counts before it.
// Timing: 'mps' changes at the clock edge of the update.
module mps_tracker #(
  parameter int unsigned SYM_W = 8,
  parameter int unsigned CNT_W = 7,
  parameter logic [SYM_W-1:0] MPS_INIT = '0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             upd,
  input  logic [SYM_W-1:0] cur,
  input  logic [SYM_W-1:0] prev,
  input  logic [CNT_W-1:0] occ_cur,
  input  logic [CNT_W-1:0] occ_mps,
  output logic [SYM_W-1:0] mps
);
  logic [CNT_W:0] cur_new, mps_new;

  always_comb begin
    cur_new = {1'b0, occ_cur} + (CNT_W+1)'(cur != prev);
    mps_new = {1'b0, occ_mps} + (CNT_W+1)'(cur == mps && cur != prev)
                              - (CNT_W+1)'(prev == mps && cur != prev);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                                      mps <= MPS_INIT;
    else if (clear)                                  mps <= MPS_INIT;
    else if (upd && cur != mps && cur_new > mps_new) mps <= cur;
  end
endmodule
