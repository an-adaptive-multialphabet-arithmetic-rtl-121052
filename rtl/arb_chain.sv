// arb_chain: cellular bus-arbitration chain that finds the first '1' of a word,
// scanning from the MSB towards the LSB.
// Each cell passes a "taken" signal to the cell below it; a cell whose request
// bit is set and whose "taken" input is low grants itself and raises "taken"
// for every cell after it. The result is a one-hot grant word. The cell chain
// follows the document's cellular arbiter; the document builds each cell from
// pass transistors, here it is two gates of logic.
// Interface: req (W bits) in, grant (one-hot, W bits) and any out.
// Timing: purely combinational.
module arb_chain #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] req,
  output logic [W-1:0] grant,
  output logic         any
);
  logic [W:0] taken;   // taken[k]: some cell above bit position W-k has won

  assign taken[0] = 1'b0;
  for (genvar k = 0; k < W; k++) begin : g_cell
    localparam int unsigned B = W - 1 - k;   // bit handled by cell k
    assign grant[B]    = req[B] & ~taken[k];
    assign taken[k+1]  = taken[k] | req[B];
  end
  assign any = taken[W];
endmodule
