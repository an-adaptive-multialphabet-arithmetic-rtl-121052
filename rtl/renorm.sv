// renorm: renormalizer of the arithmetic coder.
// It brings the range A back into [0.75, 1.5) and shifts the code register C
// by the same amount. The document describes two steps: shift A left until its
// first '1' is in the MSB (A' in [1, 2)), then shift back right by one if the
// bit below the MSB is '1'. Both steps are folded into one left shift:
// s = (leading zeros of A) - (bit after the leading one). The first '1' is found
// with the cellular arbitration chain (arb_chain); a small encoder (the
// document's PLA) turns its one-hot grant into the count s, which also tells
// the bit buffer how many bits leave C. Two barrel shifters apply s to A and
// C. Bits entering C from the right come from 'fill' (MSB-aligned): zeros in
// the encoder, the next code bits in the decoder.
// Interface: a_in must be nonzero and below 1.5 (16'hC000); c_in is CW bits.
// out_bits holds the top 16 bits of c_in, of which the first 'shift' bits are
// the ones shifted out. Timing: purely combinational.
module renorm
  import ac_pkg::*;
#(
  parameter int unsigned CW = 64
) (
  input  logic [A_W-1:0]     a_in,
  input  logic [CW-1:0]      c_in,
  input  logic [A_W-1:0]     fill,
  output logic [SHIFT_W-1:0] shift,
  output logic [A_W-1:0]     a_out,
  output logic [CW-1:0]      c_out,
  output logic [A_W-1:0]     out_bits
);
  logic [A_W-1:0] grant;
  logic           any;

  arb_chain #(.W(A_W)) u_arb (.req(a_in), .grant(grant), .any(any));

  // Shift-count encoder: leading-one at bit p gives (15 - p) - a_in[p-1].
  always_comb begin
    shift = '0;
    for (int p = A_W - 1; p >= 1; p--) begin
      if (grant[p]) shift = SHIFT_W'(A_W - 1 - p - int'(a_in[p-1]));
    end
    if (grant[0]) shift = SHIFT_W'(A_W - 1);
  end

  assign a_out    = a_in << shift;
  assign c_out    = (c_in << shift) | CW'((A_W + A_W)'({fill, {A_W{1'b0}}}) >> (A_W + A_W - 32'(shift)));
  assign out_bits = c_in[CW-1 -: A_W];

endmodule
