// ac_pkg: constants shared by the multiplication-free arithmetic encoder and
// decoder. The range register A and the decoder code register are 16-bit
// fixed-point numbers with one integer bit and 15 fraction bits, so 1.0 is
// 16'h8000 and the renormalized range [0.75, 1.5) is [16'h6000, 16'hC000).
// The 16-bit A register and the 48-bit guard part of the encoder's 64-bit C
// register follow the document; the fixed-point position is this design's
// choice.
package ac_pkg;
  localparam int unsigned A_W      = 16;          // width of A and of C's adder
  localparam int unsigned GUARD_W  = 48;          // carry guard above C's adder
  localparam int unsigned FRAC_W   = A_W - 1;     // fraction bits of A
  localparam int unsigned SHIFT_W  = 4;           // renormalization shift count
  localparam logic [A_W-1:0] A_ONE = 16'h8000;    // 1.0, initial range
  localparam logic [A_W-1:0] A_MIN = 16'h6000;    // 0.75
  localparam logic [A_W-1:0] A_MAX = 16'hC000;    // 1.5 (exclusive)
endpackage
