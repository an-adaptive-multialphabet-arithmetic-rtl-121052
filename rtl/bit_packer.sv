// bit_packer: output buffer of the encoder.
// Each renormalization pushes out a variable number of code bits (0..16,
// MSB-aligned in in_bits, count in in_cnt). This buffer appends them to a
// 32-bit accumulator and hands out 16-bit words, first bit in the word's MSB.
// 'in_pad' marks the end of a stream: the partial word is padded with zeros so
// it can be sent. The document only says that the shifted-out bits are stored
// in a buffer; the word width and the valid/ready handshakes are this design's.
// Interface: in_valid/in_ready, wd_valid/wd_ready. in_ready is high while at
// most 16 bits are held, so any input fits. Timing: a word can leave and new
// bits enter in the same cycle; a word is valid the cycle after its last bit.
module bit_packer (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,
  input  logic        in_valid,
  input  logic [15:0] in_bits,
  input  logic [4:0]  in_cnt,
  input  logic        in_pad,
  output logic        in_ready,
  output logic        wd_valid,
  output logic [15:0] wd_data,
  input  logic        wd_ready
);
  logic [31:0] acc_q, acc_d;
  logic [5:0]  fill_q, fill_d;
  logic [15:0] masked;

  assign in_ready = (fill_q <= 6'd16);
  assign wd_valid = (fill_q >= 6'd16);
  assign wd_data  = acc_q[31:16];

  always_comb begin
    acc_d  = acc_q;
    fill_d = fill_q;
    masked = (in_cnt >= 5'd16) ? in_bits : (in_bits & ~(16'hFFFF >> in_cnt));
    if (wd_valid && wd_ready) begin
      acc_d  = acc_d << 16;
      fill_d = fill_d - 6'd16;
    end
    if (in_valid && in_ready) begin
      acc_d  = acc_d | ({masked, 16'h0000} >> fill_d);
      fill_d = fill_d + 6'(in_cnt);
      if (in_pad) fill_d = (fill_d + 6'd15) & 6'h30;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_q  <= '0;
      fill_q <= '0;
    end else if (clear) begin
      acc_q  <= '0;
      fill_q <= '0;
    end else begin
      acc_q  <= acc_d;
      fill_q <= fill_d;
    end
  end

  // Never more than 32 bits may be held.
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) fill_d <= 6'd32)
    else $error("bit_packer overflow");
endmodule
