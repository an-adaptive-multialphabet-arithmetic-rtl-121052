// bit_unpacker: input buffer of the decoder.
// 16-bit code words are appended to a 32-bit accumulator. The next 16 code
// bits are always shown in 'window' (first bit in the MSB), with 'avail' the
// number of them that are valid. The decoder takes 'take_cnt' bits (0..16) per
// step by raising 'take'. The document only says the code stream is held in a
// buffer before the renormalizer; widths and handshakes are this design's.
// Interface: wd_valid/wd_ready for words, accepted while at most 16 bits are
// held; 'take' with take_cnt <= avail. Timing: bits of a word accepted in one
// cycle are visible in the next; take and accept may share a cycle.
module bit_unpacker (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,
  input  logic        wd_valid,
  input  logic [15:0] wd_data,
  output logic        wd_ready,
  output logic [15:0] window,
  output logic [5:0]  avail,
  input  logic        take,
  input  logic [4:0]  take_cnt
);
  logic [31:0] acc_q, acc_d;
  logic [5:0]  cnt_q, cnt_d;

  assign wd_ready = (cnt_q <= 6'd16);
  assign window   = acc_q[31:16];
  assign avail    = cnt_q;

  always_comb begin
    acc_d = acc_q;
    cnt_d = cnt_q;
    if (take) begin
      acc_d = acc_d << take_cnt;
      cnt_d = cnt_d - 6'(take_cnt);
    end
    if (wd_valid && wd_ready) begin
      acc_d = acc_d | ({wd_data, 16'h0000} >> cnt_d);
      cnt_d = cnt_d + 6'd16;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_q <= '0;
      cnt_q <= '0;
    end else if (clear) begin
      acc_q <= '0;
      cnt_q <= '0;
    end else begin
      acc_q <= acc_d;
      cnt_q <= cnt_d;
    end
  end

  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) take |-> 6'(take_cnt) <= cnt_q)
    else $error("bit_unpacker underflow");
endmodule
