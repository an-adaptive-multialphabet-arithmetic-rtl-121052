// ac_encoder: multiplication-free multialphabet arithmetic encoder.
// Registers: range A (16 b, 1.0 = 16'h8000) and code C (64 b). C's low 16 bits
// use a 16-bit adder. The upper 48 bits are a guard register that works as a
// counter and only counts the adder's carry, so a carry never travels through
// a 64-bit adder. Bits leave C at its top during renormalization.
//
// Coding step for symbol x, with model values Q(x) (cumulative) and n(x)
// (frequency) over the total N = 2^TOT_LOG2 and the last symbol m:
//   beta chooses the scale so that N * 2^-beta <= A: the model total counts
//   as 1.0 when A >= 1 and as 0.5 when A < 1 (shift sh = 15 - beta);
//   E  = A - N*2^-beta       (the part of the range the approximation leaves)
//   x <  m : C += Q(x)*2^-beta,      A = n(x)*2^-beta
//   x == m : C += Q(m)*2^-beta,      A = n(m)*2^-beta + E
//   x >  m : C += Q(x)*2^-beta + E,  A = n(x)*2^-beta
// so no multiplication is needed, and the last symbol takes the leftover
// range. Then the renormalizer shifts A back into [0.75, 1.5) and C by the
// same count; the bits leaving C go to the bit buffer.
// The 16/48-bit registers, the guard counter and the renormalizer follow the
// document. The coder follows Rissanen and Mohiuddin's code, which the document
// builds on without printing its equations. The choice of beta and the way
// the last symbol keeps its place in symbol order (symbols above it are moved
// up by E) are this design's reading of it.
// The first 48 bits leaving C are always zero (C starts at 0 and stays below
// 1.0 plus later carries), so they are not sent. If a carry ever runs past all
// 48 guard bits, sticky 'carry_lost' is raised: bit stuffing is not built.
//
// Interface: in_valid/in_ready with in_sym, or in_flush for end of stream.
// A flush sends the 64 bits of C, pads the last word and restarts the encoder
// and its model (pulse on m_clear). Bits leave on ob_* (MSB-aligned, count
// ob_cnt, ob_pad on the final chunk).
// Timing: one symbol every 2 cycles: the coding cycle, then the model's
// second update cycle (m_busy). A flush takes 4 cycles.
module ac_encoder
  import ac_pkg::*;
#(
  parameter int unsigned SYM_W    = 8,
  parameter int unsigned TOT_LOG2 = 11,
  parameter int unsigned FREQ_W   = TOT_LOG2 + 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  // symbol input
  input  logic              in_valid,
  input  logic              in_flush,
  input  logic [SYM_W-1:0]  in_sym,
  output logic              in_ready,
  // modeling unit
  output logic [SYM_W-1:0]  m_sym,
  input  logic [FREQ_W-1:0] m_q,
  input  logic [FREQ_W-1:0] m_n,
  input  logic [SYM_W-1:0]  m_mps,
  input  logic              m_busy,
  output logic              m_upd,
  output logic              m_clear,
  // to the bit buffer
  output logic              ob_valid,
  output logic [A_W-1:0]    ob_bits,
  output logic [4:0]        ob_cnt,
  output logic              ob_pad,
  input  logic              ob_ready,
  // status
  output logic              carry_lost,
  output logic [A_W-1:0]    a_reg
);
  localparam int unsigned CW     = A_W + GUARD_W;
  localparam int unsigned SH_HI  = FRAC_W - TOT_LOG2;       // A >= 1.0
  localparam int unsigned SKIP   = GUARD_W;

  typedef enum logic [1:0] {RUN, FLUSH} state_t;

  state_t            state_q;
  logic [1:0]        fl_cnt_q;
  logic [A_W-1:0]    a_q;
  logic [CW-1:0]     c_q;
  logic [5:0]        skip_q;

  // ---- coding datapath ----
  logic [3:0]        sh;
  logic [A_W:0]      e, addend, a_new;
  logic [A_W:0]      lo_sum;
  logic [GUARD_W-1:0] guard_new;
  logic              guard_ovf;
  logic [CW-1:0]     c_new, c_ren;
  logic [A_W-1:0]    a_ren, out_bits;
  logic [SHIFT_W-1:0] s;

  always_comb begin
    sh     = a_q[A_W-1] ? 4'(SH_HI) : 4'(SH_HI - 1);
    e      = {1'b0, a_q} - ((A_W+1)'(1) << (TOT_LOG2 + 32'(sh)));
    addend = ((A_W+1)'(m_q) << sh) + ((in_sym > m_mps) ? e : '0);
    a_new  = ((A_W+1)'(m_n) << sh) + ((in_sym == m_mps) ? e : '0);
    lo_sum = {1'b0, c_q[A_W-1:0]} + addend;
    {guard_ovf, guard_new} = {1'b0, c_q[CW-1:A_W]} + (GUARD_W+1)'(lo_sum[A_W]);
    c_new  = {guard_new, lo_sum[A_W-1:0]};
  end

  renorm #(.CW(CW)) u_renorm (
    .a_in(a_new[A_W-1:0]), .c_in(c_new), .fill('0),
    .shift(s), .a_out(a_ren), .c_out(c_ren), .out_bits(out_bits)
  );

  // ---- control ----
  logic code_go, flush_go, fl_step, fl_last;
  logic [4:0] raw_cnt;
  logic [A_W-1:0] raw_bits;

  assign in_ready = (state_q == RUN) && !m_busy && ob_ready;
  assign code_go  = in_valid && in_ready && !in_flush;
  assign flush_go = in_valid && in_ready && in_flush;
  assign fl_step  = (state_q == FLUSH) && ob_ready;
  assign fl_last  = fl_step && (fl_cnt_q == 2'd3);

  assign m_sym   = in_sym;
  assign m_upd   = code_go;
  assign m_clear = fl_last;

  // Raw bits leaving C this cycle, before the leading 48 zeros are dropped.
  always_comb begin
    raw_bits = '0;
    raw_cnt  = '0;
    if (code_go) begin
      raw_bits = out_bits;
      raw_cnt  = 5'(s);
    end else if (fl_step) begin
      raw_bits = c_q[CW-1 -: A_W];
      raw_cnt  = 5'd16;
    end
    if (6'(raw_cnt) <= skip_q) begin
      ob_bits = '0;
      ob_cnt  = '0;
    end else begin
      ob_bits = raw_bits << skip_q;
      ob_cnt  = raw_cnt - 5'(skip_q);
    end
  end
  assign ob_valid = (code_go && ob_cnt != 0) || fl_step;
  assign ob_pad   = fl_last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q    <= RUN;
      fl_cnt_q   <= '0;
      a_q        <= A_ONE;
      c_q        <= '0;
      skip_q     <= 6'(SKIP);
      carry_lost <= 1'b0;
    end else if (clear) begin
      state_q    <= RUN;
      fl_cnt_q   <= '0;
      a_q        <= A_ONE;
      c_q        <= '0;
      skip_q     <= 6'(SKIP);
      carry_lost <= 1'b0;
    end else begin
      if (code_go) begin
        a_q    <= a_ren;
        c_q    <= c_ren;
        skip_q <= (6'(raw_cnt) <= skip_q) ? skip_q - 6'(raw_cnt) : '0;
        if (guard_ovf) carry_lost <= 1'b1;
      end
      if (flush_go) begin
        state_q  <= FLUSH;
        fl_cnt_q <= '0;
      end
      if (fl_step) begin
        c_q      <= c_q << A_W;
        fl_cnt_q <= fl_cnt_q + 1'b1;
        skip_q   <= (6'(raw_cnt) <= skip_q) ? skip_q - 6'(raw_cnt) : '0;
        if (fl_last) begin
          state_q <= RUN;
          a_q     <= A_ONE;
          c_q     <= '0;
          skip_q  <= 6'(SKIP);
        end
      end
    end
  end

  assign a_reg = a_q;

  a_range: assert property (@(posedge clk) disable iff (!rst_n) a_q >= A_MIN && a_q < A_MAX)
    else $error("ac_encoder: A left [0.75, 1.5)");
endmodule
