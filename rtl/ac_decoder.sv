// ac_decoder: multiplication-free multialphabet arithmetic decoder.
// A and C are both 16-bit registers (1.0 = 16'h8000); no guard register is
// needed because C here is the distance of the code point from the bottom of
// the current range, which is always below A.
// Decoding step, the mirror of ac_encoder (same beta, E and last symbol m):
//   The code point is scaled to model units, C_model = C * 2^beta (a right
//   shift by sh = 15 - beta bits), so one shifter serves all comparators.
//   If C lies in the last symbol's widened interval
//   [Q(m)*2^-beta, (Q(m)+n(m))*2^-beta + E), the symbol is m. Otherwise the
//   modeling unit searches for the largest x with Q(x) <= C_model, and E is
//   taken off first when C lies above m's interval. This is the document's
//   "largest symbol j with Q(j) <= 2^beta * C" rule.
//   Then C -= the symbol's addend, A = its width, both exactly as in the
//   encoder, and the renormalizer shifts A and C. The bits that enter C come
//   from the code stream (the bit_unpacker window), not zeros.
// The 16-bit registers, the shared renormalizer with stream fill, and
// shifting C once before one comparator per entry follow the document. The
// handling of the last symbol and of beta is this design's reading of the code
// it builds on (see ac_encoder).
// Interface: reads the code stream through window/avail/take/take_cnt; first
// loads 16 bits into C, then decodes one symbol per step. Decoded symbols
// leave on out_valid/out_ready/out_sym. The stream ends only by 'clear'.
// Timing: one symbol every 2 cycles (the step, then the model's second
// update cycle); it stalls while fewer code bits are held than the step's
// shift needs.
module ac_decoder
  import ac_pkg::*;
#(
  parameter int unsigned SYM_W    = 8,
  parameter int unsigned TOT_LOG2 = 11,
  parameter int unsigned FREQ_W   = TOT_LOG2 + 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  // code stream
  input  logic [A_W-1:0]    window,
  input  logic [5:0]        avail,
  output logic              take,
  output logic [4:0]        take_cnt,
  // modeling unit
  output logic [FREQ_W-1:0] m_srch_t,
  input  logic [SYM_W-1:0]  m_srch_sym,
  output logic [SYM_W-1:0]  m_sym,
  input  logic [FREQ_W-1:0] m_q,
  input  logic [FREQ_W-1:0] m_n,
  input  logic [SYM_W-1:0]  m_mps,
  input  logic [FREQ_W-1:0] m_mps_q,
  input  logic [FREQ_W-1:0] m_mps_n,
  input  logic              m_busy,
  output logic              m_upd,
  // decoded symbols
  output logic              out_valid,
  output logic [SYM_W-1:0]  out_sym,
  input  logic              out_ready,
  output logic [A_W-1:0]    a_reg
);
  localparam int unsigned SH_HI = FRAC_W - TOT_LOG2;

  typedef enum logic {LOAD, RUN} state_t;

  state_t         state_q;
  logic [A_W-1:0] a_q, c_q;

  logic [3:0]     sh;
  logic [A_W:0]   e, c17, s_qm, s_him, addend, a_new, t_full;
  logic           above_m, in_m;
  logic [SYM_W-1:0] sym;
  logic [A_W-1:0] c_new, a_ren, c_ren;
  logic [SHIFT_W-1:0] s;
  logic           step_go, load_go;

  always_comb begin
    sh      = a_q[A_W-1] ? 4'(SH_HI) : 4'(SH_HI - 1);
    e       = {1'b0, a_q} - ((A_W+1)'(1) << (TOT_LOG2 + 32'(sh)));
    c17     = {1'b0, c_q};
    s_qm    = (A_W+1)'(m_mps_q) << sh;
    s_him   = s_qm + ((A_W+1)'(m_mps_n) << sh) + e;
    above_m = (c17 >= s_him);
    in_m    = (c17 >= s_qm) && !above_m;
    t_full  = (above_m ? c17 - e : c17) >> sh;
    m_srch_t = FREQ_W'(t_full);
    sym     = in_m ? m_mps : m_srch_sym;
  end

  // Second half of the step, from the model's answer for the decoded symbol.
  always_comb begin
    addend  = ((A_W+1)'(m_q) << sh) + ((sym > m_mps) ? e : '0);
    a_new   = ((A_W+1)'(m_n) << sh) + ((sym == m_mps) ? e : '0);
    c_new   = A_W'(c17 - addend);
  end

  assign m_sym = sym;

  renorm #(.CW(A_W)) u_renorm (
    .a_in(a_new[A_W-1:0]), .c_in(c_new), .fill(window),
    .shift(s), .a_out(a_ren), .c_out(c_ren), .out_bits()
  );

  assign load_go  = (state_q == LOAD) && (avail >= 6'd16);
  assign step_go  = (state_q == RUN) && !m_busy && (!out_valid || out_ready)
                    && (avail >= 6'(s));
  assign take     = load_go || step_go;
  assign take_cnt = load_go ? 5'd16 : 5'(s);
  assign m_upd    = step_go;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q   <= LOAD;
      a_q       <= A_ONE;
      c_q       <= '0;
      out_valid <= 1'b0;
      out_sym   <= '0;
    end else if (clear) begin
      state_q   <= LOAD;
      a_q       <= A_ONE;
      c_q       <= '0;
      out_valid <= 1'b0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (load_go) begin
        c_q     <= window;
        state_q <= RUN;
      end
      if (step_go) begin
        a_q       <= a_ren;
        c_q       <= c_ren;
        out_valid <= 1'b1;
        out_sym   <= sym;
      end
    end
  end

  assign a_reg = a_q;

  a_range: assert property (@(posedge clk) disable iff (!rst_n) a_q >= A_MIN && a_q < A_MAX)
    else $error("ac_decoder: A left [0.75, 1.5)");
  c_below_a: assert property (@(posedge clk) disable iff (!rst_n) state_q == RUN |-> c_q < a_q)
    else $error("ac_decoder: code point outside the range");
endmodule
