// ocapp_match_compare: interrogation register, word-parallel compare, and the
// response registers R, G, L with the match detector MD.
//
// The interrogation register I is kept in dual rail (i_t, i_f), built from a
// comparand C and a mask M as in the source's Table I: unmasked bit c -> (c, ~c),
// masked bit -> (0, 0), so a masked bit matches anything.
//
// Each word is compared with I in every bit at once. The mismatch at bit j of word
// i is (I_j & ~w_ij) | (~I_j & w_ij); a word mismatches if any bit does. The
// enable bit ER_i is treated as an extra column 0 whose interrogation bit I_0 is
// 1 during a compare, so a disabled word never responds:
//   R_i = ~(mismatch_i | ~ER_i)
// Because the selection unit blanks disabled slices on both rails, only the
// enabled slices count. For the bit-serial magnitude search, with one slice j
// enabled:
//   G_i |= ER_i & ~I_j & w_ij   (word greater than I)
//   L_i |= ER_i &  I_j & ~w_ij  (word less than I)
// G and L only ever get set by a compare; they are cleared by a route (OP_VMOV
// with source ZEROS). MD is the OR of all R bits and is refreshed every time R
// is written.
//
// Commands (all take effect at the rising clock edge):
//   ldi_we          load I from (ldi_c, ldi_m)
//   eqs             equivalence compare: R, MD
//   ths             magnitude compare:  R, MD, G, L
//   r_we/g_we/l_we  R/G/L <= fn(old, route_in)
// The compare equations, I0 trick and the G/L terms follow the source design;
// keeping G and L as set-only latches between compares is this design's reading
// of the source's worked example, in which a word once marked greater or less
// stays marked.
module ocapp_match_compare
  import ocapp_pkg::*;
#(
  parameter int unsigned N_WORDS   = N_WORDS_DEF,
  parameter int unsigned WORD_BITS = WORD_BITS_DEF
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic                               ldi_we,
  input  logic [WORD_BITS-1:0]               ldi_c,
  input  logic [WORD_BITS-1:0]               ldi_m,
  input  logic                               eqs,
  input  logic                               ths,
  input  logic                               r_we,
  input  logic                               g_we,
  input  logic                               l_we,
  input  logic [1:0]                         fn,
  input  logic [N_WORDS-1:0]                 route_in,
  input  logic [N_WORDS-1:0][WORD_BITS-1:0]  w_t,
  input  logic [N_WORDS-1:0][WORD_BITS-1:0]  w_f,
  input  logic [N_WORDS-1:0]                 er,
  output logic [WORD_BITS-1:0]               i_t,
  output logic [WORD_BITS-1:0]               i_f,
  output logic [N_WORDS-1:0]                 r,
  output logic [N_WORDS-1:0]                 g,
  output logic [N_WORDS-1:0]                 l,
  output logic                               md
);

  function automatic logic [N_WORDS-1:0] combine(input logic [1:0] f,
      input logic [N_WORDS-1:0] d, input logic [N_WORDS-1:0] s);
    unique case (f)
      FN_COPY: return s;
      FN_AND:  return d & s;
      FN_ANDN: return d & ~s;
      default: return d | s;
    endcase
  endfunction

  // Extra interrogation bit for the ER column, 1 during a compare.
  localparam logic I0 = 1'b1;

  logic [N_WORDS-1:0] r_cmp, g_term, l_term, r_next;

  always_comb begin
    for (int i = 0; i < int'(N_WORDS); i++) begin
      logic mismatch, er_term;
      mismatch  = |((i_t & w_f[i]) | (i_f & w_t[i]));
      er_term   = (I0 & ~er[i]) | (~I0 & er[i]);
      r_cmp[i]  = ~(mismatch | er_term);
      g_term[i] = er[i] & |(i_f & w_t[i]);
      l_term[i] = er[i] & |(i_t & w_f[i]);
    end
  end

  always_comb begin
    r_next = r;
    if (eqs || ths) r_next = r_cmp;
    else if (r_we)  r_next = combine(fn, r, route_in);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      i_t <= '0;
      i_f <= '0;
      r   <= '0;
      g   <= '0;
      l   <= '0;
      md  <= 1'b0;
    end else begin
      if (ldi_we) begin
        i_t <= ldi_c & ~ldi_m;
        i_f <= ~ldi_c & ~ldi_m;
      end
      if (eqs || ths || r_we) begin
        r  <= r_next;
        md <= |r_next;
      end
      if (ths)       g <= g | g_term;
      else if (g_we) g <= combine(fn, g, route_in);
      if (ths)       l <= l | l_term;
      else if (l_we) l <= combine(fn, l, route_in);
    end
  end

  a_one_compare: assert property (@(posedge clk) disable iff (!rst_n) !(eqs && ths));

endmodule
