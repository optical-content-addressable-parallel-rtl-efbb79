// ocapp_multi_match: multiple-interrogation match-compare unit.
//
// Extends the match-compare unit from one interrogation register to K_ARGS of
// them, so K_ARGS search arguments are compared with every stored word in the
// same step. Response register k, resp[k], flags the enabled words equal to
// argument k in all unmasked bits (a binary matrix-matrix product of the
// argument array with the storage array). Each argument is held in dual rail,
// built from comparand and mask as in the single unit.
//
// Interface: arg_we loads argument arg_idx from (arg_c, arg_m); cmp computes all
// K_ARGS response registers at the rising clock edge; any_md[k] is the match
// detector of argument k (OR of resp[k]), registered with resp. The mismatch and
// enable equations follow the source; K_ARGS is not given there (default 4 is
// this design's choice).
module ocapp_multi_match
  import ocapp_pkg::*;
#(
  parameter int unsigned N_WORDS   = N_WORDS_DEF,
  parameter int unsigned WORD_BITS = WORD_BITS_DEF,
  parameter int unsigned K_ARGS    = 4
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic                               arg_we,
  input  logic [$clog2(K_ARGS)-1:0]          arg_idx,
  input  logic [WORD_BITS-1:0]               arg_c,
  input  logic [WORD_BITS-1:0]               arg_m,
  input  logic                               cmp,
  input  logic [N_WORDS-1:0][WORD_BITS-1:0]  words,
  input  logic [N_WORDS-1:0]                 er,
  output logic [K_ARGS-1:0][N_WORDS-1:0]     resp,
  output logic [K_ARGS-1:0]                  any_md
);

  logic [K_ARGS-1:0][WORD_BITS-1:0] a_t, a_f;
  logic [K_ARGS-1:0][N_WORDS-1:0]   resp_next;

  always_comb begin
    for (int k = 0; k < int'(K_ARGS); k++) begin
      for (int i = 0; i < int'(N_WORDS); i++) begin
        resp_next[k][i] = er[i] & ~|((a_t[k] & ~words[i]) | (a_f[k] & words[i]));
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_t    <= '0;
      a_f    <= '0;
      resp   <= '0;
      any_md <= '0;
    end else begin
      if (arg_we) begin
        a_t[arg_idx] <= arg_c & ~arg_m;
        a_f[arg_idx] <= ~arg_c & ~arg_m;
      end
      if (cmp) begin
        resp <= resp_next;
        for (int k = 0; k < int'(K_ARGS); k++) any_md[k] <= |resp_next[k];
      end
    end
  end

endmodule
