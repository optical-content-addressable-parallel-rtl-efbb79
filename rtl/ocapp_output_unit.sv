// ocapp_output_unit: single-word output and parallel readout.
//
// Single word: on out_strobe the word selected by the priority register P is
// multiplexed out, O_j = OR_i (P_i & w_ij), into the output register o_word,
// and o_valid pulses for one cycle. With P one-hot this is the selected word;
// with P zero it is zero.
// Parallel readout: register T (one bit per word, loaded by a route from R, G,
// L, P, ER or SR) gates the stored words, page_out[i] = T_i ? word_i : 0, so all
// flagged words are available at once.
//
// Timing: o_word and o_valid are registered (one cycle after out_strobe);
// page_out is combinational from T and the array. The multiplexing equation and
// the T-gated page follow the source; registering the single-word output is
// this design's choice.
module ocapp_output_unit
  import ocapp_pkg::*;
#(
  parameter int unsigned N_WORDS   = N_WORDS_DEF,
  parameter int unsigned WORD_BITS = WORD_BITS_DEF
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic                               out_strobe,
  input  logic [N_WORDS-1:0]                 p,
  input  logic [N_WORDS-1:0][WORD_BITS-1:0]  words,
  input  logic                               t_we,
  input  logic [1:0]                         fn,
  input  logic [N_WORDS-1:0]                 route_in,
  output logic [WORD_BITS-1:0]               o_word,
  output logic                               o_valid,
  output logic [N_WORDS-1:0]                 t,
  output logic [N_WORDS-1:0][WORD_BITS-1:0]  page_out
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

  logic [WORD_BITS-1:0] o_mux;

  always_comb begin
    o_mux = '0;
    for (int i = 0; i < int'(N_WORDS); i++) begin
      o_mux |= words[i] & {WORD_BITS{p[i]}};
    end
  end

  always_comb begin
    for (int i = 0; i < int'(N_WORDS); i++) begin
      page_out[i] = words[i] & {WORD_BITS{t[i]}};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      o_word  <= '0;
      o_valid <= 1'b0;
      t       <= '0;
    end else begin
      o_valid <= out_strobe;
      if (out_strobe) o_word <= o_mux;
      if (t_we)       t <= combine(fn, t, route_in);
    end
  end

endmodule
