// ocapp_selection_unit: storage array, enable register and bit-slice selection.
//
// Holds N_WORDS words of WORD_BITS bits (one storage cell per bit) and the enable
// register ER, which is column 0 of the array: word i takes part in a compare
// only while ER[i] = 1. The unit hands the match-compare unit every word in
// dual-rail form, a true rail w_t and a complement rail w_f. Bit slices that are
// not enabled put out 0 on both rails, so they cannot cause a mismatch: that is
// how a single slice is scanned in the bit-serial searches.
//
// Writing:
//   page_we       loads the whole array in parallel (the initial load).
//   a_we / b_we   load register A (one bit per word) and register B (one bit per
//                 slice), the two electrically written registers of the unit.
//   wr_word       each word whose A bit is 1 takes the value of B.
//   wr_slice      each slice whose B bit is 1 takes, in every word i, the value A[i]
//                 (the roles of A and B swapped).
//   er_we         ER <= fn(ER, route_in): set all, clear all, or set/reset selected
//                 words, from the routed R, G, L, P or SR register.
//   sr_we         SR <= fn(SR, route_in). SR is the one-bit-per-word register that
//                 drives ER's set and reset inputs; here it also serves as a place
//                 to keep a set of words across a search.
// All writes take effect at the rising clock edge; the outputs are the register
// contents gated by the current slice selection (combinational).
//
// Bit numbering: word bit WORD_BITS-1 is the most significant bit; slice j
// (j = 0 first) is bit WORD_BITS-1-j, so the scan from j = 0 runs MSB to LSB as
// in the source algorithms. Word-write and slice-write through A and B, ER as
// column 0, and the SR register follow the source design; the fn encoding of the
// register updates, reset to "all words enabled, array cleared", and SR as a save
// register are this design's choices.
module ocapp_selection_unit
  import ocapp_pkg::*;
#(
  parameter int unsigned N_WORDS   = N_WORDS_DEF,
  parameter int unsigned WORD_BITS = WORD_BITS_DEF
) (
  input  logic                                clk,
  input  logic                                rst_n,
  // parallel page load
  input  logic                                page_we,
  input  logic [N_WORDS-1:0][WORD_BITS-1:0]   page_data,
  // A and B registers
  input  logic                                a_we,
  input  logic [N_WORDS-1:0]                  a_data,
  input  logic                                b_we,
  input  logic [WORD_BITS-1:0]                b_data,
  input  logic                                wr_word,
  input  logic                                wr_slice,
  // enable and SR register updates
  input  logic                                er_we,
  input  logic                                sr_we,
  input  logic [1:0]                          fn,
  input  logic [N_WORDS-1:0]                  route_in,
  // bit-slice selection
  input  slice_e                              slice_sel,
  input  logic [IMM_W-1:0]                    j,
  // outputs
  output logic [N_WORDS-1:0][WORD_BITS-1:0]   words,   // stored words, ungated
  output logic [N_WORDS-1:0][WORD_BITS-1:0]   w_t,     // true rail, slice-gated
  output logic [N_WORDS-1:0][WORD_BITS-1:0]   w_f,     // complement rail, slice-gated
  output logic [N_WORDS-1:0]                  er,
  output logic [N_WORDS-1:0]                  sr,
  output logic [N_WORDS-1:0]                  a_reg,
  output logic [WORD_BITS-1:0]                b_reg
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

  logic [N_WORDS-1:0][WORD_BITS-1:0] mem_q;
  logic [WORD_BITS-1:0]              slice_en;

  // Storage array: page load, word write (rows chosen by A), slice write
  // (columns chosen by B).
  for (genvar i = 0; i < int'(N_WORDS); i++) begin : g_row
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        mem_q[i] <= '0;
      end else if (page_we) begin
        mem_q[i] <= page_data[i];
      end else if (wr_word && a_reg[i]) begin
        mem_q[i] <= b_reg;
      end else if (wr_slice) begin
        mem_q[i] <= (mem_q[i] & ~b_reg) | ({WORD_BITS{a_reg[i]}} & b_reg);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_reg <= '0;
      b_reg <= '0;
      er    <= '1;
      sr    <= '0;
    end else begin
      if (a_we)  a_reg <= a_data;
      if (b_we)  b_reg <= b_data;
      if (er_we) er    <= combine(fn, er, route_in);
      if (sr_we) sr    <= combine(fn, sr, route_in);
    end
  end

  // Bit-slice enable logic.
  always_comb begin
    slice_en = '0;
    unique case (slice_sel)
      SL_ALL:  slice_en = '1;
      SL_J:    if (32'(j) < WORD_BITS) slice_en[WORD_BITS-1-32'(j)] = 1'b1;
      default: slice_en = '0;
    endcase
  end

  always_comb begin
    for (int i = 0; i < int'(N_WORDS); i++) begin
      w_t[i] = mem_q[i] & slice_en;
      w_f[i] = ~mem_q[i] & slice_en;
    end
  end

  assign words = mem_q;

  // Writing a word and a slice in the same cycle is not a defined operation.
  a_no_double_write: assert property (@(posedge clk) disable iff (!rst_n) !(wr_word && wr_slice));

endmodule
