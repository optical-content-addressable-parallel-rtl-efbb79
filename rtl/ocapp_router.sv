// ocapp_router: dynamic routing between the processor's one-bit-per-word
// registers.
//
// Selects which register - R, G, L (match-compare unit), P (response unit), ER
// or SR (selection unit), or a constant all-ones / all-zeros vector - is driven
// onto the route bus that feeds the destination registers ER, SR, R, G, L and T.
// The destination then combines it with its own contents (copy, and, and-not,
// or). Purely combinational. The source names the routing of R, G, L and P to
// the selection, response and output units as a required operation; the single
// shared bus with constant sources is this design's choice.
module ocapp_router
  import ocapp_pkg::*;
#(
  parameter int unsigned N_WORDS = N_WORDS_DEF
) (
  input  src_e               src,
  input  logic [N_WORDS-1:0] r,
  input  logic [N_WORDS-1:0] g,
  input  logic [N_WORDS-1:0] l,
  input  logic [N_WORDS-1:0] p,
  input  logic [N_WORDS-1:0] er,
  input  logic [N_WORDS-1:0] sr,
  output logic [N_WORDS-1:0] route
);

  always_comb begin
    unique case (src)
      SRC_R:    route = r;
      SRC_G:    route = g;
      SRC_L:    route = l;
      SRC_P:    route = p;
      SRC_ER:   route = er;
      SRC_SR:   route = sr;
      SRC_ONES: route = '1;
      default:  route = '0;
    endcase
  end

endmodule
