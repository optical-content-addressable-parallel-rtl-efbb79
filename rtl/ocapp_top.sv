// ocapp_top: content-addressable parallel processor (OCAPP).
//
// An associative processor: N_WORDS words are searched by content, all at once,
// instead of one address at a time. The five units are
//   selection unit     storage array, enable register ER, A/B write registers, SR
//   match-compare unit interrogation register I, R/G/L registers, match detector MD
//   response unit      priority circuit and priority register P
//   output unit        single-word output by P, parallel readout gated by T
//   control unit       program memory and sequencer
// joined by a routing bus (ocapp_router) that carries any one-bit-per-word
// register (R, G, L, P, ER, SR, all ones, all zeros) into ER, SR, R, G, L or T.
// A multiple-interrogation match unit compares K_ARGS further arguments with
// the same storage array in one step; it is driven directly from the host ports.
//
// Use: load the array (page_we), the program (prog_we) and the comparand/mask
// operands (opnd_we), pulse start, and wait for done. Searches are programs:
// equivalence, threshold (bit-serial, MSB first, with early exit on MD = 0),
// maximum/minimum, between/outside limits, next above/below and ordered
// retrieval, each built from the one-cycle instructions of ocapp_pkg. Results
// are visible on r, g, l, p, er and md, on the output word o_word/o_valid, and
// on the parallel readout page_out.
//
// The units also export, as ports, their A/B write registers, the dual-rail I
// register and the any-responder flag. These serve unit-level testing. The top
// connects them to local signals but reads none, so lint reports them unused.
//
// All state is clocked on the rising edge of clk with an asynchronous
// active-low reset. The architecture and its algorithms follow the source
// design; it is an optical machine there, and here every cell array is plain
// synchronous logic with one instruction per clock cycle.
module ocapp_top
  import ocapp_pkg::*;
#(
  parameter int unsigned N_WORDS   = N_WORDS_DEF,
  parameter int unsigned WORD_BITS = WORD_BITS_DEF,
  parameter int unsigned DEPTH     = PROG_DEPTH,
  parameter int unsigned NOPND     = N_OPERANDS,
  parameter int unsigned K_ARGS    = 4
) (
  input  logic                               clk,
  input  logic                               rst_n,
  // storage array load and A/B registers
  input  logic                               page_we,
  input  logic [N_WORDS-1:0][WORD_BITS-1:0]  page_data,
  input  logic                               a_we,
  input  logic [N_WORDS-1:0]                 a_data,
  input  logic                               b_we,
  input  logic [WORD_BITS-1:0]               b_data,
  // program and operand memories
  input  logic                               prog_we,
  input  logic [$clog2(DEPTH)-1:0]           prog_addr,
  input  instr_t                             prog_data,
  input  logic                               opnd_we,
  input  logic [$clog2(NOPND)-1:0]           opnd_addr,
  input  logic [WORD_BITS-1:0]               opnd_c,
  input  logic [WORD_BITS-1:0]               opnd_m,
  input  logic                               start,
  output logic                               busy,
  output logic                               done,
  // register views
  output logic [N_WORDS-1:0]                 r,
  output logic [N_WORDS-1:0]                 g,
  output logic [N_WORDS-1:0]                 l,
  output logic [N_WORDS-1:0]                 p,
  output logic [N_WORDS-1:0]                 er,
  output logic                               md,
  output logic [IMM_W-1:0]                   j,
  output logic [N_WORDS-1:0]                 t,
  output logic [$clog2(DEPTH)-1:0]           pc,
  // output unit
  output logic [WORD_BITS-1:0]               o_word,
  output logic                               o_valid,
  output logic [N_WORDS-1:0][WORD_BITS-1:0]  page_out,
  // multiple-interrogation match unit
  input  logic                               mm_arg_we,
  input  logic [$clog2(K_ARGS)-1:0]          mm_arg_idx,
  input  logic [WORD_BITS-1:0]               mm_arg_c,
  input  logic [WORD_BITS-1:0]               mm_arg_m,
  input  logic                               mm_cmp,
  output logic [K_ARGS-1:0][N_WORDS-1:0]     mm_resp,
  output logic [K_ARGS-1:0]                  mm_md
);

  logic [N_WORDS-1:0][WORD_BITS-1:0] words, w_t, w_f;
  logic [N_WORDS-1:0]                sr, route;
  logic [N_WORDS-1:0]                a_reg;
  logic [WORD_BITS-1:0]              b_reg;
  logic [WORD_BITS-1:0]              ldi_c, ldi_m, i_t, i_f;
  logic                              ldi_we, eqs, ths, er_we, sr_we, r_we, g_we, l_we, t_we;
  logic                              pri, out_strobe, wr_word, wr_slice, any_resp;
  logic [1:0]                        fn;
  slice_e                            slice_sel;
  src_e                              route_src;

  ocapp_control_unit #(.WORD_BITS(WORD_BITS), .DEPTH(DEPTH), .NOPND(NOPND)) u_ctrl (
    .clk, .rst_n,
    .prog_we, .prog_addr, .prog_data,
    .opnd_we, .opnd_addr, .opnd_c, .opnd_m,
    .start, .busy, .done, .pc,
    .md,
    .ldi_we, .ldi_c, .ldi_m, .eqs, .ths, .slice_sel, .j,
    .route_src, .fn, .er_we, .sr_we, .r_we, .g_we, .l_we, .t_we,
    .pri, .out_strobe, .wr_word, .wr_slice
  );

  ocapp_router #(.N_WORDS(N_WORDS)) u_router (
    .src(route_src), .r, .g, .l, .p, .er, .sr, .route
  );

  ocapp_selection_unit #(.N_WORDS(N_WORDS), .WORD_BITS(WORD_BITS)) u_sel (
    .clk, .rst_n,
    .page_we, .page_data,
    .a_we, .a_data, .b_we, .b_data, .wr_word, .wr_slice,
    .er_we, .sr_we, .fn, .route_in(route),
    .slice_sel, .j,
    .words, .w_t, .w_f, .er, .sr, .a_reg, .b_reg
  );

  ocapp_match_compare #(.N_WORDS(N_WORDS), .WORD_BITS(WORD_BITS)) u_mc (
    .clk, .rst_n,
    .ldi_we, .ldi_c, .ldi_m, .eqs, .ths,
    .r_we, .g_we, .l_we, .fn, .route_in(route),
    .w_t, .w_f, .er,
    .i_t, .i_f, .r, .g, .l, .md
  );

  ocapp_response_unit #(.N_WORDS(N_WORDS)) u_resp (
    .clk, .rst_n, .pri, .r, .p, .any_resp
  );

  ocapp_output_unit #(.N_WORDS(N_WORDS), .WORD_BITS(WORD_BITS)) u_out (
    .clk, .rst_n, .out_strobe, .p, .words,
    .t_we, .fn, .route_in(route),
    .o_word, .o_valid, .t, .page_out
  );

  ocapp_multi_match #(.N_WORDS(N_WORDS), .WORD_BITS(WORD_BITS), .K_ARGS(K_ARGS)) u_mm (
    .clk, .rst_n,
    .arg_we(mm_arg_we), .arg_idx(mm_arg_idx), .arg_c(mm_arg_c), .arg_m(mm_arg_m),
    .cmp(mm_cmp), .words, .er,
    .resp(mm_resp), .any_md(mm_md)
  );

endmodule
