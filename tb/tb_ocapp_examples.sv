// tb_ocapp_examples: the two worked examples of the architecture, run through
// the whole processor (ocapp_top sized to 7 words of 5 bits).
//
// Threshold example: words 10111 11000 10010 10110 10101 01101 11101, search
// word 10110, no mask. After every bit-slice iteration the R/G/L state of each
// word must match the published table (e.g. word 1 ends 010 = greater, word 4
// ends 100 = equal), and the search must take exactly 5 slice compares.
// Maximum example: words 11000 11100 10001 11110 11001 (plus two zero words);
// the candidate set after every iteration must match the published table and
// the maximum 11110 must end flagged in R; 5 slice compares.
module tb_ocapp_examples;
  import ocapp_pkg::*;
  import ocapp_prog_pkg::*;

  localparam int N  = 7;
  localparam int M  = 5;
  localparam int AW = $clog2(PROG_DEPTH);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                page_we = 0, prog_we = 0, opnd_we = 0, start = 0;
  logic [N-1:0][M-1:0] page_data = '0;
  logic [AW-1:0]       prog_addr = '0;
  instr_t              prog_data = '0;
  logic [1:0]          opnd_addr = '0;
  logic [M-1:0]        opnd_c = '0, opnd_m = '0;
  logic                busy, done, md, o_valid;
  logic [N-1:0]        r, g, l, p, er;
  logic [IMM_W-1:0]    j;
  logic [M-1:0]        o_word;
  logic [N-1:0][M-1:0] page_out;
  logic [3:0][N-1:0]   mm_resp;
  logic [3:0]          mm_md;

  ocapp_top #(.N_WORDS(N), .WORD_BITS(M)) dut (
    .clk, .rst_n, .page_we, .page_data, .a_we(1'b0), .a_data('0), .b_we(1'b0), .b_data('0),
    .prog_we, .prog_addr, .prog_data, .opnd_we, .opnd_addr, .opnd_c, .opnd_m,
    .start, .busy, .done, .r, .g, .l, .p, .er, .md, .j, .t(), .pc(),
    .o_word, .o_valid, .page_out,
    .mm_arg_we(1'b0), .mm_arg_idx('0), .mm_arg_c('0), .mm_arg_m('0), .mm_cmp(1'b0),
    .mm_resp, .mm_md
  );

  int checks = 0, failures = 0;
  prog_t prog;
  int iter = 0, n_cmp = 0;
  logic [2:0] rgl_trace [N][M];
  logic       er_trace [N][M];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Sample the state at the end of every slice iteration (the loop instruction).
  always @(posedge clk) begin
    if (busy && (dut.u_ctrl.eqs || dut.u_ctrl.ths) && dut.u_ctrl.slice_sel == SL_J) n_cmp++;
    if (busy && dut.u_ctrl.ir.op == OP_LOOPJ && iter < M) begin
      for (int i = 0; i < N; i++) begin
        rgl_trace[i][iter] = {r[i], g[i], l[i]};
        er_trace[i][iter]  = er[i];
      end
      iter++;
    end
  end

  task automatic load_and_run(input logic [M-1:0] w [N]);
    @(negedge clk);
    page_we = 1;
    for (int i = 0; i < N; i++) page_data[i] = w[i];
    @(negedge clk) page_we = 0;
    for (int a = 0; a < int'(PROG_DEPTH); a++) begin
      @(negedge clk);
      prog_we = 1; prog_addr = AW'(a); prog_data = prog[a];
    end
    @(negedge clk) prog_we = 0;
    iter = 0; n_cmp = 0;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    while (!done) @(negedge clk);
  endtask

  initial begin
    static logic [M-1:0] ex2 [N] = '{5'b10111, 5'b11000, 5'b10010, 5'b10110, 5'b10101, 5'b01101, 5'b11101};
    static logic [2:0]   tab2 [N][M] = '{
      '{3'b100, 3'b100, 3'b100, 3'b100, 3'b010},
      '{3'b100, 3'b010, 3'b010, 3'b010, 3'b010},
      '{3'b100, 3'b100, 3'b001, 3'b001, 3'b001},
      '{3'b100, 3'b100, 3'b100, 3'b100, 3'b100},
      '{3'b100, 3'b100, 3'b100, 3'b001, 3'b001},
      '{3'b001, 3'b001, 3'b001, 3'b001, 3'b001},
      '{3'b100, 3'b010, 3'b010, 3'b010, 3'b010}};
    static logic [M-1:0] ex3 [N] = '{5'b11000, 5'b11100, 5'b10001, 5'b11110, 5'b11001, 5'b00000, 5'b00000};
    static logic         tab3 [5][M] = '{
      '{1, 1, 0, 0, 0},
      '{1, 1, 1, 0, 0},
      '{1, 0, 0, 0, 0},
      '{1, 1, 1, 1, 1},
      '{1, 1, 0, 0, 0}};

    repeat (2) @(negedge clk);
    rst_n = 1;

    // threshold example
    @(negedge clk);
    opnd_we = 1; opnd_addr = 0; opnd_c = 5'b10110; opnd_m = '0;
    @(negedge clk) opnd_we = 0;
    prog_threshold(prog);
    load_and_run(ex2);
    check(iter == M, $sformatf("threshold iterations %0d", iter));
    check(n_cmp == M, $sformatf("threshold slice compares %0d", n_cmp));
    for (int i = 0; i < N; i++)
      for (int s = 0; s < M; s++)
        check(rgl_trace[i][s] == tab2[i][s],
              $sformatf("threshold word %0d j=%0d RGL %b expected %b", i + 1, s + 1, rgl_trace[i][s], tab2[i][s]));

    // maximum example
    prog_extremum(prog, 1'b1);
    load_and_run(ex3);
    check(iter == M, $sformatf("maximum iterations %0d", iter));
    check(n_cmp == M, $sformatf("maximum slice compares %0d", n_cmp));
    for (int i = 0; i < 5; i++)
      for (int s = 0; s < M; s++)
        check(er_trace[i][s] == tab3[i][s],
              $sformatf("maximum word %0d j=%0d candidate %b expected %b", i + 1, s + 1, er_trace[i][s], tab3[i][s]));
    check(r == 7'b0001000, $sformatf("maximum flagged in R: %b", r));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
