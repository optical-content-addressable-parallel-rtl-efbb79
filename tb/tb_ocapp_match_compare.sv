// tb_ocapp_match_compare: checks the interrogation register coding, the word
// match R, the magnitude bits G and L, the ER gating and MD.
//
// Part 1 replays the source's worked threshold example: seven 5-bit words,
// search word 10110, one slice per step from the MSB, with the words whose R bit
// is 0 disabled after each step; R, G and L after every step must equal the
// table of that example. Part 2 drives random words, masks, enables and slice
// selections and compares with equations computed here.
module tb_ocapp_match_compare;
  import ocapp_pkg::*;

  localparam int N = 7;
  localparam int M = 5;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                ldi_we = 0, eqs = 0, ths = 0, r_we = 0, g_we = 0, l_we = 0;
  logic [M-1:0]        ldi_c = '0, ldi_m = '0;
  logic [1:0]          fn = '0;
  logic [N-1:0]        route_in = '0, er = '1;
  logic [N-1:0][M-1:0] w_t = '0, w_f = '0;
  logic [M-1:0]        i_t, i_f;
  logic [N-1:0]        r, g, l;
  logic                md;

  ocapp_match_compare #(.N_WORDS(N), .WORD_BITS(M)) dut (.*);

  int checks = 0, failures = 0;

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

  // words of the worked example, and the RGL state after each step
  logic [M-1:0] ex_w [N] = '{5'b10111, 5'b11000, 5'b10010, 5'b10110, 5'b10101, 5'b01101, 5'b11101};
  logic [2:0]   ex_rgl [N][M] = '{
    '{3'b100, 3'b100, 3'b100, 3'b100, 3'b010},
    '{3'b100, 3'b010, 3'b010, 3'b010, 3'b010},
    '{3'b100, 3'b100, 3'b001, 3'b001, 3'b001},
    '{3'b100, 3'b100, 3'b100, 3'b100, 3'b100},
    '{3'b100, 3'b100, 3'b100, 3'b001, 3'b001},
    '{3'b001, 3'b001, 3'b001, 3'b001, 3'b001},
    '{3'b100, 3'b010, 3'b010, 3'b010, 3'b010}};

  task automatic drive_slice(input logic [M-1:0] wv [N], input logic [M-1:0] en);
    for (int i = 0; i < N; i++) begin
      w_t[i] = wv[i] & en;
      w_f[i] = ~wv[i] & en;
    end
  endtask

  initial begin
    logic [M-1:0] wv [N];
    repeat (2) @(negedge clk);
    rst_n = 1;

    // ---- worked example ----
    ldi_we = 1; ldi_c = 5'b10110; ldi_m = '0;
    @(negedge clk) ldi_we = 0;
    check(i_t == 5'b10110 && i_f == 5'b01001, "I register dual rail");
    r_we = 1; g_we = 1; l_we = 1; fn = FN_COPY; route_in = '0;
    @(negedge clk) begin r_we = 0; g_we = 0; l_we = 0; end
    er = '1;
    for (int jj = 0; jj < M; jj++) begin
      logic [M-1:0] en;
      en = '0; en[M-1-jj] = 1'b1;
      drive_slice(ex_w, en);
      ths = 1;
      @(negedge clk) ths = 0;
      for (int i = 0; i < N; i++)
        check({r[i], g[i], l[i]} == ex_rgl[i][jj],
              $sformatf("example word %0d step %0d: RGL %b%b%b expected %b", i + 1, jj + 1,
                        r[i], g[i], l[i], ex_rgl[i][jj]));
      check(md == |r, "example MD");
      er = er & r;   // disable the words that have been decided
    end

    // ---- random ----
    for (int t = 0; t < 400; t++) begin
      logic [M-1:0] c, m, en, it, if_;
      logic [N-1:0] exp_r, g0, l0, exp_g, exp_l;
      c = M'($urandom); m = ($urandom_range(3) == 0) ? M'($urandom) : '0;
      ldi_we = 1; ldi_c = c; ldi_m = m;
      @(negedge clk) ldi_we = 0;
      it = c & ~m; if_ = ~c & ~m;
      check(i_t == it && i_f == if_, "I coding (Table I)");
      for (int i = 0; i < N; i++) wv[i] = M'($urandom);
      en = ($urandom_range(1) == 0) ? '1 : (M'(1) << $urandom_range(M-1));
      drive_slice(wv, en);
      er = N'($urandom);
      g0 = g; l0 = l;
      for (int i = 0; i < N; i++) begin
        exp_r[i] = er[i] && (((wv[i] ^ c) & ~m & en) == '0);
        exp_g[i] = g0[i] | (er[i] & |(if_ & wv[i] & en));
        exp_l[i] = l0[i] | (er[i] & |(it & ~wv[i] & en));
      end
      if ($urandom_range(1) != 0) begin
        ths = 1;
        @(negedge clk) ths = 0;
        check(g == exp_g && l == exp_l, "random G/L");
      end else begin
        eqs = 1;
        @(negedge clk) eqs = 0;
        check(g == g0 && l == l0, "EQS leaves G/L");
      end
      check(r == exp_r, $sformatf("random R %b vs %b", r, exp_r));
      check(md == |exp_r, "random MD");
      // a route into R, G or L
      route_in = N'($urandom); fn = 2'($urandom_range(3));
      case ($urandom_range(2))
        0: begin
          logic [N-1:0] e;
          case (fn) 0: e = route_in; 1: e = r & route_in; 2: e = r & ~route_in; default: e = r | route_in; endcase
          r_we = 1; @(negedge clk) r_we = 0;
          check(r == e && md == |e, "route into R");
        end
        1: begin
          logic [N-1:0] e;
          case (fn) 0: e = route_in; 1: e = g & route_in; 2: e = g & ~route_in; default: e = g | route_in; endcase
          g_we = 1; @(negedge clk) g_we = 0;
          check(g == e, "route into G");
        end
        default: begin
          logic [N-1:0] e;
          case (fn) 0: e = route_in; 1: e = l & route_in; 2: e = l & ~route_in; default: e = l | route_in; endcase
          l_we = 1; @(negedge clk) l_we = 0;
          check(l == e, "route into L");
        end
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
