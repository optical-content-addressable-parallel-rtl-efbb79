// tb_ocapp_top: end-to-end test of the whole processor at its default size
// (256 words of 127 bits).
//
// Loads a page of words drawn from a small pool of random values (so that equal
// words, multiple responders and full-length scans occur), then runs every
// search program of ocapp_prog_pkg and checks the result registers and the
// output stream against a reference model computed here from the same data:
// masked equivalence, threshold (comparand present and absent), maximum,
// minimum, not equal, not greater, not smaller, between and outside limits
// (each with every combination of strict and inclusive bounds), next above,
// next below, ascending and descending ordered retrieval, word write and slice
// write through A and B, parallel readout through T, and the multiple
// interrogation unit. It also checks the step counts the architecture promises:
// an equivalence search takes a fixed number of cycles whatever the data, a
// threshold search makes as many slice compares as the reference scan needs
// (early exit on MD = 0), and an extremum search makes exactly WORD_BITS; the
// cycle counts from start to done match the formulas of each program (e.g.
// 3 for equivalence, 4m + 7 for a full threshold scan).
// Each mechanism is counted and must occur at least once.
module tb_ocapp_top;
  import ocapp_pkg::*;
  import ocapp_prog_pkg::*;

  localparam int N  = N_WORDS_DEF;
  localparam int M  = WORD_BITS_DEF;
  localparam int K  = 4;
  localparam int AW = $clog2(PROG_DEPTH);
  localparam int POOL = 40;

  typedef logic [M-1:0] word_t;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                  page_we = 0, a_we = 0, b_we = 0, prog_we = 0, opnd_we = 0, start = 0;
  logic [N-1:0][M-1:0]   page_data;
  logic [N-1:0]          a_data = '0;
  logic [M-1:0]          b_data = '0;
  logic [AW-1:0]         prog_addr = '0;
  instr_t                prog_data = '0;
  logic [1:0]            opnd_addr = '0;
  logic [M-1:0]          opnd_c = '0, opnd_m = '0;
  logic                  busy, done, md, o_valid;
  logic [N-1:0]          r, g, l, p, er;
  logic [IMM_W-1:0]      j;
  logic [M-1:0]          o_word;
  logic [N-1:0][M-1:0]   page_out;
  logic [N-1:0]          t;
  logic                  mm_arg_we = 0, mm_cmp = 0;
  logic [1:0]            mm_arg_idx = '0;
  logic [M-1:0]          mm_arg_c = '0, mm_arg_m = '0;
  logic [K-1:0][N-1:0]   mm_resp;
  logic [K-1:0]          mm_md;

  ocapp_top dut (
    .clk, .rst_n, .page_we, .page_data, .a_we, .a_data, .b_we, .b_data,
    .prog_we, .prog_addr, .prog_data, .opnd_we, .opnd_addr, .opnd_c, .opnd_m,
    .start, .busy, .done, .r, .g, .l, .p, .er, .md, .j, .t, .pc(),
    .o_word, .o_valid, .page_out,
    .mm_arg_we, .mm_arg_idx, .mm_arg_c, .mm_arg_m, .mm_cmp, .mm_resp, .mm_md
  );

  int checks = 0, failures = 0;
  word_t mem [N];
  word_t pool [POOL];
  prog_t prog;
  word_t outs [$];
  int    n_eqs = 0, n_ths = 0, cycles = 0;

  // mechanism counters
  int cnt_early_exit = 0, cnt_full_scan = 0, cnt_skip_slice = 0, cnt_multi_resp = 0,
      cnt_disable = 0, cnt_word_write = 0, cnt_slice_write = 0, cnt_readout = 0,
      cnt_output = 0, cnt_masked = 0, cnt_multi_match = 0, cnt_route_sr = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // watchdog
  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // collect output words and count events while programs run
  always @(posedge clk) begin
    if (o_valid) outs.push_back(o_word);
    if (dut.busy) begin
      cycles++;
      if (dut.u_ctrl.eqs) n_eqs++;
      if (dut.u_ctrl.ths) n_ths++;
      if (dut.u_ctrl.ir.op == OP_BMD0 && !md) begin
        if (dut.u_ctrl.ir.imm == IMM_W'(dut.u_ctrl.pc + 2)) cnt_skip_slice++;
      end
      if (dut.u_ctrl.pri && $countones(r) > 1) cnt_multi_resp++;
      if (dut.u_ctrl.er_we && dut.u_ctrl.fn != FN_COPY && (er & ~dut.route) != '0) cnt_disable++;
      if (dut.u_ctrl.wr_word) cnt_word_write++;
      if (dut.u_ctrl.wr_slice) cnt_slice_write++;
      if (dut.u_ctrl.out_strobe) cnt_output++;
      if (dut.u_ctrl.sr_we) cnt_route_sr++;
    end
  end

  task automatic load_prog();
    for (int a = 0; a < int'(PROG_DEPTH); a++) begin
      @(negedge clk);
      prog_we = 1; prog_addr = AW'(a); prog_data = prog[a];
    end
    @(negedge clk) prog_we = 0;
  endtask

  task automatic set_opnd(input int slot, input word_t c, input word_t m);
    @(negedge clk);
    opnd_we = 1; opnd_addr = 2'(slot); opnd_c = c; opnd_m = m;
    @(negedge clk) opnd_we = 0;
  endtask

  task automatic run();
    n_eqs = 0; n_ths = 0; cycles = 0;
    outs.delete();
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    while (!done) @(negedge clk);
    @(negedge clk);
  endtask

  task automatic load_page();
    @(negedge clk);
    page_we = 1;
    for (int i = 0; i < N; i++) page_data[i] = mem[i];
    @(negedge clk) page_we = 0;
  endtask

  function automatic word_t rand_word();
    word_t w;
    for (int b = 0; b < M; b += 32) w = (w << 32) | word_t'($urandom);
    return w;
  endfunction

  // Reference: number of slice compares of the threshold search.
  function automatic int ref_thr_steps(word_t c, logic [N-1:0] en);
    for (int jj = 0; jj < M; jj++) begin
      bit any = 0;
      for (int i = 0; i < N; i++)
        if (en[i] && (mem[i] >> (M-1-jj)) == (c >> (M-1-jj))) any = 1;
      if (!any) return jj + 1;
    end
    return M;
  endfunction

  function automatic logic [N-1:0] vec_where(int kind, word_t x);
    logic [N-1:0] v;
    for (int i = 0; i < N; i++) begin
      unique case (kind)
        0: v[i] = mem[i] > x;
        1: v[i] = mem[i] < x;
        default: v[i] = mem[i] == x;
      endcase
    end
    return v;
  endfunction

  initial begin
    word_t c, m, hi, lo, best, sorted [$];
    logic [N-1:0] exp_v;
    int steps, eq_cycles;

    for (int i = 0; i < N; i++) page_data[i] = '0;
    for (int k = 0; k < POOL; k++) pool[k] = rand_word();
    for (int i = 0; i < N; i++) mem[i] = pool[$urandom_range(POOL-1)];

    repeat (3) @(negedge clk);
    rst_n = 1;
    load_page();

    // ---- equivalence search, exact and masked; constant time ----
    prog_equivalence(prog);
    load_prog();
    c = mem[$urandom_range(N-1)];
    set_opnd(0, c, '0);
    run();
    eq_cycles = cycles;
    check(eq_cycles == 3, $sformatf("equivalence cycles %0d", eq_cycles));
    check(r == vec_where(2, c), "equivalence R");
    check(md == 1'b1, "equivalence MD");
    // masked: only the top 16 bits take part
    m = {16'h0, {(M-16){1'b1}}};
    c = rand_word() & ~m | (mem[3] & m);
    c = (mem[5] & ~m) | (rand_word() & m);
    set_opnd(0, c, m);
    run();
    for (int i = 0; i < N; i++) exp_v[i] = ((mem[i] ^ c) & ~m) == '0;
    check(r == exp_v, "masked equivalence R");
    check(cycles == eq_cycles, "equivalence time independent of data");
    cnt_masked++;
    // absent value: MD = 0
    set_opnd(0, ~mem[0] ^ 1, '0);
    run();
    exp_v = '0;
    for (int i = 0; i < N; i++) exp_v[i] = mem[i] == (~mem[0] ^ 1);
    check(r == exp_v && md == |exp_v, "equivalence miss");

    // ---- threshold search ----
    prog_threshold(prog);
    load_prog();
    for (int it = 0; it < 4; it++) begin
      c = (it < 2) ? mem[$urandom_range(N-1)] : rand_word();
      set_opnd(0, c, '0);
      steps = ref_thr_steps(c, '1);
      run();
      check(g == vec_where(0, c), $sformatf("threshold G t=%0d", it));
      check(l == vec_where(1, c), $sformatf("threshold L t=%0d", it));
      check(r == vec_where(2, c), $sformatf("threshold R t=%0d", it));
      check(n_ths == steps, $sformatf("threshold slice steps %0d vs %0d", n_ths, steps));
      check(n_ths >= 1 && n_ths <= M, "threshold steps within 1..m");
      // cycles: 4m + 7 for a full scan that ends with an equal word, else the
      // early exit after compare number `steps`: 4 * steps + 5
      check(cycles == ((vec_where(2, c) != '0) ? 4 * M + 7 : 4 * steps + 5),
            $sformatf("threshold cycles %0d", cycles));
      if (steps < M) cnt_early_exit++; else cnt_full_scan++;
    end

    // ---- extremum searches ----
    for (int mx = 0; mx < 2; mx++) begin
      prog_extremum(prog, mx[0]);
      load_prog();
      run();
      best = mem[0];
      for (int i = 1; i < N; i++) if ((mx != 0) ? mem[i] > best : mem[i] < best) best = mem[i];
      check(r == vec_where(2, best), $sformatf("extremum max=%0d R", mx));
      check(n_eqs == M + 1, $sformatf("extremum slice steps %0d", n_eqs));
      check(cycles >= 3 * M + 5 && cycles <= 4 * M + 5, $sformatf("extremum cycles %0d", cycles));
    end

    // ---- between and outside limits ----
    begin
      word_t sv [$];
      for (int i = 0; i < N; i++) sv.push_back(mem[i]);
      sv.sort();
      lo = sv[N/4];
      hi = sv[(3*N)/4];
    end
    set_opnd(0, hi, '0);
    set_opnd(1, lo, '0);
    for (int v = 0; v < 4; v++) begin
      bit lo_inc, hi_inc;
      lo_inc = v[0];
      hi_inc = v[1];
      prog_between(prog, lo_inc, hi_inc);
      load_prog();
      run();
      for (int i = 0; i < N; i++)
        exp_v[i] = (lo_inc ? mem[i] >= lo : mem[i] > lo) && (hi_inc ? mem[i] <= hi : mem[i] < hi);
      check(g == exp_v, $sformatf("between lo_inc=%0d hi_inc=%0d G", lo_inc, hi_inc));
      for (int i = 0; i < N; i++)
        check(page_out[i] == (exp_v[i] ? mem[i] : '0), "between parallel readout");
      cnt_readout++;
      prog_outside(prog, lo_inc, hi_inc);
      load_prog();
      run();
      for (int i = 0; i < N; i++)
        exp_v[i] = (lo_inc ? mem[i] <= lo : mem[i] < lo) || (hi_inc ? mem[i] >= hi : mem[i] > hi);
      check(g == exp_v, $sformatf("outside lo_inc=%0d hi_inc=%0d G", lo_inc, hi_inc));
      check(t == exp_v, "outside T");
    end

    // ---- not equal, not greater, not smaller ----
    c = mem[$urandom_range(N-1)];
    set_opnd(0, c, '0);
    for (int rel = 0; rel < 3; rel++) begin
      prog_relation(prog, rel);
      load_prog();
      run();
      for (int i = 0; i < N; i++)
        exp_v[i] = (rel == 0) ? mem[i] != c : (rel == 1) ? mem[i] <= c : mem[i] >= c;
      check(t == exp_v, $sformatf("relation %0d T", rel));
    end

    // ---- adjacency ----
    for (int ab = 0; ab < 2; ab++) begin
      word_t nb;
      bit found;
      found = 0;
      nb = '0;
      c = mem[$urandom_range(N-1)];
      set_opnd(0, c, '0);
      prog_adjacent(prog, ab[0]);
      load_prog();
      run();
      for (int i = 0; i < N; i++)
        if ((ab != 0) ? mem[i] > c : mem[i] < c)
          if (!found || ((ab != 0) ? mem[i] < nb : mem[i] > nb)) begin nb = mem[i]; found = 1; end
      if (found) begin
        check(r == vec_where(2, nb), $sformatf("adjacent above=%0d R", ab));
        check(outs.size() == 1 && outs[0] == nb, "adjacent output word");
      end else begin
        check(r == '0, "adjacent none");
      end
    end

    // ---- ordered retrieval ----
    for (int d = 0; d < 2; d++) begin
      sorted.delete();
      for (int i = 0; i < N; i++) sorted.push_back(mem[i]);
      if (d != 0) sorted.rsort(); else sorted.sort();
      prog_sort(prog, d[0]);
      load_prog();
      run();
      check(outs.size() == N, $sformatf("sort d=%0d count %0d", d, outs.size()));
      for (int i = 0; i < N && i < outs.size(); i++)
        check(outs[i] == sorted[i], $sformatf("sort d=%0d item %0d", d, i));
      check(er == '0, "sort leaves no word enabled");
      check(cycles <= N * (4 * M + 10) + 5, $sformatf("sort cycles %0d", cycles));
    end

    // ---- word write and slice write through A and B ----
    @(negedge clk);
    a_we = 1; b_we = 1;
    for (int i = 0; i < N; i++) a_data[i] = ($urandom_range(7) == 0);
    b_data = rand_word();
    @(negedge clk) begin a_we = 0; b_we = 0; end
    for (int i = 0; i < N; i++) if (a_data[i]) mem[i] = b_data;
    prog_write_word(prog);
    load_prog();
    run();
    for (int i = 0; i < N; i++) check(page_out[i] == mem[i], "word write");
    @(negedge clk);
    a_we = 1; b_we = 1;
    for (int i = 0; i < N; i++) a_data[i] = 1'($urandom_range(1));
    b_data = '0;
    b_data[M-1] = 1'b1; b_data[7] = 1'b1; b_data[0] = 1'b1;
    @(negedge clk) begin a_we = 0; b_we = 0; end
    for (int i = 0; i < N; i++)
      for (int b = 0; b < M; b++) if (b_data[b]) mem[i][b] = a_data[i];
    prog_write_slice(prog);
    load_prog();
    run();
    for (int i = 0; i < N; i++) check(page_out[i] == mem[i], "slice write");
    // search still agrees with the model after the writes
    prog_threshold(prog);
    load_prog();
    c = mem[$urandom_range(N-1)];
    set_opnd(0, c, '0);
    run();
    check(g == vec_where(0, c) && l == vec_where(1, c), "threshold after writes");

    // ---- multiple interrogation unit (all words enabled) ----
    prog_enable_all(prog);
    load_prog();
    run();
    check(er == '1, "enable all");
    for (int k = 0; k < K; k++) begin
      @(negedge clk);
      mm_arg_we = 1; mm_arg_idx = 2'(k);
      mm_arg_c = (k == 3) ? rand_word() : mem[$urandom_range(N-1)];
      mm_arg_m = (k == 1) ? {8'h00, {(M-8){1'b1}}} : '0;
      @(negedge clk) mm_arg_we = 0;
      pool[k] = mm_arg_c;
      pool[K+k] = mm_arg_m;
    end
    @(negedge clk) mm_cmp = 1;
    @(negedge clk) mm_cmp = 0;
    for (int k = 0; k < K; k++) begin
      for (int i = 0; i < N; i++) exp_v[i] = er[i] && (((mem[i] ^ pool[k]) & ~pool[K+k]) == '0);
      check(mm_resp[k] == exp_v, $sformatf("multi-match resp %0d", k));
      check(mm_md[k] == |exp_v, $sformatf("multi-match md %0d", k));
      if (|exp_v) cnt_multi_match++;
    end

    // ---- every mechanism must have happened ----
    check(cnt_early_exit > 0,  "mechanism: threshold early exit on MD=0");
    check(cnt_full_scan > 0,   "mechanism: threshold full scan");
    check(cnt_skip_slice > 0,  "mechanism: extremum slice skipped on MD=0");
    check(cnt_multi_resp > 0,  "mechanism: priority among several responders");
    check(cnt_disable > 0,     "mechanism: word disabled through route");
    check(cnt_word_write > 0,  "mechanism: word write");
    check(cnt_slice_write > 0, "mechanism: slice write");
    check(cnt_readout > 0,     "mechanism: parallel readout");
    check(cnt_output > 0,      "mechanism: single-word output");
    check(cnt_masked > 0,      "mechanism: masked search");
    check(cnt_multi_match > 0, "mechanism: multiple interrogation");
    check(cnt_route_sr > 0,    "mechanism: SR register route");
    $display("mechanisms: early_exit=%0d full_scan=%0d skip_slice=%0d multi_resp=%0d disable=%0d wrw=%0d wrs=%0d readout=%0d output=%0d masked=%0d multi_match=%0d sr=%0d",
             cnt_early_exit, cnt_full_scan, cnt_skip_slice, cnt_multi_resp, cnt_disable,
             cnt_word_write, cnt_slice_write, cnt_readout, cnt_output, cnt_masked,
             cnt_multi_match, cnt_route_sr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
