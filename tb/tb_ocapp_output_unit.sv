// tb_ocapp_output_unit: single-word output through P (one-hot and empty P) with
// its one-cycle latency, and the parallel readout gated by register T loaded
// through each route function, all against values computed here.
module tb_ocapp_output_unit;
  localparam int N = 9;
  localparam int M = 11;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                out_strobe = 0, t_we = 0;
  logic [N-1:0]        p = '0, route_in = '0, t;
  logic [N-1:0][M-1:0] words = '0, page_out;
  logic [1:0]          fn = '0;
  logic [M-1:0]        o_word;
  logic                o_valid;

  ocapp_output_unit #(.N_WORDS(N), .WORD_BITS(M)) dut (.*);

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

  initial begin
    logic [N-1:0] mt;
    logic [M-1:0] exp_o;
    mt = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 300; it++) begin
      int sel;
      for (int i = 0; i < N; i++) words[i] = M'($urandom);
      sel = $urandom_range(N);
      p = '0;
      if (sel < N) p[sel] = 1'b1;
      exp_o = (sel < N) ? words[sel] : '0;
      out_strobe = 1;
      t_we = 1; fn = 2'($urandom_range(3)); route_in = N'($urandom);
      case (fn) 0: mt = route_in; 1: mt = mt & route_in; 2: mt = mt & ~route_in; default: mt = mt | route_in; endcase
      @(negedge clk);
      out_strobe = 0; t_we = 0;
      check(o_valid && o_word == exp_o, $sformatf("output word sel=%0d %h vs %h", sel, o_word, exp_o));
      check(t == mt, $sformatf("T register %b vs %b fn %0d", t, mt, fn));
      for (int i = 0; i < N; i++) check(page_out[i] == (mt[i] ? words[i] : '0), "parallel readout");
      @(negedge clk);
      check(!o_valid && o_word == exp_o, "output held, valid one cycle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
