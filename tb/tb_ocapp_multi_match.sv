// tb_ocapp_multi_match: K search arguments (some masked) against random words
// with random enables; every response register and match detector is checked
// against the masked-equality model. Arguments are usually copies of stored
// words so that matches occur.
module tb_ocapp_multi_match;
  localparam int N = 12;
  localparam int M = 7;
  localparam int K = 3;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                arg_we = 0, cmp = 0;
  logic [1:0]          arg_idx = '0;
  logic [M-1:0]        arg_c = '0, arg_m = '0;
  logic [N-1:0][M-1:0] words = '0;
  logic [N-1:0]        er = '0;
  logic [K-1:0][N-1:0] resp;
  logic [K-1:0]        any_md;

  ocapp_multi_match #(.N_WORDS(N), .WORD_BITS(M), .K_ARGS(K)) dut (.*);

  int checks = 0, failures = 0, hits = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [M-1:0] ac [K], am [K];
    logic [N-1:0] e;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      for (int i = 0; i < N; i++) words[i] = M'($urandom);
      er = N'($urandom) | N'($urandom);
      for (int k = 0; k < K; k++) begin
        ac[k] = ($urandom_range(3) == 0) ? M'($urandom) : words[$urandom_range(N-1)];
        am[k] = ($urandom_range(2) == 0) ? M'($urandom) : '0;
        arg_we = 1; arg_idx = 2'(k); arg_c = ac[k]; arg_m = am[k];
        @(negedge clk);
      end
      arg_we = 0;
      cmp = 1;
      @(negedge clk) cmp = 0;
      for (int k = 0; k < K; k++) begin
        for (int i = 0; i < N; i++) e[i] = er[i] && (((words[i] ^ ac[k]) & ~am[k]) == '0);
        checks++;
        if (resp[k] !== e || any_md[k] !== |e) begin
          failures++; $display("FAIL k=%0d resp %b exp %b", k, resp[k], e);
        end
        if (|e) hits++;
      end
    end
    checks++;
    if (hits == 0) begin failures++; $display("FAIL no matches exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
