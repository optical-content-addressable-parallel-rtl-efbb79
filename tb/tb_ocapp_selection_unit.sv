// tb_ocapp_selection_unit: checks the storage array, the A/B word and slice
// writes, the ER and SR register updates and the dual-rail slice gating against
// a model kept in the testbench, with random data over 300 steps.
module tb_ocapp_selection_unit;
  import ocapp_pkg::*;

  localparam int N = 8;
  localparam int M = 6;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                page_we = 0, a_we = 0, b_we = 0, wr_word = 0, wr_slice = 0;
  logic                er_we = 0, sr_we = 0;
  logic [1:0]          fn = '0;
  logic [N-1:0][M-1:0] page_data = '0;
  logic [N-1:0]        a_data = '0, route_in = '0;
  logic [M-1:0]        b_data = '0;
  slice_e              slice_sel = SL_ALL;
  logic [IMM_W-1:0]    j = '0;
  logic [N-1:0][M-1:0] words, w_t, w_f;
  logic [N-1:0]        er, sr, a_reg;
  logic [M-1:0]        b_reg;

  ocapp_selection_unit #(.N_WORDS(N), .WORD_BITS(M)) dut (.*);

  int checks = 0, failures = 0;
  logic [M-1:0] mm [N];
  logic [N-1:0] mer, msr, ma;
  logic [M-1:0] mb;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [N-1:0] comb(logic [1:0] f, logic [N-1:0] d, logic [N-1:0] s);
    case (f)
      2'd0: return s;
      2'd1: return d & s;
      2'd2: return d & ~s;
      default: return d | s;
    endcase
  endfunction

  task automatic compare();
    logic [M-1:0] en;
    en = '0;
    if (slice_sel == SL_ALL) en = '1;
    else if (slice_sel == SL_J && int'(j) < M) en[M-1-int'(j)] = 1'b1;
    for (int i = 0; i < N; i++) begin
      checks++;
      if (words[i] !== mm[i] || w_t[i] !== (mm[i] & en) || w_f[i] !== (~mm[i] & en)) begin
        failures++;
        $display("FAIL word %0d: %b vs %b (t %b f %b en %b)", i, words[i], mm[i], w_t[i], w_f[i], en);
      end
    end
    checks++;
    if (er !== mer || sr !== msr || a_reg !== ma || b_reg !== mb) begin
      failures++;
      $display("FAIL regs er %b/%b sr %b/%b", er, mer, sr, msr);
    end
  endtask

  initial begin
    for (int i = 0; i < N; i++) mm[i] = '0;
    mer = '1; msr = '0; ma = '0; mb = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    compare();
    for (int step = 0; step < 300; step++) begin
      int op;
      op = (step == 0) ? 0 : $urandom_range(5);
      page_we = 0; a_we = 0; b_we = 0; wr_word = 0; wr_slice = 0; er_we = 0; sr_we = 0;
      fn = 2'($urandom_range(3));
      route_in = N'($urandom);
      slice_sel = slice_e'($urandom_range(2));
      j = IMM_W'($urandom_range(M));
      case (op)
        0: begin
          page_we = 1;
          for (int i = 0; i < N; i++) begin page_data[i] = M'($urandom); mm[i] = page_data[i]; end
        end
        1: begin
          a_we = 1; b_we = 1; a_data = N'($urandom); b_data = M'($urandom);
          ma = a_data; mb = b_data;
        end
        2: begin
          wr_word = 1;
          for (int i = 0; i < N; i++) if (ma[i]) mm[i] = mb;
        end
        3: begin
          wr_slice = 1;
          for (int i = 0; i < N; i++) for (int b = 0; b < M; b++) if (mb[b]) mm[i][b] = ma[i];
        end
        4: begin er_we = 1; mer = comb(fn, mer, route_in); end
        default: begin sr_we = 1; msr = comb(fn, msr, route_in); end
      endcase
      @(negedge clk);
      compare();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
