// tb_ocapp_response_unit: the priority register P must hold only the first
// (lowest-numbered) responder of R after a pri pulse, and keep its value
// otherwise. Random R vectors with 0, 1 or many ones, on a 37-word array so that
// the tree has a partly filled last stage.
module tb_ocapp_response_unit;
  localparam int N = 37;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic         pri = 0;
  logic [N-1:0] r = '0, p;
  logic         any_resp;

  ocapp_response_unit #(.N_WORDS(N)) dut (.*);

  int checks = 0, failures = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] exp_p;
    exp_p = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 500; t++) begin
      case ($urandom_range(3))
        0: r = '0;
        1: begin r = '0; r[$urandom_range(N-1)] = 1'b1; end
        2: r = N'({$urandom, $urandom} & {$urandom, $urandom});
        default: r = N'({$urandom, $urandom});
      endcase
      pri = $urandom_range(3) != 0;
      if (pri) begin
        exp_p = '0;
        for (int i = 0; i < N; i++) if (r[i]) begin exp_p[i] = 1'b1; break; end
      end
      #1;
      checks++;
      if (any_resp !== |r) begin failures++; $display("FAIL any_resp"); end
      @(negedge clk);
      checks++;
      if (p !== exp_p) begin failures++; $display("FAIL r=%b p=%b exp=%b", r, p, exp_p); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
