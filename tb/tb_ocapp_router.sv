// tb_ocapp_router: every source selection must put the right register (or the
// all-ones / all-zeros constant) on the route bus. Random register contents.
module tb_ocapp_router;
  import ocapp_pkg::*;
  localparam int N = 13;

  src_e         src = SRC_R;
  logic [N-1:0] r = '0, g = '0, l = '0, p = '0, er = '0, sr = '0, route;

  ocapp_router #(.N_WORDS(N)) dut (.*);

  int checks = 0, failures = 0;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] e;
    for (int t = 0; t < 200; t++) begin
      r = N'($urandom); g = N'($urandom); l = N'($urandom);
      p = N'($urandom); er = N'($urandom); sr = N'($urandom);
      src = src_e'($urandom_range(7));
      case (src)
        SRC_R: e = r; SRC_G: e = g; SRC_L: e = l; SRC_P: e = p;
        SRC_ER: e = er; SRC_SR: e = sr; SRC_ONES: e = '1; default: e = '0;
      endcase
      #1;
      checks++;
      if (route !== e) begin failures++; $display("FAIL src=%0d", src); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
