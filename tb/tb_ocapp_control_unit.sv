// tb_ocapp_control_unit: runs a short program through the sequencer twice, once
// with MD held at 0 and once at 1, and checks the address sequence (slice loop,
// taken and untaken MD branches, jump, halt), the slice counter j, and the
// decoded strobes of every instruction kind against hand-worked expectations.
module tb_ocapp_control_unit;
  import ocapp_pkg::*;
  import ocapp_prog_pkg::*;

  localparam int M  = 6;
  localparam int AW = $clog2(PROG_DEPTH);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic              prog_we = 0, opnd_we = 0, start = 0, md = 0;
  logic [AW-1:0]     prog_addr = '0;
  instr_t            prog_data = '0;
  logic [1:0]        opnd_addr = '0;
  logic [M-1:0]      opnd_c = '0, opnd_m = '0;
  logic              busy, done;
  logic [AW-1:0]     pc;
  logic              ldi_we, eqs, ths, er_we, sr_we, r_we, g_we, l_we, t_we;
  logic              pri, out_strobe, wr_word, wr_slice;
  logic [M-1:0]      ldi_c, ldi_m;
  slice_e            slice_sel;
  logic [IMM_W-1:0]  j;
  src_e              route_src;
  logic [1:0]        fn;

  ocapp_control_unit #(.WORD_BITS(M)) dut (.*);

  int checks = 0, failures = 0;
  prog_t prog;

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

  // Check the strobes of the instruction at the current pc.
  task automatic check_decode(input int a, input int exp_j);
    int nstrobes;
    nstrobes = $countones({ldi_we, eqs, ths, er_we, sr_we, r_we, g_we, l_we, t_we, pri, out_strobe,
               wr_word, wr_slice});
    case (a)
      0: check(ldi_we && ldi_c == 6'h2a && ldi_m == 6'h03 && nstrobes == 1, "LDI slot");
      1: check(ldi_we && ldi_c == '1 && ldi_m == '0, "LDI ones");
      2: check(ldi_we && ldi_m == '1, "LDI none");
      3: check(g_we && route_src == SRC_L && fn == FN_ANDN && nstrobes == 1, "VMOV G");
      4: check(nstrobes == 0, "SETJ");
      5: check(eqs && slice_sel == SL_J && j == IMM_W'(exp_j) && nstrobes == 1, $sformatf("EQS j=%0d exp %0d", j, exp_j));
      8: check(out_strobe && nstrobes == 1, "OUT");
      10: check(pri && nstrobes == 1, "PRI");
      13: check(wr_slice && nstrobes == 1, "WRS");
      14: check(ths && slice_sel == SL_ALL && nstrobes == 1, "THS");
      16: check(er_we && route_src == SRC_P && fn == FN_OR, "VMOV ER");
      17: check(sr_we, "VMOV SR");
      18: check(r_we, "VMOV R");
      19: check(l_we, "VMOV L");
      20: check(t_we && route_src == SRC_ONES, "VMOV T");
      default: check(nstrobes == 0, $sformatf("no strobe at %0d", a));
    endcase
  endtask

  task automatic run_and_trace(input logic md_val, input int exp_pcs [$]);
    int seen [$];
    int jexp;
    md = md_val;
    jexp = 3;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    while (busy) begin
      seen.push_back(int'(pc));
      check_decode(int'(pc), jexp);
      if (pc == 6) jexp++;
      @(negedge clk);
    end
    check(done, "done raised after HALT");
    check(seen.size() == exp_pcs.size(), $sformatf("trace length %0d vs %0d", seen.size(), exp_pcs.size()));
    for (int i = 0; i < seen.size() && i < exp_pcs.size(); i++)
      check(seen[i] == exp_pcs[i], $sformatf("trace[%0d] pc %0d vs %0d", i, seen[i], exp_pcs[i]));
  endtask

  initial begin
    clear(prog);
    prog[0]  = mk(OP_LDI, DST_ER, SRC_R, LDI_SLOT, SL_ALL, 2);
    prog[1]  = mk(OP_LDI, DST_ER, SRC_R, LDI_ONES);
    prog[2]  = mk(OP_LDI, DST_ER, SRC_R, LDI_NONE);
    prog[3]  = vmov(DST_G, SRC_L, FN_ANDN);
    prog[4]  = mk(OP_SETJ, DST_ER, SRC_R, FN_COPY, SL_ALL, 3);
    prog[5]  = mk(OP_EQS, DST_ER, SRC_R, FN_COPY, SL_J);
    prog[6]  = mk(OP_LOOPJ, DST_ER, SRC_R, FN_COPY, SL_ALL, 5);
    prog[7]  = mk(OP_BMD0, DST_ER, SRC_R, FN_COPY, SL_ALL, 9);
    prog[8]  = mk(OP_OUT);
    prog[9]  = mk(OP_BMD1, DST_ER, SRC_R, FN_COPY, SL_ALL, 16);
    prog[10] = mk(OP_PRI);
    prog[11] = mk(OP_JMP, DST_ER, SRC_R, FN_COPY, SL_ALL, 13);
    prog[12] = mk(OP_WRW);
    prog[13] = mk(OP_WRS);
    prog[14] = mk(OP_THS);
    prog[15] = mk(OP_HALT);
    prog[16] = vmov(DST_ER, SRC_P, FN_OR);
    prog[17] = vmov(DST_SR, SRC_G);
    prog[18] = vmov(DST_R, SRC_ZEROS);
    prog[19] = vmov(DST_L, SRC_ZEROS);
    prog[20] = vmov(DST_T, SRC_ONES);
    prog[21] = mk(OP_HALT);

    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int a = 0; a < int'(PROG_DEPTH); a++) begin
      @(negedge clk);
      prog_we = 1; prog_addr = AW'(a); prog_data = prog[a];
    end
    @(negedge clk) prog_we = 0;
    for (int s = 0; s < 4; s++) begin
      @(negedge clk);
      opnd_we = 1; opnd_addr = 2'(s);
      opnd_c = (s == 2) ? 6'h2a : 6'h15; opnd_m = (s == 2) ? 6'h03 : 6'h30;
    end
    @(negedge clk) opnd_we = 0;
    check(!busy && !done, "idle after reset");

    run_and_trace(1'b0, '{0, 1, 2, 3, 4, 5, 6, 5, 6, 5, 6, 7, 9, 10, 11, 13, 14, 15});
    run_and_trace(1'b1, '{0, 1, 2, 3, 4, 5, 6, 5, 6, 5, 6, 7, 8, 9, 16, 17, 18, 19, 20, 21});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
