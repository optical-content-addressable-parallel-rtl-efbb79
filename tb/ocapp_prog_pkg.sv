// ocapp_prog_pkg: assembler helpers and search programs for the OCAPP control
// unit, shared by the testbenches.
//
// Each prog_* function fills a whole program array (unused entries are HALT)
// with one search. The two building blocks below are emitted inline at a given
// address and return the next free address:
//   threshold(slot)  bit-serial magnitude search against operand slot, MSB first,
//                    disabling decided words and stopping early when MD = 0;
//                    leaves G = greater, L = less, R = equal (among enabled words)
//   extremum(max)    maximum (or minimum) search over the enabled words; leaves
//                    R = ER = the words holding the extremum
// and the programs put them together into the searches of the architecture:
// equivalence, not equal, threshold, not greater, not smaller, max, min, the
// four between-limits and four outside-limits searches, next above, next below
// and ordered retrieval.
package ocapp_prog_pkg;
  import ocapp_pkg::*;

  typedef instr_t prog_t [PROG_DEPTH];

  function automatic instr_t mk(opcode_e op, dst_e dst = DST_ER, src_e src = SRC_R,
                                logic [1:0] fn = FN_COPY, slice_e sl = SL_ALL,
                                int imm = 0);
    instr_t x;
    x.op    = op;
    x.dst   = dst;
    x.src   = src;
    x.fn    = fn;
    x.slice = sl;
    x.imm   = IMM_W'(imm);
    return x;
  endfunction

  function automatic instr_t vmov(dst_e dst, src_e src, logic [1:0] fn = FN_COPY);
    return mk(OP_VMOV, dst, src, fn);
  endfunction

  function automatic void clear(ref prog_t p);
    for (int a = 0; a < int'(PROG_DEPTH); a++) p[a] = mk(OP_HALT);
  endfunction

  // Threshold search against operand slot s, at address a.
  function automatic int threshold(ref prog_t p, input int a, input int s);
    p[a+0] = mk(OP_LDI, DST_ER, SRC_R, LDI_SLOT, SL_ALL, s);
    p[a+1] = vmov(DST_R, SRC_ONES);
    p[a+2] = vmov(DST_G, SRC_ZEROS);
    p[a+3] = vmov(DST_L, SRC_ZEROS);
    p[a+4] = mk(OP_SETJ, DST_ER, SRC_R, FN_COPY, SL_ALL, 0);
    p[a+5] = mk(OP_THS, DST_ER, SRC_R, FN_COPY, SL_J);
    p[a+6] = mk(OP_BMD0, DST_ER, SRC_R, FN_COPY, SL_ALL, a + 9);
    p[a+7] = vmov(DST_ER, SRC_R, FN_AND);
    p[a+8] = mk(OP_LOOPJ, DST_ER, SRC_R, FN_COPY, SL_ALL, a + 5);
    return a + 9;
  endfunction

  // Maximum (is_max = 1) or minimum search over the enabled words, at address a.
  function automatic int extremum(ref prog_t p, input int a, input bit is_max);
    p[a+0] = mk(OP_LDI, DST_ER, SRC_R, is_max ? LDI_ONES : LDI_ZEROS);
    p[a+1] = mk(OP_SETJ, DST_ER, SRC_R, FN_COPY, SL_ALL, 0);
    p[a+2] = mk(OP_EQS, DST_ER, SRC_R, FN_COPY, SL_J);
    p[a+3] = mk(OP_BMD0, DST_ER, SRC_R, FN_COPY, SL_ALL, a + 5);
    p[a+4] = vmov(DST_ER, SRC_R, FN_AND);
    p[a+5] = mk(OP_LOOPJ, DST_ER, SRC_R, FN_COPY, SL_ALL, a + 2);
    p[a+6] = mk(OP_EQS, DST_ER, SRC_R, FN_COPY, SL_NONE);
    return a + 7;
  endfunction

  // Equivalence (masked) search with operand slot 0: R, MD.
  function automatic void prog_equivalence(ref prog_t p);
    clear(p);
    p[0] = mk(OP_LDI, DST_ER, SRC_R, LDI_SLOT, SL_ALL, 0);
    p[1] = mk(OP_EQS, DST_ER, SRC_R, FN_COPY, SL_ALL);
    p[2] = mk(OP_HALT);
  endfunction

  // Threshold search over all words with operand slot 0.
  function automatic void prog_threshold(ref prog_t p);
    int a;
    clear(p);
    p[0] = vmov(DST_ER, SRC_ONES);
    a = threshold(p, 1, 0);
    p[a] = mk(OP_HALT);
  endfunction

  // Maximum or minimum over all words; result in R.
  function automatic void prog_extremum(ref prog_t p, input bit is_max);
    int a;
    clear(p);
    p[0] = vmov(DST_ER, SRC_ONES);
    a = extremum(p, 1, is_max);
    p[a] = mk(OP_HALT);
  endfunction

  // Between limits, slot 0 = HIGH, slot 1 = LOW: LOW < W < HIGH, where
  // lo_inc / hi_inc turn the lower / upper bound into <=. Result in G (copied
  // to T for readout). The first search leaves L = below HIGH and R = equal to
  // HIGH; those words are re-enabled for the search against LOW.
  function automatic void prog_between(ref prog_t p, input bit lo_inc, input bit hi_inc);
    int a;
    clear(p);
    p[0] = vmov(DST_ER, SRC_ONES);
    a = threshold(p, 1, 0);
    p[a++] = vmov(DST_ER, SRC_L);
    if (hi_inc) p[a++] = vmov(DST_ER, SRC_R, FN_OR);
    a = threshold(p, a, 1);
    if (lo_inc) p[a++] = vmov(DST_G, SRC_R, FN_OR);
    p[a++] = vmov(DST_T, SRC_G);
    p[a] = mk(OP_HALT);
  endfunction

  // Outside limits, slot 0 = HIGH, slot 1 = LOW: W < LOW or W > HIGH, where
  // lo_inc / hi_inc turn them into W <= LOW / W >= HIGH. The words below LOW
  // are kept in SR across the second search. Result in G (and T).
  function automatic void prog_outside(ref prog_t p, input bit lo_inc, input bit hi_inc);
    int a;
    clear(p);
    p[0] = vmov(DST_ER, SRC_ONES);
    a = threshold(p, 1, 1);
    p[a++] = vmov(DST_SR, SRC_L);
    if (lo_inc) p[a++] = vmov(DST_SR, SRC_R, FN_OR);
    p[a++] = vmov(DST_ER, SRC_ONES);
    a = threshold(p, a, 0);
    p[a++] = vmov(DST_G, SRC_SR, FN_OR);
    if (hi_inc) p[a++] = vmov(DST_G, SRC_R, FN_OR);
    p[a++] = vmov(DST_T, SRC_G);
    p[a] = mk(OP_HALT);
  endfunction

  // The complementary relations against the comparand in slot 0, result in T:
  // rel = 0 not equal, 1 not greater (W <= C), 2 not smaller (W >= C).
  function automatic void prog_relation(ref prog_t p, input int rel);
    int a;
    clear(p);
    p[0] = vmov(DST_ER, SRC_ONES);
    if (rel == 0) begin
      p[1] = mk(OP_LDI, DST_ER, SRC_R, LDI_SLOT, SL_ALL, 0);
      p[2] = mk(OP_EQS, DST_ER, SRC_R, FN_COPY, SL_ALL);
      p[3] = vmov(DST_T, SRC_ER);
      p[4] = vmov(DST_T, SRC_R, FN_ANDN);
      p[5] = mk(OP_HALT);
    end else begin
      a = threshold(p, 1, 0);
      p[a++] = vmov(DST_T, rel == 1 ? SRC_L : SRC_G);
      p[a++] = vmov(DST_T, SRC_R, FN_OR);
      p[a] = mk(OP_HALT);
    end
  endfunction

  // Next above (above = 1) or next below the comparand in slot 0; result in R,
  // and the first such word is put out.
  function automatic void prog_adjacent(ref prog_t p, input bit above);
    int a;
    clear(p);
    p[0] = vmov(DST_ER, SRC_ONES);
    a = threshold(p, 1, 0);
    p[a++] = vmov(DST_ER, above ? SRC_G : SRC_L);
    a = extremum(p, a, !above);
    p[a++] = mk(OP_PRI);
    p[a++] = mk(OP_OUT);
    p[a] = mk(OP_HALT);
  endfunction

  // Ordered retrieval of all words: ascending (descending = 0) or
  // descending. Every word is put out once through the output unit.
  function automatic void prog_sort(ref prog_t p, input bit descending);
    int a, top, fin;
    clear(p);
    p[0] = vmov(DST_SR, SRC_ONES);
    top = 1;
    p[1] = vmov(DST_ER, SRC_SR);
    p[2] = mk(OP_EQS, DST_ER, SRC_R, FN_COPY, SL_NONE);
    // p[3] = BMD0 fin, filled in below
    a = extremum(p, 4, descending);
    p[a++] = mk(OP_PRI);
    p[a++] = mk(OP_OUT);
    p[a++] = vmov(DST_SR, SRC_P, FN_ANDN);
    p[a++] = mk(OP_JMP, DST_ER, SRC_R, FN_COPY, SL_ALL, top);
    fin = a;
    p[3] = mk(OP_BMD0, DST_ER, SRC_R, FN_COPY, SL_ALL, fin);
    p[fin] = mk(OP_HALT);
  endfunction

  // Enable every word.
  function automatic void prog_enable_all(ref prog_t p);
    clear(p);
    p[0] = vmov(DST_ER, SRC_ONES);
    p[1] = mk(OP_HALT);
  endfunction

  // Word write (WRW) then slice write (WRS) using registers A and B loaded by
  // the host in between; a HALT separates them.
  function automatic void prog_write_word(ref prog_t p);
    clear(p);
    p[0] = mk(OP_WRW);
    p[1] = vmov(DST_T, SRC_ONES);
    p[2] = mk(OP_HALT);
  endfunction

  function automatic void prog_write_slice(ref prog_t p);
    clear(p);
    p[0] = mk(OP_WRS);
    p[1] = vmov(DST_T, SRC_ONES);
    p[2] = mk(OP_HALT);
  endfunction

endpackage
