// ocapp_control_unit: program memory and sequencer of the processor.
//
// The host writes a program (instr_t words, see ocapp_pkg) into the local
// program memory and up to N_OPERANDS comparand/mask pairs into the operand
// memory, then pulses start. The sequencer executes one instruction per clock
// cycle from address 0 until OP_HALT, when it raises done (held until the next
// start). While it runs, busy is 1 and the instruction at pc is decoded
// combinationally into the strobes that drive the other units; those units act
// on them at the same rising edge that advances pc. The program memory is read
// asynchronously.
//
// The control unit keeps the slice counter j used by the bit-serial searches
// (OP_SETJ, OP_LOOPJ) and tests the match detector MD for conditional branches
// (OP_BMD0, OP_BMD1); MD written by a compare is seen by the next instruction.
// The source asks for exactly these duties (program storage, sequencing, loading
// registers, enabling/disabling words, monitoring MD, testing termination); the
// instruction encoding, one-cycle instructions and the host interface are this
// design's own.
module ocapp_control_unit
  import ocapp_pkg::*;
#(
  parameter int unsigned WORD_BITS = WORD_BITS_DEF,
  parameter int unsigned DEPTH     = PROG_DEPTH,
  parameter int unsigned NOPND     = N_OPERANDS
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // host side
  input  logic                         prog_we,
  input  logic [$clog2(DEPTH)-1:0]     prog_addr,
  input  instr_t                       prog_data,
  input  logic                         opnd_we,
  input  logic [$clog2(NOPND)-1:0]     opnd_addr,
  input  logic [WORD_BITS-1:0]         opnd_c,
  input  logic [WORD_BITS-1:0]         opnd_m,
  input  logic                         start,
  output logic                         busy,
  output logic                         done,
  output logic [$clog2(DEPTH)-1:0]     pc,
  // status from the datapath
  input  logic                         md,
  // decoded controls
  output logic                         ldi_we,
  output logic [WORD_BITS-1:0]         ldi_c,
  output logic [WORD_BITS-1:0]         ldi_m,
  output logic                         eqs,
  output logic                         ths,
  output slice_e                       slice_sel,
  output logic [IMM_W-1:0]             j,
  output src_e                         route_src,
  output logic [1:0]                   fn,
  output logic                         er_we,
  output logic                         sr_we,
  output logic                         r_we,
  output logic                         g_we,
  output logic                         l_we,
  output logic                         t_we,
  output logic                         pri,
  output logic                         out_strobe,
  output logic                         wr_word,
  output logic                         wr_slice
);

  localparam int unsigned AW = $clog2(DEPTH);

  instr_t                 prog_mem [DEPTH];
  logic [WORD_BITS-1:0]   opnd_c_mem [NOPND];
  logic [WORD_BITS-1:0]   opnd_m_mem [NOPND];
  instr_t                 ir;
  logic [AW-1:0]          pc_next;
  logic [IMM_W-1:0]       j_next;
  logic                   last_slice;

  always_ff @(posedge clk) begin
    if (prog_we) prog_mem[prog_addr] <= prog_data;
    if (opnd_we) begin
      opnd_c_mem[opnd_addr] <= opnd_c;
      opnd_m_mem[opnd_addr] <= opnd_m;
    end
  end

  assign ir = busy ? prog_mem[pc] : '0;

  // Decode.
  always_comb begin
    ldi_we     = 1'b0;
    ldi_c      = '0;
    ldi_m      = '0;
    eqs        = 1'b0;
    ths        = 1'b0;
    er_we      = 1'b0;
    sr_we      = 1'b0;
    r_we       = 1'b0;
    g_we       = 1'b0;
    l_we       = 1'b0;
    t_we       = 1'b0;
    pri        = 1'b0;
    out_strobe = 1'b0;
    wr_word    = 1'b0;
    wr_slice   = 1'b0;
    slice_sel  = ir.slice;
    route_src  = ir.src;
    fn         = ir.fn;
    unique case (ir.op)
      OP_LDI: begin
        ldi_we = 1'b1;
        unique case (ir.fn)
          LDI_SLOT: begin
            ldi_c = opnd_c_mem[ir.imm[$clog2(NOPND)-1:0]];
            ldi_m = opnd_m_mem[ir.imm[$clog2(NOPND)-1:0]];
          end
          LDI_ONES:  ldi_c = '1;
          LDI_ZEROS: ldi_c = '0;
          default:   ldi_m = '1;
        endcase
      end
      OP_EQS:  eqs = 1'b1;
      OP_THS:  ths = 1'b1;
      OP_VMOV: begin
        unique case (ir.dst)
          DST_ER:  er_we = 1'b1;
          DST_SR:  sr_we = 1'b1;
          DST_R:   r_we  = 1'b1;
          DST_G:   g_we  = 1'b1;
          DST_L:   l_we  = 1'b1;
          default: t_we  = 1'b1;
        endcase
      end
      OP_PRI:  pri        = 1'b1;
      OP_OUT:  out_strobe = 1'b1;
      OP_WRW:  wr_word    = 1'b1;
      OP_WRS:  wr_slice   = 1'b1;
      default: ;
    endcase
  end

  // Sequencing.
  assign last_slice = (32'(j) + 1 >= WORD_BITS);

  always_comb begin
    pc_next = pc + 1'b1;
    j_next  = j;
    unique case (ir.op)
      OP_SETJ:  j_next = ir.imm;
      OP_LOOPJ: begin
        j_next = last_slice ? '0 : j + 1'b1;
        if (!last_slice) pc_next = ir.imm[AW-1:0];
      end
      OP_BMD0:  if (!md) pc_next = ir.imm[AW-1:0];
      OP_BMD1:  if (md)  pc_next = ir.imm[AW-1:0];
      OP_JMP:   pc_next = ir.imm[AW-1:0];
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      pc   <= '0;
      j    <= '0;
    end else if (start && !busy) begin
      busy <= 1'b1;
      done <= 1'b0;
      pc   <= '0;
      j    <= '0;
    end else if (busy) begin
      if (ir.op == OP_HALT) begin
        busy <= 1'b0;
        done <= 1'b1;
      end else begin
        pc <= pc_next;
        j  <= j_next;
      end
    end
  end

endmodule
