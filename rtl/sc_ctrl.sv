// sc_ctrl: control unit of the single-cycle PARCv1 processor.
//
// Purely combinational: one row of the control-signal table per instruction.
//   inst   pc_sel          op1_sel alu_fn wb_sel waddr wen imem dmem
//   addu   pc+4            rf      +      alu    rd    1   1    0
//   addiu  pc+4            sext    +      alu    rt    1   1    0
//   mul    pc+4            rf      (x)    mul    rd    1   1    0
//   lw     pc+4            sext    +      mem    rt    1   1    1 (read)
//   sw     pc+4            sext    +      -      -     0   1    1 (write)
//   j      j_targ          -       -      -      -     0   1    0
//   jal    j_targ          pc+4    cp1    alu    r31   1   1    0
//   jr     jr              -       -      -      -     0   1    0
//   bne    eq ? pc+4 : br  rf      cmp    -      -     0   1    0
//   lw.ai  pc+4            sext    +      mem    rt    1   1    1 (read)
//                          and rs <- rs + 4 on the second write port
// The addu, mul, lw, j and jr rows are the lecture's; the other rows (the
// lecture leaves them as an exercise) are this design's. Undefined opcodes
// write nothing and fall through to pc+4.
module sc_ctrl
  import parc_pkg::*;
(
  input  word_t      ir,
  input  logic       eq,           // status: rs == op1 from the ALU
  output pc_sel_t    pc_sel,
  output op1_sel_t   op1_sel,
  output alu_fn_t    alu_fn,
  output wb_sel_t    wb_sel,
  output waddr_sel_t rf_waddr_sel,
  output logic       rf_wen,
  output logic       rf_wen1,      // lw.ai: write rs + 4
  output logic       imemreq_val,
  output logic       dmemreq_val,
  output mem_op_t    dmemreq_op
);

  inst_t inst;
  assign inst = decode(ir);

  always_comb begin
    pc_sel       = PC_PLUS4;
    op1_sel      = OP1_RF;
    alu_fn       = ALU_ADD;
    wb_sel       = WB_ALU;
    rf_waddr_sel = WA_RD;
    rf_wen       = 1'b0;
    rf_wen1      = 1'b0;
    imemreq_val  = 1'b1;
    dmemreq_val  = 1'b0;
    dmemreq_op   = MEM_READ;
    unique case (inst)
      I_ADDU:  rf_wen = 1'b1;
      I_ADDIU: begin op1_sel = OP1_SEXT; rf_waddr_sel = WA_RT; rf_wen = 1'b1; end
      I_MUL:   begin wb_sel = WB_MUL; rf_wen = 1'b1; end
      I_LW:    begin op1_sel = OP1_SEXT; wb_sel = WB_MEM; rf_waddr_sel = WA_RT;
                     rf_wen = 1'b1; dmemreq_val = 1'b1; end
      I_LWAI:  begin op1_sel = OP1_SEXT; wb_sel = WB_MEM; rf_waddr_sel = WA_RT;
                     rf_wen = 1'b1; rf_wen1 = 1'b1; dmemreq_val = 1'b1; end
      I_SW:    begin op1_sel = OP1_SEXT; dmemreq_val = 1'b1; dmemreq_op = MEM_WRITE; end
      I_J:     pc_sel = PC_JTARG;
      I_JAL:   begin pc_sel = PC_JTARG; op1_sel = OP1_PC4; alu_fn = ALU_CP1;
                     rf_waddr_sel = WA_R31; rf_wen = 1'b1; end
      I_JR:    pc_sel = PC_JR;
      I_BNE:   begin alu_fn = ALU_CMP; pc_sel = eq ? PC_PLUS4 : PC_BRTARG; end
      default: ;
    endcase
  end

endmodule
