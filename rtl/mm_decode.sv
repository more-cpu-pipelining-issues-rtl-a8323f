// mm_decode: instruction decoder (control logic) of the miniMIPS.
//
// Combinational. Maps a 32-bit instruction to the control signals named in the
// reference datapath: ALUFN, ASEL, BSEL, SEXT, WASEL, WERF, WDSEL and Wr, plus
// the control-transfer class from which the RF stage derives PCSEL, and which
// registers the instruction reads (the bypass and interlock logic need this).
// The pipeline keeps the instruction word in every stage (IR^REG, IR^ALU,
// IR^MEM, IR^WB) and decodes each copy with its own instance of this block.
//
// Subset: add addu sub subu and or xor nor slt sltu sll srl sra sllv srlv srav
// jr jalr addi addiu slti sltiu andi ori xori lui lw sw beq bne j jal.
// Arithmetic overflow does not trap (add behaves as addu). Anything else is
// flagged illegal and executes as a NOP. The subset and these two choices are
// this design's; the mux numbering follows the reference datapath.
module mm_decode
  import mm_pkg::*;
(
  input  logic [31:0] ir,
  output ctl_t        ctl
);
  logic [5:0] op, fn;
  assign op = ir[31:26];
  assign fn = ir[5:0];

  always_comb begin
    ctl = '{alufn: ALU_ADD, asel: ASEL_REG, bsel: BSEL_REG, sext: 1'b1,
            wasel: WASEL_RD, werf: 1'b0, wdsel: WDSEL_ALU, wr: 1'b0, load: 1'b0,
            br: BR_NONE, uses_rs: 1'b0, uses_rt: 1'b0, illegal: 1'b0};
    unique case (op)
      OP_RTYPE: begin
        ctl.werf    = 1'b1;
        ctl.uses_rs = 1'b1;
        ctl.uses_rt = 1'b1;
        unique case (fn)
          FN_ADD, FN_ADDU: ctl.alufn = ALU_ADD;
          FN_SUB, FN_SUBU: ctl.alufn = ALU_SUB;
          FN_AND:  ctl.alufn = ALU_AND;
          FN_OR:   ctl.alufn = ALU_OR;
          FN_XOR:  ctl.alufn = ALU_XOR;
          FN_NOR:  ctl.alufn = ALU_NOR;
          FN_SLT:  ctl.alufn = ALU_SLT;
          FN_SLTU: ctl.alufn = ALU_SLTU;
          FN_SLL, FN_SRL, FN_SRA: begin
            ctl.alufn   = (fn == FN_SLL) ? ALU_SLL : (fn == FN_SRL) ? ALU_SRL : ALU_SRA;
            ctl.asel    = ASEL_SHAMT;
            ctl.uses_rs = 1'b0;
          end
          FN_SLLV: ctl.alufn = ALU_SLL;
          FN_SRLV: ctl.alufn = ALU_SRL;
          FN_SRAV: ctl.alufn = ALU_SRA;
          FN_JR: begin
            ctl.br      = BR_JR;
            ctl.werf    = 1'b0;
            ctl.uses_rt = 1'b0;
          end
          FN_JALR: begin
            ctl.br      = BR_JR;
            ctl.wdsel   = WDSEL_PC;
            ctl.uses_rt = 1'b0;
          end
          default: begin
            ctl.illegal = 1'b1;
            ctl.werf    = 1'b0;
            ctl.uses_rs = 1'b0;
            ctl.uses_rt = 1'b0;
          end
        endcase
      end
      OP_J:   ctl.br = BR_J;
      OP_JAL: begin
        ctl.br    = BR_J;
        ctl.werf  = 1'b1;
        ctl.wasel = WASEL_31;
        ctl.wdsel = WDSEL_PC;
      end
      OP_BEQ, OP_BNE: begin
        ctl.br      = (op == OP_BEQ) ? BR_BEQ : BR_BNE;
        ctl.uses_rs = 1'b1;
        ctl.uses_rt = 1'b1;
      end
      OP_ADDI, OP_ADDIU, OP_SLTI, OP_SLTIU, OP_ANDI, OP_ORI, OP_XORI, OP_LUI: begin
        ctl.werf    = 1'b1;
        ctl.wasel   = WASEL_RT;
        ctl.bsel    = BSEL_IMM;
        ctl.uses_rs = (op != OP_LUI);
        unique case (op)
          OP_SLTI:  ctl.alufn = ALU_SLT;
          OP_SLTIU: ctl.alufn = ALU_SLTU;
          OP_ANDI:  begin ctl.alufn = ALU_AND; ctl.sext = 1'b0; end
          OP_ORI:   begin ctl.alufn = ALU_OR;  ctl.sext = 1'b0; end
          OP_XORI:  begin ctl.alufn = ALU_XOR; ctl.sext = 1'b0; end
          OP_LUI:   begin ctl.alufn = ALU_SLL; ctl.sext = 1'b0; ctl.asel = ASEL_16; end
          default:  ctl.alufn = ALU_ADD;
        endcase
      end
      OP_LW: begin
        ctl.werf    = 1'b1;
        ctl.wasel   = WASEL_RT;
        ctl.bsel    = BSEL_IMM;
        ctl.wdsel   = WDSEL_MEM;
        ctl.load    = 1'b1;
        ctl.uses_rs = 1'b1;
      end
      OP_SW: begin
        ctl.bsel    = BSEL_IMM;
        ctl.wr      = 1'b1;
        ctl.uses_rs = 1'b1;
        ctl.uses_rt = 1'b1;
      end
      default: ctl.illegal = 1'b1;
    endcase
  end
endmodule
