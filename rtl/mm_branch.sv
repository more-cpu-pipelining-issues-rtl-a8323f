// mm_branch: early branch resolution in the RF stage of the miniMIPS.
//
// The branch decision is made at the end of RF, one stage after fetch, so the
// instruction fetched meanwhile (the delay slot) is always executed. From the
// bypassed operands A and B the '=' comparator forms BZ; the branch target BT is
// PC^REG (the branch's address + 4) plus the sign-extended offset times 4; JT is
// operand A (jr, jalr); the jump target is {PC^REG[31:28], J[25:0], 00}. PCSEL
// then picks the next PC: BT for a taken beq/bne, J for j/jal, JT for jr/jalr,
// otherwise PC+4 from the fetch stage. Combinational. The reset input of the
// PC mux is applied at the PC register, so pcsel never takes value 6 here and
// its top bit is constant 0.
// The jump target's upper field is PC^REG[31:28], as in MIPS (a 4-bit field
// makes the 32 bits with the 26-bit index and two zeros).
module mm_branch
  import mm_pkg::*;
(
  input  br_e         br,
  input  logic [31:0] ir,       // IR^REG
  input  logic [31:0] pc_reg,   // PC^REG
  input  logic [31:0] pc_inc,   // PC+4 of the fetch stage
  input  logic [31:0] a,        // bypassed rs value
  input  logic [31:0] b,        // bypassed rt value
  output logic        bz,
  output pcsel_e      pcsel,
  output logic [31:0] next_pc
);
  logic [31:0] bt, jt, jmp;

  always_comb begin
    bz  = (a == b);
    bt  = pc_reg + {{14{ir[15]}}, ir[15:0], 2'b00};
    jt  = a;
    jmp = {pc_reg[31:28], ir[25:0], 2'b00};
    unique case (br)
      BR_BEQ:  pcsel = bz ? PCSEL_BT : PCSEL_INC;
      BR_BNE:  pcsel = bz ? PCSEL_INC : PCSEL_BT;
      BR_J:    pcsel = PCSEL_J;
      BR_JR:   pcsel = PCSEL_JT;
      default: pcsel = PCSEL_INC;
    endcase
    unique case (pcsel)
      PCSEL_BT: next_pc = bt;
      PCSEL_JT: next_pc = jt;
      PCSEL_J:  next_pc = jmp;
      default:  next_pc = pc_inc;
    endcase
  end
endmodule
