// mm_pkg: types and constants shared by the 5-stage miniMIPS pipeline.
//
// The miniMIPS executes a MIPS-I integer subset with one branch delay slot.
// The control-signal names (PCSEL, ASEL, BSEL, SEXT, WASEL, WDSEL, WERF, Wr,
// ALUFN) and the mux input numbers of PCSEL, ASEL, BSEL, WASEL and WDSEL are
// those of the classic miniMIPS datapath this design follows. The ALUFN encoding, the
// opcode list and the decoded-control struct are this design's own choices.
package mm_pkg;

  localparam int XLEN = 32;
  localparam logic [31:0] NOP_INSTR = 32'h0000_0000;  // sll $0,$0,0

  // ALU functions. Shifts shift operand B by A[4:0].
  typedef enum logic [3:0] {
    ALU_ADD  = 4'd0,
    ALU_SUB  = 4'd1,
    ALU_AND  = 4'd2,
    ALU_OR   = 4'd3,
    ALU_XOR  = 4'd4,
    ALU_NOR  = 4'd5,
    ALU_SLT  = 4'd6,
    ALU_SLTU = 4'd7,
    ALU_SLL  = 4'd8,
    ALU_SRL  = 4'd9,
    ALU_SRA  = 4'd10
  } alufn_e;

  // PCSEL mux inputs as numbered in the reference datapath. Inputs 4 and 5
  // (0x80000080 and 0x80000040) are trap vectors that this design does not use.
  typedef enum logic [2:0] {
    PCSEL_INC   = 3'd0,  // PC+4
    PCSEL_BT    = 3'd1,  // branch target
    PCSEL_JT    = 3'd2,  // jump target from register (jr, jalr)
    PCSEL_J     = 3'd3,  // {PC[31:28], J[25:0], 2'b00}
    PCSEL_RESET = 3'd6   // 0x80000000
  } pcsel_e;

  typedef enum logic [1:0] {ASEL_REG = 2'd0, ASEL_SHAMT = 2'd1, ASEL_16 = 2'd2} asel_e;
  typedef enum logic       {BSEL_REG = 1'b0, BSEL_IMM = 1'b1} bsel_e;
  typedef enum logic [1:0] {WASEL_RT = 2'd0, WASEL_RD = 2'd1, WASEL_31 = 2'd2} wasel_e;
  typedef enum logic [1:0] {WDSEL_PC = 2'd0, WDSEL_ALU = 2'd1, WDSEL_MEM = 2'd2} wdsel_e;

  // Control-transfer class, resolved in the RF stage.
  typedef enum logic [2:0] {
    BR_NONE = 3'd0, BR_BEQ = 3'd1, BR_BNE = 3'd2, BR_J = 3'd3, BR_JR = 3'd4
  } br_e;

  // Decoded control for one instruction.
  typedef struct packed {
    alufn_e alufn;
    asel_e  asel;
    bsel_e  bsel;
    logic   sext;     // 1: sign-extend imm, 0: zero-extend
    wasel_e wasel;
    logic   werf;     // writes the register file
    wdsel_e wdsel;
    logic   wr;       // data memory write (sw)
    logic   load;     // lw
    br_e    br;
    logic   uses_rs;  // reads register rs
    logic   uses_rt;  // reads register rt
    logic   illegal;  // not in the implemented subset (executed as a NOP)
  } ctl_t;

  // Bypass mux selections for one operand.
  typedef enum logic [2:0] {
    BYP_ZERO   = 3'd0,  // register $0
    BYP_RF     = 3'd1,  // register file, no bypass
    BYP_ALU    = 3'd2,  // ALU output of the instruction in the ALU stage
    BYP_ALU_PC = 3'd3,  // PC^REG: return address of a jal/jalr in the ALU stage
    BYP_MEM    = 3'd4,  // Y^MEM
    BYP_MEM_PC = 3'd5,  // PC^ALU: return address of a jal/jalr in the MEM stage
    BYP_WB     = 3'd6   // WDSEL mux output in the WB stage
  } byp_e;

  // What a later pipeline stage offers to the bypass logic.
  typedef struct packed {
    logic [4:0] dest;  // register written, 0 when the instruction writes none
    logic       load;  // value comes from the data memory (not ready before WB)
    logic       link;  // value is a return address taken from the PC pipeline
  } fwd_t;

  // Instruction retiring from the WB stage (for tracing and testbenches).
  typedef struct packed {
    logic        valid;  // a real instruction, not a bubble
    logic [31:0] pc;     // its address
    logic        stall;  // the interlock is stalling IF/RF this cycle
  } retire_t;

  // MIPS opcode and function fields.
  localparam logic [5:0] OP_RTYPE = 6'h00, OP_J = 6'h02, OP_JAL = 6'h03, OP_BEQ = 6'h04,
                         OP_BNE = 6'h05, OP_ADDI = 6'h08, OP_ADDIU = 6'h09, OP_SLTI = 6'h0a,
                         OP_SLTIU = 6'h0b, OP_ANDI = 6'h0c, OP_ORI = 6'h0d, OP_XORI = 6'h0e,
                         OP_LUI = 6'h0f, OP_LW = 6'h23, OP_SW = 6'h2b;
  localparam logic [5:0] FN_SLL = 6'h00, FN_SRL = 6'h02, FN_SRA = 6'h03, FN_SLLV = 6'h04,
                         FN_SRLV = 6'h06, FN_SRAV = 6'h07, FN_JR = 6'h08, FN_JALR = 6'h09,
                         FN_ADD = 6'h20, FN_ADDU = 6'h21, FN_SUB = 6'h22, FN_SUBU = 6'h23,
                         FN_AND = 6'h24, FN_OR = 6'h25, FN_XOR = 6'h26, FN_NOR = 6'h27,
                         FN_SLT = 6'h2a, FN_SLTU = 6'h2b;

  // Register written by an instruction with control c, or 0 if none.
  function automatic logic [4:0] dest_reg(input ctl_t c, input logic [31:0] ir);
    logic [4:0] r;
    unique case (c.wasel)
      WASEL_RT: r = ir[20:16];
      WASEL_RD: r = ir[15:11];
      default:  r = 5'd31;
    endcase
    return c.werf ? r : 5'd0;
  endfunction

endpackage
