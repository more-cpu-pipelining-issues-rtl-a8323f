// tb_mm_decode: test of the instruction decoder. Every instruction of the
// subset, with random register fields, is decoded and all control fields are
// compared with a table written here per mnemonic; opcodes outside the subset
// must come out as illegal with no register or memory write.
module tb_mm_decode;
  import mm_pkg::*;
  logic [31:0] ir;
  ctl_t        ctl;
  int checks = 0, failures = 0;

  mm_decode dut (.ir, .ctl);

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected: alufn asel bsel sext wasel werf wdsel wr load br urs urt
  typedef struct {
    string name; logic [5:0] op; logic [5:0] fn;
    alufn_e alufn; asel_e asel; bsel_e bsel; logic sext; wasel_e wasel; logic werf;
    wdsel_e wdsel; logic wr; logic load; br_e br; logic urs; logic urt;
  } row_t;

  row_t t[$];
  task automatic add_row(string nm, logic [5:0] op, logic [5:0] fn, alufn_e al, asel_e as, bsel_e bs,
                         logic se, wasel_e wa, logic we, wdsel_e wd, logic wr, logic ld, br_e br,
                         logic urs, logic urt);
    row_t r;
    r = '{nm, op, fn, al, as, bs, se, wa, we, wd, wr, ld, br, urs, urt};
    t.push_back(r);
  endtask

  initial begin
    // R-type ALU
    add_row("add",  0, 6'h20, ALU_ADD,  ASEL_REG,   BSEL_REG, 1, WASEL_RD, 1, WDSEL_ALU, 0, 0, BR_NONE, 1, 1);
    add_row("addu", 0, 6'h21, ALU_ADD,  ASEL_REG,   BSEL_REG, 1, WASEL_RD, 1, WDSEL_ALU, 0, 0, BR_NONE, 1, 1);
    add_row("sub",  0, 6'h22, ALU_SUB,  ASEL_REG,   BSEL_REG, 1, WASEL_RD, 1, WDSEL_ALU, 0, 0, BR_NONE, 1, 1);
    add_row("subu", 0, 6'h23, ALU_SUB,  ASEL_REG,   BSEL_REG, 1, WASEL_RD, 1, WDSEL_ALU, 0, 0, BR_NONE, 1, 1);
    add_row("and",  0, 6'h24, ALU_AND,  ASEL_REG,   BSEL_REG, 1, WASEL_RD, 1, WDSEL_ALU, 0, 0, BR_NONE, 1, 1);
    add_row("or",   0, 6'h25, ALU_OR,   ASEL_REG,   BSEL_REG, 1, WASEL_RD, 1, WDSEL_ALU, 0, 0, BR_NONE, 1, 1);
    add_row("xor",  0, 6'h26, ALU_XOR,  ASEL_REG,   BSEL_REG, 1, WASEL_RD, 1, WDSEL_ALU, 0, 0, BR_NONE, 1, 1);
    add_row("nor",  0, 6'h27, ALU_NOR,  ASEL_REG,   BSEL_REG, 1, WASEL_RD, 1, WDSEL_ALU, 0, 0, BR_NONE, 1, 1);
    add_row("slt",  0, 6'h2a, ALU_SLT,  ASEL_REG,   BSEL_REG, 1, WASEL_RD, 1, WDSEL_ALU, 0, 0, BR_NONE, 1, 1);
    add_row("sltu", 0, 6'h2b, ALU_SLTU, ASEL_REG,   BSEL_REG, 1, WASEL_RD, 1, WDSEL_ALU, 0, 0, BR_NONE, 1, 1);
    add_row("sll",  0, 6'h00, ALU_SLL,  ASEL_SHAMT, BSEL_REG, 1, WASEL_RD, 1, WDSEL_ALU, 0, 0, BR_NONE, 0, 1);
    add_row("srl",  0, 6'h02, ALU_SRL,  ASEL_SHAMT, BSEL_REG, 1, WASEL_RD, 1, WDSEL_ALU, 0, 0, BR_NONE, 0, 1);
    add_row("sra",  0, 6'h03, ALU_SRA,  ASEL_SHAMT, BSEL_REG, 1, WASEL_RD, 1, WDSEL_ALU, 0, 0, BR_NONE, 0, 1);
    add_row("sllv", 0, 6'h04, ALU_SLL,  ASEL_REG,   BSEL_REG, 1, WASEL_RD, 1, WDSEL_ALU, 0, 0, BR_NONE, 1, 1);
    add_row("srlv", 0, 6'h06, ALU_SRL,  ASEL_REG,   BSEL_REG, 1, WASEL_RD, 1, WDSEL_ALU, 0, 0, BR_NONE, 1, 1);
    add_row("srav", 0, 6'h07, ALU_SRA,  ASEL_REG,   BSEL_REG, 1, WASEL_RD, 1, WDSEL_ALU, 0, 0, BR_NONE, 1, 1);
    add_row("jr",   0, 6'h08, ALU_ADD,  ASEL_REG,   BSEL_REG, 1, WASEL_RD, 0, WDSEL_ALU, 0, 0, BR_JR,   1, 0);
    add_row("jalr", 0, 6'h09, ALU_ADD,  ASEL_REG,   BSEL_REG, 1, WASEL_RD, 1, WDSEL_PC,  0, 0, BR_JR,   1, 0);
    // I-type and jumps (fn field random, must not matter)
    add_row("j",    6'h02, 0, ALU_ADD,  ASEL_REG,   BSEL_REG, 1, WASEL_RD, 0, WDSEL_ALU, 0, 0, BR_J,    0, 0);
    add_row("jal",  6'h03, 0, ALU_ADD,  ASEL_REG,   BSEL_REG, 1, WASEL_31, 1, WDSEL_PC,  0, 0, BR_J,    0, 0);
    add_row("beq",  6'h04, 0, ALU_ADD,  ASEL_REG,   BSEL_REG, 1, WASEL_RD, 0, WDSEL_ALU, 0, 0, BR_BEQ,  1, 1);
    add_row("bne",  6'h05, 0, ALU_ADD,  ASEL_REG,   BSEL_REG, 1, WASEL_RD, 0, WDSEL_ALU, 0, 0, BR_BNE,  1, 1);
    add_row("addi", 6'h08, 0, ALU_ADD,  ASEL_REG,   BSEL_IMM, 1, WASEL_RT, 1, WDSEL_ALU, 0, 0, BR_NONE, 1, 0);
    add_row("addiu",6'h09, 0, ALU_ADD,  ASEL_REG,   BSEL_IMM, 1, WASEL_RT, 1, WDSEL_ALU, 0, 0, BR_NONE, 1, 0);
    add_row("slti", 6'h0a, 0, ALU_SLT,  ASEL_REG,   BSEL_IMM, 1, WASEL_RT, 1, WDSEL_ALU, 0, 0, BR_NONE, 1, 0);
    add_row("sltiu",6'h0b, 0, ALU_SLTU, ASEL_REG,   BSEL_IMM, 1, WASEL_RT, 1, WDSEL_ALU, 0, 0, BR_NONE, 1, 0);
    add_row("andi", 6'h0c, 0, ALU_AND,  ASEL_REG,   BSEL_IMM, 0, WASEL_RT, 1, WDSEL_ALU, 0, 0, BR_NONE, 1, 0);
    add_row("ori",  6'h0d, 0, ALU_OR,   ASEL_REG,   BSEL_IMM, 0, WASEL_RT, 1, WDSEL_ALU, 0, 0, BR_NONE, 1, 0);
    add_row("xori", 6'h0e, 0, ALU_XOR,  ASEL_REG,   BSEL_IMM, 0, WASEL_RT, 1, WDSEL_ALU, 0, 0, BR_NONE, 1, 0);
    add_row("lui",  6'h0f, 0, ALU_SLL,  ASEL_16,    BSEL_IMM, 0, WASEL_RT, 1, WDSEL_ALU, 0, 0, BR_NONE, 0, 0);
    add_row("lw",   6'h23, 0, ALU_ADD,  ASEL_REG,   BSEL_IMM, 1, WASEL_RT, 1, WDSEL_MEM, 0, 1, BR_NONE, 1, 0);
    add_row("sw",   6'h2b, 0, ALU_ADD,  ASEL_REG,   BSEL_IMM, 1, WASEL_RD, 0, WDSEL_ALU, 1, 0, BR_NONE, 1, 1);

    foreach (t[k]) repeat (20) begin
      logic [31:0] w;
      w = $urandom;
      w[31:26] = t[k].op;
      if (t[k].op == 0) w[5:0] = t[k].fn;
      ir = w; #1;
      checks++;
      if (ctl.illegal || ctl.werf !== t[k].werf || ctl.wr !== t[k].wr || ctl.load !== t[k].load ||
          ctl.br !== t[k].br || ctl.uses_rs !== t[k].urs || ctl.uses_rt !== t[k].urt ||
          (t[k].werf && (ctl.wasel !== t[k].wasel || ctl.wdsel !== t[k].wdsel)) ||
          (t[k].br == BR_NONE && !t[k].wr && t[k].werf && t[k].wdsel == WDSEL_ALU &&
           (ctl.alufn !== t[k].alufn || ctl.asel !== t[k].asel || ctl.bsel !== t[k].bsel)) ||
          ((t[k].bsel == BSEL_IMM) && (ctl.bsel !== BSEL_IMM || ctl.sext !== t[k].sext)) ||
          ((t[k].load || t[k].wr) && ctl.alufn !== ALU_ADD)) begin
        failures++;
        if (failures < 10) $display("%s: %p", t[k].name, ctl);
      end
    end
    // outside the subset
    begin
      automatic logic [5:0] bad_ops[4] = '{6'h01, 6'h20, 6'h28, 6'h3f};
      automatic logic [5:0] bad_fns[4] = '{6'h01, 6'h0c, 6'h18, 6'h3f};
      foreach (bad_ops[k]) begin
        ir = {bad_ops[k], 26'($urandom)}; #1;
        checks++;
        if (!ctl.illegal || ctl.werf || ctl.wr || ctl.br != BR_NONE) failures++;
      end
      foreach (bad_fns[k]) begin
        ir = {6'h00, 20'($urandom), bad_fns[k]}; #1;
        checks++;
        if (!ctl.illegal || ctl.werf || ctl.wr || ctl.br != BR_NONE) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
