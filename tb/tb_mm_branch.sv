// tb_mm_branch: test of early branch resolution. For beq, bne, j/jal, jr/jalr
// and non-control instructions with random operands, offsets and PCs, the
// equality flag, the PCSEL choice and the next PC are compared with targets
// computed here (branch: address + 4 + 4*offset; jump: upper four bits of
// address + 4 with the 26-bit index; register jump: the operand).
module tb_mm_branch;
  import mm_pkg::*;
  br_e         br;
  logic [31:0] ir, pc_reg, pc_inc, a, b, next_pc;
  logic        bz;
  pcsel_e      pcsel;
  int checks = 0, failures = 0;

  mm_branch dut (.*);

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4000) begin
      logic [31:0] exp_pc, addr;
      logic [15:0] off;
      int kind;
      kind = int'($urandom_range(0, 4));
      br = br_e'(kind);
      ir = $urandom; off = ir[15:0];
      addr = {$urandom} & ~32'h3;          // address of the branch
      pc_reg = addr + 4;
      pc_inc = $urandom & ~32'h3;          // PC+4 of the fetch stage
      a = $urandom;
      b = ($urandom_range(0, 1) == 1) ? a : $urandom;
      #1;
      case (kind)
        1: exp_pc = (a == b) ? addr + 4 + (32'($signed(off)) * 4) : pc_inc;
        2: exp_pc = (a != b) ? addr + 4 + (32'($signed(off)) * 4) : pc_inc;
        3: exp_pc = {pc_reg[31:28], ir[25:0], 2'b00};
        4: exp_pc = a;
        default: exp_pc = pc_inc;
      endcase
      checks += 2;
      if (next_pc !== exp_pc) begin
        failures++;
        if (failures < 10) $display("br %0d: next %h expected %h", kind, next_pc, exp_pc);
      end
      if (bz !== (a == b)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
