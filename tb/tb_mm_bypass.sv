// tb_mm_bypass: test of operand bypass detection and the bypass mux.
// Random source registers and random destinations in the ALU, MEM and WB
// stages (registers drawn from a small set so that matches are frequent), with
// random load/link flags. The expected source follows: $0 gives 0; otherwise
// the youngest stage writing the register wins (ALU, then MEM, then WB),
// a link instruction supplies the PC of the stage behind it, and a load in ALU
// or MEM means wait. Every selection must be seen.
module tb_mm_bypass;
  import mm_pkg::*;
  logic [4:0]  src;
  logic [31:0] rf_val, alu_y, pc_reg, y_mem, pc_alu, wd_wb, val;
  fwd_t        fwd_alu, fwd_mem, fwd_wb;
  byp_e        sel;
  logic        load_wait;
  int checks = 0, failures = 0;
  int seen[7];

  mm_bypass dut (.*);

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) begin
      logic [31:0] e;
      logic        ew;
      int          es;
      src = 5'($urandom_range(0, 3));
      fwd_alu = '{dest: 5'($urandom_range(0, 3)), load: 1'($urandom), link: 1'($urandom)};
      fwd_mem = '{dest: 5'($urandom_range(0, 3)), load: 1'($urandom), link: 1'($urandom)};
      fwd_wb  = '{dest: 5'($urandom_range(0, 3)), load: 1'b0, link: 1'b0};
      if (fwd_alu.load) fwd_alu.link = 0;
      if (fwd_mem.load) fwd_mem.link = 0;
      rf_val = $urandom; alu_y = $urandom; pc_reg = $urandom; y_mem = $urandom;
      pc_alu = $urandom; wd_wb = $urandom;
      #1;
      ew = 0;
      if (src == 0)                    begin e = 0;                                es = 0; end
      else if (src == fwd_alu.dest)    begin e = fwd_alu.link ? pc_reg : alu_y;    es = fwd_alu.link ? 3 : 2; ew = fwd_alu.load; end
      else if (src == fwd_mem.dest)    begin e = fwd_mem.link ? pc_alu : y_mem;    es = fwd_mem.link ? 5 : 4; ew = fwd_mem.load; end
      else if (src == fwd_wb.dest)     begin e = wd_wb;                            es = 6; end
      else                             begin e = rf_val;                           es = 1; end
      checks += 3;
      if (load_wait !== ew) failures++;
      if (int'(sel) != es) failures++;
      if (!ew && val !== e) begin
        failures++;
        if (failures < 10) $display("src %0d: val %h expected %h", src, val, e);
      end
      seen[es]++;
    end
    foreach (seen[s]) begin
      checks++;
      if (seen[s] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
