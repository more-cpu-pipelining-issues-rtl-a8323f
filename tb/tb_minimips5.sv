// tb_minimips5: end-to-end test of the five-stage miniMIPS at its default sizes.
//
// Programs are assembled here, loaded into the instruction memory during reset,
// and run to a halt loop (beq $0,$0,-1 with a nop in its delay slot). An
// instruction-level reference model in this file runs the same program with the
// MIPS delayed-branch semantics (the instruction after a branch or jump always
// executes; jal/jalr link to their address + 8) and with the same register and
// memory contents the design starts from. After the halt retires, every register
// and every data-memory word is compared with the model. The model also predicts
// the cycle count: one instruction per cycle, except that an instruction reading
// the destination of a lw enters the ALU stage no earlier than three cycles
// after the lw (two bubbles right behind a lw, one a slot further); the measured
// cycles between the first and the halt instruction leaving WB must match.
// Programs: the hazard examples (load delay, loop with a branch in flight,
// jal with return-address reads right after it), then random programs. Each
// bypass source, both stall lengths, taken and untaken branches, jumps and links
// are counted, and one that never occurs is a failure.
module tb_minimips5;
  import mm_pkg::*;

  localparam logic [31:0] BASE = 32'h8000_0000;
  localparam int DW = 1024;

  logic        clk = 1'b0, rst = 1'b1;
  logic        imem_we = 1'b0;
  logic [31:0] imem_waddr = '0, imem_wdata = '0;
  logic [4:0]  dbg_reg_addr = '0;
  logic [31:0] dbg_reg_data, dbg_mem_addr = '0, dbg_mem_data;
  retire_t     retire;

  minimips5 dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- assembler ----------------
  function automatic logic [31:0] R(logic [5:0] fn, int rd, int rs, int rt, int sh = 0);
    return {6'h00, 5'(rs), 5'(rt), 5'(rd), 5'(sh), fn};
  endfunction
  function automatic logic [31:0] I(logic [5:0] op, int rt, int rs, int imm);
    return {op, 5'(rs), 5'(rt), 16'(imm)};
  endfunction
  function automatic logic [31:0] Jt(logic [5:0] op, logic [31:0] target);
    return {op, target[27:2]};
  endfunction
  localparam logic [31:0] NOP = 32'h0;

  logic [31:0] prog[$];
  function automatic logic [31:0] here();
    return BASE + 32'(prog.size() * 4);
  endfunction

  // ---------------- reference model ----------------
  logic [31:0] mregs [32];
  logic [31:0] mmem  [DW];
  longint      model_cycles;   // RF-entry cycle of the halt minus that of the first
  int          model_instrs;
  int          model_stall2, model_stall1;

  function automatic logic [31:0] sx(logic [15:0] v); return {{16{v[15]}}, v}; endfunction

  task automatic run_model(logic [31:0] halt);
    logic [31:0] pc, npc, ins, a, b, res, nnpc;
    logic [5:0]  op, fn;
    int rs, rt, rd, dst, steps;
    bit urs, urt, ld;
    longint t, tnext, wt[32];
    bit     wl[32];
    for (int i = 0; i < 32; i++) begin wt[i] = -100; wl[i] = 0; end
    pc = BASE; npc = BASE + 4; t = -1; steps = 0;
    model_stall1 = 0; model_stall2 = 0;
    while (pc != halt && steps < 100000) begin
      ins = prog[(pc - BASE) >> 2];
      op = ins[31:26]; fn = ins[5:0];
      rs = int'(ins[25:21]); rt = int'(ins[20:16]); rd = int'(ins[15:11]);
      a = (rs == 0) ? 0 : mregs[rs];
      b = (rt == 0) ? 0 : mregs[rt];
      nnpc = npc + 4; dst = 0; res = 0; ld = 0;
      urs = 0; urt = 0;
      case (op)
        6'h00: begin
          urs = !(fn inside {6'h00, 6'h02, 6'h03});
          urt = !(fn inside {6'h08, 6'h09});
          dst = rd;
          case (fn)
            6'h00: res = b << ins[10:6];
            6'h02: res = b >> ins[10:6];
            6'h03: res = $unsigned($signed(b) >>> ins[10:6]);
            6'h04: res = b << a[4:0];
            6'h06: res = b >> a[4:0];
            6'h07: res = $unsigned($signed(b) >>> a[4:0]);
            6'h08: begin nnpc = a; dst = 0; end
            6'h09: begin nnpc = a; res = pc + 8; end
            6'h20, 6'h21: res = a + b;
            6'h22, 6'h23: res = a - b;
            6'h24: res = a & b;
            6'h25: res = a | b;
            6'h26: res = a ^ b;
            6'h27: res = ~(a | b);
            6'h2a: res = ($signed(a) < $signed(b)) ? 1 : 0;
            6'h2b: res = (a < b) ? 1 : 0;
            default: dst = 0;
          endcase
        end
        6'h02: nnpc = {npc[31:28], ins[25:0], 2'b00};
        6'h03: begin nnpc = {npc[31:28], ins[25:0], 2'b00}; dst = 31; res = pc + 8; end
        6'h04: begin urs = 1; urt = 1; if (a == b) nnpc = npc + (sx(ins[15:0]) << 2); end
        6'h05: begin urs = 1; urt = 1; if (a != b) nnpc = npc + (sx(ins[15:0]) << 2); end
        6'h08, 6'h09: begin urs = 1; dst = rt; res = a + sx(ins[15:0]); end
        6'h0a: begin urs = 1; dst = rt; res = ($signed(a) < $signed(sx(ins[15:0]))) ? 1 : 0; end
        6'h0b: begin urs = 1; dst = rt; res = (a < sx(ins[15:0])) ? 1 : 0; end
        6'h0c: begin urs = 1; dst = rt; res = a & {16'd0, ins[15:0]}; end
        6'h0d: begin urs = 1; dst = rt; res = a | {16'd0, ins[15:0]}; end
        6'h0e: begin urs = 1; dst = rt; res = a ^ {16'd0, ins[15:0]}; end
        6'h0f: begin dst = rt; res = {ins[15:0], 16'd0}; end
        6'h23: begin urs = 1; dst = rt; ld = 1; res = mmem[((a + sx(ins[15:0])) >> 2) % DW]; end
        6'h2b: begin urs = 1; urt = 1; mmem[((a + sx(ins[15:0])) >> 2) % DW] = b; end
        default: ;
      endcase
      // timing: enter RF one cycle after the previous, later if waiting for a lw
      tnext = t + 1;
      if (urs && rs != 0 && wl[rs] && wt[rs] + 3 > tnext) tnext = wt[rs] + 3;
      if (urt && rt != 0 && wl[rt] && wt[rt] + 3 > tnext) tnext = wt[rt] + 3;
      if (t >= 0 && tnext - t == 3) model_stall2++;
      if (t >= 0 && tnext - t == 2) model_stall1++;
      t = tnext;
      if (dst != 0) begin mregs[dst] = res; wt[dst] = t; wl[dst] = ld; end
      pc = npc; npc = nnpc; steps++;
    end
    model_cycles = t + 1;  // the halt enters RF one cycle after the last one
    model_instrs = steps;
  endtask

  // ---------------- mechanism counters ----------------
  int n_byp[7];
  int n_stall_cycles, n_taken, n_untaken, n_jump, n_jr, n_link, n_sw, n_lw;
  always @(posedge clk) if (!rst) begin
    if (dut.ctl_rf.uses_rs && !dut.stall) n_byp[dut.sel_a]++;
    if (dut.ctl_rf.uses_rt && !dut.stall) n_byp[dut.sel_b]++;
    if (dut.stall) n_stall_cycles++;
    if (!dut.stall && dut.v_reg) begin
      if (dut.ctl_rf.br inside {BR_BEQ, BR_BNE}) begin
        if (dut.pcsel == PCSEL_BT) n_taken++; else n_untaken++;
      end
      if (dut.pcsel == PCSEL_J) n_jump++;
      if (dut.pcsel == PCSEL_JT) n_jr++;
    end
    if (retire.valid && dut.ctl_wb.wdsel == WDSEL_PC) n_link++;
    if (retire.valid && dut.ctl_wb.wr) n_sw++;
    if (retire.valid && dut.ctl_wb.load) n_lw++;
  end

  // ---------------- run one program ----------------
  int n_programs = 0, total_stall2 = 0, total_stall1 = 0;

  task automatic run_program(string name);
    logic [31:0] halt;
    longint c_first, c_halt;
    bit seen_first, seen_halt;
    int fails_before;
    fails_before = failures;
    halt = here();
    prog.push_back(I(OP_BEQ, 0, 0, -1));
    prog.push_back(NOP);
    // load while in reset
    rst = 1'b1;
    @(negedge clk);
    foreach (prog[i]) begin
      imem_we = 1'b1; imem_waddr = BASE + 32'(i * 4); imem_wdata = prog[i];
      @(negedge clk);
    end
    imem_we = 1'b0;
    // give the model the design's starting state
    for (int r = 0; r < 32; r++) begin dbg_reg_addr = 5'(r); #1; mregs[r] = dbg_reg_data; end
    for (int w = 0; w < DW; w++) begin dbg_mem_addr = 32'(w * 4); #1; mmem[w] = dbg_mem_data; end
    run_model(halt);
    @(negedge clk);
    rst = 1'b0;
    seen_first = 0; seen_halt = 0; c_first = 0; c_halt = 0;
    while (!seen_halt) begin
      @(posedge clk); #1;
      if (retire.valid && !seen_first && retire.pc == BASE) begin seen_first = 1; c_first = cycle; end
      if (retire.valid && retire.pc == halt) begin seen_halt = 1; c_halt = cycle; end
    end
    repeat (6) @(posedge clk);
    #1;
    for (int r = 1; r < 32; r++) begin
      dbg_reg_addr = 5'(r); #1;
      checks++;
      if (dbg_reg_data !== mregs[r]) begin
        failures++;
        if (failures < 20) $display("%s: $%0d = %h, expected %h", name, r, dbg_reg_data, mregs[r]);
      end
    end
    for (int w = 0; w < DW; w++) begin
      dbg_mem_addr = 32'(w * 4); #1;
      if (dbg_mem_data !== mmem[w]) begin
        failures++;
        if (failures < 20) $display("%s: mem[%0d] = %h, expected %h", name, w, dbg_mem_data, mmem[w]);
      end
    end
    checks++;
    checks++;
    if (c_halt - c_first != model_cycles) begin
      failures++;
      $display("%s: %0d cycles from first to halt, expected %0d", name, c_halt - c_first, model_cycles);
    end
    total_stall2 += model_stall2; total_stall1 += model_stall1;
    n_programs++;
    $display("%s: %0d instructions, %0d cycles, %0d two-cycle and %0d one-cycle load stalls, %0d failures",
             name, model_instrs, c_halt - c_first, model_stall2, model_stall1, failures - fails_before);
    prog.delete();
  endtask

  // ---------------- programs ----------------
  task automatic prog_load_delay();
    // $9 = 0x100 base, memory word at 0x100 written first
    prog.push_back(I(OP_ADDIU, 9, 0, 32'h100));
    prog.push_back(I(OP_ADDIU, 12, 0, 77));
    prog.push_back(I(OP_SW, 12, 9, 0));
    prog.push_back(I(OP_ADDIU, 11, 0, 5));
    // lw $t4,0($t1); add $t5,$t1,$t4; xor $t6,$t3,$t4   (two-cycle stall)
    prog.push_back(I(OP_LW, 12, 9, 0));
    prog.push_back(R(FN_ADD, 13, 9, 12));
    prog.push_back(R(FN_XOR, 14, 11, 12));
    // lw; nop; add   (one-cycle stall)
    prog.push_back(I(OP_LW, 15, 9, 0));
    prog.push_back(NOP);
    prog.push_back(R(FN_ADD, 16, 15, 9));
    // lw; x; x; use  (no stall, WB bypass / register file)
    prog.push_back(I(OP_LW, 17, 9, 0));
    prog.push_back(R(FN_OR, 18, 11, 9));
    prog.push_back(R(FN_AND, 19, 11, 9));
    prog.push_back(R(FN_SUB, 20, 17, 11));
    // a later writer overrides the lw: no stall
    prog.push_back(I(OP_LW, 21, 9, 0));
    prog.push_back(I(OP_ADDIU, 21, 0, 3));
    prog.push_back(R(FN_ADD, 22, 21, 21));
    // lw feeding a store (store data) and a branch
    prog.push_back(I(OP_LW, 23, 9, 0));
    prog.push_back(I(OP_SW, 23, 9, 8));
    prog.push_back(I(OP_LW, 24, 9, 8));
    prog.push_back(I(OP_BEQ, 24, 23, 2));
    prog.push_back(I(OP_ADDIU, 25, 0, 1));  // delay slot, executed
    prog.push_back(I(OP_ADDIU, 26, 0, 1));  // skipped
    prog.push_back(I(OP_LUI, 27, 0, 32'h1234));
    prog.push_back(I(OP_ORI, 27, 27, 32'h5678));
  endtask

  task automatic prog_loop();
    // srl/add/bne loop: $t1 += $t0 while $t2 != 0, $t2 >>= 1 in the delay slot
    logic [31:0] loop;
    prog.push_back(I(OP_ADDIU, 8, 0, 3));     // $t0
    prog.push_back(I(OP_ADDIU, 9, 0, 0));     // $t1
    prog.push_back(I(OP_ADDIU, 10, 0, 200));  // $t2
    prog.push_back(R(FN_SRL, 10, 0, 10, 1));
    loop = here();
    prog.push_back(R(FN_ADD, 9, 9, 8));
    prog.push_back(I(OP_BNE, 0, 10, int'((loop - (here() + 4)) >>> 2)));
    prog.push_back(R(FN_SRL, 10, 0, 10, 1));
    prog.push_back(R(FN_ADDU, 2, 9, 0));      // mov $v0,$t1
  endtask

  task automatic prog_jal();
    // add $ra,$0,$0; jal f; addi $ra,$ra,4 (delay slot) ... f: xor $t0,$ra,$0;
    // or $1,$0,$ra; add $t2,$0,$ra. The delay slot moves the return point one
    // instruction on, so f returns to the second call.
    prog.push_back(R(FN_ADD, 31, 0, 0));           //  0
    prog.push_back(Jt(OP_JAL, BASE + 9 * 4));       //  1  jal f
    prog.push_back(I(OP_ADDI, 31, 31, 4));          //  2  reads $ra: jal in ALU
    prog.push_back(R(FN_ADDU, 20, 8, 1));           //  3  skipped
    prog.push_back(Jt(OP_JAL, BASE + 16 * 4));      //  4  jal g
    prog.push_back(NOP);                            //  5
    prog.push_back(R(FN_ADDU, 21, 16, 17));         //  6  g returns here
    prog.push_back(Jt(OP_J, BASE + 22 * 4));        //  7  to the halt
    prog.push_back(NOP);                            //  8
    prog.push_back(R(FN_XOR, 8, 31, 0));            //  9  f: reads $ra from the addi
    prog.push_back(R(FN_OR, 1, 0, 31));             // 10
    prog.push_back(R(FN_ADD, 10, 0, 31));           // 11
    prog.push_back(R(FN_JR, 0, 31, 0));             // 12
    prog.push_back(I(OP_ADDIU, 11, 10, 1));         // 13
    prog.push_back(NOP);                            // 14
    prog.push_back(NOP);                            // 15
    prog.push_back(R(FN_OR, 16, 31, 0));            // 16 g: jal in MEM
    prog.push_back(R(FN_ADDU, 17, 31, 0));          // 17    jal in WB
    prog.push_back(R(FN_XOR, 18, 31, 16));          // 18    register file
    prog.push_back(I(OP_ADDIU, 19, 0, 0));          // 19
    prog.push_back(R(FN_JALR, 30, 31, 0));          // 20 jalr $30,$ra
    prog.push_back(R(FN_ADDU, 22, 30, 0));          // 21 delay slot: jalr in ALU
  endtask

  task automatic prog_random(int n);
    int k, op, rd, rs, rt;
    prog.push_back(I(OP_ADDIU, 8, 0, 32'h200));  // $8: memory base, never overwritten
    for (int r = 1; r < 8; r++) prog.push_back(I(OP_ADDIU, r, 0, int'($urandom_range(0, 65535))));
    prog.push_back(I(OP_ADDIU, 31, 0, 12));
    k = 0;
    while (k < n) begin
      op = int'($urandom_range(0, 15));
      rd = int'($urandom_range(1, 7)); rs = int'($urandom_range(0, 7)); rt = int'($urandom_range(0, 7));
      if ($urandom_range(0, 5) == 0) rs = 31;
      if ($urandom_range(0, 5) == 0) rt = 31;
      if (op >= 14) begin
        // jal to the instruction after its delay slot: links $31 = its address + 8
        prog.push_back(Jt(OP_JAL, here() + 8));
        prog.push_back(R(FN_ADDU, rd, rs, rt));
        k++;
      end else if (op <= 3) begin
        logic [5:0] fns[13] = '{FN_ADD, FN_ADDU, FN_SUB, FN_SUBU, FN_AND, FN_OR, FN_XOR, FN_NOR,
                                FN_SLT, FN_SLTU, FN_SLLV, FN_SRLV, FN_SRAV};
        prog.push_back(R(fns[$urandom_range(0, 12)], rd, rs, rt));
      end else if (op == 4) begin
        logic [5:0] sfn[3] = '{FN_SLL, FN_SRL, FN_SRA};
        prog.push_back(R(sfn[$urandom_range(0, 2)], rd, 0, rt, int'($urandom_range(0, 31))));
      end else if (op <= 6) begin
        logic [5:0] ops[8] = '{OP_ADDI, OP_ADDIU, OP_SLTI, OP_SLTIU, OP_ANDI, OP_ORI, OP_XORI, OP_LUI};
        prog.push_back(I(ops[$urandom_range(0, 7)], rd, rs, int'($urandom_range(0, 65535))));
      end else if (op <= 9) begin
        prog.push_back(I(OP_LW, rd, 8, int'($urandom_range(0, 15)) * 4));
      end else if (op <= 11) begin
        prog.push_back(I(OP_SW, rt, 8, int'($urandom_range(0, 15)) * 4));
      end else begin
        // forward branch over 0..3 instructions, non-control delay slot
        prog.push_back(I((op == 12) ? OP_BEQ : OP_BNE, rt, rs, int'($urandom_range(1, 4))));
        prog.push_back(R(FN_ADDU, rd, rs, rt));
        for (int j = 0; j < 4; j++) prog.push_back(I(OP_ADDIU, rd, rd, int'($urandom_range(1, 9))));
        k += 5;
      end
      k++;
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    prog_load_delay(); run_program("load_delay");
    prog_loop();       run_program("branch_loop");
    prog_jal();        run_program("jal_bypass");
    for (int i = 0; i < 40; i++) begin
      prog_random(300);
      run_program($sformatf("random_%0d", i));
    end
    // every mechanism must have happened
    begin
      automatic string nm[7] = '{"zero", "register file", "ALU bypass", "PC^REG (jal in ALU) bypass",
                       "MEM bypass", "PC^ALU (jal in MEM) bypass", "WB bypass"};
      for (int s = 0; s < 7; s++) begin
        checks++;
        $display("operand source %-28s used %0d times", nm[s], n_byp[s]);
        if (n_byp[s] == 0) begin failures++; $display("never used: %s", nm[s]); end
      end
    end
    $display("stall cycles %0d, two-cycle stalls %0d, one-cycle stalls %0d", n_stall_cycles, total_stall2, total_stall1);
    $display("branches taken %0d, not taken %0d, j/jal %0d, jr/jalr %0d, links written %0d, sw %0d, lw %0d",
             n_taken, n_untaken, n_jump, n_jr, n_link, n_sw, n_lw);
    checks += 8;
    if (total_stall2 == 0) begin failures++; $display("no two-cycle load stall"); end
    if (total_stall1 == 0) begin failures++; $display("no one-cycle load stall"); end
    if (n_stall_cycles != 2 * total_stall2 + total_stall1) begin failures++; $display("stall cycle count mismatch"); end
    if (n_taken == 0 || n_untaken == 0) begin failures++; $display("branch outcomes not both seen"); end
    if (n_jump == 0) begin failures++; $display("no jump"); end
    if (n_jr == 0) begin failures++; $display("no jr"); end
    if (n_link == 0) begin failures++; $display("no link written"); end
    if (n_sw == 0 || n_lw == 0) begin failures++; $display("no load or store"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
