// minimips5: five-stage pipelined miniMIPS with its instruction and data memories.
//
// Stages: IF (PC, instruction memory, PC+4), RF (register read, bypass, branch
// decision), ALU, MEM (data memory access starts), WB (load data arrives, write
// back). Every stage keeps the instruction word (IR^REG, IR^ALU, IR^MEM, IR^WB)
// and its PC+4 (PC^REG, PC^ALU, PC^MEM, PC^WB) and decodes its own control.
//
// Hazards:
//  * Control: branches and jumps are resolved at the end of RF (mm_branch);
//    the one instruction fetched behind them, the delay slot, always executes.
//  * Data: two bypass blocks (mm_bypass, A for rs and B for rt) sit in front of
//    the ASEL/BSEL muxes, so the branch compare, the jump target JT and the store
//    data WD^ALU all see bypassed values. Sources: ALU output, Y^MEM, the WDSEL
//    output in WB, and for jal/jalr the PC pipeline.
//  * Load delay: lw data arrives only in WB. mm_interlock freezes PC, PC^REG and
//    IR^REG and puts a NOP into IR^ALU while the RF instruction needs it, so a
//    dependent instruction right after a lw waits 2 cycles, one two behind it 1.
//
// Return address. A jal/jalr writes the address of the instruction after its
// delay slot (its own address + 8). That value is the PC+4 carried by the
// instruction one stage behind it (the delay slot, or a bubble that copied the
// delay slot's PC when it was inserted). So the bypasses take it from PC^REG
// (link instruction in ALU) or PC^ALU (in MEM), and the WDSEL input 0 takes it
// from PC^MEM while the link instruction is in WB. The reference datapath
// wires WDSEL input 0 from PC^WB, which would hold the link instruction's own
// address + 4; here PC^WB only reports the retiring instruction's address.
// This choice is this design's.
//
// Reset (synchronous, active high) loads PC with 0x80000000, the reset vector,
// and fills the pipeline with bubbles. The trap vectors 0x80000040 and
// 0x80000080 and the $27 write address of the reference datapath are not
// implemented.
// Memory sizes and the program-load and inspection ports are this design's.
module minimips5
  import mm_pkg::*;
#(
  parameter int          IMEM_WORDS = 1024,
  parameter int          DMEM_WORDS = 1024,
  parameter logic [31:0] RESET_PC   = 32'h8000_0000
) (
  input  logic        clk,
  input  logic        rst,
  // program load
  input  logic        imem_we,
  input  logic [31:0] imem_waddr,
  input  logic [31:0] imem_wdata,
  // inspection
  input  logic [4:0]  dbg_reg_addr,
  output logic [31:0] dbg_reg_data,
  input  logic [31:0] dbg_mem_addr,
  output logic [31:0] dbg_mem_data,
  output retire_t     retire
);
  // ---------------- pipeline registers ----------------
  logic [31:0] pc, pc_reg, ir_reg;
  logic        v_reg;
  logic [31:0] pc_alu, ir_alu, a_alu, b_alu, wd_alu;
  logic        v_alu;
  logic [31:0] pc_mem, ir_mem, y_mem, wd_mem;
  logic        v_mem;
  logic [31:0] pc_wb, ir_wb, y_wb;
  logic        v_wb;

  // ---------------- IF ----------------
  logic [31:0] pc_inc, imem_d, next_pc;
  logic        fetch_en, nop_alu, stall;

  assign pc_inc = pc + 32'd4;

  mm_imem #(.WORDS(IMEM_WORDS)) u_imem (
    .clk, .a(pc), .d(imem_d), .we(imem_we), .waddr(imem_waddr), .wdata(imem_wdata)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      pc     <= RESET_PC;
      pc_reg <= RESET_PC;
      ir_reg <= NOP_INSTR;
      v_reg  <= 1'b0;
    end else if (fetch_en) begin
      pc     <= next_pc;
      pc_reg <= pc_inc;
      ir_reg <= imem_d;
      v_reg  <= 1'b1;
    end
  end

  // ---------------- RF ----------------
  ctl_t        ctl_rf, ctl_alu, ctl_mem, ctl_wb;
  logic [31:0] rd1, rd2, a_val, b_val, a_in, b_in, imm_ext;
  logic [31:0] alu_y, wd_wb, mem_rd;
  logic        wait_a, wait_b, bz;
  byp_e        sel_a, sel_b;
  pcsel_e      pcsel;
  fwd_t        fwd_alu, fwd_mem, fwd_wb;
  logic [4:0]  wa_wb;

  mm_decode u_dec_rf  (.ir(ir_reg), .ctl(ctl_rf));
  mm_decode u_dec_alu (.ir(ir_alu), .ctl(ctl_alu));
  mm_decode u_dec_mem (.ir(ir_mem), .ctl(ctl_mem));
  mm_decode u_dec_wb  (.ir(ir_wb),  .ctl(ctl_wb));

  mm_regfile u_rf (
    .clk,
    .ra1(ir_reg[25:21]), .rd1(rd1),
    .ra2(ir_reg[20:16]), .rd2(rd2),
    .we(ctl_wb.werf), .wa(wa_wb), .wd(wd_wb),
    .ra3(dbg_reg_addr), .rd3(dbg_reg_data)
  );

  assign fwd_alu = '{dest: dest_reg(ctl_alu, ir_alu), load: ctl_alu.load, link: ctl_alu.wdsel == WDSEL_PC};
  assign fwd_mem = '{dest: dest_reg(ctl_mem, ir_mem), load: ctl_mem.load, link: ctl_mem.wdsel == WDSEL_PC};
  assign fwd_wb  = '{dest: wa_wb, load: 1'b0, link: 1'b0};

  mm_bypass u_byp_a (
    .src(ir_reg[25:21]), .rf_val(rd1), .fwd_alu, .fwd_mem, .fwd_wb,
    .alu_y, .pc_reg, .y_mem, .pc_alu, .wd_wb, .val(a_val), .sel(sel_a), .load_wait(wait_a)
  );
  mm_bypass u_byp_b (
    .src(ir_reg[20:16]), .rf_val(rd2), .fwd_alu, .fwd_mem, .fwd_wb,
    .alu_y, .pc_reg, .y_mem, .pc_alu, .wd_wb, .val(b_val), .sel(sel_b), .load_wait(wait_b)
  );

  mm_interlock u_ilk (
    .uses_rs(ctl_rf.uses_rs), .uses_rt(ctl_rf.uses_rt), .wait_a, .wait_b,
    .stall, .fetch_en, .nop_alu
  );

  mm_branch u_br (
    .br(ctl_rf.br), .ir(ir_reg), .pc_reg, .pc_inc, .a(a_val), .b(b_val),
    .bz, .pcsel, .next_pc
  );

  always_comb begin
    imm_ext = ctl_rf.sext ? {{16{ir_reg[15]}}, ir_reg[15:0]} : {16'd0, ir_reg[15:0]};
    unique case (ctl_rf.asel)
      ASEL_SHAMT: a_in = {27'd0, ir_reg[10:6]};
      ASEL_16:    a_in = 32'd16;
      default:    a_in = a_val;
    endcase
    b_in = (ctl_rf.bsel == BSEL_IMM) ? imm_ext : b_val;
  end

  // RF -> ALU. A bubble still copies PC^REG, so PC^ALU keeps holding the
  // return address of a link instruction one stage ahead.
  always_ff @(posedge clk) begin
    if (rst) begin
      ir_alu <= NOP_INSTR;
      v_alu  <= 1'b0;
      pc_alu <= RESET_PC;
    end else begin
      ir_alu <= nop_alu ? NOP_INSTR : ir_reg;
      v_alu  <= nop_alu ? 1'b0 : v_reg;
      pc_alu <= pc_reg;
    end
    a_alu  <= a_in;
    b_alu  <= b_in;
    wd_alu <= b_val;
  end

  // ---------------- ALU ----------------
  logic fl_n, fl_v, fl_c, fl_z;

  mm_alu u_alu (
    .a(a_alu), .b(b_alu), .alufn(ctl_alu.alufn), .y(alu_y),
    .n(fl_n), .v(fl_v), .c(fl_c), .z(fl_z)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      ir_mem <= NOP_INSTR;
      v_mem  <= 1'b0;
      pc_mem <= RESET_PC;
    end else begin
      ir_mem <= ir_alu;
      v_mem  <= v_alu;
      pc_mem <= pc_alu;
    end
    y_mem  <= alu_y;
    wd_mem <= wd_alu;
  end

  // ---------------- MEM ----------------
  mm_dmem #(.WORDS(DMEM_WORDS)) u_dmem (
    .clk, .adr(y_mem), .wd(wd_mem), .wr(ctl_mem.wr && !rst), .rd(mem_rd),
    .dbg_adr(dbg_mem_addr), .dbg_rd(dbg_mem_data)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      ir_wb <= NOP_INSTR;
      v_wb  <= 1'b0;
      pc_wb <= RESET_PC;
    end else begin
      ir_wb <= ir_mem;
      v_wb  <= v_mem;
      pc_wb <= pc_mem;
    end
    y_wb <= y_mem;
  end

  // ---------------- WB ----------------
  always_comb begin
    wa_wb = dest_reg(ctl_wb, ir_wb);
    unique case (ctl_wb.wdsel)
      WDSEL_PC:  wd_wb = pc_mem;   // return address: PC+4 of the delay slot
      WDSEL_MEM: wd_wb = mem_rd;
      default:   wd_wb = y_wb;
    endcase
  end

  assign retire = '{valid: v_wb, pc: pc_wb - 32'd4, stall: stall};

  // The pipeline never stalls on anything but a lw in ALU or MEM.
  a_stall_cause: assert property (@(posedge clk) disable iff (rst)
    stall |-> (ctl_alu.load || ctl_mem.load));
endmodule
