// mm_bypass: bypass detection and bypass mux for one source operand.
//
// The pipeline has two copies: one for operand A, compared against rs, and one
// for operand B, compared against rt. The source register number is compared
// with the destination register of the instructions now in the ALU, MEM and WB
// stages (a stage whose instruction writes no register offers destination 0).
// Priority follows the 5-bit comparator network of the reference bypass logic:
//   src == 0                      -> constant 0
//   else matches ALU stage        -> ALU bypass
//   else matches MEM stage        -> MEM bypass
//   else matches WB stage         -> WB bypass (output of the WDSEL mux)
//   else                          -> register file
// A jal/jalr writes a return address that comes from the PC pipeline, not from
// the ALU: the PC+4 of the instruction one stage behind it, which is the
// instruction after the delay slot. So a link instruction in the ALU stage is
// bypassed from PC^REG and one in the MEM stage from PC^ALU (in WB the WDSEL
// mux already selects it). A lw in the ALU or MEM stage has no data yet: the
// block then raises load_wait and the interlock stalls. Combinational.
module mm_bypass
  import mm_pkg::*;
(
  input  logic [4:0]  src,      // rs or rt of the instruction in RF
  input  logic [31:0] rf_val,   // RD1 or RD2
  input  fwd_t        fwd_alu,
  input  fwd_t        fwd_mem,
  input  fwd_t        fwd_wb,
  input  logic [31:0] alu_y,    // ALU output (ALU stage)
  input  logic [31:0] pc_reg,   // PC^REG
  input  logic [31:0] y_mem,    // Y^MEM
  input  logic [31:0] pc_alu,   // PC^ALU
  input  logic [31:0] wd_wb,    // WDSEL mux output (WB stage)
  output logic [31:0] val,
  output byp_e        sel,
  output logic        load_wait
);
  logic nz, m_alu, m_mem, m_wb;

  always_comb begin
    nz    = (src != 5'd0);
    m_alu = nz && (src == fwd_alu.dest);
    m_mem = nz && (src == fwd_mem.dest) && !m_alu;
    m_wb  = nz && (src == fwd_wb.dest) && !m_alu && !(src == fwd_mem.dest);

    if (!nz)        sel = BYP_ZERO;
    else if (m_alu) sel = fwd_alu.link ? BYP_ALU_PC : BYP_ALU;
    else if (m_mem) sel = fwd_mem.link ? BYP_MEM_PC : BYP_MEM;
    else if (m_wb)  sel = BYP_WB;
    else            sel = BYP_RF;

    load_wait = (m_alu && fwd_alu.load) || (m_mem && fwd_mem.load);

    unique case (sel)
      BYP_ZERO:   val = 32'd0;
      BYP_ALU:    val = alu_y;
      BYP_ALU_PC: val = pc_reg;
      BYP_MEM:    val = y_mem;
      BYP_MEM_PC: val = pc_alu;
      BYP_WB:     val = wd_wb;
      default:    val = rf_val;
    endcase
  end
endmodule
