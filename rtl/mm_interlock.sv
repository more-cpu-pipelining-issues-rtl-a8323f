// mm_interlock: load interlock of the 5-stage miniMIPS.
//
// A lw returns its data only in the WB stage, so an instruction in RF that
// reads the destination of a lw in the ALU stage must wait two cycles, and one
// that reads the destination of a lw in the MEM stage must wait one. While an
// operand the RF instruction actually uses is waiting (load_wait from that
// operand's bypass block), the interlock drops the clock enables of the PC,
// PC^REG and IR^REG registers, freezing IF and RF, and switches the mux in
// front of IR^ALU to a NOP, so a bubble enters the ALU stage. No instruction is
// annulled. Combinational; the decision is re-made every cycle, so a stall
// lasts until the lw reaches WB and the WB bypass can supply the value.
module mm_interlock (
  input  logic uses_rs,
  input  logic uses_rt,
  input  logic wait_a,   // operand A (rs) waits for a lw
  input  logic wait_b,   // operand B (rt) waits for a lw
  output logic stall,
  output logic fetch_en, // clock enable for PC, PC^REG, IR^REG
  output logic nop_alu   // select NOP into IR^ALU
);
  assign stall    = (uses_rs && wait_a) || (uses_rt && wait_b);
  assign fetch_en = !stall;
  assign nop_alu  = stall;
endmodule
