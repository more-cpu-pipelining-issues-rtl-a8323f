// mm_regfile: the miniMIPS register file.
//
// NREGS words of 32 bits with two combinational read ports (RA1/RD1 for rs,
// RA2/RD2 for rt), read in the RF stage, and one write port (WA/WD/WE) written
// at the rising clock edge that ends the WB stage. A read in the same cycle as a
// write to the same register returns the old value; the pipeline covers that
// case with its WB bypass. Writes to register 0 are dropped; reads of register
// 0 return whatever the array holds, since the bypass logic selects a constant
// 0 for $0. A third read port serves inspection. No reset: register contents
// are undefined until written, as in MIPS.
module mm_regfile #(
  parameter int NREGS = 32,
  localparam int AW = $clog2(NREGS)
) (
  input  logic          clk,
  input  logic [AW-1:0] ra1,
  output logic [31:0]   rd1,
  input  logic [AW-1:0] ra2,
  output logic [31:0]   rd2,
  input  logic          we,
  input  logic [AW-1:0] wa,
  input  logic [31:0]   wd,
  input  logic [AW-1:0] ra3,
  output logic [31:0]   rd3
);
  logic [31:0] regs [NREGS];

  always_ff @(posedge clk)
    if (we && wa != '0) regs[wa] <= wd;

  assign rd1 = regs[ra1];
  assign rd2 = regs[ra2];
  assign rd3 = regs[ra3];
endmodule
