// mm_dmem: data memory of the 5-stage miniMIPS.
//
// The load address (Y^MEM) is available right after a lw enters the MEM stage,
// and its data is needed only just before the clock edge that ends the WB
// stage, which gives the memory nearly two clock periods. This model registers
// the addressed word at the edge that ends MEM, so rd is valid throughout the
// WB cycle and feeds the WDSEL mux there. A store (wr=1) writes WD at the same
// edge. Byte addresses, word access only (bits [1:0] ignored, address wraps
// modulo the size). A second, combinational read port serves inspection.
// The word size of the access and the one-register timing model are this
// design's choices; the size is not given.
module mm_dmem #(
  parameter int WORDS = 1024,
  localparam int AW = $clog2(WORDS)
) (
  input  logic        clk,
  input  logic [31:0] adr,
  input  logic [31:0] wd,
  input  logic        wr,
  output logic [31:0] rd,
  input  logic [31:0] dbg_adr,
  output logic [31:0] dbg_rd
);
  logic [31:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (wr) mem[adr[AW+1:2]] <= wd;
    rd <= mem[adr[AW+1:2]];
  end

  assign dbg_rd = mem[dbg_adr[AW+1:2]];
endmodule
