// mm_imem: instruction memory of the miniMIPS.
//
// WORDS words of 32 bits, read combinationally at the byte address on A (the
// PC; bits [1:0] are ignored and the address wraps modulo the memory size), so
// that the IR^REG pipeline register can capture the instruction at the end of
// the IF stage. A synchronous write port lets a loader place a program before
// reset is released. Size and load port are this design's choices.
module mm_imem #(
  parameter int WORDS = 1024,
  localparam int AW = $clog2(WORDS)
) (
  input  logic        clk,
  input  logic [31:0] a,
  output logic [31:0] d,
  input  logic        we,
  input  logic [31:0] waddr,
  input  logic [31:0] wdata
);
  logic [31:0] mem [WORDS];

  always_ff @(posedge clk)
    if (we) mem[waddr[AW+1:2]] <= wdata;

  assign d = mem[a[AW+1:2]];
endmodule
