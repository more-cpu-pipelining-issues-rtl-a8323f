// mm_alu: the ALU of the miniMIPS ALU stage.
//
// Combinational. Computes y = A op B for the function selected by alufn
// (add, sub, and, or, xor, nor, signed and unsigned set-less-than, and the
// three shifts, which shift B by A[4:0]; lui is sll with A = 16). It also
// reports the N, V, C and Z flags of A-B (for ALU_SUB/SLT/SLTU) or A+B (for all
// others), as the reference datapath has them leaving the ALU. The flags are
// not needed by the pipeline, whose branch compare is done in the RF stage.
// The function set follows the MIPS subset; the encoding is this design's own.
module mm_alu
  import mm_pkg::*;
(
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  alufn_e      alufn,
  output logic [31:0] y,
  output logic        n,
  output logic        v,
  output logic        c,
  output logic        z
);
  logic        sub;
  logic [32:0] sum;
  logic        lt_s;

  always_comb begin
    sub  = (alufn == ALU_SUB) || (alufn == ALU_SLT) || (alufn == ALU_SLTU);
    sum  = {1'b0, a} + {1'b0, (sub ? ~b : b)} + 33'(sub);
    n    = sum[31];
    v    = (a[31] == (sub ? ~b[31] : b[31])) && (sum[31] != a[31]);
    c    = sum[32];
    lt_s = n ^ v;
    unique case (alufn)
      ALU_ADD, ALU_SUB: y = sum[31:0];
      ALU_AND:          y = a & b;
      ALU_OR:           y = a | b;
      ALU_XOR:          y = a ^ b;
      ALU_NOR:          y = ~(a | b);
      ALU_SLT:          y = {31'd0, lt_s};
      ALU_SLTU:         y = {31'd0, ~c};
      ALU_SLL:          y = b << a[4:0];
      ALU_SRL:          y = b >> a[4:0];
      ALU_SRA:          y = $unsigned($signed(b) >>> a[4:0]);
      default:          y = sum[31:0];
    endcase
    z = (sum[31:0] == 32'd0);
  end
endmodule
