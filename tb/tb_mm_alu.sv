// tb_mm_alu: random and corner-case test of the miniMIPS ALU.
// Each function is applied to random operands and to a set of corner values;
// the result and the Z flag are compared with values computed here from
// SystemVerilog operators.
module tb_mm_alu;
  import mm_pkg::*;
  logic [31:0] a, b, y;
  alufn_e      fn;
  logic        n, v, c, z;
  int checks = 0, failures = 0;

  mm_alu dut (.a, .b, .alufn(fn), .y, .n, .v, .c, .z);

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] expect_y(alufn_e f, logic [31:0] x, logic [31:0] w);
    case (f)
      ALU_ADD:  return x + w;
      ALU_SUB:  return x - w;
      ALU_AND:  return x & w;
      ALU_OR:   return x | w;
      ALU_XOR:  return x ^ w;
      ALU_NOR:  return ~(x | w);
      ALU_SLT:  return ($signed(x) < $signed(w)) ? 32'd1 : 32'd0;
      ALU_SLTU: return (x < w) ? 32'd1 : 32'd0;
      ALU_SLL:  return w << x[4:0];
      ALU_SRL:  return w >> x[4:0];
      ALU_SRA:  return $unsigned($signed(w) >>> x[4:0]);
      default:  return 32'hx;
    endcase
  endfunction

  logic [31:0] corner[6] = '{32'h0, 32'h1, 32'hffff_ffff, 32'h7fff_ffff, 32'h8000_0000, 32'd16};

  task automatic one(alufn_e f, logic [31:0] x, logic [31:0] w);
    logic [31:0] e, s;
    fn = f; a = x; b = w; #1;
    e = expect_y(f, x, w);
    s = (f inside {ALU_SUB, ALU_SLT, ALU_SLTU}) ? x - w : x + w;
    checks += 2;
    if (y !== e) begin
      failures++;
      if (failures < 10) $display("fn %s a=%h b=%h: y=%h expected %h", f.name(), x, w, y, e);
    end
    if (z !== (s == 0)) failures++;
  endtask

  initial begin
    for (int f = 0; f <= int'(ALU_SRA); f++) begin
      foreach (corner[i]) foreach (corner[j]) one(alufn_e'(f), corner[i], corner[j]);
      repeat (500) one(alufn_e'(f), $urandom, $urandom);
    end
    // lui: 16 << imm
    one(ALU_SLL, 32'd16, 32'h0000_abcd);
    checks++;
    if (y !== 32'habcd_0000) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
