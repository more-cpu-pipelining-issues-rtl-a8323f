// tb_mm_interlock: exhaustive test of the load interlock. The stall (and with
// it the frozen fetch enable and the NOP into IR^ALU) must be raised exactly
// when an operand the instruction uses is waiting for a load.
module tb_mm_interlock;
  logic uses_rs, uses_rt, wait_a, wait_b, stall, fetch_en, nop_alu;
  int checks = 0, failures = 0;

  mm_interlock dut (.*);

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      logic e;
      {uses_rs, uses_rt, wait_a, wait_b} = 4'(v);
      #1;
      e = (uses_rs & wait_a) | (uses_rt & wait_b);
      checks += 3;
      if (stall !== e) failures++;
      if (fetch_en !== !e) failures++;
      if (nop_alu !== e) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
