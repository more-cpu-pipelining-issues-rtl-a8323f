// tb_mm_imem: test of the instruction memory. Words are written through the
// load port at byte addresses and read back combinationally at the same and at
// aliased addresses (bits [1:0] ignored, wrap modulo the size).
module tb_mm_imem;
  localparam int W = 64;
  logic        clk = 0, we = 0;
  logic [31:0] a = 0, d, waddr = 0, wdata = 0;
  logic [31:0] shadow [W];
  int checks = 0, failures = 0;

  mm_imem #(.WORDS(W)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < W; i++) begin
      @(negedge clk); we = 1; waddr = 32'h8000_0000 + 32'(4 * i); wdata = $urandom; shadow[i] = wdata;
    end
    @(negedge clk); we = 0;
    repeat (500) begin
      int i;
      i = int'($urandom_range(0, W - 1));
      a = 32'h8000_0000 + 32'(4 * i) + 32'($urandom_range(0, 3)) + 32'(W * 4 * $urandom_range(0, 3));
      #1;
      checks++;
      if (d !== shadow[i]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
