// tb_mm_dmem: test of the data memory's timing and contents. A read address
// given in one cycle (the MEM stage) must give its word in the next cycle (the
// WB stage); a write takes effect at the end of its cycle; back-to-back random
// reads and writes are checked against a shadow array, as is the inspection port.
module tb_mm_dmem;
  localparam int W = 64;
  logic        clk = 0, wr = 0;
  logic [31:0] adr = 0, wd = 0, rd, dbg_adr = 0, dbg_rd;
  logic [31:0] shadow [W];
  logic [31:0] expect_rd;
  int checks = 0, failures = 0;

  mm_dmem #(.WORDS(W)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < W; i++) begin
      @(negedge clk); wr = 1; adr = 32'(4 * i); wd = $urandom; shadow[i] = wd;
    end
    @(negedge clk); wr = 0;
    repeat (3000) begin
      int i;
      @(negedge clk);
      i = int'($urandom_range(0, W - 1));
      wr = 1'($urandom); adr = 32'(4 * i); wd = $urandom;
      dbg_adr = 32'(4 * $urandom_range(0, W - 1));
      #1;
      checks++;
      if (dbg_rd !== shadow[dbg_adr[7:2]]) failures++;
      expect_rd = shadow[i];        // word read at this edge: old contents
      @(posedge clk);
      if (wr) shadow[i] = wd;
      #1;
      checks++;
      if (rd !== expect_rd) begin
        failures++;
        if (failures < 10) $display("read %h: %h expected %h", adr, rd, expect_rd);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
