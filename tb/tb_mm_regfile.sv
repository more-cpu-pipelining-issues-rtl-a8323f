// tb_mm_regfile: test of the two-read, one-write register file.
// Random writes and reads against a shadow array: both read ports and the
// inspection port return the last value written, a read in the write's cycle
// returns the old value, and writes to register 0 are dropped.
module tb_mm_regfile;
  logic        clk = 0, we = 0;
  logic [4:0]  ra1 = 0, ra2 = 0, ra3 = 0, wa = 0;
  logic [31:0] rd1, rd2, rd3, wd = 0;
  logic [31:0] shadow [32];
  int checks = 0, failures = 0;

  mm_regfile dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill every register
    for (int r = 0; r < 32; r++) begin
      @(negedge clk); we = 1; wa = 5'(r); wd = $urandom; shadow[r] = wd;
    end
    @(negedge clk); we = 0;
    #1; ra3 = 0; #1;
    // register 0 was written by nothing: remember what it holds
    shadow[0] = rd3;
    repeat (2000) begin
      @(negedge clk);
      we = 1'($urandom); wa = 5'($urandom); wd = $urandom;
      ra1 = 5'($urandom); ra2 = 5'($urandom); ra3 = 5'($urandom);
      #1;
      checks += 3;
      if (rd1 !== shadow[ra1]) failures++;
      if (rd2 !== shadow[ra2]) failures++;
      if (rd3 !== shadow[ra3]) failures++;
      @(posedge clk);
      if (we && wa != 0) shadow[wa] = wd;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
