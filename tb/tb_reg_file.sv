// tb_reg_file: self-checking test of the register file.
// Writes random values into x1-x31 and reads them back on both read ports,
// checks that x0 reads 0 even after a write to it, that we = 0 leaves the
// registers unchanged, and that a read in the cycle of a write returns the
// old value until the clock edge. A shadow array in the testbench holds the
// expected contents.
module tb_reg_file;
  logic        clk = 0, we;
  logic [4:0]  ra1, ra2, wa;
  logic [31:0] wd, rd1, rd2;
  logic [31:0] shadow [32];
  int checks = 0, failures = 0;

  reg_file dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write(int a, logic [31:0] v, logic en = 1);
    @(negedge clk);
    we = en; wa = 5'(a); wd = v;
    @(posedge clk);
    #1 we = 0;
    if (en && a != 0) shadow[a] = v;
  endtask

  task automatic read_check(int a1, int a2);
    ra1 = 5'(a1); ra2 = 5'(a2);
    #1;
    checks += 2;
    if (rd1 !== shadow[a1]) begin failures++; $display("FAIL rd1 x%0d=%h exp %h", a1, rd1, shadow[a1]); end
    if (rd2 !== shadow[a2]) begin failures++; $display("FAIL rd2 x%0d=%h exp %h", a2, rd2, shadow[a2]); end
  endtask

  initial begin
    we = 0; wa = 0; wd = 0; ra1 = 0; ra2 = 0;
    foreach (shadow[i]) shadow[i] = 0;
    for (int i = 0; i < 32; i++) write(i, $urandom);
    for (int i = 0; i < 32; i++) read_check(i, 31 - i);
    write(0, 32'hDEAD_BEEF);                 // dropped
    read_check(0, 0);
    write(7, 32'h1234_5678, 0);              // we = 0: no change
    read_check(7, 7);
    // read during write: old value before the edge, new after
    @(negedge clk);
    we = 1; wa = 5'd9; wd = 32'hCAFE_F00D; ra1 = 5'd9; ra2 = 5'd9;
    #1; checks++;
    if (rd1 !== shadow[9]) begin failures++; $display("FAIL read-during-write before edge"); end
    @(posedge clk); #1 we = 0; shadow[9] = 32'hCAFE_F00D;
    read_check(9, 9);
    for (int k = 0; k < 2000; k++) begin
      write($urandom_range(0, 31), $urandom, 1'($urandom));
      read_check($urandom_range(0, 31), $urandom_range(0, 31));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
