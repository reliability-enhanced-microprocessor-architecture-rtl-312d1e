// regfile_4p_tb: self-checking test of the 4-port register file. A reference array in
// the testbench tracks every write. Checks: both normal read ports, and that the fourth
// port, addressed with the write address, shows the value being overwritten in the
// cycle of the write (the old value the checkpoint unit saves).
module regfile_4p_tb;
  import cr_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [7:0]  ra1, ra2, ra4, wa;
  logic [31:0] rd1, rd2, rd4, wd;
  logic        we;
  logic [31:0] ref_mem [256];

  regfile_4p dut (.clk, .raddr1(ra1), .rdata1(rd1), .raddr2(ra2), .rdata2(rd2),
                  .raddr4(ra4), .rdata4(rd4), .waddr(wa), .wdata(wd), .we);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    we = 0; wa = 0; wd = 0; ra1 = 0; ra2 = 0; ra4 = 0;
    // fill every register
    for (int i = 0; i < 256; i++) begin
      @(negedge clk); wa = 8'(i); wd = $urandom(); we = 1; ref_mem[i] = wd;
    end
    @(negedge clk); we = 0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      ra1 = 8'($urandom()); ra2 = 8'($urandom()); wa = 8'($urandom()); ra4 = wa;
      wd = $urandom(); we = ($urandom_range(1) == 1);
      #1;
      check(rd1 == ref_mem[ra1], "read port 1");
      check(rd2 == ref_mem[ra2], "read port 2");
      check(rd4 == ref_mem[wa], "fourth port shows the value being overwritten");
      @(posedge clk);
      if (we) ref_mem[wa] = wd;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
