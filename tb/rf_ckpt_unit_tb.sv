// rf_ckpt_unit_tb: self-checking test of the register-file checkpoint unit, connected
// to the real stack memory and 4-port register file. Each round takes a checkpoint of
// the register file (a copy kept in the testbench), performs a random number of random
// register writes through the processor port, then starts a recovery. Checks: every
// write pushes exactly one entry; recovery writes the registers back so the whole
// register file equals the checkpoint copy; it takes N + 1 cycles for N saved entries
// (one register per cycle); processor reads pass through; writes pushed into a full
// stack raise the sticky overflow flag, cleared by the next checkpoint.
module rf_ckpt_unit_tb;
  import cr_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  rf_req_t      prf;
  logic [31:0]  prd1, prd2;
  logic [7:0]   a1, a2, a4, wa;
  logic [31:0]  d1, d2, d4, wd;
  logic         we;
  logic         push, pop, flush, empty, sovf;
  stack_entry_t pdata, top;
  logic [6:0]   count;
  logic         ckpt = 0, rstart = 0, busy, done, ovf;
  logic [31:0]  snap [256];

  rf_ckpt_unit dut (.clk, .rst_n, .proc_rf_i(prf), .proc_rdata1_o(prd1), .proc_rdata2_o(prd2),
    .rf_raddr1_o(a1), .rf_raddr2_o(a2), .rf_raddr4_o(a4), .rf_waddr_o(wa), .rf_wdata_o(wd),
    .rf_we_o(we), .rf_rdata1_i(d1), .rf_rdata2_i(d2), .rf_rdata4_i(d4),
    .st_push_o(push), .st_push_data_o(pdata), .st_pop_o(pop), .st_flush_o(flush),
    .st_top_i(top), .st_empty_i(empty), .st_overflow_i(sovf),
    .ckpt_i(ckpt), .recover_start_i(rstart), .recover_busy_o(busy), .recover_done_o(done),
    .overflow_o(ovf));

  ckpt_stack u_stack (.clk, .rst_n, .push, .push_data(pdata), .pop, .flush, .top_o(top),
    .empty_o(empty), .full_o(), .overflow_o(sovf), .count_o(count));

  regfile_4p u_rf (.clk, .raddr1(a1), .rdata1(d1), .raddr2(a2), .rdata2(d2),
    .raddr4(a4), .rdata4(d4), .waddr(wa), .wdata(wd), .we);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic rf_write(logic [7:0] a, logic [31:0] d);
    @(negedge clk);
    prf.waddr = a; prf.wdata = d; prf.we = 1;
    @(posedge clk); #1 prf.we = 0;
  endtask

  task automatic take_ckpt();
    @(negedge clk); ckpt = 1;
    @(posedge clk); #1 ckpt = 0;
    for (int i = 0; i < 256; i++) snap[i] = u_rf.mem[i];
    check(count == 0, "checkpoint flushes the stack");
    check(!ovf, "checkpoint clears overflow");
  endtask

  task automatic recover(int n_expected);
    int cyc;
    logic d;
    @(negedge clk); rstart = 1;
    cyc = 1;
    #1 d = done;
    while (!d && cyc < 100) begin
      @(negedge clk); rstart = 0;
      cyc++;
      #1 d = done;
    end
    @(negedge clk); rstart = 0;
    check(cyc == n_expected + 1, $sformatf("recovery took %0d cycles for %0d entries", cyc, n_expected));
    #1 check(!busy, "unwind finished");
    for (int i = 0; i < 256; i++) check(u_rf.mem[i] == snap[i], $sformatf("register %0d restored", i));
  endtask

  initial begin
    prf = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 256; i++) rf_write(8'(i), $urandom());
    take_ckpt();
    for (int round = 0; round < 12; round++) begin
      int n;
      n = $urandom_range(0, 40);
      for (int k = 0; k < n; k++) begin
        rf_write(8'($urandom_range(0, 15)), $urandom());
        check(int'(count) == k + 1, "one push per write");
      end
      // read ports pass through
      @(negedge clk); prf.raddr1 = 8'($urandom()); prf.raddr2 = 8'($urandom());
      #1 check(prd1 == u_rf.mem[prf.raddr1] && prd2 == u_rf.mem[prf.raddr2], "reads pass through");
      if (round % 2 == 0) recover(n);
      else begin
        take_ckpt();
      end
    end
    // overflow
    take_ckpt();
    for (int k = 0; k < STACK_DEPTH; k++) rf_write(8'(k), $urandom());
    check(!ovf, "no overflow at exactly 64 entries");
    rf_write(8'd3, 32'h1234);
    check(ovf, "overflow on the 65th write");
    rf_write(8'd4, 32'h1234);
    check(ovf, "overflow is sticky");
    take_ckpt();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
