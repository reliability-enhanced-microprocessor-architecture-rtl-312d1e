// ckpt_stack_tb: self-checking test of the 64-entry checkpoint stack. A queue in the
// testbench is the reference LIFO. It checks push/pop order and the visible top, the
// occupancy count, flush, flush together with push (leaves only the new entry), and
// that a push into a full stack is dropped and flagged as overflow.
module ckpt_stack_tb;
  import cr_pkg::*;

  localparam int unsigned DEPTH = STACK_DEPTH;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic push = 1'b0, pop = 1'b0, flush = 1'b0;
  logic [RF_AW+DATA_W-1:0] pd = '0, top;
  logic empty, full, ovf;
  logic [6:0] count;
  logic [RF_AW+DATA_W-1:0] model[$];

  ckpt_stack dut (.clk, .rst_n, .push, .push_data(pd), .pop, .flush, .top_o(top),
                  .empty_o(empty), .full_o(full), .overflow_o(ovf), .count_o(count));

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic check_state();
    check(int'(count) == model.size(), $sformatf("count %0d vs %0d", count, model.size()));
    check(empty == (model.size() == 0), "empty flag");
    check(full == (model.size() == DEPTH), "full flag");
    if (model.size() > 0) check(top == model[$], "top entry");
  endtask

  task automatic do_push(logic [RF_AW+DATA_W-1:0] d);
    @(negedge clk); push = 1; pd = d;
    #1 check(ovf == (model.size() == DEPTH), "overflow flag on push");
    @(posedge clk); #1 push = 0;
    if (model.size() < DEPTH) model.push_back(d);
    check_state();
  endtask

  task automatic do_pop();
    @(negedge clk); pop = 1;
    @(posedge clk); #1 pop = 0;
    if (model.size() > 0) void'(model.pop_back());
    check_state();
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    #1 check_state();
    for (int i = 0; i < 10; i++) do_push({$urandom(), $urandom()});
    for (int i = 0; i < 4; i++) do_pop();
    for (int i = 0; i < 200; i++) begin
      if ($urandom_range(2) != 0) do_push({$urandom(), $urandom()});
      else do_pop();
    end
    // fill to full and overflow
    while (model.size() < DEPTH) do_push({$urandom(), $urandom()});
    do_push(40'h55_1234_5678);
    check(model[$] != 40'h55_1234_5678 || DEPTH == 0, "full push dropped");
    // flush
    @(negedge clk); flush = 1;
    @(posedge clk); #1 flush = 0; model.delete();
    check_state();
    // flush with push
    do_push(40'h01_0000_0001);
    do_push(40'h02_0000_0002);
    @(negedge clk); flush = 1; push = 1; pd = 40'h03_0000_0003;
    @(posedge clk); #1 flush = 0; push = 0;
    model.delete(); model.push_back(40'h03_0000_0003);
    check_state();
    do_pop();
    do_pop();   // pop of an empty stack does nothing
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
