// cr_data_tb: self-checking test of the pipeline checkpoint store at its full width
// (3689 bits). The state input changes every cycle; the saved copy must equal the state
// seen in the last checkpoint cycle, whatever happens in between, and the restore
// strobe must be passed to the processor in the same cycle.
module cr_data_tb;
  import cr_pkg::*;

  localparam int unsigned W = STATE_W;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [W-1:0] st, saved, expv;
  logic ckpt = 0, restore = 0, restore_o;

  cr_data dut (.clk, .rst_n, .state_i(st), .ckpt_i(ckpt), .restore_i(restore),
               .ckpt_state_o(saved), .restore_o);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [W-1:0] rnd();
    for (int i = 0; i < W; i += 32) rnd[i +: 32] = $urandom();
  endfunction

  initial begin
    st = rnd();
    repeat (2) @(posedge clk);
    #1 check(saved == '0, "cleared by reset");
    rst_n = 1;
    expv = '0;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      st = rnd();
      ckpt = ($urandom_range(3) == 0);
      restore = !ckpt && ($urandom_range(3) == 0);
      #1 check(restore_o == restore, "restore strobe passed through");
      if (ckpt) expv = st;
      @(posedge clk); #1;
      check(saved == expv, "saved copy equals state of the last checkpoint");
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
