// cr_control_tb: self-checking test of the time-redundant CR controller with the
// stopper, register-file unit and bus modelled in the testbench. Directed slices:
//   - checkpoint in the first cycle after reset;
//   - run 1 write blocked and recorded, rollback through STOP / REC_PIPE / REC_RF;
//   - run 2 equal write passed to the bus (waiting for ready), checkpoint one cycle
//     after the bus accepts it;
//   - run 2 different write -> second rollback -> run 3 voted (majority with run 1 and
//     with run 2);
//   - three different writes -> error, processor kept stopped;
//   - stack overflow -> error;
//   - a write arriving while a rollback is pending is held.
// The rollback is checked to last 1 + K cycles from the grant for K saved registers.
module cr_control_tb;
  import cr_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  bus_req_t   preq;
  logic       bus_ready, rf_done, rf_ovf, stop_grtd;
  wmux_sel_e  sel;
  wr_t        voted;
  logic       ckpt, restore, rf_recover, stop_req, err;
  cr_state_e  st;
  cr_events_t ev;
  int         K = 0;   // saved registers in the modelled stack
  int         rcnt = 0;
  logic       sreq_d1 = 0, sreq_d2 = 0;

  cr_control dut (.clk, .rst_n, .proc_req_i(preq), .bus_ready_i(bus_ready),
    .wmux_sel_o(sel), .voted_o(voted), .ckpt_o(ckpt), .restore_o(restore),
    .rf_recover_o(rf_recover), .rf_done_i(rf_done), .rf_overflow_i(rf_ovf),
    .stop_req_o(stop_req), .stop_grtd_i(stop_grtd), .error_o(err), .state_o(st),
    .events_o(ev));

  // stopper model: granted two cycles after the request
  always @(posedge clk) begin
    sreq_d1 <= stop_req;
    sreq_d2 <= sreq_d1 && stop_req;
  end
  assign stop_grtd = stop_req && sreq_d2;
  // register-file unit model: pops one entry per cycle from the REC_PIPE cycle on
  always @(posedge clk) rcnt <= rf_recover ? 0 : rcnt + 1;
  assign rf_done = rf_recover ? (K == 0) : (st == S_REC_RF && rcnt + 1 >= K);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s (state %s)", what, st.name()); end
  endtask

  task automatic idle();
    @(negedge clk); preq = '0; bus_ready = 1;
  endtask

  // Present a write until the bus accepts it (ready after `wait_cycles`), checking the
  // mux selection on the way. Returns at the negedge after the accepting cycle.
  task automatic do_write(wr_t w, wmux_sel_e exp_sel, int wait_cycles);
    @(negedge clk);
    preq = '{req: 1, we: 1, addr: w.addr, wdata: w.data};
    for (int i = 0; i < wait_cycles; i++) begin
      bus_ready = 0;
      #1 check(sel == exp_sel, $sformatf("mux selection %s while waiting", exp_sel.name()));
      check(!ev.match && !ev.voted, "no completion while the bus waits");
      @(negedge clk);
    end
    bus_ready = 1;
    #1 check(sel == exp_sel, $sformatf("mux selection %s, got %s", exp_sel.name(), sel.name()));
    @(negedge clk);
    preq = '0;
  endtask

  // Wait through a rollback, holding a second write meanwhile, and check its timing.
  task automatic rollback(int k, cr_state_e resume);
    int cyc;
    K = k;
    check(st == S_STOP && stop_req, "rollback requested");
    preq = '{req: 1, we: 1, addr: 32'hF00, wdata: 32'h1};
    #1 check(sel == WM_HOLD, "write held while rollback pending");
    while (!stop_grtd) begin @(negedge clk); #1; end
    @(negedge clk);
    preq = '0;
    #1 check(st == S_REC_PIPE && restore && rf_recover, "pipeline restore cycle");
    cyc = 1;
    @(negedge clk);
    while (st == S_REC_RF) begin
      #1 check(!restore && stop_req, "register unwind, processor stopped");
      cyc++;
      @(negedge clk);
    end
    check(cyc == k + 1, $sformatf("rollback took %0d cycles for %0d registers", cyc, k));
    check(st == resume, $sformatf("resumed in %s", resume.name()));
  endtask

  wr_t w1, w2, w3;

  initial begin
    preq = '0; bus_ready = 1; rf_ovf = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    @(negedge clk);
    check(ckpt && ev.ckpt, "checkpoint of the reset state");
    idle();
    check(!ckpt && st == S_RUN1, "then running slice 1");

    for (int round = 0; round < 6; round++) begin
      w1 = '{addr: $urandom(), data: $urandom()};
      // run 1
      @(negedge clk);
      preq = '{req: 1, we: 1, addr: w1.addr, wdata: w1.data};
      #1 check(sel == WM_BLOCK && ev.rollback, "run-1 write blocked, rollback starts");
      @(negedge clk); preq = '0;
      rollback(round, S_RUN2);
      // run 2: equal
      do_write(w1, WM_PASS, round % 3);
      check(ckpt && ev.ckpt, "checkpoint the cycle after the write");
      check(st == S_RUN1, "next slice");
    end

    // mismatch then vote with run 1
    w1 = '{addr: 32'h100, data: 32'hAAAA};
    w2 = '{addr: 32'h100, data: 32'hAAAB};
    @(negedge clk); preq = '{req: 1, we: 1, addr: w1.addr, wdata: w1.data};
    @(negedge clk); preq = '0;
    rollback(3, S_RUN2);
    @(negedge clk); preq = '{req: 1, we: 1, addr: w2.addr, wdata: w2.data};
    #1 check(sel == WM_BLOCK && ev.mismatch && ev.rollback, "mismatch: blocked, second rollback");
    @(negedge clk); preq = '0;
    rollback(2, S_RUN3);
    @(negedge clk); preq = '{req: 1, we: 1, addr: w1.addr, wdata: w1.data}; bus_ready = 1;
    #1 check(sel == WM_VOTE && voted == w1 && ev.voted, "vote picks runs 1 and 3");
    @(negedge clk); preq = '0;
    check(ckpt, "checkpoint after the voted write");

    // mismatch then vote with run 2
    @(negedge clk); preq = '{req: 1, we: 1, addr: w1.addr, wdata: w1.data};
    @(negedge clk); preq = '0;
    rollback(1, S_RUN2);
    @(negedge clk); preq = '{req: 1, we: 1, addr: w2.addr, wdata: w2.data};
    @(negedge clk); preq = '0;
    rollback(1, S_RUN3);
    @(negedge clk); preq = '{req: 1, we: 1, addr: w2.addr, wdata: w2.data};
    #1 check(sel == WM_VOTE && voted == w2 && ev.voted, "vote picks runs 2 and 3");
    @(negedge clk); preq = '0;

    // three different results
    w3 = '{addr: 32'h104, data: 32'h5};
    @(negedge clk); preq = '{req: 1, we: 1, addr: w1.addr, wdata: w1.data};
    @(negedge clk); preq = '0;
    rollback(0, S_RUN2);
    @(negedge clk); preq = '{req: 1, we: 1, addr: w2.addr, wdata: w2.data};
    @(negedge clk); preq = '0;
    rollback(0, S_RUN3);
    @(negedge clk); preq = '{req: 1, we: 1, addr: w3.addr, wdata: w3.data};
    #1 check(sel == WM_HOLD && ev.error, "no majority: write held, error event");
    @(negedge clk);
    check(st == S_ERROR && err && stop_req, "error state halts the processor");
    repeat (5) @(negedge clk);
    check(st == S_ERROR && err, "error is kept");
    preq = '0;

    // overflow
    rst_n = 0;
    @(negedge clk); rst_n = 1;
    idle();
    @(negedge clk); rf_ovf = 1;
    #1 check(ev.error, "overflow error event");
    @(negedge clk); rf_ovf = 0;
    check(st == S_ERROR && err, "overflow halts");

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
