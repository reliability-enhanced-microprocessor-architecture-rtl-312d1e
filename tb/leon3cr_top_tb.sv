// leon3cr_top_tb: end-to-end test of the time-redundant checkpoint/recovery system at
// its default sizes (3689-bit state checkpoint, 64-entry stack, 256-entry register
// file). A behavioural processor (cpu_model) runs real programs through leon3cr_top;
// the testbench supplies the memory with random wait states, the GPIO output
// register and a two-master bus arbiter (the AHB stopper has priority; while it owns
// the bus the processor gets no grant and stands still).
//
// Scenarios, each from reset:
//   1 checksum (67-character NMEA sentence, 5 runs), no fault
//   2 checksum, single upset in the store-data pipeline register during run 1
//   3 checksum, single upset during run 2
//   4 checksum, a different upset in each of runs 1, 2 and 3: three different results
//   5 checksum, upset of a register-file entry written in the current slice (run 1),
//     injected as an inverted bit on the register's write
//   6 basic arithmetic loop (5 runs), no fault, then with an upset in run 1
//   7 a loop of 100 register writes without a memory write: stack overflow
// Every memory write that reaches the bus is compared in order with a list computed
// here from the program's meaning. Each rollback's duration (stopper grant to release)
// is checked against 1 + (stack entries) cycles, and the stopper must own the bus
// (request, lock and grant) in every recovery cycle. The testbench counts how often each
// mechanism happened (checkpoint, rollback, compare match, mismatch, vote, error,
// overflow, held write, bus wait state, register unwind) and fails any that never did.
module leon3cr_top_tb;
  import cr_pkg::*;

  localparam int unsigned SB      = STATE_W;
  localparam int unsigned IRUNS   = 5;
  localparam string       NMEA    = "GPGGA,092750.000,5321.6802,N,00630.3372,W,1,8,1.03,61.7,M,55.2,M,,,";
  localparam int unsigned STR_LEN = NMEA.len();
  localparam logic [31:0] GPIO_OUT = 32'h8000_0804;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  // DUT and processor
  logic [SB-1:0] state, ckpt_state, seu_mask;
  logic          restore, seu, halted;
  logic [2:0]    prog;
  rf_req_t       rf, rf_dut;
  logic [31:0]   rf_flip = '0;       // upset injected into a register write
  always_comb begin
    rf_dut       = rf;
    rf_dut.wdata = rf.wdata ^ rf_flip;
  end
  logic [31:0]   rd1, rd2;
  bus_req_t      cpu_bus, bus_req;
  bus_rsp_t      cpu_rsp, bus_rsp;
  logic          s_busreq, s_lock, s_write, s_grant;
  logic [1:0]    s_trans;
  logic [31:0]   s_addr;
  logic          cr_error;
  cr_state_e     cr_state;
  cr_events_t    ev;
  logic [6:0]    stack_count;

  cpu_model #(.STATE_BITS(SB), .IRUNS(IRUNS), .STR_LEN(STR_LEN)) u_cpu (
    .clk, .rst_n, .prog_i(prog), .grant_i(!s_grant),
    .state_o(state), .ckpt_state_i(ckpt_state), .restore_i(restore),
    .seu_i(seu), .seu_mask_i(seu_mask),
    .rf_o(rf), .rdata1_i(rd1), .rdata2_i(rd2),
    .bus_o(cpu_bus), .bus_i(cpu_rsp), .halted_o(halted), .st_latch_o(st_latch)
  );

  leon3cr_top dut (
    .clk, .rst_n,
    .proc_state_i(state), .proc_ckpt_state_o(ckpt_state), .proc_restore_o(restore),
    .proc_rf_i(rf_dut), .proc_rdata1_o(rd1), .proc_rdata2_o(rd2),
    .proc_bus_i(cpu_bus), .proc_bus_o(cpu_rsp),
    .bus_req_o(bus_req), .bus_rsp_i(bus_rsp),
    .stop_hbusreq_o(s_busreq), .stop_hlock_o(s_lock), .stop_htrans_o(s_trans),
    .stop_hwrite_o(s_write), .stop_haddr_o(s_addr), .stop_hgrant_i(s_grant),
    .hready_i(1'b1),
    .cr_error_o(cr_error), .cr_state_o(cr_state), .cr_events_o(ev),
    .cr_stack_count_o(stack_count)
  );

  // Arbiter: the stopper wins; grant follows the request one cycle later.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s_grant <= 1'b0;
    else        s_grant <= s_busreq;
  end

  // Memory (4 KiB) and GPIO output register, with random wait states.
  logic [31:0] mem [1024];
  logic [31:0] gpio;
  logic        mem_ready;
  always_ff @(posedge clk) mem_ready <= ($urandom_range(3) != 0);
  assign bus_rsp.ready = mem_ready;
  assign bus_rsp.rdata = mem[bus_req.addr[11:2]];

  // Expected write list and observed writes
  wr_t exp_q[$];
  int  n_writes = 0;
  logic st_latch;
  always @(posedge clk) begin
    if (rst_n && bus_req.req && bus_req.we && bus_rsp.ready) begin
      n_writes <= n_writes + 1;
      if (bus_req.addr == GPIO_OUT) gpio <= bus_req.wdata;
      else if (bus_req.addr < 32'h1000) mem[bus_req.addr[11:2]] <= bus_req.wdata;
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL: unexpected write %h <= %h", bus_req.addr, bus_req.wdata);
      end else begin
        if (exp_q[0] != '{addr: bus_req.addr, data: bus_req.wdata}) begin
          failures++;
          $display("FAIL: write %h <= %h, expected %h <= %h", bus_req.addr, bus_req.wdata,
                   exp_q[0].addr, exp_q[0].data);
        end
        void'(exp_q.pop_front());
      end
    end
  end

  // Mechanism counters
  int c_ckpt = 0, c_rollback = 0, c_match = 0, c_mismatch = 0, c_voted = 0, c_error = 0;
  int c_hold = 0, c_wait = 0, c_unwind = 0, c_overflow = 0, c_grant = 0;
  int rec_cycles = 0, rec_entries = 0;
  logic in_rec = 1'b0;
  always @(posedge clk) begin
    if (rst_n) begin
      c_ckpt     <= c_ckpt + int'(ev.ckpt);
      c_rollback <= c_rollback + int'(ev.rollback);
      c_match    <= c_match + int'(ev.match);
      c_mismatch <= c_mismatch + int'(ev.mismatch);
      c_voted    <= c_voted + int'(ev.voted);
      c_error    <= c_error + int'(ev.error);
      c_hold     <= c_hold + int'(cr_state == S_STOP && cpu_bus.req && cpu_bus.we);
      c_wait     <= c_wait + int'(bus_req.req && !bus_rsp.ready);
      c_unwind   <= c_unwind + int'(cr_state inside {S_REC_PIPE, S_REC_RF} && stack_count != 0);
      c_overflow <= c_overflow + int'(stack_count == 7'(STACK_DEPTH) && rf.we &&
                                     cr_state inside {S_RUN1, S_RUN2, S_RUN3});
      c_grant    <= c_grant + int'(cr_state == S_REC_PIPE);   // entered only on a grant
      // the recovery may only run while the stopper owns the bus
      if (cr_state inside {S_REC_PIPE, S_REC_RF}) begin
        checks++;
        if (!(s_grant && s_busreq && s_lock)) begin
          failures++;
          $display("FAIL: recovery while the stopper does not own the bus");
        end
      end
      // rollback duration: REC_PIPE + REC_RF cycles must be 1 + saved registers
      if (cr_state == S_REC_PIPE) begin
        rec_cycles  <= 1;
        rec_entries <= int'(stack_count);
        in_rec      <= 1'b1;
      end else if (cr_state == S_REC_RF) begin
        rec_cycles <= rec_cycles + 1;
      end else if (in_rec) begin
        in_rec <= 1'b0;
        checks++;
        if (rec_cycles != rec_entries + 1) begin
          failures++;
          $display("FAIL: rollback took %0d cycles for %0d registers", rec_cycles, rec_entries);
        end
      end
    end else begin
      in_rec <= 1'b0;
    end
  end

  // ---- expected results, computed from the programs' meaning ----
  function automatic logic [31:0] str_char(int k);
    return 32'(NMEA[k]);
  endfunction

  task automatic expect_checksum();
    logic [31:0] c;
    for (int i = 0; i < IRUNS; i++) begin
      exp_q.push_back('{addr: GPIO_OUT, data: i});
      c = 0;
      for (int k = 0; k < STR_LEN; k++) begin
        c ^= str_char(k);
        exp_q.push_back('{addr: 32'h40, data: c});
      end
      exp_q.push_back('{addr: 32'h800 + 4 * i, data: c});
      exp_q.push_back('{addr: GPIO_OUT, data: 0});
    end
    exp_q.push_back('{addr: GPIO_OUT, data: IRUNS});
  endtask

  task automatic expect_basic();
    for (int i = 0; i < IRUNS; i++) exp_q.push_back('{addr: 32'h800 + 4 * i, data: (9 + 8) - (4 + 5)});
  endtask

  task automatic do_reset(logic [2:0] p);
    rst_n = 1'b0;
    prog  = p;
    seu   = 1'b0;
    seu_mask = '0;
    exp_q.delete();
    n_writes = 0;
    for (int i = 0; i < 1024; i++) mem[i] = 32'hDEAD_0000 + i;
    for (int k = 0; k < STR_LEN; k++) mem[(32'h100 >> 2) + k] = str_char(k);
    mem[32'h80 >> 2] = 9; mem[32'h84 >> 2] = 8; mem[32'h88 >> 2] = 4; mem[32'h8C >> 2] = 5;
    gpio = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
  endtask

  // Slices are counted in checkpoints from reset, the reset checkpoint included.
  // Flip one state bit at the first cycle in which the controller is in run `run`
  // of slice `slice` and the processor latches a store's address and data, so the
  // flipped bit lands in the store pipeline registers (st_addr_q / st_data_q).
  task automatic inject_store(int slice, cr_state_e run, int bitpos);
    int base;
    base = c_ckpt;
    forever begin
      @(negedge clk);
      if (c_ckpt - base >= slice && cr_state == run && st_latch) break;
    end
    seu_mask = '0;
    seu_mask[bitpos] = 1'b1;
    seu = 1'b1;
    @(negedge clk);
    seu = 1'b0;
  endtask

  // Corrupt the value written to register `r` by the instruction at pc `pc` during run
  // `run` of slice `slice` (bit `bitpos` inverted on its way into the register file),
  // as an upset of that register right after the write would.
  task automatic inject_rf(int slice, cr_state_e run, int pc, int r, int bitpos);
    int base;
    base = c_ckpt;
    forever begin
      @(negedge clk);
      if (c_ckpt - base >= slice && cr_state == run && state[71:64] == 8'(pc) &&
          rf.we && rf.waddr == 8'(r)) break;
    end
    rf_flip = 32'd1 << bitpos;
    @(negedge clk);
    rf_flip = '0;
  endtask

  task automatic wait_done(int max_cycles);
    int n;
    n = 0;
    while (!(halted && cr_state == S_RUN1) && !cr_error && n < max_cycles) begin
      @(posedge clk);
      n++;
    end
    repeat (4) @(posedge clk);
  endtask

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  int m0, v0, e0, w0;

  initial begin
    // 1: fault-free checksum
    do_reset(3'd0);
    expect_checksum();
    m0 = c_mismatch;
    w0 = exp_q.size();
    wait_done(200000);
    check(exp_q.size() == 0, "scenario 1: all writes done");
    check(c_mismatch == m0, "scenario 1: no mismatch without a fault");
    check(!cr_error, "scenario 1: no error");
    check(n_writes == w0, "scenario 1: one bus write per store");
    check(gpio == IRUNS, "scenario 1: GPIO shows finished");

    // 2: upset in run 1
    do_reset(3'd0);
    expect_checksum();
    m0 = c_mismatch; v0 = c_voted;
    inject_store(3, S_RUN1, 5);
    wait_done(200000);
    check(exp_q.size() == 0, "scenario 2: all writes done and correct");
    check(c_mismatch == m0 + 1 && c_voted == v0 + 1, "scenario 2: one mismatch, one vote");
    check(!cr_error, "scenario 2: no error");

    // 3: upset in run 2
    do_reset(3'd0);
    expect_checksum();
    m0 = c_mismatch; v0 = c_voted;
    inject_store(20, S_RUN2, 40);   // an address bit
    wait_done(200000);
    check(exp_q.size() == 0, "scenario 3: all writes done and correct");
    check(c_mismatch == m0 + 1 && c_voted == v0 + 1, "scenario 3: one mismatch, one vote");
    check(!cr_error, "scenario 3: no error");

    // 4: three different results
    do_reset(3'd0);
    expect_checksum();
    e0 = c_error;
    inject_store(2, S_RUN1, 1);
    inject_store(0, S_RUN2, 2);
    inject_store(0, S_RUN3, 3);
    wait_done(20000);
    check(cr_error, "scenario 4: error raised");
    check(c_error == e0 + 1, "scenario 4: one error event");
    check(n_writes == 1, "scenario 4: only the write verified before the faulty slice reached memory");
    repeat (50) @(posedge clk);
    check(n_writes == 1 && cr_state == S_ERROR, "scenario 4: processor stays halted");

    // 5: register-file upset of a register written in this slice
    do_reset(3'd0);
    expect_checksum();
    m0 = c_mismatch; v0 = c_voted;
    inject_rf(6, S_RUN1, 8, 1, 7);  // r1 = running checksum, being updated
    wait_done(200000);
    check(exp_q.size() == 0, "scenario 5: all writes done and correct");
    check(c_mismatch == m0 + 1 && c_voted == v0 + 1, "scenario 5: one mismatch, one vote");

    // 6: basic arithmetic, without and with an upset
    do_reset(3'd1);
    expect_basic();
    m0 = c_mismatch;
    wait_done(50000);
    check(exp_q.size() == 0 && !cr_error && c_mismatch == m0, "scenario 6a: basic correct");
    do_reset(3'd1);
    expect_basic();
    m0 = c_mismatch;
    inject_store(2, S_RUN1, 0);
    wait_done(50000);
    check(exp_q.size() == 0 && !cr_error && c_mismatch == m0 + 1, "scenario 6b: basic corrected");

    // 7: stack overflow
    do_reset(3'd2);
    e0 = c_error;
    wait_done(5000);
    check(cr_error && c_error == e0 + 1, "scenario 7: overflow stops the processor");
    check(n_writes == 0, "scenario 7: nothing written");

    // every mechanism must have happened
    check(c_ckpt > 0,     "mechanism: checkpoint");
    check(c_rollback > 0, "mechanism: rollback");
    check(c_match > 0,    "mechanism: compare match");
    check(c_mismatch > 0, "mechanism: mismatch");
    check(c_voted > 0,    "mechanism: majority vote");
    check(c_error > 0,    "mechanism: error halt");
    check(c_overflow > 0, "mechanism: stack overflow");
    check(c_hold > 0,     "mechanism: write held during rollback");
    check(c_wait > 0,     "mechanism: bus wait state");
    check(c_unwind > 0,   "mechanism: register unwind");
    check(c_grant > 0,    "mechanism: stopper grant");
    $display("mechanisms: ckpt=%0d rollback=%0d match=%0d mismatch=%0d vote=%0d error=%0d overflow=%0d hold=%0d wait=%0d unwind=%0d grant=%0d",
             c_ckpt, c_rollback, c_match, c_mismatch, c_voted, c_error, c_overflow, c_hold,
             c_wait, c_unwind, c_grant);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
