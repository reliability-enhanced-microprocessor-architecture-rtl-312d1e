// leon3cr_workloads_tb: runs the four benchmark workloads of the time-redundant
// checkpoint/recovery system on leon3cr_top at its default sizes, each once without a
// fault and once with a single upset in the store pipeline register of a randomly
// chosen slice and run. The programs run on the behavioural processor (cpu_model):
//   basic   x = (a+b)-(c+d), 50 iterations
//   bsort   fill a 10-element vector with 9..0, bubble-sort it, verify; 5 times
//   nmea    XOR checksum of a 67-character NMEA sentence; 5 times
//   hamming Hamming(7,4) encoding of a 4-bit message with the generator matrix; 5 times
// Memory has random wait states; the arbiter gives the AHB stopper priority one cycle
// after its request.
// Checks: every memory write that reaches the bus, in order, against a list computed
// here from the program's meaning (the sort and the encoding are recomputed in the
// testbench); no error; exactly one mismatch and one vote in a faulty run and none in
// a fault-free one; every rollback restores 1 + N cycles for N saved registers; the
// stack never overflows. Per workload it prints the slice count, the average number of
// register-file entries saved per rollback and the average rollback length (cycles
// from the blocked write until the processor runs again, bus arbitration included).
// Finally a campaign of 200 single upsets at random cycles in random bits of the
// processor state classifies the outcomes of the nmea workload (see seu_campaign).
module leon3cr_workloads_tb;
  import cr_pkg::*;

  localparam int unsigned SB         = STATE_W;
  localparam int unsigned IRUNS      = 5;
  localparam int unsigned BASIC_RUNS = 50;
  localparam string       NMEA       = "GPGGA,092750.000,5321.6802,N,00630.3372,W,1,8,1.03,61.7,M,55.2,M,,,";
  localparam int unsigned STR_LEN    = NMEA.len();
  localparam logic [31:0] GPIO_OUT   = 32'h8000_0804;
  localparam logic [31:0] RES_BASE   = 32'h0000_0800;
  localparam logic [31:0] ARR_BASE   = 32'h0000_0300;
  localparam logic [31:0] GMAT       = 32'h0000_0400;
  localparam logic [31:0] DVEC       = 32'h0000_0480;
  localparam logic [31:0] VER        = 32'h0000_0490;
  localparam logic [31:0] MSG        = 32'h0000_04C0;
  // Hamming(7,4) generator matrix (rows = code-word bits), message and its code word
  localparam logic [3:0]  GROW [7]   = '{4'b1101, 4'b1011, 4'b1000, 4'b0111, 4'b0100, 4'b0010, 4'b0001};
  localparam logic [3:0]  DATA       = 4'b1010;   // bit 3 = first message bit

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [SB-1:0] state, ckpt_state, seu_mask;
  logic          restore, seu, halted, st_latch;
  logic [2:0]    prog;
  rf_req_t       rf;
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

  cpu_model #(.STATE_BITS(SB), .IRUNS(IRUNS), .STR_LEN(STR_LEN), .BASIC_RUNS(BASIC_RUNS)) u_cpu (
    .clk, .rst_n, .prog_i(prog), .grant_i(!s_grant),
    .state_o(state), .ckpt_state_i(ckpt_state), .restore_i(restore),
    .seu_i(seu), .seu_mask_i(seu_mask),
    .rf_o(rf), .rdata1_i(rd1), .rdata2_i(rd2),
    .bus_o(cpu_bus), .bus_i(cpu_rsp), .halted_o(halted), .st_latch_o(st_latch)
  );

  leon3cr_top dut (
    .clk, .rst_n,
    .proc_state_i(state), .proc_ckpt_state_o(ckpt_state), .proc_restore_o(restore),
    .proc_rf_i(rf), .proc_rdata1_o(rd1), .proc_rdata2_o(rd2),
    .proc_bus_i(cpu_bus), .proc_bus_o(cpu_rsp),
    .bus_req_o(bus_req), .bus_rsp_i(bus_rsp),
    .stop_hbusreq_o(s_busreq), .stop_hlock_o(s_lock), .stop_htrans_o(s_trans),
    .stop_hwrite_o(s_write), .stop_haddr_o(s_addr), .stop_hgrant_i(s_grant),
    .hready_i(1'b1),
    .cr_error_o(cr_error), .cr_state_o(cr_state), .cr_events_o(ev),
    .cr_stack_count_o(stack_count)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s_grant <= 1'b0;
    else        s_grant <= s_busreq;
  end

  logic [31:0] mem [1024];
  logic        mem_ready;
  always_ff @(posedge clk) mem_ready <= ($urandom_range(3) != 0);
  assign bus_rsp.ready = mem_ready;
  assign bus_rsp.rdata = mem[bus_req.addr[11:2]];

  // In the upset campaign (campaign = 1) a wrong write is an outcome to classify, not
  // a testbench failure: it is counted in wrong_writes.
  wr_t exp_q[$];
  bit  campaign = 1'b0;
  int  wrong_writes = 0;
  always @(posedge clk) begin
    if (rst_n && bus_req.req && bus_req.we && bus_rsp.ready) begin
      if (bus_req.addr < 32'h1000) mem[bus_req.addr[11:2]] <= bus_req.wdata;
      if (campaign) begin
        if (exp_q.size() == 0 || exp_q[0] != '{addr: bus_req.addr, data: bus_req.wdata})
          wrong_writes++;
        if (exp_q.size() != 0) void'(exp_q.pop_front());
      end else begin
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
  end

  // Statistics: rollbacks, stack entries restored, rollback length
  int c_ckpt = 0, c_rb = 0, c_mm = 0, c_vote = 0, c_ovf = 0;
  int rb_cycles = 0, rb_entries = 0;   // totals
  int cur_len = 0, rec_len = 0, rec_n = 0;
  int cycle = 0;                       // cycles since the current reset
  always @(posedge clk) cycle <= rst_n ? cycle + 1 : 0;
  logic in_rb = 1'b0;
  always @(posedge clk) begin
    if (rst_n) begin
      c_ckpt <= c_ckpt + int'(ev.ckpt);
      c_mm   <= c_mm + int'(ev.mismatch);
      c_vote <= c_vote + int'(ev.voted);
      c_ovf  <= c_ovf + int'(stack_count == 7'(STACK_DEPTH) && rf.we &&
                             cr_state inside {S_RUN1, S_RUN2, S_RUN3});
      if (ev.rollback) begin
        in_rb   <= 1'b1;
        cur_len <= 1;
        c_rb    <= c_rb + 1;
      end else if (in_rb) begin
        if (cr_state inside {S_STOP, S_REC_PIPE, S_REC_RF}) cur_len <= cur_len + 1;
        if (cr_state == S_REC_PIPE) begin
          rec_len    <= 1;
          rec_n      <= int'(stack_count);
          rb_entries <= rb_entries + int'(stack_count);
        end else if (cr_state == S_REC_RF) begin
          rec_len <= rec_len + 1;
        end else if (cr_state inside {S_RUN1, S_RUN2, S_RUN3}) begin
          in_rb     <= 1'b0;
          rb_cycles <= rb_cycles + cur_len;
          checks++;
          if (rec_len != rec_n + 1) begin
            failures++;
            $display("FAIL: rollback restored %0d registers in %0d cycles", rec_n, rec_len);
          end
        end
      end
    end else begin
      in_rb <= 1'b0;
    end
  end

  // ---- expected write lists ----
  task automatic expect_basic();
    for (int i = 0; i < BASIC_RUNS; i++) exp_q.push_back('{addr: RES_BASE + 4 * i, data: 8});
  endtask

  task automatic expect_nmea();
    logic [31:0] c;
    for (int i = 0; i < IRUNS; i++) begin
      exp_q.push_back('{addr: GPIO_OUT, data: i});
      c = 0;
      for (int k = 0; k < STR_LEN; k++) begin
        c ^= 32'(NMEA[k]);
        exp_q.push_back('{addr: 32'h40, data: c});
      end
      exp_q.push_back('{addr: RES_BASE + 4 * i, data: c});
      exp_q.push_back('{addr: GPIO_OUT, data: 0});
    end
    exp_q.push_back('{addr: GPIO_OUT, data: IRUNS});
  endtask

  task automatic expect_bsort();
    int a [10];
    int lim, t;
    bit swapped;
    for (int i = 0; i < IRUNS; i++) begin
      exp_q.push_back('{addr: GPIO_OUT, data: i});
      for (int k = 0; k < 10; k++) begin
        a[k] = 9 - k;
        exp_q.push_back('{addr: ARR_BASE + 4 * k, data: a[k]});
      end
      lim = 9;
      do begin
        swapped = 0;
        for (int y = 0; y < lim; y++) begin
          if (a[y + 1] < a[y]) begin
            t = a[y]; a[y] = a[y + 1]; a[y + 1] = t;
            exp_q.push_back('{addr: ARR_BASE + 4 * y, data: a[y]});
            exp_q.push_back('{addr: ARR_BASE + 4 * y + 4, data: a[y + 1]});
            swapped = 1;
          end
        end
        lim--;
      end while (swapped);
      exp_q.push_back('{addr: RES_BASE + 4 * i, data: 0});
      exp_q.push_back('{addr: GPIO_OUT, data: 0});
    end
    exp_q.push_back('{addr: GPIO_OUT, data: IRUNS});
  endtask

  task automatic expect_hamming();
    int acc;
    for (int i = 0; i < IRUNS; i++) begin
      exp_q.push_back('{addr: GPIO_OUT, data: i});
      for (int r = 0; r < 7; r++) begin
        acc = 0;
        for (int c = 0; c < 4; c++) begin
          acc += int'(GROW[r][3 - c] & DATA[3 - c]);
          exp_q.push_back('{addr: MSG + 4 * r, data: acc});
        end
        exp_q.push_back('{addr: MSG + 4 * r, data: acc & 1});
      end
      exp_q.push_back('{addr: RES_BASE + 4 * i, data: 0});
      for (int r = 0; r < 7; r++) exp_q.push_back('{addr: MSG + 4 * r, data: 0});
      exp_q.push_back('{addr: GPIO_OUT, data: 0});
    end
    exp_q.push_back('{addr: GPIO_OUT, data: IRUNS});
  endtask

  task automatic do_reset(logic [2:0] p);
    int w;
    rst_n = 1'b0;
    prog  = p;
    seu   = 1'b0;
    seu_mask = '0;
    exp_q.delete();
    for (int i = 0; i < 1024; i++) mem[i] = 32'hDEAD_0000 + i;
    for (int k = 0; k < STR_LEN; k++) mem[(32'h100 >> 2) + k] = 32'(NMEA[k]);
    mem[32'h80 >> 2] = 9; mem[32'h84 >> 2] = 8; mem[32'h88 >> 2] = 4; mem[32'h8C >> 2] = 5;
    for (int r = 0; r < 7; r++) begin
      w = 0;
      for (int c = 0; c < 4; c++) begin
        mem[(GMAT >> 2) + 4 * r + c] = 32'(GROW[r][3 - c]);
        w += int'(GROW[r][3 - c] & DATA[3 - c]);
      end
      mem[(VER >> 2) + r] = 32'(w & 1);
      mem[(MSG >> 2) + r] = 0;
    end
    for (int c = 0; c < 4; c++) mem[(DVEC >> 2) + c] = 32'(DATA[3 - c]);
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
  endtask

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic run_workload(string name, logic [2:0] p, bit fault);
    int ck0, rb0, mm0, v0, cyc0, ent0, nslices, n, slice, nrb, cyc_start;
    cr_state_e run;
    do_reset(p);
    case (p)
      3'd0:    expect_nmea();
      3'd1:    expect_basic();
      3'd3:    expect_bsort();
      default: expect_hamming();
    endcase
    nslices = exp_q.size();
    cyc_start = cycle;
    ck0 = c_ckpt; rb0 = c_rb; mm0 = c_mm; v0 = c_vote; cyc0 = rb_cycles; ent0 = rb_entries;
    if (fault) begin
      slice = 1 + $urandom_range(nslices - 2);
      run   = $urandom_range(1) ? S_RUN2 : S_RUN1;
      forever begin
        @(negedge clk);
        if (c_ckpt - ck0 >= slice && cr_state == run && st_latch) break;
      end
      seu_mask = '0;
      seu_mask[$urandom_range(31)] = 1'b1;   // a bit of the store data register
      seu = 1'b1;
      @(negedge clk);
      seu = 1'b0;
    end
    n = 0;
    while (!(halted && cr_state == S_RUN1) && !cr_error && n < 2000000) begin
      @(posedge clk);
      n++;
    end
    repeat (4) @(posedge clk);
    nrb = c_rb - rb0;
    check(exp_q.size() == 0, {name, ": all writes done and correct"});
    check(!cr_error, {name, ": no error"});
    check(c_mm - mm0 == int'(fault) && c_vote - v0 == int'(fault), {name, ": mismatches and votes"});
    check(nrb == nslices + int'(fault), {name, ": one rollback per slice"});
    check(c_ovf == 0, {name, ": no stack overflow"});
    $display("%s fault=%0d slices=%0d cycles=%0d rollbacks=%0d avg_saved_regs=%.2f avg_rollback_cycles=%.2f",
             name, fault, nslices, cycle - cyc_start, nrb,
             real'(rb_entries - ent0) / real'(nrb), real'(rb_cycles - cyc0) / real'(nrb));
  endtask

  // Upset campaign: n_inj runs of one workload, each with one bit of the processor
  // state (all 74 bits of the behavioural core: halted, phase, pc, store address and
  // store data registers) inverted at a random cycle. Outcomes:
  //   correct    no mismatch, all writes right (the upset was masked or overwritten)
  //   recovered  mismatch detected, all writes right
  //   error      three different results, processor halted with error
  //   failure    a wrong value reached memory without an error
  //   hang       no wrong write, but the program did not complete: a halted or pc
  //              upset stopped the processor or sent it into a loop before its next
  //              memory write, so no compare ever happens (there is no timeout)
  // An upset of the store address/data registers can only corrupt a store of the
  // current run, so for those 64 bits the outcome must be correct or recovered.
  localparam int unsigned CPU_SW = 74;
  int o_correct = 0, o_recovered = 0, o_error = 0, o_hang = 0, o_failure = 0;

  task automatic seu_campaign(string name, logic [2:0] p, int n_inj, int t_run);
    int mm0, n, t, b;
    for (int k = 0; k < n_inj; k++) begin
      do_reset(p);
      case (p)
        3'd0:    expect_nmea();
        3'd1:    expect_basic();
        3'd3:    expect_bsort();
        default: expect_hamming();
      endcase
      campaign = 1'b1;
      wrong_writes = 0;
      mm0 = c_mm;
      t = 10 + $urandom_range(t_run - 20);
      b = $urandom_range(CPU_SW - 1);
      repeat (t) @(negedge clk);
      seu_mask = '0;
      seu_mask[b] = 1'b1;
      seu = 1'b1;
      @(negedge clk);
      seu = 1'b0;
      n = 0;
      while (!(halted && cr_state == S_RUN1) && !cr_error && n < 3 * t_run) begin
        @(posedge clk);
        n++;
      end
      repeat (4) @(posedge clk);
      campaign = 1'b0;
      if (cr_error) o_error++;
      else if (wrong_writes != 0) o_failure++;
      else if (exp_q.size() != 0) o_hang++;
      else if (c_mm != mm0) o_recovered++;
      else o_correct++;
      if (b < 64) check(!cr_error && halted && wrong_writes == 0 && exp_q.size() == 0,
                        $sformatf("%s: store-register upset (bit %0d, cycle %0d) recovered", name, b, t));
    end
    $display("%s upset campaign: %0d runs: correct=%0d recovered=%0d error=%0d hang=%0d failure=%0d",
             name, n_inj, o_correct, o_recovered, o_error, o_hang, o_failure);
    check(o_recovered > 0, {name, ": campaign saw a recovery"});
  endtask

  initial begin
    for (int f = 0; f < 2; f++) begin
      run_workload("basic",   3'd1, f[0]);
      run_workload("bsort",   3'd3, f[0]);
      run_workload("nmea",    3'd0, f[0]);
      run_workload("hamming", 3'd4, f[0]);
    end
    seu_campaign("nmea", 3'd0, 200, 8000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
