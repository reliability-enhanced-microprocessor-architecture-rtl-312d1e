// leon3x_cr_tb: self-checking test of the CR-modified leon3x level (without the AHB
// stopper, which the testbench models: it grants stop_req two cycles later and then
// withholds the bus grant from the processor). The behavioural processor runs the
// string-checksum program (8 characters, 2 runs) twice: without a fault, and with one
// upset of the store-data pipeline register in the second execution of a slice.
// Checks: the memory writes, in order, against a list computed here; every slice
// rolled back once; no mismatch without a fault; exactly one mismatch and one vote with
// the fault; the register file after the run holds the program's final register
// values (so rollbacks left no trace in it).
module leon3x_cr_tb;
  import cr_pkg::*;

  localparam int unsigned SB = STATE_W;
  localparam int unsigned IRUNS = 2, L = 8;
  localparam logic [31:0] GPIO_OUT = 32'h8000_0804;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [SB-1:0] state, ckpt_state, seu_mask;
  logic          restore, seu, halted, st_latch;
  rf_req_t       rf, rf_dut;
  logic          probe = 1'b0;        // testbench reads the register file after the run
  logic [7:0]    probe_a1, probe_a2;
  always_comb begin
    rf_dut = rf;
    if (probe) rf_dut = '{raddr1: probe_a1, raddr2: probe_a2, waddr: '0, wdata: '0, we: 1'b0};
  end
  logic [31:0]   rd1, rd2;
  bus_req_t      cpu_bus, bus_req;
  bus_rsp_t      cpu_rsp, bus_rsp;
  logic          stop_req, stop_grtd, cr_error;
  cr_state_e     cr_state;
  cr_events_t    ev;
  logic [6:0]    cnt;
  logic          sreq_d1 = 0, sreq_d2 = 0;

  cpu_model #(.STATE_BITS(SB), .IRUNS(IRUNS), .STR_LEN(L)) u_cpu (
    .clk, .rst_n, .prog_i(3'd0), .grant_i(!(sreq_d2)),
    .state_o(state), .ckpt_state_i(ckpt_state), .restore_i(restore),
    .seu_i(seu), .seu_mask_i(seu_mask), .rf_o(rf), .rdata1_i(rd1), .rdata2_i(rd2),
    .bus_o(cpu_bus), .bus_i(cpu_rsp), .halted_o(halted), .st_latch_o(st_latch));

  leon3x_cr dut (.clk, .rst_n,
    .proc_state_i(state), .proc_ckpt_state_o(ckpt_state), .proc_restore_o(restore),
    .proc_rf_i(rf_dut), .proc_rdata1_o(rd1), .proc_rdata2_o(rd2),
    .proc_bus_i(cpu_bus), .proc_bus_o(cpu_rsp), .bus_req_o(bus_req), .bus_rsp_i(bus_rsp),
    .stop_req_o(stop_req), .stop_grtd_i(stop_grtd),
    .cr_error_o(cr_error), .cr_state_o(cr_state), .cr_events_o(ev), .stack_count_o(cnt));

  // stopper model
  always @(posedge clk) begin
    sreq_d1 <= stop_req;
    sreq_d2 <= sreq_d1 && stop_req;
  end
  assign stop_grtd = stop_req && sreq_d2;

  logic [31:0] mem [1024];
  assign bus_rsp.ready = 1'b1;
  assign bus_rsp.rdata = mem[bus_req.addr[11:2]];

  wr_t exp_q[$];
  int  c_ckpt = 0, c_rb = 0, c_mm = 0, c_vote = 0;
  always @(posedge clk) if (rst_n) begin
    c_ckpt <= c_ckpt + int'(ev.ckpt);
    c_rb   <= c_rb + int'(ev.rollback);
    c_mm   <= c_mm + int'(ev.mismatch);
    c_vote <= c_vote + int'(ev.voted);
    if (bus_req.req && bus_req.we) begin
      checks++;
      if (exp_q.size() == 0 || exp_q[0] != '{addr: bus_req.addr, data: bus_req.wdata}) begin
        failures++;
        $display("FAIL: write %h <= %h", bus_req.addr, bus_req.wdata);
      end
      if (exp_q.size() != 0) void'(exp_q.pop_front());
      if (bus_req.addr < 32'h1000) mem[bus_req.addr[11:2]] <= bus_req.wdata;
    end
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [31:0] ch(int k);
    return 32'h41 + 32'(k * 7);
  endfunction

  logic [31:0] final_c;
  int nw;

  task automatic run(bit fault);
    int rb0, mm0, v0, base, n;
    logic [31:0] c;
    rst_n = 0; seu = 0; seu_mask = '0;
    for (int i = 0; i < 1024; i++) mem[i] = 0;
    for (int k = 0; k < L; k++) mem[(32'h100 >> 2) + k] = ch(k);
    exp_q.delete();
    for (int i = 0; i < IRUNS; i++) begin
      exp_q.push_back('{addr: GPIO_OUT, data: i});
      c = 0;
      for (int k = 0; k < L; k++) begin
        c ^= ch(k);
        exp_q.push_back('{addr: 32'h40, data: c});
      end
      exp_q.push_back('{addr: 32'h800 + 4 * i, data: c});
      exp_q.push_back('{addr: GPIO_OUT, data: 0});
    end
    exp_q.push_back('{addr: GPIO_OUT, data: IRUNS});
    final_c = c;
    nw = exp_q.size();
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    rb0 = c_rb; mm0 = c_mm; v0 = c_vote; base = c_ckpt;
    if (fault) begin
      forever begin
        @(negedge clk);
        if (c_ckpt - base >= 7 && cr_state == S_RUN2 && st_latch) break;
      end
      seu_mask = '0; seu_mask[3] = 1'b1; seu = 1;
      @(negedge clk); seu = 0;
    end
    n = 0;
    while (!(halted && cr_state == S_RUN1) && !cr_error && n < 100000) begin
      @(posedge clk); n++;
    end
    repeat (3) @(posedge clk);
    check(exp_q.size() == 0, "all writes done");
    check(!cr_error, "no error");
    check(c_rb - rb0 == nw + (fault ? 1 : 0), "one rollback per slice (+1 for the fault)");
    check(c_mm - mm0 == (fault ? 1 : 0), "mismatches");
    check(c_vote - v0 == (fault ? 1 : 0), "votes");
    probe = 1; probe_a1 = 8'd1; probe_a2 = 8'd6;
    #1 check(rd1 == final_c, "r1 holds the final checksum");
    check(rd2 == IRUNS, "r6 holds the final run count");
    probe_a1 = 8'd2;
    #1 check(rd1 == 32'h100 + 4 * L, "r2 holds the final string pointer");
    probe = 0;
  endtask

  initial begin
    run(1'b0);
    run(1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
