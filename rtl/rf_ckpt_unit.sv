// rf_ckpt_unit: Register File Checkpoint Unit. Sits between the processor's 3-port
// register-file bus and the 4-port register file, and keeps the stack of old values.
//
// Normal operation (as described for the design): reads pass straight through, the
// fourth read port's address follows the write address, and on every register write
// the (address, value being overwritten) pair is pushed on the stack. A checkpoint
// (ckpt) flushes the stack, because the register file is then known good.
// Recovery: a one-cycle recover_start pulse starts the unwind; from that cycle on,
// each cycle pops the top entry and writes it back into the register file, one
// register per cycle, newest first, so the oldest saved value of a register is the one
// left. While unwinding, the processor's write port is ignored (the processor is
// halted). recover_done is high in the first unwinding cycle that finds the stack
// empty, so N saved registers take N + 1 cycles counted from recover_start.
// overflow is sticky from a push into a full stack until the next checkpoint; the CR
// control treats it as an unrecoverable error (this design's choice: the description
// does not say).
module rf_ckpt_unit
  import cr_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // proc3 side (3-port bus)
  input  rf_req_t           proc_rf_i,
  output logic [DATA_W-1:0] proc_rdata1_o,
  output logic [DATA_W-1:0] proc_rdata2_o,
  // register-file side (4-port bus)
  output logic [RF_AW-1:0]  rf_raddr1_o,
  output logic [RF_AW-1:0]  rf_raddr2_o,
  output logic [RF_AW-1:0]  rf_raddr4_o,
  output logic [RF_AW-1:0]  rf_waddr_o,
  output logic [DATA_W-1:0] rf_wdata_o,
  output logic              rf_we_o,
  input  logic [DATA_W-1:0] rf_rdata1_i,
  input  logic [DATA_W-1:0] rf_rdata2_i,
  input  logic [DATA_W-1:0] rf_rdata4_i,
  // stack memory side
  output logic              st_push_o,
  output stack_entry_t      st_push_data_o,
  output logic              st_pop_o,
  output logic              st_flush_o,
  input  stack_entry_t      st_top_i,
  input  logic              st_empty_i,
  input  logic              st_overflow_i,
  // CR control side
  input  logic              ckpt_i,
  input  logic              recover_start_i,
  output logic              recover_busy_o,
  output logic              recover_done_o,
  output logic              overflow_o
);

  logic unwind_q;   // an unwind is in progress from an earlier cycle
  logic unwinding;  // unwinding in this cycle (the start cycle included)
  logic ovf_q;

  assign unwinding = unwind_q || recover_start_i;

  // Keep going while this cycle popped an entry; the cycle that finds the stack
  // empty ends the unwind.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) unwind_q <= 1'b0;
    else        unwind_q <= unwinding && !st_empty_i;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)             ovf_q <= 1'b0;
    else if (ckpt_i)        ovf_q <= 1'b0;
    else if (st_overflow_i) ovf_q <= 1'b1;
  end

  always_comb begin
    // read ports: always the processor's
    rf_raddr1_o   = proc_rf_i.raddr1;
    rf_raddr2_o   = proc_rf_i.raddr2;
    proc_rdata1_o = rf_rdata1_i;
    proc_rdata2_o = rf_rdata2_i;
    // fourth port follows the write address
    rf_raddr4_o   = proc_rf_i.waddr;

    st_flush_o    = ckpt_i;
    st_push_data_o.addr = proc_rf_i.waddr;
    st_push_data_o.data = rf_rdata4_i;

    if (unwinding) begin
      rf_waddr_o = st_top_i.addr;
      rf_wdata_o = st_top_i.data;
      rf_we_o    = !st_empty_i;
      st_pop_o   = !st_empty_i;
      st_push_o  = 1'b0;
    end else begin
      rf_waddr_o = proc_rf_i.waddr;
      rf_wdata_o = proc_rf_i.wdata;
      rf_we_o    = proc_rf_i.we;
      st_pop_o   = 1'b0;
      st_push_o  = proc_rf_i.we;
    end
  end

  assign recover_busy_o = unwinding;
  assign recover_done_o = unwinding && st_empty_i;
  assign overflow_o     = ovf_q;

endmodule
