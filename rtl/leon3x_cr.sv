// leon3x_cr: the checkpoint/recovery part of a modified LEON3 "leon3x" level, i.e.
// everything the time-redundant scheme adds around the processor core (proc3 =
// integer unit + cache/AHB controller), which itself stays outside and connects through
// this module's ports.
//
// Contents: the CR control (cr_control), the CR data store for pipeline and controller
// state (cr_data), the write mux on the processor's bus port (write_mux), the
// register-file checkpoint unit (rf_ckpt_unit) with its stack memory (ckpt_stack), and
// the 4-port register file (regfile_4p) that replaces the core's 3-port one.
// The processor:
//   - exports its full register state on proc_state_i and loads proc_ckpt_state_o when
//     proc_restore_o is high (one cycle, at the clock edge);
//   - uses the register file through proc_rf_i / proc_rdata1_o / proc_rdata2_o
//     (combinational reads, write on the clock edge);
//   - issues its bus accesses on proc_bus_i and gets the answer on proc_bus_o; the
//     filtered request leaves on bus_req_o.
// stop_req_o / stop_grtd_i go to the AHB stopper, which halts the processor by taking
// the bus. The structure follows the described modified leon3x; the port bundles are
// this design's simplification of the LEON3 record types.
module leon3x_cr
  import cr_pkg::*;
#(
  parameter int unsigned STATE_BITS = STATE_W,
  parameter int unsigned DEPTH      = STACK_DEPTH
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // processor pipeline state
  input  logic [STATE_BITS-1:0] proc_state_i,
  output logic [STATE_BITS-1:0] proc_ckpt_state_o,
  output logic                  proc_restore_o,
  // processor register-file bus (3-port)
  input  rf_req_t               proc_rf_i,
  output logic [DATA_W-1:0]     proc_rdata1_o,
  output logic [DATA_W-1:0]     proc_rdata2_o,
  // processor AHB master port and the bus
  input  bus_req_t              proc_bus_i,
  output bus_rsp_t              proc_bus_o,
  output bus_req_t              bus_req_o,
  input  bus_rsp_t              bus_rsp_i,
  // AHB stopper handshake
  output logic                  stop_req_o,
  input  logic                  stop_grtd_i,
  // status
  output logic                  cr_error_o,
  output cr_state_e             cr_state_o,
  output cr_events_t            cr_events_o,
  output logic [$clog2(DEPTH+1)-1:0] stack_count_o
);

  wmux_sel_e wmux_sel;
  wr_t       voted;
  logic      ckpt, restore, rf_recover, rf_done, rf_ovf;

  logic [RF_AW-1:0]  rf_raddr1, rf_raddr2, rf_raddr4, rf_waddr;
  logic [DATA_W-1:0] rf_rdata1, rf_rdata2, rf_rdata4, rf_wdata;
  logic              rf_we;

  logic              st_push, st_pop, st_flush, st_empty, st_ovf;
  stack_entry_t      st_push_data, st_top;

  cr_control u_ctrl (
    .clk, .rst_n,
    .proc_req_i   (proc_bus_i),
    .bus_ready_i  (bus_rsp_i.ready),
    .wmux_sel_o   (wmux_sel),
    .voted_o      (voted),
    .ckpt_o       (ckpt),
    .restore_o    (restore),
    .rf_recover_o (rf_recover),
    .rf_done_i    (rf_done),
    .rf_overflow_i(rf_ovf),
    .stop_req_o,
    .stop_grtd_i,
    .error_o      (cr_error_o),
    .state_o      (cr_state_o),
    .events_o     (cr_events_o)
  );

  cr_data #(.W(STATE_BITS)) u_data (
    .clk, .rst_n,
    .state_i      (proc_state_i),
    .ckpt_i       (ckpt),
    .restore_i    (restore),
    .ckpt_state_o (proc_ckpt_state_o),
    .restore_o    (proc_restore_o)
  );

  write_mux u_wmux (
    .sel_i      (wmux_sel),
    .voted_i    (voted),
    .proc_req_i (proc_bus_i),
    .proc_rsp_o (proc_bus_o),
    .bus_req_o,
    .bus_rsp_i
  );

  rf_ckpt_unit u_rfck (
    .clk, .rst_n,
    .proc_rf_i,
    .proc_rdata1_o,
    .proc_rdata2_o,
    .rf_raddr1_o     (rf_raddr1),
    .rf_raddr2_o     (rf_raddr2),
    .rf_raddr4_o     (rf_raddr4),
    .rf_waddr_o      (rf_waddr),
    .rf_wdata_o      (rf_wdata),
    .rf_we_o         (rf_we),
    .rf_rdata1_i     (rf_rdata1),
    .rf_rdata2_i     (rf_rdata2),
    .rf_rdata4_i     (rf_rdata4),
    .st_push_o       (st_push),
    .st_push_data_o  (st_push_data),
    .st_pop_o        (st_pop),
    .st_flush_o      (st_flush),
    .st_top_i        (st_top),
    .st_empty_i      (st_empty),
    .st_overflow_i   (st_ovf),
    .ckpt_i          (ckpt),
    .recover_start_i (rf_recover),
    .recover_busy_o  (),
    .recover_done_o  (rf_done),
    .overflow_o      (rf_ovf)
  );

  ckpt_stack #(.DEPTH(DEPTH)) u_stack (
    .clk, .rst_n,
    .push       (st_push),
    .push_data  (st_push_data),
    .pop        (st_pop),
    .flush      (st_flush),
    .top_o      (st_top),
    .empty_o    (st_empty),
    .full_o     (),
    .overflow_o (st_ovf),
    .count_o    (stack_count_o)
  );

  regfile_4p u_rf (
    .clk,
    .raddr1 (rf_raddr1), .rdata1 (rf_rdata1),
    .raddr2 (rf_raddr2), .rdata2 (rf_rdata2),
    .raddr4 (rf_raddr4), .rdata4 (rf_rdata4),
    .waddr  (rf_waddr),  .wdata  (rf_wdata), .we (rf_we)
  );

endmodule
