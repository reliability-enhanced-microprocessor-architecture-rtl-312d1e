// leon3cr_top: system level of the time-redundant checkpoint/recovery (CR) scheme for a
// LEON3-class soft core without caches. Every stretch of code between two main-memory
// writes is run twice; the write reaches memory only when both runs produce the same
// address and data, otherwise a third run decides by majority.
//
// It holds the CR-modified leon3x level (leon3x_cr: CR control, CR data, write mux,
// register-file checkpoint unit, stack, 4-port register file) and, beside it on the
// AMBA AHB bus, the AHB stopper master that the CR control uses to halt the processor
// while a rollback runs, as in the described top-level arrangement. The processor core
// (integer unit and cache/AHB controller), the bus arbiter and the memory are outside:
// their connections are this module's ports.
//   - proc_*   : processor state export/restore, register-file bus, bus master port
//   - bus_*    : the processor's filtered bus request and the bus answer
//   - stop_h*  : the stopper's AHB master signals (request, lock, transfer, grant)
//   - cr_*     : error (halted), controller state, one-cycle events, stack occupancy
// All timing is on the single clock clk; rst_n is an asynchronous active-low reset.
module leon3cr_top
  import cr_pkg::*;
#(
  parameter int unsigned STATE_BITS = STATE_W,
  parameter int unsigned DEPTH      = STACK_DEPTH
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [STATE_BITS-1:0] proc_state_i,
  output logic [STATE_BITS-1:0] proc_ckpt_state_o,
  output logic                  proc_restore_o,
  input  rf_req_t               proc_rf_i,
  output logic [DATA_W-1:0]     proc_rdata1_o,
  output logic [DATA_W-1:0]     proc_rdata2_o,
  input  bus_req_t              proc_bus_i,
  output bus_rsp_t              proc_bus_o,
  output bus_req_t              bus_req_o,
  input  bus_rsp_t              bus_rsp_i,
  output logic                  stop_hbusreq_o,
  output logic                  stop_hlock_o,
  output logic [1:0]            stop_htrans_o,
  output logic                  stop_hwrite_o,
  output logic [ADDR_W-1:0]     stop_haddr_o,
  input  logic                  stop_hgrant_i,
  input  logic                  hready_i,
  output logic                  cr_error_o,
  output cr_state_e             cr_state_o,
  output cr_events_t            cr_events_o,
  output logic [$clog2(DEPTH+1)-1:0] cr_stack_count_o
);

  logic stop_req, stop_grtd;

  leon3x_cr #(.STATE_BITS(STATE_BITS), .DEPTH(DEPTH)) u_leon3x (
    .clk, .rst_n,
    .proc_state_i, .proc_ckpt_state_o, .proc_restore_o,
    .proc_rf_i, .proc_rdata1_o, .proc_rdata2_o,
    .proc_bus_i, .proc_bus_o, .bus_req_o, .bus_rsp_i,
    .stop_req_o    (stop_req),
    .stop_grtd_i   (stop_grtd),
    .cr_error_o, .cr_state_o, .cr_events_o,
    .stack_count_o (cr_stack_count_o)
  );

  ahb_stopper u_stopper (
    .clk, .rst_n,
    .stop_req_i  (stop_req),
    .stop_grtd_o (stop_grtd),
    .hbusreq_o   (stop_hbusreq_o),
    .hlock_o     (stop_hlock_o),
    .htrans_o    (stop_htrans_o),
    .hwrite_o    (stop_hwrite_o),
    .haddr_o     (stop_haddr_o),
    .hgrant_i    (stop_hgrant_i),
    .hready_i
  );

endmodule
