// ahb_stopper: second AMBA AHB master of the checkpoint/recovery hardware. Its only job
// is to take the bus away from the processor: while it owns the bus, a processor
// running without caches cannot fetch or access memory and is therefore halted, and
// the recovery (pipeline restore and register-file unwind) runs safely.
//
// Handshake: the CR control raises stop_req and keeps it high for the whole recovery.
// The stopper then raises HBUSREQ with HLOCK and presents a write request, as
// described; once the arbiter grants it (HGRANT with HREADY) it answers stop_grtd and
// keeps the bus, issuing only IDLE transfers so that no memory is touched. Dropping
// stop_req releases the bus the next cycle. The IDLE-transfer choice and the lock are
// this design's; the description only says the bus is requested "through a write
// request". HTRANS encoding follows AMBA AHB (IDLE = 2'b00).
module ahb_stopper
  import cr_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // CR control side
  input  logic              stop_req_i,
  output logic              stop_grtd_o,
  // AHB master side
  output logic              hbusreq_o,
  output logic              hlock_o,
  output logic [1:0]        htrans_o,
  output logic              hwrite_o,
  output logic [ADDR_W-1:0] haddr_o,
  input  logic              hgrant_i,
  input  logic              hready_i
);

  typedef enum logic [1:0] {ST_IDLE, ST_REQ, ST_OWN} stop_state_e;

  stop_state_e state_q, state_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state_q <= ST_IDLE;
    else        state_q <= state_d;
  end

  always_comb begin
    state_d = state_q;
    unique case (state_q)
      ST_IDLE: if (stop_req_i) state_d = ST_REQ;
      ST_REQ:  if (!stop_req_i) state_d = ST_IDLE;
               else if (hgrant_i && hready_i) state_d = ST_OWN;
      ST_OWN:  if (!stop_req_i) state_d = ST_IDLE;
      default: state_d = ST_IDLE;
    endcase
  end

  assign hbusreq_o   = (state_q != ST_IDLE) && stop_req_i;
  assign hlock_o     = hbusreq_o;
  assign hwrite_o    = hbusreq_o;
  assign htrans_o    = 2'b00;          // IDLE: the stopper never touches memory
  assign haddr_o     = '0;
  assign stop_grtd_o = (state_q == ST_OWN) && stop_req_i;

  // The grant is only reported while it is asked for.
  a_grtd_needs_req: assert property (@(posedge clk) disable iff (!rst_n) stop_grtd_o |-> stop_req_i);

endmodule
