// cr_pkg: types and constants shared by the time-redundant checkpoint/recovery (CR)
// hardware that wraps a LEON3-class integer unit.
//
// Sizes that come from the design description: 32-bit address and data, an 8-bit
// register-file address, a 64-entry stack of (address, old value) pairs, and a
// pipeline/cache-controller checkpoint of 2502 + 323 + 830 + 34 = 3689 bits.
// The simplified processor bus (bus_req_t / bus_rsp_t) is this design's own
// abstraction of the AMBA AHB master interface: one request with a ready answer,
// address and data presented together.
package cr_pkg;

  localparam int unsigned ADDR_W      = 32;   // AHB address width
  localparam int unsigned DATA_W      = 32;   // AHB / register-file data width
  localparam int unsigned RF_AW       = 8;    // register-file address width
  localparam int unsigned STACK_DEPTH = 64;   // stack positions

  // Checkpointed state bits per unit (iu3, icache, dcache, acache controllers)
  localparam int unsigned IU3_BITS    = 2502;
  localparam int unsigned ICACHE_BITS = 323;
  localparam int unsigned DCACHE_BITS = 830;
  localparam int unsigned ACACHE_BITS = 34;
  localparam int unsigned STATE_W     = IU3_BITS + ICACHE_BITS + DCACHE_BITS + ACACHE_BITS;

  // One main-memory write: the pair the CR control records and compares.
  typedef struct packed {
    logic [ADDR_W-1:0] addr;
    logic [DATA_W-1:0] data;
  } wr_t;

  // Processor-side bus request (simplified AHB master output).
  typedef struct packed {
    logic              req;
    logic              we;
    logic [ADDR_W-1:0] addr;
    logic [DATA_W-1:0] wdata;
  } bus_req_t;

  // Bus answer to a request.
  typedef struct packed {
    logic              ready;
    logic [DATA_W-1:0] rdata;
  } bus_rsp_t;

  // proc3 side of the register file: two read ports and one write port.
  typedef struct packed {
    logic [RF_AW-1:0]  raddr1;
    logic [RF_AW-1:0]  raddr2;
    logic [RF_AW-1:0]  waddr;
    logic [DATA_W-1:0] wdata;
    logic              we;
  } rf_req_t;

  // One stack entry: register address and the value it held before the write.
  typedef struct packed {
    logic [RF_AW-1:0]  addr;
    logic [DATA_W-1:0] data;
  } stack_entry_t;

  // Write-mux selection driven by the CR control.
  typedef enum logic [1:0] {
    WM_HOLD  = 2'd0,  // keep the processor's write waiting, nothing on the bus
    WM_BLOCK = 2'd1,  // acknowledge the write locally, nothing on the bus
    WM_PASS  = 2'd2,  // processor write goes to the bus
    WM_VOTE  = 2'd3   // the voted write goes to the bus
  } wmux_sel_e;

  // CR control states.
  typedef enum logic [2:0] {
    S_RUN1     = 3'd0,  // first execution of a slice
    S_RUN2     = 3'd1,  // second execution: compare with the first
    S_RUN3     = 3'd2,  // third execution: vote
    S_STOP     = 3'd3,  // waiting for the AHB stopper to own the bus
    S_REC_PIPE = 3'd4,  // restore pipeline registers (one cycle)
    S_REC_RF   = 3'd5,  // unwind the register-file stack
    S_ERROR    = 3'd6   // three different results, or stack overflow: halted
  } cr_state_e;

  // One-cycle event strobes, for status and monitoring.
  typedef struct packed {
    logic ckpt;       // a new checkpoint was taken
    logic rollback;   // a recovery started (processor halted)
    logic match;      // second run agreed with the first
    logic mismatch;   // second run disagreed with the first
    logic voted;      // third run produced a majority
    logic error;      // no majority or stack overflow
  } cr_events_t;

  // Word-level 2-of-3 vote over whole (address, data) pairs.
  function automatic logic vote3(input wr_t a, input wr_t b, input wr_t c, output wr_t v);
    if (a == b || a == c) begin
      v = a;
      return 1'b1;
    end else if (b == c) begin
      v = b;
      return 1'b1;
    end
    v = c;
    return 1'b0;
  endfunction

endpackage
