// ckpt_stack: last-in first-out memory of (register address, old value) pairs that
// records every register-file write made since the last checkpoint.
//
// push stores an entry on top, pop removes the top entry (the top is always visible
// on top_o), flush empties the stack in one cycle. A flush and a push in the same
// cycle leave exactly the pushed entry, so a register write in the checkpoint cycle
// belongs to the new slice. A push into a full stack is dropped and reported on
// overflow_o for that cycle. Depth 64 with 8-bit address and 32-bit data follows the
// design description; the flush/push ordering and overflow behaviour are this
// design's own choices. count_o gives the stack occupancy.
module ckpt_stack
  import cr_pkg::*;
#(
  parameter int unsigned DEPTH = STACK_DEPTH,
  parameter int unsigned AW    = RF_AW,
  parameter int unsigned DW    = DATA_W
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       push,
  input  logic [AW+DW-1:0]           push_data,
  input  logic                       pop,
  input  logic                       flush,
  output logic [AW+DW-1:0]           top_o,
  output logic                       empty_o,
  output logic                       full_o,
  output logic                       overflow_o,
  output logic [$clog2(DEPTH+1)-1:0] count_o
);

  localparam int unsigned CW = $clog2(DEPTH+1);

  logic [AW+DW-1:0] mem [DEPTH];
  logic [CW-1:0]    sp;   // number of valid entries

  assign empty_o    = (sp == '0);
  assign full_o     = (sp == CW'(DEPTH));
  assign count_o    = sp;
  assign top_o      = mem[empty_o ? '0 : $clog2(DEPTH)'(sp - 1'b1)];
  assign overflow_o = push && full_o && !flush;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sp <= '0;
    end else if (flush) begin
      sp <= push ? CW'(1) : '0;
    end else if (push && !full_o) begin
      sp <= sp + 1'b1;
    end else if (pop && !empty_o) begin
      sp <= sp - 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (flush && push)       mem[0] <= push_data;
    else if (push && !full_o) mem[$clog2(DEPTH)'(sp)] <= push_data;
  end

  // A push and a pop never coincide: pops happen only while the processor is halted.
  a_no_push_pop: assert property (@(posedge clk) disable iff (!rst_n) !(push && pop));

endmodule
