// regfile_4p: integer register file with the usual two read ports and one write port
// of a LEON3-class core, plus a fourth read port.
//
// The fourth port exists for checkpointing: the register-file checkpoint unit drives
// its address with the write address, so in the cycle of a write the fourth port
// shows the value being overwritten, which is then saved on the stack. Reads are
// combinational (asynchronous) so the old value is available in the same cycle as
// the write; writes happen on the rising clock edge. There is no reset: like any
// RAM the contents are defined only once written. The 8-bit address follows the
// 8-bit stack address width; the depth (all 256 addresses) is this design's choice.
module regfile_4p
  import cr_pkg::*;
#(
  parameter int unsigned AW = RF_AW,
  parameter int unsigned DW = DATA_W,
  parameter int unsigned NREGS = 2 ** AW
) (
  input  logic          clk,
  input  logic [AW-1:0] raddr1,
  output logic [DW-1:0] rdata1,
  input  logic [AW-1:0] raddr2,
  output logic [DW-1:0] rdata2,
  input  logic [AW-1:0] raddr4,   // fourth (checkpoint) read port
  output logic [DW-1:0] rdata4,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata,
  input  logic          we
);

  logic [DW-1:0] mem [NREGS];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata1 = mem[raddr1];
  assign rdata2 = mem[raddr2];
  assign rdata4 = mem[raddr4];

endmodule
