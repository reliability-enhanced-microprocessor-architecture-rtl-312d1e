// cr_data: the "CR Data" store of the Checkpoint Recovery Unit. It holds a redundant
// copy of every state register of the integer-unit pipeline and of the cache/AHB
// controller FSMs.
//
// On a checkpoint strobe (ckpt_i) the whole state vector state_i is copied into the
// shadow register in one cycle. On a recovery strobe (restore_i) restore_o is raised
// for that cycle and ckpt_state_o, which always shows the shadow copy, is to be loaded
// back into the pipeline registers by the processor. The default width is the sum of
// the checkpoint sizes given for iu3 (2502), icache (323), dcache (830) and acache (34)
// controllers. At reset the shadow is cleared; the CR control takes a first
// checkpoint right after reset so the processor's reset state is what gets restored.
module cr_data
  import cr_pkg::*;
#(
  parameter int unsigned W = STATE_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] state_i,       // live pipeline / controller state
  input  logic         ckpt_i,        // take a checkpoint
  input  logic         restore_i,     // recover the pipeline from the checkpoint
  output logic [W-1:0] ckpt_state_o,  // saved state, loaded by the processor on restore
  output logic         restore_o
);

  logic [W-1:0] shadow;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      shadow <= '0;
    else if (ckpt_i) shadow <= state_i;
  end

  assign ckpt_state_o = shadow;
  assign restore_o    = restore_i;

  // Saving and restoring in the same cycle would make the restored state ambiguous.
  a_no_ckpt_restore: assert property (@(posedge clk) disable iff (!rst_n) !(ckpt_i && restore_i));

endmodule
