// cr_control: "CR Control" of the time-redundant checkpoint/recovery scheme. Every
// slice of code between two main-memory writes is executed twice, and a third time if
// the two disagree.
//
// Operation:
//   RUN1  The processor's first write of the slice is acknowledged locally (write mux
//         BLOCK) and its (address, data) pair is recorded. The controller then rolls
//         back: it asks the AHB stopper for the bus (STOP), restores the pipeline from
//         the checkpoint in one cycle (REC_PIPE) and lets the register-file checkpoint
//         unit unwind its stack (REC_RF), then releases the processor into RUN2.
//   RUN2  The second write is compared with the first. If equal, it goes to the bus
//         (PASS) and, the cycle after the bus accepts it, a new checkpoint is taken and
//         the next slice starts in RUN1. If different, the second pair is recorded too
//         and a second rollback leads to RUN3.
//   RUN3  The third write is voted 2-of-3 with the two recorded pairs; the majority is
//         written to the bus (VOTE) and a checkpoint follows. With three different pairs
//         the controller raises error and keeps the processor halted (ERROR).
// Any write that arrives while a rollback is pending is held (HOLD). A stack overflow
// makes the slice unrecoverable and also leads to ERROR; that policy, the first
// checkpoint in the cycle after reset, and the checkpoint being taken in the cycle
// after the write handshake are this design's choices. The checkpoint granularity
// (one per main-memory write), the compare/vote sequence and the halt on three
// different results follow the design description.
//
// Timing: rollback latency is the stopper grant latency plus 1 + N cycles for N saved
// registers (REC_PIPE counts as the first).
module cr_control
  import cr_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  // observed processor bus request and bus answer
  input  bus_req_t   proc_req_i,
  input  logic       bus_ready_i,
  // write mux
  output wmux_sel_e  wmux_sel_o,
  output wr_t        voted_o,
  // checkpoint / recovery strobes (chkp/recov)
  output logic       ckpt_o,
  output logic       restore_o,
  output logic       rf_recover_o,
  input  logic       rf_done_i,
  input  logic       rf_overflow_i,
  // AHB stopper handshake
  output logic       stop_req_o,
  input  logic       stop_grtd_i,
  // status
  output logic       error_o,
  output cr_state_e  state_o,
  output cr_events_t events_o
);

  cr_state_e state_q, state_d;
  cr_state_e resume_q, resume_d;   // run to enter after the current rollback
  wr_t       slot0_q, slot0_d;     // first execution's write
  wr_t       slot1_q, slot1_d;     // second execution's write
  logic      ckpt_q, ckpt_d;

  wr_t  cur;
  wr_t  voted;
  logic vote_ok;
  logic wr_valid;

  assign wr_valid = proc_req_i.req && proc_req_i.we;
  assign cur      = '{addr: proc_req_i.addr, data: proc_req_i.wdata};

  always_comb vote_ok = vote3(slot0_q, slot1_q, cur, voted);

  always_comb begin
    state_d      = state_q;
    resume_d     = resume_q;
    slot0_d      = slot0_q;
    slot1_d      = slot1_q;
    ckpt_d       = 1'b0;
    wmux_sel_o   = WM_HOLD;
    voted_o      = voted;
    restore_o    = 1'b0;
    rf_recover_o = 1'b0;
    stop_req_o   = 1'b0;
    error_o      = 1'b0;
    events_o      = '0;
    events_o.ckpt = ckpt_q;

    unique case (state_q)
      S_RUN1: begin
        if (rf_overflow_i) begin
          state_d        = S_ERROR;
          events_o.error = 1'b1;
        end else if (wr_valid) begin
          wmux_sel_o        = WM_BLOCK;
          slot0_d           = cur;
          resume_d          = S_RUN2;
          state_d           = S_STOP;
          events_o.rollback = 1'b1;
        end
      end

      S_RUN2: begin
        if (rf_overflow_i) begin
          state_d        = S_ERROR;
          events_o.error = 1'b1;
        end else if (wr_valid) begin
          if (cur == slot0_q) begin
            wmux_sel_o = WM_PASS;
            if (bus_ready_i) begin
              ckpt_d         = 1'b1;
              state_d        = S_RUN1;
              events_o.match = 1'b1;
            end
          end else begin
            wmux_sel_o        = WM_BLOCK;
            slot1_d           = cur;
            resume_d          = S_RUN3;
            state_d           = S_STOP;
            events_o.mismatch = 1'b1;
            events_o.rollback = 1'b1;
          end
        end
      end

      S_RUN3: begin
        if (rf_overflow_i) begin
          state_d        = S_ERROR;
          events_o.error = 1'b1;
        end else if (wr_valid) begin
          if (vote_ok) begin
            wmux_sel_o = WM_VOTE;
            if (bus_ready_i) begin
              ckpt_d         = 1'b1;
              state_d        = S_RUN1;
              events_o.voted = 1'b1;
            end
          end else begin
            state_d        = S_ERROR;
            events_o.error = 1'b1;
          end
        end
      end

      S_STOP: begin
        stop_req_o = 1'b1;
        if (rf_overflow_i) begin
          state_d        = S_ERROR;
          events_o.error = 1'b1;
        end else if (stop_grtd_i) begin
          state_d = S_REC_PIPE;
        end
      end

      S_REC_PIPE: begin
        stop_req_o   = 1'b1;
        restore_o    = 1'b1;
        rf_recover_o = 1'b1;
        state_d      = rf_done_i ? resume_q : S_REC_RF;
      end

      S_REC_RF: begin
        stop_req_o = 1'b1;
        if (rf_done_i) state_d = resume_q;
      end

      S_ERROR: begin
        stop_req_o = 1'b1;
        error_o    = 1'b1;
      end

      default: state_d = S_ERROR;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q  <= S_RUN1;
      resume_q <= S_RUN2;
      slot0_q  <= '0;
      slot1_q  <= '0;
      ckpt_q   <= 1'b1;   // checkpoint the reset state in the first cycle
    end else begin
      state_q  <= state_d;
      resume_q <= resume_d;
      slot0_q  <= slot0_d;
      slot1_q  <= slot1_d;
      ckpt_q   <= ckpt_d;
    end
  end

  assign ckpt_o        = ckpt_q;
  assign state_o       = state_q;

endmodule
