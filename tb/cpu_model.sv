// cpu_model: behavioural stand-in for the processor core (integer unit plus bus
// interface, caches disabled) that the checkpoint/recovery hardware wraps. It is not
// a LEON3: it is a small single-issue machine with a SPARC-like register 0 (reads as
// zero, never written) that runs one of a few built-in programs, so that testbenches
// can exercise checkpoint, rollback, compare and vote end to end.
//
// Every instruction needs the bus (as a cache-less core fetches every instruction),
// so the model executes only while grant_i is high. Register operands are read
// combinationally from the external register file and results are written through
// the 3-port bus. LD completes on the bus handshake; ST takes two steps: it first
// latches address and data into st_addr_q/st_data_q (pipeline registers), then
// issues the bus write from them until ready.
// The complete architectural state (halted, phase, pc, st_addr_q, st_data_q) is
// exported on state_o, zero-extended to STATE_BITS, and reloaded from ckpt_state_i
// when restore_i is high. seu_i XORs seu_mask_i into that state at the clock edge,
// which is how the testbenches inject single-event upsets.
//
// Programs (prog_i), memory map word addresses are byte addresses:
//   0 checksum : XOR checksum of a string of STR_LEN words at STR_BASE, IRUNS times;
//                running value stored to CVAR after every character, result of run i
//                to RES_BASE+4*i, run number to the GPIO output register.
//   1 basic    : x = (a+b)-(c+d) from BASIC_BASE, BASIC_RUNS times; x stored to
//                RES_BASE+4*i.
//   2 spin     : writes a register 100 times without a memory write, then stores.
//   3 bsort    : IRUNS times: fill ARR_BASE[0..9] with 9..0, bubble-sort it in memory
//                (with the early exit when a pass swaps nothing), count out-of-order
//                neighbours into RES_BASE+4*i.
//   4 hamming  : IRUNS times: encode the 4-bit message at DVEC with the 7x4 generator
//                matrix at GMAT (one word per bit, GF(2) product accumulated in memory
//                at MSG), compare with the expected code word at VER, store the number
//                of differing bits to RES_BASE+4*i, clear MSG.
// Every program writes the run number to the GPIO output register at the start of a
// run, 0 at its end, and IRUNS (BASIC_RUNS) when finished.
module cpu_model
  import cr_pkg::*;
#(
  parameter int unsigned STATE_BITS = STATE_W,
  parameter int unsigned IRUNS      = 2,
  parameter int unsigned STR_LEN    = 8,
  parameter int unsigned BASIC_RUNS = IRUNS
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [2:0]            prog_i,
  input  logic                  grant_i,
  // state export / restore
  output logic [STATE_BITS-1:0] state_o,
  input  logic [STATE_BITS-1:0] ckpt_state_i,
  input  logic                  restore_i,
  // fault injection
  input  logic                  seu_i,
  input  logic [STATE_BITS-1:0] seu_mask_i,
  // register file
  output rf_req_t               rf_o,
  input  logic [DATA_W-1:0]     rdata1_i,
  input  logic [DATA_W-1:0]     rdata2_i,
  // bus
  output bus_req_t              bus_o,
  input  bus_rsp_t              bus_i,
  output logic                  halted_o,
  output logic                  st_latch_o   // a store latches its data this cycle
);

  localparam logic [31:0] STR_BASE   = 32'h0000_0100;
  localparam logic [31:0] BASIC_BASE = 32'h0000_0080;
  localparam logic [31:0] CVAR       = 32'h0000_0040;
  localparam logic [31:0] RES_BASE   = 32'h0000_0800;
  localparam logic [31:0] GPIO_OUT   = 32'h8000_0804;
  localparam logic [31:0] ARR_BASE   = 32'h0000_0300;
  localparam logic [31:0] GMAT       = 32'h0000_0400;
  localparam logic [31:0] DVEC       = 32'h0000_0480;
  localparam logic [31:0] VER        = 32'h0000_0490;
  localparam logic [31:0] MSG        = 32'h0000_04C0;
  localparam logic [31:0] MINUS1     = 32'hFFFF_FFFF;
  localparam logic [31:0] MINUS4     = 32'hFFFF_FFFC;

  typedef enum logic [3:0] {
    OP_ADDI, OP_ADD, OP_SUB, OP_XOR, OP_AND, OP_SLTU, OP_LD, OP_ST, OP_BNE, OP_BEQ, OP_HALT
  } op_e;

  typedef struct packed {
    op_e        op;
    logic [7:0] rd;    // destination, or store source for ST
    logic [7:0] rs1;
    logic [7:0] rs2;
    logic [31:0] imm;  // immediate, memory offset or branch target
  } instr_t;

  typedef struct packed {
    logic        halted;
    logic        phase;     // ST: 0 = latch, 1 = bus write
    logic [7:0]  pc;
    logic [31:0] st_addr_q;
    logic [31:0] st_data_q;
  } cpu_state_t;

  localparam int unsigned SW = $bits(cpu_state_t);

  function automatic instr_t mk(op_e op, int rd, int rs1, int rs2, logic [31:0] imm);
    mk = '{op: op, rd: 8'(rd), rs1: 8'(rs1), rs2: 8'(rs2), imm: imm};
  endfunction

  function automatic instr_t fetch(logic [2:0] prog, logic [7:0] pc);
    fetch = mk(OP_HALT, 0, 0, 0, 0);
    unique case (prog)
      3'd0: unique case (pc)
        8'd0:  fetch = mk(OP_ADDI, 7, 0, 0, IRUNS);
        8'd1:  fetch = mk(OP_ADDI, 8, 0, 0, GPIO_OUT);
        8'd2:  fetch = mk(OP_ADDI, 6, 0, 0, 0);
        8'd3:  fetch = mk(OP_ST,   6, 8, 0, 0);              // GPIO <= i
        8'd4:  fetch = mk(OP_ADDI, 1, 0, 0, 0);              // c = 0
        8'd5:  fetch = mk(OP_ADDI, 2, 0, 0, STR_BASE);
        8'd6:  fetch = mk(OP_ADDI, 3, 0, 0, STR_BASE + 4 * STR_LEN);
        8'd7:  fetch = mk(OP_LD,   5, 2, 0, 0);              // ch = *p
        8'd8:  fetch = mk(OP_XOR,  1, 1, 5, 0);              // c ^= ch
        8'd9:  fetch = mk(OP_ST,   1, 0, 0, CVAR);           // c kept in memory
        8'd10: fetch = mk(OP_ADDI, 2, 2, 0, 4);
        8'd11: fetch = mk(OP_BNE,  0, 2, 3, 7);
        8'd12: fetch = mk(OP_ADD,  9, 6, 6, 0);
        8'd13: fetch = mk(OP_ADD,  9, 9, 9, 0);              // 4*i
        8'd14: fetch = mk(OP_ST,   1, 9, 0, RES_BASE);       // result[i]
        8'd15: fetch = mk(OP_ST,   0, 8, 0, 0);              // GPIO <= 0
        8'd16: fetch = mk(OP_ADDI, 6, 6, 0, 1);
        8'd17: fetch = mk(OP_BNE,  0, 6, 7, 3);
        8'd18: fetch = mk(OP_ST,   7, 8, 0, 0);              // GPIO <= IRUNS (finished)
        default: fetch = mk(OP_HALT, 0, 0, 0, 0);
      endcase
      3'd1: unique case (pc)
        8'd0:  fetch = mk(OP_ADDI, 7, 0, 0, BASIC_RUNS);
        8'd1:  fetch = mk(OP_ADDI, 6, 0, 0, 0);
        8'd2:  fetch = mk(OP_LD,   1, 0, 0, BASIC_BASE);     // a
        8'd3:  fetch = mk(OP_LD,   2, 0, 0, BASIC_BASE + 4); // b
        8'd4:  fetch = mk(OP_LD,   3, 0, 0, BASIC_BASE + 8); // c
        8'd5:  fetch = mk(OP_LD,   4, 0, 0, BASIC_BASE + 12);// d
        8'd6:  fetch = mk(OP_ADD,  1, 1, 2, 0);
        8'd7:  fetch = mk(OP_ADD,  3, 3, 4, 0);
        8'd8:  fetch = mk(OP_SUB,  1, 1, 3, 0);
        8'd9:  fetch = mk(OP_ADD,  9, 6, 6, 0);
        8'd10: fetch = mk(OP_ADD,  9, 9, 9, 0);
        8'd11: fetch = mk(OP_ST,   1, 9, 0, RES_BASE);
        8'd12: fetch = mk(OP_ADDI, 6, 6, 0, 1);
        8'd13: fetch = mk(OP_BNE,  0, 6, 7, 2);
        default: fetch = mk(OP_HALT, 0, 0, 0, 0);
      endcase
      3'd3: unique case (pc)
        8'd0:  fetch = mk(OP_ADDI, 7, 0, 0, IRUNS);
        8'd1:  fetch = mk(OP_ADDI, 8, 0, 0, GPIO_OUT);
        8'd2:  fetch = mk(OP_ADDI, 6, 0, 0, 0);
        8'd3:  fetch = mk(OP_ST,   6, 8, 0, 0);              // GPIO <= i
        8'd4:  fetch = mk(OP_ADDI, 2, 0, 0, ARR_BASE);       // fill: p
        8'd5:  fetch = mk(OP_ADDI, 3, 0, 0, 9);              //       v = 9
        8'd6:  fetch = mk(OP_ADDI, 4, 0, 0, ARR_BASE + 40);
        8'd7:  fetch = mk(OP_ST,   3, 2, 0, 0);
        8'd8:  fetch = mk(OP_ADDI, 2, 2, 0, 4);
        8'd9:  fetch = mk(OP_ADDI, 3, 3, 0, MINUS1);
        8'd10: fetch = mk(OP_BNE,  0, 2, 4, 7);
        8'd11: fetch = mk(OP_ADDI, 11, 0, 0, ARR_BASE + 36); // last pair of the pass
        8'd12: fetch = mk(OP_ADDI, 12, 0, 0, 0);             // swapped = 0
        8'd13: fetch = mk(OP_ADDI, 2, 0, 0, ARR_BASE);
        8'd14: fetch = mk(OP_BEQ,  0, 2, 11, 24);
        8'd15: fetch = mk(OP_LD,   3, 2, 0, 0);
        8'd16: fetch = mk(OP_LD,   4, 2, 0, 4);
        8'd17: fetch = mk(OP_SLTU, 5, 4, 3, 0);              // a[y+1] < a[y]
        8'd18: fetch = mk(OP_BEQ,  0, 5, 0, 22);
        8'd19: fetch = mk(OP_ST,   4, 2, 0, 0);              // swap
        8'd20: fetch = mk(OP_ST,   3, 2, 0, 4);
        8'd21: fetch = mk(OP_ADDI, 12, 0, 0, 1);
        8'd22: fetch = mk(OP_ADDI, 2, 2, 0, 4);
        8'd23: fetch = mk(OP_BEQ,  0, 0, 0, 14);
        8'd24: fetch = mk(OP_ADDI, 11, 11, 0, MINUS4);
        8'd25: fetch = mk(OP_BNE,  0, 12, 0, 12);
        8'd26: fetch = mk(OP_ADDI, 2, 0, 0, ARR_BASE);       // check order
        8'd27: fetch = mk(OP_ADDI, 13, 0, 0, 0);
        8'd28: fetch = mk(OP_ADDI, 4, 0, 0, ARR_BASE + 36);
        8'd29: fetch = mk(OP_LD,   3, 2, 0, 0);
        8'd30: fetch = mk(OP_LD,   5, 2, 0, 4);
        8'd31: fetch = mk(OP_SLTU, 9, 5, 3, 0);
        8'd32: fetch = mk(OP_ADD,  13, 13, 9, 0);
        8'd33: fetch = mk(OP_ADDI, 2, 2, 0, 4);
        8'd34: fetch = mk(OP_BNE,  0, 2, 4, 29);
        8'd35: fetch = mk(OP_ADD,  9, 6, 6, 0);
        8'd36: fetch = mk(OP_ADD,  9, 9, 9, 0);
        8'd37: fetch = mk(OP_ST,   13, 9, 0, RES_BASE);      // errors of run i
        8'd38: fetch = mk(OP_ST,   0, 8, 0, 0);              // GPIO <= 0
        8'd39: fetch = mk(OP_ADDI, 6, 6, 0, 1);
        8'd40: fetch = mk(OP_BNE,  0, 6, 7, 3);
        8'd41: fetch = mk(OP_ST,   7, 8, 0, 0);              // GPIO <= IRUNS
        default: fetch = mk(OP_HALT, 0, 0, 0, 0);
      endcase
      3'd4: unique case (pc)
        8'd0:  fetch = mk(OP_ADDI, 7, 0, 0, IRUNS);
        8'd1:  fetch = mk(OP_ADDI, 8, 0, 0, GPIO_OUT);
        8'd2:  fetch = mk(OP_ADDI, 6, 0, 0, 0);
        8'd3:  fetch = mk(OP_ST,   6, 8, 0, 0);              // GPIO <= i
        8'd4:  fetch = mk(OP_ADDI, 2, 0, 0, GMAT);           // matrix element
        8'd5:  fetch = mk(OP_ADDI, 3, 0, 0, MSG);            // code-word bit
        8'd6:  fetch = mk(OP_ADDI, 4, 0, 0, MSG + 28);
        8'd7:  fetch = mk(OP_ADDI, 10, 0, 0, DVEC);          // row: message bit
        8'd8:  fetch = mk(OP_ADDI, 11, 0, 0, DVEC + 16);
        8'd9:  fetch = mk(OP_LD,   12, 2, 0, 0);
        8'd10: fetch = mk(OP_LD,   13, 10, 0, 0);
        8'd11: fetch = mk(OP_AND,  12, 12, 13, 0);
        8'd12: fetch = mk(OP_LD,   14, 3, 0, 0);
        8'd13: fetch = mk(OP_ADD,  14, 14, 12, 0);
        8'd14: fetch = mk(OP_ST,   14, 3, 0, 0);             // msg[r] += G[r][c] & d[c]
        8'd15: fetch = mk(OP_ADDI, 2, 2, 0, 4);
        8'd16: fetch = mk(OP_ADDI, 10, 10, 0, 4);
        8'd17: fetch = mk(OP_BNE,  0, 10, 11, 9);
        8'd18: fetch = mk(OP_ADDI, 15, 0, 0, 1);
        8'd19: fetch = mk(OP_LD,   14, 3, 0, 0);
        8'd20: fetch = mk(OP_AND,  14, 14, 15, 0);
        8'd21: fetch = mk(OP_ST,   14, 3, 0, 0);             // msg[r] &= 1
        8'd22: fetch = mk(OP_ADDI, 3, 3, 0, 4);
        8'd23: fetch = mk(OP_BNE,  0, 3, 4, 7);
        8'd24: fetch = mk(OP_ADDI, 3, 0, 0, MSG);            // verify
        8'd25: fetch = mk(OP_ADDI, 10, 0, 0, VER);
        8'd26: fetch = mk(OP_ADDI, 13, 0, 0, 0);
        8'd27: fetch = mk(OP_LD,   12, 3, 0, 0);
        8'd28: fetch = mk(OP_LD,   14, 10, 0, 0);
        8'd29: fetch = mk(OP_XOR,  12, 12, 14, 0);
        8'd30: fetch = mk(OP_ADD,  13, 13, 12, 0);
        8'd31: fetch = mk(OP_ADDI, 3, 3, 0, 4);
        8'd32: fetch = mk(OP_ADDI, 10, 10, 0, 4);
        8'd33: fetch = mk(OP_BNE,  0, 3, 4, 27);
        8'd34: fetch = mk(OP_ADD,  9, 6, 6, 0);
        8'd35: fetch = mk(OP_ADD,  9, 9, 9, 0);
        8'd36: fetch = mk(OP_ST,   13, 9, 0, RES_BASE);      // errors of run i
        8'd37: fetch = mk(OP_ADDI, 3, 0, 0, MSG);            // clear msg
        8'd38: fetch = mk(OP_ST,   0, 3, 0, 0);
        8'd39: fetch = mk(OP_ADDI, 3, 3, 0, 4);
        8'd40: fetch = mk(OP_BNE,  0, 3, 4, 38);
        8'd41: fetch = mk(OP_ST,   0, 8, 0, 0);              // GPIO <= 0
        8'd42: fetch = mk(OP_ADDI, 6, 6, 0, 1);
        8'd43: fetch = mk(OP_BNE,  0, 6, 7, 3);
        8'd44: fetch = mk(OP_ST,   7, 8, 0, 0);              // GPIO <= IRUNS
        default: fetch = mk(OP_HALT, 0, 0, 0, 0);
      endcase
      default: unique case (pc)
        8'd0:  fetch = mk(OP_ADDI, 1, 0, 0, 0);
        8'd1:  fetch = mk(OP_ADDI, 2, 0, 0, 100);
        8'd2:  fetch = mk(OP_ADDI, 1, 1, 0, 1);
        8'd3:  fetch = mk(OP_BNE,  0, 1, 2, 2);
        8'd4:  fetch = mk(OP_ST,   1, 0, 0, RES_BASE);
        default: fetch = mk(OP_HALT, 0, 0, 0, 0);
      endcase
    endcase
  endfunction

  cpu_state_t s_q, s_d;
  instr_t     ins;
  logic       run;
  logic [31:0] a, b, ea;

  assign ins      = fetch(prog_i, s_q.pc);
  assign run      = grant_i && !s_q.halted;
  assign a        = (ins.rs1 == 0) ? 32'd0 : rdata1_i;
  assign b        = (ins.rs2 == 0 && ins.op != OP_ST) ? 32'd0 : rdata2_i;
  assign ea       = a + ins.imm;
  assign state_o  = STATE_BITS'(s_q);
  assign halted_o = s_q.halted;
  assign st_latch_o = run && ins.op == OP_ST && !s_q.phase;

  always_comb begin
    s_d   = s_q;
    rf_o  = '{raddr1: ins.rs1, raddr2: (ins.op == OP_ST) ? ins.rd : ins.rs2,
              waddr: ins.rd, wdata: '0, we: 1'b0};
    bus_o = '0;
    if (run) begin
      unique case (ins.op)
        OP_ADDI, OP_ADD, OP_SUB, OP_XOR, OP_AND, OP_SLTU: begin
          unique case (ins.op)
            OP_ADDI: rf_o.wdata = ea;
            OP_ADD:  rf_o.wdata = a + b;
            OP_SUB:  rf_o.wdata = a - b;
            OP_XOR:  rf_o.wdata = a ^ b;
            OP_AND:  rf_o.wdata = a & b;
            default: rf_o.wdata = {31'd0, a < b};
          endcase
          rf_o.we    = (ins.rd != 0);
          s_d.pc     = s_q.pc + 1'b1;
        end
        OP_LD: begin
          bus_o = '{req: 1'b1, we: 1'b0, addr: ea, wdata: '0};
          if (bus_i.ready) begin
            rf_o.wdata = bus_i.rdata;
            rf_o.we    = (ins.rd != 0);
            s_d.pc     = s_q.pc + 1'b1;
          end
        end
        OP_ST: begin
          if (!s_q.phase) begin
            s_d.st_addr_q = ea;
            s_d.st_data_q = (ins.rd == 0) ? 32'd0 : rdata2_i;
            s_d.phase     = 1'b1;
          end else begin
            bus_o = '{req: 1'b1, we: 1'b1, addr: s_q.st_addr_q, wdata: s_q.st_data_q};
            if (bus_i.ready) begin
              s_d.phase = 1'b0;
              s_d.pc    = s_q.pc + 1'b1;
            end
          end
        end
        OP_BNE: s_d.pc = (a != b) ? ins.imm[7:0] : s_q.pc + 1'b1;
        OP_BEQ: s_d.pc = (a == b) ? ins.imm[7:0] : s_q.pc + 1'b1;
        default: s_d.halted = 1'b1;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         s_q <= '0;
    else if (restore_i) s_q <= cpu_state_t'(ckpt_state_i[SW-1:0]);
    else if (seu_i)     s_q <= s_d ^ cpu_state_t'(seu_mask_i[SW-1:0]);
    else                s_q <= s_d;
  end

endmodule
