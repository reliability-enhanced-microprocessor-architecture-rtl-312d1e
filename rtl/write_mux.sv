// write_mux: the "Write Mux" between the processor's AMBA master port and the bus.
//
// Reads always pass through unchanged. A write is steered by sel_i from the CR
// control:
//   WM_PASS  - the processor's write goes to the bus; its ready comes from the bus.
//   WM_BLOCK - the write is acknowledged to the processor in the same cycle but
//              nothing reaches the bus (first execution of a slice: the write enable
//              is bypassed, address and data are only recorded).
//   WM_HOLD  - the write is neither acknowledged nor issued; the processor waits.
//   WM_VOTE  - the voted (address, data) pair from the CR control is written instead
//              of the processor's own; ready comes from the bus.
// Purely combinational. The four-way selection and the HOLD case are this design's
// way of realising the described "bypassing of the memory write enable".
module write_mux
  import cr_pkg::*;
(
  input  wmux_sel_e sel_i,
  input  wr_t       voted_i,
  input  bus_req_t  proc_req_i,
  output bus_rsp_t  proc_rsp_o,
  output bus_req_t  bus_req_o,
  input  bus_rsp_t  bus_rsp_i
);

  always_comb begin
    bus_req_o  = proc_req_i;
    proc_rsp_o = bus_rsp_i;
    if (proc_req_i.req && proc_req_i.we) begin
      unique case (sel_i)
        WM_PASS: ;
        WM_BLOCK: begin
          bus_req_o.req    = 1'b0;
          proc_rsp_o.ready = 1'b1;
        end
        WM_HOLD: begin
          bus_req_o.req    = 1'b0;
          proc_rsp_o.ready = 1'b0;
        end
        WM_VOTE: begin
          bus_req_o.addr  = voted_i.addr;
          bus_req_o.wdata = voted_i.data;
        end
        default: ;
      endcase
    end
  end

endmodule
