// write_mux_tb: self-checking test of the write mux. For random requests and every
// selection it checks what reaches the bus and what the processor is answered:
// reads always pass, PASS forwards the write, BLOCK acknowledges it locally without a
// bus request, HOLD neither issues nor acknowledges, VOTE puts the voted pair on the
// bus with the bus's ready.
module write_mux_tb;
  import cr_pkg::*;

  int checks = 0, failures = 0;
  wmux_sel_e sel;
  wr_t       voted;
  bus_req_t  preq, breq;
  bus_rsp_t  prsp, brsp;

  write_mux dut (.sel_i(sel), .voted_i(voted), .proc_req_i(preq), .proc_rsp_o(prsp),
                 .bus_req_o(breq), .bus_rsp_i(brsp));

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s sel=%0d", what, sel); end
  endtask

  initial begin
    for (int n = 0; n < 2000; n++) begin
      sel   = wmux_sel_e'($urandom_range(3));
      voted = '{addr: $urandom(), data: $urandom()};
      preq  = '{req: 1'($urandom()), we: 1'($urandom()), addr: $urandom(), wdata: $urandom()};
      brsp  = '{ready: 1'($urandom()), rdata: $urandom()};
      #1;
      check(prsp.rdata == brsp.rdata, "read data");
      if (!(preq.req && preq.we)) begin
        check(breq == preq, "non-write passes");
        check(prsp.ready == brsp.ready, "non-write ready");
      end else begin
        unique case (sel)
          WM_PASS: begin
            check(breq == preq, "pass request");
            check(prsp.ready == brsp.ready, "pass ready");
          end
          WM_BLOCK: begin
            check(!breq.req, "block: no bus request");
            check(prsp.ready, "block: local acknowledge");
          end
          WM_HOLD: begin
            check(!breq.req, "hold: no bus request");
            check(!prsp.ready, "hold: no acknowledge");
          end
          WM_VOTE: begin
            check(breq.req && breq.we && breq.addr == voted.addr && breq.wdata == voted.data,
                  "vote: voted pair on the bus");
            check(prsp.ready == brsp.ready, "vote ready");
          end
          default: ;
        endcase
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
