// ahb_stopper_tb: self-checking test of the AHB stopper handshake. A testbench arbiter
// grants the bus a random number of cycles after HBUSREQ. Checks: no bus request while
// idle; request, lock and write request raised after stop_req; stop_grtd only after the
// grant (with HREADY) and only while stop_req holds; only IDLE transfers; release within
// one cycle of stop_req dropping. It also measures that stop_grtd follows the grant by
// one cycle.
module ahb_stopper_tb;
  import cr_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic stop_req = 0, grtd, busreq, lock, hwrite, hgrant = 0, hready = 1;
  logic [1:0] htrans;
  logic [31:0] haddr;

  ahb_stopper dut (.clk, .rst_n, .stop_req_i(stop_req), .stop_grtd_o(grtd),
                   .hbusreq_o(busreq), .hlock_o(lock), .htrans_o(htrans), .hwrite_o(hwrite),
                   .haddr_o(haddr), .hgrant_i(hgrant), .hready_i(hready));

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 50; n++) begin
      int lat;
      @(negedge clk);
      check(!busreq && !grtd, "idle: no request, no grant");
      stop_req = 1;
      @(negedge clk);
      check(busreq && lock && hwrite && htrans == 2'b00, "request raised with lock, IDLE transfer");
      check(!grtd, "no grant before HGRANT");
      lat = $urandom_range(4);
      repeat (lat) begin
        @(negedge clk);
        check(!grtd, "still waiting for the grant");
      end
      hready = ($urandom_range(1) == 1);
      hgrant = 1;
      @(negedge clk);
      if (!hready) begin
        check(!grtd, "grant without HREADY is not taken");
        hready = 1;
        @(negedge clk);
      end
      check(grtd, "stop granted one cycle after HGRANT");
      repeat ($urandom_range(5)) begin
        @(negedge clk);
        check(grtd && busreq && htrans == 2'b00, "bus held with IDLE transfers");
      end
      stop_req = 0;
      #1 check(!grtd && !busreq, "released as stop_req drops");
      @(negedge clk);
      hgrant = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
