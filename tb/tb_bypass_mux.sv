// tb_bypass_mux: self-checking test of the bypass multiplexer.
// A simple responder stands for the physical layer (acknowledges after a
// fixed delay, read data = address-based pattern). Checks that accesses
// reach the physical side from the selected path only, that answers go
// back to that path only, and that a select change asked for during an
// outstanding access waits until the access has been answered.
// Timing: 10 ns clock, stimulus on the falling edge, watchdog after
// 100 us. That a multiplexer lets the host reach the bank is the
// architecture's; switching only between accesses is this design's rule.
module tb_bypass_mux;
  import nvm_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic sel, host_sel;
  acc_req_t dreq, hreq, preq;
  acc_rsp_t drsp, hrsp, prsp;
  int checks = 0, failures = 0;

  bypass_mux dut (.clk, .rst_n, .sel_host_i(sel), .host_sel_o(host_sel),
    .dll_req_i(dreq), .dll_rsp_o(drsp), .host_req_i(hreq), .host_rsp_o(hrsp),
    .phy_req_o(preq), .phy_rsp_i(prsp));

  // responder: ack 3 cycles after a request is seen, data = ~wdata or addr pattern
  int cnt; logic busy_r, who; acc_req_t lat;
  always_ff @(posedge clk) begin
    if (!rst_n) begin cnt <= 0; busy_r <= 0; prsp <= '0; end
    else begin
      prsp.ack <= 0;
      if (!busy_r && preq.req && !prsp.ack) begin busy_r <= 1; cnt <= 0; lat <= preq; who <= host_sel; end
      else if (busy_r) begin
        cnt <= cnt + 1;
        if (cnt == 2) begin
          prsp.ack <= 1; prsp.rdata <= {lat.wdata[11:0], lat.addr}; busy_r <= 0;
        end
      end
    end
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // one access from a path; returns read data and which path saw an ack
  task automatic go(bit from_host, logic [3:0] a, logic [15:0] w, output logic [15:0] r);
    acc_req_t q;
    q = '{req: 1'b1, we: 1'b0, addr: a, wdata: w};
    if (from_host) hreq = q; else dreq = q;
    do @(negedge clk); while (!(from_host ? hrsp.ack : drsp.ack));
    r = from_host ? hrsp.rdata : drsp.rdata;
    if (from_host) hreq = '0; else dreq = '0;
  endtask

  int stray_h = 0, stray_d = 0;
  always @(posedge clk) if (rst_n) begin
    // an answer must go to the path whose request was taken
    if (hrsp.ack && !who) stray_h++;
    if (drsp.ack && who)  stray_d++;
  end

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [15:0] r;
    sel = 0; dreq = '0; hreq = '0;
    repeat (3) @(negedge clk); rst_n = 1; @(negedge clk);
    // data link layer path
    go(0, 4'd7, 16'h0123, r);
    check(r == {12'h123, 4'd7}, "dll access answered");
    // host request while dll path selected: must not reach the physical side
    hreq = '{req: 1'b1, we: 1'b0, addr: 4'd2, wdata: 16'h0abc};
    repeat (6) begin @(negedge clk); check(!hrsp.ack && !(preq.req && preq.addr == 4'd2), "host blocked"); end
    hreq = '0;
    // switch to host
    sel = 1; repeat (2) @(negedge clk);
    check(host_sel, "switched to host");
    go(1, 4'd5, 16'h0456, r);
    check(r == {12'h456, 4'd5}, "host access answered");
    // switch request during an outstanding host access must wait for it
    hreq = '{req: 1'b1, we: 1'b1, addr: 4'd3, wdata: 16'h0777};
    @(negedge clk); @(negedge clk);
    sel = 0;
    @(negedge clk);
    check(host_sel, "no switch while access outstanding");
    while (!hrsp.ack) @(negedge clk);
    hreq = '0;
    repeat (3) @(negedge clk);
    check(!host_sel, "switch after access finished");
    go(0, 4'd1, 16'h0999, r);
    check(r == {12'h999, 4'd1}, "dll path again");
    check(stray_h == 0 && stray_d == 0, "no answer to the wrong path");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
