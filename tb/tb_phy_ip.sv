// tb_phy_ip: self-checking test of the physical layer gateway.
// Register writes and reads through the gateway to the card model, checked
// against the values written; the bus-cycle length is checked against the
// set-up + acknowledge delay; a card that never acknowledges must produce
// a time-out response after TIMEOUT cycles. A random run of 300 reads and
// writes to the task-file registers is checked against a reference copy,
// and a monitor checks the bus rules on every clock: address, direction
// and write data stable while select is low, data driven only on writes,
// and at most one response per request.
// Timing: 10 ns clock, stimulus on the falling edge, watchdog after
// 2 ms. Single atomic accesses through a gateway are the architecture's;
// the bus cycle and the time-out are this design's own.
module tb_phy_ip;
  import nvm_pkg::*;
  localparam int unsigned TIMEOUT = 40, ACKD = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  acc_req_t req;
  acc_rsp_t rsp;
  logic sel_n, rw_n, doe, ack_n_card, ack_n, dead;
  logic [3:0] addr;
  logic [15:0] dout, din;
  int checks = 0, failures = 0;

  phy_ip #(.SETUP_CYCLES(1), .TIMEOUT(TIMEOUT)) dut (
    .clk, .rst_n, .req_i(req), .rsp_o(rsp), .ip_sel_n(sel_n), .ip_rw_n(rw_n),
    .ip_addr(addr), .ip_dout(dout), .ip_doe(doe), .ip_din(din), .ip_ack_n(ack_n));

  cf_bank_model #(.ACK_DELAY(ACKD)) card (
    .clk, .ip_sel_n(sel_n), .ip_rw_n(rw_n), .ip_addr(addr), .ip_dout(dout), .ip_doe(doe),
    .ip_din(din), .ip_ack_n(ack_n_card), .inject_err_i(1'b0));

  assign ack_n = dead ? 1'b1 : ack_n_card;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic access(bit we, logic [3:0] a, logic [15:0] wdata,
                        output logic [15:0] rdata, output bit err, output int cyc);
    req = '{req: 1'b1, we: we, addr: a, wdata: wdata};
    cyc = 0;
    do begin @(negedge clk); cyc++; end while (!rsp.ack);
    rdata = rsp.rdata; err = rsp.err;
    req = '0;
    // let the cycle finish
    while (!sel_n || !ack_n) @(negedge clk);
  endtask

  // bus-rule monitor
  int n_unstable = 0, n_doe_bad = 0, n_sel = 0;
  logic sel_q = 1'b1; logic [3:0] addr_q; logic rw_q; logic [15:0] dout_q;
  always @(posedge clk) if (rst_n) begin
    if (!sel_n && !sel_q && (addr != addr_q || rw_n != rw_q || (!rw_n && dout != dout_q))) n_unstable++;
    if (!sel_n && doe != !rw_n) n_doe_bad++;
    if (sel_q && !sel_n) n_sel++;
    sel_q <= sel_n; addr_q <= addr; rw_q <= rw_n; dout_q <= dout;
  end

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [15:0] r; bit e; int c;
    req = '0; dead = 0;
    repeat (3) @(negedge clk); rst_n = 1; @(negedge clk);
    // write the three LBA registers and read them back
    for (int i = 0; i < 3; i++) begin
      logic [7:0] v;
      v = 8'($urandom);
      access(1, 4'(3 + i), {8'h00, v}, r, e, c);
      check(!e, "write no error");
      access(0, 4'(3 + i), 16'h0, r, e, c);
      check(!e && r[7:0] == v, "register read back");
    end
    // write-strobe fields seen by the card
    access(1, 4'd2, 16'h00A5, r, e, c);
    access(0, 4'd2, 16'h0, r, e, c);
    check(r == 16'h00A5, "sector count read back");
    // cycle length: 1 set-up + card delay + detection
    access(0, 4'd7, 16'h0, r, e, c);
    check(c >= ACKD + 2 && c <= ACKD + 5, $sformatf("access length %0d cycles", c));
    check(r[6] == 1'b1, "card reports ready");
    // time-out
    dead = 1;
    access(0, 4'd7, 16'h0, r, e, c);
    check(e, "time-out flagged");
    check(c >= TIMEOUT && c <= TIMEOUT + 4, $sformatf("time-out after %0d cycles", c));
    dead = 0;
    @(negedge clk);
    // random register traffic against a reference copy
    begin
      logic [7:0] ref_v [2:6];
      int bad, nacc0;
      bad = 0;
      for (int a = 2; a <= 6; a++) begin
        ref_v[a] = 8'(a * 17);
        access(1, 4'(a), {8'h00, ref_v[a]}, r, e, c);
      end
      nacc0 = n_sel;
      for (int k = 0; k < 300; k++) begin
        int a;
        a = 2 + int'($urandom_range(0, 4));
        if ($urandom_range(0, 1) == 1) begin
          ref_v[a] = 8'($urandom);
          access(1, 4'(a), {8'($urandom), ref_v[a]}, r, e, c);
          if (e) bad++;
        end else begin
          access(0, 4'(a), 16'h0, r, e, c);
          if (e || r[7:0] != ref_v[a]) bad++;
        end
        repeat ($urandom_range(0, 3)) @(negedge clk);
      end
      check(bad == 0, $sformatf("random register traffic (%0d bad)", bad));
      check(n_sel - nacc0 == 300, $sformatf("one bus cycle per request (%0d)", n_sel - nacc0));
    end
    check(n_unstable == 0, "address, direction and data stable while selected");
    check(n_doe_bad == 0, "data driven exactly on writes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
