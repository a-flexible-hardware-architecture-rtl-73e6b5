// tb_ata_dll: self-checking test of the ATA data link layer.
// The layer drives a physical layer and a compact flash model. A write
// packet of several sectors is fed from a source with random gaps, a read
// packet of the same sectors is taken by a sink with random back-pressure,
// and the data read must equal the data written. Also checked: the card
// stored the sectors at the right LBAs, one command per packet, exactly
// 256 data-register accesses per sector, one sector_done pulse per sector,
// done/busy behaviour, and an ERR status ending the packet with err_o.
// Timing: 10 ns clock, stimulus on the falling edge, watchdog after 20 ms.
// The command-setting / data-access / sector-release order checked here is
// the architecture's; the exact register sequence and the handshakes are
// this design's own.
module tb_ata_dll;
  import nvm_pkg::*;
  localparam int unsigned SW = 256;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, busy, done, err, sdone;
  packet_t pkt;
  acc_req_t req; acc_rsp_t rsp;
  logic src_valid, src_ready, snk_valid, snk_ready, inj;
  logic [15:0] src_data, snk_data;
  logic sel_n, rw_n, doe, ack_n;
  logic [3:0] addr; logic [15:0] dout, din;
  int checks = 0, failures = 0;
  int n_done = 0, n_err = 0, n_sdone = 0;

  ata_dll #(.SECTOR_WORDS(SW)) dut (
    .clk, .rst_n, .start_i(start), .pkt_i(pkt), .busy_o(busy), .done_o(done), .err_o(err),
    .sector_done_o(sdone), .acc_o(req), .acc_i(rsp),
    .src_valid_i(src_valid), .src_data_i(src_data), .src_ready_o(src_ready),
    .snk_valid_o(snk_valid), .snk_data_o(snk_data), .snk_ready_i(snk_ready));
  phy_ip u_phy (.clk, .rst_n, .req_i(req), .rsp_o(rsp), .ip_sel_n(sel_n), .ip_rw_n(rw_n),
    .ip_addr(addr), .ip_dout(dout), .ip_doe(doe), .ip_din(din), .ip_ack_n(ack_n));
  cf_bank_model #(.SECTOR_WORDS(SW), .ACK_DELAY(1), .CMD_BUSY(15), .SREL_BUSY(12)) card (
    .clk, .ip_sel_n(sel_n), .ip_rw_n(rw_n), .ip_addr(addr), .ip_dout(dout), .ip_doe(doe),
    .ip_din(din), .ip_ack_n(ack_n), .inject_err_i(inj));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // source: a queue of words, offered with random gaps
  logic [15:0] src_q [$];
  logic [15:0] got_q [$];
  // an offered word stays offered until taken; the sink keeps ready high
  // while a read is outstanding (both may change once an access is answered)
  logic gap, ack_d;
  initial begin gap = 0; ack_d = 0; end
  always @(negedge clk) begin
    if (!req.req || ack_d) gap <= ($urandom_range(0, 3) == 0);
    ack_d <= rsp.ack;
  end
  assign src_valid = (src_q.size() > 0) && !gap;
  assign src_data  = (src_q.size() > 0) ? src_q[0] : 16'h0;
  assign snk_ready = !gap;
  always @(posedge clk) begin
    if (src_ready) begin
      check(src_valid, "pop only when valid");
      void'(src_q.pop_front());
    end
    if (snk_valid) got_q.push_back(snk_data);
    if (done && rst_n) n_done++;
    if (err && rst_n)  n_err++;
    if (sdone && rst_n) n_sdone++;
  end

  task automatic run_packet(dir_e d, int unsigned lba, int unsigned cnt);
    @(negedge clk);
    pkt = '{dir: d, lba: LBA_W'(lba), count: 9'(cnt)};
    start = 1; @(negedge clk); start = 0;
    check(busy, "busy after start");
    while (busy) @(negedge clk);
    repeat (2) @(negedge clk);
  endtask

  initial begin
    #20000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [15:0] sent [$];
    int unsigned NS = 3, LBA = 1000;
    start = 0; pkt = '0; inj = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    // write packet
    for (int i = 0; i < NS * SW; i++) begin
      logic [15:0] w = 16'($urandom);
      src_q.push_back(w); sent.push_back(w);
    end
    run_packet(DIR_WRITE, LBA, NS);
    check(n_done == 1 && n_err == 0, "write packet done without error");
    check(src_q.size() == 0, "all words taken");
    check(card.n_cmds == 1, "one command per packet");
    check(card.n_wsect == NS, "card stored every sector");
    check(card.n_data == NS * SW, "256 data accesses per sector");
    check(n_sdone == NS, "sector_done per sector");
    for (int i = 0; i < NS * SW; i++) begin
      int unsigned a = LBA * SW + i;
      if (!card.mem.exists(a) || card.mem[a] != sent[i]) begin
        check(0, $sformatf("card word %0d", i)); break;
      end
    end
    checks++;
    // read packet
    run_packet(DIR_READ, LBA, NS);
    check(n_done == 2 && n_err == 0, "read packet done without error");
    check(got_q.size() == NS * SW, "read word count");
    begin
      int bad = 0;
      for (int i = 0; i < NS * SW && i < got_q.size(); i++) if (got_q[i] != sent[i]) bad++;
      check(bad == 0, $sformatf("read data matches written (%0d bad)", bad));
    end
    check(card.n_busy_polls > 0, "sector release polled while busy");
    // error packet
    inj = 1;
    run_packet(DIR_WRITE, 5, 2);
    inj = 0;
    check(n_err == 1 && n_done == 3, "ERR status ends packet with error");
    check(card.n_wsect == NS, "nothing written on error");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
