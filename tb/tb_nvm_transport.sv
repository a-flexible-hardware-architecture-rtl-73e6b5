// tb_nvm_transport: end-to-end test of the whole engine at its default
// size (two banks, 256-word sectors, two-sector queues, 32-sector
// packets) with two compact flash models.
// Sequence: direct (bypass) register access to both cards; host fills the
// super block under the lock; a 196-sector (100 KB) write stream, with a super block
// save issued while it runs; check every sector landed on bank n mod 2 at
// LBA base + n/2 and that both cards hold the super block; a read stream
// of the same sectors must return the original stream; a write to the
// super block without the lock must be refused; the super block is
// reloaded from bank 1; an ATA error on bank 0 must be reported; the same
// 40-sector stream is written once over both banks and once in
// single-bank mode (all on bank 0 at consecutive LBAs), and the dual-bank
// stream must take clearly fewer cycles; a stream with a super block save
// period of 4 sectors must save it to both banks by itself.
// Each mechanism (bypass access, host stall on a full queue, sector-ready
// interrupt, both banks busy at once, super block save per bank, lock
// refusal, super block load, error report, multi-packet streams) is counted
// and a mechanism that never happened counts as a failure.
// Timing: 10 ns clock, host accesses on the falling edge, watchdog after
// 60 ms; the whole run takes well under a million cycles. The layering,
// the two banks, the distribution and the super block are the
// architecture's; the register map, LBA mapping and card delays are this
// design's own.
module tb_nvm_transport;
  import nvm_pkg::*;
  localparam int unsigned NB = 2, SW = 256;
  localparam int unsigned NSEC = 196;   // 100 KB = 100,000 bytes in 512-byte sectors
  localparam int unsigned BASE = 100, SBLBA = 7;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic hvalid, hwe, hready, irq;
  logic [HOST_AW-1:0] haddr;
  logic [HOST_W-1:0] hwdata, hrdata;
  logic [NB-1:0] sel_n, rw_n, doe, ack_n, inj;
  logic [NB-1:0][3:0] addr;
  logic [NB-1:0][15:0] dout, din;
  int checks = 0, failures = 0;

  nvm_transport dut (
    .clk, .rst_n, .host_valid(hvalid), .host_we(hwe), .host_addr(haddr),
    .host_wdata(hwdata), .host_ready(hready), .host_rdata(hrdata), .irq,
    .ip_sel_n(sel_n), .ip_rw_n(rw_n), .ip_addr(addr), .ip_dout(dout), .ip_doe(doe),
    .ip_din(din), .ip_ack_n(ack_n));

  cf_bank_model #(.SECTOR_WORDS(SW), .ACK_DELAY(2), .CMD_BUSY(20), .SREL_BUSY(20)) card0 (
    .clk, .ip_sel_n(sel_n[0]), .ip_rw_n(rw_n[0]), .ip_addr(addr[0]), .ip_dout(dout[0]),
    .ip_doe(doe[0]), .ip_din(din[0]), .ip_ack_n(ack_n[0]), .inject_err_i(inj[0]));
  cf_bank_model #(.SECTOR_WORDS(SW), .ACK_DELAY(3), .CMD_BUSY(25), .SREL_BUSY(15)) card1 (
    .clk, .ip_sel_n(sel_n[1]), .ip_rw_n(rw_n[1]), .ip_addr(addr[1]), .ip_dout(dout[1]),
    .ip_doe(doe[1]), .ip_din(din[1]), .ip_ack_n(ack_n[1]), .inject_err_i(inj[1]));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // ------------------------------------------------------------ host bus
  int n_stall = 0;
  task automatic bus(bit we, logic [HOST_AW-1:0] a, logic [31:0] w, output logic [31:0] r);
    hvalid = 1; hwe = we; haddr = a; hwdata = w;
    #1;   // let the combinational ready settle
    while (!hready) begin
      if (a == RA_DATA) n_stall++;
      @(negedge clk); #1;
    end
    r = hrdata;
    @(negedge clk);
    hvalid = 0;
  endtask
  task automatic wr(logic [HOST_AW-1:0] a, logic [31:0] w);
    logic [31:0] r; bus(1, a, w, r);
  endtask
  task automatic rd(logic [HOST_AW-1:0] a, output logic [31:0] r);
    bus(0, a, 32'h0, r);
  endtask

  function automatic logic [15:0] word(int unsigned sec, int unsigned i);
    return 16'(sec * 977 + i * 13 + 5);
  endfunction

  // ------------------------------------------------------------ monitors
  int n_irq_rise = 0, n_both_busy = 0;
  logic irq_d = 0;
  always @(posedge clk) if (rst_n) begin
    if (irq && !irq_d) n_irq_rise++;
    irq_d <= irq;
    if (sel_n == 2'b00) n_both_busy++;   // both cards strobed in the same cycle
  end

  initial begin
    #60000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [31:0] r, st;
    int n_bypass = 0, n_lock_refused = 0, n_sb_load = 0, n_err = 0, n_auto_save = 0;
    int t0;
    hvalid = 0; hwe = 0; haddr = 0; hwdata = 0; inj = 0;
    repeat (3) @(negedge clk); rst_n = 1; @(negedge clk);

    // ---------------- direct access through the bypass
    wr(RA_CONFIG, 32'h0000_0300);
    rd(RA_STATUS, st);
    for (int k = 0; k < 20 && st[29:28] != 2'b11; k++) rd(RA_STATUS, st);
    check(st[29:28] == 2'b11, "both banks switched to the host path");
    for (int b = 0; b < NB; b++) begin
      logic [HOST_AW-1:0] base;
      base = {RA_DIR_PAGE, 4'(b), 4'h0};
      rd(base | HOST_AW'(ATA_STATUS), r);
      check(r[ST_DRDY] && !r[ST_BSY], $sformatf("bank %0d ready through bypass", b));
      wr(base | HOST_AW'(ATA_LBA1), 32'(8'h5A + b));
      rd(base | HOST_AW'(ATA_LBA1), r);
      check(r[7:0] == 8'(8'h5A + b), $sformatf("bank %0d register via bypass", b));
      n_bypass++;
    end
    wr(RA_CONFIG, 32'h0000_0001);        // interrupts on, no bypass
    rd(RA_STATUS, st);
    for (int k = 0; k < 20 && st[29:28] != 2'b00; k++) rd(RA_STATUS, st);
    check(st[29:28] == 2'b00, "both banks back on the data link path");

    // ---------------- super block written by the host under the lock
    wr(RA_SB_LBA, SBLBA);
    wr(RA_LOCK, 1);
    rd(RA_LOCK, r); check(r[0], "host owns the lock");
    for (int i = 0; i < SW; i++) wr({RA_SB_PAGE, 8'(i)}, 32'(16'hC000 + i));
    wr(RA_LOCK, 0);

    // ---------------- write stream
    wr(RA_LBA, BASE);
    wr(RA_COUNT, NSEC);
    rd(RA_PACKET, r); check(r == 32, "default packet of 32 sectors");
    wr(RA_CMD, 32'(1) << CMDB_START_WR);
    t0 = int'($time / 10);
    for (int s = 0; s < NSEC; s++) begin
      // host waits for the sector-ready interrupt before each sector
      while (!irq) @(negedge clk);
      for (int i = 0; i < SW; i++) wr(RA_DATA, 32'(word(s, i)));
      if (s == 10) wr(RA_CMD, 32'(1) << CMDB_SB_SAVE);
    end
    do rd(RA_STATUS, st); while (!st[2] || st[4]);
    $display("write stream of %0d sectors: %0d cycles", NSEC, int'($time / 10) - t0);
    check(!st[3], "no error during write stream");
    rd(RA_SECTORS, r); check(r == NSEC, $sformatf("sector counter %0d", r));
    // placement on the cards
    begin
      int bad = 0;
      for (int s = 0; s < NSEC; s++)
        for (int i = 0; i < SW; i++) begin
          int unsigned a;
          a = ((BASE + s / NB) * SW) + i;
          if (s % NB == 0) begin if (!card0.mem.exists(a) || card0.mem[a] != word(s, i)) bad++; end
          else             begin if (!card1.mem.exists(a) || card1.mem[a] != word(s, i)) bad++; end
        end
      check(bad == 0, $sformatf("stream sectors on bank n mod 2 at base + n/2 (%0d bad)", bad));
      bad = 0;
      for (int i = 0; i < SW; i++) begin
        int unsigned a;
        a = SBLBA * SW + i;
        if (!card0.mem.exists(a) || card0.mem[a] != 16'(16'hC000 + i)) bad++;
        if (!card1.mem.exists(a) || card1.mem[a] != 16'(16'hC000 + i)) bad++;
      end
      check(bad == 0, "super block copied to both banks");
    end
    // 98 sectors per bank = packets of 32 + 32 + 32 + 2, plus one super
    // block packet
    check(card0.n_cmds == 5 && card1.n_cmds == 5, $sformatf("ATA commands per bank %0d/%0d", card0.n_cmds, card1.n_cmds));

    // ---------------- read stream
    wr(RA_CMD, 32'(1) << CMDB_START_RD);
    begin
      int bad = 0;
      for (int s = 0; s < NSEC; s++)
        for (int i = 0; i < SW; i++) begin
          rd(RA_DATA, r);
          if (r[15:0] != word(s, i)) bad++;
        end
      check(bad == 0, $sformatf("read stream returns the written stream (%0d bad)", bad));
    end
    do rd(RA_STATUS, st); while (!st[2]);
    check(!st[3] && st[7], "read stream done without error");

    // ---------------- lock refusal
    wr({RA_SB_PAGE, 8'd3}, 32'h1234);   // no lock held
    rd(RA_STATUS, st);
    if (st[5]) n_lock_refused++;
    rd({RA_SB_PAGE, 8'd3}, r);
    check(r[15:0] == 16'hC003, "write without lock left the super block unchanged");
    wr(RA_CMD, 32'(1) << CMDB_CLR_ERR);

    // ---------------- super block load from bank 1
    wr(RA_LOCK, 1);
    for (int i = 0; i < SW; i++) wr({RA_SB_PAGE, 8'(i)}, 32'h0);
    wr(RA_LOCK, 0);
    wr(RA_CMD, (32'(1) << CMDB_SB_LOAD) | (32'd1 << 8));
    do rd(RA_STATUS, st); while (st[4]);
    begin
      int bad = 0;
      for (int i = 0; i < SW; i++) begin rd({RA_SB_PAGE, 8'(i)}, r); if (r[15:0] != 16'(16'hC000 + i)) bad++; end
      check(bad == 0, "super block reloaded from bank 1");
      if (bad == 0) n_sb_load++;
    end

    // ---------------- error on bank 0
    inj[0] = 1;
    wr(RA_LBA, 2000); wr(RA_COUNT, 2);
    wr(RA_CMD, 32'(1) << CMDB_START_WR);
    for (int s = 0; s < 2; s++) for (int i = 0; i < SW; i++) wr(RA_DATA, 32'(word(s, i)));
    do rd(RA_STATUS, st); while (!st[2]);
    inj[0] = 0;
    rd(RA_ERRBANK, r);
    if (st[3] && r == 0) n_err++;
    check(irq, "interrupt raised on error");

    // ---------------- single-bank against dual-bank stream
    wr(RA_CMD, 32'(1) << CMDB_CLR_ERR);
    begin
      int c0, c1, t_dual, t_single, bad;
      c0 = card0.n_cmds; c1 = card1.n_cmds;
      wr(RA_LBA, 4000); wr(RA_COUNT, 40);
      t0 = int'($time / 10);
      wr(RA_CMD, 32'(1) << CMDB_START_WR);
      for (int s = 0; s < 40; s++) for (int i = 0; i < SW; i++) wr(RA_DATA, 32'(word(s + 7, i)));
      do rd(RA_STATUS, st); while (!st[2]);
      t_dual = int'($time / 10) - t0;
      check(card0.n_cmds == c0 + 1 && card1.n_cmds == c1 + 1, "dual-bank stream: one packet per bank");
      wr(RA_CONFIG, 32'h0000_0003);      // interrupts on, single-bank streams
      c0 = card0.n_cmds; c1 = card1.n_cmds;
      wr(RA_LBA, 3000); wr(RA_COUNT, 40);
      t0 = int'($time / 10);
      wr(RA_CMD, 32'(1) << CMDB_START_WR);
      for (int s = 0; s < 40; s++) for (int i = 0; i < SW; i++) wr(RA_DATA, 32'(word(s + 7, i)));
      do rd(RA_STATUS, st); while (!st[2]);
      t_single = int'($time / 10) - t0;
      $display("40-sector write stream: dual bank %0d cycles, single bank %0d cycles", t_dual, t_single);
      check(!st[3] && card0.n_cmds == c0 + 2 && card1.n_cmds == c1, "single-bank stream: 32+8 packets on bank 0 only");
      bad = 0;
      for (int s = 0; s < 40; s++)
        for (int i = 0; i < SW; i++) begin
          int unsigned a;
          a = (3000 + s) * SW + i;
          if (!card0.mem.exists(a) || card0.mem[a] != word(s + 7, i)) bad++;
        end
      check(bad == 0, $sformatf("single-bank sectors at consecutive LBAs of bank 0 (%0d bad)", bad));
      wr(RA_CMD, 32'(1) << CMDB_START_RD);
      bad = 0;
      for (int s = 0; s < 40; s++) for (int i = 0; i < SW; i++) begin
        rd(RA_DATA, r); if (r[15:0] != word(s + 7, i)) bad++;
      end
      do rd(RA_STATUS, st); while (!st[2]);
      check(bad == 0 && !st[3], "single-bank read stream returns the stream");
      check(t_single * 10 > t_dual * 17, "two banks nearly double the stream rate");
      wr(RA_CONFIG, 32'h0000_0001);
    end

    // ---------------- periodic super block save during a stream
    begin
      int c0, c1;
      c0 = card0.n_cmds; c1 = card1.n_cmds;
      wr(RA_SB_PERIOD, 4);
      wr(RA_LBA, 5000); wr(RA_COUNT, 8);
      wr(RA_CMD, 32'(1) << CMDB_START_WR);
      for (int s = 0; s < 8; s++) for (int i = 0; i < SW; i++) wr(RA_DATA, 32'(word(s, i)));
      do rd(RA_STATUS, st); while (!st[2] || st[4]);
      wr(RA_SB_PERIOD, 0);
      // one stream packet per bank plus at least one super block packet
      if (card0.n_cmds >= c0 + 2 && card1.n_cmds >= c1 + 2) n_auto_save++;
      check(n_auto_save == 1, $sformatf("periodic save reached both banks (%0d/%0d commands)",
                                        card0.n_cmds - c0, card1.n_cmds - c1));
    end

    // ---------------- mechanisms seen
    $display("bypass=%0d stalls=%0d irq=%0d both_busy=%0d lock_refused=%0d sb_load=%0d err=%0d",
             n_bypass, n_stall, n_irq_rise, n_both_busy, n_lock_refused, n_sb_load, n_err);
    $display("periodic_save=%0d", n_auto_save);
    check(n_bypass == NB, "bypass access happened");
    check(n_stall > 0, "host stalled on a full queue");
    check(n_irq_rise > 0, "sector-ready interrupt happened");
    check(n_both_busy > 0, "both banks accessed at the same time");
    check(n_lock_refused > 0, "lock refusal happened");
    check(n_sb_load > 0, "super block load happened");
    check(n_err > 0, "error reported with its bank");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
