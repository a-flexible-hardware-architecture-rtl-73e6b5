// tb_nvm_timing: timing test of the whole engine against card models that
// are slowed down to the ATA packet timing of the reference compact flash
// set-up, with the engine clocked at 55 MHz (one clock = 1/55 us).
//
// Card timing used (reference values, converted to 55 MHz clocks):
//   single memory access t_ma = 0.59 us  -> about 32 clocks from one data
//                                           register access to the next
//   sector release       t_srel = 4 us   -> 220 clocks busy after a sector
//   command setting      t_com = 4 us    -> the six task-file writes plus a
//                                           short busy time
// so that a sector access t_sacc should come to about 154 us and a
// 32-sector ATA packet t_ata_acc to about 4900 us.
// Checked: the measured single register access, sector access and packet
// times are within 3 % of those values, so the engine adds almost nothing
// to what the cards need; a 64-sector dual-bank stream takes about as long
// as a 32-sector single-bank one, i.e. two banks double the data rate.
// Timing: 10 ns simulation clock (cycle counts are read as 55 MHz clocks),
// host accesses on the falling edge, watchdog after 30 ms of simulated
// time. The reference timings come from the architecture's ATA access
// description; the card model and the tolerance are this design's own.
module tb_nvm_timing;
  import nvm_pkg::*;
  localparam int unsigned NB = 2, SW = 256;
  localparam real CLK_MHZ = 55.0;
  // card model timing in clocks
  localparam int unsigned ACK = 26, SREL = 220, CMDB = 10;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic hvalid, hwe, hready, irq;
  logic [HOST_AW-1:0] haddr;
  logic [HOST_W-1:0] hwdata, hrdata;
  logic [NB-1:0] sel_n, rw_n, doe, ack_n;
  logic [NB-1:0][3:0] addr;
  logic [NB-1:0][15:0] dout, din;
  int checks = 0, failures = 0;

  nvm_transport dut (
    .clk, .rst_n, .host_valid(hvalid), .host_we(hwe), .host_addr(haddr),
    .host_wdata(hwdata), .host_ready(hready), .host_rdata(hrdata), .irq,
    .ip_sel_n(sel_n), .ip_rw_n(rw_n), .ip_addr(addr), .ip_dout(dout), .ip_doe(doe),
    .ip_din(din), .ip_ack_n(ack_n));

  for (genvar b = 0; b < NB; b++) begin : g_card
    cf_bank_model #(.SECTOR_WORDS(SW), .ACK_DELAY(ACK), .CMD_BUSY(CMDB), .SREL_BUSY(SREL)) card (
      .clk, .ip_sel_n(sel_n[b]), .ip_rw_n(rw_n[b]), .ip_addr(addr[b]), .ip_dout(dout[b]),
      .ip_doe(doe[b]), .ip_din(din[b]), .ip_ack_n(ack_n[b]), .inject_err_i(1'b0));
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic bit near(real meas, real ref_v, real tol);
    return (meas >= ref_v * (1.0 - tol)) && (meas <= ref_v * (1.0 + tol));
  endfunction

  // ------------------------------------------------------------ host bus
  task automatic bus(bit we, logic [HOST_AW-1:0] a, logic [31:0] w, output logic [31:0] r);
    hvalid = 1; hwe = we; haddr = a; hwdata = w;
    #1;
    while (!hready) begin @(negedge clk); #1; end
    r = hrdata;
    @(negedge clk); hvalid = 0; #1;
  endtask
  task automatic wr(logic [HOST_AW-1:0] a, logic [31:0] w);
    logic [31:0] r; bus(1, a, w, r);
  endtask
  task automatic rd(logic [HOST_AW-1:0] a, output logic [31:0] r);
    bus(0, a, 0, r);
  endtask

  // ------------------------------------------------------------ monitors
  longint unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // bank 0: period of successive data-register accesses within a sector,
  // and time between the first data words of two successive sectors
  longint unsigned last_word, acc_sum = 0, acc_n = 0;
  longint unsigned sect_first [$];
  int unsigned words0 = 0;
  logic sel0_q = 1'b1;
  always @(posedge clk) if (rst_n) begin
    sel0_q <= sel_n[0];
    if (sel0_q && !sel_n[0] && addr[0] == 4'(ATA_DATA) && !rw_n[0]) begin
      if (words0 % SW == 0) sect_first.push_back(cyc);
      else begin
        acc_sum += cyc - last_word;
        acc_n++;
      end
      last_word = cyc;
      words0++;
    end
  end

  function automatic logic [15:0] word(int s, int i);
    return 16'(s * 313 + i * 7 + 1);
  endfunction

  task automatic stream(int unsigned lba, int unsigned n, output longint unsigned t);
    logic [31:0] st;
    longint unsigned t0;
    wr(RA_LBA, lba); wr(RA_COUNT, n);
    t0 = cyc;
    wr(RA_CMD, 32'(1) << CMDB_START_WR);
    for (int s = 0; s < int'(n); s++) for (int i = 0; i < SW; i++) wr(RA_DATA, 32'(word(s, i)));
    do rd(RA_STATUS, st); while (!st[2]);
    check(!st[3], "stream without error");
    t = cyc - t0;
  endtask

  initial begin
    #30000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    longint unsigned t_dual, t_single;
    real t_ma, t_sacc, t_pkt, rate_dual, rate_single;
    hvalid = 0; hwe = 0; haddr = 0; hwdata = 0;
    repeat (3) @(negedge clk); rst_n = 1; @(negedge clk);

    // dual bank: 64 sectors = one 32-sector packet on each bank
    stream(0, 64, t_dual);
    t_ma = real'(acc_sum) / real'(acc_n);
    t_sacc = real'(sect_first[31] - sect_first[0]) / 31.0;
    t_pkt = real'(t_dual);
    $display("access %0.2f us, sector %0.1f us, 64-sector dual-bank stream %0.0f us",
             t_ma / CLK_MHZ, t_sacc / CLK_MHZ, t_pkt / CLK_MHZ);
    check(near(t_ma / CLK_MHZ, 0.59, 0.03), "single memory access about 0.59 us");
    check(near(t_sacc / CLK_MHZ, 154.0, 0.03), "sector access about 154 us");
    check(near(t_pkt / CLK_MHZ, 4900.0, 0.03), "32-sector packet per bank about 4900 us");
    check(g_card[0].card.n_cmds == 1 && g_card[1].card.n_cmds == 1, "one ATA packet per bank");

    // single bank: 32 sectors on bank 0
    wr(RA_CONFIG, 32'h0000_0002);
    stream(1000, 32, t_single);
    check(g_card[0].card.n_cmds == 2 && g_card[1].card.n_cmds == 1, "single-bank packet on bank 0");
    rate_dual   = 64.0 * 512.0 / (real'(t_dual) / CLK_MHZ);     // bytes per us = MB/s
    rate_single = 32.0 * 512.0 / (real'(t_single) / CLK_MHZ);
    $display("data rate at 55 MHz: single bank %0.2f MB/s, dual bank %0.2f MB/s",
             rate_single, rate_dual);
    check(near(real'(t_single) / CLK_MHZ, 4900.0, 0.03), "single-bank 32-sector packet about 4900 us");
    check(rate_dual >= 1.9 * rate_single, "dual bank at least 1.9 times the single-bank rate");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
