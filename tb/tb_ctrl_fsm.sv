// tb_ctrl_fsm: self-checking test of the control state machine.
// The data link layers are replaced by stubs that stay busy a random
// number of cycles per packet; the super block lock is the real one.
// Checked: the packets each bank receives (direction, LBA, length) for
// streams of several sizes split over two banks in 32-sector packets, the
// done pulse, super block save to every bank one at a time with the lock
// held and the route set, super block load from one bank, banks under
// bypass receiving nothing, single-bank streams, and error reporting.
// Timing: 10 ns clock, stimulus on the falling edge, watchdog after 5 ms.
// The sector-wise split over the banks, 32-sector packets and saving the
// super block to several banks under a lock are the architecture's; the
// LBA mapping, job order and single-bank mode are this design's own.
module tb_ctrl_fsm;
  import nvm_pkg::*;
  localparam int unsigned NB = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic single, ssingle;
  logic start, sb_save, sb_load, sb_load_bank;
  dir_e dir, sdir;
  logic [LBA_W-1:0] lba, sb_lba;
  logic [31:0] count;
  logic [8:0] packet;
  logic [NB-1:0] bypass, lreq, route, dstart, dbusy, ddone, derr;
  packet_t [NB-1:0] dpkt;
  lock_owner_e owner; logic lbank;
  logic restart, flush, sbusy, sbb, done, err, ebank, denied;
  logic [15:0] unused_rd, unused_brd; logic unused_den;
  int checks = 0, failures = 0;

  ctrl_fsm #(.NUM_BANKS(NB)) dut (
    .clk, .rst_n, .start_i(start), .dir_i(dir), .lba_i(lba), .count_i(count), .packet_i(packet),
    .sb_save_i(sb_save), .sb_load_i(sb_load), .sb_load_bank_i(sb_load_bank), .sb_lba_i(sb_lba),
    .bypass_i(bypass), .single_i(single), .lock_owner_i(owner), .lock_bank_i(lbank), .lock_req_o(lreq),
    .sb_route_o(route), .sb_restart_o(restart), .dll_start_o(dstart), .dll_pkt_o(dpkt),
    .dll_busy_i(dbusy), .dll_done_i(ddone), .dll_err_i(derr), .flush_o(flush),
    .stream_busy_o(sbusy), .stream_dir_o(sdir), .stream_single_o(ssingle), .sb_busy_o(sbb), .done_o(done), .err_o(err),
    .err_bank_o(ebank));

  superblock_lock #(.WORDS(256), .NUM_BANKS(NB)) u_lock (
    .clk, .rst_n, .host_acquire_i(1'b0), .host_release_i(1'b0), .host_denied_o(denied),
    .bank_req_i(lreq), .owner_o(owner), .owner_bank_o(lbank),
    .host_we_i(1'b0), .host_addr_i(8'd0), .host_wdata_i(16'd0), .host_rdata_o(unused_rd),
    .host_wr_denied_o(unused_den), .bank_we_i(1'b0), .bank_addr_i(8'd0), .bank_wdata_i(16'd0),
    .bank_rdata_o(unused_brd));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // data link layer stubs and packet log
  typedef struct { dir_e d; int unsigned lba; int unsigned cnt; bit sb; } rec_t;
  rec_t log_q [NB][$];
  int   timer [NB];
  bit   inject_err;
  int   n_done = 0, n_err = 0, sb_overlap = 0, sb_unlocked = 0;
  always @(posedge clk) begin
    if (!rst_n) begin
      dbusy <= '0; ddone <= '0; derr <= '0;
      for (int b = 0; b < NB; b++) timer[b] = 0;
    end else begin
      ddone <= '0; derr <= '0;
      if (done) n_done++;
      if (err) n_err++;
      if (route == 2'b11) sb_overlap++;
      for (int b = 0; b < NB; b++) begin
        if (route[b] && !(owner == LK_BANK && int'(lbank) == b)) sb_unlocked++;
        if (dstart[b]) begin
          rec_t r;
          r.d = dpkt[b].dir; r.lba = dpkt[b].lba; r.cnt = dpkt[b].count; r.sb = route[b];
          log_q[b].push_back(r);
          dbusy[b] <= 1'b1;
          timer[b] = 5 + $urandom_range(0, 30) + int'(dpkt[b].count);
        end else if (dbusy[b]) begin
          if (timer[b] == 0) begin
            dbusy[b] <= 1'b0; ddone[b] <= 1'b1; derr[b] <= inject_err;
          end else timer[b]--;
        end
      end
    end
  end

  task automatic pulse(ref logic s);
    s = 1; @(negedge clk); s = 0;
  endtask

  task automatic run_stream(dir_e d, int unsigned l, int unsigned c);
    int nd;
    for (int b = 0; b < NB; b++) log_q[b].delete();
    nd = n_done;
    dir = d; lba = LBA_W'(l); count = c;
    pulse(start);
    while (n_done == nd) @(negedge clk);
  endtask

  // expected packets of bank b for a stream of c sectors
  task automatic expect_stream(dir_e d, int unsigned l, int unsigned c, int unsigned pk);
    for (int b = 0; b < NB; b++) begin
      int unsigned rem = (c + NB - 1 - b) / NB, a = l, k = 0, bad = 0;
      int stream_pk = 0;
      foreach (log_q[b][i]) begin
        if (log_q[b][i].sb) continue;
        stream_pk++;
        begin
          int unsigned n = (rem < pk) ? rem : pk;
          if (log_q[b][i].d != d || log_q[b][i].lba != a || log_q[b][i].cnt != n) bad++;
          rem -= n; a += n;
        end
      end
      check(bad == 0 && rem == 0, $sformatf("bank %0d packets of a %0d-sector stream", b, c));
    end
  endtask

  initial begin
    #5000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int nd;
    start = 0; sb_save = 0; sb_load = 0; sb_load_bank = 0; dir = DIR_WRITE; lba = 0;
    sb_lba = 28'h0000010; count = 0; packet = 9'd32; bypass = 0; inject_err = 0; single = 0;
    repeat (3) @(negedge clk); rst_n = 1; @(negedge clk);
    run_stream(DIR_WRITE, 1000, 70);
    expect_stream(DIR_WRITE, 1000, 70, 32);
    run_stream(DIR_READ, 1000, 5);
    expect_stream(DIR_READ, 1000, 5, 32);
    check(!sbusy, "stream not busy after done");
    // super block save while a long stream runs
    for (int b = 0; b < NB; b++) log_q[b].delete();
    nd = n_done;
    dir = DIR_WRITE; lba = 28'd5000; count = 200;
    pulse(start);
    repeat (30) @(negedge clk);
    pulse(sb_save);
    while (n_done == nd || sbb) @(negedge clk);
    expect_stream(DIR_WRITE, 5000, 200, 32);
    for (int b = 0; b < NB; b++) begin
      int nsb, first;
      nsb = 0; first = -1;
      foreach (log_q[b][i]) if (log_q[b][i].sb) begin
        nsb++;
        check(log_q[b][i].d == DIR_WRITE && log_q[b][i].lba == 28'h10 && log_q[b][i].cnt == 1,
              $sformatf("bank %0d super block save packet", b));
      end
      check(nsb == 1, $sformatf("bank %0d saved the super block once (%0d)", b, nsb));
      // it was interleaved with the stream
      foreach (log_q[b][i]) if (log_q[b][i].sb) first = i;
      check(first > 0 && first < log_q[b].size() - 1, $sformatf("bank %0d save between stream packets", b));
    end
    check(sb_overlap == 0, "super block never routed to two banks at once");
    check(sb_unlocked == 0, "super block routed only with the lock");
    // super block load from bank 1
    for (int b = 0; b < NB; b++) log_q[b].delete();
    sb_load_bank = 1; pulse(sb_load);
    while (sbb) @(negedge clk);
    check(log_q[0].size() == 0 && log_q[1].size() == 1 && log_q[1][0].sb && log_q[1][0].d == DIR_READ,
          "super block loaded from bank 1 only");
    // bypass: bank 1 given to the host gets nothing
    bypass = 2'b10;
    for (int b = 0; b < NB; b++) log_q[b].delete();
    dir = DIR_WRITE; lba = 0; count = 4; pulse(start);
    repeat (300) @(negedge clk);
    check(log_q[1].size() == 0 && log_q[0].size() == 1, "bypassed bank skipped");
    check(sbusy, "stream waits for the bypassed bank");
    bypass = 0;
    nd = n_done;
    while (n_done == nd) @(negedge clk);
    check(log_q[1].size() == 1, "bank 1 resumes after bypass");
    // single-bank stream: everything on bank 0, consecutive LBAs
    single = 1;
    run_stream(DIR_WRITE, 300, 70);
    single = 0;
    check(ssingle && log_q[1].size() == 0 && log_q[0].size() == 3, "single-bank stream on bank 0 only");
    begin
      int unsigned a, bad;
      a = 300; bad = 0;
      foreach (log_q[0][i]) begin
        if (log_q[0][i].lba != a || log_q[0][i].cnt != ((i < 2) ? 32 : 6)) bad++;
        a += log_q[0][i].cnt;
      end
      check(bad == 0, "single-bank packets 32+32+6 at consecutive LBAs");
    end
    run_stream(DIR_READ, 300, 3);
    check(!ssingle && log_q[0].size() == 1 && log_q[1].size() == 1, "two banks again after single mode");
    // error
    inject_err = 1;
    nd = n_err;
    run_stream(DIR_WRITE, 0, 2);
    inject_err = 0;
    @(negedge clk);
    check(n_err == nd + 2, "errors reported");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
