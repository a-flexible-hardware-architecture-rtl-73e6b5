// tb_nvm_mmu: self-checking test of the memory management unit.
// Write stream: the host pushes 8 sectors while the two bank sides drain
// their queues at random rates; bank b must receive stream sectors
// b, b+2, b+4, ... in order, and the host must be stalled when the
// current queue is full. Read stream: the bank sides deliver their
// sectors at random rates and the host must read the stream back in
// order. Super block: the host fills it under the lock, bank 1 streams it
// out through its port, then bank 0 streams a new block in.
// Timing: 10 ns clock, stimulus on the falling edge, watchdog after
// 50 ms. Per-bank queues of two sectors with a cyclic multiplexer and a
// super block under a lock are the architecture's; the word handshakes
// and the sector_ready rule are this design's own.
module tb_nvm_mmu;
  import nvm_pkg::*;
  localparam int unsigned NB = 2, SW = 256, FS = 2, SBW = 256;
  localparam int unsigned NSEC = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  dir_e dir; logic flush, push, pop, can_push, can_pop, sready;
  logic [15:0] wd, rd;
  logic cur;
  logic [NB-1:0][9:0] level;
  logic [NB-1:0] sv, sr, kv, kr, route, lreq;
  logic [NB-1:0][15:0] sd, kd;
  logic restart, acq, rel, denied, sbwe, sbden;
  lock_owner_e owner; logic lbank;
  logic [7:0] sbaddr; logic [15:0] sbwd, sbrd;
  int checks = 0, failures = 0;

  nvm_mmu #(.NUM_BANKS(NB), .SECTOR_WORDS(SW), .FIFO_SECTORS(FS), .SB_WORDS(SBW)) dut (
    .clk, .rst_n, .dir_i(dir), .flush_i(flush), .single_i(1'b0),
    .host_push_i(push), .host_wdata_i(wd), .host_can_push_o(can_push),
    .host_pop_i(pop), .host_rdata_o(rd), .host_can_pop_o(can_pop),
    .sector_ready_o(sready), .cur_bank_o(cur), .level_o(level),
    .dll_src_valid_o(sv), .dll_src_data_o(sd), .dll_src_ready_i(sr),
    .dll_snk_valid_i(kv), .dll_snk_data_i(kd), .dll_snk_ready_o(kr),
    .sb_route_i(route), .sb_restart_i(restart),
    .lock_acquire_i(acq), .lock_release_i(rel), .lock_denied_o(denied),
    .lock_req_i(lreq), .lock_owner_o(owner), .lock_bank_o(lbank),
    .sb_host_we_i(sbwe), .sb_host_addr_i(sbaddr), .sb_host_wdata_i(sbwd),
    .sb_host_rdata_o(sbrd), .sb_host_wr_denied_o(sbden));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic logic [15:0] word(int unsigned sec, int unsigned i);
    return 16'(sec * 1000 + i * 3 + 17);
  endfunction

  // bank-side drivers
  logic [15:0] got [NB][$];
  logic [15:0] feed [NB][$];
  logic [NB-1:0] rnd;
  bit drain_en;
  always @(negedge clk) for (int b = 0; b < NB; b++) rnd[b] <= ($urandom_range(0, 2) == 0);
  always_comb for (int b = 0; b < NB; b++) begin
    sr[b] = drain_en && sv[b] && rnd[b];
    kv[b] = drain_en && (feed[b].size() > 0) && rnd[b] && !route[b];
    kd[b] = (feed[b].size() > 0) ? feed[b][0] : 16'h0;
  end
  always @(posedge clk) if (rst_n) for (int b = 0; b < NB; b++) begin
    if (sr[b]) got[b].push_back(sd[b]);
    if (kv[b] && kr[b]) void'(feed[b].pop_front());
  end

  // host side: decide at the falling edge from can_push/can_pop, which
  // do not depend on push/pop, so the word moves at the next rising edge
  int stalls = 0;
  task automatic host_write(logic [15:0] w);
    while (!can_push) begin stalls++; @(negedge clk); end
    wd = w; push = 1; @(negedge clk); push = 0;
  endtask
  task automatic host_read(output logic [15:0] r);
    while (!can_pop) @(negedge clk);
    r = rd; pop = 1; @(negedge clk); pop = 0;
  endtask

  initial begin
    #50000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    dir = DIR_WRITE; flush = 0; push = 0; pop = 0; wd = 0; route = 0; lreq = 0;
    restart = 0; acq = 0; rel = 0; sbwe = 0; sbaddr = 0; sbwd = 0; drain_en = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    flush = 1; @(negedge clk); flush = 0;
    check(sready && can_push, "empty queue: sector ready for writing");
    // fill without draining: two sectors per bank fit, the host is stalled after that
    for (int s = 0; s < 2 * NB; s++)
      for (int i = 0; i < SW; i++) host_write(word(s, i));
    check(level[0] == 10'(2 * SW) && level[1] == 10'(2 * SW), "each queue holds two sectors");
    check(!can_push && !sready, "host stalled when current queue full");
    drain_en = 1;
    for (int s = 2 * NB; s < NSEC; s++)
      for (int i = 0; i < SW; i++) host_write(word(s, i));
    repeat (4000) @(negedge clk);
    check(stalls > 0, "host saw back-pressure");
    for (int b = 0; b < NB; b++) begin
      int bad;
      bad = 0;
      check(got[b].size() == (NSEC / NB) * SW, $sformatf("bank %0d word count %0d", b, got[b].size()));
      for (int k = 0; k < NSEC / NB; k++)
        for (int i = 0; i < SW; i++)
          if (k * SW + i < got[b].size() && got[b][k * SW + i] != word(k * NB + b, i)) bad++;
      check(bad == 0, $sformatf("bank %0d got its sectors in order (%0d bad)", b, bad));
    end
    // ---------------- read stream
    drain_en = 0;
    dir = DIR_READ; flush = 1; @(negedge clk); flush = 0;
    for (int b = 0; b < NB; b++)
      for (int k = 0; k < NSEC / NB; k++)
        for (int i = 0; i < SW; i++) feed[b].push_back(word(100 + k * NB + b, i));
    drain_en = 1;
    begin
      int bad = 0;
      for (int s = 0; s < NSEC; s++)
        for (int i = 0; i < SW; i++) begin
          logic [15:0] r;
          host_read(r);
          if (r != word(100 + s, i)) bad++;
        end
      check(bad == 0, $sformatf("read stream re-ordered (%0d bad)", bad));
    end
    // ---------------- super block
    drain_en = 0;
    acq = 1; @(negedge clk); acq = 0;
    check(owner == LK_HOST, "host holds lock");
    for (int i = 0; i < SBW; i++) begin sbaddr = 8'(i); sbwd = 16'(16'hA000 + i); sbwe = 1; @(negedge clk); end
    sbwe = 0; rel = 1; @(negedge clk); rel = 0;
    got[1].delete();
    lreq = 2'b10; @(negedge clk); @(negedge clk);
    check(owner == LK_BANK && lbank == 1, "bank 1 holds lock");
    route = 2'b10; restart = 1; @(negedge clk); restart = 0;
    check(sv[1] && !sv[0], "super block offered to bank 1 only");
    drain_en = 1;
    while (got[1].size() < SBW) @(negedge clk);
    drain_en = 0;
    begin
      int bad = 0;
      for (int i = 0; i < SBW; i++) if (got[1][i] != 16'(16'hA000 + i)) bad++;
      check(bad == 0, "bank 1 streamed the super block");
    end
    route = 0; lreq = 0; @(negedge clk); @(negedge clk);
    // bank 0 loads a new block
    lreq = 2'b01; @(negedge clk); @(negedge clk);
    route = 2'b01; restart = 1; @(negedge clk); restart = 0;
    check(kr[0], "super block accepts words from bank 0");
    for (int i = 0; i < SBW; i++) feed[0].push_back(16'(16'h5000 + i * 5));
    force kv[0] = feed[0].size() > 0;
    drain_en = 1;
    while (feed[0].size() > 0) @(negedge clk);
    release kv[0];
    drain_en = 0;
    route = 0; lreq = 0; @(negedge clk); @(negedge clk);
    begin
      int bad = 0;
      for (int i = 0; i < SBW; i++) begin sbaddr = 8'(i); #1 if (sbrd != 16'(16'h5000 + i * 5)) bad++; @(negedge clk); end
      check(bad == 0, "bank 0 loaded the super block");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
