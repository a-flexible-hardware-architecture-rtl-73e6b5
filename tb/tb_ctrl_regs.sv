// tb_ctrl_regs: self-checking test of the control/status register set.
// The blocks behind it are replaced by testbench signals. Checked: reset
// values (32-sector packets), read-back of every configuration register,
// the command pulses and their fields, lock acquire/release pulses, the
// status word, data port ready following the queue state, the super block
// window, direct access forwarded and answered when the bank is in bypass
// and refused when it is not, the sector counter, the periodic super
// block save and the interrupt.
// Timing: 10 ns clock, host accesses on the falling edge, watchdog after
// 1 ms. The existence of a control/status register set is the
// architecture's; the register map checked here is this design's own.
module tb_ctrl_regs;
  import nvm_pkg::*;
  localparam int unsigned NB = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic hv, hwe, hready, irq;
  logic [HOST_AW-1:0] ha; logic [31:0] hwd, hrd;
  logic start, sb_save, sb_load, sb_load_bank; dir_e dir_o;
  logic [LBA_W-1:0] lba, sb_lba; logic [31:0] count; logic [8:0] packet;
  logic [NB-1:0] bypass, dll_busy, dll_sector, sb_route, host_sel;
  logic single;
  logic [NB-1:0][15:0] level;
  logic sbusy, sbb, done, err, ebank;
  logic push, pop, can_push, can_pop, sready, cur;
  logic [15:0] dwd, drd;
  logic acq, rel, denied, sbwe, sbden; lock_owner_e owner; logic lbank;
  logic [7:0] sbaddr; logic [15:0] sbwd, sbrd;
  acc_req_t [NB-1:0] dreq; acc_rsp_t [NB-1:0] drsp;
  int checks = 0, failures = 0;
  int n_start = 0, n_save = 0, n_load = 0, n_acq = 0, n_rel = 0;

  ctrl_regs #(.NUM_BANKS(NB), .SB_WORDS(256), .PACKET_DEFAULT(32)) dut (
    .clk, .rst_n, .host_valid_i(hv), .host_we_i(hwe), .host_addr_i(ha), .host_wdata_i(hwd),
    .host_ready_o(hready), .host_rdata_o(hrd), .irq_o(irq),
    .start_o(start), .dir_o(dir_o), .lba_o(lba), .count_o(count), .packet_o(packet),
    .sb_save_o(sb_save), .sb_load_o(sb_load), .sb_load_bank_o(sb_load_bank), .sb_lba_o(sb_lba),
    .bypass_o(bypass), .single_o(single), .stream_busy_i(sbusy), .stream_dir_i(DIR_READ), .sb_busy_i(sbb),
    .done_i(done), .err_i(err), .err_bank_i(ebank), .dll_busy_i(dll_busy),
    .dll_sector_i(dll_sector), .sb_route_i(sb_route), .level_i(level),
    .data_push_o(push), .data_pop_o(pop), .data_wdata_o(dwd), .data_rdata_i(drd),
    .can_push_i(can_push), .can_pop_i(can_pop), .sector_ready_i(sready), .cur_bank_i(cur),
    .lock_acquire_o(acq), .lock_release_o(rel), .lock_denied_i(denied), .lock_owner_i(owner),
    .lock_bank_i(lbank), .sb_we_o(sbwe), .sb_addr_o(sbaddr), .sb_wdata_o(sbwd), .sb_rdata_i(sbrd),
    .sb_wr_denied_i(sbden), .dir_req_o(dreq), .dir_rsp_i(drsp), .host_sel_i(host_sel));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (start) begin n_start++; check(dir_o == (hwd[1] ? DIR_READ : DIR_WRITE), "start carries direction"); end
    if (sb_save) n_save++;
    if (sb_load) begin n_load++; check(sb_load_bank == 1'b1, "load bank field"); end
    if (acq) n_acq++;
    if (rel) n_rel++;
  end

  // direct access responder for bank 1: answers after 4 cycles with ~wdata
  int dcnt = 0; int n_dreq0 = 0;
  always @(posedge clk) begin
    drsp[1] <= '0; drsp[0] <= '0;
    if (dreq[0].req) n_dreq0++;
    if (dreq[1].req && !drsp[1].ack) begin
      dcnt <= dcnt + 1;
      if (dcnt == 3) begin drsp[1].ack <= 1; drsp[1].rdata <= {dreq[1].addr, 12'hABC}; dcnt <= 0; end
    end
  end

  int waits;
  task automatic bus(bit we, logic [HOST_AW-1:0] a, logic [31:0] w, output logic [31:0] r);
    hv = 1; hwe = we; ha = a; hwd = w; waits = 0;
    #1;
    while (!hready) begin waits++; @(negedge clk); #1; end
    r = hrd;
    @(negedge clk); hv = 0;
  endtask

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [31:0] r;
    hv = 0; hwe = 0; ha = 0; hwd = 0; sbusy = 0; sbb = 0; done = 0; err = 0; ebank = 0;
    dll_busy = 2'b01; dll_sector = 0; sb_route = 0; level = {16'd300, 16'd12};
    can_push = 0; can_pop = 0; sready = 0; cur = 1; drd = 16'h4321; denied = 0; owner = LK_FREE;
    lbank = 1; sbrd = 16'h7777; sbden = 0; host_sel = 2'b10;
    repeat (3) @(negedge clk); rst_n = 1; @(negedge clk);
    bus(0, RA_PACKET, 0, r); check(r == 32, "packet default 32");
    bus(1, RA_LBA, 32'h0ABCDEF, r);  bus(0, RA_LBA, 0, r);  check(r == 32'h0ABCDEF && lba == 28'h0ABCDEF, "LBA");
    bus(1, RA_COUNT, 1234, r);       bus(0, RA_COUNT, 0, r); check(r == 1234 && count == 1234, "COUNT");
    bus(1, RA_PACKET, 16, r);        bus(0, RA_PACKET, 0, r); check(r == 16 && packet == 16, "PACKET");
    bus(1, RA_SB_LBA, 99, r);        bus(0, RA_SB_LBA, 0, r); check(r == 99 && sb_lba == 99, "SB_LBA");
    bus(1, RA_CONFIG, 32'h0303, r);  bus(0, RA_CONFIG, 0, r);
    check(r == 32'h0303 && bypass == 2'b11 && single, "CONFIG");
    bus(1, RA_CMD, 32'h2, r);
    bus(1, RA_CMD, 32'h4, r);
    bus(1, RA_CMD, 32'h108, r);
    bus(1, RA_LOCK, 1, r); bus(1, RA_LOCK, 0, r);
    @(negedge clk);
    check(n_start == 1 && n_save == 1 && n_load == 1, "command pulses");
    check(n_acq == 1 && n_rel == 1, "lock pulses");
    // status
    sbusy = 1; sready = 1; owner = LK_BANK;
    bus(0, RA_STATUS, 0, r);
    check(r[0] && r[1] && !r[2] && r[7] && r[9:8] == 2'b01 && r[17:16] == 2'(LK_BANK) &&
          r[20] == 1'b1 && r[24] == 1'b1 && r[29:28] == 2'b10, $sformatf("status word %h", r));
    check(irq, "interrupt on sector ready");
    bus(0, RA_LEVEL, 0, r); check(r == {16'd300, 16'd12}, "queue levels");
    // data port follows the queue state
    fork
      begin repeat (5) @(negedge clk); can_push = 1; end
      bus(1, RA_DATA, 32'h0000BEEF, r);
    join
    check(waits >= 4, "data write waits while queue full");
    can_pop = 1;
    bus(0, RA_DATA, 0, r); check(r == 32'h4321 && waits == 0, "data read");
    // super block window
    fork
      begin @(posedge clk); check(sbwe && sbaddr == 8'h45 && sbwd == 16'h1357, "super block write"); end
      bus(1, {RA_SB_PAGE, 8'h45}, 32'h1357, r);
    join
    bus(0, {RA_SB_PAGE, 8'h10}, 0, r); check(r == 32'h7777, "super block read");
    // direct access: bank 1 in host mode, answered after wait cycles
    bus(0, {RA_DIR_PAGE, 4'd1, 4'd7}, 0, r);
    check(r[15:0] == 16'h7ABC && waits >= 3, "direct access to bank 1");
    // bank 0 not in host mode: refused at once, nothing forwarded
    bus(0, {RA_DIR_PAGE, 4'd0, 4'd7}, 0, r);
    check(waits == 0 && n_dreq0 == 0, "direct access refused");
    bus(0, RA_STATUS, 0, r); check(r[6], "refusal flagged");
    // sector counter counts stream sectors only
    bus(1, RA_CMD, 32'h1, r);
    dll_sector = 2'b11; @(negedge clk); dll_sector = 2'b01; sb_route = 2'b01; @(negedge clk);
    dll_sector = 0; sb_route = 0;
    bus(0, RA_SECTORS, 0, r); check(r == 2, $sformatf("sector counter %0d", r));
    // periodic super block save every 3 stream sectors
    begin
      int ns;
      bus(1, RA_SB_PERIOD, 3, r); bus(0, RA_SB_PERIOD, 0, r); check(r == 3, "SB_PERIOD");
      bus(1, RA_CMD, 32'h1, r);
      ns = n_save;
      dll_sector = 2'b11; @(negedge clk); dll_sector = 0; repeat (2) @(negedge clk);
      check(n_save == ns, "no save before the period");
      dll_sector = 2'b01; sb_route = 2'b10; @(negedge clk); dll_sector = 0; sb_route = 0;
      repeat (2) @(negedge clk);
      check(n_save == ns + 1, "save after 3 stream sectors");
      dll_sector = 2'b11; @(negedge clk); dll_sector = 2'b11; @(negedge clk); dll_sector = 0;
      repeat (2) @(negedge clk);
      check(n_save == ns + 2, "one more save after 4 more sectors");
      dll_sector = 2'b01; @(negedge clk); dll_sector = 0; repeat (2) @(negedge clk);
      check(n_save == ns + 2, "no save at the 8th sector");
      dll_sector = 2'b10; @(negedge clk); dll_sector = 0; repeat (2) @(negedge clk);
      check(n_save == ns + 3, "save at the 9th sector");
      bus(1, RA_SB_PERIOD, 0, r);
      dll_sector = 2'b11; repeat (4) @(negedge clk); dll_sector = 0; repeat (2) @(negedge clk);
      check(n_save == ns + 3, "no automatic save with period 0");
    end
    // error and done flags
    sbusy = 0;
    err = 1; ebank = 1; @(negedge clk); err = 0;
    done = 1; @(negedge clk); done = 0;
    bus(0, RA_STATUS, 0, r); check(r[2] && r[3], "done and error flags");
    bus(0, RA_ERRBANK, 0, r); check(r == 1, "error bank");
    bus(1, RA_CMD, 32'h10, r);
    bus(0, RA_STATUS, 0, r); check(!r[3] && !r[6], "flags cleared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
