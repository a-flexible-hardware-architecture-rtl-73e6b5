// tb_superblock_lock: self-checking test of the super block store and its
// lock. Checks host acquire/release, refusal of a host acquire while a bank
// holds the lock, refusal of host writes without the lock, round-robin
// grants among waiting banks, and data written through the bank port and
// read through the host port (and the reverse).
// Timing: 10 ns clock, stimulus on the falling edge, watchdog after
// 100 us. Sharing the super block under a lock is the architecture's; the
// arbitration order and the refusal flags are this design's own.
module tb_superblock_lock;
  import nvm_pkg::*;
  localparam int unsigned WORDS = 256, NB = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic acq, rel, denied, hwe, hden, bwe;
  logic [NB-1:0] breq;
  lock_owner_e owner; logic obank;
  logic [7:0] haddr, baddr;
  logic [15:0] hwd, hrd, bwd, brd;
  int checks = 0, failures = 0;

  superblock_lock #(.WORDS(WORDS), .NUM_BANKS(NB)) dut (
    .clk, .rst_n, .host_acquire_i(acq), .host_release_i(rel), .host_denied_o(denied),
    .bank_req_i(breq), .owner_o(owner), .owner_bank_o(obank),
    .host_we_i(hwe), .host_addr_i(haddr), .host_wdata_i(hwd), .host_rdata_o(hrd),
    .host_wr_denied_o(hden), .bank_we_i(bwe), .bank_addr_i(baddr), .bank_wdata_i(bwd),
    .bank_rdata_o(brd));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  int n_denied = 0;
  always @(posedge clk) if (rst_n && denied) n_denied++;

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    acq = 0; rel = 0; hwe = 0; bwe = 0; breq = 0; haddr = 0; baddr = 0; hwd = 0; bwd = 0;
    repeat (3) @(negedge clk); rst_n = 1; @(negedge clk);
    check(owner == LK_FREE, "free after reset");
    // host write without lock is refused
    haddr = 8'd10; hwd = 16'hDEAD; hwe = 1;
    #1 check(hden, "write without lock flagged");
    @(negedge clk); hwe = 0;
    // host takes lock and writes the block
    acq = 1; @(negedge clk); acq = 0;
    check(owner == LK_HOST, "host owns lock");
    for (int i = 0; i < WORDS; i++) begin
      haddr = 8'(i); hwd = 16'(i * 7 + 3); hwe = 1; #1 check(!hden, "owner write allowed");
      @(negedge clk);
    end
    hwe = 0;
    // a bank asks while host holds it: must wait
    breq = 2'b01; repeat (3) @(negedge clk);
    check(owner == LK_HOST, "bank waits for host");
    rel = 1; @(negedge clk); rel = 0;
    @(negedge clk);
    check(owner == LK_BANK && obank == 0, "bank 0 granted after release");
    // bank 0 reads the block through its port
    begin
      int bad = 0;
      for (int i = 0; i < WORDS; i++) begin baddr = 8'(i); #1 if (brd != 16'(i * 7 + 3)) bad++; @(negedge clk); end
      check(bad == 0, "bank port reads host data");
    end
    // host acquire refused while bank holds it
    acq = 1; @(negedge clk); acq = 0; @(negedge clk);
    check(n_denied == 1 && owner == LK_BANK, "host acquire refused");
    // bank writes a word; host reads it
    baddr = 8'd77; bwd = 16'hBEEF; bwe = 1; @(negedge clk); bwe = 0;
    haddr = 8'd77; #1 check(hrd == 16'hBEEF, "host reads bank write");
    // both banks waiting: round robin gives bank 1 next
    breq = 2'b11; @(negedge clk);
    breq = 2'b10; @(negedge clk);   // bank 0 releases
    @(negedge clk);
    check(owner == LK_BANK && obank == 1, "round robin to bank 1");
    breq = 2'b01; @(negedge clk); @(negedge clk);
    check(owner == LK_BANK && obank == 0, "then bank 0");
    breq = 2'b00; @(negedge clk); @(negedge clk);
    check(owner == LK_FREE, "free again");
    // bank write ignored when it does not own the lock
    baddr = 8'd5; bwd = 16'h5555; bwe = 1; @(negedge clk); bwe = 0;
    haddr = 8'd5; #1 check(hrd == 16'(5 * 7 + 3), "bank write without lock ignored");
    // host write ignored when the lock is free or held by a bank
    haddr = 8'd6; hwd = 16'h6666; hwe = 1; #1 check(hden, "free-lock host write flagged");
    @(negedge clk); hwe = 0;
    #1 check(hrd == 16'(6 * 7 + 3), "host write without lock ignored");
    breq = 2'b10; @(negedge clk); @(negedge clk);
    haddr = 8'd9; hwd = 16'h9999; hwe = 1; #1 check(hden, "bank-held host write flagged");
    @(negedge clk); hwe = 0;
    #1 check(hrd == 16'(9 * 7 + 3), "host write under bank lock ignored");
    breq = 2'b00;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
