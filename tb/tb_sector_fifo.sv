// tb_sector_fifo: self-checking test of the per-bank FIFO queue.
// Random push/pop traffic against a queue reference model, checking data
// order, full/empty/level at every cycle, the two-sector capacity and flush.
// Timing: 10 ns clock, stimulus on the falling edge, watchdog after 2 ms.
// The two-sector depth is the architecture's; fall-through reads and flush
// are this design's own.
module tb_sector_fifo;
  localparam int unsigned W = 16, D = 512;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic flush, push, pop, full, empty;
  logic [W-1:0] wd, rd;
  logic [$clog2(D):0] level;
  int checks = 0, failures = 0;
  logic [W-1:0] model [$];

  sector_fifo #(.WIDTH(W), .DEPTH(D)) dut (
    .clk, .rst_n, .flush_i(flush), .push_i(push), .wr_data_i(wd), .pop_i(pop),
    .rd_data_o(rd), .full_o(full), .empty_o(empty), .level_o(level));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic step(bit pu, bit po, int unsigned pct = 50);
    push = pu; pop = po; wd = W'($urandom);
    @(negedge clk);
  endtask

  // reference update and compare on every rising edge
  always @(posedge clk) if (rst_n) begin
    bit dp, dq;
    dp = push && (model.size() < D) && !flush;
    dq = pop && (model.size() > 0) && !flush;
    if (!flush) begin
      check(level == ($clog2(D)+1)'(model.size()), "level");
      check(full == (model.size() == D), "full");
      check(empty == (model.size() == 0), "empty");
      if (model.size() > 0) check(rd == model[0], "head data");
    end
    if (flush) model.delete();
    else begin
      if (dq) void'(model.pop_front());
      if (dp) model.push_back(wd);
    end
  end

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    flush = 0; push = 0; pop = 0; wd = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    // fill completely: two sectors of 256 words
    repeat (D + 5) step(1, 0);
    check(full && level == D, "capacity is two sectors");
    // random mixed traffic
    repeat (3000) step($urandom_range(0, 99) < 55, $urandom_range(0, 99) < 50);
    // drain
    repeat (D + 5) step(0, 1);
    check(empty, "drained");
    // simultaneous push and pop
    repeat (10) step(1, 0);
    repeat (100) step(1, 1);
    check(level == 10, "push+pop keeps level");
    flush = 1; step(0, 0); flush = 0;
    check(empty && level == 0, "flush empties");
    step(0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
