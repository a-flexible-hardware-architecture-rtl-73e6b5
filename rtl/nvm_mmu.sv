// nvm_mmu: memory management unit of the transport layer.
//
// It keeps one FIFO queue per memory bank and a multiplexer that steps
// through the queues in a cyclic manner, one sector at a time. On a write
// stream the host's words fill the queue of the current bank; after
// SECTOR_WORDS words the multiplexer moves to the next bank, so that
// consecutive sectors land on consecutive banks. On a read stream the host
// empties the queues in the same order, so the sectors read in parallel
// come back in stream order. Each bank's data link layer drains (write) or
// fills (read) its own queue. The unit also holds the super block of the
// basic file system with its lock (superblock_lock); a bank whose sb_route
// bit is set streams its sector from/to the super block instead of its
// queue. Queues, cyclic multiplexer and super block follow the
// architecture description; the word-level handshakes and the
// sector_ready rule are this design's own.
//
// Host data port: host_push_i/host_pop_i are accepted only while
// host_can_push_o/host_can_pop_o are high. sector_ready_o is high when the
// rest of the current sector can be moved without waiting. flush_i empties
// every queue and returns the multiplexer to bank 0 (start of a stream).
// While single_i is high the multiplexer stays on bank 0 (single-bank
// streams).
module nvm_mmu
  import nvm_pkg::*;
#(
  parameter int unsigned NUM_BANKS    = 2,
  parameter int unsigned SECTOR_WORDS = 256,
  parameter int unsigned FIFO_SECTORS = 2,
  parameter int unsigned SB_WORDS     = 256,
  localparam int unsigned DEPTH = FIFO_SECTORS * SECTOR_WORDS,
  localparam int unsigned LW    = $clog2(DEPTH) + 1,
  localparam int unsigned BW    = (NUM_BANKS > 1) ? $clog2(NUM_BANKS) : 1,
  localparam int unsigned SW    = $clog2(SECTOR_WORDS),
  localparam int unsigned SBAW  = $clog2(SB_WORDS)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  dir_e                     dir_i,
  input  logic                     flush_i,
  input  logic                     single_i,
  // host data port
  input  logic                     host_push_i,
  input  logic [DATA_W-1:0]        host_wdata_i,
  output logic                     host_can_push_o,
  input  logic                     host_pop_i,
  output logic [DATA_W-1:0]        host_rdata_o,
  output logic                     host_can_pop_o,
  output logic                     sector_ready_o,
  output logic [BW-1:0]            cur_bank_o,
  output logic [NUM_BANKS-1:0][LW-1:0] level_o,
  // data link layer streams
  output logic [NUM_BANKS-1:0]              dll_src_valid_o,
  output logic [NUM_BANKS-1:0][DATA_W-1:0]  dll_src_data_o,
  input  logic [NUM_BANKS-1:0]              dll_src_ready_i,
  input  logic [NUM_BANKS-1:0]              dll_snk_valid_i,
  input  logic [NUM_BANKS-1:0][DATA_W-1:0]  dll_snk_data_i,
  output logic [NUM_BANKS-1:0]              dll_snk_ready_o,
  // super block routing and lock
  input  logic [NUM_BANKS-1:0]     sb_route_i,
  input  logic                     sb_restart_i,   // rewind the bank-side word index
  input  logic                     lock_acquire_i,
  input  logic                     lock_release_i,
  output logic                     lock_denied_o,
  input  logic [NUM_BANKS-1:0]     lock_req_i,
  output lock_owner_e              lock_owner_o,
  output logic [BW-1:0]            lock_bank_o,
  input  logic                     sb_host_we_i,
  input  logic [SBAW-1:0]          sb_host_addr_i,
  input  logic [DATA_W-1:0]        sb_host_wdata_i,
  output logic [DATA_W-1:0]        sb_host_rdata_o,
  output logic                     sb_host_wr_denied_o
);

  // ------------------------------------------------ cyclic multiplexer
  logic [BW-1:0] cur;
  logic [SW-1:0] wcnt;     // words of the current sector already moved
  logic          host_xfer;

  logic [NUM_BANKS-1:0]             f_push, f_pop, f_full, f_empty;
  logic [NUM_BANKS-1:0][DATA_W-1:0] f_wdata, f_rdata;

  assign host_can_push_o = (dir_i == DIR_WRITE) && !f_full[cur];
  assign host_can_pop_o  = (dir_i == DIR_READ)  && !f_empty[cur];
  assign host_xfer       = (host_push_i && host_can_push_o) || (host_pop_i && host_can_pop_o);
  assign host_rdata_o    = f_rdata[cur];
  assign cur_bank_o      = cur;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur  <= '0;
      wcnt <= '0;
    end else if (flush_i) begin
      cur  <= '0;
      wcnt <= '0;
    end else if (host_xfer) begin
      if (wcnt == SW'(SECTOR_WORDS - 1)) begin
        wcnt <= '0;
        cur  <= (single_i || int'(cur) == NUM_BANKS - 1) ? '0 : cur + 1'b1;
      end else begin
        wcnt <= wcnt + 1'b1;
      end
    end
  end

  // rest of the current sector can move without a stall
  logic [LW-1:0] need;
  assign need = LW'(SECTOR_WORDS) - LW'(wcnt);
  assign sector_ready_o = (dir_i == DIR_WRITE) ? (LW'(DEPTH) - level_o[cur] >= need)
                                               : (level_o[cur] >= need);

  // ------------------------------------------------ super block bank side
  logic [SBAW-1:0]   sb_idx;
  logic [DATA_W-1:0] sb_bank_rdata;
  logic              sb_bank_we;
  logic              sb_step;

  always_comb begin
    sb_bank_we = 1'b0;
    sb_step    = 1'b0;
    for (int unsigned b = 0; b < NUM_BANKS; b++) begin
      if (sb_route_i[b] && lock_owner_o == LK_BANK && int'(lock_bank_o) == b) begin
        sb_bank_we = dll_snk_valid_i[b];
        sb_step    = dll_snk_valid_i[b] || dll_src_ready_i[b];
      end
    end
  end

  logic [DATA_W-1:0] sb_bank_wdata;
  assign sb_bank_wdata = dll_snk_data_i[lock_bank_o];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)            sb_idx <= '0;
    else if (sb_restart_i) sb_idx <= '0;
    else if (sb_step)      sb_idx <= sb_idx + 1'b1;
  end

  superblock_lock #(.WORDS(SB_WORDS), .NUM_BANKS(NUM_BANKS)) u_sb (
    .clk, .rst_n,
    .host_acquire_i   (lock_acquire_i),
    .host_release_i   (lock_release_i),
    .host_denied_o    (lock_denied_o),
    .bank_req_i       (lock_req_i),
    .owner_o          (lock_owner_o),
    .owner_bank_o     (lock_bank_o),
    .host_we_i        (sb_host_we_i),
    .host_addr_i      (sb_host_addr_i),
    .host_wdata_i     (sb_host_wdata_i),
    .host_rdata_o     (sb_host_rdata_o),
    .host_wr_denied_o (sb_host_wr_denied_o),
    .bank_we_i        (sb_bank_we),
    .bank_addr_i      (sb_idx),
    .bank_wdata_i     (sb_bank_wdata),
    .bank_rdata_o     (sb_bank_rdata)
  );

  // ------------------------------------------------ per-bank queues
  for (genvar b = 0; b < NUM_BANKS; b++) begin : g_bank
    wire sel_host = (int'(cur) == b);

    always_comb begin
      if (dir_i == DIR_WRITE) begin
        f_push[b]  = sel_host && host_push_i && host_can_push_o;
        f_wdata[b] = host_wdata_i;
        f_pop[b]   = !sb_route_i[b] && dll_src_ready_i[b];
      end else begin
        f_push[b]  = !sb_route_i[b] && dll_snk_valid_i[b];
        f_wdata[b] = dll_snk_data_i[b];
        f_pop[b]   = sel_host && host_pop_i && host_can_pop_o;
      end
      if (sb_route_i[b]) begin
        dll_src_valid_o[b] = 1'b1;
        dll_src_data_o[b]  = sb_bank_rdata;
        dll_snk_ready_o[b] = 1'b1;
      end else begin
        dll_src_valid_o[b] = (dir_i == DIR_WRITE) && !f_empty[b];
        dll_src_data_o[b]  = f_rdata[b];
        dll_snk_ready_o[b] = (dir_i == DIR_READ) && !f_full[b];
      end
    end

    sector_fifo #(.WIDTH(DATA_W), .DEPTH(DEPTH)) u_fifo (
      .clk, .rst_n,
      .flush_i   (flush_i),
      .push_i    (f_push[b]),
      .wr_data_i (f_wdata[b]),
      .pop_i     (f_pop[b]),
      .rd_data_o (f_rdata[b]),
      .full_o    (f_full[b]),
      .empty_o   (f_empty[b]),
      .level_o   (level_o[b])
    );
  end

  // the super block has a single bank-side port: at most one bank may be
  // routed to it, and only the bank that owns the lock
  a_sb_route_owner: assert property (@(posedge clk) disable iff (!rst_n)
    sb_route_i != '0 |-> $onehot(sb_route_i) && lock_owner_o == LK_BANK
                         && sb_route_i[lock_bank_o]);

endmodule
