// nvm_transport: layered access engine for several non-volatile memory
// banks (compact flash cards), the top of the design.
//
// The host writes or reads one continuous data stream; the engine spreads
// it sector by sector over NUM_BANKS memory banks that work in parallel,
// so the host sees one memory that is NUM_BANKS times larger and faster
// and is only asked for data once per FIFO-full of sectors. The hardware
// is layered like a communication stack:
//   transport layer  : ctrl_regs (host registers), ctrl_fsm (control state
//                      machine) and nvm_mmu (per-bank FIFO queues, cyclic
//                      multiplexer, super block with lock), one instance;
//   data link layer  : ata_dll, one per bank, runs whole ATA packet
//                      accesses (command setting, data access, sector
//                      release) without the host;
//   bypass           : bypass_mux, one per bank, lets the host reach the
//                      bank's registers directly for initialisation;
//   physical layer   : phy_ip, one per bank, gateway to the external
//                      IndustryPack-style bus of the card.
// The layering, the per-bank replication, the sector-wise cyclic
// distribution, the FIFO of two sectors per bank, 32-sector packets and
// the bypass follow the architecture description. The host bus is a simple
// valid/ready register bus standing in for the AMBA bus of the reference
// platform; its register map is documented in ctrl_regs.
// Single-bank mode (CONFIG bit 1, sampled at stream start), which keeps a
// whole stream on bank 0, is this design's addition.
//
// Timing: one clock domain, asynchronous active-low reset. A host access
// completes in the clock host_ready is high; register accesses take one
// clock, data-port and direct accesses wait for queue space or the bank.
//
// External bank bus (per bank b): ip_sel_n, ip_rw_n, ip_addr, ip_dout,
// ip_doe drive the card; ip_din, ip_ack_n come back from it.
module nvm_transport
  import nvm_pkg::*;
#(
  parameter int unsigned NUM_BANKS      = 2,
  parameter int unsigned SECTOR_WORDS   = 256,
  parameter int unsigned FIFO_SECTORS   = 2,
  parameter int unsigned SB_WORDS       = 256,
  parameter int unsigned PACKET_DEFAULT = 32,
  parameter int unsigned PHY_SETUP      = 1,
  parameter int unsigned PHY_TIMEOUT    = 1023
) (
  input  logic                               clk,
  input  logic                               rst_n,
  // host bus
  input  logic                               host_valid,
  input  logic                               host_we,
  input  logic [HOST_AW-1:0]                 host_addr,
  input  logic [HOST_W-1:0]                  host_wdata,
  output logic                               host_ready,
  output logic [HOST_W-1:0]                  host_rdata,
  output logic                               irq,
  // memory bank buses
  output logic [NUM_BANKS-1:0]               ip_sel_n,
  output logic [NUM_BANKS-1:0]               ip_rw_n,
  output logic [NUM_BANKS-1:0][REG_AW-1:0]   ip_addr,
  output logic [NUM_BANKS-1:0][DATA_W-1:0]   ip_dout,
  output logic [NUM_BANKS-1:0]               ip_doe,
  input  logic [NUM_BANKS-1:0][DATA_W-1:0]   ip_din,
  input  logic [NUM_BANKS-1:0]               ip_ack_n
);

  localparam int unsigned BW   = (NUM_BANKS > 1) ? $clog2(NUM_BANKS) : 1;
  localparam int unsigned SBAW = $clog2(SB_WORDS);
  localparam int unsigned LW   = $clog2(FIFO_SECTORS * SECTOR_WORDS) + 1;

  // control <-> state machine
  logic                 start, sb_save, sb_load;
  dir_e                 dir_cfg, stream_dir;
  logic [LBA_W-1:0]     lba, sb_lba;
  logic [31:0]          count;
  logic [8:0]           packet;
  logic [BW-1:0]        sb_load_bank, err_bank, cur_bank, lock_bank;
  logic [NUM_BANKS-1:0] bypass, host_sel;
  logic                 stream_busy, sb_busy, done, err, flush, sb_restart;
  logic                 single_cfg, stream_single;
  // MMU
  logic                 data_push, data_pop, can_push, can_pop, sector_ready;
  logic [DATA_W-1:0]    data_wdata, data_rdata;
  logic                 lock_acq, lock_rel, lock_denied;
  lock_owner_e          lock_owner;
  logic                 sb_we, sb_wr_denied;
  logic [SBAW-1:0]      sb_addr;
  logic [DATA_W-1:0]    sb_wdata, sb_rdata;
  logic [NUM_BANKS-1:0] lock_req, sb_route;
  logic [NUM_BANKS-1:0][LW-1:0] level;
  logic [NUM_BANKS-1:0][15:0]   level16;
  // data link layers
  logic [NUM_BANKS-1:0]             dll_start, dll_busy, dll_done, dll_err, dll_sector;
  packet_t [NUM_BANKS-1:0]          dll_pkt;
  logic [NUM_BANKS-1:0]             src_valid, src_ready, snk_valid, snk_ready;
  logic [NUM_BANKS-1:0][DATA_W-1:0] src_data, snk_data;
  acc_req_t [NUM_BANKS-1:0]         dll_req, dir_req, phy_req;
  acc_rsp_t [NUM_BANKS-1:0]         dll_rsp, dir_rsp, phy_rsp;

  ctrl_regs #(
    .NUM_BANKS(NUM_BANKS), .SB_WORDS(SB_WORDS), .PACKET_DEFAULT(PACKET_DEFAULT)
  ) u_regs (
    .clk, .rst_n,
    .host_valid_i (host_valid), .host_we_i (host_we), .host_addr_i (host_addr),
    .host_wdata_i (host_wdata), .host_ready_o (host_ready), .host_rdata_o (host_rdata),
    .irq_o (irq),
    .start_o (start), .dir_o (dir_cfg), .lba_o (lba), .count_o (count), .packet_o (packet),
    .sb_save_o (sb_save), .sb_load_o (sb_load), .sb_load_bank_o (sb_load_bank),
    .sb_lba_o (sb_lba), .bypass_o (bypass), .single_o (single_cfg),
    .stream_busy_i (stream_busy), .stream_dir_i (stream_dir), .sb_busy_i (sb_busy),
    .done_i (done), .err_i (err), .err_bank_i (err_bank), .dll_busy_i (dll_busy),
    .dll_sector_i (dll_sector), .sb_route_i (sb_route), .level_i (level16),
    .data_push_o (data_push), .data_pop_o (data_pop), .data_wdata_o (data_wdata),
    .data_rdata_i (data_rdata), .can_push_i (can_push), .can_pop_i (can_pop),
    .sector_ready_i (sector_ready), .cur_bank_i (cur_bank),
    .lock_acquire_o (lock_acq), .lock_release_o (lock_rel), .lock_denied_i (lock_denied),
    .lock_owner_i (lock_owner), .lock_bank_i (lock_bank),
    .sb_we_o (sb_we), .sb_addr_o (sb_addr), .sb_wdata_o (sb_wdata), .sb_rdata_i (sb_rdata),
    .sb_wr_denied_i (sb_wr_denied),
    .dir_req_o (dir_req), .dir_rsp_i (dir_rsp), .host_sel_i (host_sel)
  );

  ctrl_fsm #(.NUM_BANKS(NUM_BANKS)) u_fsm (
    .clk, .rst_n,
    .start_i (start), .dir_i (dir_cfg), .lba_i (lba), .count_i (count), .packet_i (packet),
    .sb_save_i (sb_save), .sb_load_i (sb_load), .sb_load_bank_i (sb_load_bank),
    .sb_lba_i (sb_lba), .bypass_i (bypass), .single_i (single_cfg),
    .lock_owner_i (lock_owner), .lock_bank_i (lock_bank), .lock_req_o (lock_req),
    .sb_route_o (sb_route), .sb_restart_o (sb_restart),
    .dll_start_o (dll_start), .dll_pkt_o (dll_pkt), .dll_busy_i (dll_busy),
    .dll_done_i (dll_done), .dll_err_i (dll_err),
    .flush_o (flush), .stream_busy_o (stream_busy), .stream_dir_o (stream_dir),
    .stream_single_o (stream_single),
    .sb_busy_o (sb_busy), .done_o (done), .err_o (err), .err_bank_o (err_bank)
  );

  nvm_mmu #(
    .NUM_BANKS(NUM_BANKS), .SECTOR_WORDS(SECTOR_WORDS),
    .FIFO_SECTORS(FIFO_SECTORS), .SB_WORDS(SB_WORDS)
  ) u_mmu (
    .clk, .rst_n,
    .dir_i (stream_dir), .flush_i (flush), .single_i (stream_single),
    .host_push_i (data_push), .host_wdata_i (data_wdata), .host_can_push_o (can_push),
    .host_pop_i (data_pop), .host_rdata_o (data_rdata), .host_can_pop_o (can_pop),
    .sector_ready_o (sector_ready), .cur_bank_o (cur_bank), .level_o (level),
    .dll_src_valid_o (src_valid), .dll_src_data_o (src_data), .dll_src_ready_i (src_ready),
    .dll_snk_valid_i (snk_valid), .dll_snk_data_i (snk_data), .dll_snk_ready_o (snk_ready),
    .sb_route_i (sb_route), .sb_restart_i (sb_restart),
    .lock_acquire_i (lock_acq), .lock_release_i (lock_rel), .lock_denied_o (lock_denied),
    .lock_req_i (lock_req), .lock_owner_o (lock_owner), .lock_bank_o (lock_bank),
    .sb_host_we_i (sb_we), .sb_host_addr_i (sb_addr), .sb_host_wdata_i (sb_wdata),
    .sb_host_rdata_o (sb_rdata), .sb_host_wr_denied_o (sb_wr_denied)
  );

  for (genvar b = 0; b < NUM_BANKS; b++) begin : g_bank
    assign level16[b] = 16'(level[b]);

    ata_dll #(.SECTOR_WORDS(SECTOR_WORDS)) u_dll (
      .clk, .rst_n,
      .start_i (dll_start[b]), .pkt_i (dll_pkt[b]), .busy_o (dll_busy[b]),
      .done_o (dll_done[b]), .err_o (dll_err[b]), .sector_done_o (dll_sector[b]),
      .acc_o (dll_req[b]), .acc_i (dll_rsp[b]),
      .src_valid_i (src_valid[b]), .src_data_i (src_data[b]), .src_ready_o (src_ready[b]),
      .snk_valid_o (snk_valid[b]), .snk_data_o (snk_data[b]), .snk_ready_i (snk_ready[b])
    );

    bypass_mux u_mux (
      .clk, .rst_n,
      .sel_host_i (bypass[b]), .host_sel_o (host_sel[b]),
      .dll_req_i (dll_req[b]), .dll_rsp_o (dll_rsp[b]),
      .host_req_i (dir_req[b]), .host_rsp_o (dir_rsp[b]),
      .phy_req_o (phy_req[b]), .phy_rsp_i (phy_rsp[b])
    );

    phy_ip #(.SETUP_CYCLES(PHY_SETUP), .TIMEOUT(PHY_TIMEOUT)) u_phy (
      .clk, .rst_n,
      .req_i (phy_req[b]), .rsp_o (phy_rsp[b]),
      .ip_sel_n (ip_sel_n[b]), .ip_rw_n (ip_rw_n[b]), .ip_addr (ip_addr[b]),
      .ip_dout (ip_dout[b]), .ip_doe (ip_doe[b]), .ip_din (ip_din[b]), .ip_ack_n (ip_ack_n[b])
    );
  end

endmodule
