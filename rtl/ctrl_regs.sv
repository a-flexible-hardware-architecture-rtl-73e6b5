// ctrl_regs: control and status register set of the transport layer and
// the decoder of the host bus.
//
// The host sees one word-addressed register bus (valid/ready, 32-bit
// data). Behind it: the configuration and command registers read by the
// control state machine, a status word, the stream data port of the MMU,
// a window onto the super block (valid for writes only while the host owns
// the lock) and a window for direct register access to each memory bank
// through its bypass multiplexer. The existence of the register set and of
// the direct path follows the architecture description; the map below is
// this design's own:
//   0x000 CMD     (w)  b0 start write stream, b1 start read stream,
//                      b2 save super block, b3 load super block from the
//                      bank in b11:8, b4 clear error flags
//   0x001 CONFIG  (rw) b0 interrupt enable, b1 single-bank streams (bank 0
//                 only; taken at stream start), b15:8 bypass (host) mask
//   0x002 STATUS  (r)  b0 stream busy, b1 sector ready, b2 done, b3 error,
//                      b4 super block job pending, b5 lock refused,
//                      b6 direct access refused, b7 stream direction,
//                      b15:8 data link layers busy, b17:16 lock owner,
//                      b23:20 lock bank, b27:24 current bank,
//                      b31:28 banks switched to the host path
//   0x003 LBA, 0x004 COUNT (sectors), 0x005 PACKET (sectors per ATA packet),
//   0x006 SB_LBA  (rw)
//   0x007 LOCK    (w) b0 1 = acquire, 0 = release; (r) b0 host owns lock
//   0x008 DATA    (rw) stream data, low 16 bits; waits while the queue is
//                      full (write) or empty (read)
//   0x009 ERRBANK (r)  bank of the last data link error
//   0x00A SECTORS (r)  stream sectors completed by the banks since start
//   0x00B LEVEL   (r)  queue fill in words, bank 0 in b15:0, bank 1 in b31:16
//   0x00C SB_PERIOD (rw) if not 0: a super block save is started by itself
//                      every SB_PERIOD stream sectors (counted from start)
//   0x100+i       super block word i
//   0x200+16*b+r  ATA register r of bank b (bank must be in bypass)
// A plain register access completes in the cycle it is presented
// (host_ready_o high); data port and direct accesses add wait cycles.
// irq_o is high while enabled and the stream is done, an error is
// flagged, or a sector can be moved.
module ctrl_regs
  import nvm_pkg::*;
#(
  parameter int unsigned NUM_BANKS      = 2,
  parameter int unsigned SB_WORDS       = 256,
  parameter int unsigned PACKET_DEFAULT = 32,
  localparam int unsigned BW   = (NUM_BANKS > 1) ? $clog2(NUM_BANKS) : 1,
  localparam int unsigned SBAW = $clog2(SB_WORDS)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // host bus
  input  logic                 host_valid_i,
  input  logic                 host_we_i,
  input  logic [HOST_AW-1:0]   host_addr_i,
  input  logic [HOST_W-1:0]    host_wdata_i,
  output logic                 host_ready_o,
  output logic [HOST_W-1:0]    host_rdata_o,
  output logic                 irq_o,
  // control state machine
  output logic                 start_o,
  output dir_e                 dir_o,
  output logic [LBA_W-1:0]     lba_o,
  output logic [31:0]          count_o,
  output logic [8:0]           packet_o,
  output logic                 sb_save_o,
  output logic                 sb_load_o,
  output logic [BW-1:0]        sb_load_bank_o,
  output logic [LBA_W-1:0]     sb_lba_o,
  output logic [NUM_BANKS-1:0] bypass_o,
  output logic                 single_o,
  input  logic                 stream_busy_i,
  input  dir_e                 stream_dir_i,
  input  logic                 sb_busy_i,
  input  logic                 done_i,
  input  logic                 err_i,
  input  logic [BW-1:0]        err_bank_i,
  input  logic [NUM_BANKS-1:0] dll_busy_i,
  input  logic [NUM_BANKS-1:0] dll_sector_i,   // sector finished by a data link layer
  input  logic [NUM_BANKS-1:0] sb_route_i,     // ... that was a super block sector
  input  logic [NUM_BANKS-1:0][15:0] level_i,
  // MMU data port
  output logic                 data_push_o,
  output logic                 data_pop_o,
  output logic [DATA_W-1:0]    data_wdata_o,
  input  logic [DATA_W-1:0]    data_rdata_i,
  input  logic                 can_push_i,
  input  logic                 can_pop_i,
  input  logic                 sector_ready_i,
  input  logic [BW-1:0]        cur_bank_i,
  // super block and lock
  output logic                 lock_acquire_o,
  output logic                 lock_release_o,
  input  logic                 lock_denied_i,
  input  lock_owner_e          lock_owner_i,
  input  logic [BW-1:0]        lock_bank_i,
  output logic                 sb_we_o,
  output logic [SBAW-1:0]      sb_addr_o,
  output logic [DATA_W-1:0]    sb_wdata_o,
  input  logic [DATA_W-1:0]    sb_rdata_i,
  input  logic                 sb_wr_denied_i,
  // direct (bypass) access
  output acc_req_t [NUM_BANKS-1:0] dir_req_o,
  input  acc_rsp_t [NUM_BANKS-1:0] dir_rsp_i,
  input  logic [NUM_BANKS-1:0] host_sel_i
);

  // ------------------------------------------------------------ decode
  wire [3:0] page     = host_addr_i[11:8];
  wire       is_reg   = (page == 4'h0);
  wire       is_sb    = (page == RA_SB_PAGE);
  wire       is_dir   = (page == RA_DIR_PAGE);
  wire       is_data  = is_reg && (host_addr_i == RA_DATA);
  wire [3:0] dir_bank = host_addr_i[7:4];
  wire       dir_ok   = (int'(dir_bank) < NUM_BANKS) && host_sel_i[dir_bank[BW-1:0]];

  logic wr, rd;   // a plain (single-cycle) register access this cycle
  assign wr = host_valid_i && host_we_i  && (is_reg || is_sb) && !is_data;
  assign rd = host_valid_i && !host_we_i && (is_reg || is_sb) && !is_data;

  // ------------------------------------------------------------ registers
  logic             irq_en, done_f, err_f, lockerr_f, direrr_f;
  logic [BW-1:0]    errbank_q;
  logic [31:0]      sectors_q;

  // stream sectors finished this cycle
  logic [$clog2(NUM_BANKS+1)-1:0] n_sec;
  always_comb begin
    n_sec = '0;
    for (int unsigned b = 0; b < NUM_BANKS; b++)
      if (dll_sector_i[b] && !sb_route_i[b]) n_sec = n_sec + 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       sectors_q <= '0;
    else if (start_o) sectors_q <= '0;
    else              sectors_q <= sectors_q + 32'(n_sec);
  end

  // periodic super block save: the architecture asks for the super block
  // to be saved periodically; here the period is counted in stream sectors
  logic [31:0] sb_period_q, since_save_q;
  logic        auto_save;
  logic [32:0] since_nx;
  assign since_nx = 33'(since_save_q) + 33'(n_sec);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      since_save_q <= '0;
      auto_save    <= 1'b0;
    end else begin
      auto_save <= 1'b0;
      if (start_o) begin
        since_save_q <= '0;
      end else if (sb_period_q != '0 && since_nx >= 33'(sb_period_q)) begin
        since_save_q <= 32'(since_nx - 33'(sb_period_q));
        auto_save    <= 1'b1;
      end else begin
        since_save_q <= since_nx[31:0];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      irq_en    <= 1'b0;
      bypass_o  <= '0;
      single_o  <= 1'b0;
      lba_o     <= '0;
      count_o   <= '0;
      packet_o  <= 9'(PACKET_DEFAULT);
      sb_lba_o  <= '0;
      sb_period_q <= '0;
      done_f    <= 1'b0;
      err_f     <= 1'b0;
      lockerr_f <= 1'b0;
      direrr_f  <= 1'b0;
      errbank_q <= '0;
    end else begin
      if (wr && is_reg) begin
        unique case (host_addr_i)
          RA_CONFIG: begin
            irq_en   <= host_wdata_i[0];
            single_o <= host_wdata_i[1];
            bypass_o <= host_wdata_i[8 +: NUM_BANKS];
          end
          RA_LBA:    lba_o    <= host_wdata_i[LBA_W-1:0];
          RA_COUNT:  count_o  <= host_wdata_i;
          RA_PACKET: packet_o <= host_wdata_i[8:0];
          RA_SB_LBA: sb_lba_o <= host_wdata_i[LBA_W-1:0];
          RA_SB_PERIOD: sb_period_q <= host_wdata_i;
          default: ;
        endcase
      end
      if (start_o) done_f <= 1'b0;
      if (done_i)  done_f <= 1'b1;
      if (wr && host_addr_i == RA_CMD && host_wdata_i[CMDB_CLR_ERR]) begin
        err_f     <= 1'b0;
        lockerr_f <= 1'b0;
        direrr_f  <= 1'b0;
      end
      if (err_i) begin
        err_f     <= 1'b1;
        errbank_q <= err_bank_i;
      end
      if (lock_denied_i || sb_wr_denied_i) lockerr_f <= 1'b1;
      if (host_valid_i && is_dir && !dir_ok) direrr_f <= 1'b1;
    end
  end

  // command pulses
  wire cmd_wr = wr && (host_addr_i == RA_CMD);
  assign start_o        = cmd_wr && (host_wdata_i[CMDB_START_WR] || host_wdata_i[CMDB_START_RD]);
  assign dir_o          = host_wdata_i[CMDB_START_RD] ? DIR_READ : DIR_WRITE;
  assign sb_save_o      = (cmd_wr && host_wdata_i[CMDB_SB_SAVE]) || auto_save;
  assign sb_load_o      = cmd_wr && host_wdata_i[CMDB_SB_LOAD];
  assign sb_load_bank_o = host_wdata_i[8 +: BW];
  assign lock_acquire_o = wr && (host_addr_i == RA_LOCK) && host_wdata_i[0];
  assign lock_release_o = wr && (host_addr_i == RA_LOCK) && !host_wdata_i[0];

  // super block window
  assign sb_we_o    = wr && is_sb;
  assign sb_addr_o  = host_addr_i[SBAW-1:0];
  assign sb_wdata_o = host_wdata_i[DATA_W-1:0];

  // stream data port
  assign data_push_o  = host_valid_i && host_we_i  && is_data;
  assign data_pop_o   = host_valid_i && !host_we_i && is_data;
  assign data_wdata_o = host_wdata_i[DATA_W-1:0];

  // direct access: the request is held by the host until it is answered
  always_comb begin
    for (int unsigned b = 0; b < NUM_BANKS; b++) begin
      dir_req_o[b].req   = host_valid_i && is_dir && dir_ok && (int'(dir_bank) == b);
      dir_req_o[b].we    = host_we_i;
      dir_req_o[b].addr  = host_addr_i[REG_AW-1:0];
      dir_req_o[b].wdata = host_wdata_i[DATA_W-1:0];
    end
  end

  // ------------------------------------------------------------ status
  logic [HOST_W-1:0] status;
  always_comb begin
    status        = '0;
    status[0]     = stream_busy_i;
    status[1]     = stream_busy_i && sector_ready_i;
    status[2]     = done_f;
    status[3]     = err_f;
    status[4]     = sb_busy_i;
    status[5]     = lockerr_f;
    status[6]     = direrr_f;
    status[7]     = (stream_dir_i == DIR_READ);
    status[8 +: NUM_BANKS]  = dll_busy_i;
    status[17:16] = lock_owner_i;
    status[20 +: BW] = lock_bank_i;
    status[24 +: BW] = cur_bank_i;
    status[28 +: NUM_BANKS] = host_sel_i;
  end

  // ------------------------------------------------------------ read / ready
  always_comb begin
    host_ready_o = 1'b1;
    host_rdata_o = '0;
    if (is_data) begin
      host_ready_o = host_we_i ? can_push_i : can_pop_i;
      host_rdata_o = HOST_W'(data_rdata_i);
    end else if (is_dir) begin
      host_ready_o = !dir_ok;
      for (int unsigned b = 0; b < NUM_BANKS; b++) begin
        if (int'(dir_bank) == b && dir_ok) begin
          host_ready_o = dir_rsp_i[b].ack;
          host_rdata_o = HOST_W'(dir_rsp_i[b].rdata);
        end
      end
    end else if (is_sb) begin
      host_rdata_o = HOST_W'(sb_rdata_i);
    end else if (rd) begin
      unique case (host_addr_i)
        RA_CONFIG:  host_rdata_o = HOST_W'({bypass_o, 6'd0, single_o, irq_en});
        RA_STATUS:  host_rdata_o = status;
        RA_LBA:     host_rdata_o = HOST_W'(lba_o);
        RA_COUNT:   host_rdata_o = count_o;
        RA_PACKET:  host_rdata_o = HOST_W'(packet_o);
        RA_SB_LBA:  host_rdata_o = HOST_W'(sb_lba_o);
        RA_LOCK:    host_rdata_o = HOST_W'(lock_owner_i == LK_HOST);
        RA_ERRBANK: host_rdata_o = HOST_W'(errbank_q);
        RA_SECTORS: host_rdata_o = sectors_q;
        RA_SB_PERIOD: host_rdata_o = sb_period_q;
        RA_LEVEL:   host_rdata_o = (NUM_BANKS > 1) ? {level_i[NUM_BANKS > 1 ? 1 : 0], level_i[0]}
                                                   : HOST_W'(level_i[0]);
        default:    host_rdata_o = '0;
      endcase
    end
  end

  assign irq_o = irq_en && (done_f || err_f || (stream_busy_i && sector_ready_i));

endmodule
