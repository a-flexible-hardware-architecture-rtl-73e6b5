// nvm_pkg: shared constants and types of the layered non-volatile memory
// access engine (transport layer, ATA data link layers, physical layers).
//
// Numbers that come from the architecture description: two memory banks,
// ATA sectors of 512 bytes moved as 256 words of 16 bits, a transport FIFO
// of two sectors per bank and ATA packets of 32 sectors. The register map,
// the word widths of the host bus and the encodings are this design's own.
package nvm_pkg;

  // ---------------------------------------------------------------- sizes
  localparam int unsigned DATA_W       = 16;   // ATA data register width
  localparam int unsigned HOST_W       = 32;   // host (AMBA-like) bus width
  localparam int unsigned HOST_AW      = 12;   // host word-address width
  localparam int unsigned REG_AW       = 4;    // ATA register address width
  localparam int unsigned LBA_W        = 28;   // ATA LBA28 addressing

  // ------------------------------------------------- ATA task file registers
  localparam logic [REG_AW-1:0] ATA_DATA    = 4'd0;
  localparam logic [REG_AW-1:0] ATA_ERROR   = 4'd1;  // read: error, write: features
  localparam logic [REG_AW-1:0] ATA_SECCNT  = 4'd2;
  localparam logic [REG_AW-1:0] ATA_LBA0    = 4'd3;
  localparam logic [REG_AW-1:0] ATA_LBA1    = 4'd4;
  localparam logic [REG_AW-1:0] ATA_LBA2    = 4'd5;
  localparam logic [REG_AW-1:0] ATA_DEVHEAD = 4'd6;
  localparam logic [REG_AW-1:0] ATA_STATUS  = 4'd7;  // read: status, write: command

  // status register bits
  localparam int unsigned ST_ERR  = 0;
  localparam int unsigned ST_DRQ  = 3;
  localparam int unsigned ST_DRDY = 6;
  localparam int unsigned ST_BSY  = 7;

  // commands
  localparam logic [7:0] CMD_READ_SECTORS  = 8'h20;
  localparam logic [7:0] CMD_WRITE_SECTORS = 8'h30;

  // ------------------------------------------------------------- host map
  // word addresses on the host bus
  localparam logic [HOST_AW-1:0] RA_CMD     = 12'h000; // write-only pulses
  localparam logic [HOST_AW-1:0] RA_CONFIG  = 12'h001;
  localparam logic [HOST_AW-1:0] RA_STATUS  = 12'h002;
  localparam logic [HOST_AW-1:0] RA_LBA     = 12'h003;
  localparam logic [HOST_AW-1:0] RA_COUNT   = 12'h004;
  localparam logic [HOST_AW-1:0] RA_PACKET  = 12'h005;
  localparam logic [HOST_AW-1:0] RA_SB_LBA  = 12'h006;
  localparam logic [HOST_AW-1:0] RA_LOCK    = 12'h007;
  localparam logic [HOST_AW-1:0] RA_DATA    = 12'h008;
  localparam logic [HOST_AW-1:0] RA_ERRBANK = 12'h009;
  localparam logic [HOST_AW-1:0] RA_SECTORS = 12'h00A; // stream sectors moved to/from the banks
  localparam logic [HOST_AW-1:0] RA_LEVEL   = 12'h00B; // queue fill of banks 0/1 (16 bits each)
  localparam logic [HOST_AW-1:0] RA_SB_PERIOD = 12'h00C; // automatic super block save period
  // 0x100..0x1FF : super block window, one 16-bit word per address
  localparam logic [3:0]         RA_SB_PAGE = 4'h1;   // host_addr[11:8]
  // 0x200..0x2FF : direct (bypass) access, address = {bank[3:0], reg[3:0]}
  localparam logic [3:0]         RA_DIR_PAGE = 4'h2;

  // CMD register bits
  localparam int unsigned CMDB_START_WR = 0;
  localparam int unsigned CMDB_START_RD = 1;
  localparam int unsigned CMDB_SB_SAVE  = 2;
  localparam int unsigned CMDB_SB_LOAD  = 3;
  localparam int unsigned CMDB_CLR_ERR  = 4;
  // CMD[11:8] : bank to load the super block from

  // --------------------------------------------------------------- types
  typedef enum logic [0:0] {DIR_WRITE = 1'b0, DIR_READ = 1'b1} dir_e;

  // one atomic register access on a memory bank (internal bus, request side)
  typedef struct packed {
    logic              req;
    logic              we;
    logic [REG_AW-1:0] addr;
    logic [DATA_W-1:0] wdata;
  } acc_req_t;

  // response side: ack is a one-cycle pulse, rdata valid with it
  typedef struct packed {
    logic              ack;
    logic              err;    // bus timeout
    logic [DATA_W-1:0] rdata;
  } acc_rsp_t;

  // a packet handed from the control state machine to a data link layer
  typedef struct packed {
    dir_e              dir;
    logic [LBA_W-1:0]  lba;
    logic [8:0]        count;  // 1..256 sectors
  } packet_t;

  // owner of the super block lock
  typedef enum logic [1:0] {LK_FREE = 2'd0, LK_HOST = 2'd1, LK_BANK = 2'd2} lock_owner_e;

endpackage
