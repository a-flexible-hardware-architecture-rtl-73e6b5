// superblock_lock: the super block of the basic file system and the lock
// that shares it between the host and the memory banks.
//
// The super block summarises the global memory content (for example where
// the valid data begins and ends). It is kept here as one sector of
// WORDS 16-bit words and is written to the memory banks from time to time.
// Only the owner of the lock may touch it: the host takes the lock with
// host_acquire_i and gives it back with host_release_i; a memory bank
// (that is, the control state machine acting for it) holds bank_req_i[b]
// high for as long as it needs the block. A free lock goes to a waiting
// bank first, in round-robin order, then to a host acquire; a host acquire
// while the lock is taken is refused (host_denied_o pulses). Because every
// bank must win the lock in turn, the copies reach the banks at different
// points in time. Lock and store follow the architecture description; the
// arbitration order and the one-sector size are this design's choices.
//
// Ports: host_* is a word port for the host (write ignored and flagged
// unless the host owns the lock; reads always allowed); bank_* is the port
// the owning bank streams through. Reads are combinational.
module superblock_lock
  import nvm_pkg::*;
#(
  parameter int unsigned WORDS     = 256,
  parameter int unsigned NUM_BANKS = 2,
  localparam int unsigned AW       = $clog2(WORDS),
  localparam int unsigned BW       = (NUM_BANKS > 1) ? $clog2(NUM_BANKS) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // lock
  input  logic                 host_acquire_i,
  input  logic                 host_release_i,
  output logic                 host_denied_o,
  input  logic [NUM_BANKS-1:0] bank_req_i,
  output lock_owner_e          owner_o,
  output logic [BW-1:0]        owner_bank_o,
  // host word port
  input  logic                 host_we_i,
  input  logic [AW-1:0]        host_addr_i,
  input  logic [DATA_W-1:0]    host_wdata_i,
  output logic [DATA_W-1:0]    host_rdata_o,
  output logic                 host_wr_denied_o,
  // bank word port (lock owner only)
  input  logic                 bank_we_i,
  input  logic [AW-1:0]        bank_addr_i,
  input  logic [DATA_W-1:0]    bank_wdata_i,
  output logic [DATA_W-1:0]    bank_rdata_o
);

  logic [DATA_W-1:0] mem [WORDS];
  lock_owner_e       owner;
  logic [BW-1:0]     obank;
  logic [BW-1:0]     rr;        // next bank to look at first

  // round-robin pick among waiting banks
  logic          any_req;
  logic [BW-1:0] pick;
  always_comb begin
    any_req = 1'b0;
    pick    = '0;
    for (int unsigned k = 0; k < NUM_BANKS; k++) begin
      logic [BW:0] idx;   // rr + k, wrapped to 0..NUM_BANKS-1
      idx = (BW+1)'(rr) + (BW+1)'(k);
      if (idx >= (BW+1)'(NUM_BANKS)) idx = idx - (BW+1)'(NUM_BANKS);
      if (!any_req && bank_req_i[idx[BW-1:0]]) begin
        any_req = 1'b1;
        pick    = idx[BW-1:0];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      owner         <= LK_FREE;
      obank         <= '0;
      rr            <= '0;
      host_denied_o <= 1'b0;
    end else begin
      host_denied_o <= 1'b0;
      unique case (owner)
        LK_FREE: begin
          if (any_req) begin
            owner <= LK_BANK;
            obank <= pick;
            rr    <= (int'(pick) == NUM_BANKS-1) ? '0 : pick + 1'b1;
          end else if (host_acquire_i) begin
            owner <= LK_HOST;
          end
        end
        LK_HOST: begin
          if (host_release_i) owner <= LK_FREE;
        end
        LK_BANK: begin
          if (!bank_req_i[obank]) owner <= LK_FREE;
          if (host_acquire_i) host_denied_o <= 1'b1;
        end
        default: owner <= LK_FREE;
      endcase
      if (owner == LK_FREE && any_req && host_acquire_i) host_denied_o <= 1'b1;
    end
  end

  // store: one write port, owner-selected
  always_ff @(posedge clk) begin
    if (owner == LK_HOST && host_we_i)      mem[host_addr_i] <= host_wdata_i;
    else if (owner == LK_BANK && bank_we_i) mem[bank_addr_i] <= bank_wdata_i;
  end

  assign host_wr_denied_o = host_we_i && (owner != LK_HOST);
  assign host_rdata_o     = mem[host_addr_i];
  assign bank_rdata_o     = mem[bank_addr_i];
  assign owner_o          = owner;
  assign owner_bank_o     = obank;

endmodule
