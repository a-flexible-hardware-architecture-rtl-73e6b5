// ctrl_fsm: control state machine of the transport layer.
//
// It turns the host's commands into packets for the data link layers and
// keeps them busy. A stream command (start_i, direction, start LBA, total
// sector count) is split over the banks the same way the MMU splits the
// data: stream sector n belongs to bank n mod NUM_BANKS and is stored
// there at LBA start + n / NUM_BANKS. Whenever a bank's data link layer is
// idle the machine hands it the next packet of at most packet_i sectors
// (32 in the reference set-up), so that every bank runs ATA packet
// accesses in parallel. A super block save (sb_save_i) is queued for every
// bank not under host bypass; a super block load (sb_load_i) for one bank.
// Between two packets a bank with a queued super block job asks for the
// super block lock, and once it owns it runs a one-sector packet at
// sb_lba_i routed to/from the super block, then frees the lock, so the
// copies are written one bank after another, interleaved with the stream.
// Banks whose bypass bit is set are left to the host and get nothing.
// With single_i set when the stream starts, the whole stream goes to bank 0
// at LBA start + n (single-bank operation); stream_single_o tells the MMU.
// The per-bank split and packet size follow the architecture description;
// the job priorities and signalling are this design's own.
//
// Timing: start/sb pulses are single-cycle; flush_o is high (combinationally)
// in the cycle a stream start is accepted; done_o pulses one cycle after
// the last packet of the stream has completed; err_o pulses with the bank
// number in err_bank_o when a data link layer reports an error.
module ctrl_fsm
  import nvm_pkg::*;
#(
  parameter int unsigned NUM_BANKS = 2,
  localparam int unsigned BW = (NUM_BANKS > 1) ? $clog2(NUM_BANKS) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // host commands and configuration
  input  logic                 start_i,
  input  dir_e                 dir_i,
  input  logic [LBA_W-1:0]     lba_i,
  input  logic [31:0]          count_i,
  input  logic [8:0]           packet_i,
  input  logic                 sb_save_i,
  input  logic                 sb_load_i,
  input  logic [BW-1:0]        sb_load_bank_i,
  input  logic [LBA_W-1:0]     sb_lba_i,
  input  logic [NUM_BANKS-1:0] bypass_i,
  input  logic                 single_i,
  // super block lock
  input  lock_owner_e          lock_owner_i,
  input  logic [BW-1:0]        lock_bank_i,
  output logic [NUM_BANKS-1:0] lock_req_o,
  output logic [NUM_BANKS-1:0] sb_route_o,
  output logic                 sb_restart_o,
  // data link layers
  output logic [NUM_BANKS-1:0] dll_start_o,
  output packet_t [NUM_BANKS-1:0] dll_pkt_o,
  input  logic [NUM_BANKS-1:0] dll_busy_i,
  input  logic [NUM_BANKS-1:0] dll_done_i,
  input  logic [NUM_BANKS-1:0] dll_err_i,
  // status
  output logic                 flush_o,
  output logic                 stream_busy_o,
  output dir_e                 stream_dir_o,
  output logic                 stream_single_o,
  output logic                 sb_busy_o,
  output logic                 done_o,
  output logic                 err_o,
  output logic [BW-1:0]        err_bank_o
);

  typedef enum logic [1:0] {B_IDLE, B_STREAM, B_LOCK, B_SB} bstate_e;

  bstate_e [NUM_BANKS-1:0]         bst;
  logic    [NUM_BANKS-1:0][31:0]   rem;        // stream sectors left per bank
  logic    [NUM_BANKS-1:0][LBA_W-1:0] lba_nx;
  logic    [NUM_BANKS-1:0]         save_pend, load_pend;
  logic                            active;
  dir_e                            dir_q;
  logic                            single_q;

  // effective packet length: 1..256 sectors
  logic [8:0] pkt_len;
  assign pkt_len = (packet_i == '0) ? 9'd1 : (packet_i > 9'd256) ? 9'd256 : packet_i;

  logic all_clear;
  always_comb begin
    all_clear = 1'b1;
    for (int unsigned b = 0; b < NUM_BANKS; b++)
      if (rem[b] != '0 || bst[b] == B_STREAM) all_clear = 1'b0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bst          <= '{default: B_IDLE};
      rem          <= '0;
      lba_nx       <= '0;
      save_pend    <= '0;
      load_pend    <= '0;
      active       <= 1'b0;
      dir_q        <= DIR_WRITE;
      single_q     <= 1'b0;
      dll_start_o  <= '0;
      dll_pkt_o    <= '0;
      lock_req_o   <= '0;
      sb_route_o   <= '0;
      sb_restart_o <= 1'b0;
      done_o       <= 1'b0;
      err_o        <= 1'b0;
      err_bank_o   <= '0;
    end else begin
      dll_start_o  <= '0;
      sb_restart_o <= 1'b0;
      done_o       <= 1'b0;
      err_o        <= 1'b0;

      if (start_i && !active) begin
        active  <= 1'b1;
        dir_q   <= dir_i;
        single_q <= single_i;
        for (int unsigned b = 0; b < NUM_BANKS; b++) begin
          if (single_i) rem[b] <= (b == 0) ? count_i : '0;
          else          rem[b] <= (count_i + 32'(NUM_BANKS - 1 - b)) / 32'(NUM_BANKS);
          lba_nx[b] <= lba_i;
        end
      end else if (active && all_clear) begin
        active <= 1'b0;
        done_o <= 1'b1;
      end

      if (sb_save_i) save_pend <= save_pend | ~bypass_i;
      if (sb_load_i) load_pend[sb_load_bank_i] <= 1'b1;

      for (int unsigned b = 0; b < NUM_BANKS; b++) begin
        if (dll_err_i[b]) begin
          err_o      <= 1'b1;
          err_bank_o <= BW'(b);
        end
        unique case (bst[b])
          B_IDLE: if (!dll_busy_i[b] && !dll_start_o[b] && !bypass_i[b]) begin
            if (save_pend[b] || load_pend[b]) begin
              lock_req_o[b] <= 1'b1;
              bst[b]        <= B_LOCK;
            end else if (active && rem[b] != '0 && !(start_i && !active)) begin
              automatic logic [8:0] n = (rem[b] < 32'(pkt_len)) ? rem[b][8:0] : pkt_len;
              dll_start_o[b]     <= 1'b1;
              dll_pkt_o[b].dir   <= dir_q;
              dll_pkt_o[b].lba   <= lba_nx[b];
              dll_pkt_o[b].count <= n;
              rem[b]    <= rem[b] - 32'(n);
              lba_nx[b] <= lba_nx[b] + LBA_W'(n);
              bst[b]    <= B_STREAM;
            end
          end
          B_STREAM: if (dll_done_i[b]) bst[b] <= B_IDLE;
          B_LOCK: if (lock_owner_i == LK_BANK && int'(lock_bank_i) == b) begin
            dll_start_o[b]     <= 1'b1;
            dll_pkt_o[b].dir   <= save_pend[b] ? DIR_WRITE : DIR_READ;
            dll_pkt_o[b].lba   <= sb_lba_i;
            dll_pkt_o[b].count <= 9'd1;
            sb_route_o[b]      <= 1'b1;
            sb_restart_o       <= 1'b1;
            bst[b]             <= B_SB;
          end
          B_SB: if (dll_done_i[b]) begin
            if (save_pend[b]) save_pend[b] <= 1'b0;
            else              load_pend[b] <= 1'b0;
            sb_route_o[b] <= 1'b0;
            lock_req_o[b] <= 1'b0;
            bst[b]        <= B_IDLE;
          end
          default: bst[b] <= B_IDLE;
        endcase
      end
    end
  end

  always_comb begin
    sb_busy_o = (save_pend != '0) || (load_pend != '0);
  end

  // queues are emptied in the same cycle the stream is accepted, so a host
  // word written right after the start command is never lost
  assign flush_o       = start_i && !active;
  assign stream_busy_o = active;
  assign stream_dir_o  = dir_q;
  assign stream_single_o = single_q;

endmodule
