// ata_dll: data link layer of one memory bank (ATA protocol state machine).
//
// Given a packet (direction, start LBA, sector count) it performs a whole
// ATA packet access on its own, as one register access at a time through
// the physical layer:
//   1. command setting: LBA bytes 0..2, device/head (LBA mode, LBA 27:24),
//      sector count, then the command (READ/WRITE SECTORS);
//   2. per sector: poll the status register until BSY is clear and DRQ is
//      set, move SECTOR_WORDS 16-bit words through the data register
//      (data access), then poll status again until BSY clears (sector
//      release);
//   3. after the last sector, report done (err_o if the status ERR bit or a
//      bus time-out was seen).
// The split into command setting, data access and sector release and the
// polling of a status register follow the architecture description; the
// ATA register addresses and bits are those of the ATA task file. Writing
// the sector count before the command is this design's choice (the command
// register write starts the device).
//
// Data side: for a write packet the words come from a valid/ready source
// (src_*), popped one per acknowledged data-register write; for a read
// packet each word read is pushed to a valid/ready sink (snk_*): a read
// access is only started while snk_ready_i is high, and the word is
// delivered with snk_valid_o for one cycle (the sink must not withdraw
// ready while a read is outstanding). Either side stalls the transfer.
// start_i is accepted only while busy_o is low; done_o pulses once per
// packet, sector_done_o once per sector.
module ata_dll
  import nvm_pkg::*;
#(
  parameter int unsigned SECTOR_WORDS = 256
) (
  input  logic              clk,
  input  logic              rst_n,
  // packet request from the transport layer
  input  logic              start_i,
  input  packet_t           pkt_i,
  output logic              busy_o,
  output logic              done_o,
  output logic              err_o,
  output logic              sector_done_o,
  // register access towards the physical layer
  output acc_req_t          acc_o,
  input  acc_rsp_t          acc_i,
  // write data source (memory-bound words)
  input  logic              src_valid_i,
  input  logic [DATA_W-1:0] src_data_i,
  output logic              src_ready_o,
  // read data sink (host-bound words)
  output logic              snk_valid_o,
  output logic [DATA_W-1:0] snk_data_o,
  input  logic              snk_ready_i
);

  typedef enum logic [3:0] {
    S_IDLE, S_LBA0, S_LBA1, S_LBA2, S_DEV, S_CNT, S_CMD,
    S_POLL, S_DATA, S_DONE
  } state_e;

  state_e            state;
  packet_t           pkt;
  logic [8:0]        sectors_left;
  logic [$clog2(SECTOR_WORDS+1)-1:0] words_left;
  logic              pend;      // access issued, waiting for its ack
  logic              err_q;

  wire is_write = (pkt.dir == DIR_WRITE);

  // ----------------------------------------------------- request forming
  always_comb begin
    acc_o = '0;
    unique case (state)
      S_LBA0: begin acc_o.we = 1'b1; acc_o.addr = ATA_LBA0;    acc_o.wdata = 16'(pkt.lba[7:0]);   end
      S_LBA1: begin acc_o.we = 1'b1; acc_o.addr = ATA_LBA1;    acc_o.wdata = 16'(pkt.lba[15:8]);  end
      S_LBA2: begin acc_o.we = 1'b1; acc_o.addr = ATA_LBA2;    acc_o.wdata = 16'(pkt.lba[23:16]); end
      S_DEV:  begin acc_o.we = 1'b1; acc_o.addr = ATA_DEVHEAD; acc_o.wdata = 16'({4'hE, pkt.lba[27:24]}); end
      S_CNT:  begin acc_o.we = 1'b1; acc_o.addr = ATA_SECCNT;  acc_o.wdata = 16'(pkt.count[7:0]); end
      S_CMD:  begin acc_o.we = 1'b1; acc_o.addr = ATA_STATUS;
                    acc_o.wdata = 16'(is_write ? CMD_WRITE_SECTORS : CMD_READ_SECTORS); end
      S_POLL: begin acc_o.we = 1'b0; acc_o.addr = ATA_STATUS; end
      S_DATA: begin acc_o.we = is_write; acc_o.addr = ATA_DATA; acc_o.wdata = is_write ? src_data_i : '0; end
      default: ;
    endcase
    case (state)
      S_LBA0, S_LBA1, S_LBA2, S_DEV, S_CNT, S_CMD, S_POLL: acc_o.req = 1'b1;
      // a data access starts only when the word (write) or room (read) is there
      S_DATA: acc_o.req = pend || (is_write ? src_valid_i : snk_ready_i);
      default: acc_o.req = 1'b0;
    endcase
  end

  assign src_ready_o = (state == S_DATA) && is_write && acc_i.ack;
  assign snk_valid_o = (state == S_DATA) && !is_write && acc_i.ack;
  assign snk_data_o  = acc_i.rdata;
  assign busy_o      = (state != S_IDLE);

  // ------------------------------------------------------- state machine
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= S_IDLE;
      pkt           <= '0;
      sectors_left  <= '0;
      words_left    <= '0;
      pend          <= 1'b0;
      err_q         <= 1'b0;
      done_o        <= 1'b0;
      err_o         <= 1'b0;
      sector_done_o <= 1'b0;
    end else begin
      done_o        <= 1'b0;
      err_o         <= 1'b0;
      sector_done_o <= 1'b0;
      if (acc_o.req && !acc_i.ack) pend <= 1'b1;
      if (acc_i.ack)               pend <= 1'b0;
      if (acc_i.ack && acc_i.err)  err_q <= 1'b1;
      unique case (state)
        S_IDLE: if (start_i) begin
          pkt          <= pkt_i;
          sectors_left <= pkt_i.count;
          err_q        <= 1'b0;
          state        <= S_LBA0;
        end
        S_LBA0: if (acc_i.ack) state <= S_LBA1;
        S_LBA1: if (acc_i.ack) state <= S_LBA2;
        S_LBA2: if (acc_i.ack) state <= S_DEV;
        S_DEV:  if (acc_i.ack) state <= S_CNT;
        S_CNT:  if (acc_i.ack) state <= S_CMD;
        S_CMD:  if (acc_i.ack) state <= S_POLL;
        // waiting for memory availability / sector release
        S_POLL: if (acc_i.ack) begin
          if (acc_i.err || acc_i.rdata[ST_ERR]) begin
            err_q <= 1'b1;
            state <= S_DONE;
          end else if (!acc_i.rdata[ST_BSY]) begin
            if (sectors_left == '0)       state <= S_DONE;
            else if (acc_i.rdata[ST_DRQ]) begin
              words_left <= ($bits(words_left))'(SECTOR_WORDS);
              state      <= S_DATA;
            end
          end
        end
        S_DATA: if (acc_i.ack) begin
          if (words_left == 1) begin
            sectors_left  <= sectors_left - 1'b1;
            sector_done_o <= 1'b1;
            state         <= S_POLL;
          end
          words_left <= words_left - 1'b1;
        end
        S_DONE: begin
          done_o <= 1'b1;
          err_o  <= err_q;
          state  <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
