// cf_bank_model: behavioural model of a compact flash card in ATA (LBA28)
// mode behind an IndustryPack-style register bus. Testbench use only; it
// is not synthesizable logic and stands in for the real memory bank.
//
// Bus: the initiator drives ip_addr/ip_rw_n/ip_dout and pulls ip_sel_n
// low; ACK_DELAY cycles later the model performs the access and pulls
// ip_ack_n low (read data on ip_din) until ip_sel_n returns high.
// Task file: sector count (0 means 256), LBA0..2, device/head (LBA 27:24),
// command 0x20 READ SECTORS / 0x30 WRITE SECTORS, status BSY/DRDY/DRQ/ERR.
// After a command the card is busy CMD_BUSY cycles, then raises DRQ for
// the first sector; after each sector it is busy SREL_BUSY cycles
// (sector release). Sectors never written read back as a pattern derived
// from their address. inject_err_i makes the next command end with ERR.
// Interface timing is given above; the model has no clock-based reset and
// starts idle with DRDY set. ATA registers, commands and status bits are
// the standard ATA ones the architecture relies on; the delays are chosen
// here to stand for the card's busy times.
module cf_bank_model #(
  parameter int unsigned SECTOR_WORDS = 256,
  parameter int unsigned ACK_DELAY    = 2,
  parameter int unsigned CMD_BUSY     = 20,
  parameter int unsigned SREL_BUSY    = 20
) (
  input  logic        clk,
  input  logic        ip_sel_n,
  input  logic        ip_rw_n,
  input  logic [3:0]  ip_addr,
  input  logic [15:0] ip_dout,
  input  logic        ip_doe,
  output logic [15:0] ip_din,
  output logic        ip_ack_n,
  input  logic        inject_err_i
);

  logic [15:0] mem [int unsigned];
  logic [15:0] buffer [SECTOR_WORDS];

  logic [7:0]  seccnt, lba0, lba1, lba2, devhead;
  logic        bsy, drq, err, drdy;
  logic        is_write, err_pending;
  int unsigned lba, remaining, widx, busy_cnt, ack_cnt;
  logic        in_cycle;

  // statistics for testbenches
  int unsigned n_cmds, n_wsect, n_rsect, n_busy_polls, n_status_reads, n_data;

  function automatic logic [15:0] pattern(int unsigned a);
    return 16'(a * 16'h9E37 + 16'h1234);
  endfunction

  initial begin
    bsy = 0; drq = 0; err = 0; drdy = 1; ip_ack_n = 1; ip_din = '0;
    seccnt = 0; lba0 = 0; lba1 = 0; lba2 = 0; devhead = 0; err_pending = 0;
    is_write = 0; lba = 0; remaining = 0; widx = 0; busy_cnt = 0; ack_cnt = 0; in_cycle = 0;
    n_cmds = 0; n_wsect = 0; n_rsect = 0; n_busy_polls = 0; n_status_reads = 0; n_data = 0;
  end

  task automatic load_sector();
    for (int unsigned i = 0; i < SECTOR_WORDS; i++) begin
      int unsigned a;
      a = lba * SECTOR_WORDS + i;
      buffer[i] = mem.exists(a) ? mem[a] : pattern(a);
    end
  endtask

  task automatic do_access();
    logic [7:0] st;
    st = {bsy, drdy, 2'b00, drq, 2'b00, err};
    ip_din = '0;
    if (ip_rw_n) begin
      unique case (ip_addr)
        4'd0: begin
          n_data++;
          if (drq && !is_write) begin
            ip_din = buffer[widx];
            widx++;
            if (widx == SECTOR_WORDS) begin
              n_rsect++;
              drq = 0;
              remaining--;
              lba++;
              bsy = 1; busy_cnt = SREL_BUSY;
            end
          end
        end
        4'd1: ip_din = {15'd0, err};
        4'd2: ip_din = {8'd0, seccnt};
        4'd3: ip_din = {8'd0, lba0};
        4'd4: ip_din = {8'd0, lba1};
        4'd5: ip_din = {8'd0, lba2};
        4'd6: ip_din = {8'd0, devhead};
        4'd7: begin
          ip_din = {8'd0, st};
          n_status_reads++;
          if (bsy) n_busy_polls++;
        end
        default: ip_din = '0;
      endcase
    end else begin
      unique case (ip_addr)
        4'd0: begin
          n_data++;
          if (drq && is_write) begin
            buffer[widx] = ip_dout;
            widx++;
            if (widx == SECTOR_WORDS) begin
              for (int unsigned i = 0; i < SECTOR_WORDS; i++) mem[lba * SECTOR_WORDS + i] = buffer[i];
              n_wsect++;
              drq = 0;
              remaining--;
              lba++;
              bsy = 1; busy_cnt = SREL_BUSY;
            end
          end
        end
        4'd2: seccnt  = ip_dout[7:0];
        4'd3: lba0    = ip_dout[7:0];
        4'd4: lba1    = ip_dout[7:0];
        4'd5: lba2    = ip_dout[7:0];
        4'd6: devhead = ip_dout[7:0];
        4'd7: begin
          n_cmds++;
          err = 0; drq = 0;
          lba = {devhead[3:0], lba2, lba1, lba0};
          remaining = (seccnt == 0) ? 256 : int'(seccnt);
          if (ip_dout[7:0] == 8'h30)      is_write = 1;
          else if (ip_dout[7:0] == 8'h20) is_write = 0;
          else err_pending = 1;
          if (inject_err_i) err_pending = 1;
          bsy = 1; busy_cnt = CMD_BUSY;
        end
        default: ;
      endcase
    end
  endtask

  always @(posedge clk) begin
    // internal busy timer: end of command set-up or sector release
    if (bsy) begin
      if (busy_cnt > 0) busy_cnt--;
      else begin
        bsy = 0;
        if (err_pending) begin
          err = 1; err_pending = 0; remaining = 0;
        end else if (remaining > 0) begin
          widx = 0;
          drq  = 1;
          if (!is_write) load_sector();
        end
      end
    end
    // bus cycle
    if (!ip_sel_n && !in_cycle) begin
      if (ack_cnt < ACK_DELAY) ack_cnt++;
      else begin
        do_access();
        ip_ack_n <= 0;
        in_cycle = 1;
        ack_cnt  = 0;
      end
    end else if (ip_sel_n && in_cycle) begin
      ip_ack_n <= 1;
      in_cycle = 0;
    end
  end

endmodule
