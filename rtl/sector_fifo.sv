// sector_fifo: the FIFO queue the transport layer keeps for one memory bank.
//
// A synchronous first-word-fall-through FIFO: rd_data always shows the
// oldest word while empty_o is low, and a pop removes it. Push and pop may
// happen in the same cycle. The default depth is two ATA sectors of 256
// sixteen-bit words, the size the architecture uses per compact flash
// bank; everything else (fall-through read, flush input, level output) is
// this design's own choice. The storage is a plain array so that synthesis
// can map it to block memory.
//
// Timing: push/pop are sampled on the rising clock edge; full_o, empty_o
// and level_o are registered state and change the cycle after.
module sector_fifo #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned DEPTH = 512,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             flush_i,      // empty the queue
  input  logic             push_i,
  input  logic [WIDTH-1:0] wr_data_i,
  input  logic             pop_i,
  output logic [WIDTH-1:0] rd_data_o,
  output logic             full_o,
  output logic             empty_o,
  output logic [AW:0]      level_o
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wr_ptr, rd_ptr;
  logic [AW:0]      level;

  logic do_push, do_pop;
  assign do_push = push_i && !full_o;
  assign do_pop  = pop_i  && !empty_o;

  always_ff @(posedge clk) begin
    if (do_push) mem[wr_ptr] <= wr_data_i;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      level  <= '0;
    end else if (flush_i) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      level  <= '0;
    end else begin
      if (do_push) wr_ptr <= (wr_ptr == AW'(DEPTH-1)) ? '0 : wr_ptr + 1'b1;
      if (do_pop)  rd_ptr <= (rd_ptr == AW'(DEPTH-1)) ? '0 : rd_ptr + 1'b1;
      level <= level + (AW+1)'(do_push) - (AW+1)'(do_pop);
    end
  end

  assign rd_data_o = mem[rd_ptr];
  assign full_o    = (level == (AW+1)'(DEPTH));
  assign empty_o   = (level == '0);
  assign level_o   = level;

endmodule
