// phy_ip: physical layer of one memory bank.
//
// A gateway that turns one atomic register access on the internal bus into
// one cycle of an IndustryPack-style logic interface (select strobe,
// read/write line, register address, 16-bit data split into out/in/enable,
// and an active-low acknowledge from the card side). The layered
// architecture gives only this role (wrapper between an internal bus and
// the external bus, performing single atomic accesses to given addresses);
// the cycle sequence below, the set-up phase and the acknowledge time-out
// are this design's own.
//
// Internal side: req_i.req is held with stable fields until rsp_o.ack
// pulses for one cycle; rsp_o.rdata is valid with the pulse, rsp_o.err
// flags a time-out (no acknowledge within TIMEOUT cycles).
// External cycle: SETUP (address, rw and write data driven, select high)
// for SETUP_CYCLES, STROBE (select low) until ack_n is seen low, then
// RELEASE (select high) until ack_n returns high.
module phy_ip
  import nvm_pkg::*;
#(
  parameter int unsigned SETUP_CYCLES = 1,
  parameter int unsigned TIMEOUT      = 1023
) (
  input  logic              clk,
  input  logic              rst_n,
  // internal bus
  input  acc_req_t          req_i,
  output acc_rsp_t          rsp_o,
  // external IndustryPack-style bus
  output logic              ip_sel_n,
  output logic              ip_rw_n,     // 1 = read, 0 = write
  output logic [REG_AW-1:0] ip_addr,
  output logic [DATA_W-1:0] ip_dout,
  output logic              ip_doe,      // drive ip_dout onto the data bus
  input  logic [DATA_W-1:0] ip_din,
  input  logic              ip_ack_n
);

  typedef enum logic [1:0] {S_IDLE, S_SETUP, S_STROBE, S_RELEASE} state_e;
  state_e state;

  localparam int unsigned CW = $clog2(TIMEOUT + 2);
  logic [CW-1:0] cnt;
  logic          we_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      cnt      <= '0;
      we_q     <= 1'b0;
      ip_sel_n <= 1'b1;
      ip_rw_n  <= 1'b1;
      ip_addr  <= '0;
      ip_dout  <= '0;
      ip_doe   <= 1'b0;
      rsp_o    <= '0;
    end else begin
      rsp_o.ack <= 1'b0;
      rsp_o.err <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (req_i.req && !rsp_o.ack) begin
            we_q    <= req_i.we;
            ip_rw_n <= !req_i.we;
            ip_addr <= req_i.addr;
            ip_dout <= req_i.wdata;
            ip_doe  <= req_i.we;
            cnt     <= '0;
            state   <= S_SETUP;
          end
        end
        S_SETUP: begin
          if (cnt == CW'(SETUP_CYCLES - 1)) begin
            ip_sel_n <= 1'b0;
            cnt      <= '0;
            state    <= S_STROBE;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        S_STROBE: begin
          if (!ip_ack_n || cnt == CW'(TIMEOUT)) begin
            ip_sel_n    <= 1'b1;
            rsp_o.ack   <= 1'b1;
            rsp_o.err   <= ip_ack_n;          // no acknowledge: time-out
            rsp_o.rdata <= we_q ? '0 : ip_din;
            state       <= S_RELEASE;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        S_RELEASE: begin
          ip_doe <= 1'b0;
          if (ip_ack_n) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // the requester must hold a request stable until it is acknowledged
  property p_req_stable;
    @(posedge clk) disable iff (!rst_n)
      (state == S_SETUP || state == S_STROBE) |-> $stable(req_i);
  endproperty
  a_req_stable: assert property (p_req_stable);

endmodule
