// bypass_mux: the multiplexer in front of one physical layer that lets the
// host bypass the data link layer and access the memory bank directly
// (used for initialisation and configuration).
//
// sel_host_i asks for the host path. The switch-over only takes effect
// while no access is outstanding on the physical layer, so an access that
// has started is always finished on the path that issued it. The path not
// selected sees no acknowledge and simply waits. The multiplexer itself is
// shown in the architecture; the safe switch-over rule is this design's own.
module bypass_mux
  import nvm_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     sel_host_i,
  output logic     host_sel_o,   // path currently connected is the host's
  input  acc_req_t dll_req_i,
  output acc_rsp_t dll_rsp_o,
  input  acc_req_t host_req_i,
  output acc_rsp_t host_rsp_o,
  output acc_req_t phy_req_o,
  input  acc_rsp_t phy_rsp_i
);

  logic sel_q;     // current owner: 1 = host
  logic busy_q;    // an access is in flight on the physical layer

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sel_q  <= 1'b0;
      busy_q <= 1'b0;
    end else begin
      if (phy_req_o.req && !phy_rsp_i.ack) busy_q <= 1'b1;
      if (phy_rsp_i.ack)                   busy_q <= 1'b0;
      if (!busy_q && !phy_req_o.req)       sel_q  <= sel_host_i;
    end
  end

  always_comb begin
    phy_req_o  = sel_q ? host_req_i : dll_req_i;
    dll_rsp_o  = '0;
    host_rsp_o = '0;
    if (sel_q) host_rsp_o = phy_rsp_i;
    else       dll_rsp_o  = phy_rsp_i;
  end

  assign host_sel_o = sel_q;

endmodule
