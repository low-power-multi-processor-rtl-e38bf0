// wb_master_cu: master control unit between a bus master and the bus arbiter.
//
// The unit turns the master's cycle (cyc) into a bus request to the arbiter
// and lets the master's signals onto the shared bus only while the arbiter
// grants it; otherwise it drives an idle (all-zero) request, so the requests
// of all master units on a bus are combined with OR. Acknowledge and read
// data reach the master only while it holds the grant. A master waits with
// cyc and stb high until it sees ack, as on any Wishbone bus; the grant
// arrives one clock after the request at the earliest. Only the name of the
// unit and its place between master and arbiter come from the architecture;
// the request/grant handshake is this design's own.
module wb_master_cu
  import ppu_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  // bus master side
  input  wb_req_t m_req,
  output wb_rsp_t m_rsp,
  // arbiter side
  output logic    arb_req,
  input  logic    arb_gnt,
  // shared bus side
  output wb_req_t bus_req,
  input  wb_rsp_t bus_rsp
);

  assign arb_req = m_req.cyc;
  assign bus_req = (arb_gnt && m_req.cyc) ? m_req : WB_REQ_IDLE;
  assign m_rsp   = arb_gnt ? bus_rsp : WB_RSP_IDLE;

  // A master keeps its transfer unchanged until it is acknowledged.
  property p_hold;
    @(posedge clk) disable iff (!rst_n)
      (m_req.cyc && m_req.stb && !m_rsp.ack) |=>
        (m_req.cyc && m_req.stb && $stable(m_req.adr) && $stable(m_req.we));
  endproperty
  a_hold: assert property (p_hold) else $error("master changed an unacknowledged transfer");

endmodule
