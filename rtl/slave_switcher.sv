// slave_switcher: connects the inter buses of NM PPUs to NS output memories
// when a pipeline stage is split into parallel PPUs.
//
// Upstream of a parallel stage the switcher lets several PPUs (NM > 1) read
// one output memory; downstream of it, it lets one PPU reach the output
// memories of all parallel PPUs (NS > 1). Both cases are the same circuit: a
// multiplexer that puts one master's request on the selected memory port and
// a demultiplexer that returns that memory's answer to the same master.
//
// Which master is served is decided by a priority FIFO of master IDs. A
// master that starts a transfer and is not yet queued enters the FIFO; masters
// starting in the same clock enter in the order of their IDs, lowest first.
// The master at the head is connected until its transfer is acknowledged; it
// then leaves the FIFO, and if it starts another transfer it queues again
// behind those already waiting. The memory is picked by adr[15:12] of the
// head's request (ignored when NS = 1); a selection beyond NS is answered with
// zero data. Entering the FIFO takes one clock, so a transfer through the
// switcher takes one clock more than a direct one; a master also waits for
// all masters ahead of it in the FIFO.
//
// A multiplexer, a demultiplexer and a priority FIFO of master IDs are the
// parts of the switcher's block diagram; the queueing rules, the select field
// and the handling of bad selections are this design's own.
module slave_switcher
  import ppu_pkg::*;
#(
  parameter int unsigned NM = 2,
  parameter int unsigned NS = 1
) (
  input  logic    clk,
  input  logic    rst_n,
  // from the inter buses of the masters
  input  wb_req_t s_req [NM],
  output wb_rsp_t s_rsp [NM],
  // to the output memories
  output wb_req_t m_req [NS],
  input  wb_rsp_t m_rsp [NS]
);

  localparam int unsigned IW = (NM > 1) ? $clog2(NM) : 1;
  localparam int unsigned CW = $clog2(NM + 1);
  localparam int unsigned SIW = (NS > 1) ? $clog2(NS) : 1;

  logic [IW-1:0] fifo_q [NM];
  logic [CW-1:0] cnt_q;
  logic [NM-1:0] queued_q;

  logic [IW-1:0]      head;
  logic               head_valid;
  logic [UPSEL_W-1:0] slv;
  logic               slv_ok;
  logic               head_ack;
  logic [SIW-1:0]     slv_idx;

  assign head       = fifo_q[0];
  assign head_valid = (cnt_q != '0);
  assign slv        = (NS > 1) ? s_req[head].adr[UPSEL_LSB +: UPSEL_W] : '0;
  assign slv_ok     = (int'(slv) < NS);
  assign slv_idx    = SIW'(slv);

  // bad-selection responder
  logic bad_ack_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) bad_ack_q <= 1'b0;
    else        bad_ack_q <= head_valid && !slv_ok && s_req[head].cyc && s_req[head].stb && !bad_ack_q;
  end

  // MUX: head request to the selected memory
  always_comb begin
    for (int k = 0; k < NS; k++) m_req[k] = WB_REQ_IDLE;
    if (head_valid && slv_ok) m_req[slv_idx] = s_req[head];
  end

  // DMUX: answer back to the head only
  always_comb begin
    for (int i = 0; i < NM; i++) s_rsp[i] = WB_RSP_IDLE;
    head_ack = 1'b0;
    if (head_valid) begin
      if (slv_ok) begin
        s_rsp[head] = m_rsp[slv_idx];
        head_ack    = m_rsp[slv_idx].ack;
      end else begin
        s_rsp[head].ack = bad_ack_q;
        head_ack        = bad_ack_q;
      end
    end
  end

  // priority FIFO of master IDs
  logic [IW-1:0] fifo_d [NM];
  logic [CW-1:0] cnt_d;
  logic [NM-1:0] queued_d;

  always_comb begin
    fifo_d   = fifo_q;
    cnt_d    = cnt_q;
    queued_d = queued_q;
    if (head_valid && head_ack) begin
      for (int j = 0; j + 1 < NM; j++) fifo_d[j] = fifo_q[j+1];
      fifo_d[NM-1]   = '0;
      cnt_d          = cnt_q - 1'b1;
      queued_d[head] = 1'b0;
    end
    for (int i = 0; i < NM; i++) begin
      if (s_req[i].cyc && s_req[i].stb && !queued_q[i]) begin
        fifo_d[IW'(cnt_d)] = IW'(i);
        cnt_d         = cnt_d + 1'b1;
        queued_d[i]   = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < NM; j++) fifo_q[j] <= '0;
      cnt_q    <= '0;
      queued_q <= '0;
    end else begin
      fifo_q   <= fifo_d;
      cnt_q    <= cnt_d;
      queued_q <= queued_d;
    end
  end

  a_count: assert property (@(posedge clk) disable iff (!rst_n) int'(cnt_q) == $countones(queued_q))
    else $error("priority FIFO count does not match queued masters");

endmodule
