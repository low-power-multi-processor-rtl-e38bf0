// wb_arbiter: arbiter of a PPU's intra Wishbone bus.
//
// Up to NM master control units request the bus. The arbiter grants it to one
// of them at a time and keeps the grant while that master's transfer is open,
// so a transfer is never cut. The grant is re-decided when the owner drops
// its request, and also at the end of every transfer (bus ack) if another
// master is waiting, so a master issuing back-to-back transfers cannot starve
// the others. The next owner is picked round-robin, starting after the last
// owner; the grant is registered and appears one clock after the request.
// Round-robin order, hand-over per transfer and registered grant are this
// design's own choices; the architecture only states that every bus has an
// arbiter.
module wb_arbiter #(
  parameter int unsigned NM = 2
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [NM-1:0] req,
  input  logic          ack,
  output logic [NM-1:0] gnt
);

  localparam int unsigned IW = (NM > 1) ? $clog2(NM) : 1;

  logic [IW-1:0] last_q, pick;
  logic          pick_ok;
  logic [NM-1:0] gnt_d;

  always_comb begin
    pick    = last_q;
    pick_ok = 1'b0;
    for (int k = 1; k <= NM; k++) begin
      logic [IW:0] cand;                 // last_q + k, wrapped below NM
      cand = {1'b0, last_q} + (IW+1)'(k);
      if (cand >= (IW+1)'(NM)) cand = cand - (IW+1)'(NM);
      if (!pick_ok && req[cand[IW-1:0]]) begin
        pick    = cand[IW-1:0];
        pick_ok = 1'b1;
      end
    end
  end

  logic keep, others;
  assign others = (req & ~gnt) != '0;
  assign keep   = ((gnt & req) != '0) && !(ack && others);

  always_comb begin
    if (keep)         gnt_d = gnt;               // owner keeps the bus
    else if (pick_ok) gnt_d = NM'(1) << pick;
    else              gnt_d = '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gnt    <= '0;
      last_q <= IW'(NM - 1);
    end else begin
      gnt <= gnt_d;
      if (!keep && pick_ok) last_q <= pick;
    end
  end

  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt))
    else $error("more than one master granted");

endmodule
