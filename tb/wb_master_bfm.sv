// wb_master_bfm: simulation-only bus master for the testbenches.
//
// xfer() issues one single transfer on a ppu_pkg Wishbone-style port. It
// drives the request at a falling clock edge, holds it until it sees ack at a
// falling edge (so the slave finishes at the rising edge that follows),
// returns the read data and the number of clocks from request to ack, and
// idles the bus at the next falling edge unless another transfer follows.
module wb_master_bfm
  import ppu_pkg::*;
(
  input  logic    clk,
  output wb_req_t req,
  input  wb_rsp_t rsp
);

  initial req = WB_REQ_IDLE;

  task automatic xfer(input bit we, input logic [31:0] adr, input logic [31:0] wdat,
                      output logic [31:0] rdat, output int lat);
    wb_req_t r;
    r     = WB_REQ_IDLE;
    r.cyc = 1'b1;
    r.stb = 1'b1;
    r.we  = we;
    r.sel = '1;
    r.adr = adr;
    r.dat = wdat;
    if (clk) @(negedge clk);
    req = r;
    lat = 0;
    do begin
      @(negedge clk);
      lat++;
    end while (!rsp.ack);
    rdat = rsp.dat;
    @(negedge clk);
    req = WB_REQ_IDLE;
  endtask

  task automatic write(input logic [31:0] adr, input logic [31:0] wdat);
    logic [31:0] d;
    int l;
    xfer(1'b1, adr, wdat, d, l);
  endtask

  task automatic read(input logic [31:0] adr, output logic [31:0] rdat);
    int l;
    xfer(1'b0, adr, '0, rdat, l);
  endtask

endmodule
