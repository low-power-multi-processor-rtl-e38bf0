// wb_slave_cu: slave control unit between a Wishbone bus and a synchronous
// memory port.
//
// The unit claims the bus transfers whose region field adr[19:16] equals
// REGION. A claimed transfer enables the memory for one clock (word address
// taken from adr[2 +: MAW]); the next clock the unit answers with ack and,
// for a read, the memory's output word. Because ack is registered and the
// memory is not enabled again while ack is high, a master that holds its
// request until ack gets exactly one access. When the unit does not answer,
// its response is all zeros, so responses of several units on one bus are
// combined with OR. The decoding scheme and the one-wait-state timing are
// this design's own.
module wb_slave_cu
  import ppu_pkg::*;
#(
  parameter logic [REGION_W-1:0] REGION = '0,
  parameter int unsigned         MAW    = 12
) (
  input  logic            clk,
  input  logic            rst_n,
  input  wb_req_t         bus_req,
  output wb_rsp_t         bus_rsp,
  // memory port
  output logic            mem_en,
  output logic            mem_we,
  output logic [SW-1:0]   mem_be,
  output logic [MAW-1:0]  mem_addr,
  output logic [DW-1:0]   mem_wdata,
  input  logic [DW-1:0]   mem_rdata
);

  logic hit, ack_q, was_read_q;

  assign hit = bus_req.cyc && bus_req.stb && (bus_req.adr[REGION_LSB +: REGION_W] == REGION);

  always_comb begin
    mem_en    = hit && !ack_q;
    mem_we    = bus_req.we;
    mem_be    = bus_req.sel;
    mem_addr  = bus_req.adr[2 +: MAW];
    mem_wdata = bus_req.dat;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ack_q      <= 1'b0;
      was_read_q <= 1'b0;
    end else begin
      ack_q      <= mem_en;
      was_read_q <= mem_en && !bus_req.we;
    end
  end

  assign bus_rsp.ack = ack_q;
  assign bus_rsp.dat = was_read_q ? mem_rdata : '0;

endmodule
