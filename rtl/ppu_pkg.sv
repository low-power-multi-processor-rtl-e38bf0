// ppu_pkg: types and constants shared by the two-way pipeline processing
// unit (PPU) system.
//
// Every bus in the system is a 32-bit Wishbone-style bus (classic single
// transfers). A request travels as one packed struct from master to slave and
// the answer as another struct back. A master raises cyc and stb with the
// address, write enable, byte selects and write data, and holds them until the
// slave answers with ack (read data valid in the same cycle). Idle buses carry
// all zeros, so answers of several slaves can be combined with OR.
//
// Address map of a PPU's intra bus (the bit field choice is this design's own;
// only the set of memories on the bus follows the PPU block diagram):
//   adr[19:16] = 0  instruction memory
//   adr[19:16] = 1  data memory
//   adr[19:16] = 2  own output memory (intra port)
//   adr[19:16] = 3  inter bus: output memory of the upstream stage
//                   (adr[15:12] picks one of several upstream memories when a
//                   slave switcher sits between the stages)
// Other regions answer with zero data so a stray access cannot hang the bus.
package ppu_pkg;

  localparam int unsigned AW = 32;
  localparam int unsigned DW = 32;
  localparam int unsigned SW = DW / 8;

  localparam int unsigned REGION_LSB = 16;
  localparam int unsigned REGION_W   = 4;
  localparam logic [REGION_W-1:0] REGION_IMEM = 4'd0;
  localparam logic [REGION_W-1:0] REGION_DMEM = 4'd1;
  localparam logic [REGION_W-1:0] REGION_OMEM = 4'd2;
  localparam logic [REGION_W-1:0] REGION_UP   = 4'd3;

  // Field of an inter-bus address that selects one of several upstream memories.
  localparam int unsigned UPSEL_LSB = 12;
  localparam int unsigned UPSEL_W   = 4;

  typedef struct packed {
    logic          cyc;
    logic          stb;
    logic          we;
    logic [SW-1:0] sel;
    logic [AW-1:0] adr;
    logic [DW-1:0] dat;
  } wb_req_t;

  typedef struct packed {
    logic          ack;
    logic [DW-1:0] dat;
  } wb_rsp_t;

  localparam wb_req_t WB_REQ_IDLE = '0;
  localparam wb_rsp_t WB_RSP_IDLE = '0;

endpackage
