// ppu: two-way pipeline processing unit.
//
// A PPU is one stage of the processing pipeline. Its processing core (a 32-bit
// general-purpose processor outside this module, attached at the core_* port)
// runs the stage's program. The core reaches its private instruction memory
// and data memory over the PPU's own intra bus, so cores of different stages
// never compete for these memories. Results for the next stage go to the
// output memory, the unit's "second way": it has one port on the intra bus
// and one port (dn_*) on the inter bus of the downstream stage, so the
// next stage reads (and writes, e.g. to clear a ready flag) the data without
// involving this stage's bus. Reads of the previous stage's output memory
// leave through the up_* port. How stages signal one another (e.g. a word in
// the output memory used as a ready flag) is left to software.
//
// Inside: two master control units (core, and the programming port used to
// load the instruction memory), a round-robin arbiter, four slave control
// units (instruction, data and output memory, and the output memory's
// downstream port) and a bridge that forwards region 3 of the address map to
// the up_* port with the region field cleared (see ppu_pkg for the map).
// Timing, counted in clock edges after the request appears: an isolated
// transfer to a PPU memory is granted at the first edge and acknowledged at
// the second (the slave CU's wait state); a transfer the bus owner issues
// right after its previous one needs no new grant and is acknowledged at the
// first edge, so one master sustains one transfer every two clocks. A
// transfer on the inter bus takes as long as the upstream side needs.
// Unmapped regions answer with zero data.
//
// The set of modules (core, instruction/data memory, two-port output memory,
// master and slave control units, arbiter) follows the PPU block diagram; the
// address map, bus timing and default output memory size are this design's.
module ppu
  import ppu_pkg::*;
#(
  parameter int unsigned IMEM_WORDS = 4096,
  parameter int unsigned DMEM_WORDS = 4096,
  parameter int unsigned OMEM_WORDS = 256
) (
  input  logic    clk,
  input  logic    rst_n,
  // processing core (bus master)
  input  wb_req_t core_req,
  output wb_rsp_t core_rsp,
  // programming port (bus master)
  input  wb_req_t prog_req,
  output wb_rsp_t prog_rsp,
  // inter bus towards the upstream output memory
  output wb_req_t up_req,
  input  wb_rsp_t up_rsp,
  // output memory port for the downstream inter bus
  input  wb_req_t dn_req,
  output wb_rsp_t dn_rsp
);

  localparam int unsigned IAW = $clog2(IMEM_WORDS);
  localparam int unsigned DAW = $clog2(DMEM_WORDS);
  localparam int unsigned OAW = $clog2(OMEM_WORDS);

  // ---------------- masters and arbiter ----------------
  logic [1:0] arb_req, arb_gnt;
  wb_req_t    core_bus_req, prog_bus_req, bus_req;
  wb_rsp_t    bus_rsp;

  wb_master_cu u_mcu_core (
    .clk, .rst_n,
    .m_req(core_req), .m_rsp(core_rsp),
    .arb_req(arb_req[0]), .arb_gnt(arb_gnt[0]),
    .bus_req(core_bus_req), .bus_rsp(bus_rsp)
  );

  wb_master_cu u_mcu_prog (
    .clk, .rst_n,
    .m_req(prog_req), .m_rsp(prog_rsp),
    .arb_req(arb_req[1]), .arb_gnt(arb_gnt[1]),
    .bus_req(prog_bus_req), .bus_rsp(bus_rsp)
  );

  wb_arbiter #(.NM(2)) u_arb (
    .clk, .rst_n, .req(arb_req), .ack(bus_rsp.ack), .gnt(arb_gnt)
  );

  assign bus_req = core_bus_req | prog_bus_req;

  // ---------------- slaves ----------------
  wb_rsp_t imem_rsp, dmem_rsp, omem_rsp, up_bus_rsp, none_rsp;

  logic            im_en, im_we;
  logic [SW-1:0]   im_be;
  logic [IAW-1:0]  im_addr;
  logic [DW-1:0]   im_wdata, im_rdata;

  wb_slave_cu #(.REGION(REGION_IMEM), .MAW(IAW)) u_scu_imem (
    .clk, .rst_n, .bus_req, .bus_rsp(imem_rsp),
    .mem_en(im_en), .mem_we(im_we), .mem_be(im_be), .mem_addr(im_addr),
    .mem_wdata(im_wdata), .mem_rdata(im_rdata)
  );

  ppu_sram #(.WORDS(IMEM_WORDS)) u_imem (
    .clk, .en(im_en), .we(im_we), .be(im_be), .addr(im_addr),
    .wdata(im_wdata), .rdata(im_rdata)
  );

  logic            dm_en, dm_we;
  logic [SW-1:0]   dm_be;
  logic [DAW-1:0]  dm_addr;
  logic [DW-1:0]   dm_wdata, dm_rdata;

  wb_slave_cu #(.REGION(REGION_DMEM), .MAW(DAW)) u_scu_dmem (
    .clk, .rst_n, .bus_req, .bus_rsp(dmem_rsp),
    .mem_en(dm_en), .mem_we(dm_we), .mem_be(dm_be), .mem_addr(dm_addr),
    .mem_wdata(dm_wdata), .mem_rdata(dm_rdata)
  );

  ppu_sram #(.WORDS(DMEM_WORDS)) u_dmem (
    .clk, .en(dm_en), .we(dm_we), .be(dm_be), .addr(dm_addr),
    .wdata(dm_wdata), .rdata(dm_rdata)
  );

  logic            oa_en, oa_we, ob_en, ob_we;
  logic [SW-1:0]   oa_be, ob_be;
  logic [OAW-1:0]  oa_addr, ob_addr;
  logic [DW-1:0]   oa_wdata, oa_rdata, ob_wdata, ob_rdata;

  wb_slave_cu #(.REGION(REGION_OMEM), .MAW(OAW)) u_scu_omem_intra (
    .clk, .rst_n, .bus_req, .bus_rsp(omem_rsp),
    .mem_en(oa_en), .mem_we(oa_we), .mem_be(oa_be), .mem_addr(oa_addr),
    .mem_wdata(oa_wdata), .mem_rdata(oa_rdata)
  );

  // Requests arriving on the downstream inter bus carry region 0.
  wb_slave_cu #(.REGION(4'd0), .MAW(OAW)) u_scu_omem_inter (
    .clk, .rst_n, .bus_req(dn_req), .bus_rsp(dn_rsp),
    .mem_en(ob_en), .mem_we(ob_we), .mem_be(ob_be), .mem_addr(ob_addr),
    .mem_wdata(ob_wdata), .mem_rdata(ob_rdata)
  );

  output_memory #(.WORDS(OMEM_WORDS)) u_omem (
    .clk,
    .a_en(oa_en), .a_we(oa_we), .a_be(oa_be), .a_addr(oa_addr),
    .a_wdata(oa_wdata), .a_rdata(oa_rdata),
    .b_en(ob_en), .b_we(ob_we), .b_be(ob_be), .b_addr(ob_addr),
    .b_wdata(ob_wdata), .b_rdata(ob_rdata)
  );

  // Bridge to the inter bus: region 3 leaves the PPU with its region cleared.
  logic up_hit;
  assign up_hit = bus_req.cyc && bus_req.stb && (bus_req.adr[REGION_LSB +: REGION_W] == REGION_UP);

  always_comb begin
    up_req = WB_REQ_IDLE;
    if (up_hit) begin
      up_req     = bus_req;
      up_req.adr = {16'd0, bus_req.adr[15:0]};
    end
    up_bus_rsp = up_hit ? up_rsp : WB_RSP_IDLE;
  end

  // Unmapped regions: zero data, one wait state.
  logic none_hit, none_ack_q;
  assign none_hit = bus_req.cyc && bus_req.stb && (bus_req.adr[REGION_LSB +: REGION_W] > REGION_UP);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) none_ack_q <= 1'b0;
    else        none_ack_q <= none_hit && !none_ack_q;
  end
  assign none_rsp = '{ack: none_ack_q, dat: '0};

  assign bus_rsp = imem_rsp | dmem_rsp | omem_rsp | up_bus_rsp | none_rsp;

endmodule
