// bsp_system: five two-way PPUs arranged as a pipeline with one parallel
// section, for biomedical signal processing (for instance ECG analysis with a
// shared filtering stage, two feature-extraction branches and a common
// classifier).
//
//   system input -> PPU0 -> SS0 -+-> PPU1 ----------+-> SS1 -> PPU4 -> system output
//                                +-> PPU2 -> PPU3 --+
//
// PPU0 reads its input over its inter bus from the sys_in_* port (a front end
// or host that follows the same output-memory protocol). Slave switcher SS0
// lets PPU1 and PPU2 both read PPU0's output memory; PPU3 reads PPU2's output
// memory directly; slave switcher SS1 lets PPU4 reach the output memories of
// PPU1 (select 0 in adr[15:12] of its region-3 addresses) and PPU3 (select 1).
// The results are read from PPU4's output memory through the sys_out_* port.
// The path PPU0 -> PPU2 -> PPU3 -> PPU4 is a plain four-stage pipeline.
//
// The processing cores (32-bit general-purpose processors) are not part of
// this module: each PPU's core bus master is brought out as core_req[i] /
// core_rsp[i]. The serial-to-parallel programming interface loads all
// instruction memories from ser_valid / ser_data. All ports use the
// Wishbone-style structs of ppu_pkg and one clock with an asynchronous
// active-low reset.
//
// The topology follows the five-PPU arrangement that combines two ECG
// analyses; the memory sizes default to 16 KB instruction and 16 KB data
// memory per PPU. Output memory size and everything about the bus encoding
// are this design's own.
module bsp_system
  import ppu_pkg::*;
#(
  parameter int unsigned IMEM_WORDS = 4096,
  parameter int unsigned DMEM_WORDS = 4096,
  parameter int unsigned OMEM_WORDS = 256
) (
  input  logic        clk,
  input  logic        rst_n,
  // processing cores
  input  wb_req_t     core_req [5],
  output wb_rsp_t     core_rsp [5],
  // serial programming interface
  input  logic        ser_valid,
  input  logic        ser_data,
  output logic        prog_busy,
  output logic        prog_err,
  output logic [31:0] prog_frames,
  // system input (read by PPU0)
  output wb_req_t     sys_in_req,
  input  wb_rsp_t     sys_in_rsp,
  // system output (PPU4's output memory)
  input  wb_req_t     sys_out_req,
  output wb_rsp_t     sys_out_rsp
);

  localparam int unsigned NPPU = 5;

  wb_req_t prog_req [NPPU];
  wb_rsp_t prog_rsp [NPPU];
  wb_req_t up_req   [NPPU];
  wb_rsp_t up_rsp   [NPPU];
  wb_req_t dn_req   [NPPU];
  wb_rsp_t dn_rsp   [NPPU];

  prog_if #(.NPPU(NPPU), .MAW($clog2(IMEM_WORDS))) u_prog (
    .clk, .rst_n, .ser_valid, .ser_data,
    .prog_req, .prog_rsp,
    .busy(prog_busy), .err(prog_err), .frames(prog_frames)
  );

  for (genvar i = 0; i < NPPU; i++) begin : g_ppu
    ppu #(
      .IMEM_WORDS(IMEM_WORDS), .DMEM_WORDS(DMEM_WORDS), .OMEM_WORDS(OMEM_WORDS)
    ) u_ppu (
      .clk, .rst_n,
      .core_req(core_req[i]), .core_rsp(core_rsp[i]),
      .prog_req(prog_req[i]), .prog_rsp(prog_rsp[i]),
      .up_req(up_req[i]),     .up_rsp(up_rsp[i]),
      .dn_req(dn_req[i]),     .dn_rsp(dn_rsp[i])
    );
  end

  // system input
  assign sys_in_req = up_req[0];
  assign up_rsp[0]  = sys_in_rsp;

  // SS0: PPU1 and PPU2 share PPU0's output memory
  wb_req_t ss0_s_req [2];
  wb_rsp_t ss0_s_rsp [2];
  wb_req_t ss0_m_req [1];
  wb_rsp_t ss0_m_rsp [1];

  assign ss0_s_req[0] = up_req[1];
  assign ss0_s_req[1] = up_req[2];
  assign up_rsp[1]    = ss0_s_rsp[0];
  assign up_rsp[2]    = ss0_s_rsp[1];
  assign dn_req[0]    = ss0_m_req[0];
  assign ss0_m_rsp[0] = dn_rsp[0];

  slave_switcher #(.NM(2), .NS(1)) u_ss0 (
    .clk, .rst_n,
    .s_req(ss0_s_req), .s_rsp(ss0_s_rsp),
    .m_req(ss0_m_req), .m_rsp(ss0_m_rsp)
  );

  // PPU3 reads PPU2 directly
  assign dn_req[2]  = up_req[3];
  assign up_rsp[3]  = dn_rsp[2];

  // SS1: PPU4 reads PPU1 (select 0) and PPU3 (select 1)
  wb_req_t ss1_s_req [1];
  wb_rsp_t ss1_s_rsp [1];
  wb_req_t ss1_m_req [2];
  wb_rsp_t ss1_m_rsp [2];

  assign ss1_s_req[0] = up_req[4];
  assign up_rsp[4]    = ss1_s_rsp[0];
  assign dn_req[1]    = ss1_m_req[0];
  assign dn_req[3]    = ss1_m_req[1];
  assign ss1_m_rsp[0] = dn_rsp[1];
  assign ss1_m_rsp[1] = dn_rsp[3];

  slave_switcher #(.NM(1), .NS(2)) u_ss1 (
    .clk, .rst_n,
    .s_req(ss1_s_req), .s_rsp(ss1_s_rsp),
    .m_req(ss1_m_req), .m_rsp(ss1_m_rsp)
  );

  // system output
  assign dn_req[4]   = sys_out_req;
  assign sys_out_rsp = dn_rsp[4];

endmodule
