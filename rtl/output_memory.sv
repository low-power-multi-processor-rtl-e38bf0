// output_memory: the output memory of a two-way PPU.
//
// The memory holds the results a PPU hands to the next pipeline stage. It has
// two synchronous ports of equal rights: port A sits on the PPU's own intra
// bus, port B on the inter bus of the downstream stage (directly or through a
// slave switcher). Each port works like a single-port SRAM: with en high a
// write stores the bytes picked by be, a read returns the addressed word on
// rdata one clock later. Both ports may work in the same cycle. A read on one
// port of a word the other port writes in that cycle returns the old word; if
// both ports write the same word in the same cycle, the bytes written by port
// A are kept. That collision rule and the default size of 256 words (1 KB) are
// this design's own choices.
module output_memory #(
  parameter int unsigned WORDS = 256,
  parameter int unsigned DW    = 32,
  parameter int unsigned AW    = $clog2(WORDS)
) (
  input  logic              clk,
  // port A: own PPU
  input  logic              a_en,
  input  logic              a_we,
  input  logic [DW/8-1:0]   a_be,
  input  logic [AW-1:0]     a_addr,
  input  logic [DW-1:0]     a_wdata,
  output logic [DW-1:0]     a_rdata,
  // port B: downstream stage
  input  logic              b_en,
  input  logic              b_we,
  input  logic [DW/8-1:0]   b_be,
  input  logic [AW-1:0]     b_addr,
  input  logic [DW-1:0]     b_wdata,
  output logic [DW-1:0]     b_rdata
);

  logic [DW-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (a_en && !a_we) a_rdata <= mem[a_addr];
    if (b_en && !b_we) b_rdata <= mem[b_addr];
    // port B first so that port A wins a same-word collision
    for (int b = 0; b < DW/8; b++) begin
      if (b_en && b_we && b_be[b]) mem[b_addr][8*b +: 8] <= b_wdata[8*b +: 8];
      if (a_en && a_we && a_be[b]) mem[a_addr][8*b +: 8] <= a_wdata[8*b +: 8];
    end
  end

endmodule
