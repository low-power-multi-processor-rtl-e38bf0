// ppu_sram: private single-port memory of a PPU (instruction memory and data
// memory are each one instance).
//
// One synchronous port with byte write enables: with en high, a write stores
// the bytes picked by be at addr; a read returns the word at addr on rdata one
// clock later. rdata holds its value while en is low. The default size, 4096
// words of 32 bits (16 KB), is the size the system gives each PPU's
// instruction memory and data memory. The memory is an array so that a
// synthesis flow can map it onto an SRAM macro; its contents are not reset.
module ppu_sram #(
  parameter int unsigned WORDS = 4096,
  parameter int unsigned DW    = 32,
  parameter int unsigned AW    = $clog2(WORDS)
) (
  input  logic              clk,
  input  logic              en,
  input  logic              we,
  input  logic [DW/8-1:0]   be,
  input  logic [AW-1:0]     addr,
  input  logic [DW-1:0]     wdata,
  output logic [DW-1:0]     rdata
);

  logic [DW-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) begin
        for (int b = 0; b < DW/8; b++)
          if (be[b]) mem[addr][8*b +: 8] <= wdata[8*b +: 8];
      end else begin
        rdata <= mem[addr];
      end
    end
  end

endmodule
