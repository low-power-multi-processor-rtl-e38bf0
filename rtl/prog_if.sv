// prog_if: serial-to-parallel programming interface that loads the
// instruction memories of the PPUs.
//
// Bits arrive one per clock on ser_data while ser_valid is high, most
// significant bit first, in 64-bit frames:
//   [63:56] number of the target PPU
//   [55:32] word address inside its instruction memory
//   [31:0]  instruction word
// When the 64th bit of a frame is in, the interface writes the word into the
// target's instruction memory through that PPU's programming master port
// (region 0 of the PPU address map; word address bits beyond the memory wrap)
// and holds busy until the write is acknowledged. Shifting goes on during the
// write. A frame that ends while a write is still open, or that names a PPU
// that does not exist, is dropped and sets the sticky err flag (cleared by
// reset). frames counts the words written. The serial interface and its role
// follow the system description; the frame layout, the sampling on the system
// clock and the error rules are this design's own.
module prog_if
  import ppu_pkg::*;
#(
  parameter int unsigned NPPU = 5,
  parameter int unsigned MAW  = 12
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        ser_valid,
  input  logic        ser_data,
  output wb_req_t     prog_req [NPPU],
  input  wb_rsp_t     prog_rsp [NPPU],
  output logic        busy,
  output logic        err,
  output logic [31:0] frames
);

  logic [62:0] shreg_q;
  logic [5:0]  nbits_q;
  logic        frame_done;
  logic [63:0] frame;

  assign frame      = {shreg_q, ser_data};
  assign frame_done = ser_valid && (nbits_q == 6'd63);

  logic [7:0]    tgt_q;
  logic [MAW-1:0] waddr_q;
  logic [31:0]   wdata_q;
  logic          acked;

  always_comb begin
    acked = 1'b0;
    for (int p = 0; p < NPPU; p++)
      if (busy && tgt_q == 8'(p) && prog_rsp[p].ack) acked = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shreg_q <= '0;
      nbits_q <= '0;
      busy    <= 1'b0;
      err     <= 1'b0;
      frames  <= '0;
      tgt_q   <= '0;
      waddr_q <= '0;
      wdata_q <= '0;
    end else begin
      if (ser_valid) begin
        shreg_q <= frame[62:0];
        nbits_q <= nbits_q + 1'b1;
      end
      if (acked) begin
        busy   <= 1'b0;
        frames <= frames + 1'b1;
      end
      if (frame_done) begin
        if ((busy && !acked) || int'(frame[63:56]) >= NPPU) begin
          err <= 1'b1;
        end else begin
          busy    <= 1'b1;
          tgt_q   <= frame[63:56];
          waddr_q <= frame[32 +: MAW];
          wdata_q <= frame[31:0];
        end
      end
    end
  end

  always_comb begin
    for (int p = 0; p < NPPU; p++) begin
      prog_req[p] = WB_REQ_IDLE;
      if (busy && tgt_q == 8'(p)) begin
        prog_req[p].cyc = 1'b1;
        prog_req[p].stb = 1'b1;
        prog_req[p].we  = 1'b1;
        prog_req[p].sel = '1;
        prog_req[p].adr = {12'd0, REGION_IMEM, 14'(waddr_q) , 2'b00};
        prog_req[p].dat = wdata_q;
      end
    end
  end

endmodule
