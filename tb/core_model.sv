// core_model: simulation-only stand-in for the 32-bit processor of one PPU.
//
// It runs, through the PPU's core bus port, the kind of stage program the
// pipeline is meant for. After start it fetches its program from its
// instruction memory: word 0 = taps T, word 1 = block size B, word 2 = right
// shift S, word 3 = number of blocks NB, words 4.. = T filter coefficients.
// Before that it clears its own ready flags, since memory contents are
// undefined after power-up. It clears a T-word history ring in its data memory. Then, per block:
//   - for each of its N_SRC upstream memories (inter-bus select SRC_SEL[s]):
//     poll the ready flag (word FLAGW of that memory) until it is non-zero,
//     read the B samples at words 4.., and clear the flag;
//   - sum the sources sample by sample, run a T-tap FIR filter whose history
//     lives in the data memory, shift the sums right by S;
//   - wait until all N_CONS ready flags (words 0..N_CONS-1) of its own output
//     memory were cleared by the consumers, write the B results at words 4..
//     and set those flags.
// It also makes one read of an unmapped address, which must return zero.
module core_model
  import ppu_pkg::*;
#(
  parameter int N_SRC   = 1,
  parameter int SRC_SEL0 = 0,
  parameter int SRC_SEL1 = 0,
  parameter int FLAGW   = 0,
  parameter int N_CONS  = 1
) (
  input  logic    clk,
  input  logic    start,
  output wb_req_t req,
  input  wb_rsp_t rsp,
  output logic    done,
  output int      flag_waits,
  output int      bad_unmapped
);

  localparam logic [31:0] IMEM = 32'h0000_0000;
  localparam logic [31:0] DMEM = 32'h0001_0000;
  localparam logic [31:0] OMEM = 32'h0002_0000;
  localparam logic [31:0] UP   = 32'h0003_0000;

  initial req = WB_REQ_IDLE;

  // one single transfer: the request is driven at a falling clock edge and
  // held until ack is seen at a falling edge; it is removed at the falling
  // edge after the acknowledging rising edge
  task automatic bus(input bit we, input logic [31:0] adr, input logic [31:0] wdat,
                     output logic [31:0] rdat);
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
    do @(negedge clk); while (!rsp.ack);
    rdat = rsp.dat;
    @(negedge clk);
    req = WB_REQ_IDLE;
  endtask

  task automatic rd(input logic [31:0] adr, output logic [31:0] rdat);
    bus(1'b0, adr, '0, rdat);
  endtask

  task automatic wr(input logic [31:0] adr, input logic [31:0] wdat);
    logic [31:0] unused;
    bus(1'b1, adr, wdat, unused);
  endtask

  int coef [512];

  function automatic logic [31:0] up_adr(int s, int word);
    int sel;
    sel = (s == 0) ? SRC_SEL0 : SRC_SEL1;
    return UP | 32'(sel << UPSEL_LSB) | 32'(word * 4);
  endfunction

  initial begin
    logic [31:0] d;
    int taps, blk, shift, nblk, pos;
    int x [256];
    int y [256];
    done         = 1'b0;
    flag_waits   = 0;
    bad_unmapped = 0;
    wait (start);
    @(posedge clk);
    // boot: clear own ready flags before anyone downstream polls them (the
    // program fetch below takes far longer than this)
    for (int c = 0; c < N_CONS; c++) wr(OMEM + 32'(c * 4), 0);
    rd(IMEM + 0, d); taps  = int'(d);
    rd(IMEM + 4, d); blk   = int'(d);
    rd(IMEM + 8, d); shift = int'(d);
    rd(IMEM + 12, d); nblk = int'(d);
    for (int i = 0; i < taps; i++) begin
      rd(IMEM + 32'((4 + i) * 4), d);
      coef[i] = int'(d);
    end
    rd(32'h0005_0000, d);
    if (d != 0) bad_unmapped++;
    for (int i = 0; i < taps; i++) wr(DMEM + 32'(i * 4), 0);
    pos = 0;
    for (int b = 0; b < nblk; b++) begin
      for (int k = 0; k < blk; k++) x[k] = 0;
      for (int s = 0; s < N_SRC; s++) begin
        rd(up_adr(s, FLAGW), d);
        while (d == 0) begin
          flag_waits++;
          rd(up_adr(s, FLAGW), d);
        end
        for (int k = 0; k < blk; k++) begin
          rd(up_adr(s, 4 + k), d);
          x[k] += int'(d);
        end
        wr(up_adr(s, FLAGW), 0);
      end
      for (int k = 0; k < blk; k++) begin
        longint acc;
        acc = 0;
        wr(DMEM + 32'(pos * 4), 32'(x[k]));
        for (int i = 0; i < taps; i++) begin
          rd(DMEM + 32'(((pos - i + taps) % taps) * 4), d);
          acc += longint'(coef[i]) * longint'(int'(d));
        end
        y[k] = int'(acc >>> shift);
        pos = (pos + 1) % taps;
      end
      for (int c = 0; c < N_CONS; c++) begin
        rd(OMEM + 32'(c * 4), d);
        while (d != 0) begin
          flag_waits++;
          rd(OMEM + 32'(c * 4), d);
        end
      end
      for (int k = 0; k < blk; k++) wr(OMEM + 32'((4 + k) * 4), 32'(y[k]));
      for (int c = 0; c < N_CONS; c++) wr(OMEM + 32'(c * 4), 1);
    end
    done = 1'b1;
  end

endmodule
