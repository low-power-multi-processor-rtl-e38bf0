// bsp_sweep_run: one five-PPU system running a chain of NACT 200-tap FIR
// stages, used by tb_bsp_sweep to compare systems with 1 to 4 busy cores.
//
// The four stages of the plain pipeline PPU0 -> PPU2 -> PPU3 -> PPU4 are
// given, in that order, the 200-tap FIR program of the end-to-end test (same
// coefficient formula, right shift 3) if their position is below NACT, and a
// 1-tap pass-through program (coefficient 1, no shift) otherwise. PPU1 gets a
// 1-tap program with coefficient 0, so its branch adds nothing. Programs are
// loaded over the serial interface, NBLK blocks of BLK random 12-bit samples
// are streamed in, and every output is compared with a reference computed
// here. per_sample is the steady-state number of clocks between output
// samples, measured between the last two blocks. The results are valid once
// finished is high.
module bsp_sweep_run
  import ppu_pkg::*;
#(
  parameter int NACT = 4,
  parameter int TAPS = 200,
  parameter int BLK  = 16,
  parameter int NBLK = 3
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output int   per_sample,
  output logic finished
);

  localparam int NPPU  = 5;
  localparam int SHIFT = 3;
  localparam int NS    = BLK * NBLK;

  logic rst_n = 1'b0;

  wb_req_t core_req [NPPU];
  wb_rsp_t core_rsp [NPPU];
  logic    ser_valid, ser_data, prog_busy, prog_err;
  logic [31:0] prog_frames;
  wb_req_t sys_in_req, sys_out_req;
  wb_rsp_t sys_in_rsp, sys_out_rsp;

  bsp_system dut (
    .clk, .rst_n, .core_req, .core_rsp,
    .ser_valid, .ser_data, .prog_busy, .prog_err, .prog_frames,
    .sys_in_req, .sys_in_rsp, .sys_out_req, .sys_out_rsp
  );

  logic start = 1'b0;
  logic [NPPU-1:0] done;
  int fw [NPPU];
  int bu [NPPU];

  core_model #(.N_SRC(1), .FLAGW(0), .N_CONS(2)) u_core0 (.clk, .start, .req(core_req[0]), .rsp(core_rsp[0]), .done(done[0]), .flag_waits(fw[0]), .bad_unmapped(bu[0]));
  core_model #(.N_SRC(1), .FLAGW(0), .N_CONS(1)) u_core1 (.clk, .start, .req(core_req[1]), .rsp(core_rsp[1]), .done(done[1]), .flag_waits(fw[1]), .bad_unmapped(bu[1]));
  core_model #(.N_SRC(1), .FLAGW(1), .N_CONS(1)) u_core2 (.clk, .start, .req(core_req[2]), .rsp(core_rsp[2]), .done(done[2]), .flag_waits(fw[2]), .bad_unmapped(bu[2]));
  core_model #(.N_SRC(1), .FLAGW(0), .N_CONS(1)) u_core3 (.clk, .start, .req(core_req[3]), .rsp(core_rsp[3]), .done(done[3]), .flag_waits(fw[3]), .bad_unmapped(bu[3]));
  core_model #(.N_SRC(2), .SRC_SEL0(0), .SRC_SEL1(1), .FLAGW(0), .N_CONS(1)) u_core4 (.clk, .start, .req(core_req[4]), .rsp(core_rsp[4]), .done(done[4]), .flag_waits(fw[4]), .bad_unmapped(bu[4]));

  // system input: front-end memory, ready flag in word 0, data from word 4
  logic [31:0] in_mem [64];
  logic        in_ack_q;
  logic [31:0] in_dat_q;
  always @(posedge clk) begin
    in_ack_q <= sys_in_req.cyc && sys_in_req.stb && !in_ack_q;
    in_dat_q <= '0;
    if (sys_in_req.cyc && sys_in_req.stb && !in_ack_q) begin
      if (sys_in_req.we) in_mem[sys_in_req.adr[7:2]] <= sys_in_req.dat;
      else               in_dat_q <= in_mem[sys_in_req.adr[7:2]];
    end
  end
  assign sys_in_rsp = '{ack: in_ack_q, dat: in_dat_q};

  wb_master_bfm u_out (.clk, .req(sys_out_req), .rsp(sys_out_rsp));

  int ncyc = 0;
  always @(posedge clk) ncyc++;

  // stage programs: taps, shift and coefficients per PPU
  int ntaps [NPPU];
  int nshift [NPPU];
  int coefs [NPPU][TAPS];

  function automatic int coef_of(int p, int i);
    return ((i * 7 + p * 3 + (i / 5)) % 9) - 4;
  endfunction

  function automatic void fir(int p, const ref int in [NS], ref int out [NS]);
    for (int n = 0; n < NS; n++) begin
      longint acc = 0;
      for (int i = 0; i < ntaps[p]; i++)
        if (n - i >= 0) acc += longint'(coefs[p][i]) * longint'(in[n-i]);
      out[n] = int'(acc >>> nshift[p]);
    end
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL (%0d busy cores): %s", NACT, what);
    end
  endtask

  task automatic send_frame(logic [7:0] id, logic [23:0] wa, logic [31:0] data);
    logic [63:0] f;
    f = {id, wa, data};
    for (int b = 63; b >= 0; b--) begin
      ser_valid <= 1'b1;
      ser_data  <= f[b];
      @(posedge clk);
    end
    ser_valid <= 1'b0;
    ser_data  <= 1'b0;
    @(posedge clk);
  endtask

  initial begin
    int x [NS], a [NS], b2 [NS], b3 [NS], expv [NS];
    int blk_done [NBLK];
    int chain [4];
    int nframes;
    logic [31:0] d;
    checks     = 0;
    failures   = 0;
    per_sample = 0;
    finished   = 1'b0;
    ser_valid  = 1'b0;
    ser_data   = 1'b0;
    for (int i = 0; i < 64; i++) in_mem[i] = '0;
    chain = '{0, 2, 3, 4};
    for (int p = 0; p < NPPU; p++) begin
      ntaps[p]    = 1;
      nshift[p]   = 0;
      coefs[p][0] = (p == 1) ? 0 : 1;
    end
    for (int s = 0; s < NACT; s++) begin
      ntaps[chain[s]]  = TAPS;
      nshift[chain[s]] = SHIFT;
      for (int i = 0; i < TAPS; i++) coefs[chain[s]][i] = coef_of(chain[s], i);
    end
    for (int n = 0; n < NS; n++) x[n] = int'($urandom_range(0, 4095)) - 2048;
    fir(0, x, a);
    fir(2, a, b2);
    fir(3, b2, b3);
    fir(4, b3, expv);

    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    nframes = 0;
    for (int p = 0; p < NPPU; p++) begin
      send_frame(8'(p), 24'd0, 32'(ntaps[p]));
      send_frame(8'(p), 24'd1, BLK);
      send_frame(8'(p), 24'd2, 32'(nshift[p]));
      send_frame(8'(p), 24'd3, NBLK);
      for (int i = 0; i < ntaps[p]; i++) send_frame(8'(p), 24'(4 + i), 32'(coefs[p][i]));
      nframes += 4 + ntaps[p];
    end
    while (prog_busy) @(posedge clk);
    check(prog_frames == 32'(nframes) && !prog_err, "all programming frames written");
    start = 1'b1;

    fork
      begin
        for (int b = 0; b < NBLK; b++) begin
          while (in_mem[0] != 0) @(posedge clk);
          for (int k = 0; k < BLK; k++) in_mem[4 + k] = 32'(x[b * BLK + k]);
          in_mem[0] = 1;
        end
      end
      begin
        repeat (100) @(posedge clk);
        for (int b = 0; b < NBLK; b++) begin
          u_out.read(32'h0, d);
          while (d == 0) u_out.read(32'h0, d);
          for (int k = 0; k < BLK; k++) begin
            u_out.read(32'((4 + k) * 4), d);
            check(int'(d) == expv[b * BLK + k],
                  $sformatf("output %0d: got %0d expected %0d", b * BLK + k, int'(d), expv[b * BLK + k]));
          end
          u_out.write(32'h0, 0);
          blk_done[b] = ncyc;
        end
      end
    join
    wait (&done);
    per_sample = (blk_done[NBLK-1] - blk_done[NBLK-2]) / BLK;
    finished   = 1'b1;
  end

endmodule
