// tb_bsp_stress: the five-PPU system at reduced memory sizes, run for many
// blocks with short filters of a different length and shift per stage, a
// front end and an output reader that stall for random times, and loader
// traffic during the whole run. This stresses the ready-flag hand-off between
// stages (producers waiting for slow consumers and the reverse) and the
// arbitration in the slave switchers over a long run. The expected output is
// computed independently as in the full-size test:
//   a = F0(x); out = F4(F1(a) + F3(F2(a)))
module tb_bsp_stress;
  import ppu_pkg::*;

  localparam int NPPU  = 5;
  localparam int TAPS  = 9;      // longest filter
  localparam int BLK   = 8;
  localparam int NBLK  = 40;
  int ntaps [NPPU];
  int nshift [NPPU];
  localparam int NS    = BLK * NBLK;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  wb_req_t core_req [NPPU];
  wb_rsp_t core_rsp [NPPU];
  logic    ser_valid, ser_data, prog_busy, prog_err;
  logic [31:0] prog_frames;
  wb_req_t sys_in_req, sys_out_req;
  wb_rsp_t sys_in_rsp, sys_out_rsp;

  bsp_system #(.IMEM_WORDS(512), .DMEM_WORDS(256), .OMEM_WORDS(64)) dut (
    .clk, .rst_n, .core_req, .core_rsp,
    .ser_valid, .ser_data, .prog_busy, .prog_err, .prog_frames,
    .sys_in_req, .sys_in_rsp, .sys_out_req, .sys_out_rsp
  );

  // ---------------- core models ----------------
  logic start = 1'b0;
  logic [NPPU-1:0] done;
  int fw [NPPU];
  int bu [NPPU];

  core_model #(.N_SRC(1), .FLAGW(0), .N_CONS(2)) u_core0 (.clk, .start, .req(core_req[0]), .rsp(core_rsp[0]), .done(done[0]), .flag_waits(fw[0]), .bad_unmapped(bu[0]));
  core_model #(.N_SRC(1), .FLAGW(0), .N_CONS(1)) u_core1 (.clk, .start, .req(core_req[1]), .rsp(core_rsp[1]), .done(done[1]), .flag_waits(fw[1]), .bad_unmapped(bu[1]));
  core_model #(.N_SRC(1), .FLAGW(1), .N_CONS(1)) u_core2 (.clk, .start, .req(core_req[2]), .rsp(core_rsp[2]), .done(done[2]), .flag_waits(fw[2]), .bad_unmapped(bu[2]));
  core_model #(.N_SRC(1), .FLAGW(0), .N_CONS(1)) u_core3 (.clk, .start, .req(core_req[3]), .rsp(core_rsp[3]), .done(done[3]), .flag_waits(fw[3]), .bad_unmapped(bu[3]));
  core_model #(.N_SRC(2), .SRC_SEL0(0), .SRC_SEL1(1), .FLAGW(0), .N_CONS(1)) u_core4 (.clk, .start, .req(core_req[4]), .rsp(core_rsp[4]), .done(done[4]), .flag_waits(fw[4]), .bad_unmapped(bu[4]));

  // ---------------- system input: front-end memory ----------------
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

  // ---------------- reference ----------------
  int x [NS];
  int blk_done [NBLK];
  int expv [NS];
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

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------- serial programming ----------------
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

  // ---------------- mechanism counters ----------------
  int ncyc = 0;
  always @(posedge clk) ncyc++;
  int n_arb_conflict = 0, n_ss0_queue2 = 0, n_ss1_sel0 = 0, n_ss1_sel1 = 0, n_omem_dual = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.g_ppu[0].u_ppu.arb_req == 2'b11 || dut.g_ppu[1].u_ppu.arb_req == 2'b11 ||
        dut.g_ppu[2].u_ppu.arb_req == 2'b11 || dut.g_ppu[3].u_ppu.arb_req == 2'b11 ||
        dut.g_ppu[4].u_ppu.arb_req == 2'b11) n_arb_conflict++;
    if (dut.u_ss0.cnt_q == 2) n_ss0_queue2++;
    if (dut.ss1_m_rsp[0].ack) n_ss1_sel0++;
    if (dut.ss1_m_rsp[1].ack) n_ss1_sel1++;
    if ((dut.g_ppu[0].u_ppu.oa_en && dut.g_ppu[0].u_ppu.ob_en) ||
        (dut.g_ppu[1].u_ppu.oa_en && dut.g_ppu[1].u_ppu.ob_en) ||
        (dut.g_ppu[2].u_ppu.oa_en && dut.g_ppu[2].u_ppu.ob_en) ||
        (dut.g_ppu[3].u_ppu.oa_en && dut.g_ppu[3].u_ppu.ob_en) ||
        (dut.g_ppu[4].u_ppu.oa_en && dut.g_ppu[4].u_ppu.ob_en)) n_omem_dual++;
  end

  // ---------------- watchdog ----------------
  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired (done=%b flag waits %0d %0d %0d %0d %0d)", done, fw[0], fw[1], fw[2], fw[3], fw[4]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- stimulus ----------------
  initial begin
    int a [NS], b1 [NS], b2 [NS], b3 [NS], s [NS];
    logic [31:0] d;
    int fw_total;
    int total_frames = 0;
    ser_valid = 1'b0;
    ser_data  = 1'b0;
    for (int i = 0; i < 64; i++) in_mem[i] = '0;
    for (int n = 0; n < NS; n++) x[n] = int'($urandom_range(0, 4095)) - 2048;
    for (int p = 0; p < NPPU; p++) begin
      ntaps[p]  = 1 + int'($urandom % TAPS);
      nshift[p] = int'($urandom % 3);
      for (int i = 0; i < TAPS; i++) coefs[p][i] = coef_of(p, i);
    end
    fir(0, x, a);
    fir(1, a, b1);
    fir(2, a, b2);
    fir(3, b2, b3);
    for (int n = 0; n < NS; n++) s[n] = b1[n] + b3[n];
    fir(4, s, expv);

    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);

    // program all instruction memories
    for (int p = 0; p < NPPU; p++) begin
      send_frame(8'(p), 24'd0, 32'(ntaps[p]));
      send_frame(8'(p), 24'd1, BLK);
      send_frame(8'(p), 24'd2, 32'(nshift[p]));
      send_frame(8'(p), 24'd3, NBLK);
      for (int i = 0; i < ntaps[p]; i++) send_frame(8'(p), 24'(4 + i), 32'(coefs[p][i]));
      total_frames += 4 + ntaps[p];
    end
    while (prog_busy) @(posedge clk);
    check(prog_frames == 32'(total_frames), $sformatf("all programming frames written (%0d, err %0d)", prog_frames, prog_err));
    check(!prog_err, "no programming error");
    start = 1'b1;

    fork
      // front end: one block at a time, ready flag in word 0
      begin
        for (int b = 0; b < NBLK; b++) begin
          while (in_mem[0] != 0) @(posedge clk);
          repeat ($urandom % 400) @(posedge clk);
          for (int k = 0; k < BLK; k++) in_mem[4 + k] = 32'(x[b * BLK + k]);
          in_mem[0] = 1;
        end
      end
      // more programming traffic while the cores run (unused top words)
      begin
        repeat (200) @(posedge clk);
        for (int r = 0; r < 200; r++) begin
          send_frame(8'(r % NPPU), 24'(400 + (r % 100)), 32'hA5A5_0000 + 32'(r));
          repeat ($urandom % 200) @(posedge clk);
        end
        send_frame(8'd7, 24'd0, 32'h1);   // no such PPU: must be rejected
      end
      // system output (read after PPU4 has cleared its ready flag at boot)
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
          repeat ($urandom % 600) @(posedge clk);
        end
      end
    join

    wait (&done);
    check(prog_err, "frame for a missing PPU raised the error flag");
    for (int p = 0; p < NPPU; p++) check(bu[p] == 0, "unmapped read returned zero");
    fw_total = 0;
    for (int p = 0; p < NPPU; p++) fw_total += fw[p];
    $display("mechanisms: arbiter conflicts=%0d ss0 two queued=%0d ss1 sel0 acks=%0d ss1 sel1 acks=%0d flag waits=%0d omem dual-port=%0d",
             n_arb_conflict, n_ss0_queue2, n_ss1_sel0, n_ss1_sel1, fw_total, n_omem_dual);
    check(n_arb_conflict > 0, "core and programming port competed for a PPU bus");
    check(n_ss0_queue2 > 0,   "two masters queued in SS0");
    check(n_ss1_sel0 > 0 && n_ss1_sel1 > 0, "PPU4 read both memories behind SS1");
    check(fw_total > 0,       "a stage waited on a ready flag");
    check(n_omem_dual > 0,    "both output memory ports used in one clock");
    $display("clock cycles: %0d", ncyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
