// tb_bsp_sweep: the FIR workload on systems with 1, 2, 3 and 4 busy cores.
//
// Four full-size five-PPU systems run side by side (bsp_sweep_run with NACT =
// 1..4). In each, the first NACT stages of the plain pipeline PPU0 -> PPU2 ->
// PPU3 -> PPU4 run a 200-tap FIR filter and the rest pass samples through.
// Every system's outputs are checked against a reference. Because every core
// works from its own instruction and data memories, adding busy cores must
// not slow the pipeline: the steady-state clocks per output sample with 2, 3
// or 4 busy cores must stay within 10 % of the single-core figure, while the
// work done per sample grows with the number of cores. Each figure must also
// stay inside the 48,000-clock budget of 250 samples/s at 12 MHz.
module tb_bsp_sweep;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int   c [4];
  int   f [4];
  int   ps [4];
  logic fin [4];

  bsp_sweep_run #(.NACT(1)) u_run1 (.clk, .checks(c[0]), .failures(f[0]), .per_sample(ps[0]), .finished(fin[0]));
  bsp_sweep_run #(.NACT(2)) u_run2 (.clk, .checks(c[1]), .failures(f[1]), .per_sample(ps[1]), .finished(fin[1]));
  bsp_sweep_run #(.NACT(3)) u_run3 (.clk, .checks(c[2]), .failures(f[2]), .per_sample(ps[2]), .finished(fin[2]));
  bsp_sweep_run #(.NACT(4)) u_run4 (.clk, .checks(c[3]), .failures(f[3]), .per_sample(ps[3]), .finished(fin[3]));

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (800_000) @(posedge clk);
    $display("FAIL: watchdog expired (finished %b%b%b%b)", fin[0], fin[1], fin[2], fin[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);   // the runs clear their finished flags first
    wait (fin[0] && fin[1] && fin[2] && fin[3]);
    for (int n = 0; n < 4; n++) begin
      checks   += c[n];
      failures += f[n];
      $display("%0d busy core(s): %0d clocks per sample, %0d checks", n + 1, ps[n], c[n]);
      check(ps[n] > 0 && ps[n] <= 12_000_000 / 250, "inside the real-time budget");
      check(ps[n] * 10 <= ps[0] * 11, $sformatf("%0d busy cores no slower than one (%0d vs %0d)", n + 1, ps[n], ps[0]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
