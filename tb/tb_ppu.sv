// tb_ppu: one PPU with its core port, programming port, inter-bus port to a
// model of the upstream output memory, and its output memory's downstream
// port. Checks the contents of all three memories through the right ports,
// that regions do not alias, the forwarded inter-bus address and data, the
// downstream view of the output memory, zero data for unmapped regions,
// transfer latencies (two clocks for an isolated transfer, one for a
// back-to-back one, one for the downstream port), and that core and
// programming port both finish while competing for the bus.
module tb_ppu;
  import ppu_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  wb_req_t core_req, prog_req, up_req, dn_req;
  wb_rsp_t core_rsp, prog_rsp, up_rsp, dn_rsp;

  ppu dut (.clk, .rst_n, .core_req, .core_rsp, .prog_req, .prog_rsp,
           .up_req, .up_rsp, .dn_req, .dn_rsp);

  wb_master_bfm u_core (.clk, .req(core_req), .rsp(core_rsp));
  wb_master_bfm u_prog (.clk, .req(prog_req), .rsp(prog_rsp));
  wb_master_bfm u_dn   (.clk, .req(dn_req),   .rsp(dn_rsp));

  // upstream output memory model, answers after one clock
  logic [31:0] up_mem [256];
  logic [31:0] up_last_adr;
  always @(posedge clk) begin
    up_rsp <= WB_RSP_IDLE;
    if (up_req.cyc && up_req.stb && !up_rsp.ack) begin
      up_rsp.ack  <= 1'b1;
      up_last_adr <= up_req.adr;
      if (up_req.we) up_mem[up_req.adr[9:2]] <= up_req.dat;
      else           up_rsp.dat <= up_mem[up_req.adr[9:2]];
    end
  end

  int checks = 0, failures = 0;
  int n_conflict = 0;
  always @(posedge clk) if (dut.arb_req == 2'b11) n_conflict++;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam logic [31:0] IM = 32'h0000_0000, DM = 32'h0001_0000,
                          OM = 32'h0002_0000, UPR = 32'h0003_0000;

  initial begin
    logic [31:0] d;
    int lat;
    logic [31:0] im [64], dm [64], om [64];
    for (int i = 0; i < 256; i++) up_mem[i] = 32'hC000_0000 + 32'(i);
    up_rsp = WB_RSP_IDLE;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    // isolated transfer latency
    u_core.xfer(1'b1, DM, 32'h1111_2222, d, lat);
    chk(lat == 2, $sformatf("isolated transfer took %0d clocks", lat));

    // fill the three memories with different data at the same offsets
    for (int i = 0; i < 64; i++) begin
      im[i] = $urandom; dm[i] = $urandom; om[i] = $urandom;
      u_prog.write(IM + 32'(i * 4), im[i]);
      u_core.write(DM + 32'(i * 4), dm[i]);
      u_core.xfer(1'b1, OM + 32'(i * 4), om[i], d, lat);
      chk(lat == 1, $sformatf("back-to-back transfer took %0d clocks", lat));
    end
    for (int i = 0; i < 64; i++) begin
      u_core.read(IM + 32'(i * 4), d); chk(d == im[i], "instruction memory");
      u_core.read(DM + 32'(i * 4), d); chk(d == dm[i], "data memory");
      u_core.read(OM + 32'(i * 4), d); chk(d == om[i], "output memory, own port");
      u_dn.xfer(1'b0, 32'(i * 4), '0, d, lat);
      chk(d == om[i] && lat == 1, $sformatf("output memory, downstream port (lat %0d)", lat));
    end
    // downstream side writes (e.g. clearing a ready flag), seen by the core
    u_dn.write(32'h0, 32'h0);
    u_core.read(OM, d); chk(d == 0, "downstream write visible to the core");
    // inter bus
    for (int i = 0; i < 16; i++) begin
      u_core.read(UPR + 32'h0000_1000 + 32'(i * 4), d);
      chk(d == 32'hC000_0000 + 32'(i) && up_last_adr == 32'h0000_1000 + 32'(i * 4),
          $sformatf("inter-bus read %h from %h", d, up_last_adr));
    end
    u_core.write(UPR + 32'h8, 32'h0);
    chk(up_mem[2] == 0, "inter-bus write");
    // unmapped
    u_core.read(32'h0007_0010, d); chk(d == 0, "unmapped region reads zero");
    u_core.read(32'h00F0_0000 | IM, d); chk(d == im[0], "only adr[19:16] selects the region");
    // competition between core and programming port
    fork
      for (int i = 0; i < 100; i++) u_core.read(DM + 32'((i % 64) * 4), d);
      for (int i = 0; i < 30; i++) u_prog.write(IM + 32'((100 + i) * 4), 32'(i * 3));
    join
    for (int i = 0; i < 30; i++) begin
      u_core.read(IM + 32'((100 + i) * 4), d);
      chk(d == 32'(i * 3), "programming write under contention");
    end
    chk(n_conflict > 0, "core and programming port competed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
