// tb_prog_if: serial frames are shifted in and must come out as instruction
// memory writes on the port of the addressed PPU, with the address in region
// 0 and the word address wrapped to the memory size. Also checks the frame
// counter, that busy rises the clock after the last bit, and that a frame
// for a missing PPU or a frame ending during an unfinished write is dropped
// and sets err.
module tb_prog_if;
  import ppu_pkg::*;
  localparam int NPPU = 5;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic ser_valid, ser_data, busy, err;
  logic [31:0] frames;
  wb_req_t prog_req [NPPU];
  wb_rsp_t prog_rsp [NPPU];

  prog_if #(.NPPU(NPPU), .MAW(12)) dut (.clk, .rst_n, .ser_valid, .ser_data,
    .prog_req, .prog_rsp, .busy, .err, .frames);

  int checks = 0, failures = 0;
  bit stall = 0;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // slave models: record each write
  logic [63:0] got [$];
  for (genvar p = 0; p < NPPU; p++) begin : g_s
    always @(posedge clk) begin
      prog_rsp[p] <= WB_RSP_IDLE;
      if (prog_req[p].cyc && prog_req[p].stb && !prog_rsp[p].ack && !stall && ($urandom % 2 == 0)) begin
        prog_rsp[p].ack <= 1'b1;
        if (prog_req[p].we && prog_req[p].sel == 4'hF)
          got.push_back({8'(p), 24'(prog_req[p].adr), prog_req[p].dat});
        else begin
          failures++;
          $display("FAIL: malformed write");
        end
      end
    end
  end

  task automatic send(logic [7:0] id, logic [23:0] wa, logic [31:0] d);
    logic [63:0] f;
    f = {id, wa, d};
    for (int b = 63; b >= 0; b--) begin
      @(negedge clk);
      ser_valid = 1'b1;
      ser_data  = f[b];
    end
    @(negedge clk);
    ser_valid = 1'b0;
    ser_data  = 1'($urandom);
    chk(busy == (id < NPPU), "busy rises after the last bit");
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] expq [$];
    ser_valid = 0; ser_data = 0;
    for (int p = 0; p < NPPU; p++) prog_rsp[p] = WB_RSP_IDLE;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      logic [7:0] id;
      logic [23:0] wa;
      logic [31:0] d;
      id = 8'($urandom % NPPU);
      wa = 24'($urandom % 6000);
      d  = $urandom;
      send(id, wa, d);
      expq.push_back({id, 24'({12'd0, REGION_IMEM, 14'(wa % 4096), 2'b00}), d});
      repeat ($urandom % 3) @(negedge clk);
      while (busy) @(negedge clk);
    end
    chk(!err, "no error for good frames");
    chk(frames == 300, $sformatf("frame counter %0d", frames));
    chk(got.size() == expq.size(), "one write per frame");
    for (int i = 0; i < expq.size() && i < got.size(); i++)
      chk(got[i] == expq[i], $sformatf("write %0d: %h expected %h", i, got[i], expq[i]));
    // frame for a PPU that does not exist
    send(8'd9, 24'd1, 32'h1234);
    repeat (4) @(negedge clk);
    chk(err && frames == 300 && got.size() == expq.size(), "missing PPU rejected");
    // overrun: a frame ends while the previous write is still open
    rst_n = 0; @(negedge clk); rst_n = 1;
    chk(!err && frames == 0, "reset clears err and counter");
    got.delete();
    stall = 1;
    send(8'd1, 24'd7, 32'hAAAA_0001);
    send(8'd2, 24'd8, 32'hBBBB_0002);
    chk(err, "overrun sets err");
    stall = 0;
    while (busy) @(negedge clk);
    chk(frames == 1 && got.size() == 1 && got[0][31:0] == 32'hAAAA_0001, "only the first frame written");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
