// tb_wb_slave_cu: a slave control unit in front of a ppu_sram. Transfers to
// its region must be answered exactly one clock after the request with the
// right data; transfers to other regions must not be answered nor reach the
// memory; the idle response must be all zeros.
module tb_wb_slave_cu;
  import ppu_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  wb_req_t bus_req;
  wb_rsp_t bus_rsp;
  logic          mem_en, mem_we;
  logic [3:0]    mem_be;
  logic [7:0]    mem_addr;
  logic [31:0]   mem_wdata, mem_rdata;

  wb_slave_cu #(.REGION(4'd2), .MAW(8)) dut (.clk, .rst_n, .bus_req, .bus_rsp,
    .mem_en, .mem_we, .mem_be, .mem_addr, .mem_wdata, .mem_rdata);
  ppu_sram #(.WORDS(256)) u_mem (.clk, .en(mem_en), .we(mem_we), .be(mem_be),
    .addr(mem_addr), .wdata(mem_wdata), .rdata(mem_rdata));

  logic [31:0] shadow [256];
  int checks = 0, failures = 0;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // one transfer; returns read data and clocks until ack (0 = none within 4).
  // Like a Wishbone master, it keeps the request up to the rising edge at
  // which it takes the acknowledge.
  task automatic xfer(bit we, logic [31:0] adr, logic [31:0] dat, logic [3:0] sel,
                      output logic [31:0] rdat, output int lat);
    bus_req = '{cyc: 1'b1, stb: 1'b1, we: we, sel: sel, adr: adr, dat: dat};
    lat = 0;
    rdat = '0;
    for (int c = 1; c <= 4; c++) begin
      @(negedge clk);
      if (bus_rsp.ack) begin
        lat = c;
        rdat = bus_rsp.dat;
        break;
      end
    end
    if (lat != 0) @(negedge clk);   // hold through the acknowledging edge
    bus_req = WB_REQ_IDLE;
    @(negedge clk);
    chk(!bus_rsp.ack, "no acknowledge after the transfer ended");
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int nmem_en = 0;
  always @(posedge clk) if (mem_en) nmem_en++;

  initial begin
    logic [31:0] d;
    int lat, n_before;
    bus_req = WB_REQ_IDLE;
    @(negedge clk); rst_n = 1; @(negedge clk);
    for (int i = 0; i < 256; i++) begin
      shadow[i] = $urandom;
      xfer(1, 32'h0002_0000 | 32'(i * 4), shadow[i], 4'hF, d, lat);
      chk(lat == 1, "write answered after one clock");
    end
    for (int n = 0; n < 2000; n++) begin
      int a, r;
      a = $urandom % 256;
      r = $urandom % 4;
      chk(bus_rsp == WB_RSP_IDLE, "idle response is zero");
      if (r == 0) begin
        n_before = nmem_en;
        xfer($urandom % 2, {12'd0, 4'(($urandom % 15) + 3) & 4'hD, 8'd0, 6'(a), 2'b00}, $urandom, 4'hF, d, lat);
        chk(lat == 0 && nmem_en == n_before, "other region ignored");
      end else if (r == 1) begin
        logic [3:0] sel;
        logic [31:0] w;
        sel = 4'($urandom);
        w = $urandom;
        xfer(1, 32'h0002_0000 | 32'(a * 4), w, sel, d, lat);
        for (int b = 0; b < 4; b++) if (sel[b]) shadow[a][8*b +: 8] = w[8*b +: 8];
        chk(lat == 1, "write answered after one clock");
      end else begin
        n_before = nmem_en;
        xfer(0, 32'h0002_0000 | 32'(a * 4), '0, 4'hF, d, lat);
        chk(lat == 1 && d == shadow[a] && nmem_en == n_before + 1,
            $sformatf("read %0d: lat %0d data %h expected %h", a, lat, d, shadow[a]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
