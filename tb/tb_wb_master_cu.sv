// tb_wb_master_cu: the master control unit must forward the request to the
// arbiter, put the master's transfer on the bus only while granted, and pass
// acknowledge and read data back only while granted.
module tb_wb_master_cu;
  import ppu_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  wb_req_t m_req, bus_req;
  wb_rsp_t m_rsp, bus_rsp;
  logic    arb_req, arb_gnt;

  wb_master_cu dut (.clk, .rst_n, .m_req, .m_rsp, .arb_req, .arb_gnt, .bus_req, .bus_rsp);

  int checks = 0, failures = 0;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    m_req = WB_REQ_IDLE; bus_rsp = WB_RSP_IDLE; arb_gnt = 0;
    @(negedge clk); rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      wb_req_t r;
      r = wb_req_t'({$urandom, $urandom, $urandom});
      r.cyc = ($urandom % 4) != 0;
      r.stb = r.cyc;
      arb_gnt = 1'($urandom);
      bus_rsp.ack = 1'($urandom);
      bus_rsp.dat = $urandom;
      m_req = r;
      #1;
      chk(arb_req == r.cyc, "request follows cyc");
      if (arb_gnt && r.cyc) chk(bus_req == r, "granted transfer reaches the bus");
      else                  chk(bus_req == WB_REQ_IDLE, "bus idle without grant");
      if (arb_gnt) chk(m_rsp == bus_rsp, "response passed while granted");
      else         chk(m_rsp == WB_RSP_IDLE, "no response without grant");
      @(negedge clk);
      if (r.cyc && !(arb_gnt && bus_rsp.ack)) begin
        // hold the transfer until it is granted and acknowledged
        arb_gnt = 1'b1;
        bus_rsp.ack = 1'b1;
        #1;
        chk(m_rsp.ack && bus_req == r, "held transfer completes once granted");
        @(negedge clk);
      end
      m_req = WB_REQ_IDLE;
      bus_rsp = WB_RSP_IDLE;
      arb_gnt = 1'b0;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
