// tb_slave_switcher: three masters share two memories (and one unused select)
// through the switcher. Memory models answer after a random delay. Checks:
// data integrity per master and memory; first-come first-served order with
// ties going to the lower master ID; zero data for a select beyond the
// memories; one added clock for a lone master; that contention happened.
module tb_slave_switcher;
  import ppu_pkg::*;
  localparam int NM = 3, NS = 2;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  wb_req_t s_req [NM];
  wb_rsp_t s_rsp [NM];
  wb_req_t m_req [NS];
  wb_rsp_t m_rsp [NS];

  slave_switcher #(.NM(NM), .NS(NS)) dut (.clk, .rst_n, .s_req, .s_rsp, .m_req, .m_rsp);

  wb_master_bfm u_m0 (.clk, .req(s_req[0]), .rsp(s_rsp[0]));
  wb_master_bfm u_m1 (.clk, .req(s_req[1]), .rsp(s_rsp[1]));
  wb_master_bfm u_m2 (.clk, .req(s_req[2]), .rsp(s_rsp[2]));

  int checks = 0, failures = 0;
  bit fixed_delay = 0;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // memory models
  logic [31:0] mem [NS][64];
  int          cnt [NS];
  int          dly [NS];
  for (genvar k = 0; k < NS; k++) begin : g_mem
    always @(posedge clk) begin
      m_rsp[k].ack <= 1'b0;
      m_rsp[k].dat <= '0;
      if (m_req[k].cyc && m_req[k].stb && !m_rsp[k].ack) begin
        if (cnt[k] + 1 >= dly[k]) begin
          m_rsp[k].ack <= 1'b1;
          if (m_req[k].we) mem[k][m_req[k].adr[7:2]] <= m_req[k].dat;
          else             m_rsp[k].dat <= mem[k][m_req[k].adr[7:2]];
          cnt[k] <= 0;
          dly[k] <= fixed_delay ? 1 : 1 + int'($urandom % 3);
        end else begin
          cnt[k] <= cnt[k] + 1;
        end
      end
    end
  end

  // order monitor
  int  start  [NM];
  bit  pending [NM];
  int  cyc_n = 0, contention = 0;
  always @(posedge clk) begin
    int np;
    cyc_n++;
    np = 0;
    for (int i = 0; i < NM; i++) begin
      if (s_rsp[i].ack && pending[i]) begin
        for (int j = 0; j < NM; j++)
          if (j != i && pending[j] && (start[j] < start[i] || (start[j] == start[i] && j < i)))
            begin
              failures++;
              $display("FAIL: master %0d served before earlier master %0d", i, j);
            end
        checks++;
        pending[i] = 0;
      end
    end
    for (int i = 0; i < NM; i++) begin
      if (s_req[i].cyc && s_req[i].stb && !pending[i] && !s_rsp[i].ack) begin
        pending[i] = 1;
        start[i] = cyc_n;
      end
      if (pending[i]) np++;
    end
    if (np > 1) contention++;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_master(int id, int n);
    logic [31:0] shadow [NS][16];
    logic [31:0] d;
    int lat;
    for (int k = 0; k < NS; k++) for (int w = 0; w < 16; w++) shadow[k][w] = '0;
    for (int k = 0; k < NS; k++) for (int w = 0; w < 16; w++)
      case (id)
        0: u_m0.write(32'((k << 12) | ((id * 16 + w) * 4)), 32'h0);
        1: u_m1.write(32'((k << 12) | ((id * 16 + w) * 4)), 32'h0);
        default: u_m2.write(32'((k << 12) | ((id * 16 + w) * 4)), 32'h0);
      endcase
    for (int t = 0; t < n; t++) begin
      int k, w;
      bit we;
      logic [31:0] v, adr;
      k  = ($urandom % 8 == 0) ? 2 : int'($urandom % NS);
      w  = $urandom % 16;
      we = 1'($urandom);
      v  = $urandom;
      adr = 32'((k << 12) | ((id * 16 + w) * 4));
      case (id)
        0: u_m0.xfer(we, adr, v, d, lat);
        1: u_m1.xfer(we, adr, v, d, lat);
        default: u_m2.xfer(we, adr, v, d, lat);
      endcase
      if (k >= NS) chk(d == 0, "bad select answers zero");
      else if (we) shadow[k][w] = v;
      else chk(d == shadow[k][w], $sformatf("master %0d read mem %0d word %0d: %h expected %h", id, k, w, d, shadow[k][w]));
    end
  endtask

  initial begin
    logic [31:0] d;
    int lat;
    for (int k = 0; k < NS; k++) begin
      cnt[k] = 0;
      dly[k] = 1;
      m_rsp[k] = WB_RSP_IDLE;
    end
    for (int i = 0; i < NM; i++) pending[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    fork
      run_master(0, 1500);
      run_master(1, 1500);
      run_master(2, 1500);
    join
    // lone master, memory answering after one clock: one clock more than direct
    fixed_delay = 1;
    repeat (5) @(negedge clk);
    for (int k = 0; k < NS; k++) begin
      u_m1.xfer(1'b0, 32'(k << 12), '0, d, lat);   // the memory picks up the fixed delay
      u_m1.xfer(1'b0, 32'(k << 12), '0, d, lat);
      chk(lat == 2, $sformatf("lone transfer took %0d clocks, expected 2", lat));
    end
    chk(contention > 0, "masters competed");
    $display("contention cycles: %0d", contention);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
