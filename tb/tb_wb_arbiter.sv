// tb_wb_arbiter: three masters with random requests and random transfer
// ends. A reference model of the intended policy (keep the grant while the
// owner requests, hand over at a transfer end if someone else waits, pick
// round-robin after the last owner, registered grant) is compared with the
// grant every clock. Also checks that a waiting master is granted within a
// bounded number of transfer ends.
module tb_wb_arbiter;
  localparam int NM = 3;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [NM-1:0] req, gnt;
  logic          ack;

  wb_arbiter #(.NM(NM)) dut (.clk, .rst_n, .req, .ack, .gnt);

  int checks = 0, failures = 0, handovers = 0;
  logic [NM-1:0] m_gnt;
  int m_last;
  int wait_cnt [NM];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    req = '0; ack = 0;
    m_gnt = '0; m_last = NM - 1;
    for (int i = 0; i < NM; i++) wait_cnt[i] = 0;
    @(negedge clk); @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 20000; n++) begin
      logic [NM-1:0] nxt;
      bit keep, others;
      // drive inputs for this cycle
      for (int i = 0; i < NM; i++) req[i] = ($urandom % 4) != 0;
      ack = ((gnt & req) != '0) && ($urandom % 3 == 0);
      // reference next grant
      others = (req & ~m_gnt) != '0;
      keep = ((m_gnt & req) != '0) && !(ack && others);
      if (keep) nxt = m_gnt;
      else begin
        nxt = '0;
        for (int k = 1; k <= NM; k++) begin
          int idx;
          idx = (m_last + k) % NM;
          if (nxt == '0 && req[idx]) begin
            nxt = NM'(1) << idx;
            m_last = idx;
          end
        end
      end
      if (!keep && nxt != m_gnt && m_gnt != '0 && nxt != '0) handovers++;
      m_gnt = nxt;
      @(negedge clk);
      checks++;
      if (gnt !== m_gnt) begin
        failures++;
        $display("FAIL: cycle %0d grant %b expected %b", n, gnt, m_gnt);
      end
      for (int i = 0; i < NM; i++) begin
        if (req[i] && !gnt[i]) wait_cnt[i]++;
        else wait_cnt[i] = 0;
        if (wait_cnt[i] > 200) begin
          failures++;
          $display("FAIL: master %0d starved", i);
          wait_cnt[i] = 0;
        end
      end
    end
    checks++;
    if (handovers == 0) begin
      failures++;
      $display("FAIL: no hand-over between masters");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
