// tb_output_memory: both ports of the output memory driven at random, against
// a shadow copy. Checks one-clock read latency on each port, that a port sees
// the other port's writes, read-old-data when one port reads the word the
// other writes in the same clock, and that port A wins a same-word write.
module tb_output_memory;
  localparam int WORDS = 256;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic        a_en, a_we, b_en, b_we;
  logic [3:0]  a_be, b_be;
  logic [7:0]  a_addr, b_addr;
  logic [31:0] a_wdata, a_rdata, b_wdata, b_rdata;

  output_memory #(.WORDS(WORDS)) dut (.*);

  logic [31:0] shadow [WORDS];
  int checks = 0, failures = 0, collisions = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL: %s got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    a_en = 0; b_en = 0; a_we = 0; b_we = 0; a_be = 0; b_be = 0;
    a_addr = 0; b_addr = 0; a_wdata = 0; b_wdata = 0;
    @(negedge clk);
    for (int i = 0; i < WORDS; i++) begin
      a_en = 1; a_we = 1; a_be = 4'hF; a_addr = 8'(i); a_wdata = $urandom;
      shadow[i] = a_wdata;
      @(negedge clk);
    end
    a_en = 0;
    for (int n = 0; n < 6000; n++) begin
      logic [31:0] ea, eb;
      bit ra, rb;
      a_en = 1'($urandom); a_we = 1'($urandom); a_be = 4'($urandom); a_wdata = $urandom;
      b_en = 1'($urandom); b_we = 1'($urandom); b_be = 4'($urandom); b_wdata = $urandom;
      a_addr = 8'($urandom % 16);            // small range: frequent collisions
      b_addr = ($urandom % 4 == 0) ? a_addr : 8'($urandom % 16);
      ra = a_en && !a_we;
      rb = b_en && !b_we;
      ea = shadow[a_addr];
      eb = shadow[b_addr];
      if (a_en && a_we && b_en && b_we && a_addr == b_addr) collisions++;
      for (int b = 0; b < 4; b++) begin
        if (b_en && b_we && b_be[b]) shadow[b_addr][8*b +: 8] = b_wdata[8*b +: 8];
        if (a_en && a_we && a_be[b]) shadow[a_addr][8*b +: 8] = a_wdata[8*b +: 8];
      end
      @(negedge clk);
      if (ra) chk(a_rdata, ea, "port A read");
      if (rb) chk(b_rdata, eb, "port B read");
    end
    a_en = 0; b_en = 0;
    // read everything back through port B
    for (int i = 0; i < 16; i++) begin
      b_en = 1; b_we = 0; b_addr = 8'(i);
      @(negedge clk);
      chk(b_rdata, shadow[i], "final read");
    end
    checks++;
    if (collisions == 0) begin
      failures++;
      $display("FAIL: no same-word write collision happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
