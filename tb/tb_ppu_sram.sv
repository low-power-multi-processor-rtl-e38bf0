// tb_ppu_sram: random reads and byte-masked writes against a shadow copy.
// Inputs change at falling edges; read data is checked at the falling edge
// after the rising edge that performed the read (one clock of latency), and
// must hold while the memory is not enabled.
module tb_ppu_sram;
  localparam int WORDS = 4096;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic        en, we;
  logic [3:0]  be;
  logic [11:0] addr;
  logic [31:0] wdata, rdata;

  ppu_sram #(.WORDS(WORDS)) dut (.clk, .en, .we, .be, .addr, .wdata, .rdata);

  logic [31:0] shadow [WORDS];
  bit          known  [WORDS];
  int checks = 0, failures = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] exp_q;
    en = 0; we = 0; be = 0; addr = 0; wdata = 0;
    for (int i = 0; i < WORDS; i++) known[i] = 0;
    // fill a region completely so reads have known values
    @(negedge clk);
    for (int i = 0; i < 256; i++) begin
      en = 1; we = 1; be = 4'hF; addr = 12'(i * 13 % WORDS); wdata = $urandom;
      shadow[addr] = wdata; known[addr] = 1;
      @(negedge clk);
    end
    for (int n = 0; n < 5000; n++) begin
      int a;
      a = (($urandom % 256) * 13) % WORDS;
      addr = 12'(a);
      en = 1;
      if ($urandom % 2) begin
        we = 1; be = 4'($urandom); wdata = $urandom;
        for (int b = 0; b < 4; b++) if (be[b]) shadow[a][8*b +: 8] = wdata[8*b +: 8];
        @(negedge clk);
      end else begin
        we = 0;
        exp_q = shadow[a];
        @(negedge clk);
        checks++;
        if (rdata !== exp_q) begin
          failures++;
          $display("FAIL: read %0d got %h expected %h", a, rdata, exp_q);
        end
        // read data holds while idle
        en = 0; addr = addr + 1;
        @(negedge clk);
        checks++;
        if (rdata !== exp_q) begin
          failures++;
          $display("FAIL: read data did not hold");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
