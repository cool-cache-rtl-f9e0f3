// Self-checking test of the scratchpad: random byte-masked writes and reads
// against a reference array, one-cycle read latency, and read data held
// while the scratchpad is disabled.
module tb_cc_scratchpad;
  localparam int unsigned BYTES = 1024, WB = 8, WORDS = BYTES / WB;
  logic clk = 0, pad_en = 0, pad_we = 0;
  logic [$clog2(WORDS)-1:0] addr = '0;
  logic [63:0] wdata = '0, rdata;
  logic [WB-1:0] wstrb = '0;
  logic [63:0] ref_mem [WORDS];
  int checks = 0, failures = 0;

  cc_scratchpad #(.BYTES(BYTES), .WORD_BYTES(WB)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    // Initialise every word with full writes.
    for (int i = 0; i < int'(WORDS); i++) begin
      @(negedge clk);
      pad_en = 1; pad_we = 1; addr = i[$clog2(WORDS)-1:0];
      wdata = {$urandom, $urandom}; wstrb = '1; ref_mem[i] = wdata;
    end
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      pad_en = 1; addr = $urandom_range(WORDS - 1);
      if ($urandom_range(1)) begin
        pad_we = 1; wdata = {$urandom, $urandom}; wstrb = WB'($urandom);
        for (int b = 0; b < int'(WB); b++)
          if (wstrb[b]) ref_mem[addr][8*b +: 8] = wdata[8*b +: 8];
      end else begin
        logic [63:0] exp;
        pad_we = 0; exp = ref_mem[addr];
        @(negedge clk);
        check("read", rdata, exp);
        // Idle cycle: the read data must be held.
        pad_en = 0; pad_we = 1;
        @(negedge clk);
        check("hold", rdata, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
