// Self-checking test of the 16-entry cache TLB. A reference model in the
// testbench applies the same policy (fill the lowest free entry, otherwise
// replace round-robin) and the same invalidate/flush rules; random installs,
// invalidations and flushes are followed by lookups of every line number
// that was ever installed plus random ones. Lookups with the search disabled
// must never hit.
module tb_cc_cache_tlb;
  localparam int unsigned N = 16, VW = 26, SW = 10;
  logic clk = 0, rst_n = 0, flush = 0;
  logic lookup_en = 0, hit, install_en = 0, inv_en = 0;
  logic [VW-1:0] lookup_vline = '0, install_vline = '0;
  logic [SW-1:0] hit_sline, install_sline = '0, inv_sline = '0;
  logic          m_valid [N];
  logic [VW-1:0] m_vline [N];
  logic [SW-1:0] m_sline [N];
  int m_ptr = 0;
  logic [VW-1:0] seen [$];
  int checks = 0, failures = 0, hits_seen = 0, repl_seen = 0;

  cc_cache_tlb #(.N(N), .VLINE_W(VW), .SLINE_W(SW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit model_has(logic [VW-1:0] v, output logic [SW-1:0] s);
    for (int i = 0; i < int'(N); i++)
      if (m_valid[i] && m_vline[i] == v) begin s = m_sline[i]; return 1; end
    s = '0;
    return 0;
  endfunction

  task automatic lookup(logic [VW-1:0] v);
    logic [SW-1:0] es;
    bit eh;
    eh = model_has(v, es);
    lookup_en = 1; lookup_vline = v;
    #1;
    checks++;
    if (hit !== eh || (eh && hit_sline !== es)) begin
      failures++;
      $display("FAIL lookup %h: hit=%b sline=%h expected hit=%b sline=%h", v, hit, hit_sline, eh, es);
    end
    if (eh) hits_seen++;
    lookup_en = 0;
    #1;
    checks++;
    if (hit !== 1'b0) begin failures++; $display("FAIL hit while disabled"); end
  endtask

  initial begin
    for (int i = 0; i < int'(N); i++) m_valid[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      logic [SW-1:0] dummy;
      @(negedge clk);
      // Install only line numbers not present, as the controller does.
      do install_vline = VW'($urandom_range(40)); while (model_has(install_vline, dummy));
      install_en = ($urandom_range(3) != 0);
      install_sline = SW'($urandom_range(31));
      inv_en = install_en ? 1'b1 : ($urandom_range(7) == 0);
      inv_sline = install_en ? install_sline : SW'($urandom_range(31));
      flush = ($urandom_range(200) == 0);
      @(posedge clk);
      if (flush) begin
        for (int i = 0; i < int'(N); i++) m_valid[i] = 0;
        m_ptr = 0;
      end else begin
        int victim;
        victim = -1;
        for (int i = 0; i < int'(N); i++) if (!m_valid[i] && victim < 0) victim = i;
        if (victim < 0 && install_en) begin victim = m_ptr; m_ptr = (m_ptr + 1) % N; repl_seen++; end
        for (int i = 0; i < int'(N); i++) begin
          if (install_en && i == victim) begin
            m_valid[i] = 1; m_vline[i] = install_vline; m_sline[i] = install_sline;
          end else if (inv_en && m_valid[i] && m_sline[i] == inv_sline) begin
            m_valid[i] = 0;
          end
        end
        if (install_en) seen.push_back(install_vline);
      end
      @(negedge clk);
      install_en = 0; inv_en = 0; flush = 0;
      for (int k = 0; k <= 40; k++) lookup(VW'(k));
    end
    checks++;
    if (hits_seen == 0 || repl_seen == 0) begin
      failures++;
      $display("FAIL coverage: hits=%0d replacements=%0d", hits_seen, repl_seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
