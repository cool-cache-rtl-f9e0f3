// Self-checking test of the hotline register file: reset leaves every entry
// invalid; random writes, reads, invalidations by SRAM line (sparing the
// entry written in the same cycle) and flushes are compared with a
// reference model kept in the testbench.
module tb_cc_hotline_regfile;
  localparam int unsigned N = 8, VW = 26, SW = 10;
  logic clk = 0, rst_n = 0, flush = 0;
  logic [2:0] rd_idx = '0, wr_idx = '0;
  logic rd_valid, wr_en = 0, inv_en = 0;
  logic [VW-1:0] rd_vline, wr_vline = '0;
  logic [SW-1:0] rd_sline, wr_sline = '0, inv_sline = '0;
  logic m_valid [N];
  logic [VW-1:0] m_vline [N];
  logic [SW-1:0] m_sline [N];
  int checks = 0, failures = 0;

  cc_hotline_regfile #(.N(N), .VLINE_W(VW), .SLINE_W(SW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    for (int i = 0; i < int'(N); i++) begin
      rd_idx = i[2:0];
      #1;
      checks++;
      if (rd_valid !== m_valid[i] ||
          (m_valid[i] && (rd_vline !== m_vline[i] || rd_sline !== m_sline[i]))) begin
        failures++;
        $display("FAIL entry %0d: got v=%b %h->%h, expected v=%b %h->%h", i,
                 rd_valid, rd_vline, rd_sline, m_valid[i], m_vline[i], m_sline[i]);
      end
    end
  endtask

  initial begin
    for (int i = 0; i < int'(N); i++) m_valid[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check_all();
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      wr_en = 1'($urandom); wr_idx = 3'($urandom);
      wr_vline = VW'($urandom); wr_sline = SW'($urandom_range(15));
      inv_en = ($urandom_range(3) == 0); inv_sline = SW'($urandom_range(15));
      flush = ($urandom_range(60) == 0);
      @(posedge clk);
      if (flush) begin
        for (int i = 0; i < int'(N); i++) m_valid[i] = 0;
      end else begin
        for (int i = 0; i < int'(N); i++) begin
          if (wr_en && wr_idx == i[2:0]) begin
            m_valid[i] = 1; m_vline[i] = wr_vline; m_sline[i] = wr_sline;
          end else if (inv_en && m_valid[i] && m_sline[i] == inv_sline) begin
            m_valid[i] = 0;
          end
        end
      end
      @(negedge clk);
      wr_en = 0; inv_en = 0; flush = 0;
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
