// Directed test of the access controller with its translation path
// (hotline registers, hotline check, cache TLB). The memories are replaced
// by constant read data so the response multiplexer can be observed, and
// the software handler by a stub that answers after a fixed delay with an
// SRAM line chosen by the test.
//
// Sequence (256-byte lines, 32 words per line): a first access misses in
// the hotline register and the TLB and stalls for the handler; the next
// access to the same line with the same index is a hotline hit; another
// index on the same line hits in the TLB and then in its own register;
// scalar accesses go to the scratchpad; handing the same SRAM line to a new
// virtual line invalidates the old translations; flush clears everything;
// at 1024-byte and 64-byte lines the SRAM word address is recomputed. Each
// step checks SRAM_EN, Cache TLB_EN, the SRAM word address, the stall length,
// the translation source and the response timing and data.
module tb_cc_access_ctrl;
  import cc_pkg::*;
  logic clk = 0, rst_n = 0, flush = 0;
  logic [3:0] cfg_line_log2 = 4'd8;
  logic req_valid = 0, req_ready, req_we = 0, req_scalar = 0;
  logic [2:0] req_hot_idx = '0;
  logic [31:0] req_addr = '0;
  logic [63:0] req_wdata = '0, rsp_rdata;
  logic [7:0] req_wstrb = '1;
  logic rsp_valid;
  logic pad_en, pad_we, sram_en, sram_we;
  logic [6:0] pad_addr;
  logic [63:0] pad_wdata, sram_wdata;
  logic [7:0] pad_wstrb, sram_wstrb;
  logic [63:0] pad_rdata = 64'hAAAA_0000_0000_5555, sram_rdata = 64'h1234_5678_9ABC_DEF0;
  logic [12:0] sram_addr;
  logic hdl_req, hdl_owns_sram, hdl_done = 0;
  logic [25:0] hdl_vline;
  logic [31:0] hdl_addr;
  logic [2:0] hdl_hot_idx;
  logic [9:0] hdl_sline = '0;
  logic tlb_en;
  xlat_src_e ev_src;
  int checks = 0, failures = 0;
  int stub_delay = 10;
  logic [9:0] stub_sline = '0;

  cc_access_ctrl dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Handler stub.
  always begin
    @(negedge clk);
    if (hdl_req) begin
      repeat (stub_delay - 1) @(negedge clk);
      hdl_done = 1; hdl_sline = stub_sline;
      @(negedge clk);
      hdl_done = 0;
    end
  end

  task automatic expect_eq(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  // Present one access, wait for acceptance, check what happened.
  task automatic access(bit we, bit scalar, int idx, logic [31:0] addr,
                        xlat_src_e exp_src, int exp_stall, int exp_word);
    int stall = 0;
    bit saw_tlb_en;
    req_valid = 1; req_we = we; req_scalar = scalar; req_hot_idx = idx[2:0]; req_addr = addr;
    req_wdata = {addr, ~addr};
    #1;
    saw_tlb_en = tlb_en;
    while (!req_ready) begin
      checks++;
      if (sram_en || pad_en) begin failures++; $display("FAIL memory enabled during stall"); end
      @(negedge clk);
      #1;
      stall++;
    end
    expect_eq("stall cycles", stall, exp_stall);
    if (scalar) begin
      expect_eq("pad_en", pad_en, 1);
      expect_eq("sram_en on scalar", sram_en, 0);
      expect_eq("tlb_en on scalar", saw_tlb_en, 0);
      expect_eq("pad word", pad_addr, exp_word);
      expect_eq("pad we", pad_we, we);
    end else begin
      expect_eq("sram_en", sram_en, 1);
      expect_eq("pad_en on non-scalar", pad_en, 0);
      expect_eq("source", ev_src, exp_src);
      expect_eq("tlb_en (hotline miss)", saw_tlb_en, exp_src != SRC_HOTLINE);
      expect_eq("sram word", sram_addr, exp_word);
      expect_eq("sram we", sram_we, we);
      expect_eq("sram wdata", sram_wdata, {addr, ~addr});
    end
    @(posedge clk);
    #1;
    req_valid = 0;
    expect_eq("rsp_valid after accept", rsp_valid, 1);
    expect_eq("rsp data", rsp_rdata, scalar ? pad_rdata : sram_rdata);
    @(posedge clk);
    #1;
    expect_eq("rsp_valid is one pulse", rsp_valid, 0);
    @(negedge clk);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // Line 0x100400/256 = vline 0x1004. Handler puts it in SRAM line 5.
    stub_sline = 10'd5; stub_delay = 10;
    access(0, 0, 2, 32'h0010_0400, SRC_HANDLER, 10, 5 * 32 + 0);
    access(1, 0, 2, 32'h0010_0408, SRC_HOTLINE, 0, 5 * 32 + 1);
    access(0, 0, 2, 32'h0010_04F8, SRC_HOTLINE, 0, 5 * 32 + 31);
    access(0, 0, 6, 32'h0010_0410, SRC_TLB,     0, 5 * 32 + 2);
    access(0, 0, 6, 32'h0010_0418, SRC_HOTLINE, 0, 5 * 32 + 3);
    // Scalars: scratchpad word = address / 8 modulo 128.
    access(1, 1, 0, 32'h0000_0018, SRC_NONE, 0, 3);
    access(0, 1, 0, 32'h0000_0418, SRC_NONE, 0, 3);
    // New line 0x1005 into SRAM line 7 through hotline 2, delay 4.
    stub_sline = 10'd7; stub_delay = 4;
    access(0, 0, 2, 32'h0010_0500, SRC_HANDLER, 4, 7 * 32);
    // Hotline 6 still maps 0x1004 -> 5.
    access(0, 0, 6, 32'h0010_0420, SRC_HOTLINE, 0, 5 * 32 + 4);
    // Hotline 2 back on 0x1004: register holds 0x1005, TLB hit.
    access(0, 0, 2, 32'h0010_0428, SRC_TLB, 0, 5 * 32 + 5);
    // SRAM line 5 handed to vline 0x2000: old translations of line 5 die.
    stub_sline = 10'd5;
    access(0, 0, 3, 32'h0020_0000, SRC_HANDLER, 4, 5 * 32);
    stub_sline = 10'd9;
    access(0, 0, 6, 32'h0010_0430, SRC_HANDLER, 4, 9 * 32 + 6);
    // Hotline 2 held 0x1004 -> 5 and was invalidated; the TLB has 0x1005.
    access(0, 0, 2, 32'h0010_0508, SRC_TLB, 0, 7 * 32 + 1);
    // Flush: everything misses again.
    @(negedge clk); flush = 1; @(negedge clk); flush = 0;
    stub_sline = 10'd7;
    access(0, 0, 2, 32'h0010_0508, SRC_HANDLER, 4, 7 * 32 + 1);
    // 1024-byte lines: 128 words per line.
    @(negedge clk); flush = 1; cfg_line_log2 = 4'd10; @(negedge clk); flush = 0;
    stub_sline = 10'd3;
    access(0, 0, 1, 32'h0010_07F8, SRC_HANDLER, 4, 3 * 128 + 127);
    access(0, 0, 1, 32'h0010_0400, SRC_HOTLINE, 0, 3 * 128);
    access(0, 0, 1, 32'h0010_0800, SRC_HANDLER, 4, 3 * 128);
    // 64-byte lines: 8 words per line, SRAM line numbers up to 1023.
    @(negedge clk); flush = 1; cfg_line_log2 = 4'd6; @(negedge clk); flush = 0;
    stub_sline = 10'd1023;
    access(0, 0, 0, 32'h0010_0078, SRC_HANDLER, 4, 1023 * 8 + 7);
    access(1, 0, 0, 32'h0010_0040, SRC_HOTLINE, 0, 1023 * 8);
    // Fill all 16 TLB entries plus one: the oldest is replaced.
    for (int i = 0; i < 17; i++) begin
      stub_sline = 10'(100 + i);
      access(0, 0, 4, 32'h0030_0000 + 32'(i) * 64, SRC_HANDLER, 4, (100 + i) * 8);
    end
    // Entry for i=1 still in TLB (the first victim was the flush-era entry).
    access(0, 0, 5, 32'h0030_0000 + 32'd16 * 64, SRC_TLB, 0, 116 * 8);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
