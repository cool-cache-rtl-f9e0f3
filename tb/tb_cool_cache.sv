// End-to-end test of the Cool-Cache at its full default size (64 KB tagless
// SRAM, 64-bit words, 1 KB scratchpad, 8 hotline registers, 16-entry cache
// TLB), with the software handler and main memory modelled in
// cc_sw_handler_model (4-way directory kept in the SRAM, 25-cycle handler
// overhead, 100-cycle memory latency).
//
// The stimulus imitates compiled media code: scalar loads/stores marked for
// the scratchpad, and eight arrays, each given its own hotline index, swept
// sequentially (static predictions that hit), accessed at two distant
// positions with one index (hotline mispredictions that the TLB catches) and
// at random. The arrays lie a whole number of directory sets apart so that
// they compete for the same sets and force evictions and write-backs. Midway the line size is
// switched from 256 to 1024 and then to 64 bytes (write back everything,
// flush, reconfigure).
//
// Checks: every load returns the value of an independent reference memory;
// every response comes exactly one cycle after acceptance; scalar, hotline
// and TLB translations are accepted without a stall; a software resolution
// stalls for exactly the handler overhead, plus write-back, memory latency
// and fill time when the line was missing; a repeated access to the same
// line with the same hotline index and no handler call in between is a
// hotline hit. Each mechanism must occur at least once.
module tb_cool_cache;
  import cc_pkg::*;
  localparam int unsigned WB = WORD_BYTES, DW = 8 * WB;
  localparam int unsigned OVH = 25, MLAT = 100;

  logic clk = 0, rst_n = 0, flush = 0;
  logic [3:0] cfg_line_log2 = 4'd8;
  logic req_valid = 0, req_ready, req_we = 0, req_scalar = 0;
  logic [2:0] req_hot_idx = '0;
  logic [31:0] req_addr = '0;
  logic [DW-1:0] req_wdata = '0, rsp_rdata;
  logic [WB-1:0] req_wstrb = '0;
  logic rsp_valid;
  logic hdl_req, hdl_owns_sram, hdl_done;
  logic [25:0] hdl_vline;
  logic [31:0] hdl_addr;
  logic [2:0] hdl_hot_idx;
  logic [9:0] hdl_sline;
  logic hsram_en, hsram_we;
  logic [12:0] hsram_addr;
  logic [DW-1:0] hsram_wdata, hsram_rdata;
  logic tlb_en, sram_en, pad_en;
  xlat_src_e ev_src;
  logic flush_req = 0, flush_ack;

  cool_cache dut (.*);

  cc_sw_handler_model #(.SRAM_BYTES(SRAM_BYTES), .WORD_BYTES(WB), .OVERHEAD(OVH), .MEM_LAT(MLAT))
    u_hdl (.clk, .cfg_line_log2, .hdl_req, .hdl_vline, .hdl_done, .hdl_sline,
           .hsram_en, .hsram_we, .hsram_addr, .hsram_wdata, .hsram_rdata,
           .flush_req, .flush_ack);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_pad = 0, n_hot = 0, n_tlb = 0, n_hdl = 0, n_hdl_hit = 0, n_fill = 0, n_wb = 0;
  int n_switch = 0, n_loads = 0, n_stores = 0, n_stall_cycles = 0;

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Independent reference of memory contents (word index -> word).
  logic [DW-1:0] ref_mem [longint unsigned];
  logic [DW-1:0] ref_pad [PAD_BYTES / WB];
  bit            pad_written [PAD_BYTES / WB];

  function automatic logic [DW-1:0] init_word(longint unsigned w);
    return {WB{8'(w * 37 + 11)}} ^ DW'(w * 64'h9E37_79B9_7F4A_7C15);
  endfunction

  function automatic logic [DW-1:0] ref_read(longint unsigned w);
    if (ref_mem.exists(w)) return ref_mem[w];
    return init_word(w);
  endfunction

  task automatic fail(string msg);
    failures++;
    if (failures < 20) $display("FAIL @%0t: %s", $time, msg);
  endtask

  // Last translation per hotline index, to check static predictions.
  longint last_line [8];
  int     last_calls [8];

  // One load or store through the processor port.
  task automatic access(bit we, bit scalar, int idx, logic [31:0] addr);
    int stall = 0, calls0 = u_hdl.n_calls, hits0 = u_hdl.n_dir_hits;
    int fills0 = u_hdl.n_fills, wbs0 = u_hdl.n_writebacks;
    xlat_src_e src;
    logic [DW-1:0] wd = {$urandom, $urandom};
    logic [WB-1:0] st = ($urandom_range(3) == 0) ? WB'($urandom) : '1;
    longint unsigned w = longint'(addr >> $clog2(WB));
    longint line = longint'(addr >> cfg_line_log2);
    req_valid = 1; req_we = we; req_scalar = scalar; req_hot_idx = idx[2:0];
    req_addr = addr; req_wdata = wd; req_wstrb = st;
    #1;
    while (!req_ready) begin
      @(negedge clk);
      #1;
      stall++;
    end
    src = ev_src;
    checks++;
    if (scalar ? !pad_en : (src == SRC_NONE)) fail("accepted without a translation source");
    @(posedge clk);
    #1;
    req_valid = 0;
    @(negedge clk);
    #1;
    checks++;
    if (!rsp_valid) fail("no response one cycle after acceptance");
    n_stall_cycles += stall;
    if (scalar) begin
      int pi = int'(w % longint'(PAD_BYTES / WB));
      n_pad++;
      checks++;
      if (stall != 0) fail("scalar access stalled");
      if (we) begin
        for (int b = 0; b < int'(WB); b++) if (st[b]) ref_pad[pi][8*b +: 8] = wd[8*b +: 8];
        if (st != '1 && !pad_written[pi]) pad_written[pi] = 0; else pad_written[pi] = 1;
      end else if (pad_written[pi]) begin
        checks++;
        if (rsp_rdata !== ref_pad[pi]) fail($sformatf("scratchpad load %h: got %h expected %h", addr, rsp_rdata, ref_pad[pi]));
      end
    end else begin
      logic [DW-1:0] exp = ref_read(w);
      case (src)
        SRC_HOTLINE: n_hot++;
        SRC_TLB:     n_tlb++;
        default:     n_hdl++;
      endcase
      checks++;
      if (src != SRC_HANDLER) begin
        if (stall != 0) fail("hotline/TLB translation stalled");
      end else begin
        int exp_stall = int'(OVH);
        if (u_hdl.n_dir_hits != hits0) n_hdl_hit++;
        if (u_hdl.n_writebacks != wbs0) begin n_wb++; exp_stall += 1 << (int'(cfg_line_log2) - 3); end
        if (u_hdl.n_fills != fills0) begin n_fill++; exp_stall += int'(MLAT) + 1 + (1 << (int'(cfg_line_log2) - 3)); end
        if (stall != exp_stall) fail($sformatf("handler stall %0d, expected %0d", stall, exp_stall));
        if (u_hdl.n_calls != calls0 + 1) fail("handler not called exactly once");
      end
      // Same line, same hotline, no handler activity since: must be a hit.
      checks++;
      if (last_line[idx] == line && last_calls[idx] == calls0 && src != SRC_HOTLINE)
        fail($sformatf("repeat access to line %h with hotline %0d missed", line, idx));
      last_line[idx] = line; last_calls[idx] = u_hdl.n_calls;
      if (we) begin
        for (int b = 0; b < int'(WB); b++) if (st[b]) exp[8*b +: 8] = wd[8*b +: 8];
        ref_mem[w] = exp;
        n_stores++;
      end else begin
        checks++;
        n_loads++;
        if (rsp_rdata !== exp) fail($sformatf("load %h (hotline %0d): got %h expected %h", addr, idx, rsp_rdata, exp));
      end
    end
  endtask

  function automatic logic [31:0] arr_base(int k);
    return 32'h0010_0000 + 32'(k) * 32'(u_hdl.n_sets() << cfg_line_log2);  // same directory set
  endfunction

  // Workload phase: scalar traffic, sequential sweeps, two-position loops
  // and random accesses over eight arrays of ARR bytes.
  task automatic phase(int rounds, int arr_bytes);
    for (int r = 0; r < rounds; r++) begin
      int k = $urandom_range(7);
      int start = $urandom_range(arr_bytes / WB - 1);
      case ($urandom_range(3))
        0: for (int i = 0; i < 48; i++) begin   // sweep A[i]
             access($urandom_range(1), 0, k, arr_base(k) + 32'((start + i) % (arr_bytes / WB)) * WB);
             if (i % 8 == 0) access($urandom_range(1), 1, 0, 32'($urandom_range(PAD_BYTES - 1)));
           end
        1: for (int i = 0; i < 24; i++) begin   // A[i] and A[i + far], one hotline
             access($urandom_range(1), 0, k, arr_base(k) + 32'((start + i) % (arr_bytes / WB)) * WB);
             access($urandom_range(1), 0, k, arr_base(k) + 32'((start + i + arr_bytes / 16) % (arr_bytes / WB)) * WB);
           end
        2: for (int i = 0; i < 16; i++)          // scalars
             access($urandom_range(1), 1, 0, 32'($urandom_range(PAD_BYTES - 1)));
        default: for (int i = 0; i < 16; i++) begin
             int kk = $urandom_range(7);
             access($urandom_range(1), 0, kk, arr_base(kk) + 32'($urandom_range(arr_bytes / WB - 1)) * WB);
           end
      endcase
    end
  endtask

  // Handler maintenance: write back everything and clear its directory.
  task automatic handler_flush();
    @(negedge clk);
    flush_req = 1;
    @(negedge clk);
    flush_req = 0;
    #1;
    while (!flush_ack) begin
      @(negedge clk);
      #1;
    end
  endtask

  // What software does to change the line size.
  task automatic switch_line_size(int lg);
    handler_flush();
    flush = 1; cfg_line_log2 = 4'(lg);
    @(negedge clk);
    flush = 0;
    handler_flush();
    for (int i = 0; i < 8; i++) last_line[i] = -1;
    n_switch++;
  endtask

  initial begin
    for (int i = 0; i < 8; i++) begin last_line[i] = -1; last_calls[i] = 0; end
    for (int i = 0; i < int'(PAD_BYTES / WB); i++) pad_written[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    handler_flush();
    phase(400, 2048);
    switch_line_size(10);
    phase(200, 8192);
    switch_line_size(6);
    phase(200, 2048);
    // The motivating example: an array of 8-byte elements swept through
    // 256-byte lines needs one new translation per 32 elements. A cold sweep
    // of 1024 elements through one hotline is therefore 32 handler calls
    // (all fills) and 992 hotline hits, at one access per cycle plus stalls.
    switch_line_size(8);
    begin
      int h0, c0, f0, s0;
      longint t0, cyc;
      h0 = n_hot; c0 = u_hdl.n_calls; f0 = u_hdl.n_fills; s0 = n_stall_cycles;
      t0 = $time;
      for (int i = 0; i < 1024; i++) access(0, 0, 3, 32'h0080_0000 + 32'(i) * 8);
      cyc = ($time - t0) / 10;
      checks++;
      if (n_hot - h0 != 992 || u_hdl.n_calls - c0 != 32 || u_hdl.n_fills - f0 != 32)
        fail($sformatf("sweep: %0d hotline hits, %0d handler calls, %0d fills; expected 992, 32, 32",
                       n_hot - h0, u_hdl.n_calls - c0, u_hdl.n_fills - f0));
      checks++;
      if (cyc != longint'(1024 + n_stall_cycles - s0))
        fail($sformatf("sweep took %0d cycles, expected %0d", cyc, 1024 + n_stall_cycles - s0));
      $display("sweep of 1024 elements: static prediction rate %0d/1024, %0d cycles", n_hot - h0, cyc);
    end
    // Scalar data survives line-size changes untouched.
    for (int i = 0; i < int'(PAD_BYTES / WB); i++) access(0, 1, 0, 32'(i * WB));

    $display("scratchpad=%0d hotline_hits=%0d tlb_hits=%0d handler_calls=%0d (dir hits %0d, fills %0d, write-backs %0d) line_size_switches=%0d loads=%0d stores=%0d stall_cycles=%0d",
             n_pad, n_hot, n_tlb, n_hdl, n_hdl_hit, n_fill, n_wb, n_switch, n_loads, n_stores, n_stall_cycles);
    $display("static prediction rate %0d%%, hotline+TLB rate %0d%%",
             100 * n_hot / (n_hot + n_tlb + n_hdl), 100 * (n_hot + n_tlb) / (n_hot + n_tlb + n_hdl));
    checks++;
    if (n_pad == 0 || n_hot == 0 || n_tlb == 0 || n_hdl == 0 || n_hdl_hit == 0 ||
        n_fill == 0 || n_wb == 0 || n_switch < 2)
      fail("a mechanism was never exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
