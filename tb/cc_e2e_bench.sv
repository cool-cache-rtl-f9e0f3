// Parameterised end-to-end bench of the Cool-Cache, used to run the
// synthetic media workload (scalars, array sweeps, two-position loops,
// random accesses; see tb_cool_cache) on other evaluated configurations:
// SRAM size, SRAM word width and the sequence of line sizes. It checks the
// same things as tb_cool_cache and reports its counts through ports instead
// of finishing the simulation: done rises when the run is over.
module cc_e2e_bench #(
  parameter int unsigned SRAM_B = 65536,
  parameter int unsigned WB     = 8,
  parameter int unsigned LL0    = 8,
  parameter int unsigned LL1    = 10,
  parameter int unsigned LL2    = 6
) (
  output bit done,
  output int checks,
  output int failures
);
  import cc_pkg::*;
  localparam int unsigned DW = 8 * WB, WLG = $clog2(WB);
  localparam int unsigned SA_W = $clog2(SRAM_B / WB), SL_W = $clog2(SRAM_B / 64);
  localparam int unsigned OVH = 25, MLAT = 100;

  logic clk = 0, rst_n = 0, flush = 0;
  logic [3:0] cfg_line_log2 = 4'(LL0);
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
  logic [SL_W-1:0] hdl_sline;
  logic hsram_en, hsram_we;
  logic [SA_W-1:0] hsram_addr;
  logic [DW-1:0] hsram_wdata, hsram_rdata;
  logic tlb_en, sram_en, pad_en;
  xlat_src_e ev_src;
  logic flush_req = 0, flush_ack;

  cool_cache #(.SRAM_BYTES(SRAM_B), .WORD_BYTES(WB)) dut (.*);

  cc_sw_handler_model #(.SRAM_BYTES(SRAM_B), .WORD_BYTES(WB), .OVERHEAD(OVH), .MEM_LAT(MLAT),
                       .SLINE_W(SL_W), .SA_W(SA_W))
    u_hdl (.clk, .cfg_line_log2, .hdl_req, .hdl_vline, .hdl_done, .hdl_sline,
           .hsram_en, .hsram_we, .hsram_addr, .hsram_wdata, .hsram_rdata,
           .flush_req, .flush_ack);

  always #5 clk = ~clk;

  int n_pad = 0, n_hot = 0, n_tlb = 0, n_hdl = 0, n_hdl_hit = 0, n_fill = 0, n_wb = 0;
  int n_switch = 0, n_loads = 0, n_stores = 0, n_stall_cycles = 0;


  // Independent reference of memory contents (word index -> word).
  logic [DW-1:0] ref_mem [longint unsigned];
  logic [DW-1:0] ref_pad [PAD_BYTES / WB];
  bit            pad_written [PAD_BYTES / WB];

  function automatic logic [DW-1:0] init_word(longint unsigned w);
    return {WB{8'(w * 37 + 11)}} ^ DW'(w * 64'h9E37_79B9_7F4A_7C15);
  endfunction

  function automatic logic [DW-1:0] rand_word();
    logic [DW-1:0] r;
    for (int i = 0; i < int'(DW); i += 32) r[i +: 32] = $urandom;
    return r;
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
    logic [DW-1:0] wd = rand_word();
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
        if (u_hdl.n_writebacks != wbs0) begin n_wb++; exp_stall += 1 << (int'(cfg_line_log2) - int'(WLG)); end
        if (u_hdl.n_fills != fills0) begin n_fill++; exp_stall += int'(MLAT) + 1 + (1 << (int'(cfg_line_log2) - int'(WLG))); end
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
    done = 0; checks = 0; failures = 0;
    for (int i = 0; i < 8; i++) begin last_line[i] = -1; last_calls[i] = 0; end
    for (int i = 0; i < int'(PAD_BYTES / WB); i++) pad_written[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    handler_flush();
    phase(150, SRAM_B / 8);
    switch_line_size(LL1);
    phase(100, SRAM_B / 8);
    switch_line_size(LL2);
    phase(100, SRAM_B / 8);
    // Scalar data survives line-size changes untouched.
    for (int i = 0; i < int'(PAD_BYTES / WB); i++) access(0, 1, 0, 32'(i * WB));

    $display("SRAM %0d bytes, %0d-byte words: scratchpad=%0d hotline_hits=%0d tlb_hits=%0d handler_calls=%0d (dir hits %0d, fills %0d, write-backs %0d) line_size_switches=%0d loads=%0d stores=%0d stall_cycles=%0d",
             SRAM_B, WB, n_pad, n_hot, n_tlb, n_hdl, n_hdl_hit, n_fill, n_wb, n_switch, n_loads, n_stores, n_stall_cycles);
    $display("static prediction rate %0d%%, hotline+TLB rate %0d%%",
             100 * n_hot / (n_hot + n_tlb + n_hdl), 100 * (n_hot + n_tlb) / (n_hot + n_tlb + n_hdl));
    checks++;
    if (n_pad == 0 || n_hot == 0 || n_tlb == 0 || n_hdl == 0 || n_hdl_hit == 0 ||
        n_fill == 0 || n_wb == 0 || n_switch < 2)
      fail("a mechanism was never exercised");
    done = 1;
  end
endmodule
