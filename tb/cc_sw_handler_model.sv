// Behavioural model of the Cool-Cache software miss handler and of main
// memory, for simulation only.
//
// In the real system this is compiler-generated code run by the processor
// when the cache TLB misses. The model does what that code does, with the
// same timing a real handler would need to be given:
//   * The SRAM is managed as an ASSOC-way set associative cache. The tag
//     directory has one word per SRAM line, {valid, virtual line}, like an
//     inverted page table. It is kept in the SRAM itself, in the last lines,
//     which are never handed out: reserved lines = ceil(lines * word bytes /
//     line bytes); data lines = the rest, rounded down to whole sets; the
//     set of a virtual line is (virtual line mod sets).
//   * A call reads the ASSOC directory words of the set through the direct
//     SRAM port and finishes after OVERHEAD cycles in all. On a directory
//     miss it takes a free way, otherwise a random one, writes the victim
//     line back (every valid victim: the model keeps no dirty bits), waits
//     MEM_LAT cycles, fills the line word by word, writes the directory word
//     and answers. Stall of a call: OVERHEAD, + one cycle per word of a
//     write-back, + MEM_LAT + one cycle per word + 1 for a fill.
//   * flush_req (cache idle) writes back every valid line and clears the
//     directory, answering with a one-cycle flush_ack. Software does this
//     before changing the line size and once more after it, to clear the
//     directory at its new place; the first flush after reset only clears.
// Main memory is sparse: a word never written reads as mem_init(word index).
// All outputs change on the falling edge of clk.
module cc_sw_handler_model #(
  parameter int unsigned SRAM_BYTES = 65536,
  parameter int unsigned WORD_BYTES = 8,
  parameter int unsigned ASSOC      = 4,
  parameter int unsigned OVERHEAD   = 25,
  parameter int unsigned MEM_LAT    = 100,
  parameter int unsigned VLINE_W    = 26,
  parameter int unsigned SLINE_W    = 10,
  parameter int unsigned SA_W       = 13,
  parameter int unsigned LL_W       = 4
) (
  input  logic                    clk,
  input  logic [LL_W-1:0]         cfg_line_log2,
  input  logic                    hdl_req,
  input  logic [VLINE_W-1:0]      hdl_vline,
  output logic                    hdl_done,
  output logic [SLINE_W-1:0]      hdl_sline,
  output logic                    hsram_en,
  output logic                    hsram_we,
  output logic [SA_W-1:0]         hsram_addr,
  output logic [8*WORD_BYTES-1:0] hsram_wdata,
  input  logic [8*WORD_BYTES-1:0] hsram_rdata,
  input  logic                    flush_req,
  output logic                    flush_ack
);
  localparam int unsigned DW      = 8 * WORD_BYTES;
  localparam int unsigned WORD_LG = $clog2(WORD_BYTES);

  logic [DW-1:0] mem [longint unsigned];
  bit dir_ready = 0;   // directory cleared at its current place
  logic [LL_W-1:0] dir_ll = '0;   // line size the directory was laid out for

  int unsigned n_calls = 0, n_dir_hits = 0, n_fills = 0, n_writebacks = 0;

  function automatic logic [DW-1:0] mem_init(longint unsigned w);
    return {WORD_BYTES{8'(w * 37 + 11)}} ^ DW'(w * 64'h9E37_79B9_7F4A_7C15);
  endfunction

  function automatic logic [DW-1:0] mem_read(longint unsigned w);
    if (mem.exists(w)) return mem[w];
    return mem_init(w);
  endfunction

  initial begin
    hdl_done = 0; hdl_sline = '0; hsram_en = 0; hsram_we = 0;
    hsram_addr = '0; hsram_wdata = '0; flush_ack = 0;
  end

  // Directory layout at the current line size.
  function automatic int words_per_line();
    return 1 << (int'(cfg_line_log2) - WORD_LG);
  endfunction
  function automatic int n_lines();
    return int'(SRAM_BYTES >> cfg_line_log2);
  endfunction
  function automatic int reserved_lines();
    return (n_lines() * int'(WORD_BYTES) + (1 << cfg_line_log2) - 1) >> cfg_line_log2;
  endfunction
  function automatic int n_sets();
    return (n_lines() - reserved_lines()) / int'(ASSOC);
  endfunction
  function automatic int dir_word(int sl);
    return (n_lines() - reserved_lines()) * words_per_line() + sl;
  endfunction

  // Direct-port accesses, one per cycle.
  task automatic sram_read(int a, output logic [DW-1:0] d);
    hsram_en = 1; hsram_we = 0; hsram_addr = SA_W'(a);
    @(negedge clk);
    d = hsram_rdata;
    hsram_en = 0;
  endtask

  task automatic sram_write(int a, logic [DW-1:0] d);
    hsram_en = 1; hsram_we = 1; hsram_addr = SA_W'(a); hsram_wdata = d;
    @(negedge clk);
    hsram_en = 0; hsram_we = 0;
  endtask

  task automatic write_back(int sl, logic [VLINE_W-1:0] v);
    int wpl = words_per_line();
    longint unsigned base = longint'(v) * longint'(wpl);
    logic [DW-1:0] d;
    for (int k = 0; k < wpl; k++) begin
      sram_read(sl * wpl + k, d);
      mem[base + longint'(k)] = d;
    end
    n_writebacks++;
  endtask

  task automatic fill(int sl, logic [VLINE_W-1:0] v);
    int wpl = words_per_line();
    longint unsigned base = longint'(v) * longint'(wpl);
    repeat (MEM_LAT) @(negedge clk);
    for (int k = 0; k < wpl; k++) sram_write(sl * wpl + k, mem_read(base + longint'(k)));
    sram_write(dir_word(sl), {1'b1, {(DW - 1 - VLINE_W){1'b0}}, v});
    n_fills++;
  endtask

  bit answered = 0;   // an answer was just withdrawn on this falling edge

  always begin
    if (!answered) @(negedge clk);
    answered = 0;
    if (flush_req) begin
      logic [DW-1:0] d;
      if (cfg_line_log2 != dir_ll) dir_ready = 0;
      dir_ll = cfg_line_log2;
      for (int sl = 0; sl < n_sets() * int'(ASSOC); sl++) begin
        if (dir_ready) begin
          sram_read(dir_word(sl), d);
          if (d[DW-1]) write_back(sl, d[VLINE_W-1:0]);
        end
        sram_write(dir_word(sl), '0);
      end
      dir_ready = 1;
      flush_ack = 1;
      @(negedge clk);
      flush_ack = 0;
      answered = 1;
    end else if (hdl_req) begin
      int set, way, sl, free_way;
      logic [VLINE_W-1:0] v, victim;
      logic [DW-1:0] d [ASSOC];
      v = hdl_vline;
      n_calls++;
      if (!dir_ready || dir_ll != cfg_line_log2) $error("handler called before its directory was cleared");
      set = int'(v % VLINE_W'(n_sets()));
      // Directory look-up, then the rest of the fixed overhead.
      for (int w = 0; w < int'(ASSOC); w++) sram_read(dir_word(set * int'(ASSOC) + w), d[w]);
      repeat (OVERHEAD - 1 - ASSOC) @(negedge clk);
      way = -1; free_way = -1;
      for (int w = int'(ASSOC) - 1; w >= 0; w--) begin
        if (d[w][DW-1] && d[w][VLINE_W-1:0] == v) way = w;
        if (!d[w][DW-1]) free_way = w;
      end
      if (way >= 0) begin
        n_dir_hits++;
        sl = set * int'(ASSOC) + way;
      end else begin
        way = (free_way >= 0) ? free_way : int'($urandom_range(ASSOC - 1));
        sl = set * int'(ASSOC) + way;
        victim = d[way][VLINE_W-1:0];
        if (d[way][DW-1]) write_back(sl, victim);
        fill(sl, v);
      end
      hdl_done = 1; hdl_sline = SLINE_W'(sl);
      @(negedge clk);
      hdl_done = 0;
      answered = 1;
    end
  end
endmodule
