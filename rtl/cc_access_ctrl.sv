// Cool-Cache access controller and translation path.
//
// Every load/store arrives with two compiler annotations. A scalar-marked
// access goes straight to the scratchpad. Any other access is a non-scalar
// one and carries a hotline index: the indexed hotline register is read and
// its virtual line compared with the access's (static prediction). On a hit
// the SRAM line in the register, combined with the line offset of the
// address, addresses the tagless SRAM. On a miss the 16-entry cache TLB is
// enabled and searched; on a TLB hit the SRAM is addressed from the TLB and
// the hotline register is reloaded with the translation. On a TLB miss the
// access stalls and the software handler is requested; it consults its
// tag directory, fills the line if needed and returns the SRAM line, which is
// written into the TLB and the hotline register while the access completes.
// SRAM_EN is the OR of the three ways to obtain a translation, as drawn in
// the published architecture diagram.
//
// Which blocks exist, what they hold, the order in which they are consulted
// and the handler's role follow the published architecture. This design's own choices:
// the hotline check and the TLB search happen in the same cycle as the SRAM
// access (the architecture only says the TLB costs no extra time); a software
// resolution invalidates stale translations of the reused SRAM line; the
// line size is a run-time input (the architecture lets software choose it per
// application) and must only change together with flush.
//
// Interface and timing:
//   req_*   valid/ready request. A request is accepted when req_valid and
//           req_ready are high; while it waits it must be held stable.
//           Scalar, hotline-hit and TLB-hit accesses are accepted in the
//           cycle they appear; a TLB miss holds req_ready low until the
//           cycle the handler returns hdl_done.
//   rsp_*   rsp_valid pulses one cycle after acceptance (loads and stores);
//           rsp_rdata carries the loaded word.
//   pad_*, sram_*  single-port memories with registered read data.
//   hdl_*   handler interface. hdl_req stays high from the stalled access
//           until hdl_done; hdl_vline/hdl_addr/hdl_hot_idx describe the
//           access. hdl_owns_sram is high while the handler may use the SRAM
//           (fills, write-backs, its directory); it must not use it in the
//           hdl_done cycle.
//   cfg_line_log2  log2 of the line size in bytes (6..10).
//   flush   invalidates all hotline registers and TLB entries; only while
//           no access is stalled.
//   tlb_en, ev_src observation: Cache TLB_EN, and the source of the
//           translation of each SRAM access.
module cc_access_ctrl #(
  parameter int unsigned ADDR_W         = cc_pkg::ADDR_W,
  parameter int unsigned SRAM_BYTES     = cc_pkg::SRAM_BYTES,
  parameter int unsigned WORD_BYTES     = cc_pkg::WORD_BYTES,
  parameter int unsigned PAD_BYTES      = cc_pkg::PAD_BYTES,
  parameter int unsigned N_HOTLINES     = cc_pkg::N_HOTLINES,
  parameter int unsigned N_TLB          = cc_pkg::N_TLB,
  parameter int unsigned MIN_LINE_BYTES = cc_pkg::MIN_LINE_BYTES,
  parameter int unsigned MAX_LINE_BYTES = cc_pkg::MAX_LINE_BYTES,
  localparam int unsigned DATA_W  = 8 * WORD_BYTES,
  localparam int unsigned WORD_LG = $clog2(WORD_BYTES),
  localparam int unsigned HI_W    = $clog2(N_HOTLINES),
  localparam int unsigned VLINE_W = cc_pkg::vline_w(ADDR_W, MIN_LINE_BYTES),
  localparam int unsigned SLINE_W = cc_pkg::sline_w(SRAM_BYTES, MIN_LINE_BYTES),
  localparam int unsigned SA_W    = $clog2(SRAM_BYTES / WORD_BYTES),
  localparam int unsigned PA_W    = $clog2(PAD_BYTES / WORD_BYTES),
  localparam int unsigned LL_W    = $clog2($clog2(MAX_LINE_BYTES) + 1)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [LL_W-1:0]       cfg_line_log2,
  input  logic                  flush,
  // processor side
  input  logic                  req_valid,
  output logic                  req_ready,
  input  logic                  req_we,
  input  logic                  req_scalar,
  input  logic [HI_W-1:0]       req_hot_idx,
  input  logic [ADDR_W-1:0]     req_addr,
  input  logic [DATA_W-1:0]     req_wdata,
  input  logic [WORD_BYTES-1:0] req_wstrb,
  output logic                  rsp_valid,
  output logic [DATA_W-1:0]     rsp_rdata,
  // scratchpad
  output logic                  pad_en,
  output logic                  pad_we,
  output logic [PA_W-1:0]       pad_addr,
  output logic [DATA_W-1:0]     pad_wdata,
  output logic [WORD_BYTES-1:0] pad_wstrb,
  input  logic [DATA_W-1:0]     pad_rdata,
  // tagless SRAM
  output logic                  sram_en,
  output logic                  sram_we,
  output logic [SA_W-1:0]       sram_addr,
  output logic [DATA_W-1:0]     sram_wdata,
  output logic [WORD_BYTES-1:0] sram_wstrb,
  input  logic [DATA_W-1:0]     sram_rdata,
  // software handler
  output logic                  hdl_req,
  output logic [VLINE_W-1:0]    hdl_vline,
  output logic [ADDR_W-1:0]     hdl_addr,
  output logic [HI_W-1:0]       hdl_hot_idx,
  output logic                  hdl_owns_sram,
  input  logic                  hdl_done,
  input  logic [SLINE_W-1:0]    hdl_sline,
  // observation
  output logic                  tlb_en,
  output cc_pkg::xlat_src_e     ev_src
);

  import cc_pkg::*;

  typedef enum logic {S_RUN, S_WAIT_HDL} state_e;
  state_e state;

  // Address split at the configured line size.
  logic [ADDR_W-1:0]  addr_shifted;
  logic [VLINE_W-1:0] acc_vline;
  logic [SA_W-1:0]    word_in_line;
  logic [SA_W-1:0]    line_mask;
  logic [LL_W-1:0]    words_log2;

  always_comb begin
    addr_shifted = req_addr >> cfg_line_log2;
    acc_vline    = addr_shifted[VLINE_W-1:0];
    words_log2   = cfg_line_log2 - LL_W'(WORD_LG);
    line_mask    = SA_W'((1 << words_log2) - 1);
    word_in_line = SA_W'(req_addr >> WORD_LG) & line_mask;
  end

  function automatic logic [SA_W-1:0] sram_word(logic [SLINE_W-1:0] sl);
    return SA_W'({{SA_W{1'b0}}, sl} << words_log2) | word_in_line;
  endfunction

  // Hotline register file and static prediction check.
  logic               hl_valid;
  logic [VLINE_W-1:0] hl_vline;
  logic [SLINE_W-1:0] hl_sline;
  logic               hl_hit, hl_miss;
  logic               hl_wr_en;
  logic [SLINE_W-1:0] hl_wr_sline;
  logic               nonscalar;
  logic               hdl_fin;      // handler answers in this cycle

  assign nonscalar = req_valid && !req_scalar && state == S_RUN;

  cc_hotline_regfile #(.N(N_HOTLINES), .VLINE_W(VLINE_W), .SLINE_W(SLINE_W)) u_hotlines (
    .clk, .rst_n, .flush,
    .rd_idx   (req_hot_idx),
    .rd_valid (hl_valid),
    .rd_vline (hl_vline),
    .rd_sline (hl_sline),
    .wr_en    (hl_wr_en),
    .wr_idx   (req_hot_idx),
    .wr_vline (acc_vline),
    .wr_sline (hl_wr_sline),
    .inv_en   (hdl_fin),
    .inv_sline(hdl_sline)
  );

  cc_hotline_check #(.VLINE_W(VLINE_W)) u_check (
    .en       (nonscalar),
    .reg_valid(hl_valid),
    .reg_vline(hl_vline),
    .acc_vline(acc_vline),
    .hit      (hl_hit),
    .miss     (hl_miss)
  );

  // Cache TLB, searched only on a hotline misprediction.
  logic               tlb_hit;
  logic [SLINE_W-1:0] tlb_sline;

  assign tlb_en  = hl_miss;
  assign hdl_fin = state == S_WAIT_HDL && hdl_done;

  cc_cache_tlb #(.N(N_TLB), .VLINE_W(VLINE_W), .SLINE_W(SLINE_W)) u_tlb (
    .clk, .rst_n, .flush,
    .lookup_en    (tlb_en),
    .lookup_vline (acc_vline),
    .hit          (tlb_hit),
    .hit_sline    (tlb_sline),
    .install_en   (hdl_fin),
    .install_vline(acc_vline),
    .install_sline(hdl_sline),
    .inv_en       (hdl_fin),
    .inv_sline    (hdl_sline)
  );

  // Translation select and SRAM_EN.
  logic               tlb_miss;
  logic [SLINE_W-1:0] use_sline;

  always_comb begin
    tlb_miss    = hl_miss && !tlb_hit;
    hl_wr_en    = (hl_miss && tlb_hit) || hdl_fin;
    hl_wr_sline = hdl_fin ? hdl_sline : tlb_sline;
    use_sline   = hl_hit ? hl_sline : (tlb_hit ? tlb_sline : hdl_sline);

    sram_en    = hl_hit || (hl_miss && tlb_hit) || hdl_fin;
    sram_we    = req_we;
    sram_addr  = sram_word(use_sline);
    sram_wdata = req_wdata;
    sram_wstrb = req_wstrb;

    pad_en    = req_valid && req_scalar && state == S_RUN;
    pad_we    = req_we;
    pad_addr  = PA_W'(req_addr >> WORD_LG);
    pad_wdata = req_wdata;
    pad_wstrb = req_wstrb;

    req_ready = pad_en || sram_en;

    if (hl_hit)                ev_src = SRC_HOTLINE;
    else if (hl_miss && tlb_hit) ev_src = SRC_TLB;
    else if (hdl_fin)          ev_src = SRC_HANDLER;
    else                       ev_src = SRC_NONE;
  end

  // Handler request and stall.
  assign hdl_req       = state == S_WAIT_HDL;
  assign hdl_owns_sram = state == S_WAIT_HDL;
  assign hdl_vline     = acc_vline;
  assign hdl_addr      = req_addr;
  assign hdl_hot_idx   = req_hot_idx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= S_RUN;
    else if (state == S_RUN && tlb_miss) state <= S_WAIT_HDL;
    else if (hdl_fin) state <= S_RUN;
  end

  // Response: one cycle after acceptance, from the memory that was used.
  logic rsp_from_pad;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rsp_valid    <= 1'b0;
      rsp_from_pad <= 1'b0;
    end else begin
      rsp_valid    <= req_valid && req_ready;
      rsp_from_pad <= pad_en;
    end
  end

  assign rsp_rdata = rsp_from_pad ? pad_rdata : sram_rdata;

  // A stalled request must not change until it is accepted.
  a_req_stable: assert property (@(posedge clk) disable iff (!rst_n)
    req_valid && !req_ready |=> req_valid && $stable(req_addr) && $stable(req_we)
                                && $stable(req_scalar) && $stable(req_hot_idx));
  // The handler answers only a request it was given.
  a_done_when_asked: assert property (@(posedge clk) disable iff (!rst_n)
    hdl_done |-> state == S_WAIT_HDL);
  // Line size stays within the supported range.
  a_line_size: assert property (@(posedge clk) disable iff (!rst_n)
    cfg_line_log2 >= LL_W'($clog2(MIN_LINE_BYTES)) && cfg_line_log2 <= LL_W'($clog2(MAX_LINE_BYTES)));

endmodule
