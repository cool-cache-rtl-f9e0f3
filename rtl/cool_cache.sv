// Cool-Cache: compiler-managed, tagless data memory for embedded and media
// processors.
//
// The data cache's tag array and controller are replaced by compiler
// knowledge and a little hardware. Scalar accesses (marked by one
// instruction bit) go to a 1 KB scratchpad. Non-scalar accesses name one of
// eight hotline registers that the compiler predicts to hold the
// virtual-line to SRAM-line translation; a correct prediction reads or
// writes the tagless 64 KB SRAM directly. A misprediction searches a
// 16-entry fully associative cache TLB, and a TLB miss stalls the access and
// calls a software handler, which keeps the tag directory, chooses victims,
// moves lines between SRAM and memory and returns the translation.
//
// The handler is software running on the processor, so it is outside this
// module: its request/answer signals and a direct SRAM port (for fills,
// write-backs and its directory) are brought out. The controller has
// priority on the SRAM; the direct port is served in every cycle the
// controller leaves the SRAM idle, which is guaranteed while hdl_owns_sram is
// high (an access is stalled for the handler) and while no request is
// presented (used for maintenance such as writing back all lines).
//
// Interface: see cc_access_ctrl for the request/response protocol and
// timing. Scalar, hotline-hit and TLB-hit accesses are accepted in the cycle
// they are presented, with the response one cycle later; a TLB miss is
// accepted in the cycle the handler answers. hsram_rdata is valid the cycle
// after a direct-port read.
module cool_cache #(
  parameter int unsigned ADDR_W         = cc_pkg::ADDR_W,
  parameter int unsigned SRAM_BYTES     = cc_pkg::SRAM_BYTES,
  parameter int unsigned WORD_BYTES     = cc_pkg::WORD_BYTES,
  parameter int unsigned PAD_BYTES      = cc_pkg::PAD_BYTES,
  parameter int unsigned N_HOTLINES     = cc_pkg::N_HOTLINES,
  parameter int unsigned N_TLB          = cc_pkg::N_TLB,
  parameter int unsigned MIN_LINE_BYTES = cc_pkg::MIN_LINE_BYTES,
  parameter int unsigned MAX_LINE_BYTES = cc_pkg::MAX_LINE_BYTES,
  localparam int unsigned DATA_W  = 8 * WORD_BYTES,
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
  // processor load/store port with compiler annotations
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
  // software handler
  output logic                  hdl_req,
  output logic [VLINE_W-1:0]    hdl_vline,
  output logic [ADDR_W-1:0]     hdl_addr,
  output logic [HI_W-1:0]       hdl_hot_idx,
  output logic                  hdl_owns_sram,
  input  logic                  hdl_done,
  input  logic [SLINE_W-1:0]    hdl_sline,
  input  logic                  hsram_en,
  input  logic                  hsram_we,
  input  logic [SA_W-1:0]       hsram_addr,
  input  logic [DATA_W-1:0]     hsram_wdata,
  output logic [DATA_W-1:0]     hsram_rdata,
  // observation
  output logic                  tlb_en,
  output logic                  sram_en,
  output logic                  pad_en,
  output cc_pkg::xlat_src_e     ev_src
);

  logic                  c_sram_en, c_sram_we;
  logic [SA_W-1:0]       c_sram_addr;
  logic [DATA_W-1:0]     c_sram_wdata;
  logic [WORD_BYTES-1:0] c_sram_wstrb;
  logic                  pad_we;
  logic [PA_W-1:0]       pad_addr;
  logic [DATA_W-1:0]     pad_wdata, pad_rdata, sram_rdata;
  logic [WORD_BYTES-1:0] pad_wstrb;

  cc_access_ctrl #(
    .ADDR_W(ADDR_W), .SRAM_BYTES(SRAM_BYTES), .WORD_BYTES(WORD_BYTES),
    .PAD_BYTES(PAD_BYTES), .N_HOTLINES(N_HOTLINES), .N_TLB(N_TLB),
    .MIN_LINE_BYTES(MIN_LINE_BYTES), .MAX_LINE_BYTES(MAX_LINE_BYTES)
  ) u_ctrl (
    .clk, .rst_n, .cfg_line_log2, .flush,
    .req_valid, .req_ready, .req_we, .req_scalar, .req_hot_idx, .req_addr,
    .req_wdata, .req_wstrb, .rsp_valid, .rsp_rdata,
    .pad_en, .pad_we, .pad_addr, .pad_wdata, .pad_wstrb, .pad_rdata,
    .sram_en   (c_sram_en),
    .sram_we   (c_sram_we),
    .sram_addr (c_sram_addr),
    .sram_wdata(c_sram_wdata),
    .sram_wstrb(c_sram_wstrb),
    .sram_rdata(sram_rdata),
    .hdl_req, .hdl_vline, .hdl_addr, .hdl_hot_idx, .hdl_owns_sram,
    .hdl_done, .hdl_sline,
    .tlb_en, .ev_src
  );

  cc_scratchpad #(.BYTES(PAD_BYTES), .WORD_BYTES(WORD_BYTES)) u_pad (
    .clk, .pad_en, .pad_we,
    .addr (pad_addr),
    .wdata(pad_wdata),
    .wstrb(pad_wstrb),
    .rdata(pad_rdata)
  );

  // SRAM port: the controller's accesses, otherwise the handler's.
  logic                  s_en, s_we;
  logic [SA_W-1:0]       s_addr;
  logic [DATA_W-1:0]     s_wdata;
  logic [WORD_BYTES-1:0] s_wstrb;

  always_comb begin
    if (c_sram_en) begin
      s_en = 1'b1;  s_we = c_sram_we;  s_addr = c_sram_addr;
      s_wdata = c_sram_wdata;  s_wstrb = c_sram_wstrb;
    end else begin
      s_en = hsram_en;  s_we = hsram_we;  s_addr = hsram_addr;
      s_wdata = hsram_wdata;  s_wstrb = '1;
    end
  end

  assign sram_en = s_en;

  cc_tagless_sram #(.BYTES(SRAM_BYTES), .WORD_BYTES(WORD_BYTES)) u_sram (
    .clk,
    .en   (s_en),
    .we   (s_we),
    .addr (s_addr),
    .wdata(s_wdata),
    .wstrb(s_wstrb),
    .rdata(sram_rdata)
  );

  assign hsram_rdata = sram_rdata;

  // The handler's direct port and the controller never collide.
  a_no_collision: assert property (@(posedge clk) disable iff (!rst_n)
    !(c_sram_en && hsram_en));

endmodule
