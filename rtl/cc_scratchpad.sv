// Scratchpad memory for scalar accesses.
//
// Loads and stores that the compiler marks as scalar (spills and
// register-promoted variables) go to this small directly addressed SRAM
// instead of the large data array. It has no tags and cannot miss, so every
// access completes in a single cycle. The size (1 KB, enough for all scalars
// of the evaluated media programs) follows the original architecture; the word width
// matches the data SRAM and is this design's choice.
//
// Interface: one port. pad_en enables the array for one cycle; with pad_we
// the bytes selected by wstrb are written, otherwise the addressed word is
// read. addr is a word index (the scalar's byte address divided by the word
// size, taken modulo the scratchpad size). Timing: rdata is registered and
// holds the read word in the cycle after the access; it keeps its value
// while the scratchpad is not enabled, so an idle scratchpad does not toggle.
module cc_scratchpad #(
  parameter int unsigned BYTES      = cc_pkg::PAD_BYTES,
  parameter int unsigned WORD_BYTES = cc_pkg::WORD_BYTES,
  localparam int unsigned DATA_W = 8 * WORD_BYTES,
  localparam int unsigned WORDS  = BYTES / WORD_BYTES,
  localparam int unsigned AW     = $clog2(WORDS)
) (
  input  logic                  clk,
  input  logic                  pad_en,
  input  logic                  pad_we,
  input  logic [AW-1:0]         addr,
  input  logic [DATA_W-1:0]     wdata,
  input  logic [WORD_BYTES-1:0] wstrb,
  output logic [DATA_W-1:0]     rdata
);

  logic [DATA_W-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (pad_en) begin
      if (pad_we) begin
        for (int b = 0; b < int'(WORD_BYTES); b++)
          if (wstrb[b]) mem[addr][8*b +: 8] <= wdata[8*b +: 8];
      end else begin
        rdata <= mem[addr];
      end
    end
  end

endmodule
