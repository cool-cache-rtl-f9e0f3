// Tagless data SRAM of the Cool-Cache.
//
// The data array holds cache lines whose placement is decided entirely by
// software: there is no tag array, no comparator and no way multiplexer. The
// division into lines is only logical; the array is a plain word-addressed
// memory, read and written one word at a time by the processor and by the
// software miss handler when it fills or writes back a line. The size (64 KB)
// and the word width (64 bits; a 256-bit variant is also evaluated) follow
// the original architecture. Byte write strobes are this design's choice.
//
// Interface: single port. en enables the array; with we the bytes selected
// by wstrb are written at word address addr, otherwise addr is read. Timing:
// rdata is registered and holds the read word in the cycle after the access,
// and keeps its value while the array is idle.
module cc_tagless_sram #(
  parameter int unsigned BYTES      = cc_pkg::SRAM_BYTES,
  parameter int unsigned WORD_BYTES = cc_pkg::WORD_BYTES,
  localparam int unsigned DATA_W = 8 * WORD_BYTES,
  localparam int unsigned WORDS  = BYTES / WORD_BYTES,
  localparam int unsigned AW     = $clog2(WORDS)
) (
  input  logic                  clk,
  input  logic                  en,
  input  logic                  we,
  input  logic [AW-1:0]         addr,
  input  logic [DATA_W-1:0]     wdata,
  input  logic [WORD_BYTES-1:0] wstrb,
  output logic [DATA_W-1:0]     rdata
);

  logic [DATA_W-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) begin
        for (int b = 0; b < int'(WORD_BYTES); b++)
          if (wstrb[b]) mem[addr][8*b +: 8] <= wdata[8*b +: 8];
      end else begin
        rdata <= mem[addr];
      end
    end
  end

endmodule
