// Shared constants and types of the Cool-Cache data memory.
//
// Cool-Cache replaces the tag array and controller of a hardware data cache
// with a tagless SRAM whose contents are managed by compiler-generated code.
// Every load/store carries compiler annotations: one bit that marks a scalar
// access (served by a small scratchpad) and a hotline index that names the
// hotline register predicted to hold the translation of the access's virtual
// cache line to an SRAM line.
//
// Sizes from the evaluated configuration: 32-bit virtual addresses (assumed),
// 64 KB tagless SRAM, 64-bit SRAM words, 1 KB scratchpad, 8 hotline registers,
// 16-entry cache TLB, and software-chosen line sizes of 64 to 1024 bytes
// (256 bytes in the main configuration).
package cc_pkg;

  localparam int unsigned ADDR_W         = 32;     // virtual address width (assumed)
  localparam int unsigned SRAM_BYTES     = 65536;  // 64 KB tagless SRAM
  localparam int unsigned WORD_BYTES     = 8;      // 64-bit wide SRAM
  localparam int unsigned PAD_BYTES      = 1024;   // 1 KB scratchpad
  localparam int unsigned N_HOTLINES     = 8;      // hotline register file entries
  localparam int unsigned N_TLB          = 16;     // cache TLB entries
  localparam int unsigned MIN_LINE_BYTES = 64;     // smallest line size evaluated
  localparam int unsigned MAX_LINE_BYTES = 1024;   // largest line size evaluated
  localparam int unsigned DEF_LINE_BYTES = 256;    // line size of the main configuration

  // Width of a virtual line number / SRAM line number at the smallest line size.
  function automatic int unsigned vline_w(int unsigned addr_w, int unsigned min_line);
    return addr_w - $clog2(min_line);
  endfunction

  function automatic int unsigned sline_w(int unsigned sram_bytes, int unsigned min_line);
    return $clog2(sram_bytes / min_line);
  endfunction

  // Source of the translation used by an SRAM access (for observation).
  typedef enum logic [1:0] {
    SRC_NONE    = 2'd0,
    SRC_HOTLINE = 2'd1,   // correct static prediction
    SRC_TLB     = 2'd2,   // hotline miss, cache TLB hit
    SRC_HANDLER = 2'd3    // cache TLB miss, resolved by the software handler
  } xlat_src_e;

endpackage
