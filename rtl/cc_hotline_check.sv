// Hotline hit/miss check (static prediction check).
//
// Compares the virtual cache-line number of a non-scalar access with the one
// held in the hotline register that the compiler named. Equal numbers in a
// valid register are a correct static prediction: the SRAM line in the
// register is used directly, with no tag lookup. Otherwise the prediction
// missed and the cache TLB is enabled. The comparison follows the original architecture;
// the valid bit and the enable input are this design's choices.
//
// Interface (purely combinational): en qualifies the check (a non-scalar
// access is present); hit and miss are mutually exclusive and both low when
// en is low.
module cc_hotline_check #(
  parameter int unsigned VLINE_W = cc_pkg::vline_w(cc_pkg::ADDR_W, cc_pkg::MIN_LINE_BYTES)
) (
  input  logic               en,
  input  logic               reg_valid,
  input  logic [VLINE_W-1:0] reg_vline,
  input  logic [VLINE_W-1:0] acc_vline,
  output logic               hit,
  output logic               miss
);

  always_comb begin
    hit  = en && reg_valid && (reg_vline == acc_vline);
    miss = en && !hit;
  end

endmodule
