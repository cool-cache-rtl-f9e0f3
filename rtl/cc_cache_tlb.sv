// Cache TLB: 16-entry fully associative translation cache.
//
// When the hotline register named by an instruction does not hold the
// access's virtual line (a static misprediction), this content-addressable
// table is searched for the translation, so most mispredictions avoid the
// slow software handler. The size and full associativity follow the
// original architecture. Its replacement policy is not given; this design fills an
// invalid entry first (lowest index) and otherwise replaces entries in
// round-robin order.
//
// Interface:
//   lookup   with lookup_en, all entries are compared with lookup_vline in
//            the same cycle; hit and hit_sline are combinational. With
//            lookup_en low the CAM is not searched and hit is low.
//   install  install_en writes {install_vline, install_sline} into the
//            victim entry at the clock edge (after a handler resolution).
//   inv      inv_en clears every entry holding SRAM line inv_sline, except
//            the entry being installed in the same cycle.
//   flush    clears all entries.
module cc_cache_tlb #(
  parameter int unsigned N       = cc_pkg::N_TLB,
  parameter int unsigned VLINE_W = cc_pkg::vline_w(cc_pkg::ADDR_W, cc_pkg::MIN_LINE_BYTES),
  parameter int unsigned SLINE_W = cc_pkg::sline_w(cc_pkg::SRAM_BYTES, cc_pkg::MIN_LINE_BYTES),
  localparam int unsigned IW = $clog2(N)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               flush,
  input  logic               lookup_en,
  input  logic [VLINE_W-1:0] lookup_vline,
  output logic               hit,
  output logic [SLINE_W-1:0] hit_sline,
  input  logic               install_en,
  input  logic [VLINE_W-1:0] install_vline,
  input  logic [SLINE_W-1:0] install_sline,
  input  logic               inv_en,
  input  logic [SLINE_W-1:0] inv_sline
);

  logic [N-1:0]       valid;
  logic [VLINE_W-1:0] vline [N];
  logic [SLINE_W-1:0] sline [N];
  logic [IW-1:0]      rr_ptr;
  logic [IW-1:0]      victim;
  logic               have_free;

  // Associative search.
  always_comb begin
    hit       = 1'b0;
    hit_sline = '0;
    if (lookup_en) begin
      for (int i = 0; i < int'(N); i++) begin
        if (valid[i] && vline[i] == lookup_vline) begin
          hit       = 1'b1;
          hit_sline = sline[i];
        end
      end
    end
  end

  // Victim choice: lowest invalid entry, else the round-robin pointer.
  always_comb begin
    have_free = 1'b0;
    victim    = rr_ptr;
    for (int i = int'(N) - 1; i >= 0; i--) begin
      if (!valid[i]) begin
        have_free = 1'b1;
        victim    = IW'(i);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid  <= '0;
      rr_ptr <= '0;
      for (int i = 0; i < int'(N); i++) begin
        vline[i] <= '0;
        sline[i] <= '0;
      end
    end else if (flush) begin
      valid  <= '0;
      rr_ptr <= '0;
    end else begin
      for (int i = 0; i < int'(N); i++) begin
        if (install_en && victim == IW'(i)) begin
          valid[i] <= 1'b1;
          vline[i] <= install_vline;
          sline[i] <= install_sline;
        end else if (inv_en && sline[i] == inv_sline) begin
          valid[i] <= 1'b0;
        end
      end
      if (install_en && !have_free) rr_ptr <= rr_ptr + 1'b1;
    end
  end

endmodule
