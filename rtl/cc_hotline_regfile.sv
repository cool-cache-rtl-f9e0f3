// Hotline register file.
//
// Each non-scalar memory instruction carries a hotline index chosen by the
// compiler. The indexed register holds the translation the compiler predicts
// for the access: a virtual cache-line number and the SRAM line that holds
// it. Eight registers, as in the original architecture. Each entry also carries a valid
// bit (this design's choice, cleared at reset) so that a register never
// loaded cannot produce a false hit.
//
// Interface:
//   read   rd_idx selects an entry; rd_valid/rd_vline/rd_sline show it in the
//          same cycle (combinational read, so the check fits in an early
//          pipeline stage).
//   write  wr_en loads {wr_vline, wr_sline} into entry wr_idx at the clock
//          edge (after a cache TLB hit or a software-handler resolution).
//   inv    inv_en clears every entry whose SRAM line equals inv_sline, except
//          the one being written in the same cycle. Used when the handler
//          gives an SRAM line to another virtual line, so no stale
//          translation survives (the original architecture leaves this to the handler).
//   flush  clears every entry (after a change of the line size).
module cc_hotline_regfile #(
  parameter int unsigned N       = cc_pkg::N_HOTLINES,
  parameter int unsigned VLINE_W = cc_pkg::vline_w(cc_pkg::ADDR_W, cc_pkg::MIN_LINE_BYTES),
  parameter int unsigned SLINE_W = cc_pkg::sline_w(cc_pkg::SRAM_BYTES, cc_pkg::MIN_LINE_BYTES),
  localparam int unsigned IW = $clog2(N)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               flush,
  input  logic [IW-1:0]      rd_idx,
  output logic               rd_valid,
  output logic [VLINE_W-1:0] rd_vline,
  output logic [SLINE_W-1:0] rd_sline,
  input  logic               wr_en,
  input  logic [IW-1:0]      wr_idx,
  input  logic [VLINE_W-1:0] wr_vline,
  input  logic [SLINE_W-1:0] wr_sline,
  input  logic               inv_en,
  input  logic [SLINE_W-1:0] inv_sline
);

  logic [N-1:0]       valid;
  logic [VLINE_W-1:0] vline [N];
  logic [SLINE_W-1:0] sline [N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid <= '0;
      for (int i = 0; i < int'(N); i++) begin
        vline[i] <= '0;
        sline[i] <= '0;
      end
    end else if (flush) begin
      valid <= '0;
    end else begin
      for (int i = 0; i < int'(N); i++) begin
        if (wr_en && wr_idx == IW'(i)) begin
          valid[i] <= 1'b1;
          vline[i] <= wr_vline;
          sline[i] <= wr_sline;
        end else if (inv_en && sline[i] == inv_sline) begin
          valid[i] <= 1'b0;
        end
      end
    end
  end

  assign rd_valid = valid[rd_idx];
  assign rd_vline = vline[rd_idx];
  assign rd_sline = sline[rd_idx];

endmodule
