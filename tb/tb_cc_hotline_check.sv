// Self-checking test of the hotline hit/miss check: every combination of
// enable and valid, equal and unequal line numbers (including lines that
// differ in a single bit), against the rule hit = en & valid & equal.
module tb_cc_hotline_check;
  localparam int unsigned W = 26;
  logic en, reg_valid, hit, miss;
  logic [W-1:0] reg_vline, acc_vline;
  int checks = 0, failures = 0;

  cc_hotline_check #(.VLINE_W(W)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      logic exp_hit;
      en = 1'($urandom); reg_valid = 1'($urandom);
      reg_vline = W'($urandom);
      case ($urandom_range(2))
        0: acc_vline = reg_vline;
        1: acc_vline = reg_vline ^ (W'(1) << $urandom_range(W - 1));
        default: acc_vline = W'($urandom);
      endcase
      #1;
      exp_hit = en && reg_valid && (reg_vline == acc_vline);
      checks++;
      if (hit !== exp_hit || miss !== (en && !exp_hit)) begin
        failures++;
        $display("FAIL en=%b v=%b reg=%h acc=%h hit=%b miss=%b", en, reg_valid, reg_vline, acc_vline, hit, miss);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
