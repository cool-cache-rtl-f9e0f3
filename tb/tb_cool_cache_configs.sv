// Runs the synthetic media workload on the other configurations the
// Cool-Cache was evaluated in: a 32 KB SRAM at 1024-, 256- and 64-byte
// lines, a 64 KB SRAM with 32-byte (256-bit) words at 256-byte lines, and a
// 128 KB SRAM at 256-byte lines. Each configuration is a separate bench
// instance; the test ends when all are done.
module tb_cool_cache_configs;
  bit d0, d1, d2;
  int c0, c1, c2, f0, f1, f2;
  int checks, failures;

  cc_e2e_bench #(.SRAM_B(32768),  .WB(8),  .LL0(10), .LL1(8), .LL2(6)) u_32k  (.done(d0), .checks(c0), .failures(f0));
  cc_e2e_bench #(.SRAM_B(65536),  .WB(32), .LL0(8),  .LL1(10), .LL2(8)) u_wide (.done(d1), .checks(c1), .failures(f1));
  cc_e2e_bench #(.SRAM_B(131072), .WB(8),  .LL0(8),  .LL1(6), .LL2(8))  u_128k (.done(d2), .checks(c2), .failures(f2));

  initial begin
    fork
      wait (d0 && d1 && d2);
      #100ms;
    join_any
    checks = c0 + c1 + c2;
    failures = f0 + f1 + f2;
    if (!(d0 && d1 && d2)) begin
      failures++;
      $display("watchdog expired");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
