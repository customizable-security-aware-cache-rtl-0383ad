// Workload testbench: the 8 kB, k = 1 caches with L = 1, 2 and 4 sets per
// line, and the 8 kB, L = 2, k = 3 cache with a block-RAM and with a
// flip-flop valid table, each running the same AES-like
// table-lookup access stream (see cache_driver) from one protected context,
// once alone and once with an unprotected second context sweeping its own
// array, and once more with the second process on a cache built without
// contexts (MMU = 0). It checks every load against memory, that each
// configuration finishes, and that context misses occur exactly where the
// attacker runs on a context-aware cache. Miss rates are printed for comparison.
module tb_workload_aes;
  localparam int NACC = 6000;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam int NCFG = 7;
  logic done [NCFG];
  int acc [NCFG], mis [NCFG], chk [NCFG], fail [NCFG];
  int kinds [NCFG][4];

  cache_driver #(.CACHE_BYTES(8192), .L(1), .K(1), .NACC(NACC)) d0 (
    .clk, .rst_n, .done(done[0]), .accesses(acc[0]), .misses(mis[0]), .kinds(kinds[0]),
    .checks(chk[0]), .failures(fail[0]));
  cache_driver #(.CACHE_BYTES(8192), .L(2), .K(1), .NACC(NACC)) d1 (
    .clk, .rst_n, .done(done[1]), .accesses(acc[1]), .misses(mis[1]), .kinds(kinds[1]),
    .checks(chk[1]), .failures(fail[1]));
  cache_driver #(.CACHE_BYTES(8192), .L(4), .K(1), .NACC(NACC)) d2 (
    .clk, .rst_n, .done(done[2]), .accesses(acc[2]), .misses(mis[2]), .kinds(kinds[2]),
    .checks(chk[2]), .failures(fail[2]));
  cache_driver #(.CACHE_BYTES(8192), .L(2), .K(3), .NACC(NACC)) d3 (
    .clk, .rst_n, .done(done[3]), .accesses(acc[3]), .misses(mis[3]), .kinds(kinds[3]),
    .checks(chk[3]), .failures(fail[3]));
  cache_driver #(.CACHE_BYTES(8192), .L(2), .K(1), .NACC(NACC), .ATTACKER(1'b1)) d4 (
    .clk, .rst_n, .done(done[4]), .accesses(acc[4]), .misses(mis[4]), .kinds(kinds[4]),
    .checks(chk[4]), .failures(fail[4]));
  cache_driver #(.CACHE_BYTES(8192), .L(2), .K(1), .NACC(NACC), .ATTACKER(1'b1), .MMU(1'b0)) d5 (
    .clk, .rst_n, .done(done[5]), .accesses(acc[5]), .misses(mis[5]), .kinds(kinds[5]),
    .checks(chk[5]), .failures(fail[5]));
  cache_driver #(.CACHE_BYTES(8192), .L(2), .K(3), .NACC(NACC), .VALID_BRAM(1'b0)) d6 (
    .clk, .rst_n, .done(done[6]), .accesses(acc[6]), .misses(mis[6]), .kinds(kinds[6]),
    .checks(chk[6]), .failures(fail[6]));

  int checks = 0, failures = 0;
  string names [NCFG] = '{"8kB L=1 k=1", "8kB L=2 k=1", "8kB L=4 k=1", "8kB L=2 k=3",
                          "8kB L=2 k=1 + attacker", "no MMU, L=2 k=1 + attacker",
                          "8kB L=2 k=3 flip-flop valid"};

  initial begin
    repeat (NACC * 60) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit all;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    do begin
      @(posedge clk);
      all = 1;
      for (int i = 0; i < NCFG; i++) all &= done[i];
    end while (!all);
    for (int i = 0; i < NCFG; i++) begin
      $display("%-24s accesses %0d  miss rate %0.3f  (tag %0d, index %0d, context %0d)",
               names[i], acc[i], real'(mis[i]) / real'(acc[i]),
               kinds[i][1], kinds[i][2], kinds[i][3]);
      checks += chk[i];
      failures += fail[i];
      checks++;
      if (acc[i] != NACC) failures++;
      checks++;
      if ((i == 4) != (kinds[i][3] > 0)) begin
        failures++; $display("%s: unexpected context misses %0d", names[i], kinds[i][3]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
