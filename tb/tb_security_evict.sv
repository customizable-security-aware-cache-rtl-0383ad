// Security-property testbench of the cache (1 kB, L = 2, K = 1: 16 physical
// lines). A protected victim context fills one line; an unprotected
// attacker context then reads addresses with the same virtual index,
// alternating with the victim. Every attacker access is a context miss
// (data returned uncached) and each evicts a random physical line: the
// evicted line numbers must be spread evenly over all 16 lines (within 30 %
// of the mean). When an eviction happens to empty the contested line, the
// victim, which comes next, refills it and keeps its protection; no
// access may turn into an index miss, because the mapping is never lost.
// All data is checked. A second phase reads random indices from the
// 32-entry virtual index space and checks that index misses place new
// indices evenly over the physical lines too.
module tb_security_evict;
  import sac_pkg::*;
  localparam int unsigned NLINES = 16, NATK = 3200;

  logic clk = 1'b0, rst_n = 1'b0;
  logic        cpu_req = 0, cpu_we = 0, cpu_prot = 0;
  logic [31:0] cpu_addr = 0, cpu_wdata = 0;
  logic [3:0]  cpu_be = 4'hF;
  logic [7:0]  cpu_ctx = 0;
  logic        cpu_ack, st_idx, st_ctx, ready, byp;
  logic [31:0] cpu_rdata;
  acc_kind_e   cpu_kind;
  logic mem_req, mem_we, mem_ack;
  logic [31:0] mem_addr, mem_wdata, mem_rdata;
  logic [3:0] mem_be;
  int unsigned n_rd, n_wr;
  int checks = 0, failures = 0;

  sa_dcache #(.CACHE_BYTES(1024), .L(2), .K(1)) dut (
    .clk, .rst_n,
    .cpu_req_i(cpu_req), .cpu_we_i(cpu_we), .cpu_addr_i(cpu_addr),
    .cpu_wdata_i(cpu_wdata), .cpu_be_i(cpu_be), .cpu_ctx_i(cpu_ctx),
    .cpu_prot_i(cpu_prot), .cpu_ack_o(cpu_ack), .cpu_rdata_o(cpu_rdata),
    .cpu_kind_o(cpu_kind), .stat_idx_miss_o(st_idx), .stat_ctx_miss_o(st_ctx),
    .ready_o(ready), .remap_bypass_o(byp),
    .mem_req_o(mem_req), .mem_we_o(mem_we), .mem_addr_o(mem_addr),
    .mem_wdata_o(mem_wdata), .mem_be_o(mem_be), .mem_ack_i(mem_ack),
    .mem_rdata_i(mem_rdata));

  mem_model #(.LAT(1)) u_mem (
    .clk, .rst_n, .req_i(mem_req), .we_i(mem_we), .addr_i(mem_addr),
    .wdata_i(mem_wdata), .be_i(mem_be), .ack_o(mem_ack), .rdata_o(mem_rdata),
    .n_reads(n_rd), .n_writes(n_wr));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // lines evicted by context misses, lines chosen by index misses
  int evict_hist [NLINES];
  int place_hist [NLINES];
  always @(posedge clk) begin
    if (rst_n && dut.vt_we && dut.u_ctrl.state_q == ST_LOOKUP)
      evict_hist[dut.vt_wr_line]++;
    if (rst_n && dut.rm_wr && !dut.rm_hit)
      place_hist[dut.rm_line]++;
  end

  function automatic logic [31:0] gold(input logic [31:0] a);
    return ({a[31:2], 2'b00} * 32'h9E37_79B1) ^ 32'h5A5A_0F0F;
  endfunction

  acc_kind_e   r_kind;
  logic [31:0] r_data;
  int          kind_cnt [2][4];

  task automatic rd(input logic [31:0] a, input int ctx, input logic prot);
    @(negedge clk);
    cpu_req = 1; cpu_we = 0; cpu_addr = a; cpu_ctx = 8'(ctx); cpu_prot = prot;
    do begin @(posedge clk); #1; end while (!cpu_ack);
    r_kind = cpu_kind; r_data = cpu_rdata;
    @(posedge clk); #1 cpu_req = 0;
  endtask

  // index field: bits [9:5] (N = 4, K = 1)
  function automatic logic [31:0] addr(input int tag, input int idx);
    return (32'(tag) << 10) | (32'(idx) << 5);
  endfunction

  initial begin
    int ctx_miss = 0;
    for (int i = 0; i < 2; i++) for (int j = 0; j < 4; j++) kind_cnt[i][j] = 0;
    for (int i = 0; i < NLINES; i++) begin evict_hist[i] = 0; place_hist[i] = 0; end
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    while (!ready) @(negedge clk);
    // victim (context 5, protected) maps virtual index 21
    rd(addr(3, 21), 5, 1);
    checks++; if (r_kind != ACC_IDX_MISS) begin failures++; $display("victim fill: %s", r_kind.name()); end
    for (int t = 0; t < NATK; t++) begin
      // attacker and victim alternate on the same virtual index
      if (t % 2 == 0) rd(addr(100 + t % 7, 21), 9, 0);
      else            rd(addr(3, 21), 5, 1);
      kind_cnt[t % 2][r_kind]++;
      checks++;
      if (r_kind == ACC_IDX_MISS) begin
        failures++;
        if (failures < 5) $display("access %0d: unexpected index miss", t);
      end
      if (r_kind == ACC_CTX_MISS) ctx_miss++;
      checks++;
      if (r_data !== gold(cpu_addr)) failures++;
    end
    // the victim always comes next after an eviction, so it refills its own
    // line and every attacker access stays a context miss
    checks++;
    if (kind_cnt[0][3] != NATK / 2) begin failures++; $display("attacker context misses %0d", kind_cnt[0][3]); end
    for (int i = 0; i < NLINES; i++) begin
      checks++;
      if (evict_hist[i] * NLINES * 10 < ctx_miss * 7 || evict_hist[i] * NLINES * 10 > ctx_miss * 13) begin
        failures++; $display("line %0d evicted %0d times", i, evict_hist[i]);
      end
    end
    $display("attacker: hit %0d tag %0d ctx %0d; victim: hit %0d tag %0d ctx %0d",
             kind_cnt[0][0], kind_cnt[0][1], kind_cnt[0][3], kind_cnt[1][0], kind_cnt[1][1], kind_cnt[1][3]);
    $display("context misses %0d of %0d; evictions per line:", ctx_miss, NATK);
    for (int i = 0; i < NLINES; i++) $write(" %0d", evict_hist[i]);
    $display("");
    // phase 2: index misses (virtual indices 16..31 are unmapped at first)
    for (int i = 0; i < NLINES; i++) place_hist[i] = 0;
    for (int t = 0; t < 3200; t++) begin
      rd(addr(t % 5, $urandom_range(0, 31)), 1, 0);
      checks++;
      if (r_data !== gold(cpu_addr)) failures++;
    end
    begin
      int tot = 0;
      for (int i = 0; i < NLINES; i++) tot += place_hist[i];
      $display("index-miss placements %0d; per line:", tot);
      for (int i = 0; i < NLINES; i++) $write(" %0d", place_hist[i]);
      $display("");
      for (int i = 0; i < NLINES; i++) begin
        checks++;
        if (place_hist[i] * NLINES * 2 < tot || place_hist[i] * NLINES > tot * 2) begin
          failures++; $display("line %0d chosen %0d of %0d times", i, place_hist[i], tot);
        end
      end
      checks++; if (tot < 1000) begin failures++; $display("too few index misses"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
