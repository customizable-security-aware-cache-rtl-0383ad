// End-to-end testbench of the security-aware data cache at its default size
// (8 kB, L = 2, K = 1, 32-byte lines) with a memory of 3 cycles latency.
//
// Four processes (contexts 0..3; context 3 marks its lines protected and
// context 2 does so for half of its accesses) issue random loads and stores
// over a 24 kB region with a hot 2 kB part, so that hits, tag misses, index
// misses and context misses all occur. Every load is compared with a golden
// copy of memory kept by the testbench, every store is checked in the memory
// model, read hits must take exactly one cycle, and each mechanism of the
// design (hit, tag miss, index miss, context miss with random eviction,
// write-buffer bypass in the remapping circuit, store hit, store miss
// without allocation, set invalidation on remapping) is counted and must
// have happened.
module tb_sa_dcache;
  import sac_pkg::*;
  localparam int unsigned LAT = 3, NACC = 20000;

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

  sa_dcache dut (
    .clk, .rst_n,
    .cpu_req_i(cpu_req), .cpu_we_i(cpu_we), .cpu_addr_i(cpu_addr),
    .cpu_wdata_i(cpu_wdata), .cpu_be_i(cpu_be), .cpu_ctx_i(cpu_ctx),
    .cpu_prot_i(cpu_prot), .cpu_ack_o(cpu_ack), .cpu_rdata_o(cpu_rdata),
    .cpu_kind_o(cpu_kind), .stat_idx_miss_o(st_idx), .stat_ctx_miss_o(st_ctx),
    .ready_o(ready), .remap_bypass_o(byp),
    .mem_req_o(mem_req), .mem_we_o(mem_we), .mem_addr_o(mem_addr),
    .mem_wdata_o(mem_wdata), .mem_be_o(mem_be), .mem_ack_i(mem_ack),
    .mem_rdata_i(mem_rdata));

  mem_model #(.LAT(LAT)) u_mem (
    .clk, .rst_n, .req_i(mem_req), .we_i(mem_we), .addr_i(mem_addr),
    .wdata_i(mem_wdata), .be_i(mem_be), .ack_o(mem_ack), .rdata_o(mem_rdata),
    .n_reads(n_rd), .n_writes(n_wr));

  always #5 clk = ~clk;

  initial begin
    repeat (NACC * 40) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  int n_kind [4];
  int n_byp = 0, n_st_hit = 0, n_st_miss = 0, n_evict = 0, n_inval = 0;
  always @(posedge clk) begin
    if (rst_n && byp) n_byp++;
    // random eviction on a context miss: a whole-line valid clear
    if (rst_n && dut.vt_we && dut.u_ctrl.state_q == ST_LOOKUP) n_evict++;
    // remapping a line that still held valid sets of another index
    if (rst_n && dut.rm_wr && !dut.rm_hit && dut.u_valid.g_bram.mem[dut.rm_line] != '0) n_inval++;
  end

  logic [31:0] golden [bit [29:0]];
  function automatic logic [31:0] gold(input logic [31:0] a);
    if (golden.exists(a[31:2])) return golden[a[31:2]];
    return ({a[31:2], 2'b00} * 32'h9E37_79B1) ^ 32'h5A5A_0F0F;
  endfunction

  initial begin
    int cyc;
    logic [31:0] a, wd, w;
    logic [3:0] be;
    int ctx;
    logic prot, we;
    for (int i = 0; i < 4; i++) n_kind[i] = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    while (!ready) @(negedge clk);
    for (int t = 0; t < NACC; t++) begin
      // address: 60% from a hot 2 kB region, else a 24 kB region
      if ($urandom_range(0, 9) < 6) a = 32'h0001_0000 + ($urandom_range(0, 511) << 2);
      else                          a = 32'h0002_0000 + ($urandom_range(0, 6143) << 2);
      // repeat the previous line now and then to exercise the bypass
      if ($urandom_range(0, 9) == 0) a = {cpu_addr[31:5], 3'($urandom_range(0, 7)), 2'b00};
      ctx  = $urandom_range(0, 3);
      prot = (ctx == 3) || (ctx == 2 && $urandom_range(0, 1) == 1);
      we   = ($urandom_range(0, 9) < 2);
      wd   = $urandom;
      be   = ($urandom_range(0, 3) == 0) ? 4'($urandom_range(1, 15)) : 4'hF;
      @(negedge clk);
      cpu_req = 1; cpu_we = we; cpu_addr = a; cpu_wdata = wd; cpu_be = be;
      cpu_ctx = 8'(ctx); cpu_prot = prot;
      cyc = 0;
      do begin @(posedge clk); #1; cyc++; end while (!cpu_ack);
      n_kind[cpu_kind]++;
      if (we) begin
        w = gold(a);
        for (int b = 0; b < 4; b++) if (be[b]) w[8*b +: 8] = wd[8*b +: 8];
        golden[a[31:2]] = w;
        if (cpu_kind == ACC_HIT) n_st_hit++; else n_st_miss++;
      end else begin
        checks++;
        if (cpu_rdata !== gold(a)) begin
          failures++;
          if (failures < 10) $display("load %h ctx %0d: got %h expected %h (%s)", a, ctx,
                                      cpu_rdata, gold(a), cpu_kind.name());
        end
        if (cpu_kind == ACC_HIT) begin
          checks++;
          if (cyc != 1) begin failures++; $display("read hit took %0d cycles", cyc); end
        end
      end
      @(posedge clk); #1 cpu_req = 0;
      if (we) begin
        checks++;
        if (u_mem.peek(a) !== golden[a[31:2]]) begin
          failures++; $display("store %h not written through", a);
        end
      end
    end
    $display("hits %0d, tag misses %0d, index misses %0d, context misses %0d",
             n_kind[ACC_HIT], n_kind[ACC_TAG_MISS], n_kind[ACC_IDX_MISS], n_kind[ACC_CTX_MISS]);
    $display("bypass %0d, random evictions %0d, set invalidations %0d, store hits %0d, store misses %0d",
             n_byp, n_evict, n_inval, n_st_hit, n_st_miss);
    $display("memory reads %0d, writes %0d", n_rd, n_wr);
    for (int i = 0; i < 4; i++) begin
      checks++; if (n_kind[i] == 0) begin failures++; $display("access kind %0d never happened", i); end
    end
    checks++; if (n_byp == 0)     begin failures++; $display("no bypass"); end
    checks++; if (n_evict == 0)   begin failures++; $display("no random eviction"); end
    checks++; if (n_inval == 0)   begin failures++; $display("no set invalidation"); end
    checks++; if (n_st_hit == 0)  begin failures++; $display("no store hit"); end
    checks++; if (n_st_miss == 0) begin failures++; $display("no store miss"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
