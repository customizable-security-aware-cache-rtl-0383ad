// Directed testbench of secrand_ctrl, wired to the remapping circuit, the
// valid table, the tag and data arrays and a memory model with 2 cycles of
// latency (512-byte cache, L=2, K=1, 32-byte lines, 8 physical lines).
// It walks through each access class of the SecRAND algorithm and checks
// the class reported, the data returned, the status fields and the exact
// number of cycles from request to acknowledge:
//   read hit 1, line fill 2 + 8*(LAT+1), context miss and store 2 + LAT.
module tb_secrand_ctrl;
  import sac_pkg::*;
  localparam int unsigned N = 3, K = 1, L = 2, C = 8, LB = 32, LAT = 2;
  localparam int unsigned TAG_W = 32 - 5 - N - K;

  logic clk = 1'b0, rst_n = 1'b0;
  logic        cpu_req = 0, cpu_we = 0, cpu_prot = 0;
  logic [31:0] cpu_addr = 0, cpu_wdata = 0;
  logic [3:0]  cpu_be = 4'hF;
  logic [C-1:0] cpu_ctx = 0;
  logic        cpu_ack, st_idx, st_ctx;
  logic [31:0] cpu_rdata;
  acc_kind_e   cpu_kind;
  logic [31:0] rnd;
  logic [N+K-1:0] rm_idx;
  logic rm_wr, rm_prot, rm_hit, rm_hprot, rm_byp;
  logic [C-1:0] rm_ctx, rm_hctx;
  logic [N-1:0] rm_line, arr_line, vt_wline, tg_line, da_line;
  logic [L-1:0] vt_rd, vt_wr;
  logic vt_we, vt_busy, tg_we, da_we;
  logic [0:0] tg_set, da_set;
  logic [L-1:0][TAG_W-1:0] tg_rd;
  logic [TAG_W-1:0] tg_tag;
  logic [L-1:0][LB*8-1:0] da_rd;
  logic [LB-1:0] da_be;
  logic [LB*8-1:0] da_wdata;
  logic mem_req, mem_we, mem_ack;
  logic [31:0] mem_addr, mem_wdata, mem_rdata;
  logic [3:0] mem_be;
  int unsigned n_rd, n_wr;
  int checks = 0, failures = 0;

  lfsr_rng u_rng (.clk, .rst_n, .rnd_o(rnd));
  index_remap #(.N(N), .K(K), .CTX_W(C)) u_remap (
    .clk, .rst_n, .idx_i(rm_idx), .wr_i(rm_wr), .wr_ctx_i(rm_ctx),
    .wr_prot_i(rm_prot), .rand_i(rnd[N-1:0]), .idx_hit_o(rm_hit),
    .idx_out_o(rm_line), .hit_ctx_o(rm_hctx), .hit_prot_o(rm_hprot),
    .bypass_o(rm_byp));
  valid_table #(.N(N), .L(L)) u_valid (
    .clk, .rst_n, .rd_line_i(arr_line), .rd_data_o(vt_rd), .we_i(vt_we),
    .wr_line_i(vt_wline), .wr_data_i(vt_wr), .busy_o(vt_busy));
  tag_array #(.N(N), .L(L), .TAG_W(TAG_W)) u_tags (
    .clk, .rd_line_i(arr_line), .rd_tag_o(tg_rd), .we_i(tg_we),
    .wr_set_i(tg_set), .wr_line_i(tg_line), .wr_tag_i(tg_tag));
  data_array #(.N(N), .L(L), .LINE_BYTES(LB)) u_data (
    .clk, .rd_line_i(arr_line), .rd_data_o(da_rd), .we_i(da_we),
    .wr_set_i(da_set), .wr_line_i(da_line), .wr_be_i(da_be), .wr_data_i(da_wdata));
  mem_model #(.LAT(LAT)) u_mem (
    .clk, .rst_n, .req_i(mem_req), .we_i(mem_we), .addr_i(mem_addr),
    .wdata_i(mem_wdata), .be_i(mem_be), .ack_o(mem_ack), .rdata_o(mem_rdata),
    .n_reads(n_rd), .n_writes(n_wr));

  secrand_ctrl #(.LINE_BYTES(LB), .N(N), .K(K), .L(L), .CTX_W(C)) dut (
    .clk, .rst_n,
    .cpu_req_i(cpu_req), .cpu_we_i(cpu_we), .cpu_addr_i(cpu_addr),
    .cpu_wdata_i(cpu_wdata), .cpu_be_i(cpu_be), .cpu_ctx_i(cpu_ctx),
    .cpu_prot_i(cpu_prot), .cpu_ack_o(cpu_ack), .cpu_rdata_o(cpu_rdata),
    .cpu_kind_o(cpu_kind), .stat_idx_miss_o(st_idx), .stat_ctx_miss_o(st_ctx),
    .rnd_i(rnd),
    .rm_idx_o(rm_idx), .rm_wr_o(rm_wr), .rm_ctx_o(rm_ctx), .rm_prot_o(rm_prot),
    .rm_hit_i(rm_hit), .rm_line_i(rm_line), .rm_ctx_i(rm_hctx), .rm_prot_i(rm_hprot),
    .arr_rd_line_o(arr_line),
    .vt_rd_i(vt_rd), .vt_busy_i(vt_busy), .vt_we_o(vt_we), .vt_wr_line_o(vt_wline),
    .vt_wr_o(vt_wr),
    .tg_rd_i(tg_rd), .tg_we_o(tg_we), .tg_set_o(tg_set), .tg_line_o(tg_line),
    .tg_tag_o(tg_tag),
    .da_rd_i(da_rd), .da_we_o(da_we), .da_set_o(da_set), .da_line_o(da_line),
    .da_be_o(da_be), .da_wdata_o(da_wdata),
    .mem_req_o(mem_req), .mem_we_o(mem_we), .mem_addr_o(mem_addr),
    .mem_wdata_o(mem_wdata), .mem_be_o(mem_be), .mem_ack_i(mem_ack),
    .mem_rdata_i(mem_rdata));

  always #5 clk = ~clk;

  initial begin
    repeat (4000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // golden memory, kept apart from the memory model
  logic [31:0] golden [bit [29:0]];
  function automatic logic [31:0] gold(input logic [31:0] a);
    if (golden.exists(a[31:2])) return golden[a[31:2]];
    return ({a[31:2], 2'b00} * 32'h9E37_79B1) ^ 32'h5A5A_0F0F;
  endfunction

  function automatic logic [31:0] mk(input int tag, input int idx, input int word);
    return (32'(tag) << (5 + N + K)) | (32'(idx) << 5) | (32'(word) << 2);
  endfunction

  acc_kind_e   r_kind;
  logic [31:0] r_data;
  int          r_cyc;

  task automatic access(input logic we, input logic [31:0] a, input logic [31:0] wd,
                        input logic [3:0] be, input int ctx, input logic prot);
    @(negedge clk);
    cpu_req = 1; cpu_we = we; cpu_addr = a; cpu_wdata = wd; cpu_be = be;
    cpu_ctx = C'(ctx); cpu_prot = prot;
    r_cyc = 0;
    do begin
      @(posedge clk); #1; r_cyc++;
    end while (!cpu_ack);
    r_kind = cpu_kind; r_data = cpu_rdata;
    @(posedge clk); #1 cpu_req = 0;
    if (we) begin
      logic [31:0] w;
      w = gold(a);
      for (int b = 0; b < 4; b++) if (be[b]) w[8*b +: 8] = wd[8*b +: 8];
      golden[a[31:2]] = w;
    end
  endtask

  task automatic expect_read(input string what, input logic [31:0] a, input int ctx,
                             input logic prot, input acc_kind_e kind, input int cyc);
    access(0, a, 0, 4'hF, ctx, prot);
    checks++;
    if (r_data !== gold(a)) begin
      failures++; $display("%s: data %h expected %h", what, r_data, gold(a));
    end
    if (cyc >= 0) begin
      checks++;
      if (r_kind != kind || r_cyc != cyc) begin
        failures++;
        $display("%s: kind %s in %0d cycles, expected %s in %0d", what, r_kind.name(),
                 r_cyc, kind.name(), cyc);
      end
    end
  endtask

  localparam int FILL = 2 + (LB / 4) * (LAT + 1);
  localparam int UNC  = 2 + LAT;

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    while (vt_busy) @(negedge clk);
    // line 2 is mapped to index 2 after reset (owner context 0, unprotected)
    expect_read("first read", mk(5, 2, 3), 1, 0, ACC_TAG_MISS, FILL);
    expect_read("read hit", mk(5, 2, 3), 1, 0, ACC_HIT, 1);
    expect_read("other word", mk(5, 2, 6), 1, 0, ACC_HIT, 1);
    @(posedge clk); #1;
    checks++; if (st_idx || st_ctx) begin failures++; $display("status after hit"); end
    expect_read("tag miss", mk(9, 2, 0), 1, 0, ACC_TAG_MISS, FILL);
    expect_read("tag miss refill hit", mk(9, 2, 0), 1, 0, ACC_HIT, 1);
    // index 10 is not mapped after reset
    expect_read("index miss", mk(5, 10, 1), 1, 0, ACC_IDX_MISS, FILL);
    @(posedge clk); #1;
    checks++; if (!st_idx || st_ctx) begin failures++; $display("status after index miss"); end
    expect_read("after index miss", mk(5, 10, 1), 1, 0, ACC_HIT, 1);
    // protected line of context 3
    expect_read("protected fill", mk(7, 12, 2), 3, 1, ACC_IDX_MISS, FILL);
    expect_read("context miss", mk(7, 12, 2), 1, 0, ACC_CTX_MISS, UNC);
    @(posedge clk); #1;
    checks++; if (st_idx || !st_ctx) begin failures++; $display("status after context miss"); end
    expect_read("context miss again", mk(7, 12, 2), 1, 0, ACC_CTX_MISS, UNC);
    expect_read("unprotected requester vs protected line", mk(3, 12, 0), 2, 1, ACC_CTX_MISS, UNC);
    // the owner still reaches its line (hit, or a tag miss if the random
    // eviction of a context miss chose this line)
    access(0, mk(7, 12, 2), 0, 4'hF, 3, 1);
    checks++;
    if (r_data !== gold(mk(7, 12, 2)) || !(r_kind inside {ACC_HIT, ACC_TAG_MISS})) begin
      failures++; $display("owner access: %s %h", r_kind.name(), r_data);
    end
    // store hit: write-through, cache updated
    expect_read("prime", mk(5, 10, 4), 1, 0, ACC_HIT, -1);
    access(1, mk(5, 10, 4), 32'hDEAD_BEEF, 4'hF, 1, 0);
    checks++; if (r_kind != ACC_HIT || r_cyc != UNC) begin
      failures++; $display("store hit: %s %0d cycles", r_kind.name(), r_cyc);
    end
    checks++; if (u_mem.peek(mk(5, 10, 4)) !== 32'hDEAD_BEEF) begin failures++; $display("store not in memory"); end
    expect_read("read after store", mk(5, 10, 4), 1, 0, ACC_HIT, 1);
    // byte store
    access(1, mk(5, 10, 4), 32'h0000_7700, 4'b0010, 1, 0);
    expect_read("read after byte store", mk(5, 10, 4), 1, 0, ACC_HIT, 1);
    checks++; if (r_data !== 32'hDEAD_77EF) begin failures++; $display("byte store %h", r_data); end
    // store miss: no allocation
    access(1, mk(11, 14, 0), 32'h1234_5678, 4'hF, 1, 0);
    checks++; if (r_kind == ACC_HIT || r_cyc != UNC) begin failures++; $display("store miss %s", r_kind.name()); end
    checks++; if (u_mem.peek(mk(11, 14, 0)) !== 32'h1234_5678) begin failures++; $display("store miss not in memory"); end
    access(0, mk(11, 14, 0), 0, 4'hF, 1, 0);
    checks++; if (r_kind == ACC_HIT || r_data !== 32'h1234_5678) begin
      failures++; $display("no-allocate read %s %h", r_kind.name(), r_data);
    end
    // unprotected context mismatch takes the line over
    expect_read("takeover", mk(5, 10, 1), 2, 0, ACC_TAG_MISS, FILL);
    expect_read("takeover hit", mk(5, 10, 1), 2, 0, ACC_HIT, 1);
    expect_read("old owner", mk(5, 10, 1), 1, 0, ACC_TAG_MISS, FILL);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
