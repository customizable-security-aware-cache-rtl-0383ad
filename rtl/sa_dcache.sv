// L-associative security-aware data cache for a soft processor, after the
// paper "Customizable Security-Aware Cache for FPGA-Based Soft Processors".
//
// A conventional cache lets an attacker learn which lines a victim uses,
// because a memory block can only live in one fixed set. Here a layer of
// indirection sits between the address index and the cache lines: the
// (N+K)-bit index of the address selects a line of a virtual cache that is
// 2^K times larger than the physical one, and a content-addressable array of
// line-number registers (index_remap) maps it to one of the 2^N physical
// lines. Replacement follows the SecRAND rules (secrand_ctrl): on an index
// miss the new index is remapped to a random line, on a context miss between
// a protected line and another process the data bypasses the cache and a
// random line is evicted, so an attacker sees evictions spread evenly over
// the cache.
//
// Each physical line holds L sets (ways) that share one line-number
// register, so the remapping hardware is L times smaller than for a
// single-set cache of equal capacity (L = 1 gives the single-set cache).
// A valid table with L bits per line invalidates all sets of a line at once
// when the line is remapped.
//
// Defaults follow the paper's main evaluated configuration: 8 kB, L = 2,
// K = 1, with the context-aware (MMU) replacement; MMU = 0 gives the
// remapping-only variant the paper builds for a processor without an MMU.
// The line size (32 bytes), the context width (8 bits), the address
// width, the processor and memory interfaces and the seed are this design's
// own choices.
//
// Interface and timing: see secrand_ctrl. A read hit is acknowledged one
// cycle after it is presented; stores write through to memory.
module sa_dcache
  import sac_pkg::*;
#(
  parameter int unsigned ADDR_W      = 32,
  parameter int unsigned CACHE_BYTES = 8192,
  parameter int unsigned LINE_BYTES  = 32,
  parameter int unsigned L           = 2,
  parameter int unsigned K           = 1,
  parameter int unsigned CTX_W       = 8,
  parameter bit          MMU         = 1'b1,  // 0: no contexts (remapping only)
  parameter bit          VALID_BRAM  = 1'b1,
  parameter logic [31:0] SEED        = 32'hACE1_2468,
  localparam int unsigned N          = $clog2(CACHE_BYTES / (LINE_BYTES * L)),
  localparam int unsigned TAG_W      = ADDR_W - $clog2(LINE_BYTES) - N - K
) (
  input  logic              clk,
  input  logic              rst_n,
  // processor side
  input  logic              cpu_req_i,
  input  logic              cpu_we_i,
  input  logic [ADDR_W-1:0] cpu_addr_i,
  input  logic [31:0]       cpu_wdata_i,
  input  logic [3:0]        cpu_be_i,
  input  logic [CTX_W-1:0]  cpu_ctx_i,
  input  logic              cpu_prot_i,
  output logic              cpu_ack_o,
  output logic [31:0]       cpu_rdata_o,
  output acc_kind_e         cpu_kind_o,
  output logic              stat_idx_miss_o,
  output logic              stat_ctx_miss_o,
  output logic              ready_o,       // valid table cleared after reset
  output logic              remap_bypass_o, // lookup served by the write-to register
  // memory side
  output logic              mem_req_o,
  output logic              mem_we_o,
  output logic [ADDR_W-1:0] mem_addr_o,
  output logic [31:0]       mem_wdata_o,
  output logic [3:0]        mem_be_o,
  input  logic              mem_ack_i,
  input  logic [31:0]       mem_rdata_i
);

  localparam int unsigned SET_W = (L > 1) ? $clog2(L) : 1;

  logic [31:0]      rnd;
  logic [N+K-1:0]   rm_idx;
  logic             rm_wr, rm_prot, rm_hit, rm_hit_prot;
  logic [CTX_W-1:0] rm_ctx, rm_hit_ctx;
  logic [N-1:0]     rm_line, arr_line;

  logic [L-1:0]     vt_rd, vt_wr;
  logic             vt_we, vt_busy;
  logic [N-1:0]     vt_wr_line;

  logic [L-1:0][TAG_W-1:0] tg_rd;
  logic             tg_we;
  logic [SET_W-1:0] tg_set;
  logic [N-1:0]     tg_line;
  logic [TAG_W-1:0] tg_tag;

  logic [L-1:0][LINE_BYTES*8-1:0] da_rd;
  logic             da_we;
  logic [SET_W-1:0] da_set;
  logic [N-1:0]     da_line;
  logic [LINE_BYTES-1:0]   da_be;
  logic [LINE_BYTES*8-1:0] da_wdata;

  lfsr_rng #(.SEED(SEED)) u_rng (.clk, .rst_n, .rnd_o(rnd));

  index_remap #(.N(N), .K(K), .CTX_W(CTX_W)) u_remap (
    .clk, .rst_n,
    .idx_i(rm_idx), .wr_i(rm_wr), .wr_ctx_i(rm_ctx), .wr_prot_i(rm_prot),
    .rand_i(rnd[N-1:0]),
    .idx_hit_o(rm_hit), .idx_out_o(rm_line), .hit_ctx_o(rm_hit_ctx),
    .hit_prot_o(rm_hit_prot), .bypass_o(remap_bypass_o)
  );

  valid_table #(.N(N), .L(L), .USE_BRAM(VALID_BRAM)) u_valid (
    .clk, .rst_n,
    .rd_line_i(arr_line), .rd_data_o(vt_rd),
    .we_i(vt_we), .wr_line_i(vt_wr_line), .wr_data_i(vt_wr), .busy_o(vt_busy)
  );

  tag_array #(.N(N), .L(L), .TAG_W(TAG_W)) u_tags (
    .clk, .rd_line_i(arr_line), .rd_tag_o(tg_rd),
    .we_i(tg_we), .wr_set_i(tg_set), .wr_line_i(tg_line), .wr_tag_i(tg_tag)
  );

  data_array #(.N(N), .L(L), .LINE_BYTES(LINE_BYTES)) u_data (
    .clk, .rd_line_i(arr_line), .rd_data_o(da_rd),
    .we_i(da_we), .wr_set_i(da_set), .wr_line_i(da_line),
    .wr_be_i(da_be), .wr_data_i(da_wdata)
  );

  secrand_ctrl #(
    .ADDR_W(ADDR_W), .LINE_BYTES(LINE_BYTES), .N(N), .K(K), .L(L), .CTX_W(CTX_W),
    .MMU(MMU)
  ) u_ctrl (
    .clk, .rst_n,
    .cpu_req_i, .cpu_we_i, .cpu_addr_i, .cpu_wdata_i, .cpu_be_i, .cpu_ctx_i,
    .cpu_prot_i, .cpu_ack_o, .cpu_rdata_o, .cpu_kind_o,
    .stat_idx_miss_o, .stat_ctx_miss_o,
    .rnd_i(rnd),
    .rm_idx_o(rm_idx), .rm_wr_o(rm_wr), .rm_ctx_o(rm_ctx), .rm_prot_o(rm_prot),
    .rm_hit_i(rm_hit), .rm_line_i(rm_line), .rm_ctx_i(rm_hit_ctx),
    .rm_prot_i(rm_hit_prot),
    .arr_rd_line_o(arr_line),
    .vt_rd_i(vt_rd), .vt_busy_i(vt_busy), .vt_we_o(vt_we),
    .vt_wr_line_o(vt_wr_line), .vt_wr_o(vt_wr),
    .tg_rd_i(tg_rd), .tg_we_o(tg_we), .tg_set_o(tg_set), .tg_line_o(tg_line),
    .tg_tag_o(tg_tag),
    .da_rd_i(da_rd), .da_we_o(da_we), .da_set_o(da_set), .da_line_o(da_line),
    .da_be_o(da_be), .da_wdata_o(da_wdata),
    .mem_req_o, .mem_we_o, .mem_addr_o, .mem_wdata_o, .mem_be_o,
    .mem_ack_i, .mem_rdata_i
  );

  assign ready_o = !vt_busy;

  // The processor holds its request stable until it is acknowledged.
  property p_cpu_stable;
    @(posedge clk) disable iff (!rst_n)
      (cpu_req_i && !cpu_ack_o && ready_o) |=>
        (cpu_req_i && $stable(cpu_addr_i) && $stable(cpu_we_i) && $stable(cpu_ctx_i));
  endproperty
  a_cpu_stable: assert property (p_cpu_stable);

endmodule
