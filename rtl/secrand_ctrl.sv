// Data cache controller with the SecRAND (security-aware random) replacement
// algorithm, for a write-through, no-allocate-on-write data cache whose line
// index is remapped by index_remap.
//
// Every access is classified as in the paper:
//  * hit        - the index is mapped, the line belongs to the request's
//                 context and a valid set holds the tag;
//  * tag miss   - the index is mapped to a line of the same context but no
//                 valid set holds the tag: the line is filled from memory
//                 into a randomly selected set of the same physical line,
//                 as a direct-mapped (per line) cache would do;
//  * index miss - no LNReg holds the index: a random physical line is
//                 chosen, all its sets are invalidated, the LNReg is
//                 remapped to the new index and one random set is filled;
//  * context miss - the index is mapped to a line that holds valid data,
//                 but the stored line and the request have different
//                 contexts and one of them is protected: the
//                 word is read from memory and sent to the processor without
//                 being cached, and a random physical line is evicted.
// All sets of a line belong to one context (the first algorithm variant of
// the paper, the one it implements). An index match with a different
// context where neither side is protected is reported as a tag miss and
// refilled in the same line, but the line changes owner, so its other sets
// are invalidated (this design's reading of the SecRAND rules). A mapped
// line with no valid set (never filled, or emptied by a random eviction)
// is free and is taken over the same way whatever the protection; without
// this, lines emptied by evictions could never be reclaimed by a protected
// process (this design's own choice).
// With MMU = 0 the context and protection inputs are ignored and no
// context miss can occur: the cache then only remaps indices, which is the
// configuration the paper uses for a processor without an MMU.
// Stores write through to memory and never allocate; a store whose word is
// cached updates the cached copy even when the line belongs to another
// context, which keeps the cache coherent with memory without changing what
// is resident (this design's own choice; the paper only states
// write-through with no-allocate on write).
//
// The remapping happens in the cycle the request is presented, so the
// remapped line addresses the tag, valid and data memories in that cycle;
// the tag comparison is done in the next cycle. On a fill the complete line
// is gathered in a line buffer and then written to tag, valid and data
// memories and to the remapping circuit in a single cycle (ST_FILL_WR), using
// the remapping circuit's output (the random number on an index miss).
//
// Timing: a read hit is acknowledged one cycle after it is presented; a
// fill takes one cycle plus LINE_BYTES/4 memory word reads plus one write
// cycle; a context miss takes one cycle plus one memory read; a store takes
// one cycle plus one memory write. cpu_ack_o is a one-cycle pulse and
// cpu_kind_o tells how the access was served. The processor keeps its
// request unchanged until cpu_ack_o. The memory port holds mem_req_o and
// its address stable until mem_ack_i, a one-cycle pulse that carries the
// read data. The status outputs are the two extra fields of the controller
// control register: whether the last completed access was an index miss or
// a context miss.
module secrand_ctrl
  import sac_pkg::*;
#(
  parameter int unsigned ADDR_W     = 32,
  parameter int unsigned LINE_BYTES = 32,
  parameter int unsigned N          = 7,
  parameter int unsigned K          = 1,
  parameter int unsigned L          = 2,
  parameter int unsigned CTX_W      = 8,
  parameter bit          MMU        = 1'b1,  // 0: contexts ignored
  localparam int unsigned OFF_W     = $clog2(LINE_BYTES),
  localparam int unsigned WORDS     = LINE_BYTES / 4,
  localparam int unsigned WOFF_W    = (WORDS > 1) ? $clog2(WORDS) : 1,
  localparam int unsigned IDX_W     = N + K,
  localparam int unsigned TAG_W     = ADDR_W - OFF_W - IDX_W,
  localparam int unsigned SET_W     = (L > 1) ? $clog2(L) : 1
) (
  input  logic                            clk,
  input  logic                            rst_n,
  // processor side
  input  logic                            cpu_req_i,
  input  logic                            cpu_we_i,
  input  logic [ADDR_W-1:0]               cpu_addr_i,
  input  logic [31:0]                     cpu_wdata_i,
  input  logic [3:0]                      cpu_be_i,
  input  logic [CTX_W-1:0]                cpu_ctx_i,
  input  logic                            cpu_prot_i,
  output logic                            cpu_ack_o,
  output logic [31:0]                     cpu_rdata_o,
  output acc_kind_e                       cpu_kind_o,
  output logic                            stat_idx_miss_o,
  output logic                            stat_ctx_miss_o,
  // random number
  input  logic [31:0]                     rnd_i,
  // index remapping circuit
  output logic [IDX_W-1:0]                rm_idx_o,
  output logic                            rm_wr_o,
  output logic [CTX_W-1:0]                rm_ctx_o,
  output logic                            rm_prot_o,
  input  logic                            rm_hit_i,
  input  logic [N-1:0]                    rm_line_i,
  input  logic [CTX_W-1:0]                rm_ctx_i,
  input  logic                            rm_prot_i,
  // memories (common read line)
  output logic [N-1:0]                    arr_rd_line_o,
  input  logic [L-1:0]                    vt_rd_i,
  input  logic                            vt_busy_i,
  output logic                            vt_we_o,
  output logic [N-1:0]                    vt_wr_line_o,
  output logic [L-1:0]                    vt_wr_o,
  input  logic [L-1:0][TAG_W-1:0]         tg_rd_i,
  output logic                            tg_we_o,
  output logic [SET_W-1:0]                tg_set_o,
  output logic [N-1:0]                    tg_line_o,
  output logic [TAG_W-1:0]                tg_tag_o,
  input  logic [L-1:0][LINE_BYTES*8-1:0]  da_rd_i,
  output logic                            da_we_o,
  output logic [SET_W-1:0]                da_set_o,
  output logic [N-1:0]                    da_line_o,
  output logic [LINE_BYTES-1:0]           da_be_o,
  output logic [LINE_BYTES*8-1:0]         da_wdata_o,
  // memory side
  output logic                            mem_req_o,
  output logic                            mem_we_o,
  output logic [ADDR_W-1:0]               mem_addr_o,
  output logic [31:0]                     mem_wdata_o,
  output logic [3:0]                      mem_be_o,
  input  logic                            mem_ack_i,
  input  logic [31:0]                     mem_rdata_i
);

  typedef struct packed {
    logic              we;
    logic [TAG_W-1:0]  tag;
    logic [IDX_W-1:0]  idx;
    logic [WOFF_W-1:0] woff;
    logic [31:0]       wdata;
    logic [3:0]        be;
    logic [CTX_W-1:0]  ctx;
    logic              prot;
  } req_t;

  ctrl_state_e       state_q;
  req_t              req_q;
  logic              rhit_q;     // remap results of the lookup cycle
  logic [N-1:0]      rline_q;
  logic [CTX_W-1:0]  rctx_q;
  logic              rprot_q;
  logic [L-1:0]      rvalid_q;   // valid bits of the line, kept for the fill
  acc_kind_e         kind_q;
  logic [WOFF_W-1:0] cnt_q;
  logic [WORDS-1:0][31:0] lbuf_q;

  // ---------------------------------------------------------------- lookup
  logic [L-1:0] set_hit, set_tag;
  logic         ctx_eq, conflict, hit, tag_any;
  logic [SET_W-1:0] hit_set, tag_set;
  logic [31:0]  hit_word;

  always_comb begin
    ctx_eq   = !MMU || (rctx_q == req_q.ctx);
    conflict = MMU && rhit_q && !ctx_eq && (rprot_q || req_q.prot) && (|vt_rd_i);
    hit_set  = '0;
    tag_set  = '0;
    hit_word = '0;
    for (int unsigned s = 0; s < L; s++) begin
      set_tag[s] = rhit_q && vt_rd_i[s] && (tg_rd_i[s] == req_q.tag);
      set_hit[s] = set_tag[s] && ctx_eq;
      if (set_tag[s]) tag_set = tag_set | SET_W'(s);
      if (set_hit[s]) begin
        hit_set  = hit_set | SET_W'(s);
        hit_word = hit_word | da_rd_i[s][32*req_q.woff +: 32];
      end
    end
    hit     = |set_hit;
    tag_any = |set_tag;
  end

  acc_kind_e lookup_kind;
  always_comb begin
    if (hit)                        lookup_kind = ACC_HIT;
    else if (conflict)              lookup_kind = ACC_CTX_MISS;
    else if (rhit_q)                lookup_kind = ACC_TAG_MISS;
    else                            lookup_kind = ACC_IDX_MISS;
  end

  // --------------------------------------------------------------- fill
  logic [SET_W-1:0] fill_set;
  logic [L-1:0]     fill_onehot;
  logic             keep_line;      // same line, same owner: keep other sets
  assign fill_set    = (L > 1) ? SET_W'(rnd_i[N +: SET_W]) : '0;
  assign fill_onehot = L'(1) << fill_set;
  assign keep_line   = rm_hit_i && (!MMU || (rm_ctx_i == req_q.ctx)) && (rm_line_i == rline_q);

  // -------------------------------------------------------- state machine
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q  <= ST_INIT;
      req_q    <= '0;
      rhit_q   <= 1'b0;
      rline_q  <= '0;
      rctx_q   <= '0;
      rprot_q  <= 1'b0;
      rvalid_q <= '0;
      kind_q   <= ACC_HIT;
      cnt_q    <= '0;
      lbuf_q   <= '0;
      stat_idx_miss_o <= 1'b0;
      stat_ctx_miss_o <= 1'b0;
    end else begin
      unique case (state_q)
        ST_INIT: if (!vt_busy_i) state_q <= ST_IDLE;
        ST_IDLE: begin
          if (cpu_req_i) begin
            req_q   <= '{we: cpu_we_i,
                         tag: cpu_addr_i[ADDR_W-1 -: TAG_W],
                         idx: cpu_addr_i[OFF_W +: IDX_W],
                         woff: WOFF_W'(cpu_addr_i[OFF_W-1:2]),
                         wdata: cpu_wdata_i, be: cpu_be_i,
                         ctx: cpu_ctx_i, prot: cpu_prot_i};
            rhit_q  <= rm_hit_i;
            rline_q <= rm_line_i;
            rctx_q  <= rm_ctx_i;
            rprot_q <= rm_prot_i;
            state_q <= ST_LOOKUP;
          end
        end
        ST_LOOKUP: begin
          kind_q   <= lookup_kind;
          rvalid_q <= vt_rd_i;
          cnt_q    <= '0;
          if (req_q.we)                    state_q <= ST_MEM_WR;
          else if (hit)                    state_q <= ST_IDLE;
          else if (lookup_kind == ACC_CTX_MISS) state_q <= ST_UNCACHED;
          else                             state_q <= ST_FILL;
        end
        ST_FILL: begin
          if (mem_ack_i) begin
            lbuf_q[cnt_q] <= mem_rdata_i;
            cnt_q <= cnt_q + 1'b1;
            if (cnt_q == WOFF_W'(WORDS - 1)) state_q <= ST_FILL_WR;
          end
        end
        ST_FILL_WR:  state_q <= ST_IDLE;
        ST_UNCACHED: if (mem_ack_i) state_q <= ST_IDLE;
        ST_MEM_WR:   if (mem_ack_i) state_q <= ST_IDLE;
        default:     state_q <= ST_IDLE;
      endcase
      if (cpu_ack_o) begin
        stat_idx_miss_o <= (cpu_kind_o == ACC_IDX_MISS);
        stat_ctx_miss_o <= (cpu_kind_o == ACC_CTX_MISS);
      end
    end
  end

  // ------------------------------------------------------------- outputs
  always_comb begin
    // remapping circuit: the presented index, or the stored one on a fill
    rm_idx_o  = (state_q == ST_IDLE) ? cpu_addr_i[OFF_W +: IDX_W] : req_q.idx;
    rm_wr_o   = (state_q == ST_FILL_WR);
    rm_ctx_o  = req_q.ctx;
    rm_prot_o = req_q.prot;
    arr_rd_line_o = rm_line_i;

    vt_we_o      = 1'b0;
    vt_wr_line_o = rm_line_i;
    vt_wr_o      = '0;
    tg_we_o      = 1'b0;
    tg_set_o     = fill_set;
    tg_line_o    = rm_line_i;
    tg_tag_o     = req_q.tag;
    da_we_o      = 1'b0;
    da_set_o     = fill_set;
    da_line_o    = rm_line_i;
    da_be_o      = '1;
    da_wdata_o   = lbuf_q;

    mem_req_o   = 1'b0;
    mem_we_o    = 1'b0;
    mem_addr_o  = {req_q.tag, req_q.idx, req_q.woff, 2'b00};
    mem_wdata_o = req_q.wdata;
    mem_be_o    = req_q.be;

    cpu_ack_o   = 1'b0;
    cpu_rdata_o = lbuf_q[req_q.woff];
    cpu_kind_o  = kind_q;

    unique case (state_q)
      ST_LOOKUP: begin
        cpu_kind_o = lookup_kind;
        if (!req_q.we && hit) begin
          cpu_ack_o   = 1'b1;
          cpu_rdata_o = hit_word;
        end
        if (req_q.we && tag_any) begin
          // store to a cached word: update its bytes in the set holding the
          // tag, whichever context owns the line, so that no stale copy
          // stays behind (residency does not change)
          da_we_o    = 1'b1;
          da_set_o   = tag_set;
          da_line_o  = rline_q;
          da_be_o    = LINE_BYTES'(req_q.be) << (4 * req_q.woff);
          da_wdata_o = {WORDS{req_q.wdata}};
        end
        if (!req_q.we && lookup_kind == ACC_CTX_MISS) begin
          // context miss: evict a random physical line
          vt_we_o      = 1'b1;
          vt_wr_line_o = rnd_i[N-1:0];
          vt_wr_o      = '0;
        end
      end
      ST_FILL: begin
        mem_req_o  = 1'b1;
        mem_addr_o = {req_q.tag, req_q.idx, cnt_q, 2'b00};
      end
      ST_FILL_WR: begin
        // single-cycle write of tag, valid bits, data and LNReg
        tg_we_o   = 1'b1;
        da_we_o   = 1'b1;
        vt_we_o   = 1'b1;
        vt_wr_o   = keep_line ? (rvalid_q | fill_onehot) : fill_onehot;
        cpu_ack_o = 1'b1;
      end
      ST_UNCACHED: begin
        mem_req_o   = 1'b1;
        cpu_ack_o   = mem_ack_i;
        cpu_rdata_o = mem_rdata_i;
      end
      ST_MEM_WR: begin
        mem_req_o = 1'b1;
        mem_we_o  = 1'b1;
        cpu_ack_o = mem_ack_i;
      end
      default: ;
    endcase
  end

  // ----------------------------------------------------------- assertions
  // The memory request and its address stay stable until acknowledged.
  property p_mem_stable;
    @(posedge clk) disable iff (!rst_n)
      (mem_req_o && !mem_ack_i) |=> (mem_req_o && $stable(mem_addr_o) && $stable(mem_we_o));
  endproperty
  a_mem_stable: assert property (p_mem_stable);

endmodule
