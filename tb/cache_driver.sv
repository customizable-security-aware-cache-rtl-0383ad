// Testbench helper: one security-aware cache with its own memory model and
// an access generator that imitates the table lookups of an AES (Rijndael)
// software implementation: each round reads four 1 kB T-tables at indices
// taken from a pseudo-random 16-byte state, plus a few reads of a 4 kB data
// buffer; every 16th access is a store to the buffer. A second context can
// run concurrently as an "attacker" that sweeps its own 8 kB array
// (protected victim, unprotected attacker). Loads are checked against a
// golden memory copy; the number of misses of each kind is reported.
module cache_driver #(
  parameter int unsigned CACHE_BYTES = 8192,
  parameter int unsigned L           = 2,
  parameter int unsigned K           = 1,
  parameter int unsigned NACC        = 4000,
  parameter bit          ATTACKER    = 1'b0,
  parameter bit          MMU         = 1'b1,
  parameter bit          VALID_BRAM  = 1'b1
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   accesses,
  output int   misses,
  output int   kinds [4],
  output int   checks,
  output int   failures
);
  import sac_pkg::*;

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

  sa_dcache #(.CACHE_BYTES(CACHE_BYTES), .L(L), .K(K), .MMU(MMU),
              .VALID_BRAM(VALID_BRAM)) u_cache (
    .clk, .rst_n,
    .cpu_req_i(cpu_req), .cpu_we_i(cpu_we), .cpu_addr_i(cpu_addr),
    .cpu_wdata_i(cpu_wdata), .cpu_be_i(cpu_be), .cpu_ctx_i(cpu_ctx),
    .cpu_prot_i(cpu_prot), .cpu_ack_o(cpu_ack), .cpu_rdata_o(cpu_rdata),
    .cpu_kind_o(cpu_kind), .stat_idx_miss_o(st_idx), .stat_ctx_miss_o(st_ctx),
    .ready_o(ready), .remap_bypass_o(byp),
    .mem_req_o(mem_req), .mem_we_o(mem_we), .mem_addr_o(mem_addr),
    .mem_wdata_o(mem_wdata), .mem_be_o(mem_be), .mem_ack_i(mem_ack),
    .mem_rdata_i(mem_rdata));

  mem_model #(.LAT(2)) u_mem (
    .clk, .rst_n, .req_i(mem_req), .we_i(mem_we), .addr_i(mem_addr),
    .wdata_i(mem_wdata), .be_i(mem_be), .ack_o(mem_ack), .rdata_o(mem_rdata),
    .n_reads(n_rd), .n_writes(n_wr));

  logic [31:0] golden [bit [29:0]];
  function automatic logic [31:0] gold(input logic [31:0] a);
    if (golden.exists(a[31:2])) return golden[a[31:2]];
    return ({a[31:2], 2'b00} * 32'h9E37_79B1) ^ 32'h5A5A_0F0F;
  endfunction

  localparam logic [31:0] TTAB = 32'h0004_0000;   // 4 x 1 kB tables
  localparam logic [31:0] BUF  = 32'h0005_0000;   // 4 kB data buffer
  localparam logic [31:0] ATK  = 32'h0008_0000;   // attacker's 8 kB array

  initial begin
    logic [7:0] state [16];
    logic [31:0] a, s;
    logic we;
    int ctx, atk_ptr;
    done = 0; accesses = 0; misses = 0; checks = 0; failures = 0;
    for (int i = 0; i < 4; i++) kinds[i] = 0;
    for (int i = 0; i < 16; i++) state[i] = 8'(i * 37 + 11);
    s = 32'h1357_9BDF;
    atk_ptr = 0;
    @(posedge rst_n);
    while (!ready) @(negedge clk);
    for (int t = 0; t < NACC; t++) begin
      ctx = 1; we = 0;
      if (ATTACKER && (t % 4 == 3)) begin
        ctx = 2;
        a = ATK + 32'(atk_ptr);
        atk_ptr = (atk_ptr + 32) % 8192;
      end else if (t % 16 == 15) begin
        we = 1;
        a = BUF + ((s & 32'h0FFC));
      end else if (t % 8 == 7) begin
        a = BUF + ((s >> 4) & 32'h0FFC);
      end else begin
        // T-table lookup: table t%4, entry from one state byte
        a = TTAB + 32'((t % 4) * 1024) + {22'd0, state[t % 16], 2'b00};
        state[t % 16] = state[t % 16] ^ s[7:0] ^ 8'(t);
      end
      s = {s[30:0], s[31] ^ s[21] ^ s[1] ^ s[0]};
      @(negedge clk);
      cpu_req = 1; cpu_we = we; cpu_addr = a; cpu_wdata = s; cpu_be = 4'hF;
      cpu_ctx = 8'(ctx); cpu_prot = (ctx == 1);
      do begin @(posedge clk); #1; end while (!cpu_ack);
      accesses++;
      kinds[cpu_kind]++;
      if (cpu_kind != ACC_HIT) misses++;
      if (we) golden[a[31:2]] = s;
      else begin
        checks++;
        if (cpu_rdata !== gold(a)) begin
          failures++;
          if (failures < 5) $display("L=%0d K=%0d: load %h got %h expected %h", L, K, a,
                                     cpu_rdata, gold(a));
        end
      end
      @(posedge clk); #1 cpu_req = 0;
    end
    done = 1;
  end
endmodule
