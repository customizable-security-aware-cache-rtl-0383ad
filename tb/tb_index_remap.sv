// Self-checking testbench of index_remap (N=4, K=1): checks the identity
// mapping after reset, then runs random lookups and writes against a
// behavioural model of the line-number registers with their one-cycle
// delayed write and the write-buffer bypass. Each mechanism (LNReg hit,
// bypass hit, index miss returning the random number) must occur.
module tb_index_remap;
  localparam int N = 4, K = 1, C = 4, LINES = 1 << N;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [N+K-1:0] idx;
  logic wr, prot, hit, hprot, byp;
  logic [C-1:0] ctx, hctx;
  logic [N-1:0] rnd, line;
  int checks = 0, failures = 0;
  int n_hit = 0, n_byp = 0, n_miss = 0;

  index_remap #(.N(N), .K(K), .CTX_W(C)) dut (
    .clk, .rst_n, .idx_i(idx), .wr_i(wr), .wr_ctx_i(ctx), .wr_prot_i(prot),
    .rand_i(rnd), .idx_hit_o(hit), .idx_out_o(line), .hit_ctx_o(hctx),
    .hit_prot_o(hprot), .bypass_o(byp));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model
  logic [N+K-1:0] m_idx [LINES];
  logic [C-1:0]   m_ctx [LINES];
  logic           m_prot [LINES];
  logic           p_wr, p_prot;
  logic [N+K-1:0] p_idx;
  logic [N-1:0]   p_line;
  logic [C-1:0]   p_ctx;

  task automatic expect_lookup(output logic e_hit, output logic [N-1:0] e_line,
                               output logic [C-1:0] e_ctx, output logic e_prot,
                               output logic e_byp);
    e_hit = 0; e_line = rnd; e_ctx = 0; e_prot = 0; e_byp = 0;
    if (p_wr && p_idx == idx) begin
      e_hit = 1; e_line = p_line; e_ctx = p_ctx; e_prot = p_prot; e_byp = 1;
    end else begin
      for (int j = 0; j < LINES; j++)
        if (m_idx[j] == idx && !(p_wr && p_line == j)) begin
          e_hit = 1; e_line = j[N-1:0]; e_ctx = m_ctx[j]; e_prot = m_prot[j];
        end
    end
  endtask

  task automatic check_now();
    logic e_hit, e_prot, e_byp;
    logic [N-1:0] e_line;
    logic [C-1:0] e_ctx;
    expect_lookup(e_hit, e_line, e_ctx, e_prot, e_byp);
    checks++;
    if (hit !== e_hit || line !== e_line || byp !== e_byp ||
        (e_hit && (hctx !== e_ctx || hprot !== e_prot))) begin
      failures++;
      if (failures < 10)
        $display("idx %0d: got hit=%0b line=%0d byp=%0b ctx=%0d, expected %0b %0d %0b %0d",
                 idx, hit, line, byp, hctx, e_hit, e_line, e_byp, e_ctx);
    end
    if (e_byp) n_byp++; else if (e_hit) n_hit++; else n_miss++;
  endtask

  task automatic model_clock();
    if (p_wr) begin
      m_idx[p_line] = p_idx; m_ctx[p_line] = p_ctx; m_prot[p_line] = p_prot;
    end
    p_wr = wr;
    if (wr) begin
      p_idx = idx; p_line = line; p_ctx = ctx; p_prot = prot;
    end
  endtask

  initial begin
    for (int j = 0; j < LINES; j++) begin
      m_idx[j] = j[N+K-1:0]; m_ctx[j] = '0; m_prot[j] = 1'b0;
    end
    p_wr = 0; p_idx = 0; p_line = 0; p_ctx = 0; p_prot = 0;
    idx = 0; wr = 0; ctx = 0; prot = 0; rnd = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    // identity mapping after reset
    for (int i = 0; i < 2 * LINES; i++) begin
      idx = i[N+K-1:0]; rnd = 4'hA; #1;
      checks++;
      if (hit !== (i < LINES) || (i < LINES && line !== i[N-1:0]) ||
          (i >= LINES && line !== 4'hA)) begin
        failures++; $display("reset map idx %0d: hit=%0b line=%0d", i, hit, line);
      end
    end
    // directed: write a new index, then look it up in the next two cycles
    @(negedge clk); idx = 5'd20; wr = 1; ctx = 4'd3; prot = 1; rnd = 4'd7; #1;
    check_now();
    @(posedge clk); model_clock();
    @(negedge clk); wr = 0; #1;
    check_now();                                  // bypass
    checks++; if (!(byp && line == 4'd7 && hctx == 4'd3 && hprot)) failures++;
    idx = 5'd7; #1; check_now();                  // old index of line 7 is masked
    checks++; if (hit) failures++;
    @(posedge clk); model_clock();
    @(negedge clk); idx = 5'd20; #1; check_now(); // now from the LNReg
    checks++; if (!(hit && !byp && line == 4'd7)) failures++;
    @(posedge clk); model_clock();
    // random traffic
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      idx = $urandom_range(0, 2 * LINES - 1);
      wr = ($urandom_range(0, 9) < 4);
      ctx = $urandom_range(0, 15);
      prot = $urandom_range(0, 1);
      rnd = $urandom_range(0, LINES - 1);
      #1; check_now();
      @(posedge clk); model_clock();
    end
    checks++; if (n_hit == 0 || n_byp == 0 || n_miss == 0) begin
      failures++; $display("mechanism missing: hit %0d bypass %0d miss %0d", n_hit, n_byp, n_miss);
    end
    $display("lnreg hits %0d, bypass hits %0d, index misses %0d", n_hit, n_byp, n_miss);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
