// Index remapping circuit: a content-addressable array of line-number
// registers (LNRegs) that maps an (N+K)-bit virtual cache index onto one of
// 2^N physical cache lines.
//
// How it works (follows the remapping circuit of the paper this design is based on):
//  * One LNReg per physical line holds the virtual index currently mapped to
//    that line. Every LNReg is compared with the incoming index in parallel;
//    an encoder turns the match vector into the physical line number.
//  * Writes are registered: the index, the write bit and the line used by the
//    write ("write-to" register) are captured, and the LNReg selected by a
//    decoder of the write-to register is updated in the following cycle.
//  * While a registered write is pending, an index equal to the registered
//    index hits on the write-to register, which takes precedence over the
//    LNRegs because it is more recent (the AND/OR/MUX path of the figure).
//  * Without any match the random number is passed out, so a write to the
//    tag/data arrays and the remapping happen in one cycle on an index miss.
// Along with the index each LNReg holds the context identifier and a
// protection bit of the line, as the SecRAND algorithm requires; they are
// returned for the matching line.
//
// This design's own choices: the LNRegs reset to the identity mapping
// (LNReg i holds index i), so that all stored indices are distinct from the
// first cycle and no LNReg valid bit is needed; the LNReg that is about to
// be overwritten by the pending write is masked out of the match, so that the
// index it is losing cannot hit during that one cycle; the encoder is an
// OR-encoder, which is exact because stored indices are unique.
//
// Interface: idx_i is looked up combinationally; idx_hit_o, idx_out_o,
// hit_ctx_o and hit_prot_o are valid in the same cycle. Asserting wr_i in
// that cycle records (idx_i, wr_ctx_i, wr_prot_i) for line idx_out_o, and the
// LNReg is written at the next clock edge after that.
module index_remap #(
  parameter int unsigned N     = 7,  // physical index bits (2^N lines)
  parameter int unsigned K     = 1,  // index extension bits
  parameter int unsigned CTX_W = 8   // context identifier width
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [N+K-1:0]     idx_i,
  input  logic               wr_i,
  input  logic [CTX_W-1:0]   wr_ctx_i,
  input  logic               wr_prot_i,
  input  logic [N-1:0]       rand_i,
  output logic               idx_hit_o,
  output logic [N-1:0]       idx_out_o,
  output logic [CTX_W-1:0]   hit_ctx_o,
  output logic               hit_prot_o,
  output logic               bypass_o    // hit served by the write-to register
);

  localparam int unsigned LINES = 1 << N;

  typedef struct packed {
    logic [N+K-1:0]   idx;
    logic [CTX_W-1:0] ctx;
    logic             prot;
  } lnreg_t;

  lnreg_t           lnreg_q [LINES];

  // Registered write parameters.
  logic             wr_q;
  logic [N+K-1:0]   idx_q;
  logic [N-1:0]     wto_q;
  logic [CTX_W-1:0] ctx_q;
  logic             prot_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int unsigned i = 0; i < LINES; i++) begin
        lnreg_q[i] <= '{idx: (N+K)'(i), ctx: '0, prot: 1'b0};
      end
      wr_q   <= 1'b0;
      idx_q  <= '0;
      wto_q  <= '0;
      ctx_q  <= '0;
      prot_q <= 1'b0;
    end else begin
      // Decoder: the write-to register enables one LNReg.
      if (wr_q) begin
        lnreg_q[wto_q] <= '{idx: idx_q, ctx: ctx_q, prot: prot_q};
      end
      wr_q <= wr_i;
      if (wr_i) begin
        idx_q  <= idx_i;
        wto_q  <= idx_out_o;
        ctx_q  <= wr_ctx_i;
        prot_q <= wr_prot_i;
      end
    end
  end

  // Parallel comparison and OR-encoder.
  logic [LINES-1:0] match;
  logic             enc_hit;
  logic [N-1:0]     enc_line;
  logic [CTX_W-1:0] enc_ctx;
  logic             enc_prot;

  always_comb begin
    enc_line = '0;
    enc_ctx  = '0;
    enc_prot = 1'b0;
    for (int unsigned i = 0; i < LINES; i++) begin
      match[i] = (lnreg_q[i].idx == idx_i) && !(wr_q && (wto_q == N'(i)));
      if (match[i]) begin
        enc_line = enc_line | N'(i);
        enc_ctx  = enc_ctx  | lnreg_q[i].ctx;
        enc_prot = enc_prot | lnreg_q[i].prot;
      end
    end
    enc_hit = |match;
  end

  // Write-buffer comparison (AND), index hit (OR) and the two multiplexers.
  logic wb_hit;
  assign wb_hit     = wr_q && (idx_q == idx_i);
  assign idx_hit_o  = wb_hit || enc_hit;
  assign idx_out_o  = wb_hit ? wto_q  : (enc_hit ? enc_line : rand_i);
  assign hit_ctx_o  = wb_hit ? ctx_q  : enc_ctx;
  assign hit_prot_o = wb_hit ? prot_q : enc_prot;
  assign bypass_o   = wb_hit;

  // Stored indices are unique, so at most one LNReg can match.
  always_ff @(posedge clk) begin
    if (rst_n) begin
      assert ($onehot0(match)) else $error("index_remap: several LNRegs match");
    end
  end

endmodule
