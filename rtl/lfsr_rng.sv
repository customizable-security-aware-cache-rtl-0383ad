// Pseudo-random number source for the SecRAND replacement.
//
// The cache needs a fresh random physical line number on every index miss
// (it becomes the line the new index is remapped to), a random line to evict
// on a context miss and a random set within a line on a tag miss. The
// document names only "a random number generator"; this design uses a
// 32-bit Galois LFSR (taps x^32+x^22+x^2+x+1, i.e. mask 0x80200003) that
// advances every clock cycle, so the value seen by a request depends on the
// cycle it arrives in. The seed is a parameter and must be non-zero.
//
// Interface: rnd_o is the current LFSR state, valid every cycle after reset.
// Timing: one step per cycle; reset (active low, synchronous) loads SEED.
module lfsr_rng #(
  parameter logic [31:0] SEED = 32'hACE1_2468
) (
  input  logic        clk,
  input  logic        rst_n,
  output logic [31:0] rnd_o
);

  localparam logic [31:0] TAPS = 32'h8020_0003;

  logic [31:0] state_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q <= SEED;
    end else begin
      state_q <= (state_q >> 1) ^ (state_q[0] ? TAPS : 32'h0);
    end
  end

  assign rnd_o = state_q;

  initial begin
    assert (SEED != 32'h0) else $error("lfsr_rng: SEED must be non-zero");
  end

endmodule
