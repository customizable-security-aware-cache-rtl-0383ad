// Tag array of the security-aware cache: one tag memory per set, all
// addressed by the remapped physical line that the index remapping circuit
// produces, as in the paper's L-associative remapping figure. Valid bits
// are kept apart, in the valid table.
//
// Written as an inferable block RAM: synchronous read of all L sets (line in
// cycle t, tags in cycle t+1), one write port that writes the tag of one set.
// The tag width is (address bits - offset bits - N - K): the extension bits K
// of the index are taken out of the tag, as a larger virtual cache implies.
module tag_array #(
  parameter int unsigned N     = 7,
  parameter int unsigned L     = 2,
  parameter int unsigned TAG_W = 19,
  localparam int unsigned SET_W = (L > 1) ? $clog2(L) : 1
) (
  input  logic                    clk,
  input  logic [N-1:0]            rd_line_i,
  output logic [L-1:0][TAG_W-1:0] rd_tag_o,
  input  logic                    we_i,
  input  logic [SET_W-1:0]        wr_set_i,
  input  logic [N-1:0]            wr_line_i,
  input  logic [TAG_W-1:0]        wr_tag_i
);

  localparam int unsigned LINES = 1 << N;

  for (genvar s = 0; s < L; s++) begin : g_set
    logic [TAG_W-1:0] mem [LINES];
    always_ff @(posedge clk) begin
      rd_tag_o[s] <= mem[rd_line_i];
      if (we_i && (wr_set_i == SET_W'(s))) mem[wr_line_i] <= wr_tag_i;
    end
  end

endmodule
