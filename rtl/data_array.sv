// Data array of the security-aware cache: one line-wide memory per set, all
// addressed by the remapped physical line.
//
// Written as an inferable block RAM with byte enables: a read returns the
// whole line of every set one cycle after the line is presented; a write
// updates the bytes of one set selected by wr_be_i, so a line fill writes all
// bytes at once and a store hit writes only the bytes it covers. Line width
// and the wide read port are this design's own choices.
module data_array #(
  parameter int unsigned N          = 7,
  parameter int unsigned L          = 2,
  parameter int unsigned LINE_BYTES = 32,
  localparam int unsigned SET_W = (L > 1) ? $clog2(L) : 1
) (
  input  logic                              clk,
  input  logic [N-1:0]                      rd_line_i,
  output logic [L-1:0][LINE_BYTES*8-1:0]    rd_data_o,
  input  logic                              we_i,
  input  logic [SET_W-1:0]                      wr_set_i,
  input  logic [N-1:0]                      wr_line_i,
  input  logic [LINE_BYTES-1:0]             wr_be_i,
  input  logic [LINE_BYTES*8-1:0]           wr_data_i
);

  localparam int unsigned LINES = 1 << N;

  for (genvar s = 0; s < L; s++) begin : g_set
    logic [LINE_BYTES-1:0][7:0] mem [LINES];
    always_ff @(posedge clk) begin
      rd_data_o[s] <= mem[rd_line_i];
      if (we_i && (wr_set_i == SET_W'(s))) begin
        for (int b = 0; b < LINE_BYTES; b++) begin
          if (wr_be_i[b]) mem[wr_line_i][b] <= wr_data_i[b*8 +: 8];
        end
      end
    end
  end

endmodule
