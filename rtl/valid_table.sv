// Valid table of the L-associative security-aware cache: L valid bits per
// physical line, one per set, read and written as one word so that all sets
// of a line can be invalidated in a single write when the line is remapped.
//
// The paper compares a block-RAM and a flip-flop valid table and finds the
// block-RAM one better in speed and resources; USE_BRAM selects between the
// two here (default 1, block RAM). Block RAM cannot be reset, so after reset
// the BRAM variant clears one line per cycle and holds busy_o high for 2^N
// cycles; the flip-flop variant clears in the reset cycle. The sweep and the
// read-before-write behaviour are this design's own choices.
//
// Interface: synchronous read (address in cycle t, rd_data_o in cycle t+1,
// old data when the same line is written in cycle t); one write port
// (we_i, wr_line_i, wr_data_i) written at the clock edge.
module valid_table #(
  parameter int unsigned N        = 7,  // 2^N physical lines
  parameter int unsigned L        = 2,  // sets per line
  parameter bit          USE_BRAM = 1'b1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] rd_line_i,
  output logic [L-1:0] rd_data_o,
  input  logic         we_i,
  input  logic [N-1:0] wr_line_i,
  input  logic [L-1:0] wr_data_i,
  output logic         busy_o
);

  localparam int unsigned LINES = 1 << N;

  if (USE_BRAM) begin : g_bram
    logic [L-1:0] mem [LINES];
    logic [N-1:0] clr_line_q;
    logic         clr_q;

    always_ff @(posedge clk) begin
      if (!rst_n) begin
        clr_q      <= 1'b1;
        clr_line_q <= '0;
      end else if (clr_q) begin
        clr_line_q <= clr_line_q + 1'b1;
        if (clr_line_q == N'(LINES - 1)) clr_q <= 1'b0;
      end
    end

    always_ff @(posedge clk) begin
      rd_data_o <= mem[rd_line_i];
      if (clr_q) begin
        mem[clr_line_q] <= '0;
      end else if (we_i) begin
        mem[wr_line_i] <= wr_data_i;
      end
    end

    assign busy_o = clr_q || !rst_n;
  end else begin : g_ff
    logic [L-1:0] vld_q [LINES];

    always_ff @(posedge clk) begin
      if (!rst_n) begin
        for (int unsigned i = 0; i < LINES; i++) vld_q[i] <= '0;
        rd_data_o <= '0;
      end else begin
        rd_data_o <= vld_q[rd_line_i];
        if (we_i) vld_q[wr_line_i] <= wr_data_i;
      end
    end

    assign busy_o = !rst_n;
  end

endmodule
