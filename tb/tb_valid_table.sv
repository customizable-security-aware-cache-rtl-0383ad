// Self-checking testbench of valid_table, both variants side by side
// (N=4, L=2): the block-RAM variant must stay busy for exactly 2^N cycles
// after reset and the flip-flop variant for none; both must then read all
// zeros, and random writes and reads (one-cycle read latency, whole-line
// writes) must match a model.
module tb_valid_table;
  localparam int N = 4, L = 2, LINES = 1 << N;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0] rd_line, wr_line;
  logic [L-1:0] wr_data, rd_b, rd_f;
  logic we, busy_b, busy_f;
  int checks = 0, failures = 0;
  logic [L-1:0] model [LINES];

  valid_table #(.N(N), .L(L), .USE_BRAM(1'b1)) dut_b (
    .clk, .rst_n, .rd_line_i(rd_line), .rd_data_o(rd_b), .we_i(we),
    .wr_line_i(wr_line), .wr_data_i(wr_data), .busy_o(busy_b));
  valid_table #(.N(N), .L(L), .USE_BRAM(1'b0)) dut_f (
    .clk, .rst_n, .rd_line_i(rd_line), .rd_data_o(rd_f), .we_i(we),
    .wr_line_i(wr_line), .wr_data_i(wr_data), .busy_o(busy_f));

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int busy_cycles;
    logic [L-1:0] exp_rd;
    we = 0; rd_line = 0; wr_line = 0; wr_data = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    busy_cycles = 0;
    #1;
    checks++; if (busy_f) begin failures++; $display("ff variant busy"); end
    while (busy_b) begin @(negedge clk); busy_cycles++; end
    checks++;
    if (busy_cycles != LINES) begin failures++; $display("busy for %0d cycles", busy_cycles); end
    for (int i = 0; i < LINES; i++) model[i] = '0;
    for (int i = 0; i < LINES; i++) begin
      rd_line = i[N-1:0];
      @(negedge clk);
      checks++; if (rd_b !== '0 || rd_f !== '0) failures++;
    end
    for (int t = 0; t < 1500; t++) begin
      rd_line = N'($urandom_range(0, LINES - 1));
      we = $urandom_range(0, 1) == 1;
      wr_line = N'($urandom_range(0, LINES - 1));
      wr_data = L'($urandom_range(0, (1 << L) - 1));
      exp_rd = model[rd_line];                   // old data on a same-line write
      @(posedge clk);
      if (we) model[wr_line] = wr_data;
      #1;
      checks++;
      if (rd_b !== exp_rd || rd_f !== exp_rd) begin
        failures++;
        if (failures < 8) $display("line %0d: bram %b ff %b expected %b", rd_line, rd_b, rd_f, exp_rd);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
